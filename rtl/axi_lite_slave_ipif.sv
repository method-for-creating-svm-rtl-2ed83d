// axi_lite_slave_ipif: AXI4-Lite slave front end of the SVM IP's work
// registers. It serves one transaction at a time and turns it into simple
// register strobes:
//   write: taken in the clock where AWVALID and WVALID are both high and no
//          response is pending; wr_en pulses with wr_idx = AWADDR[ADDR_W-1:2],
//          wr_data and wr_strb; BVALID (OKAY) follows the next clock and
//          is held until BREADY.
//   read : taken when ARVALID is high and no read data is pending; rd_idx is
//          ARADDR[ADDR_W-1:2] in that clock, rd_data is sampled into RDATA and
//          RVALID (OKAY) is held until RREADY. rd_en pulses with the read.
// Single-beat, always-OKAY behaviour is this implementation's choice.
module axi_lite_slave_ipif #(
  parameter int ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // register side
  output logic              wr_en,
  output logic [ADDR_W-3:0] wr_idx,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_strb,
  output logic              rd_en,
  output logic [ADDR_W-3:0] rd_idx,
  input  logic [31:0]       rd_data
);

  logic wr_take, rd_take;

  assign wr_take        = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign rd_take        = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_awready = wr_take;
  assign s_axil_wready  = wr_take;
  assign s_axil_arready = rd_take;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign wr_en          = wr_take;
  assign wr_idx         = s_axil_awaddr[ADDR_W-1:2];
  assign wr_data        = s_axil_wdata;
  assign wr_strb        = s_axil_wstrb;
  assign rd_en          = rd_take;
  assign rd_idx         = s_axil_araddr[ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (wr_take)                           s_axil_bvalid <= 1'b1;
      else if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (rd_take) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_data;
      end else if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
