// axi_master_burst: AXI4 burst master for the SVM IP's DDR traffic.
// Command side (IPIC style): a command {rnw, addr, len} is taken when
// cmd_valid and cmd_ready are both high; cmd_ready is high only while the
// master is idle, so one burst is in flight at a time. len is the number of
// 32-bit beats, 1..256.
//   read : AR handshake, then every R beat is passed out on rd_valid/rd_data
//          (RREADY is always high, the user side must take a word per clock);
//   write: AW handshake, then W beats take wr_data, pulsing wr_pop for each
//          accepted beat so the user side presents the next word the clock
//          after; then the B response is awaited.
// cmd_cmplt pulses when the burst has finished. Any SLVERR/DECERR response
// sets the sticky err flag until reset. INCR bursts, 4-byte beats, all
// strobes set. The protocol is AXI4; the single-burst policy is this
// implementation's choice.
module axi_master_burst (
  input  logic        clk,
  input  logic        rst_n,
  // command / data side
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_rnw,
  input  logic [31:0] cmd_addr,
  input  logic [8:0]  cmd_len,
  output logic        cmd_cmplt,
  output logic        rd_valid,
  output logic [31:0] rd_data,
  input  logic [31:0] wr_data,
  output logic        wr_pop,
  output logic        err,
  // AXI4 master
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  output logic [31:0] m_axi_araddr,
  output logic [7:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready
);

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_W, S_B} st_e;
  st_e st;

  logic [7:0] beat, last_beat;

  assign cmd_ready     = (st == S_IDLE);
  assign m_axi_awsize  = 3'd2;
  assign m_axi_arsize  = 3'd2;
  assign m_axi_awburst = 2'b01;
  assign m_axi_arburst = 2'b01;
  assign m_axi_wstrb   = 4'hf;
  assign m_axi_awlen   = last_beat;
  assign m_axi_arlen   = last_beat;
  assign m_axi_awvalid = (st == S_AW);
  assign m_axi_arvalid = (st == S_AR);
  assign m_axi_wvalid  = (st == S_W);
  assign m_axi_wdata   = wr_data;
  assign m_axi_wlast   = (st == S_W) && (beat == last_beat);
  assign m_axi_bready  = (st == S_B);
  assign m_axi_rready  = (st == S_R);
  assign rd_valid      = (st == S_R) && m_axi_rvalid;
  assign rd_data       = m_axi_rdata;
  assign wr_pop        = (st == S_W) && m_axi_wready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; beat <= '0; last_beat <= '0; cmd_cmplt <= 1'b0; err <= 1'b0;
      m_axi_awaddr <= '0; m_axi_araddr <= '0;
    end else begin
      cmd_cmplt <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          last_beat    <= 8'(cmd_len - 9'd1);
          beat         <= '0;
          m_axi_araddr <= cmd_addr;
          m_axi_awaddr <= cmd_addr;
          st           <= cmd_rnw ? S_AR : S_AW;
        end
        S_AR: if (m_axi_arready) st <= S_R;
        S_R: if (m_axi_rvalid) begin
          if (m_axi_rresp[1]) err <= 1'b1;
          beat <= beat + 8'd1;
          if (m_axi_rlast) begin
            cmd_cmplt <= 1'b1;
            st        <= S_IDLE;
          end
        end
        S_AW: if (m_axi_awready) st <= S_W;
        S_W: if (m_axi_wready) begin
          beat <= beat + 8'd1;
          if (beat == last_beat) st <= S_B;
        end
        S_B: if (m_axi_bvalid) begin
          if (m_axi_bresp[1]) err <= 1'b1;
          cmd_cmplt <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid, once raised, stays up with stable payload until ready
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr) && $stable(m_axi_arlen));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr) && $stable(m_axi_awlen));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_wvalid && !m_axi_wready |=> m_axi_wvalid && $stable(m_axi_wlast));
  a_rlast_count: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_rvalid && m_axi_rready && m_axi_rlast |-> beat == last_beat);

endmodule
