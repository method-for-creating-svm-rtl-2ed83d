// axi_ddr_model: behavioural AXI4 slave memory standing in for the DDR3
// controller in testbenches (not synthesizable). One burst at a time, INCR
// only, 32-bit words. Ready and valid signals are throttled at random
// (STALL_PCT percent of clocks) to exercise the master's handshakes. It
// counts bursts, protocol errors (wrong WLAST, 4 KB crossing) and the longest
// burst; the memory array `mem` is word addressed (byte address / 4) and is
// read and written by the testbench directly.
module axi_ddr_model #(
  parameter int WORDS     = 65536,
  parameter int STALL_PCT = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);

  logic [31:0] mem [WORDS];
  int n_rbursts = 0, n_wbursts = 0, n_errors = 0, max_len = 0;

  typedef enum {IDLE, WDATA, WRESP, RDATA} st_e;
  st_e st = IDLE;
  logic [31:0] addr;
  int beat, len;

  function automatic bit go();
    return $urandom_range(0, 99) >= STALL_PCT;
  endfunction

  assign bresp = 2'b00;
  assign rresp = 2'b00;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; awready <= 0; wready <= 0; bvalid <= 0; arready <= 0; rvalid <= 0; rlast <= 0; rdata <= 0;
    end else begin
      case (st)
        IDLE: begin
          bvalid <= 0;
          if (awvalid && awready) begin
            awready <= 0;
            addr <= awaddr; len = int'(awlen) + 1; beat = 0;
            if (len > max_len) max_len = len;
            if ((awaddr & 32'hfff) + 32'(len * 4) > 32'h1000) n_errors++;
            n_wbursts++;
            st <= WDATA;
            wready <= go();
          end else if (arvalid && arready) begin
            arready <= 0;
            addr <= araddr; len = int'(arlen) + 1; beat = 0;
            if (len > max_len) max_len = len;
            if ((araddr & 32'hfff) + 32'(len * 4) > 32'h1000) n_errors++;
            n_rbursts++;
            st <= RDATA;
          end else begin
            awready <= awvalid && go();
            arready <= !awvalid && arvalid && go();
          end
        end
        WDATA: begin
          if (wvalid && wready) begin
            mem[(addr >> 2) + 32'(beat)] <= wdata;
            if (wlast != (beat == len - 1)) n_errors++;
            beat = beat + 1;
            if (beat == len) begin
              wready <= 0;
              st <= WRESP;
            end else wready <= go();
          end else wready <= go();
        end
        WRESP: begin
          if (bvalid && bready) begin
            bvalid <= 0;
            st <= IDLE;
          end else bvalid <= 1;
        end
        RDATA: begin
          if (rvalid && rready) begin
            beat = beat + 1;
            rvalid <= 0;
            if (beat == len) st <= IDLE;
          end
          if (beat < len && (!rvalid || rready) && go()) begin
            rvalid <= 1;
            rdata  <= mem[(addr >> 2) + 32'(beat)];
            rlast  <= (beat == len - 1);
          end
        end
      endcase
    end
  end
endmodule
