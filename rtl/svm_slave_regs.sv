// svm_slave_regs: the work registers through which the processor describes
// the SVM problem and starts the IP. Word-indexed map (byte offset = 4*idx):
//   0 CTRL        W  bit0 = start (self-clearing pulse)
//   1 STATUS      R  bit0 busy, bit1 done (sticky, cleared by start),
//                    bit2 converged, bit3 AXI error
//   2 NUM_TRAIN   RW m           3 NUM_TEST  RW t      4 NUM_FEAT RW nf
//   5 KERNEL      RW bits1:0 kernel (0 linear, 1 poly, 2 RBF), bits7:4 degree,
//                    bit8 z formula (0 average, 1 midpoint)
//   6 GAMMA       RW Q16.16      7 COEF0     RW Q16.16 8 C        RW Q16.16
//   9 EPS         RW Q16.16     10 MAX_ITER  RW       11 SRC_ADDR RW
//  12 DST_ADDR    RW            13 TOTAL_BYTES R (bytes of the last preload)
//  14 ITERATIONS  R             15 N_SV      R        16 BIAS     R (z)
//  17 SOURCE      RW bit0: 0 data set from DDR at SRC_ADDR, 1 from the stream input
// Writes honour the byte strobes; reads are combinational from the index.
// Reset values: linear kernel, degree 2, gamma = coef0 = C = 1.0,
// eps = 0.001, max_iter = 1000, sizes and addresses 0.
// The map and reset values are this implementation's choices.
module svm_slave_regs
  import svm_pkg::*;
#(
  parameter int IDX_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [31:0]      wr_data,
  input  logic [3:0]       wr_strb,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [31:0]      rd_data,
  // to and from the user logic
  output svm_cfg_t         cfg,
  output logic             start,
  input  logic             busy,
  input  logic             done,
  input  logic             converged,
  input  logic             axi_err,
  input  logic [31:0]      total_bytes,
  input  logic [15:0]      iterations,
  input  logic [15:0]      n_sv,
  input  fx_t              bias
);

  logic [31:0] r [2:12];
  logic        done_flag;
  logic        src_stream;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    for (int b = 0; b < 4; b++) if (s[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r[2] <= '0; r[3] <= '0; r[4] <= '0;
      r[5] <= 32'h0000_0020;
      r[6] <= FX_ONE; r[7] <= FX_ONE; r[8] <= FX_ONE;
      r[9] <= 32'd66; r[10] <= 32'd1000; r[11] <= '0; r[12] <= '0;
      start <= 1'b0; done_flag <= 1'b0; src_stream <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_en) begin
        if (wr_idx == 0) begin
          if (wr_strb[0] && wr_data[0] && !busy) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
          end
        end else if (wr_idx == 17) begin
          if (wr_strb[0]) src_stream <= wr_data[0];
        end else if (wr_idx >= 2 && wr_idx <= 12) begin
          r[wr_idx] <= merge(r[wr_idx], wr_data, wr_strb);
        end
      end
      if (done) done_flag <= 1'b1;
    end
  end

  always_comb begin
    cfg.num_train = r[2][15:0];
    cfg.num_test  = r[3][15:0];
    cfg.num_feat  = r[4][7:0];
    cfg.kernel    = kernel_e'(r[5][1:0]);
    cfg.degree    = r[5][7:4];
    cfg.z_mode    = r[5][8];
    cfg.src_stream = src_stream;
    cfg.gamma     = r[6];
    cfg.coef0     = r[7];
    cfg.c         = r[8];
    cfg.eps       = r[9];
    cfg.max_iter  = r[10][15:0];
    cfg.src_addr  = r[11];
    cfg.dst_addr  = r[12];
    unique case (rd_idx)
      6'd1:  rd_data = {28'd0, axi_err, converged, done_flag, busy};
      6'd13: rd_data = total_bytes;
      6'd14: rd_data = {16'd0, iterations};
      6'd15: rd_data = {16'd0, n_sv};
      6'd16: rd_data = bias;
      6'd17: rd_data = {31'd0, src_stream};
      default: rd_data = (rd_idx >= 2 && rd_idx <= 12) ? r[rd_idx] : 32'd0;
    endcase
  end

endmodule
