// svm_kernel: the "mathematical kernel" unit, K(Ax, Ay) for one vector pair.
// The two vectors arrive as a stream of feature pairs (x, y), one pair per
// clock with in_valid, the last pair flagged by in_last. The unit accumulates
// either the dot product x.y (linear and polynomial kernels) or the squared
// distance |x-y|^2 (RBF kernel) in a 64-bit accumulator, then finishes:
//   linear      K = x.y                          out 1 clock after in_last
//   polynomial  K = (gamma*x.y + coef0)^degree   out degree+3 clocks after
//   RBF         K = exp(-gamma*|x-y|^2)          out 5 clocks after
// The exponential is evaluated as 2^(-u), u = gamma*d2*log2(e): the integer
// part of u becomes a right shift and the fractional part f uses the quadratic
// 2^-f ~= 1 - 0.67157 f + 0.17157 f^2 (error below 0.25%).
// The kernel set follows the design; the fixed-point format, the exponential
// approximation and the latencies are this implementation's choices.
// A new vector may start once out_valid has been seen (ready is high).
module svm_kernel
  import svm_pkg::*;
#(
  parameter int ACC_W = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  kernel_e    kernel,
  input  logic [3:0] degree,
  input  fx_t        gamma,
  input  fx_t        coef0,
  input  logic       in_valid,
  input  logic       in_last,
  input  fx_t        x,
  input  fx_t        y,
  output logic       ready,
  output logic       out_valid,
  output fx_t        k_out
);

  localparam logic signed [31:0] LOG2E  = 32'sd94548;   // log2(e) in Q16.16
  localparam fx_t                EXP_A  = -32'sd44012;  // -0.67157
  localparam fx_t                EXP_B  = 32'sd11244;   //  0.17157

  typedef enum logic [2:0] {S_ACC, S_POLY0, S_POLYN, S_RBF1, S_RBF2, S_RBF3, S_RBF4} st_e;
  st_e st;

  logic signed [ACC_W-1:0] acc, acc_next, term;
  fx_t        diff, sum, base, res, t_val, frac_pow;
  logic [3:0] cnt;
  logic [5:0] ipart;
  logic [15:0] fpart;
  logic [63:0] u64;
  fx_t        f_fx;

  always_comb begin
    diff = x - y;
    if (kernel == K_RBF) term = ACC_W'(64'(diff) * 64'(diff));
    else                 term = ACC_W'(64'(x) * 64'(y));
    acc_next = acc + term;
    u64      = 64'($unsigned(t_val)) * 64'($unsigned(LOG2E));
    f_fx     = fx_t'({16'd0, fpart});
  end

  assign ready = (st == S_ACC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_ACC;
      acc       <= '0;
      sum       <= '0;
      base      <= '0;
      res       <= '0;
      t_val     <= '0;
      frac_pow  <= '0;
      cnt       <= '0;
      ipart     <= '0;
      fpart     <= '0;
      out_valid <= 1'b0;
      k_out     <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (st)
        S_ACC: if (in_valid) begin
          if (in_last) begin
            acc <= '0;
            sum <= fx_t'(acc_next >>> FX_FRAC);
            unique case (kernel)
              K_POLY: st <= S_POLY0;
              K_RBF:  st <= S_RBF1;
              default: begin
                out_valid <= 1'b1;
                k_out     <= fx_t'(acc_next >>> FX_FRAC);
              end
            endcase
          end else begin
            acc <= acc_next;
          end
        end
        S_POLY0: begin
          base <= fx_mul(gamma, sum) + coef0;
          res  <= FX_ONE;
          cnt  <= degree;
          st   <= S_POLYN;
        end
        S_POLYN: begin
          if (cnt == 0) begin
            out_valid <= 1'b1;
            k_out     <= res;
            st        <= S_ACC;
          end else begin
            res <= fx_mul(res, base);
            cnt <= cnt - 1'b1;
          end
        end
        S_RBF1: begin
          t_val <= (sum[31]) ? '0 : fx_mul(gamma, sum);
          st    <= S_RBF2;
        end
        S_RBF2: begin
          // u = t*log2(e): integer part in bits 63:32, fraction in 31:16
          ipart <= (u64[63:32] > 32'd31) ? 6'd32 : u64[37:32];
          fpart <= u64[31:16];
          st    <= S_RBF3;
        end
        S_RBF3: begin
          frac_pow <= FX_ONE + fx_mul(EXP_A, f_fx) + fx_mul(EXP_B, fx_mul(f_fx, f_fx));
          st       <= S_RBF4;
        end
        S_RBF4: begin
          out_valid <= 1'b1;
          k_out     <= (ipart >= 6'd32) ? '0 : (frac_pow >>> ipart);
          st        <= S_ACC;
        end
        default: st <= S_ACC;
      endcase
    end
  end

endmodule
