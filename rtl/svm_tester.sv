// svm_tester: stage 3, classification of the test vectors.
// For each test vector x the unit forms the decision value
//   f(x) = sum over support vectors j of alpha_j * B_j * K(x, A_j)  +  z
// through the chain Kernel -> Mul (alpha) -> MAC (B_sv) -> Add (z) -> Comp >0
// -> M1, and writes +1 (f > 0) or -1 (f <= 0) to the result RAM at the test
// vector's index; res_value carries f alongside.
// Training vectors whose alpha is 0 are not support vectors and are skipped
// after a one-clock check. Each support vector costs nf + 1 + kernel-latency
// clocks. Test vector t sits in the data RAM right after the m training
// vectors, at vector index m + t (feature f at (m+t)*NF_MAX + f).
// The skip of non-support vectors follows the datapath; the fixed-point format
// and the result encoding are this implementation's choices.
module svm_tester
  import svm_pkg::*;
#(
  parameter int M_MAX  = 256,
  parameter int T_MAX  = 256,
  parameter int NF_MAX = 8,
  parameter int DAW    = 12,
  parameter int IW     = $clog2(M_MAX),
  parameter int TW     = $clog2(T_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      num_train,
  input  logic [15:0]      num_test,
  input  logic [7:0]       num_feat,
  input  kernel_e          kernel,
  input  logic [3:0]       degree,
  input  fx_t              gamma,
  input  fx_t              coef0,
  input  fx_t              bias,
  input  logic [M_MAX-1:0] label_pos,
  output logic [IW-1:0]    alpha_raddr,
  input  fx_t              alpha_rdata,
  output logic [DAW-1:0]   d_raddr_a,
  output logic [DAW-1:0]   d_raddr_b,
  input  fx_t              d_rdata_a,
  input  fx_t              d_rdata_b,
  output logic             res_we,
  output logic [TW-1:0]    res_addr,
  output fx_t              res_pred,
  output fx_t              res_value,
  output logic             busy,
  output logic             done
);

  typedef enum logic [2:0] {S_IDLE, S_CHKSV, S_FEED, S_WAIT, S_FIN} st_e;
  st_e st;

  logic [TW-1:0] tt;
  logic [IW-1:0] j;
  logic [7:0]    f;
  logic          v_d, last_d, k_valid, k_ready;
  fx_t           k_val, prod, dec;
  logic signed [47:0] acc;
  logic          last_j;

  assign alpha_raddr = j;
  assign d_raddr_a   = DAW'((int'(num_train) + int'(tt)) * NF_MAX + int'(f));
  assign d_raddr_b   = DAW'(int'(j) * NF_MAX + int'(f));
  assign busy        = (st != S_IDLE);
  assign last_j      = (32'(j) == 32'(num_train) - 1);
  assign prod        = fx_mul(alpha_rdata, k_val);       // Mul
  assign dec         = fx_t'(acc) + bias;                 // Add

  svm_kernel u_kernel (
    .clk, .rst_n, .kernel, .degree, .gamma, .coef0,
    .in_valid(v_d), .in_last(last_d), .x(d_rdata_a), .y(d_rdata_b),
    .ready(k_ready), .out_valid(k_valid), .k_out(k_val)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; tt <= '0; j <= '0; f <= '0; v_d <= 1'b0; last_d <= 1'b0; acc <= '0;
      res_we <= 1'b0; res_addr <= '0; res_pred <= '0; res_value <= '0; done <= 1'b0;
    end else begin
      res_we <= 1'b0;
      done   <= 1'b0;
      v_d    <= 1'b0;
      last_d <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          tt <= '0; j <= '0; acc <= '0;
          st <= (num_test == 0) ? S_IDLE : S_CHKSV;
          done <= (num_test == 0);
        end
        S_CHKSV: begin
          if (alpha_rdata > 0) begin
            f  <= '0;
            st <= S_FEED;
          end else if (last_j) st <= S_FIN;
          else j <= j + 1'b1;
        end
        S_FEED: begin
          v_d    <= 1'b1;
          last_d <= (f == num_feat - 8'd1);
          if (f == num_feat - 8'd1) st <= S_WAIT;
          else f <= f + 8'd1;
        end
        S_WAIT: if (k_valid) begin
          acc <= label_pos[j] ? acc + 48'(prod) : acc - 48'(prod);   // MAC with B_sv
          if (last_j) st <= S_FIN;
          else begin
            j  <= j + 1'b1;
            st <= S_CHKSV;
          end
        end
        S_FIN: begin
          res_we    <= 1'b1;
          res_addr  <= tt;
          res_value <= dec;
          res_pred  <= (dec > 0) ? FX_ONE >>> FX_FRAC : -(FX_ONE >>> FX_FRAC);  // Comp >0, M1
          j   <= '0;
          acc <= '0;
          if (32'(tt) == 32'(num_test) - 1) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            tt <= tt + 1'b1;
            st <= S_CHKSV;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
