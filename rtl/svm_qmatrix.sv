// svm_qmatrix: stage 1 of training, the label-signed kernel matrix.
// Q_ij = B_i * B_j * K(A_i, A_j) is symmetric, so the unit evaluates only the
// lower triangle: row i = 0..m-1, column j = 0..i. For each pair it streams
// the nf features of A_i and A_j from the two read ports of the data RAM into
// its kernel unit and writes the result to the Q RAM at address {i, j}, and,
// off the diagonal, to {j, i} on the next clock. B is +1/-1, so the label
// product (MAC1 of the optimisation datapath) is a sign, and Mul1 is a
// conditional negation.
// Row i only needs vectors 0..i, so the stage can run while the data set is
// still arriving: it starts row i once avail (the number of training vectors
// whose features and label are in place) exceeds i. Tie avail to num_train
// to run after a complete preload.
// Timing: one feature pair per clock, data RAM latency one clock, so a pair
// costs nf + 1 + kernel latency clocks, plus one clock for the mirrored write;
// m(m+1)/2 pairs in all. done pulses after the last write.
// Data RAM layout: feature f of vector v at v*NF_MAX + f.
// Computing one triangle and overlapping with the preload implement the
// design's non-sequential stage schedule; the order and the avail handshake
// are this implementation's choices.
module svm_qmatrix
  import svm_pkg::*;
#(
  parameter int M_MAX  = 256,
  parameter int NF_MAX = 8,
  parameter int DAW    = 12,
  parameter int IW     = $clog2(M_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      num_train,
  input  logic [7:0]       num_feat,
  input  kernel_e          kernel,
  input  logic [3:0]       degree,
  input  fx_t              gamma,
  input  fx_t              coef0,
  input  logic [M_MAX-1:0] label_pos,
  input  logic [15:0]      avail,
  output logic [DAW-1:0]   d_raddr_a,
  output logic [DAW-1:0]   d_raddr_b,
  input  fx_t              d_rdata_a,
  input  fx_t              d_rdata_b,
  output logic             q_we,
  output logic [2*IW-1:0]  q_waddr,
  output fx_t              q_wdata,
  output logic             busy,
  output logic             done
);

  typedef enum logic [2:0] {S_IDLE, S_ROW, S_FEED, S_WAIT, S_MIRROR} st_e;
  st_e st;

  logic [IW-1:0] i, j;
  logic [7:0]    f;
  logic          v_d, last_d;
  logic          k_valid;
  fx_t           k_val;
  logic          k_ready;

  assign d_raddr_a = DAW'(int'(i) * NF_MAX + int'(f));
  assign d_raddr_b = DAW'(int'(j) * NF_MAX + int'(f));
  assign busy      = (st != S_IDLE);

  svm_kernel u_kernel (
    .clk, .rst_n, .kernel, .degree, .gamma, .coef0,
    .in_valid(v_d), .in_last(last_d), .x(d_rdata_a), .y(d_rdata_b),
    .ready(k_ready), .out_valid(k_valid), .k_out(k_val)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; i <= '0; j <= '0; f <= '0; v_d <= 1'b0; last_d <= 1'b0;
      q_we <= 1'b0; q_waddr <= '0; q_wdata <= '0; done <= 1'b0;
    end else begin
      q_we   <= 1'b0;
      done   <= 1'b0;
      v_d    <= 1'b0;
      last_d <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          i <= '0; j <= '0; f <= '0;
          st <= S_ROW;
        end
        S_ROW: if (32'(avail) > 32'(i)) st <= S_FEED;
        S_FEED: begin
          v_d    <= 1'b1;
          last_d <= (f == num_feat - 8'd1);
          if (f == num_feat - 8'd1) begin
            f  <= '0;
            st <= S_WAIT;
          end else begin
            f <= f + 8'd1;
          end
        end
        S_WAIT: if (k_valid) begin
          q_we    <= 1'b1;
          q_waddr <= {i, j};
          q_wdata <= (label_pos[i] ^ label_pos[j]) ? -k_val : k_val;
          if (j != i) begin
            st <= S_MIRROR;
          end else begin
            j <= '0;
            if (32'(i) == 32'(num_train) - 1) begin
              done <= 1'b1;
              st   <= S_IDLE;
            end else begin
              i  <= i + 1'b1;
              st <= S_ROW;
            end
          end
        end
        S_MIRROR: begin
          q_we    <= 1'b1;
          q_waddr <= {j, i};   // q_wdata still holds Q_ij = Q_ji
          j       <= j + 1'b1;
          st      <= S_FEED;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
