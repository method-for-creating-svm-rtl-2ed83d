// svm_addr_gen: address generator between the SVM user logic and the AXI
// burst master. From the SVM sizes in the work registers it works out how
// many bytes a transfer moves:
//   preload   (is_write = 0): m*(nf+1) + t*nf words, every training vector
//             followed by its label word, then the test vectors;
//   write-back (is_write = 1): nf + 1 + m + t words, w, z, alphas, predictions.
// It then walks the DDR region from base_addr, cutting it into INCR bursts of
// at most MAX_BURST beats that never cross a 4 KB boundary, and hands them to
// the master one at a time: cmd_valid is held until cmd_ready, and the next
// burst is issued only after cmd_cmplt. done pulses after the last burst
// completes. total_bytes stays valid from start until the next start.
// The byte-count rule comes from the design's preload step; the memory layout,
// burst length and one-burst-at-a-time policy are this implementation's.
module svm_addr_gen #(
  parameter int MAX_BURST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        is_write,
  input  logic [31:0] base_addr,
  input  logic [15:0] num_train,
  input  logic [15:0] num_test,
  input  logic [7:0]  num_feat,
  output logic [31:0] total_bytes,
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output logic        cmd_rnw,
  output logic [31:0] cmd_addr,
  output logic [8:0]  cmd_len,
  input  logic        cmd_cmplt,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} st_e;
  st_e st;

  logic [31:0] words, remaining, to_4k, len;

  always_comb begin
    if (is_write) words = 32'(num_feat) + 32'd1 + 32'(num_train) + 32'(num_test);
    else          words = 32'(num_train) * (32'(num_feat) + 32'd1) + 32'(num_test) * 32'(num_feat);
    to_4k = (32'd4096 - 32'(cmd_addr[11:0])) >> 2;
    len   = remaining;
    if (len > 32'(MAX_BURST)) len = 32'(MAX_BURST);
    if (len > to_4k)          len = to_4k;
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmd_valid <= 1'b0; cmd_rnw <= 1'b1; cmd_addr <= '0; cmd_len <= '0;
      remaining <= '0; total_bytes <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          cmd_addr    <= {base_addr[31:2], 2'b00};
          remaining   <= words;
          total_bytes <= words << 2;
          cmd_rnw     <= !is_write;
          if (words == 0) done <= 1'b1;
          else st <= S_ISSUE;
        end
        S_ISSUE: begin
          if (!cmd_valid) begin
            cmd_valid <= 1'b1;
            cmd_len   <= 9'(len);
          end else if (cmd_ready) begin
            cmd_valid <= 1'b0;
            st        <= S_WAIT;
          end
        end
        S_WAIT: if (cmd_cmplt) begin
          cmd_addr  <= cmd_addr + (32'(cmd_len) << 2);
          remaining <= remaining - 32'(cmd_len);
          if (remaining == 32'(cmd_len)) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else st <= S_ISSUE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
