// svm_div: sequential signed fixed-point divider, q = (a << 16) / b in Q16.16.
// It is the Div1 unit of the optimisation datapath (step = gradient / curvature)
// and also forms the average that gives the displacement z.
// Radix-2 restoring division on the magnitudes, one quotient bit per clock:
// start loads the operands, done pulses 49 clocks later with q valid until
// the next start. The sign is applied at the end; a quotient that does not fit
// in 32 bits saturates, and b = 0 returns the largest value of a's sign.
// The algorithm and latency are this implementation's choices.
module svm_div
  import svm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  a,
  input  fx_t  b,
  output logic busy,
  output logic done,
  output fx_t  q
);

  localparam int NB = FX_W + FX_FRAC;  // dividend bits

  logic [NB-1:0] dividend, quo;
  logic [FX_W:0] rem;
  logic [FX_W-1:0] divisor;
  logic [$clog2(NB+1)-1:0] cnt;
  logic neg;
  logic [FX_W:0] rem_sh;

  assign rem_sh = {rem[FX_W-1:0], dividend[NB-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= '0;
      dividend <= '0; quo <= '0; rem <= '0; divisor <= '0; cnt <= '0; neg <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        neg      <= a[FX_W-1] ^ b[FX_W-1];
        dividend <= NB'(a[FX_W-1] ? -64'(a) : 64'(a)) << FX_FRAC;
        divisor  <= b[FX_W-1] ? FX_W'(-b) : FX_W'(b);
        rem      <= '0;
        quo      <= '0;
        cnt      <= ($clog2(NB+1))'(NB);
      end else if (busy) begin
        if (cnt != 0) begin
          dividend <= dividend << 1;
          if (rem_sh >= {1'b0, divisor}) begin
            rem <= rem_sh - {1'b0, divisor};
            quo <= {quo[NB-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[NB-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (divisor == 0 || quo > NB'(32'h7fff_ffff))
            q <= neg ? fx_t'(32'sh8000_0001) : fx_t'(32'sh7fff_ffff);
          else
            q <= neg ? -fx_t'(quo[FX_W-1:0]) : fx_t'(quo[FX_W-1:0]);
        end
      end
    end
  end

endmodule
