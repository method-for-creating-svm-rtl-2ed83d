// tb_svm_div: checks the Q16.16 divider against exact integer division
// (a*65536/b truncated toward zero) for random and edge operands, the
// saturation on overflow and on b = 0, and the fixed 50-clock latency from
// start to done.
module tb_svm_div;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  fx_t  a, b, q;
  svm_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic one(fx_t av, fx_t bv);
    longint num, expq;
    int cyc;
    num = longint'(av) * 65536;
    if (bv == 0) expq = (av < 0) ? -longint'(32'h7fffffff) : longint'(32'h7fffffff);
    else begin
      expq = num / longint'(bv);
      if (expq > 64'sh7fffffff) expq = 64'sh7fffffff;
      if (expq < -64'sh7fffffff) expq = -64'sh7fffffff;
    end
    a <= av; b <= bv; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done && cyc < 200);
    check(longint'(q) == expq, $sformatf("%0d/%0d: got %0d expected %0d", av, bv, q, expq));
    check(cyc == 50, $sformatf("latency %0d", cyc));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    one(32'sd65536, 32'sd131072);
    one(-32'sd65536, 32'sd196608);
    one(32'sd100, -32'sd7);
    one(32'sd0, 32'sd5);
    one(32'sh7fff0000, 32'sd1);     // overflow saturates
    one(-32'sd1000, 32'sd0);        // divide by zero
    for (int n = 0; n < 200; n++)
      one(fx_t'($urandom()) >>> ($urandom_range(0, 16)), fx_t'($urandom()) >>> ($urandom_range(0, 24)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
