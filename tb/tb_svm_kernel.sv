// tb_svm_kernel: checks the kernel unit against real-valued reference
// formulas for the linear, polynomial and RBF kernels on random vectors, and
// checks the documented latency from the last feature pair to out_valid
// (linear 1, polynomial degree+3, RBF 5 clocks).
module tb_svm_kernel;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  kernel_e    kernel;
  logic [3:0] degree;
  fx_t        gamma, coef0, x, y, k_out;
  logic       in_valid, in_last, ready, out_valid;

  svm_kernel dut (.clk, .rst_n, .kernel, .degree, .gamma, .coef0, .in_valid, .in_last,
                  .x, .y, .ready, .out_valid, .k_out);

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 65536.0)); endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(kernel_e k, int deg, real g, real c0, int nf, int lat);
    real xs[8], ys[8], dot, d2, ref_k, got, tol;
    int cyc;
    for (int i = 0; i < nf; i++) begin
      xs[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
      ys[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
    end
    kernel = k; degree = 4'(deg); gamma = r2fx(g); coef0 = r2fx(c0);
    dot = 0; d2 = 0;
    for (int i = 0; i < nf; i++) begin
      dot += fx2r(r2fx(xs[i])) * fx2r(r2fx(ys[i]));
      d2  += (fx2r(r2fx(xs[i])) - fx2r(r2fx(ys[i]))) ** 2;
    end
    case (k)
      K_LINEAR: ref_k = dot;
      K_POLY:   ref_k = (g * dot + c0) ** deg;
      default:  ref_k = $exp(-g * d2);
    endcase
    check(ready, "ready before a vector");
    for (int i = 0; i < nf; i++) begin
      in_valid <= 1'b1; in_last <= (i == nf - 1);
      x <= r2fx(xs[i]); y <= r2fx(ys[i]);
      @(posedge clk);
    end
    in_valid <= 1'b0; in_last <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!out_valid && cyc < 100);
    got = fx2r(k_out);
    tol = 0.004 * ((ref_k < 0) ? -ref_k : ref_k) + 0.002 * (deg + 1);
    check((got - ref_k) <= tol && (ref_k - got) <= tol,
          $sformatf("kernel %0d deg %0d: got %f expected %f", k, deg, got, ref_k));
    check(cyc == lat, $sformatf("kernel %0d latency %0d expected %0d", k, cyc, lat));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_last = 1'b0; x = '0; y = '0;
    kernel = K_LINEAR; degree = 4'd2; gamma = FX_ONE; coef0 = FX_ONE;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      run(K_LINEAR, 1, 1.0, 0.0, 1 + n % 8, 1);
      run(K_POLY, 2 + n % 3, 0.5, 1.0, 1 + n % 8, 2 + n % 3 + 3);
      run(K_RBF, 1, 0.1 + 0.1 * (n % 5), 0.0, 1 + n % 8, 5);
    end
    // identical vectors: RBF gives exactly 1
    kernel = K_RBF; gamma = FX_ONE;
    for (int i = 0; i < 4; i++) begin
      in_valid <= 1'b1; in_last <= (i == 3); x <= 32'sd40000; y <= 32'sd40000;
      @(posedge clk);
    end
    in_valid <= 1'b0; in_last <= 1'b0;
    wait (out_valid); @(negedge clk);
    check(k_out == FX_ONE, $sformatf("RBF of equal vectors %0d", k_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
