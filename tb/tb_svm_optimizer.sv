// tb_svm_optimizer: drives the stage-2 optimiser with a Q RAM and data RAM
// filled by the testbench (linear kernel, computed here in real arithmetic)
// and checks the result against the optimality conditions of the SVM dual,
// recomputed independently from the alphas that come out:
//   0 <= alpha <= C, sum(B*alpha) = 0, KKT violation gap <= eps,
//   z = mean over alpha > 0 of (B_s - sum alpha B K) (z_mode 0) or
//   z = -1/2 [max over B=-1 + min over B=+1 of sum alpha B K] (z_mode 1),
//   w = sum alpha B A.
// Cases: a two-point problem with the known answer alpha = 0.5, w = (1, 0),
// z = 0; random separable clusters; overlapping clusters with a small C so
// alphas clip at the bound; and a run stopped by the iteration limit.
// The separable and overlapping cases run once with each z formula.
module tb_svm_optimizer;
  import svm_pkg::*;

  localparam int M_MAX = 32, NF_MAX = 4, DAW = 8, IW = 5;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_clipped = 0;

  logic start, busy, done, converged, z_mode;
  logic [15:0] num_train, max_iter, n_sv, iterations;
  logic [7:0]  num_feat;
  fx_t c, eps, bias, alpha_rdata, w_rdata;
  logic [M_MAX-1:0] label_pos;
  logic [2*IW-1:0] q_ra, q_rb, q_wa;
  fx_t q_qa, q_qb, q_wd, d_qa, d_qb, d_wd;
  logic [DAW-1:0] d_ra, d_wa;
  logic q_we, d_we;
  logic [IW-1:0] alpha_raddr;
  logic [1:0] w_raddr;

  svm_dp_mem #(.DEPTH(M_MAX*M_MAX), .W(32)) u_q (.clk, .we(q_we), .waddr(q_wa), .wdata(q_wd),
    .raddr_a(q_ra), .rdata_a(q_qa), .raddr_b(q_rb), .rdata_b(q_qb));
  svm_dp_mem #(.DEPTH(M_MAX*NF_MAX), .W(32)) u_d (.clk, .we(d_we), .waddr(d_wa), .wdata(d_wd),
    .raddr_a(d_ra), .rdata_a(d_qa), .raddr_b('0), .rdata_b(d_qb));

  svm_optimizer #(.M_MAX(M_MAX), .NF_MAX(NF_MAX), .DAW(DAW)) dut (
    .clk, .rst_n, .start, .num_train, .num_feat, .c, .eps, .max_iter, .z_mode, .label_pos,
    .q_raddr_a(q_ra), .q_raddr_b(q_rb), .q_rdata_a(q_qa), .q_rdata_b(q_qb),
    .d_raddr(d_ra), .d_rdata(d_qa), .alpha_raddr, .alpha_rdata, .w_raddr, .w_rdata,
    .bias, .n_sv, .iterations, .converged, .busy, .done);

  real xs [M_MAX][NF_MAX];
  real ys [M_MAX];
  real kk [M_MAX][M_MAX];

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real absr(real v); return v < 0 ? -v : v; endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load(int m, int nf);
    for (int i = 0; i < m; i++)
      for (int f = 0; f < nf; f++) xs[i][f] = fx2r(r2fx(xs[i][f]));
    for (int i = 0; i < m; i++) begin
      label_pos[i] = ys[i] > 0;
      for (int f = 0; f < nf; f++) begin
        d_we <= 1'b1; d_wa <= DAW'(i * NF_MAX + f); d_wd <= r2fx(xs[i][f]);
        @(posedge clk);
      end
    end
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++) begin
        real s = 0;
        for (int f = 0; f < nf; f++) s += xs[i][f] * xs[j][f];
        kk[i][j] = fx2r(r2fx(s));
        q_we <= 1'b1; q_wa <= {IW'(i), IW'(j)}; q_wd <= r2fx(ys[i] * ys[j] * kk[i][j]);
        @(posedge clk);
      end
    d_we <= 1'b0; q_we <= 1'b0;
  endtask

  task automatic run_opt(int m, int nf, real cval, real epsv, int iters, bit expect_conv, bit zm = 0);
    real al [M_MAX], g, gmax, gmin, ysum, zs, w_ref, tol, smax, smin;
    int nsv, cyc;
    bit have_up, have_low, fmax, fmin;
    z_mode = zm;
    num_train = 16'(m); num_feat = 8'(nf); c = r2fx(cval); eps = r2fx(epsv); max_iter = 16'(iters);
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    cyc = 0;
    while (!done && cyc < 400000) begin @(posedge clk); cyc++; end
    check(done, "optimiser finished");
    @(negedge clk);
    check(converged == expect_conv, $sformatf("converged=%0d after %0d iterations", converged, iterations));
    $display("m=%0d C=%f: %0d iterations, %0d support vectors, z=%f", m, cval, iterations, n_sv, fx2r(bias));
    check(iterations <= 16'(iters), "iteration limit respected");
    ysum = 0; nsv = 0;
    for (int i = 0; i < m; i++) begin
      alpha_raddr = IW'(i); #1;
      al[i] = fx2r(alpha_rdata);
      check(alpha_rdata >= 0 && alpha_rdata <= c, $sformatf("alpha[%0d]=%f in box", i, al[i]));
      if (alpha_rdata == c) n_clipped++;
      if (alpha_rdata > 0) nsv++;
      ysum += ys[i] * al[i];
    end
    check(absr(ysum) < 0.002, $sformatf("sum(B alpha)=%f", ysum));
    check(int'(n_sv) == nsv, $sformatf("n_sv %0d expected %0d", n_sv, nsv));
    // KKT gap from the alphas
    have_up = 0; have_low = 0; gmax = 0; gmin = 0; zs = 0;
    fmax = 0; fmin = 0; smax = 0; smin = 0;
    for (int t = 0; t < m; t++) begin
      real v;
      g = -1;
      for (int s = 0; s < m; s++) g += ys[t] * ys[s] * kk[t][s] * al[s];
      v = -ys[t] * g;
      if ((ys[t] > 0 && al[t] < cval) || (ys[t] < 0 && al[t] > 0)) begin
        if (!have_up || v > gmax) gmax = v; have_up = 1; end
      if ((ys[t] > 0 && al[t] > 0) || (ys[t] < 0 && al[t] < cval)) begin
        if (!have_low || v < gmin) gmin = v; have_low = 1; end
      if (al[t] > 0) zs += v;
      if (ys[t] < 0 && (!fmax || ys[t] * (g + 1) > smax)) begin smax = ys[t] * (g + 1); fmax = 1; end
      if (ys[t] > 0 && (!fmin || ys[t] * (g + 1) < smin)) begin smin = ys[t] * (g + 1); fmin = 1; end
    end
    if (expect_conv) check(!have_up || !have_low || gmax - gmin <= epsv + 0.01,
                           $sformatf("KKT gap %f", gmax - gmin));
    if (!zm && nsv > 0) check(absr(fx2r(bias) - zs / nsv) < 0.01, $sformatf("z %f expected %f", fx2r(bias), zs / nsv));
    if (zm) check(absr(fx2r(bias) + 0.5 * (smax + smin)) < 0.01, $sformatf("midpoint z %f expected %f", fx2r(bias), -0.5 * (smax + smin)));
    for (int f = 0; f < nf; f++) begin
      w_ref = 0;
      for (int i = 0; i < m; i++) w_ref += al[i] * ys[i] * xs[i][f];
      w_raddr = 2'(f); #1;
      tol = 0.002 * m;
      check(absr(fx2r(w_rdata) - w_ref) < tol, $sformatf("w[%0d] %f expected %f", f, fx2r(w_rdata), w_ref));
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; q_we = 0; d_we = 0; q_wa = '0; q_wd = '0; d_wa = '0; d_wd = '0;
    label_pos = '0; alpha_raddr = '0; w_raddr = '0;
    num_train = 0; num_feat = 1; z_mode = 0; c = FX_ONE; eps = 32'sd66; max_iter = 16'd100;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // two points: known solution
    xs[0][0] = 1.0; xs[0][1] = 0.0; ys[0] = 1;
    xs[1][0] = -1.0; xs[1][1] = 0.0; ys[1] = -1;
    load(2, 2);
    run_opt(2, 2, 10.0, 0.001, 100, 1);
    alpha_raddr = 0; #1; check(absr(fx2r(alpha_rdata) - 0.5) < 0.001, "two-point alpha 0.5");
    w_raddr = 0; #1;     check(absr(fx2r(w_rdata) - 1.0) < 0.001, "two-point w0 = 1");
    check(absr(fx2r(bias)) < 0.001, "two-point z = 0");
    // separable clusters
    for (int i = 0; i < 24; i++) begin
      ys[i] = (i % 2) ? 1 : -1;
      for (int f = 0; f < 3; f++)
        xs[i][f] = ys[i] * 0.6 + (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
    end
    load(24, 3);
    run_opt(24, 3, 100.0, 0.001, 2000, 1);
    run_opt(24, 3, 100.0, 0.001, 2000, 1, 1);
    // overlapping clusters, small C: alphas clip at C
    for (int i = 0; i < 30; i++) begin
      ys[i] = (i % 3 == 0) ? 1 : -1;
      for (int f = 0; f < 4; f++)
        xs[i][f] = ys[i] * 0.2 + (real'($urandom_range(0, 1000)) - 500.0) / 600.0;
    end
    load(30, 4);
    n_clipped = 0;
    run_opt(30, 4, 0.5, 0.001, 3000, 1);
    check(n_clipped > 0, $sformatf("alphas at C: %0d", n_clipped));
    run_opt(30, 4, 0.5, 0.001, 3000, 1, 1);
    // iteration limit
    run_opt(30, 4, 0.5, 0.001, 3, 0);
    check(iterations == 16'd3, "stopped at the iteration limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
