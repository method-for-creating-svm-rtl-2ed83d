// tb_svm_workloads: runs the IP, at its default sizes, on data shaped like
// the two problems the method is evaluated on, each split 90 % training and
// 10 % testing.
//   Iris: 150 flowers, 4 features, 3 species, 50 of each. The samples are
//   drawn here from per-species normal distributions with the well-known
//   species means and spreads of that data set (no data file is read). The
//   features are centred and halved. Three one-vs-rest jobs run on
//   135 training and 15 test vectors: setosa with the linear kernel,
//   versicolor with RBF, virginica with the polynomial kernel.
//   Pulsar: 8 features, two classes with about 1 positive in 10. The full
//   set is far larger than the on-chip kernel matrix, so the largest slice
//   that fits is used: 256 training and 256 test vectors. There is one job
//   per kernel. Positives are shifted by 1 to 2 standard deviations in six
//   of the eight features.
// Each job is checked as in the end-to-end test: box and equality
// constraints, KKT gap, z, w, every prediction against a real-arithmetic
// decision function built from the returned alphas, and a minimum accuracy
// on the held-out labels.
module tb_svm_workloads;
  import svm_pkg::*;

  localparam int  MAXV = 512;
  localparam logic [31:0] SRC = 32'h0000_0f88;
  localparam logic [31:0] DST = 32'h0002_0000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // AXI4-Lite
  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready, irq;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  // AXI4
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [7:0] m_awlen, m_arlen;
  logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;

  // data-set stream source (AXI4-Stream master side)
  logic [31:0] s_data;
  logic        s_valid, s_ready;
  logic [31:0] sq [$];
  int          s_words = 0, s_gaps = 0;
  always @(negedge clk) begin
    s_valid = (sq.size() > 0) && ($urandom_range(0, 3) != 0);
    s_data  = (sq.size() > 0) ? sq[0] : 32'd0;
  end
  always @(posedge clk) begin
    if (s_valid && s_ready) begin sq.pop_front(); s_words++; end
    if (s_ready && !s_valid) s_gaps++;
  end

  svm_ip dut (
    .clk, .rst_n, .irq,
    .s_axis_tdata(s_data), .s_axis_tvalid(s_valid), .s_axis_tready(s_ready),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axi_awaddr(m_awaddr), .m_axi_awlen(m_awlen), .m_axi_awsize(m_awsize), .m_axi_awburst(m_awburst),
    .m_axi_awvalid(m_awvalid), .m_axi_awready(m_awready), .m_axi_wdata(m_wdata), .m_axi_wstrb(m_wstrb),
    .m_axi_wlast(m_wlast), .m_axi_wvalid(m_wvalid), .m_axi_wready(m_wready), .m_axi_bresp(m_bresp),
    .m_axi_bvalid(m_bvalid), .m_axi_bready(m_bready), .m_axi_araddr(m_araddr), .m_axi_arlen(m_arlen),
    .m_axi_arsize(m_arsize), .m_axi_arburst(m_arburst), .m_axi_arvalid(m_arvalid), .m_axi_arready(m_arready),
    .m_axi_rdata(m_rdata), .m_axi_rresp(m_rresp), .m_axi_rlast(m_rlast), .m_axi_rvalid(m_rvalid),
    .m_axi_rready(m_rready));

  axi_ddr_model #(.WORDS(65536), .STALL_PCT(10)) ddr (.clk, .rst_n,
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata),
    .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready), .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready));

  int cnt_kernel [3];
  int cnt_clip_c = 0, cnt_iter_stop = 0, cnt_converged = 0;
  int cnt_non_sv = 0, cnt_pos = 0, cnt_neg = 0, cnt_irq = 0;
  always @(posedge clk) if (irq) cnt_irq++;

  // ---------------- host access ----------------
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_wr(int idx, logic [31:0] d);
    @(negedge clk);
    awaddr = 8'(idx * 4); wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1;
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(posedge clk);
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic reg_rd(int idx, output logic [31:0] d);
    @(negedge clk);
    araddr = 8'(idx * 4); arvalid = 1;
    @(posedge clk); #1 arvalid = 0; rready = 1;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(posedge clk); #1 rready = 0;
  endtask

  // ---------------- data ----------------
  real xs [MAXV][8];
  real ys [MAXV];           // labels of training and test vectors
  real al [256];

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real absr(real v); return v < 0 ? -v : v; endfunction
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  int cls [MAXV];   // Iris species of each sample

  function automatic real gauss();
    real u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    real u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // Iris-shaped samples: 50 per species in random order
  task automatic gen_iris();
    real mu [3][4] = '{'{5.01, 3.42, 1.46, 0.24}, '{5.94, 2.77, 4.26, 1.33}, '{6.59, 2.97, 5.55, 2.03}};
    real sd [3][4] = '{'{0.35, 0.38, 0.17, 0.11}, '{0.52, 0.31, 0.47, 0.20}, '{0.64, 0.32, 0.55, 0.27}};
    real ctr [4] = '{5.84, 3.05, 3.76, 1.20};
    for (int v = 0; v < 150; v++) cls[v] = v / 50;
    for (int v = 149; v > 0; v--) begin
      int r = $urandom_range(0, v);
      int tmp = cls[v]; cls[v] = cls[r]; cls[r] = tmp;
    end
    for (int v = 0; v < 150; v++)
      for (int f = 0; f < 4; f++)
        xs[v][f] = fx2r(r2fx((mu[cls[v]][f] + sd[cls[v]][f] * gauss() - ctr[f]) / 2.0));
  endtask

  task automatic label_iris(int species);
    for (int v = 0; v < 150; v++) ys[v] = (cls[v] == species) ? 1.0 : -1.0;
  endtask

  // Pulsar-shaped samples: about 10 % positives, spread 0.15 per feature
  task automatic gen_pulsar(int n);
    real shift [8] = '{-1.5, -1.0, 2.0, 2.0, 0.0, 1.5, -1.5, 0.0};
    for (int v = 0; v < n; v++) begin
      ys[v] = ($urandom_range(0, 9) == 0) ? 1.0 : -1.0;
      for (int f = 0; f < 8; f++)
        xs[v][f] = fx2r(r2fx(0.15 * (gauss() + ((ys[v] > 0) ? shift[f] : 0.0))));
    end
  endtask

  function automatic real kern(kernel_e k, int deg, real g, real c0, int a, int b, int nf);
    real dot = 0, d2 = 0;
    for (int f = 0; f < nf; f++) begin
      dot += xs[a][f] * xs[b][f];
      d2  += (xs[a][f] - xs[b][f]) ** 2;
    end
    case (k)
      K_LINEAR: return dot;
      K_POLY:   return (g * dot + c0) ** deg;
      default:  return $exp(-g * d2);
    endcase
  endfunction

  task automatic job(string name, kernel_e k, int deg, real g, real c0, real cval, real epsv, int maxit,
                     int m, int t, int nf, bit expect_conv, real min_acc, bit zm = 1'b0);
    logic [31:0] st, iters, nsv_reg, bias_reg, bytes;
    int wbase, sbase, cyc, nsv, correct;
    real z, ysum, gmax, gmin, zs, f, wref, smax, smin;
    bit have_up, have_low, fmax, fmin;
    real asum, cq;
    // data set into DDR: training vectors with their label word, then tests
    sbase = int'(SRC >> 2);
    for (int v = 0; v < m; v++) begin
      for (int f2 = 0; f2 < nf; f2++) ddr.mem[sbase + v * (nf + 1) + f2] = r2fx(xs[v][f2]);
      ddr.mem[sbase + v * (nf + 1) + nf] = (ys[v] > 0) ? 32'd1 : 32'hffff_ffff;
    end
    for (int v = 0; v < t; v++)
      for (int f2 = 0; f2 < nf; f2++) ddr.mem[sbase + m * (nf + 1) + v * nf + f2] = r2fx(xs[m + v][f2]);
    reg_wr(2, 32'(m)); reg_wr(3, 32'(t)); reg_wr(4, 32'(nf));
    reg_wr(5, {23'd0, zm, 4'(deg), 2'b00, 2'(k)});
    reg_wr(6, r2fx(g)); reg_wr(7, r2fx(c0)); reg_wr(8, r2fx(cval)); reg_wr(9, r2fx(epsv));
    reg_wr(10, 32'(maxit)); reg_wr(11, SRC); reg_wr(12, DST);
    reg_wr(0, 32'd1);
    cyc = 0;
    do begin
      repeat (200) @(posedge clk);
      cyc += 200;
      reg_rd(1, st);
    end while (!st[1] && cyc < 20000000);
    check(st[1], {name, ": job finished"});
    check(!st[3], {name, ": no AXI error"});
    reg_rd(13, bytes); reg_rd(14, iters); reg_rd(15, nsv_reg); reg_rd(16, bias_reg);
    $display("%s: %0d clocks, %0d iterations, %0d support vectors, z = %f, converged %0d",
             name, cyc, iters, nsv_reg, fx2r(bias_reg), st[2]);
    check(bytes == 32'(4 * (m * (nf + 1) + t * nf)), {name, ": preload byte count"});
    check(st[2] == expect_conv, {name, ": converged flag"});
    if (st[2]) cnt_converged++;
    if (!st[2] && iters == 32'(maxit)) cnt_iter_stop++;
    cnt_kernel[int'(k)]++;
    // results
    wbase = int'(DST >> 2);
    z = fx2r(fx_t'(ddr.mem[wbase + nf]));
    check(ddr.mem[wbase + nf] == bias_reg, {name, ": z in DDR matches BIAS register"});
    cq = fx2r(r2fx(cval));   // C as the hardware holds it
    ysum = 0; nsv = 0; asum = 0;
    for (int i = 0; i < m; i++) begin
      fx_t a = fx_t'(ddr.mem[wbase + nf + 1 + i]);
      al[i] = fx2r(a);
      check(a >= 0 && a <= r2fx(cval), $sformatf("%s: alpha[%0d] = %f in box", name, i, al[i]));
      if (a == r2fx(cval)) cnt_clip_c++;
      if (a > 0) nsv++; else cnt_non_sv++;
      ysum += ys[i] * al[i];
      asum += al[i];
    end
    check(nsv == int'(nsv_reg), {name, ": n_sv"});
    check(absr(ysum) < 0.002 * cval + 0.002, $sformatf("%s: sum(B alpha) = %f", name, ysum));
    // KKT gap and displacement from the alphas
    have_up = 0; have_low = 0; gmax = 0; gmin = 0; zs = 0;
    fmax = 0; fmin = 0; smax = 0; smin = 0;
    for (int i = 0; i < m; i++) begin
      real gi = -1, v;
      for (int j = 0; j < m; j++) if (al[j] != 0) gi += ys[i] * ys[j] * al[j] * kern(k, deg, g, c0, i, j, nf);
      v = -ys[i] * gi;
      if ((ys[i] > 0 && al[i] < cq) || (ys[i] < 0 && al[i] > 0)) begin if (!have_up || v > gmax) gmax = v; have_up = 1; end
      if ((ys[i] > 0 && al[i] > 0) || (ys[i] < 0 && al[i] < cq)) begin if (!have_low || v < gmin) gmin = v; have_low = 1; end
      if (al[i] > 0) zs += v;
      if (ys[i] < 0 && (!fmax || ys[i] * (gi + 1) > smax)) begin smax = ys[i] * (gi + 1); fmax = 1; end
      if (ys[i] > 0 && (!fmin || ys[i] * (gi + 1) < smin)) begin smin = ys[i] * (gi + 1); fmin = 1; end
    end
    if (expect_conv) check(!have_up || !have_low || gmax - gmin <= epsv + 0.02 + 0.003 * asum, $sformatf("%s: KKT gap %f", name, gmax - gmin));
    if (!zm && nsv > 0) check(absr(z - zs / nsv) < 0.02, $sformatf("%s: z %f expected %f", name, z, zs / nsv));
    if (zm) check(absr(z + 0.5 * (smax + smin)) < 0.02, $sformatf("%s: midpoint z %f expected %f", name, z, -0.5 * (smax + smin)));
    for (int f2 = 0; f2 < nf; f2++) begin
      wref = 0;
      for (int i = 0; i < m; i++) wref += al[i] * ys[i] * xs[i][f2];
      check(absr(fx2r(fx_t'(ddr.mem[wbase + f2])) - wref) < 0.01 + 0.001 * m * cval / 10.0,
            $sformatf("%s: w[%0d] %f expected %f", name, f2, fx2r(fx_t'(ddr.mem[wbase + f2])), wref));
    end
    // predictions
    correct = 0;
    for (int v = 0; v < t; v++) begin
      logic [31:0] p = ddr.mem[wbase + nf + 1 + m + v];
      f = z;
      for (int j = 0; j < m; j++) if (al[j] != 0) f += al[j] * ys[j] * kern(k, deg, g, c0, m + v, j, nf);
      check(p == 32'd1 || p == 32'hffff_ffff, {name, ": prediction is +1 or -1"});
      if (absr(f) > 0.05) check((p == 32'd1) == (f > 0), $sformatf("%s: prediction %0d, decision %f", name, v, f));
      if ((p == 32'd1) == (ys[m + v] > 0)) correct++;
      if (p == 32'd1) cnt_pos++; else cnt_neg++;
    end
    $display("%s: accuracy %0d / %0d", name, correct, t);
    if (t > 0) check(real'(correct) >= min_acc * t, $sformatf("%s: accuracy %0d of %0d", name, correct, t));
  endtask

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = '0;
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; wdata = 0; wstrb = 0;
    for (int i = 0; i < 3; i++) cnt_kernel[i] = 0;
    for (int i = 0; i < 65536; i++) ddr.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    gen_iris();
    label_iris(0);
    job("iris setosa, linear", K_LINEAR, 1, 1.0, 0.0, 10.0, 0.001, 4000, 135, 15, 4, 1, 0.93);
    label_iris(1);
    job("iris versicolor, rbf", K_RBF, 1, 4.0, 0.0, 10.0, 0.001, 4000, 135, 15, 4, 1, 0.8);
    label_iris(2);
    job("iris virginica, poly", K_POLY, 2, 1.0, 1.0, 10.0, 0.001, 4000, 135, 15, 4, 1, 0.8);

    gen_pulsar(512);
    job("pulsar, linear", K_LINEAR, 1, 1.0, 0.0, 1.0, 0.001, 4000, 256, 256, 8, 1, 0.93);
    job("pulsar, poly", K_POLY, 2, 1.0, 1.0, 1.0, 0.001, 4000, 256, 256, 8, 1, 0.93);
    job("pulsar, rbf", K_RBF, 1, 1.0, 0.0, 1.0, 0.001, 4000, 256, 256, 8, 1, 0.93);

    check(cnt_kernel[0] == 2 && cnt_kernel[1] == 2 && cnt_kernel[2] == 2, "two jobs per kernel");
    check(cnt_converged == 6, $sformatf("jobs converged: %0d", cnt_converged));
    check(cnt_pos > 0 && cnt_neg > 0, "both classes predicted");
    check(cnt_irq == 6, $sformatf("irq pulses: %0d", cnt_irq));
    check(ddr.n_errors == 0, "no burst protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
