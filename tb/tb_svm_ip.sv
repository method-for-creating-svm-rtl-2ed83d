// tb_svm_ip: end-to-end test of the SVM IP at its default sizes
// (M_MAX = T_MAX = 256 vectors, NF_MAX = 8 features). A host task programs
// the work registers over AXI4-Lite; the data set lives in a behavioural DDR
// model behind the AXI4 master port, which stalls at random. Each job:
// preload -> kernel matrix -> optimisation -> displacement and w -> testing
// -> write-back, after which the testbench reads w, z, the alphas and the
// predictions from DDR and checks them against references computed here in
// real arithmetic from the same data (tolerances allow for Q16.16 rounding
// and the approximated exponential):
//   0 <= alpha <= C and sum(B alpha) = 0; KKT gap <= eps when converged;
//   z equal to the support-vector average; w = sum alpha B A;
//   every prediction equal to the sign of sum alpha B K + z (where that is
//   not within rounding of 0); accuracy on the held-out labels; the byte
//   count of the preload and the status registers.
// Jobs: linear on separable clusters (once with each z formula, and once
// with the data set arriving on the stream input with random gaps while its
// DDR copy is cleared), polynomial and RBF on a ring problem,
// a small-C overlapping set (alphas clipped at C), a run stopped by the
// iteration limit, and a full-size job with m = t = 256 and nf = 8. The data
// region starts 120 bytes below a 4 KB boundary so that a burst is cut there.
// Stage 1 overlapping the preload is counted as Q RAM writes made while the
// preload is still running. Every mechanism is counted and a failure is recorded for any that never
// occurred.
module tb_svm_ip;
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

  axi_ddr_model #(.WORDS(65536), .STALL_PCT(25)) ddr (.clk, .rst_n,
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata),
    .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready), .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready));

  // ---------------- mechanism counters ----------------
  int cnt_kernel [3];
  int cnt_clip_c = 0, cnt_iter_stop = 0, cnt_converged = 0, cnt_4k_cut = 0, cnt_ddr_stall = 0;
  int cnt_zmid = 0, cnt_overlap = 0, cnt_non_sv = 0, cnt_pos = 0, cnt_neg = 0, cnt_irq = 0, cnt_multi_burst = 0;
  always @(posedge clk) begin
    if (irq) cnt_irq++;
    if (dut.u_user.q_we && dut.u_user.st == dut.u_user.S_PRE) cnt_overlap++;
    if ((m_arvalid && !m_arready) || (m_wvalid && !m_wready) || (m_rready && !m_rvalid && dut.u_master.st == 3'd2))
      cnt_ddr_stall++;
    if (m_arvalid && m_arready && m_arlen != 8'd15 && ((m_araddr + 32'(m_arlen + 1) * 4) & 32'hfff) == 0)
      cnt_4k_cut++;
  end

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

  // kind 0: clusters at +/-sep per axis; kind 1: ring (inside r < 0.45 is +1)
  task automatic gen(int kind, int m, int t, int nf, real sep, real noise);
    for (int v = 0; v < m + t; v++) begin
      if (kind == 0) begin
        ys[v] = ($urandom_range(0, 1) == 1) ? 1.0 : -1.0;
        for (int f = 0; f < nf; f++) xs[v][f] = ys[v] * sep + urand(-noise, noise);
      end else begin
        real r2;
        do begin
          r2 = 0;
          for (int f = 0; f < nf; f++) begin xs[v][f] = urand(-1.0, 1.0); r2 += xs[v][f] ** 2; end
        end while (r2 > 0.3 && r2 < 0.5);
        ys[v] = (r2 <= 0.3) ? 1.0 : -1.0;
      end
      for (int f = 0; f < nf; f++) xs[v][f] = fx2r(r2fx(xs[v][f]));
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
                     int m, int t, int nf, bit expect_conv, real min_acc, bit zm = 1'b0, bit strm = 1'b0);
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
    if (strm) begin
      for (int v = 0; v < m; v++) begin
        for (int f2 = 0; f2 < nf; f2++) sq.push_back(r2fx(xs[v][f2]));
        sq.push_back((ys[v] > 0) ? 32'd1 : 32'hffff_ffff);
      end
      for (int v = 0; v < t; v++)
        for (int f2 = 0; f2 < nf; f2++) sq.push_back(r2fx(xs[m + v][f2]));
      for (int i = 0; i < m * (nf + 1) + t * nf; i++) ddr.mem[sbase + i] = '0;
    end
    reg_wr(17, 32'(strm));
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
    if (zm) cnt_zmid++;
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

    gen(0, 40, 20, 4, 0.5, 0.4);
    job("linear", K_LINEAR, 1, 1.0, 0.0, 10.0, 0.001, 2000, 40, 20, 4, 1, 1.0);
    job("linear, midpoint z", K_LINEAR, 1, 1.0, 0.0, 10.0, 0.001, 2000, 40, 20, 4, 1, 1.0, 1'b1);
    job("linear, from stream", K_LINEAR, 1, 1.0, 0.0, 10.0, 0.001, 2000, 40, 20, 4, 1, 1.0, 1'b0, 1'b1);
    gen(1, 60, 30, 2, 0.0, 0.0);
    job("poly", K_POLY, 2, 1.0, 1.0, 10.0, 0.001, 3000, 60, 30, 2, 1, 0.85);
    job("rbf", K_RBF, 1, 2.0, 0.0, 10.0, 0.001, 3000, 60, 30, 2, 1, 0.85);
    gen(0, 50, 20, 3, 0.15, 0.8);
    job("small C", K_LINEAR, 1, 1.0, 0.0, 0.1, 0.001, 3000, 50, 20, 3, 1, 0.0);
    job("iteration limit", K_LINEAR, 1, 1.0, 0.0, 0.1, 0.001, 5, 50, 20, 3, 0, 0.0);
    gen(0, 256, 256, 8, 0.4, 0.5);
    job("full size", K_LINEAR, 1, 0.125, 0.0, 1.0, 0.001, 4000, 256, 256, 8, 1, 0.95);

    // every mechanism must have happened
    check(cnt_kernel[0] > 0 && cnt_kernel[1] > 0 && cnt_kernel[2] > 0, "all three kernels used");
    check(cnt_clip_c > 0, $sformatf("alphas clipped at C: %0d", cnt_clip_c));
    check(cnt_iter_stop > 0, "stop by iteration limit");
    check(cnt_converged > 0, "stop by tolerance");
    check(cnt_zmid > 0, "midpoint z formula used");
    check(s_words == 40 * 5 + 20 * 4 && sq.size() == 0, $sformatf("stream words taken: %0d", s_words));
    check(s_gaps > 0, $sformatf("stream gaps: %0d", s_gaps));
    check(cnt_overlap > 0, $sformatf("Q writes during the preload: %0d", cnt_overlap));
    check(cnt_4k_cut > 0, $sformatf("bursts cut at 4 KB: %0d", cnt_4k_cut));
    check(cnt_ddr_stall > 0, $sformatf("DDR stall clocks: %0d", cnt_ddr_stall));
    check(cnt_non_sv > 0, $sformatf("non-support vectors skipped: %0d", cnt_non_sv));
    check(cnt_pos > 0 && cnt_neg > 0, "both classes predicted");
    check(cnt_irq == 8, $sformatf("irq pulses: %0d", cnt_irq));
    check(ddr.n_errors == 0, "no burst protocol errors");
    $display("Q writes during preload %0d", cnt_overlap);
    $display("mechanisms: kernels %0d/%0d/%0d, clipped %0d, limit stops %0d, converged %0d, 4KB cuts %0d, stalls %0d, non-SV %0d, +1 %0d, -1 %0d",
             cnt_kernel[0], cnt_kernel[1], cnt_kernel[2], cnt_clip_c, cnt_iter_stop, cnt_converged,
             cnt_4k_cut, cnt_ddr_stall, cnt_non_sv, cnt_pos, cnt_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
