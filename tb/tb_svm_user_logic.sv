// tb_svm_user_logic: the user logic with the AXI burst master and the
// behavioural DDR model, at reduced sizes (M_MAX 32, T_MAX 16, NF_MAX 4),
// with the configuration record driven directly. Runs a linear job on
// separable clusters and an RBF job on a ring problem and checks the preload
// byte count, the write-back layout (w, z, alphas, predictions), the alpha
// box and equality constraint, z against the support-vector average, and each
// prediction against the sign of sum alpha B K + z computed here.
// A third job takes its data set from the stream input, fed with random
// gaps, while the DDR copy of the data set is cleared; the stream words and
// the gaps are counted.
module tb_svm_user_logic;
  import svm_pkg::*;

  localparam int M_MAX = 32, T_MAX = 16, NF_MAX = 4;
  localparam logic [31:0] SRC = 32'h0000_0100;
  localparam logic [31:0] DST = 32'h0000_2000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  svm_cfg_t cfg;
  logic start, busy, done, converged;
  logic [31:0] preload_bytes;
  logic [15:0] iterations, n_sv;
  fx_t bias;
  logic cmd_valid, cmd_ready, cmd_rnw, cmd_cmplt, rd_valid, wr_pop, err;
  logic [31:0] cmd_addr, rd_data, wr_data;
  logic [8:0] cmd_len;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic [3:0] wstrb;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready, arvalid, arready, rlast, rvalid, rready;

  // data-set stream source
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

  svm_user_logic #(.M_MAX(M_MAX), .T_MAX(T_MAX), .NF_MAX(NF_MAX)) dut (
    .clk, .rst_n, .cfg, .start, .busy, .done, .preload_bytes, .iterations, .n_sv, .bias, .converged,
    .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt, .rd_valid, .rd_data, .wr_data, .wr_pop,
    .s_data, .s_valid, .s_ready);

  axi_master_burst u_m (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt,
    .rd_valid, .rd_data, .wr_data, .wr_pop, .err,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready), .m_axi_araddr(araddr), .m_axi_arlen(arlen),
    .m_axi_arsize(arsize), .m_axi_arburst(arburst), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready));

  axi_ddr_model #(.WORDS(4096), .STALL_PCT(20)) ddr (.clk, .rst_n, .awaddr, .awlen, .awvalid, .awready,
    .wdata, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready);

  real xs [M_MAX+T_MAX][NF_MAX];
  real ys [M_MAX+T_MAX];
  real al [M_MAX];

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real absr(real v); return v < 0 ? -v : v; endfunction
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real kern(kernel_e k, real g, int a, int b, int nf);
    real dot = 0, d2 = 0;
    for (int f = 0; f < nf; f++) begin
      dot += xs[a][f] * xs[b][f];
      d2  += (xs[a][f] - xs[b][f]) ** 2;
    end
    return (k == K_RBF) ? $exp(-g * d2) : dot;
  endfunction

  task automatic job(string name, bit ring, kernel_e k, real g, int m, int t, int nf, bit strm = 1'b0);
    int sb, wb, cyc, nsv, correct;
    real z, zs, ysum;
    for (int v = 0; v < m + t; v++) begin
      real r2 = 0;
      if (ring) begin
        do begin
          r2 = 0;
          for (int f = 0; f < nf; f++) begin xs[v][f] = urand(-1, 1); r2 += xs[v][f] ** 2; end
        end while (r2 > 0.3 && r2 < 0.5);
        ys[v] = (r2 <= 0.3) ? 1 : -1;
      end else begin
        ys[v] = $urandom_range(0, 1) ? 1 : -1;
        for (int f = 0; f < nf; f++) xs[v][f] = ys[v] * 0.5 + urand(-0.4, 0.4);
      end
      for (int f = 0; f < nf; f++) xs[v][f] = fx2r(r2fx(xs[v][f]));
    end
    sb = int'(SRC >> 2);
    for (int v = 0; v < m; v++) begin
      for (int f = 0; f < nf; f++) ddr.mem[sb + v * (nf + 1) + f] = r2fx(xs[v][f]);
      ddr.mem[sb + v * (nf + 1) + nf] = (ys[v] > 0) ? 32'd1 : 32'hffff_ffff;
    end
    for (int v = 0; v < t; v++)
      for (int f = 0; f < nf; f++) ddr.mem[sb + m * (nf + 1) + v * nf + f] = r2fx(xs[m + v][f]);
    if (strm) begin
      for (int v = 0; v < m; v++) begin
        for (int f = 0; f < nf; f++) sq.push_back(r2fx(xs[v][f]));
        sq.push_back((ys[v] > 0) ? 32'd1 : 32'hffff_ffff);
      end
      for (int v = 0; v < t; v++)
        for (int f = 0; f < nf; f++) sq.push_back(r2fx(xs[m + v][f]));
      for (int i = 0; i < m * (nf + 1) + t * nf; i++) ddr.mem[sb + i] = '0;
    end
    cfg = '0;
    cfg.src_stream = strm;
    cfg.kernel = k; cfg.degree = 4'd2; cfg.gamma = r2fx(g); cfg.coef0 = FX_ONE; cfg.c = r2fx(10.0);
    cfg.eps = r2fx(0.001); cfg.max_iter = 16'd2000; cfg.num_train = 16'(m); cfg.num_test = 16'(t);
    cfg.num_feat = 8'(nf); cfg.src_addr = SRC; cfg.dst_addr = DST;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 2000000) begin @(posedge clk); cyc++; end
    check(done, {name, ": done"});
    repeat (2) @(posedge clk);
    check(preload_bytes == 32'(4 * (m * (nf + 1) + t * nf)), {name, ": preload bytes"});
    check(!err, {name, ": no AXI error"});
    wb = int'(DST >> 2);
    z = fx2r(fx_t'(ddr.mem[wb + nf]));
    check(fx_t'(ddr.mem[wb + nf]) == bias, {name, ": z written"});
    nsv = 0; ysum = 0; zs = 0;
    for (int i = 0; i < m; i++) begin
      al[i] = fx2r(fx_t'(ddr.mem[wb + nf + 1 + i]));
      check(al[i] >= 0 && al[i] <= 10.0, {name, ": alpha in box"});
      ysum += al[i] * ys[i];
    end
    for (int i = 0; i < m; i++) if (al[i] > 0) begin
      real s = 0;
      for (int j = 0; j < m; j++) s += al[j] * ys[j] * kern(k, g, j, i, nf);
      zs += ys[i] - s;
      nsv++;
    end
    check(nsv == int'(n_sv) && nsv > 0, {name, ": support vector count"});
    check(absr(ysum) < 0.02, $sformatf("%s: sum(B alpha) %f", name, ysum));
    check(absr(z - zs / nsv) < 0.03, $sformatf("%s: z %f expected %f", name, z, zs / nsv));
    for (int f = 0; f < nf; f++) begin
      real w = 0;
      for (int i = 0; i < m; i++) w += al[i] * ys[i] * xs[i][f];
      check(absr(fx2r(fx_t'(ddr.mem[wb + f])) - w) < 0.02, $sformatf("%s: w[%0d]", name, f));
    end
    correct = 0;
    for (int v = 0; v < t; v++) begin
      real d = z;
      logic [31:0] p = ddr.mem[wb + nf + 1 + m + v];
      for (int j = 0; j < m; j++) d += al[j] * ys[j] * kern(k, g, m + v, j, nf);
      if (absr(d) > 0.05) check((p == 32'd1) == (d > 0), $sformatf("%s: prediction %0d", name, v));
      if ((p == 32'd1) == (ys[m + v] > 0)) correct++;
    end
    $display("%s: %0d clocks, %0d iterations, %0d SVs, accuracy %0d/%0d", name, cyc, iterations, n_sv, correct, t);
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cfg = '0; s_valid = 0; s_data = '0;
    for (int i = 0; i < 4096; i++) ddr.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    job("linear", 0, K_LINEAR, 1.0, 32, 16, 4);
    job("rbf", 1, K_RBF, 2.0, 30, 16, 2);
    job("linear from stream", 0, K_LINEAR, 1.0, 32, 16, 4, 1'b1);
    check(s_words == 32 * 5 + 16 * 4 && sq.size() == 0, $sformatf("stream words taken: %0d", s_words));
    check(s_gaps > 0, $sformatf("stream gaps: %0d", s_gaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
