// tb_svm_qmatrix: fills a data RAM with random training vectors and labels,
// runs stage 1 for each kernel and compares every Q RAM write with
// B_i * B_j * K(A_i, A_j) computed here in real arithmetic; also checks that
// each of the m*m entries is written exactly once. Some runs start the
// stage before the data are in place and release the vectors one at a time
// through avail, as during a preload; a write that touches a vector not yet
// released counts as a failure. The clock count is checked against
// m(m+1)/2 pairs of nf + 1 + kernel latency clocks plus the mirrored writes.
module tb_svm_qmatrix;
  import svm_pkg::*;

  localparam int M_MAX = 16, NF_MAX = 4, DAW = 6, IW = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, q_we, d_we;
  logic [15:0] num_train, avail;
  int early_wr = 0;
  logic [7:0] num_feat;
  kernel_e kernel;
  logic [3:0] degree;
  fx_t gamma, coef0, d_qa, d_qb, d_wd, q_wdata;
  logic [M_MAX-1:0] label_pos;
  logic [DAW-1:0] d_ra, d_rb, d_wa;
  logic [2*IW-1:0] q_waddr;

  svm_dp_mem #(.DEPTH(M_MAX*NF_MAX), .W(32)) u_d (.clk, .we(d_we), .waddr(d_wa), .wdata(d_wd),
    .raddr_a(d_ra), .rdata_a(d_qa), .raddr_b(d_rb), .rdata_b(d_qb));

  svm_qmatrix #(.M_MAX(M_MAX), .NF_MAX(NF_MAX), .DAW(DAW)) dut (
    .clk, .rst_n, .start, .num_train, .num_feat, .kernel, .degree, .gamma, .coef0, .label_pos, .avail,
    .d_raddr_a(d_ra), .d_raddr_b(d_rb), .d_rdata_a(d_qa), .d_rdata_b(d_qb),
    .q_we, .q_waddr, .q_wdata, .busy, .done);

  real xs [M_MAX][NF_MAX];
  fx_t qgot [M_MAX*M_MAX];
  int  nwr  [M_MAX*M_MAX];

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 65536.0)); endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (q_we) begin
    qgot[int'(q_waddr)] <= q_wdata;
    nwr[int'(q_waddr)]  <= nwr[int'(q_waddr)] + 1;
    if (int'(q_waddr) / M_MAX >= int'(avail) || int'(q_waddr) % M_MAX >= int'(avail)) early_wr++;
  end

  task automatic run(kernel_e k, int deg, real g, real c0, int m, int nf, bit staged = 1'b0);
    int cyc, lat, exp_cyc;
    kernel = k; degree = 4'(deg); gamma = r2fx(g); coef0 = r2fx(c0);
    num_train = 16'(m); num_feat = 8'(nf);
    for (int i = 0; i < M_MAX * M_MAX; i++) nwr[i] = 0;
    early_wr = 0;
    avail = '0;
    if (staged) begin start <= 1'b1; @(posedge clk); start <= 1'b0; end
    for (int i = 0; i < m; i++) begin
      label_pos[i] = $urandom_range(0, 1);
      for (int f = 0; f < nf; f++) begin
        xs[i][f] = fx2r(r2fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0));
        d_we <= 1'b1; d_wa <= DAW'(i * NF_MAX + f); d_wd <= r2fx(xs[i][f]);
        @(posedge clk);
      end
      if (staged) begin
        d_we  <= 1'b0;
        avail <= 16'(i + 1);
        repeat (1 + $urandom_range(0, 60)) @(posedge clk);
      end
    end
    d_we <= 1'b0;
    cyc = 0;
    if (!staged) begin
      avail = 16'(m);
      start <= 1'b1; @(posedge clk); start <= 1'b0;
      while (!done && cyc < 100000) begin @(posedge clk); cyc++; end
      lat = (k == K_LINEAR) ? 1 : (k == K_POLY) ? deg + 3 : 5;
      exp_cyc = (m * (m + 1) / 2) * (nf + 1 + lat) + m * (m - 1) / 2;
      check(cyc >= exp_cyc - m - 4 && cyc <= exp_cyc + m + 4,
            $sformatf("stage 1 took %0d clocks, about %0d expected", cyc, exp_cyc));
    end else
      while (!done && cyc < 100000) begin @(posedge clk); cyc++; end
    check(done, "stage 1 finished");
    check(early_wr == 0, $sformatf("writes before their vectors were available: %0d", early_wr));
    @(posedge clk);
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++) begin
        real dot = 0, d2 = 0, kv, qv, err;
        for (int f = 0; f < nf; f++) begin
          dot += xs[i][f] * xs[j][f];
          d2  += (xs[i][f] - xs[j][f]) ** 2;
        end
        case (k)
          K_LINEAR: kv = dot;
          K_POLY:   kv = (g * dot + c0) ** deg;
          default:  kv = $exp(-g * d2);
        endcase
        qv  = (label_pos[i] == label_pos[j]) ? kv : -kv;
        err = fx2r(qgot[i * M_MAX + j]) - qv;
        check(err < 0.01 && err > -0.01, $sformatf("Q[%0d][%0d] %f expected %f", i, j, fx2r(qgot[i*M_MAX+j]), qv));
        check(nwr[i * M_MAX + j] == 1, "written once");
      end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; d_we = 0; d_wa = '0; d_wd = '0; label_pos = '0; avail = '0;
    kernel = K_LINEAR; degree = 2; gamma = FX_ONE; coef0 = FX_ONE; num_train = 0; num_feat = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(K_LINEAR, 1, 1.0, 0.0, 16, 4);
    run(K_POLY, 3, 0.5, 1.0, 10, 3);
    run(K_RBF, 1, 0.5, 0.0, 12, 4);
    run(K_LINEAR, 1, 1.0, 0.0, 16, 4, 1'b1);
    run(K_RBF, 1, 0.5, 0.0, 13, 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
