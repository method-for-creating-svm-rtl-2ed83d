// tb_svm_tester: stage 3 with testbench-supplied alphas (most of them zero),
// labels, displacement z and vectors. For each kernel every test vector's
// decision value is compared with sum alpha B K + z computed here in real
// arithmetic, and the +1/-1 output with its sign. Also checks that only
// support vectors cost kernel evaluations, through the run time.
module tb_svm_tester;
  import svm_pkg::*;

  localparam int M_MAX = 16, T_MAX = 8, NF_MAX = 4, DAW = 7, IW = 4, TW = 3;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, d_we, res_we;
  logic [15:0] num_train, num_test;
  logic [7:0] num_feat;
  kernel_e kernel;
  logic [3:0] degree;
  fx_t gamma, coef0, bias, alpha_rdata, d_qa, d_qb, d_wd, res_pred, res_value;
  logic [M_MAX-1:0] label_pos;
  logic [IW-1:0] alpha_raddr;
  logic [DAW-1:0] d_ra, d_rb, d_wa;
  logic [TW-1:0] res_addr;
  fx_t alpha_mem [M_MAX];
  assign alpha_rdata = alpha_mem[alpha_raddr];

  svm_dp_mem #(.DEPTH((M_MAX+T_MAX)*NF_MAX), .W(32)) u_d (.clk, .we(d_we), .waddr(d_wa), .wdata(d_wd),
    .raddr_a(d_ra), .rdata_a(d_qa), .raddr_b(d_rb), .rdata_b(d_qb));

  svm_tester #(.M_MAX(M_MAX), .T_MAX(T_MAX), .NF_MAX(NF_MAX), .DAW(DAW)) dut (
    .clk, .rst_n, .start, .num_train, .num_test, .num_feat, .kernel, .degree, .gamma, .coef0,
    .bias, .label_pos, .alpha_raddr, .alpha_rdata, .d_raddr_a(d_ra), .d_raddr_b(d_rb),
    .d_rdata_a(d_qa), .d_rdata_b(d_qb), .res_we, .res_addr, .res_pred, .res_value, .busy, .done);

  real xs [M_MAX+T_MAX][NF_MAX];
  fx_t val_got [T_MAX];
  fx_t pred_got [T_MAX];
  int  n_pos, n_neg;

  function automatic real fx2r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t r2fx(real v); return fx_t'($rtoi(v * 65536.0)); endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (res_we) begin
    val_got[res_addr]  <= res_value;
    pred_got[res_addr] <= res_pred;
  end

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

  task automatic run(kernel_e k, int deg, real g, real c0, int m, int t, int nf, int nsv);
    int cyc, lat;
    kernel = k; degree = 4'(deg); gamma = r2fx(g); coef0 = r2fx(c0);
    num_train = 16'(m); num_test = 16'(t); num_feat = 8'(nf);
    bias = r2fx((real'($urandom_range(0, 400)) - 200.0) / 1000.0);
    for (int i = 0; i < m; i++) begin
      label_pos[i] = $urandom_range(0, 1);
      alpha_mem[i] = (i < nsv) ? r2fx(real'($urandom_range(1, 1000)) / 1000.0) : '0;
    end
    for (int v = 0; v < m + t; v++)
      for (int f = 0; f < nf; f++) begin
        xs[v][f] = fx2r(r2fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0));
        d_we <= 1'b1; d_wa <= DAW'(v * NF_MAX + f); d_wd <= r2fx(xs[v][f]);
        @(posedge clk);
      end
    d_we <= 1'b0;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    cyc = 0;
    while (!done && cyc < 100000) begin @(posedge clk); cyc++; end
    check(done, "stage 3 finished");
    @(posedge clk);
    // time: per test vector m checks, nsv kernel runs of nf+1+latency, one write
    lat = (k == K_LINEAR) ? 1 : (k == K_POLY) ? deg + 3 : 5;
    check(cyc <= t * (m + nsv * (nf + 2 + lat) + 2) + 2,
          $sformatf("%0d clocks for %0d support vectors", cyc, nsv));
    for (int tt = 0; tt < t; tt++) begin
      real f = fx2r(bias), err;
      for (int j = 0; j < m; j++)
        f += fx2r(alpha_mem[j]) * (label_pos[j] ? 1.0 : -1.0) * kern(k, deg, g, c0, m + tt, j, nf);
      err = fx2r(val_got[tt]) - f;
      check(err < 0.02 && err > -0.02, $sformatf("decision %0d: %f expected %f", tt, fx2r(val_got[tt]), f));
      if (f > 0.02 || f < -0.02)
        check(pred_got[tt] == ((f > 0) ? 32'sd1 : -32'sd1), $sformatf("prediction %0d", tt));
      if (pred_got[tt] == 32'sd1) n_pos++; else n_neg++;
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
    start = 0; d_we = 0; d_wa = '0; d_wd = '0; label_pos = '0; bias = '0;
    kernel = K_LINEAR; degree = 2; gamma = FX_ONE; coef0 = FX_ONE;
    num_train = 0; num_test = 0; num_feat = 1; n_pos = 0; n_neg = 0;
    for (int i = 0; i < M_MAX; i++) alpha_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      run(K_LINEAR, 1, 1.0, 0.0, 16, 8, 4, 5);
      run(K_POLY, 2, 0.5, 1.0, 12, 8, 3, 4);
      run(K_RBF, 1, 0.7, 0.0, 16, 8, 4, 6);
    end
    check(n_pos > 0 && n_neg > 0, $sformatf("both classes predicted (%0d/%0d)", n_pos, n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
