// tb_svm_slave_regs: writes every configuration register through the
// register strobes and checks the decoded configuration record, the reset
// values, byte-strobe merging, the start pulse (and that start is ignored
// while busy), the sticky done flag and the read-only status registers.
module tb_svm_slave_regs;
  import svm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, start, busy, done, converged, axi_err;
  logic [5:0] wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data, total_bytes;
  logic [3:0] wr_strb;
  logic [15:0] iterations, n_sv;
  fx_t bias;
  svm_cfg_t cfg;
  int nstart = 0;

  svm_slave_regs dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_idx, .rd_data,
    .cfg, .start, .busy, .done, .converged, .axi_err, .total_bytes, .iterations, .n_sv, .bias);

  always @(posedge clk) if (start) nstart++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(int idx, logic [31:0] d, logic [3:0] s = 4'hf);
    @(negedge clk); wr_en = 1; wr_idx = 6'(idx); wr_data = d; wr_strb = s;
    @(negedge clk); wr_en = 0;
    @(negedge clk);
  endtask

  task automatic rd(int idx, output logic [31:0] v);
    rd_idx = 6'(idx);
    #1 v = rd_data;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    wr_en = 0; wr_idx = 0; wr_data = 0; wr_strb = 0; rd_idx = 0; busy = 0; done = 0;
    converged = 0; axi_err = 0; total_bytes = 32'd1234; iterations = 16'd77; n_sv = 16'd9; bias = -32'sd5000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.kernel == K_LINEAR && !cfg.z_mode && cfg.degree == 4'd2 && cfg.gamma == FX_ONE && cfg.c == FX_ONE
          && cfg.eps == 32'sd66 && cfg.max_iter == 16'd1000, "reset values");
    wr(2, 32'd200); wr(3, 32'd50); wr(4, 32'd8); wr(5, 32'h0000_0131);
    wr(6, 32'h0000_8000); wr(7, 32'h0002_0000); wr(8, 32'h000a_0000); wr(9, 32'd100);
    wr(10, 32'd500); wr(11, 32'h1000_0000); wr(12, 32'h1800_0000);
    check(cfg.num_train == 16'd200 && cfg.num_test == 16'd50 && cfg.num_feat == 8'd8, "sizes");
    check(cfg.kernel == K_POLY && cfg.degree == 4'd3 && cfg.z_mode, "kernel field");
    check(cfg.gamma == 32'sh8000 && cfg.coef0 == 32'sh20000 && cfg.c == 32'sha0000 && cfg.eps == 32'sd100, "fixed-point fields");
    check(cfg.max_iter == 16'd500 && cfg.src_addr == 32'h1000_0000 && cfg.dst_addr == 32'h1800_0000, "limits and addresses");
    for (int i = 2; i <= 12; i++) begin rd(i, v); check(v != 0, $sformatf("read back register %0d", i)); end
    rd(2, v); check(v == 32'd200, "read-back NUM_TRAIN");
    rd(12, v); check(v == 32'h1800_0000, "read-back DST_ADDR");
    wr(11, 32'hffff_ffff, 4'b0100);
    check(cfg.src_addr == 32'h10ff_0000, "byte strobe merge");
    rd(13, v); check(v == 32'd1234, "TOTAL_BYTES");
    rd(14, v); check(v == 32'd77, "ITERATIONS");
    rd(15, v); check(v == 32'd9, "N_SV");
    rd(16, v); check(v == 32'hffff_ec78, "BIAS");
    check(!cfg.src_stream, "SOURCE resets to DDR");
    wr(17, 32'd1); rd(17, v); check(cfg.src_stream && v == 32'd1, "SOURCE = stream");
    wr(17, 32'd0); check(!cfg.src_stream, "SOURCE = DDR");
    wr(0, 32'd1);
    check(nstart == 1, "start pulse");
    busy = 1; rd(1, v); check(v == 32'd1, "busy flag");
    wr(0, 32'd1);
    check(nstart == 1, "start ignored while busy");
    @(negedge clk); done = 1; converged = 1; @(negedge clk); done = 0; busy = 0;
    rd(1, v); check(v == 32'b0110, "done sticky and converged");
    wr(0, 32'd1);
    rd(1, v); check(nstart == 2 && v[1] == 1'b0, "start clears done");
    axi_err = 1; rd(1, v); check(v[3], "error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
