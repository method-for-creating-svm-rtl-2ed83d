// tb_svm_addr_gen: runs preload and write-back transfers for random SVM
// sizes and base addresses against a responder that accepts commands after a
// random delay. Checks total_bytes against 4*(m*(nf+1) + t*nf) (preload) and
// 4*(nf+1+m+t) (write-back), that the bursts are contiguous, cover the region
// exactly, are at most 16 beats, never cross a 4 KB boundary, carry the right
// direction, and that done pulses once at the end.
module tb_svm_addr_gen;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, is_write, cmd_valid, cmd_ready, cmd_rnw, cmd_cmplt, busy, done;
  logic [31:0] base_addr, total_bytes, cmd_addr;
  logic [15:0] num_train, num_test;
  logic [7:0] num_feat;
  logic [8:0] cmd_len;

  svm_addr_gen dut (.clk, .rst_n, .start, .is_write, .base_addr, .num_train, .num_test, .num_feat,
    .total_bytes, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt, .busy, .done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // responder: take a command, complete it a few clocks later
  int pending = 0;
  always @(posedge clk) begin
    cmd_cmplt <= 1'b0;
    if (cmd_valid && cmd_ready) pending <= $urandom_range(1, 6);
    else if (pending > 1) pending <= pending - 1;
    else if (pending == 1) begin pending <= 0; cmd_cmplt <= 1'b1; end
    cmd_ready <= (pending == 0) && !(cmd_valid && cmd_ready) && ($urandom_range(0, 3) != 0);
  end

  int n4k = 0;
  task automatic xfer(bit wr, int m, int t, int nf, logic [31:0] base);
    int words, cyc = 0, seen = 0, ndone = 0;
    logic [31:0] next;
    words = wr ? nf + 1 + m + t : m * (nf + 1) + t * nf;
    is_write = wr; num_train = 16'(m); num_test = 16'(t); num_feat = 8'(nf); base_addr = base;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    next = base;
    while (cyc < 100000) begin
      @(posedge clk); cyc++;
      if (cmd_valid && cmd_ready) begin
        check(cmd_addr == next, $sformatf("burst address %h expected %h", cmd_addr, next));
        check(cmd_len >= 1 && cmd_len <= 16, $sformatf("burst length %0d", cmd_len));
        check((cmd_addr & 32'hfff) + 32'(cmd_len) * 4 <= 32'h1000, "no 4 KB crossing");
        check(cmd_rnw == !wr, "direction");
        if ((cmd_addr & 32'hfff) + 32'(cmd_len) * 4 == 32'h1000) n4k++;
        next = cmd_addr + 32'(cmd_len) * 4;
        seen += int'(cmd_len);
      end
      if (done) begin ndone++; break; end
    end
    check(ndone == 1, "done");
    check(seen == words, $sformatf("%0d words moved, expected %0d", seen, words));
    check(total_bytes == 32'(words * 4), "total bytes");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; is_write = 0; base_addr = 0; num_train = 0; num_test = 0; num_feat = 1; cmd_cmplt = 0; cmd_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    xfer(0, 256, 256, 8, 32'h0010_0000);
    xfer(1, 256, 256, 8, 32'h0020_0f00);
    for (int n = 0; n < 20; n++)
      xfer($urandom_range(0, 1), $urandom_range(1, 100), $urandom_range(0, 50), $urandom_range(1, 8),
           {$urandom_range(0, 4095), 2'b00} + 32'h0030_0000);
    check(n4k > 0, "a burst was cut at a 4 KB boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
