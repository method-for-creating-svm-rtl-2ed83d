// tb_svm_dp_mem: writes random words, reads them back on both ports with the
// one-clock read latency, and checks read-before-write on a colliding address.
module tb_svm_dp_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 256;
  logic        we;
  logic [7:0]  waddr, ra, rb;
  logic [31:0] wdata, qa, qb;
  logic [31:0] shadow [DEPTH];

  svm_dp_mem #(.DEPTH(DEPTH), .W(32)) dut (.clk, .we, .waddr, .wdata,
    .raddr_a(ra), .rdata_a(qa), .raddr_b(rb), .rdata_b(qb));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom();
      we <= 1'b1; waddr <= 8'(i); wdata <= shadow[i];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      ra <= 8'(i); rb <= 8'(DEPTH - 1 - i);
      @(posedge clk); #1;
      check(qa == shadow[i], $sformatf("port a addr %0d", i));
      check(qb == shadow[DEPTH - 1 - i], $sformatf("port b addr %0d", DEPTH - 1 - i));
    end
    // read and write the same address in one clock: old word comes out
    we <= 1'b1; waddr <= 8'd5; wdata <= ~shadow[5]; ra <= 8'd5;
    @(posedge clk); #1;
    check(qa == shadow[5], "read-before-write");
    we <= 1'b0;
    @(posedge clk); #1;
    check(qa == ~shadow[5], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
