// tb_axi_master_burst: runs read and write bursts of random length (1..256
// beats) through the burst master into the behavioural DDR model, which
// stalls its ready/valid signals at random. Checks every read word against
// the model's memory, every written word landing at the right address, the
// number of read/write bursts seen by the memory, WLAST placement (the model
// counts errors) and one cmd_cmplt per command.
module tb_axi_master_burst;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, cmd_rnw, cmd_cmplt, rd_valid, wr_pop, err;
  logic [31:0] cmd_addr, rd_data, wr_data;
  logic [8:0] cmd_len;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic [3:0] wstrb;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready, arvalid, arready, rlast, rvalid, rready;

  axi_master_burst dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt,
    .rd_valid, .rd_data, .wr_data, .wr_pop, .err,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready), .m_axi_araddr(araddr), .m_axi_arlen(arlen),
    .m_axi_arsize(arsize), .m_axi_arburst(arburst), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready));

  axi_ddr_model #(.WORDS(8192)) ddr (.clk, .rst_n, .awaddr, .awlen, .awvalid, .awready, .wdata, .wlast,
    .wvalid, .wready, .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int got, ncmplt = 0, wr_idx;
  logic [31:0] base_word;
  always @(posedge clk) if (cmd_cmplt) ncmplt++;
  always @(posedge clk) if (wr_pop) wr_idx <= wr_idx + 1;
  assign wr_data = 32'hA000_0000 + 32'(wr_idx);

  task automatic burst(bit rnw, int word, int len);
    int cyc = 0;
    got = 0;
    wr_idx = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_rnw = rnw; cmd_addr = 32'(word * 4); cmd_len = 9'(len);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!cmd_cmplt && cyc < 5000) begin
      @(posedge clk);
      if (rd_valid) begin
        check(rd_data == ddr.mem[word + got], $sformatf("read word %0d", word + got));
        got++;
      end
      cyc++;
    end
    check(cmd_cmplt, "burst completed");
    if (rnw) check(got == len, $sformatf("read %0d beats of %0d", got, len));
    else begin
      @(posedge clk);
      for (int i = 0; i < len; i++)
        check(ddr.mem[word + i] == 32'hA000_0000 + 32'(i), $sformatf("written word %0d", word + i));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nr = 0, nw = 0;
    cmd_valid = 0; cmd_rnw = 1; cmd_addr = 0; cmd_len = 1; wr_idx = 0;
    for (int i = 0; i < 8192; i++) ddr.mem[i] = $urandom();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    burst(1, 0, 1); nr++;
    burst(1, 100, 256); nr++;
    burst(0, 4000, 1); nw++;
    burst(0, 2048, 256); nw++;
    for (int n = 0; n < 40; n++) begin
      int len = $urandom_range(1, 64);
      int w = 1024 * $urandom_range(0, 7) + $urandom_range(0, 1024 - len);
      bit r = $urandom_range(0, 1);
      burst(r, w, len);
      if (r) nr++; else nw++;
    end
    repeat (2) @(posedge clk);
    check(ddr.n_rbursts == nr && ddr.n_wbursts == nw, "burst counts at the memory");
    check(ddr.n_errors == 0, "no WLAST or 4 KB errors");
    check(ncmplt == nr + nw, $sformatf("one completion per command (%0d for %0d)", ncmplt, nr + nw));
    check(!err, "no error response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
