// tb_axi_lite_slave_ipif: an AXI4-Lite host writes and reads a small
// register array kept behind the slave. Address and data are presented in
// either order and BREADY/RREADY are delayed at random; checks the register
// strobes (index, data, byte enables), that each write is applied once, the
// read data, and the OKAY responses.
module tb_axi_lite_slave_ipif;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;   // a falling edge fires the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata, wr_data, rd_data;
  logic [3:0] wstrb, wr_strb;
  logic [1:0] bresp, rresp;
  logic wr_en, rd_en;
  logic [5:0] wr_idx, rd_idx;

  axi_lite_slave_ipif #(.ADDR_W(8)) dut (.clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_en, .rd_idx, .rd_data);

  logic [31:0] regs [64];
  int nwrites = 0;
  always @(posedge clk) if (wr_en) begin
    for (int b = 0; b < 4; b++) if (wr_strb[b]) regs[wr_idx][8*b +: 8] <= wr_data[8*b +: 8];
    nwrites++;
  end
  assign rd_data = regs[rd_idx];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic axil_write(logic [7:0] a, logic [31:0] d, logic [3:0] s);
    int order;
    order = $urandom_range(0, 2);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s;
    // order 0: both at once; 1: address first; 2: data first
    awvalid = (order != 2); wvalid = (order != 1);
    if (order != 0) begin
      @(negedge clk);
      awvalid = 1; wvalid = 1;
    end
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 bready = 1;
    while (!bvalid) @(posedge clk);
    check(bresp == 2'b00, "write OKAY");
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic axil_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    @(posedge clk); #1 arvalid = 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 rready = 1;
    while (!rvalid) @(posedge clk);
    d = rdata;
    check(rresp == 2'b00, "read OKAY");
    @(posedge clk); #1 rready = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] shadow [64];
    logic [31:0] d;
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; wdata = 0; wstrb = 0;
    for (int i = 0; i < 64; i++) begin regs[i] = 0; shadow[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 200; n++) begin
      int i;
      logic [31:0] v;
      logic [3:0] s;
      i = $urandom_range(0, 63);
      v = $urandom();
      s = (n % 5 == 0) ? 4'($urandom_range(0, 15)) : 4'hf;
      if ($urandom_range(0, 1)) begin
        for (int b = 0; b < 4; b++) if (s[b]) shadow[i][8*b +: 8] = v[8*b +: 8];
        axil_write(8'(i * 4), v, s);
      end else begin
        axil_read(8'(i * 4), d);
        check(d == shadow[i], $sformatf("register %0d read %h expected %h", i, d, shadow[i]));
      end
    end
    for (int i = 0; i < 64; i++) check(regs[i] == shadow[i], "final register contents");
    $display("writes applied: %0d", nwrites);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
