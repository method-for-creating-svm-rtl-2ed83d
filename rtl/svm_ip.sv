// svm_ip: SVM training and classification accelerator IP, top level.
// The processor programs the problem size, kernel and optimiser settings into
// work registers over the AXI4-Lite slave port and writes CTRL.start. The IP
// then, on its own AXI4 master port to DDR: loads the data set (training
// vectors with their labels, then test vectors), builds the label-signed
// kernel matrix, solves the SVM dual by pairwise convex optimisation, computes
// the displacement z and weight vector w, classifies the test vectors, and
// writes w, z, the alphas and the +1/-1 predictions back to DDR. irq pulses
// when the job is done; STATUS.done stays set until the next start.
// With SOURCE = 1 the data set is taken from the AXI4-Stream slave port
// s_axis_* instead (for example a sensor feeding the IP directly), in the
// same word order; results still go to DDR. TLAST is not used: the word
// count follows from the sizes in the work registers.
// Structure: axi_lite_slave_ipif -> svm_slave_regs -> svm_user_logic
// (address generator, RAMs, stages 1-3) -> axi_master_burst. Sizes:
// M_MAX training vectors, T_MAX test vectors, NF_MAX features per vector.
// The processor, interconnects and DDR3 memory are outside this module.
module svm_ip
  import svm_pkg::*;
#(
  parameter int M_MAX  = 256,
  parameter int T_MAX  = 256,
  parameter int NF_MAX = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        irq,
  // AXI4-Stream slave (data set, when SOURCE = 1)
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // AXI4-Lite slave (work registers)
  input  logic [7:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [7:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4 master (DDR)
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  output logic [31:0] m_axi_araddr,
  output logic [7:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready
);

  logic        wr_en, rd_en;
  logic [5:0]  wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axi_lite_slave_ipif #(.ADDR_W(8)) u_ipif (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_en, .rd_idx, .rd_data);

  svm_cfg_t    cfg;
  logic        start, busy, done, converged, axi_err;
  logic [31:0] total_bytes;
  logic [15:0] iterations, n_sv;
  fx_t         bias;

  svm_slave_regs #(.IDX_W(6)) u_regs (
    .clk, .rst_n, .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_idx, .rd_data,
    .cfg, .start, .busy, .done, .converged, .axi_err, .total_bytes, .iterations, .n_sv, .bias);

  logic        cmd_valid, cmd_ready, cmd_rnw, cmd_cmplt, rd_valid, wr_pop;
  logic [31:0] cmd_addr, mrd_data, mwr_data;
  logic [8:0]  cmd_len;

  svm_user_logic #(.M_MAX(M_MAX), .T_MAX(T_MAX), .NF_MAX(NF_MAX)) u_user (
    .clk, .rst_n, .cfg, .start, .busy, .done, .preload_bytes(total_bytes), .iterations, .n_sv, .bias, .converged,
    .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt,
    .rd_valid, .rd_data(mrd_data), .wr_data(mwr_data), .wr_pop,
    .s_data(s_axis_tdata), .s_valid(s_axis_tvalid), .s_ready(s_axis_tready));

  axi_master_burst u_master (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt,
    .rd_valid, .rd_data(mrd_data), .wr_data(mwr_data), .wr_pop, .err(axi_err),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready,
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready);

  assign irq = done;

endmodule
