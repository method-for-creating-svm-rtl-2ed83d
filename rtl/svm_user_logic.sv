// svm_user_logic: the user logic of the SVM IP, sequencing the whole job:
//   PRELOAD  the address generator reads the data set from DDR or, when
//            cfg.src_stream is set, the words arrive on the stream input
//            (s_data/s_valid/s_ready, a valid/ready handshake; the word count
//            comes from m, t and nf, so no end marker is needed); each word is
//            placed in the data RAM (feature f of vector v at v*NF_MAX + f)
//            or, for the word after a training vector's features, in the
//            label register (word > 0 means label +1, else -1);
//   STAGE 1  svm_qmatrix fills the Q RAM with B_i B_j K(A_i, A_j). It starts
//            with the preload and computes row i as soon as training vector
//            i and its label are in place (ld_avail), so most of the matrix
//            is built while the data are still arriving;
//   STAGE 2  svm_optimizer finds the alphas, the displacement z and w;
//   STAGE 3  svm_tester classifies the test vectors into the result array;
//   WRITEBACK the address generator writes to DDR at dst_addr, in order:
//            w[0..nf-1], z, alpha[0..m-1], prediction[0..t-1] (+1/-1 words).
// done pulses when the write-back has completed; preload_bytes holds the
// size of the last preload, worked out by the address generator. The processor must keep
// m <= M_MAX, t <= T_MAX and 1 <= nf <= NF_MAX; larger values are not checked.
// Preload and stage 1 overlap; stages 2 and 3 and the write-back each wait
// for the one before, because each needs all of its predecessor's results.
// The stage split and the non-sequential schedule follow the design; the DDR
// layouts and the exact overlap are this implementation's choices.
module svm_user_logic
  import svm_pkg::*;
#(
  parameter int M_MAX  = 256,
  parameter int T_MAX  = 256,
  parameter int NF_MAX = 8,
  parameter int DDEPTH = (M_MAX + T_MAX) * NF_MAX,
  parameter int DAW    = $clog2(DDEPTH),
  parameter int IW     = $clog2(M_MAX),
  parameter int TW     = $clog2(T_MAX),
  parameter int FW     = $clog2(NF_MAX)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  svm_cfg_t    cfg,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [31:0] preload_bytes,
  output logic [15:0] iterations,
  output logic [15:0] n_sv,
  output fx_t         bias,
  output logic        converged,
  // IPIC side of the AXI burst master
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output logic        cmd_rnw,
  output logic [31:0] cmd_addr,
  output logic [8:0]  cmd_len,
  input  logic        cmd_cmplt,
  input  logic        rd_valid,
  input  logic [31:0] rd_data,
  output logic [31:0] wr_data,
  input  logic        wr_pop,
  // data-set stream input
  input  logic [31:0] s_data,
  input  logic        s_valid,
  output logic        s_ready
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_QM, S_OPT, S_TST, S_WB} st_e;
  st_e st;

  svm_cfg_t cf;   // configuration captured at start

  // ---------------- memories ----------------
  logic             d_we;
  logic [DAW-1:0]   d_waddr, d_ra, d_rb;
  fx_t              d_wdata, d_qa, d_qb;
  svm_dp_mem #(.DEPTH(DDEPTH), .W(32)) u_data (
    .clk, .we(d_we), .waddr(d_waddr), .wdata(d_wdata),
    .raddr_a(d_ra), .rdata_a(d_qa), .raddr_b(d_rb), .rdata_b(d_qb));

  logic             q_we;
  logic [2*IW-1:0]  q_waddr, q_ra, q_rb;
  fx_t              q_wdata, q_qa, q_qb;
  svm_dp_mem #(.DEPTH(M_MAX * M_MAX), .W(32)) u_q (
    .clk, .we(q_we), .waddr(q_waddr), .wdata(q_wdata),
    .raddr_a(q_ra), .rdata_a(q_qa), .raddr_b(q_rb), .rdata_b(q_qb));

  logic [M_MAX-1:0] label_pos;
  fx_t              res_mem [T_MAX];

  // ---------------- address generator ----------------
  logic ag_start, ag_write, ag_busy, ag_done;
  logic [31:0] total_bytes;
  svm_addr_gen u_ag (
    .clk, .rst_n, .start(ag_start), .is_write(ag_write),
    .base_addr(ag_write ? cf.dst_addr : cf.src_addr),
    .num_train(cf.num_train), .num_test(cf.num_test), .num_feat(cf.num_feat),
    .total_bytes, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_len, .cmd_cmplt,
    .busy(ag_busy), .done(ag_done));

  // ---------------- stage 1 ----------------
  logic           qm_start, qm_busy, qm_done, qm_fin;
  logic [15:0] ld_avail;   // training vectors complete (features and label)
  logic [DAW-1:0] qm_ra, qm_rb;
  svm_qmatrix #(.M_MAX(M_MAX), .NF_MAX(NF_MAX), .DAW(DAW)) u_qm (
    .clk, .rst_n, .start(qm_start), .num_train(cf.num_train), .num_feat(cf.num_feat),
    .kernel(cf.kernel), .degree(cf.degree), .gamma(cf.gamma), .coef0(cf.coef0),
    .label_pos, .avail(ld_avail), .d_raddr_a(qm_ra), .d_raddr_b(qm_rb), .d_rdata_a(d_qa), .d_rdata_b(d_qb),
    .q_we, .q_waddr, .q_wdata, .busy(qm_busy), .done(qm_done));

  // ---------------- stage 2 ----------------
  logic           op_start, op_busy, op_done;
  logic [DAW-1:0] op_ra;
  logic [IW-1:0]  alpha_raddr;
  fx_t            alpha_rdata, w_rdata;
  logic [FW-1:0]  w_raddr;
  svm_optimizer #(.M_MAX(M_MAX), .NF_MAX(NF_MAX), .DAW(DAW)) u_opt (
    .clk, .rst_n, .start(op_start), .num_train(cf.num_train), .num_feat(cf.num_feat),
    .c(cf.c), .eps(cf.eps), .max_iter(cf.max_iter), .z_mode(cf.z_mode), .label_pos,
    .q_raddr_a(q_ra), .q_raddr_b(q_rb), .q_rdata_a(q_qa), .q_rdata_b(q_qb),
    .d_raddr(op_ra), .d_rdata(d_qa),
    .alpha_raddr, .alpha_rdata, .w_raddr, .w_rdata,
    .bias, .n_sv, .iterations, .converged, .busy(op_busy), .done(op_done));

  // ---------------- stage 3 ----------------
  logic           ts_start, ts_busy, ts_done, res_we;
  logic [DAW-1:0] ts_ra, ts_rb;
  logic [IW-1:0]  ts_alpha_raddr;
  logic [TW-1:0]  res_addr;
  fx_t            res_pred, res_value;
  svm_tester #(.M_MAX(M_MAX), .T_MAX(T_MAX), .NF_MAX(NF_MAX), .DAW(DAW)) u_tst (
    .clk, .rst_n, .start(ts_start), .num_train(cf.num_train), .num_test(cf.num_test),
    .num_feat(cf.num_feat), .kernel(cf.kernel), .degree(cf.degree), .gamma(cf.gamma),
    .coef0(cf.coef0), .bias, .label_pos, .alpha_raddr(ts_alpha_raddr), .alpha_rdata,
    .d_raddr_a(ts_ra), .d_raddr_b(ts_rb), .d_rdata_a(d_qa), .d_rdata_b(d_qb),
    .res_we, .res_addr, .res_pred, .res_value, .busy(ts_busy), .done(ts_done));

  always_ff @(posedge clk) if (res_we) res_mem[res_addr] <= res_pred;

  // ---------------- data RAM port sharing ----------------
  always_comb begin
    d_ra = qm_ra;
    d_rb = qm_rb;
    unique case (st)
      S_OPT: d_ra = op_ra;
      S_TST: begin d_ra = ts_ra; d_rb = ts_rb; end
      default: ;
    endcase
  end

  // ---------------- preload placement ----------------
  logic [15:0] ld_vec;
  // preload source: burst master (DDR) or stream input
  logic [31:0] pre_words, s_cnt, ld_data;
  logic        ld_valid;
  always_comb begin
    pre_words = 32'(cf.num_train) * (32'(cf.num_feat) + 32'd1) + 32'(cf.num_test) * 32'(cf.num_feat);
    s_ready   = (st == S_PRE) && cf.src_stream && (s_cnt < pre_words);
    ld_valid  = cf.src_stream ? (s_valid && s_ready) : rd_valid;
    ld_data   = cf.src_stream ? s_data : rd_data;
  end
  logic [7:0]  ld_feat;
  logic        ld_test;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_we <= 1'b0; d_waddr <= '0; d_wdata <= '0; label_pos <= '0;
      ld_vec <= '0; ld_feat <= '0; ld_test <= 1'b0; ld_avail <= '0;
    end else begin
      d_we <= 1'b0;
      if (st == S_IDLE) begin
        ld_vec <= '0; ld_feat <= '0; ld_test <= 1'b0; ld_avail <= '0;
      end else if (st == S_PRE && ld_valid) begin
        if (!ld_test && ld_feat == cf.num_feat) begin
          label_pos[IW'(ld_vec)] <= ($signed(ld_data) > 0);
          ld_avail <= ld_vec + 16'd1;
          ld_feat <= '0;
          if (ld_vec == cf.num_train - 16'd1) begin
            ld_vec  <= '0;
            ld_test <= 1'b1;
          end else ld_vec <= ld_vec + 16'd1;
        end else begin
          d_we    <= 1'b1;
          d_waddr <= DAW'(((ld_test ? int'(cf.num_train) : 0) + int'(ld_vec)) * NF_MAX + int'(ld_feat));
          d_wdata <= ld_data;
          if (ld_test && ld_feat == cf.num_feat - 8'd1) begin
            ld_feat <= '0;
            ld_vec  <= ld_vec + 16'd1;
          end else ld_feat <= ld_feat + 8'd1;
        end
      end
    end
  end

  // ---------------- write-back word selection ----------------
  logic [31:0] wb_idx;
  logic [31:0] nf1, nfm;
  always_comb begin
    nf1         = 32'(cf.num_feat) + 32'd1;
    nfm         = nf1 + 32'(cf.num_train);
    w_raddr     = FW'(wb_idx);
    alpha_raddr = (st == S_TST) ? ts_alpha_raddr : IW'(wb_idx - nf1);
    if (wb_idx < 32'(cf.num_feat)) wr_data = w_rdata;
    else if (wb_idx < nf1)         wr_data = bias;
    else if (wb_idx < nfm)         wr_data = alpha_rdata;
    else                           wr_data = res_mem[TW'(wb_idx - nfm)];
  end

  // ---------------- sequencer ----------------
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cf <= '0; done <= 1'b0; qm_fin <= 1'b0; s_cnt <= '0; wb_idx <= '0; preload_bytes <= '0;
      ag_start <= 1'b0; ag_write <= 1'b0; qm_start <= 1'b0; op_start <= 1'b0; ts_start <= 1'b0;
    end else begin
      done <= 1'b0; ag_start <= 1'b0; qm_start <= 1'b0; op_start <= 1'b0; ts_start <= 1'b0;
      if (wr_pop) wb_idx <= wb_idx + 32'd1;
      if (qm_done) qm_fin <= 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          cf       <= cfg;
          ag_write <= 1'b0;
          ag_start <= !cfg.src_stream;
          s_cnt    <= '0;
          qm_start <= 1'b1;   // stage 1 follows the preload vector by vector
          qm_fin   <= 1'b0;
          st       <= S_PRE;
        end
        S_PRE: begin
          if (s_valid && s_ready) s_cnt <= s_cnt + 32'd1;
          if (cf.src_stream ? (s_cnt == pre_words) : ag_done) begin
            preload_bytes <= cf.src_stream ? (pre_words << 2) : total_bytes;
            st            <= S_QM;
          end
        end
        S_QM: if (qm_fin) begin
          op_start <= 1'b1;
          st       <= S_OPT;
        end
        S_OPT: if (op_done) begin
          ts_start <= 1'b1;
          st       <= S_TST;
        end
        S_TST: if (ts_done) begin
          wb_idx   <= '0;
          ag_write <= 1'b1;
          ag_start <= 1'b1;
          st       <= S_WB;
        end
        S_WB: if (ag_done) begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
