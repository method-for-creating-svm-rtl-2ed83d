// svm_optimizer: stage 2 of training, convex optimisation of the SVM dual.
//   minimise 1/2 a'Qa - sum(a)   subject to 0 <= a_t <= C,  sum(B_t a_t) = 0
// with Q_ij = B_i B_j K(A_i, A_j) read from the Q RAM (stage 1).
// The stage runs in the three phases of the design:
//   1. parameter initialisation: alpha = 0 (an admissible point) and the
//      gradient Gr = Q*alpha - 1 = -1 for every training vector;
//   2. optimisation: each iteration scans all vectors to pick the pair (i, j)
//      that violates the optimality conditions most (first-order working-set
//      rule), and stops when the violation gap is <= eps or after max_iter
//      iterations. For the pair it forms the curvature Q_ii + Q_jj - 2B_iB_jQ_ij
//      (Add1, Mul2, Add2), the step = gradient difference / curvature (Div1),
//      the new alphas alpha +/- step clipped to the box along the equality
//      constraint (Add3, Add4), the changes d_i, d_j (Sub1, Sub2), and updates
//      every gradient Gr_k += Q_ki d_i + Q_kj d_j (Mul3, Mul4, Add5, Acc reg);
//   3. displacement, by one of the design's two formulas (z_mode):
//      0: z = mean over support vectors (alpha > 0) of
//         B_s - sum_x alpha_x B_x K(A_x, A_s), which equals -B_s * Gr_s;
//      1: z = -1/2 [max over B=-1 of s_t + min over B=+1 of s_t], with
//         s_t = sum_x alpha_x B_x K(A_x, A_t) = B_t (Gr_t + 1), taken over
//         all training vectors of each class (0 if a class is empty).
//      Both are gathered in the same scan; the divider runs in either mode.
// Finally the weight vector w_f = sum_j [alpha_j > 0] alpha_j B_j A_jf is
// accumulated (Comp>0, M3, Mul5, MAC2) for the linear kernel's hyperplane.
// Timing: init m clocks; an iteration about 2m + 60 clocks; z about m + 50;
// w nf*(m + 2). All RAM reads have one clock latency; alpha, Gr and w are held
// in register arrays with a combinational read port for the other stages.
// The pair-selection rule, the clipping rule, the Q16.16 number format and
// treating every alpha > 0 as a support vector for z are this
// implementation's choices where the design names the blocks but not the rule.
module svm_optimizer
  import svm_pkg::*;
#(
  parameter int M_MAX  = 256,
  parameter int NF_MAX = 8,
  parameter int DAW    = 12,
  parameter int IW     = $clog2(M_MAX),
  parameter int FW     = $clog2(NF_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      num_train,
  input  logic [7:0]       num_feat,
  input  fx_t              c,
  input  fx_t              eps,
  input  logic [15:0]      max_iter,
  input  logic             z_mode,
  input  logic [M_MAX-1:0] label_pos,
  // Q RAM, two read ports, one clock latency
  output logic [2*IW-1:0]  q_raddr_a,
  output logic [2*IW-1:0]  q_raddr_b,
  input  fx_t              q_rdata_a,
  input  fx_t              q_rdata_b,
  // data RAM, one read port, one clock latency
  output logic [DAW-1:0]   d_raddr,
  input  fx_t              d_rdata,
  // results
  input  logic [IW-1:0]    alpha_raddr,
  output fx_t              alpha_rdata,
  input  logic [FW-1:0]    w_raddr,
  output fx_t              w_rdata,
  output fx_t              bias,
  output logic [15:0]      n_sv,
  output logic [15:0]      iterations,
  output logic             converged,
  output logic             busy,
  output logic             done
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_SEL, S_CHK, S_Q1, S_Q2, S_DIV, S_UPD_I, S_UPD_J,
    S_GRAD, S_GDRAIN, S_BIAS, S_BDIV, S_W, S_WDRAIN, S_WWR
  } st_e;
  st_e st;

  fx_t alpha [M_MAX];
  fx_t grad  [M_MAX];
  fx_t w     [NF_MAX];

  logic [IW-1:0] t, i, j, kd;
  logic [7:0]    f;
  logic          found_i, found_j, kvld;
  fx_t           gmax, gmin, qii, qjj, step, new_j, d_i, d_j;
  logic signed [47:0] zsum, acc;
  fx_t           smax, smin;       // z_mode 1: class extremes of s_t
  logic          fmax, fmin;

  // divider (Div1), shared by the step and the z average
  logic div_start, div_busy, div_done;
  fx_t  div_a, div_b, div_q;
  svm_div u_div (.clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
                 .busy(div_busy), .done(div_done), .q(div_q));

  // scan of vector t: membership of the two index sets and -B_t*Gr_t
  logic pos_t, up_t, low_t, last_t;
  fx_t  v_t, a_t;
  always_comb begin
    pos_t  = label_pos[t];
    a_t    = alpha[t];
    v_t    = pos_t ? -grad[t] : grad[t];
    up_t   = pos_t ? (a_t < c) : (a_t > 0);
    low_t  = pos_t ? (a_t > 0) : (a_t < c);
    last_t = (32'(t) == 32'(num_train) - 1);
  end

  // s_t = B_t (Gr_t + 1) for the midpoint formula of z
  fx_t s_t;
  logic signed [32:0] zmid;
  always_comb begin
    s_t  = pos_t ? (grad[t] + FX_ONE) : -(grad[t] + FX_ONE);
    zmid = -((33'(smax) + 33'(smin)) >>> 1);
  end

  // pair quantities
  logic same, pos_i, pos_j;
  fx_t  gi, gj, ai, aj, quad, num, qij, dsum, ddiff;
  always_comb begin
    pos_i = label_pos[i];
    pos_j = label_pos[j];
    same  = (pos_i == pos_j);
    gi    = grad[i];
    gj    = grad[j];
    ai    = alpha[i];
    aj    = alpha[j];
    qij   = q_rdata_a;
    // Add1, Mul2 (-2 B_i B_j Q_ij), Add2
    quad  = qii + qjj - (same ? (qij <<< 1) : -(qij <<< 1));
    if (quad <= 0) quad = 32'sd1;
    num   = same ? (gi - gj) : (-gi - gj);
    dsum  = ai + aj;
    ddiff = ai - aj;
  end

  // Add3/Add4 and clipping to the box along sum(B a) = const
  fx_t ni, nj;
  always_comb begin
    if (!same) begin
      ni = ai + step;
      nj = aj + step;
      if (ddiff > 0) begin
        if (nj < 0) begin nj = 0; ni = ddiff; end
      end else begin
        if (ni < 0) begin ni = 0; nj = -ddiff; end
      end
      if (ddiff > 0) begin
        if (ni > c) begin ni = c; nj = c - ddiff; end
      end else begin
        if (nj > c) begin nj = c; ni = c + ddiff; end
      end
    end else begin
      ni = ai - step;
      nj = aj + step;
      if (dsum > c) begin
        if (ni > c) begin ni = c; nj = dsum - c; end
      end else begin
        if (nj < 0) begin nj = 0; ni = dsum; end
      end
      if (dsum > c) begin
        if (nj > c) begin nj = c; ni = dsum - c; end
      end else begin
        if (ni < 0) begin ni = 0; nj = dsum; end
      end
    end
  end

  // RAM addresses by state
  always_comb begin
    q_raddr_a = {i, i};
    q_raddr_b = {j, j};
    unique case (st)
      S_Q1:   q_raddr_a = {i, j};
      S_GRAD: begin q_raddr_a = {t, i}; q_raddr_b = {t, j}; end
      default: ;
    endcase
    d_raddr = DAW'(int'(t) * NF_MAX + int'(f));
  end

  assign alpha_rdata = alpha[alpha_raddr];
  assign w_rdata     = w[w_raddr];
  assign busy        = (st != S_IDLE);

  // M3 / Mul5 / MAC2 term for the weight vector
  fx_t wterm;
  always_comb begin
    wterm = (alpha[kd] > 0) ? fx_mul(alpha[kd], d_rdata) : '0;
    if (!label_pos[kd]) wterm = -wterm;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; t <= '0; i <= '0; j <= '0; kd <= '0; f <= '0; kvld <= 1'b0;
      found_i <= 1'b0; found_j <= 1'b0; gmax <= '0; gmin <= '0;
      qii <= '0; qjj <= '0; step <= '0; new_j <= '0; d_i <= '0; d_j <= '0;
      zsum <= '0; acc <= '0; smax <= '0; smin <= '0; fmax <= 1'b0; fmin <= 1'b0; bias <= '0; n_sv <= '0; iterations <= '0; converged <= 1'b0;
      done <= 1'b0; div_start <= 1'b0; div_a <= '0; div_b <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      kvld      <= 1'b0;
      // Acc reg: gradient update one clock after the Q reads
      if (kvld && (st == S_GRAD || st == S_GDRAIN))
        grad[kd] <= grad[kd] + fx_mul(q_rdata_a, d_i) + fx_mul(q_rdata_b, d_j);
      if (kvld && (st == S_W || st == S_WDRAIN))
        acc <= acc + 48'(wterm);
      unique case (st)
        S_IDLE: if (start) begin
          t <= '0; iterations <= '0; converged <= 1'b0;
          st <= S_INIT;
        end
        S_INIT: begin
          alpha[t] <= '0;       // M1 selects 0: admissible starting point
          grad[t]  <= -FX_ONE;  // Gr = Q*0 - 1
          if (last_t) begin
            t <= '0; found_i <= 1'b0; found_j <= 1'b0;
            st <= S_SEL;
          end else t <= t + 1'b1;
        end
        S_SEL: begin
          if (up_t && (!found_i || v_t > gmax)) begin
            gmax <= v_t; i <= t; found_i <= 1'b1;
          end
          if (low_t && (!found_j || v_t < gmin)) begin
            gmin <= v_t; j <= t; found_j <= 1'b1;
          end
          if (last_t) begin t <= '0; st <= S_CHK; end
          else t <= t + 1'b1;
        end
        S_CHK: begin
          if (!found_i || !found_j || (gmax - gmin) <= eps || iterations >= max_iter) begin
            converged <= !found_i || !found_j || (gmax - gmin) <= eps;
            t    <= '0;
            zsum <= '0;
            n_sv <= '0;
            fmax <= 1'b0;
            fmin <= 1'b0;
            st   <= S_BIAS;
          end else st <= S_Q1;
        end
        S_Q1: begin
          qii <= q_rdata_a;
          qjj <= q_rdata_b;
          st  <= S_Q2;
        end
        S_Q2: begin
          div_a     <= num;
          div_b     <= quad;
          div_start <= 1'b1;
          st        <= S_DIV;
        end
        S_DIV: if (div_done) begin
          step <= div_q;
          st   <= S_UPD_I;
        end
        S_UPD_I: begin
          new_j    <= nj;
          d_i      <= ni - ai;   // Sub1
          d_j      <= nj - aj;   // Sub2
          alpha[i] <= ni;
          st       <= S_UPD_J;
        end
        S_UPD_J: begin
          alpha[j] <= new_j;
          t        <= '0;
          st       <= S_GRAD;
        end
        S_GRAD: begin
          kd   <= t;
          kvld <= 1'b1;
          if (last_t) begin t <= '0; st <= S_GDRAIN; end
          else t <= t + 1'b1;
        end
        S_GDRAIN: begin
          iterations <= iterations + 1'b1;
          found_i    <= 1'b0;
          found_j    <= 1'b0;
          st         <= S_SEL;
        end
        S_BIAS: begin
          if (a_t > 0) begin
            zsum <= zsum + 48'(v_t);
            n_sv <= n_sv + 1'b1;
          end
          if (!pos_t && (!fmax || s_t > smax)) begin smax <= s_t; fmax <= 1'b1; end
          if (pos_t && (!fmin || s_t < smin)) begin smin <= s_t; fmin <= 1'b1; end
          if (last_t) begin
            t <= '0;
            st <= S_BDIV;
            div_a <= (zsum + ((a_t > 0) ? 48'(v_t) : 48'sd0) > 48'sh7fff_ffff) ? fx_t'(32'sh7fff_ffff) :
                     (zsum + ((a_t > 0) ? 48'(v_t) : 48'sd0) < -48'sh7fff_ffff) ? fx_t'(-32'sh7fff_ffff) :
                     fx_t'(zsum + ((a_t > 0) ? 48'(v_t) : 48'sd0));
            div_b <= fx_t'({16'(n_sv + ((a_t > 0) ? 16'd1 : 16'd0)), 16'd0});
            div_start <= 1'b1;
          end else t <= t + 1'b1;
        end
        S_BDIV: if (div_done) begin
          if (z_mode) bias <= (fmax && fmin) ? fx_t'(zmid) : '0;
          else        bias <= (n_sv == 0) ? '0 : div_q;
          t    <= '0;
          f    <= '0;
          acc  <= '0;
          st   <= S_W;
        end
        S_W: begin
          kd   <= t;
          kvld <= 1'b1;
          if (last_t) begin t <= '0; st <= S_WDRAIN; end
          else t <= t + 1'b1;
        end
        S_WDRAIN: st <= S_WWR;
        S_WWR: begin
          w[FW'(f)] <= fx_t'(acc);
          acc <= '0;
          if (f == num_feat - 8'd1) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            f  <= f + 8'd1;
            st <= S_W;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
