// xgcd_unit: one complete large-integer extended-GCD unit.
//
// Given N-bit unsigned a and b (at least one odd) it returns g and
// coefficients ca, cb with ca*a + cb*b = g and |g| = gcd(a, b). The
// computation has three stages:
//
//  * pre-processing (xgcd_preproc, 4 cycles): odd a0, b0 and the multiples
//    j*a0, j*b0 for j = 0..7;
//  * reduction (one iteration per cycle): a, b and the coefficients u, m
//    (for a = u*a0 + m*b0) and y, n (for b = y*a0 + n*b0) live in carry-save
//    form in six xgcd_update units. Each cycle either an even operand is
//    divided by 2, 4 or 8, or, both being odd, the larger one (judged by the
//    sign of delta, xgcd_delta) is replaced by its sum with or difference
//    from the other, divided by 4. Only the side that shrinks is updated.
//    The a, u and m units build the add options once for their pair and
//    the b, y and n units reuse them (ADD_SHARED).
//    The control word for each cycle comes from xgcd_lsb_ctrl one cycle
//    ahead. The stage ends when a or b is zero (cs_zero_detect on both);
//  * post-processing (xgcd_postproc, 4 cycles): g = a + b, ca/cb from u + y
//    and m + n.
//
// Modes (mode_i, sampled at start): MODE_FAST stops when a or b reaches zero;
// MODE_CONST always runs CT_CYCLES reduction cycles (the state freezes once
// an operand is zero), so the latency does not depend on the data;
// MODE_DEBUG stops after dbg_cycles_i reduction cycles in the HALT state,
// where every variable in CS form, the control word and delta can be read
// on the dbg_* port; a new start_i then resumes for another dbg_cycles_i.
//
// Timing: from the start_i cycle, done_o rises after R + 10 clocks, where R
// is the number of reduction cycles (cycles_o in fast mode, CT_CYCLES in
// constant-time mode): 4 pre-processing, 1 load, R reduction, 1 hand-over
// (zero detection or end of budget), 4 post-processing. done_o stays high until the next start_i.
// MAX_SHIFT = 1 gives the smaller unit that only halves even operands.
// CT_CYCLES defaults follow the quoted constant-time execution times at
// 3.25 GHz less the 8 pre/post cycles; ct_overrun_o reports a
// constant-time run that had not finished when the budget ran out.
module xgcd_unit
  import xgcd_pkg::*;
#(
  parameter int unsigned N         = 512,
  parameter int unsigned W         = N + 8,
  parameter int unsigned MAX_SHIFT = 3,
  parameter int unsigned DW        = 10,
  parameter int unsigned CW        = 16,
  parameter int unsigned CT_CYCLES = 769
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  mode_e         mode_i,
  input  logic [CW-1:0] dbg_cycles_i,
  input  logic [N-1:0]  a_i,
  input  logic [N-1:0]  b_i,
  output logic          busy_o,
  output logic          done_o,
  output logic          halted_o,
  output logic          ct_overrun_o,
  output logic [CW-1:0] cycles_o,
  output logic [W-1:0]  g_o,
  output logic [W-1:0]  ca_o,
  output logic [W-1:0]  cb_o,
  input  logic [2:0]    dbg_sel_i,     // 0 a, 1 b, 2 u, 3 m, 4 y, 5 n
  output logic [W-1:0]  dbg_c_o,
  output logic [W-1:0]  dbg_s_o,
  output ctrl_t         dbg_ctrl_o,
  output logic [DW-1:0] dbg_delta_o
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_RED, S_HALT, S_POST, S_DONE} state_e;

  state_e        state_q;
  mode_e         mode_q;
  logic [CW-1:0] cnt_q, budget_q;
  logic          ovr_q;

  // ---- pre-processing ---------------------------------------------------
  logic         pre_valid, a_sum, b_sum;
  logic [W-1:0] a0, b0;
  logic [W-1:0] amul [8];
  logic [W-1:0] bmul [8];
  logic [W-1:0] zmul [8];

  xgcd_preproc #(.N(N), .W(W)) u_pre (
    .clk, .rst_n, .start_i(start_i && (state_q == S_IDLE || state_q == S_DONE)),
    .a_i, .b_i, .valid_o(pre_valid), .a0_o(a0), .b0_o(b0),
    .amul_o(amul), .bmul_o(bmul), .a_sum_o(a_sum), .b_sum_o(b_sum));

  always_comb for (int j = 0; j < 8; j++) zmul[j] = '0;

  // ---- reduction stage -----------------------------------------------------
  logic         load, en;
  ctrl_t        ctrl;
  logic [W-1:0] a_c, a_s, b_c, b_s, u_c, u_s, y_c, y_s, m_c, m_s, n_c, n_s;
  logic         a_zero, b_zero, fin;
  // add options, built on the a side and shared with the b side
  logic [W-1:0] add_ab_c, add_ab_s, add_uy_c, add_uy_s, add_mn_c, add_mn_s;
  logic [W-1:0] zadd_c, zadd_s;
  logic signed [DW-1:0] delta_q, delta_next;

  assign load   = pre_valid;
  assign zadd_c = '0;
  assign zadd_s = '0;

  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(MAX_SHIFT), .HAS_MULT(1'b0), .NEG_MULT(1'b0), .ADD_SHARED(1'b0))
    u_upd_a (.clk, .rst_n, .load_i(load), .init_i(a0), .en_i(en), .ctrl_i(ctrl),
             .p_c_i(b_c), .p_s_i(b_s), .mult_i(zmul), .add_c_i(zadd_c), .add_s_i(zadd_s), .add_c_o(add_ab_c), .add_s_o(add_ab_s),
             .x_c_o(a_c), .x_s_o(a_s));
  xgcd_update #(.W(W), .SIDE_B(1'b1), .MAX_SHIFT(MAX_SHIFT), .HAS_MULT(1'b0), .NEG_MULT(1'b0), .ADD_SHARED(1'b1))
    u_upd_b (.clk, .rst_n, .load_i(load), .init_i(b0), .en_i(en), .ctrl_i(ctrl),
             .p_c_i(a_c), .p_s_i(a_s), .mult_i(zmul), .add_c_i(add_ab_c), .add_s_i(add_ab_s), .add_c_o(), .add_s_o(),
             .x_c_o(b_c), .x_s_o(b_s));
  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(MAX_SHIFT), .HAS_MULT(1'b1), .NEG_MULT(1'b0), .ADD_SHARED(1'b0))
    u_upd_u (.clk, .rst_n, .load_i(load), .init_i(W'(1)), .en_i(en), .ctrl_i(ctrl),
             .p_c_i(y_c), .p_s_i(y_s), .mult_i(bmul), .add_c_i(zadd_c), .add_s_i(zadd_s), .add_c_o(add_uy_c), .add_s_o(add_uy_s),
             .x_c_o(u_c), .x_s_o(u_s));
  xgcd_update #(.W(W), .SIDE_B(1'b1), .MAX_SHIFT(MAX_SHIFT), .HAS_MULT(1'b1), .NEG_MULT(1'b0), .ADD_SHARED(1'b1))
    u_upd_y (.clk, .rst_n, .load_i(load), .init_i(W'(0)), .en_i(en), .ctrl_i(ctrl),
             .p_c_i(u_c), .p_s_i(u_s), .mult_i(bmul), .add_c_i(add_uy_c), .add_s_i(add_uy_s), .add_c_o(), .add_s_o(),
             .x_c_o(y_c), .x_s_o(y_s));
  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(MAX_SHIFT), .HAS_MULT(1'b1), .NEG_MULT(1'b1), .ADD_SHARED(1'b0))
    u_upd_m (.clk, .rst_n, .load_i(load), .init_i(W'(0)), .en_i(en), .ctrl_i(ctrl),
             .p_c_i(n_c), .p_s_i(n_s), .mult_i(amul), .add_c_i(zadd_c), .add_s_i(zadd_s), .add_c_o(add_mn_c), .add_s_o(add_mn_s),
             .x_c_o(m_c), .x_s_o(m_s));
  xgcd_update #(.W(W), .SIDE_B(1'b1), .MAX_SHIFT(MAX_SHIFT), .HAS_MULT(1'b1), .NEG_MULT(1'b1), .ADD_SHARED(1'b1))
    u_upd_n (.clk, .rst_n, .load_i(load), .init_i(W'(1)), .en_i(en), .ctrl_i(ctrl),
             .p_c_i(m_c), .p_s_i(m_s), .mult_i(amul), .add_c_i(add_mn_c), .add_s_i(add_mn_s), .add_c_o(), .add_s_o(),
             .x_c_o(n_c), .x_s_o(n_s));

  xgcd_delta #(.DW(DW)) u_delta (
    .clk, .rst_n, .load_i(load), .en_i(en), .ctrl_i(ctrl),
    .delta_q_o(delta_q), .delta_next_o(delta_next));

  xgcd_lsb_ctrl #(.MAX_SHIFT(MAX_SHIFT)) u_ctrl (
    .clk, .rst_n, .load_i(load), .a0_i(a0[2:0]), .b0_i(b0[5:0]), .en_i(en),
    .a6_i(6'(a_c[5:0] + a_s[5:0])), .b6_i(6'(b_c[5:0] + b_s[5:0])),
    .u6_i(6'(u_c[5:0] + u_s[5:0])), .y6_i(6'(y_c[5:0] + y_s[5:0])),
    .delta_next_neg_i(delta_next[DW-1]), .ctrl_o(ctrl));

  cs_zero_detect #(.W(W)) u_za (.c_i(a_c), .s_i(a_s), .zero_o(a_zero));
  cs_zero_detect #(.W(W)) u_zb (.c_i(b_c), .s_i(b_s), .zero_o(b_zero));

  assign fin = a_zero | b_zero;

  // ---- sequencing ------------------------------------------------------------
  logic red_last, post_start, post_valid;

  always_comb begin
    en       = 1'b0;
    red_last = 1'b0;
    if (state_q == S_RED) begin
      unique case (mode_q)
        MODE_CONST: begin
          en       = !fin && (cnt_q != CW'(CT_CYCLES));
          red_last = (cnt_q == CW'(CT_CYCLES));
        end
        MODE_DEBUG: begin
          en       = !fin && (cnt_q != budget_q);
          red_last = fin;
        end
        default: begin
          en       = !fin;
          red_last = fin;
        end
      endcase
    end
  end

  assign post_start = red_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      mode_q   <= MODE_FAST;
      cnt_q    <= '0;
      budget_q <= '0;
      ovr_q    <= 1'b0;
      cycles_o <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: if (start_i) begin
          state_q <= S_PRE;
          mode_q  <= mode_i;
          ovr_q   <= 1'b0;
        end
        S_PRE: if (pre_valid) begin
          state_q  <= S_RED;
          cnt_q    <= '0;
          budget_q <= dbg_cycles_i;
        end
        S_RED: begin
          if (mode_q == MODE_CONST) cnt_q <= cnt_q + 1'b1;
          else if (en)              cnt_q <= cnt_q + 1'b1;
          if (en) cycles_o <= cnt_q + 1'b1;
          if (red_last) begin
            state_q <= S_POST;
            if (mode_q == MODE_CONST && !fin) ovr_q <= 1'b1;
          end else if (mode_q == MODE_DEBUG && cnt_q == budget_q) begin
            state_q <= S_HALT;
          end
        end
        S_HALT: if (start_i) begin
          state_q  <= S_RED;
          budget_q <= cnt_q + dbg_cycles_i;
        end
        S_POST: if (post_valid) state_q <= S_DONE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  xgcd_postproc #(.W(W)) u_post (
    .clk, .rst_n, .start_i(post_start),
    .a_c_i(a_c), .a_s_i(a_s), .b_c_i(b_c), .b_s_i(b_s),
    .u_c_i(u_c), .u_s_i(u_s), .y_c_i(y_c), .y_s_i(y_s),
    .m_c_i(m_c), .m_s_i(m_s), .n_c_i(n_c), .n_s_i(n_s),
    .a_sum_i(a_sum), .b_sum_i(b_sum),
    .valid_o(post_valid), .g_o, .ca_o, .cb_o);

  assign busy_o       = (state_q == S_PRE) || (state_q == S_RED) || (state_q == S_POST);
  assign done_o       = (state_q == S_DONE);
  assign halted_o     = (state_q == S_HALT);
  assign ct_overrun_o = ovr_q;

  // ---- debug read-out ------------------------------------------------------
  always_comb begin
    unique case (dbg_sel_i)
      3'd0:    begin dbg_c_o = a_c; dbg_s_o = a_s; end
      3'd1:    begin dbg_c_o = b_c; dbg_s_o = b_s; end
      3'd2:    begin dbg_c_o = u_c; dbg_s_o = u_s; end
      3'd3:    begin dbg_c_o = m_c; dbg_s_o = m_s; end
      3'd4:    begin dbg_c_o = y_c; dbg_s_o = y_s; end
      default: begin dbg_c_o = n_c; dbg_s_o = n_s; end
    endcase
  end

  assign dbg_ctrl_o  = ctrl;
  assign dbg_delta_o = delta_q;

  // the reduction never applies an update once an operand is zero
  assert property (@(posedge clk) disable iff (!rst_n) fin |-> !en);

endmodule
