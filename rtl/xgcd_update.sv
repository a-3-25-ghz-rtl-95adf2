// xgcd_update: update unit of one XGCD variable, with its register.
//
// One instance holds one of the six carry-save variables a, b, u, m, y, n
// and computes, every cycle and in parallel, all the values the variable can
// take next; a registered control word then picks one of them (late select).
// With x the variable, p its partner on the other side (b for a, y for u,
// n for m, and the reverse) and M the constant multiple used by the
// coefficient updates (b0 for u and y, -a0 for m and n, none for a and b),
// the candidates are
//
//   hold                 x
//   shift by s (1..3)    (x + k*M) / 2^s     k = 0 .. 2^s - 1
//   add                  (x + p + k*M) / 4   k = 0 .. 3
//   subtract             (x - p + k*M) / 4   k = 0 .. 3
//
// i.e. up to 23 options. The control word chooses k so that the numerator is
// divisible by the shift. Numerators are formed with 3:2 carry-save adders
// (no carry propagation; the free LSB of each carry vector takes the +1 of a
// two's-complement negation) and divided with cs_shift. The four add and the
// four subtract options are first reduced by two 4:1 multiplexers on k, whose
// outputs join the other 15 options in a 17:1 AND-OR multiplexer, as in the
// described unit. With MAX_SHIFT = 1 (the unit that only halves even
// operands) the shift-by-2 and shift-by-3 options are not built and the
// multiplexer has 11 live inputs. Without a multiple (HAS_MULT = 0) only the
// k = 0 options are built.
//
// Sharing: the add option has the same value on both sides of a pair
// ((a + b)/4 is (b + a)/4, and u, y use the same k because the control word
// is common), so it is built in one unit only, following the described
// sharing of update logic between units. The unit that builds it exports the
// option selected by k on add_c_o/add_s_o; a unit with ADD_SHARED = 1 builds
// no add options and takes that pair from add_c_i/add_s_i instead. The
// subtract options differ by more than a sign once the multiple is added and
// are built in every unit (this design's choice).
//
// Timing: the register loads init_i (as a CS pair with a zero carry vector)
// when load_i is high, otherwise takes the selected candidate when en_i is
// high and ctrl_i names this unit's side. One update per clock.
module xgcd_update
  import xgcd_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter bit          SIDE_B    = 1'b0,  // 1: b, y, n side
  parameter int unsigned MAX_SHIFT = 3,
  parameter bit          HAS_MULT  = 1'b1,
  parameter bit          NEG_MULT  = 1'b0,  // multiple is subtracted (m, n)
  parameter bit          ADD_SHARED = 1'b0  // add option taken from the partner
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [W-1:0] init_i,
  input  logic         en_i,
  input  ctrl_t        ctrl_i,
  input  logic [W-1:0] p_c_i,            // partner variable, carry vector
  input  logic [W-1:0] p_s_i,            // partner variable, sum vector
  input  logic [W-1:0] mult_i [8],       // j * M, j = 0..7, binary
  input  logic [W-1:0] add_c_i,          // partner's add option (ADD_SHARED)
  input  logic [W-1:0] add_s_i,
  output logic [W-1:0] add_c_o,          // add option selected by k
  output logic [W-1:0] add_s_o,
  output logic [W-1:0] x_c_o,
  output logic [W-1:0] x_s_o
);

  typedef struct packed {
    logic [W-1:0] c;
    logic [W-1:0] s;
  } cs_t;

  // 3:2 carry-save adder; cin fills the free LSB of the carry vector
  function automatic cs_t csa(logic [W-1:0] x, logic [W-1:0] y,
                              logic [W-1:0] z, logic cin);
    cs_t r;
    r.s = x ^ y ^ z;
    r.c = {(((x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]))), cin};
    return r;
  endfunction

  cs_t x_q;
  cs_t cand [NSEL];
  cs_t add4 [4];
  cs_t sub4 [4];

  // multiple k*M as it is added: complemented (+1 in the free LSB) for -M
  function automatic logic [W-1:0] mterm(logic [W-1:0] v);
    return NEG_MULT ? ~v : v;
  endfunction

  // ---- shift candidates ------------------------------------------------
  for (genvar sh = 1; sh <= 3; sh++) begin : g_shift
    localparam int unsigned NK   = HAS_MULT ? (1 << sh) : 1;
    localparam int unsigned BASE = (1 << sh) - 1;  // 1, 3, 7
    if (sh <= MAX_SHIFT) begin : g_on
      for (genvar k = 0; k < (1 << sh); k++) begin : g_k
        if (k < NK) begin : g_build
          cs_t num, res;
          always_comb num = csa(x_q.c, x_q.s, mterm(mult_i[k]), NEG_MULT);
          cs_shift #(.W(W), .SHIFT(sh)) u_sh (
            .c_i(num.c), .s_i(num.s), .c_o(res.c), .s_o(res.s));
          assign cand[BASE + k] = res;
        end else begin : g_alias
          // no multiple: every k gives the k = 0 result
          assign cand[BASE + k] = cand[BASE];
        end
      end
    end else begin : g_off
      for (genvar k = 0; k < (1 << sh); k++) begin : g_k
        assign cand[BASE + k] = x_q;  // never selected
      end
    end
  end

  // ---- add / subtract candidates ------------------------------------------
  for (genvar k = 0; k < 4; k++) begin : g_as
    if (k == 0 || HAS_MULT) begin : g_build
      cs_t s1, s2, s3, rs;
      always_comb begin
        // x - p = x + ~p.c + 1 + ~p.s + 1
        s1 = csa(x_q.c, x_q.s, ~p_c_i, 1'b1);
        s2 = csa(s1.c, s1.s, ~p_s_i, 1'b1);
        s3 = csa(s2.c, s2.s, mterm(mult_i[k]), NEG_MULT);
      end
      cs_shift #(.W(W), .SHIFT(2)) u_shs (
        .c_i(s3.c), .s_i(s3.s), .c_o(rs.c), .s_o(rs.s));
      assign sub4[k] = rs;
      if (!ADD_SHARED) begin : g_add
        cs_t a1, a2, a3, ra;
        always_comb begin
          a1 = csa(x_q.c, x_q.s, p_c_i, 1'b0);
          a2 = csa(a1.c, a1.s, p_s_i, 1'b0);
          a3 = csa(a2.c, a2.s, mterm(mult_i[k]), NEG_MULT);
        end
        cs_shift #(.W(W), .SHIFT(2)) u_sha (
          .c_i(a3.c), .s_i(a3.s), .c_o(ra.c), .s_o(ra.s));
        assign add4[k] = ra;
      end else begin : g_add_in
        assign add4[k] = '{c: add_c_i, s: add_s_i};  // not selected
      end
    end else begin : g_alias
      assign add4[k] = add4[0];
      assign sub4[k] = sub4[0];
    end
  end

  // ---- late select: two 4:1 multiplexers feeding a 17:1 one-hot mux ------
  logic [NSEL-1:0] onehot;
  cs_t             nxt;

  assign cand[0]  = x_q;
  assign cand[15] = ADD_SHARED ? '{c: add_c_i, s: add_s_i} : add4[ctrl_i.k[1:0]];
  assign add_c_o  = cand[15].c;
  assign add_s_o  = cand[15].s;
  assign cand[16] = sub4[ctrl_i.k[1:0]];

  always_comb begin
    onehot = '0;
    if (ctrl_i.side_b == SIDE_B) onehot[sel_index(ctrl_i.op, ctrl_i.k)] = 1'b1;
    else                         onehot[0] = 1'b1;

    nxt = '0;
    for (int i = 0; i < NSEL; i++) begin
      nxt.c |= cand[i].c & {W{onehot[i]}};
      nxt.s |= cand[i].s & {W{onehot[i]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      x_q <= '0;
    else if (load_i) x_q <= '{c: '0, s: init_i};
    else if (en_i)   x_q <= nxt;
  end

  assign x_c_o = x_q.c;
  assign x_s_o = x_q.s;

endmodule
