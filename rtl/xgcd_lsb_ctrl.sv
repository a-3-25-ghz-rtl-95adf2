// xgcd_lsb_ctrl: early control path of the reduction stage.
//
// Which update the datapath applies in a cycle depends only on the three
// least significant bits of a, b, u and y (and of the constant b0) and on the
// sign of delta. Instead of deriving the control word from the registered
// full-width values at the start of a cycle, this block computes, during the
// current cycle, the low bits of the values the variables will hold in the
// next cycle, decodes the next control word from them and registers it, so
// that the late-select multiplexers of the wide datapath see a settled
// control word at the start of every cycle.
//
// The low bits of a candidate (x + p + k*M) / 2^s modulo 8 need the operands
// modulo 2^(s+3), so the block works on six-bit residues: a6_i etc. are the
// values modulo 64 of the current registers (carry vector plus sum vector,
// added over six bits only). As in the described chip, the residue update
// and the decode are pushed through the late-select multiplexer: for each
// of its 17 positions, and for each side, the block computes the residues
// that position would produce and decodes a control word from them. The
// registered control word of the current cycle then picks one of these
// 2 x 17 words with the same one-hot AND-OR select the wide datapath uses,
// so the decode is off the path from the control register to the next
// control word. The add and subtract positions use the registered k, like
// the 4:1 multiplexers in front of them. With MAX_SHIFT = 1 the
// shift-by-2 and shift-by-3 positions are not built.
//
// Timing: ctrl_o is the registered control word for the current cycle.
// load_i loads the word decoded from the initial residues (a0, b0, u=1, y=0,
// delta=0); en_i advances it under the word currently applied.
module xgcd_lsb_ctrl
  import xgcd_pkg::*;
#(
  parameter int unsigned MAX_SHIFT = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_i,
  input  logic [2:0] a0_i,          // initial a modulo 8
  input  logic [5:0] b0_i,          // b0 modulo 64 (constant)
  input  logic       en_i,
  input  logic [5:0] a6_i,          // current a modulo 64
  input  logic [5:0] b6_i,
  input  logic [5:0] u6_i,
  input  logic [5:0] y6_i,
  input  logic       delta_next_neg_i,  // sign of delta after this cycle
  output ctrl_t      ctrl_o
);

  ctrl_t           ctrl_q, ctrl_d;
  ctrl_t           dec_a [NSEL];  // next word if position i updates side a
  ctrl_t           dec_b [NSEL];  // next word if position i updates side b
  logic [NSEL-1:0] hot_a, hot_b;

  // (x op p + k*m) >> s modulo 8, from residues modulo 64
  function automatic logic [2:0] step(logic [5:0] x, logic [5:0] p,
                                      logic [5:0] m, op_e op, logic [2:0] k);
    logic [5:0] num;
    unique case (op)
      OP_SHR1: num = (x + 6'(k * m)) >> 1;
      OP_SHR2: num = (x + 6'(k * m)) >> 2;
      OP_SHR3: num = (x + 6'(k * m)) >> 3;
      OP_ADD:  num = (x + p + 6'(k * m)) >> 2;
      OP_SUB:  num = (x - p + 6'(k * m)) >> 2;
      default: num = x;
    endcase
    return num[2:0];
  endfunction

  // update type and multiple applied by position i of the late select
  function automatic op_e pos_op(int unsigned i);
    if (i == 0)       return OP_HOLD;
    else if (i < 3)   return OP_SHR1;
    else if (i < 7)   return OP_SHR2;
    else if (i < 15)  return OP_SHR3;
    else if (i == 15) return OP_ADD;
    else              return OP_SUB;
  endfunction

  function automatic logic [2:0] pos_k(int unsigned i, logic [2:0] kq);
    if (i >= 15)     return {1'b0, kq[1:0]};  // behind the 4:1 multiplexers
    else if (i >= 7) return 3'(i - 7);
    else if (i >= 3) return 3'(i - 3);
    else if (i >= 1) return 3'(i - 1);
    else             return 3'd0;
  endfunction

  // one decode per position and side
  for (genvar i = 0; i < NSEL; i++) begin : g_pos
    localparam op_e OP = pos_op(i);
    if ((OP != OP_SHR2 && OP != OP_SHR3) || MAX_SHIFT >= 3) begin : g_on
      logic [2:0] k;
      assign k = pos_k(i, ctrl_q.k);
      assign dec_a[i] = decode_ctrl(step(a6_i, b6_i, 6'd0, OP, k), b6_i[2:0],
                                    step(u6_i, y6_i, b0_i, OP, k), y6_i[2:0],
                                    b0_i[2:0], delta_next_neg_i, MAX_SHIFT);
      assign dec_b[i] = decode_ctrl(a6_i[2:0], step(b6_i, a6_i, 6'd0, OP, k),
                                    u6_i[2:0], step(y6_i, u6_i, b0_i, OP, k),
                                    b0_i[2:0], delta_next_neg_i, MAX_SHIFT);
    end else begin : g_off
      assign dec_a[i] = '0;  // never selected
      assign dec_b[i] = '0;
    end
  end

  // late select of the next control word by the current one
  always_comb begin
    hot_a = '0;
    hot_b = '0;
    if (!en_i)               hot_a[0] = 1'b1;
    else if (ctrl_q.side_b)  hot_b[sel_index(ctrl_q.op, ctrl_q.k)] = 1'b1;
    else                     hot_a[sel_index(ctrl_q.op, ctrl_q.k)] = 1'b1;
    ctrl_d = '0;
    for (int i = 0; i < NSEL; i++) begin
      ctrl_d |= dec_a[i] & {$bits(ctrl_t){hot_a[i]}};
      ctrl_d |= dec_b[i] & {$bits(ctrl_t){hot_b[i]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ctrl_q <= '0;
    else if (load_i) ctrl_q <= decode_ctrl(a0_i, b0_i[2:0], 3'd1, 3'd0,
                                           b0_i[2:0], 1'b0, MAX_SHIFT);
    else             ctrl_q <= ctrl_d;
  end

  assign ctrl_o = ctrl_q;

endmodule
