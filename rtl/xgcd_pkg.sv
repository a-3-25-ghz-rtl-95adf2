// xgcd_pkg: types, constants and small pure functions shared by the
// carry-save extended-GCD (XGCD) datapath.
//
// Every value of the reduction stage (a, b and the Bezout coefficients
// u, m, y, n) is held in carry-save (CS) form: a pair of W-bit vectors whose
// sum modulo 2^W is the two's-complement value. The reduction step applied in
// a cycle is described by a ctrl_t word: which side is updated (a,u,m or
// b,y,n), which of the five update types is applied (shift right by 1, 2 or 3
// of an even operand, or (x+p)/4, (x-p)/4 of two odd operands) and the small
// multiple k of the precomputed constant that makes the coefficient update
// exactly divisible. The decode and delta functions below are the whole
// control law of the algorithm; the RTL evaluates them on three-bit residues
// only.
package xgcd_pkg;

  // Update type of one reduction cycle.
  typedef enum logic [2:0] {
    OP_HOLD = 3'd0,  // no update (finished, or operand unchanged)
    OP_SHR1 = 3'd1,  // x >> 1      (x even)
    OP_SHR2 = 3'd2,  // x >> 2      (x divisible by 4)
    OP_SHR3 = 3'd3,  // x >> 3      (x divisible by 8)
    OP_ADD  = 3'd4,  // (x + p) / 4 (both odd, sum divisible by 4)
    OP_SUB  = 3'd5   // (x - p) / 4 (both odd, difference divisible by 4)
  } op_e;

  // Control word of one reduction cycle.
  typedef struct packed {
    logic       side_b;  // 0: a,u,m are updated; 1: b,y,n are updated
    op_e        op;      // update type
    logic [2:0] k;       // multiple of the precomputed constant
  } ctrl_t;

  // Operating mode of an XGCD unit.
  typedef enum logic [1:0] {
    MODE_FAST  = 2'd0,  // stop as soon as a or b is zero
    MODE_CONST = 2'd1,  // always run the worst-case number of cycles
    MODE_DEBUG = 2'd2   // stop after a programmed number of cycles
  } mode_e;

  // Number of positions of the late-select multiplexer after the two 4:1
  // multiplexers of the add/sub updates have been folded in:
  // hold, 2 x shr1, 4 x shr2, 8 x shr3, add, sub.
  localparam int unsigned NSEL = 17;

  // Position of an update in the 17:1 late-select multiplexer.
  function automatic int unsigned sel_index(op_e op, logic [2:0] k);
    unique case (op)
      OP_SHR1: return 1 + int'(k[0]);
      OP_SHR2: return 3 + int'(k[1:0]);
      OP_SHR3: return 7 + int'(k);
      OP_ADD:  return 15;
      OP_SUB:  return 16;
      default: return 0;
    endcase
  endfunction

  // Signed change of delta (bit-length difference of a and b) for the side
  // and update type of a control word: a shrinking lowers delta, b shrinking raises it.
  function automatic logic signed [3:0] delta_step(logic side_b, op_e op);
    logic signed [3:0] mag;
    unique case (op)
      OP_SHR1: mag = 4'sd1;
      OP_SHR2: mag = 4'sd2;
      OP_SHR3: mag = 4'sd3;
      OP_ADD:  mag = 4'sd1;
      OP_SUB:  mag = 4'sd1;
      default: mag = 4'sd0;
    endcase
    return side_b ? mag : -mag;
  endfunction

  // Control decision for the next cycle from the residues modulo 8 of the
  // next values of a, b, u, y, of the constant b0, and the sign of the next
  // delta. MAX_SHIFT is 3 when even operands may be divided by 4 and 8, and
  // 1 when they are only ever halved.
  function automatic ctrl_t decode_ctrl(logic [2:0] a, logic [2:0] b,
                                        logic [2:0] u, logic [2:0] y,
                                        logic [2:0] b0, logic delta_neg,
                                        int unsigned max_shift);
    ctrl_t      c;
    logic [2:0] ku, ky;
    logic [1:0] kp, km;
    // k = -x * b0^-1 (mod 8); an odd b0 is its own inverse modulo 8.
    ku = 3'(-(u * b0));
    ky = 3'(-(y * b0));
    kp = 2'(-((u + y) * b0));   // for u + y (or y + u)
    km = 2'(-((u - y) * b0));   // for u - y
    c.side_b = 1'b0;
    c.op     = OP_HOLD;
    c.k      = 3'd0;
    if (a[0] == 1'b0) begin
      c.side_b = 1'b0;
      if (max_shift >= 3 && a == 3'd0)           begin c.op = OP_SHR3; c.k = ku;               end
      else if (max_shift >= 3 && a[1:0] == 2'd0) begin c.op = OP_SHR2; c.k = {1'b0, ku[1:0]};  end
      else                                       begin c.op = OP_SHR1; c.k = {2'b0, ku[0]};    end
    end else if (b[0] == 1'b0) begin
      c.side_b = 1'b1;
      if (max_shift >= 3 && b == 3'd0)           begin c.op = OP_SHR3; c.k = ky;               end
      else if (max_shift >= 3 && b[1:0] == 2'd0) begin c.op = OP_SHR2; c.k = {1'b0, ky[1:0]};  end
      else                                       begin c.op = OP_SHR1; c.k = {2'b0, ky[0]};    end
    end else begin
      c.side_b = delta_neg;
      if (2'(a[1:0] + b[1:0]) == 2'd0) begin
        c.op = OP_ADD;
        c.k  = {1'b0, kp};
      end else begin
        c.op = OP_SUB;
        // (y - u) needs the negated multiple of (u - y)
        c.k  = delta_neg ? {1'b0, 2'(-km)} : {1'b0, km};
      end
    end
    return c;
  endfunction

endpackage
