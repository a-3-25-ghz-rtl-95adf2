// cs_shift: arithmetic right shift of a carry-save value by SHIFT (1, 2 or 3)
// bits, for a value that is known to be divisible by 2^SHIFT.
//
// Shifting the two vectors of a CS pair separately loses information at both
// ends, and this module repairs both without any carry propagation:
//
//  * LSBs: the dropped low bits of carry and sum add up to either 0 or
//    2^SHIFT; in the second case a carry is lost. Because the value is a
//    multiple of 2^SHIFT the lost carry is detected with one gate: an AND of
//    the two bit-0s for a shift by one, an OR of the two bit-(SHIFT-1)s for
//    a shift by two or three. The recovered carry is put back by passing the
//    shifted vectors through a row of half adders, which frees the LSB slot
//    of the carry vector for it (the row is one gate deep at every width).
//  * MSBs: the sign of a CS pair is unknown without a full addition. When
//    the true value satisfies |v| < 2^(W-3), the amount by which the sum of
//    the two logically shifted vectors overshoots the sign-extended result
//    (0, 1 or 2 times 2^(W-SHIFT)) depends only on the top two bits of each
//    shifted vector; it is subtracted in the top SHIFT bits of the carry
//    vector, again with no carry chain.
//
// The detection gates follow the described circuit; the full half-adder row
// and the two-bit MSB rule are this design's own formulation of the same
// corrections. Purely combinational. If the input is not a multiple of
// 2^SHIFT the output is meaningless (the update that uses it is not
// selected).
module cs_shift #(
  parameter int unsigned W     = 16,
  parameter int unsigned SHIFT = 2
) (
  input  logic [W-1:0] c_i,  // carry vector
  input  logic [W-1:0] s_i,  // sum vector
  output logic [W-1:0] c_o,
  output logic [W-1:0] s_o
);

  localparam int unsigned L = W - SHIFT;  // width of the kept bits

  logic         drop_cy;  // carry lost out of the dropped bits
  logic [L-1:0] cl, sl;   // logically shifted vectors
  logic [L-1:0] hs;       // half-adder row: sum
  logic [L:0]   hc;       // half-adder row: carry (bit 0 holds drop_cy)
  logic [2:0]   top_sum;  // sum of the two 2-bit tops
  logic [1:0]   over;     // overshoot in units of 2^L
  logic [SHIFT-1:0] msb_fix;

  always_comb begin
    if (SHIFT == 1) drop_cy = c_i[0] & s_i[0];
    else            drop_cy = c_i[SHIFT-1] | s_i[SHIFT-1];

    cl = c_i[W-1:SHIFT];
    sl = s_i[W-1:SHIFT];

    // half-adder row; its empty carry LSB receives the dropped carry
    hs    = cl ^ sl;
    hc    = {cl & sl, drop_cy};

    top_sum = {1'b0, cl[L-1:L-2]} + {1'b0, sl[L-1:L-2]};
    if (top_sum >= 3'd6)      over = 2'd2;
    else if (top_sum >= 3'd2) over = 2'd1;
    else                      over = 2'd0;

    // top bits of the carry vector: carry out of the row minus the overshoot
    msb_fix = SHIFT'({1'b0, hc[L]} - {1'b0, over});

    c_o = {msb_fix, hc[L-1:0]};
    s_o = {{SHIFT{1'b0}}, hs};
  end

endmodule
