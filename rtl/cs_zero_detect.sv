// cs_zero_detect: tests whether a carry-save pair represents zero modulo
// 2^W, without adding the two vectors.
//
// c + s == 0 (mod 2^W) holds exactly when, at every bit position, the
// half-sum c^s equals the "some bit set" signal (c|s) of the position below:
// a zero sum needs a carry into every position whose half-sum is one and none
// into a position whose half-sum is zero. The test is one gate per bit and an
// AND tree. Used to end the reduction when a or b reaches zero; the gate
// formulation is this design's own. Purely combinational.
module cs_zero_detect #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] s_i,
  output logic         zero_o
);

  always_comb zero_o = ((c_i ^ s_i) == {(c_i[W-2:0] | s_i[W-2:0]), 1'b0});

endmodule
