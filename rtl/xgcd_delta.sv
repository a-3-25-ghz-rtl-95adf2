// xgcd_delta: register and adder for delta, the running estimate of
// log2|a| - log2|b| that replaces a full carry-save magnitude comparison.
//
// delta starts at zero when the reduction stage is loaded. Each applied
// update moves it by the minimum number of bits the update is guaranteed to
// remove: -1/-2/-3 when a is shifted right by 1/2/3, +1/+2/+3 for b, -1 when
// a is replaced by (a+-b)/4 and +1 when b is replaced by (b+-a)/4. Its sign
// bit chooses which operand is reduced when both are odd. The update is a
// DW-bit carry-propagate adder (10 bits for 512-bit operands, as described);
// delta_next_o is the value it will hold after the current cycle, which the
// early control path needs.
//
// Timing: delta_q_o changes on the clock edge after en_i; load_i clears it.
module xgcd_delta
  import xgcd_pkg::*;
#(
  parameter int unsigned DW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_i,
  input  logic                 en_i,
  input  ctrl_t                ctrl_i,
  output logic signed [DW-1:0] delta_q_o,
  output logic signed [DW-1:0] delta_next_o
);

  logic signed [DW-1:0] delta_q;

  always_comb begin
    delta_next_o = delta_q;
    if (en_i) delta_next_o = delta_q + DW'(delta_step(ctrl_i.side_b, ctrl_i.op));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      delta_q <= '0;
    else if (load_i) delta_q <= '0;
    else             delta_q <= delta_next_o;
  end

  assign delta_q_o = delta_q;

endmodule
