// tb_xgcd_unit: self-checking test of xgcd_unit in both configurations of
// the chip, the 512-bit unit (divides even operands by up to 8) and the
// 255-bit unit (only halves them), at their full widths, in fast,
// constant-time and debug mode. See xgcd_unit_checker for what is checked.
// The average fast-mode cycle count is printed for comparison with the
// expected average of about 1.1 reduction cycles per input bit.
module tb_xgcd_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int c0, f0, m0, s0, r0, c1, f1, m1, s1, r1;
  logic d0, d1;
  int checks, failures;

  xgcd_unit_checker #(.N(512), .MAX_SHIFT(3), .CT_CYCLES(769), .NRAND(8)) chk512 (
    .clk, .rst_n, .checks_o(c0), .failures_o(f0), .max_cycles_o(m0),
    .sum_cycles_o(s0), .runs_o(r0), .done_o(d0));
  xgcd_unit_checker #(.N(255), .MAX_SHIFT(1), .CT_CYCLES(379), .NRAND(8)) chk255 (
    .clk, .rst_n, .checks_o(c1), .failures_o(f1), .max_cycles_o(m1),
    .sum_cycles_o(s1), .runs_o(r1), .done_o(d1));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    checks = c0 + c1;
    failures = f0 + f1;
    $display("512-bit unit: %0d runs, average %0d cycles, max %0d", r0, s0 / r0, m0);
    $display("255-bit unit: %0d runs, average %0d cycles, max %0d", r1, s1 / r1, m1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
