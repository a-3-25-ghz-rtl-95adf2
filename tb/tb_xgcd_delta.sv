// tb_xgcd_delta: self-checking test of xgcd_delta. Random control words are
// applied with random enables; the testbench keeps delta as an integer using
// the update table (a shift by s: -s, b shift by s: +s, a replaced by a sum
// or difference: -1, b replaced: +1) and compares both the registered value
// and the look-ahead output every cycle. The register must clear on load.
module tb_xgcd_delta
  import xgcd_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, en;
  ctrl_t ctrl;
  logic signed [9:0] dq, dn;

  xgcd_delta #(.DW(10)) dut (.clk, .rst_n, .load_i(load), .en_i(en), .ctrl_i(ctrl),
                             .delta_q_o(dq), .delta_next_o(dn));

  function automatic int step_of(ctrl_t c);
    int m;
    case (c.op)
      OP_SHR1: m = 1;
      OP_SHR2: m = 2;
      OP_SHR3: m = 3;
      OP_ADD, OP_SUB: m = 1;
      default: m = 0;
    endcase
    return c.side_b ? m : -m;
  endfunction

  initial begin
    int d = 0;
    load = 1'b0; en = 1'b0; ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      load = ($urandom_range(0, 99) == 0);
      en   = $urandom_range(0, 1);
      ctrl.side_b = $urandom_range(0, 1);
      ctrl.op = op_e'($urandom_range(0, 5));
      ctrl.k = 3'($urandom);
      #0.5;
      checks++;
      if (int'(dn) != (en ? d + step_of(ctrl) : d)) begin
        failures++; $display("FAIL look-ahead %0d want %0d", dn, en ? d + step_of(ctrl) : d);
      end
      @(negedge clk);
      d = load ? 0 : (en ? d + step_of(ctrl) : d);
      checks++;
      if (int'(dq) != d) begin failures++; $display("FAIL delta %0d want %0d", dq, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
