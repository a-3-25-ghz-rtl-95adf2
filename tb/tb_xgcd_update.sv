// tb_xgcd_update: self-checking test of xgcd_update at W = 32 in the two
// coefficient configurations (multiple added, as for u and y; multiple
// subtracted, as for m and n) and the operand configuration (no multiple).
// Each trial loads a value and then applies a chain of random updates; the
// partner is a random carry-save pair. For every update the testbench picks
// the multiple k by searching for the one that makes the numerator
// divisible, and checks the register against (x +- p + k*M) / 2^s computed
// with plain integers. Updates addressed to the other side must leave the
// register unchanged. A fourth instance is built without add options and
// takes them from the first (as the b-side units of a pair do); it receives
// the same updates as the first and must hold the same value.
module tb_xgcd_update
  import xgcd_pkg::*;
;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [6];

  logic         load, en;
  logic [W-1:0] init, pc, ps;
  ctrl_t        ctrl;
  logic [W-1:0] mpos [8];
  logic [W-1:0] mneg [8];
  logic [W-1:0] mzero [8];
  logic [W-1:0] xc [4];
  logic [W-1:0] xs [4];
  logic [W-1:0] zw, add_c, add_s;
  assign zw = '0;

  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(3), .HAS_MULT(1'b1), .NEG_MULT(1'b0)) dut_u (
    .clk, .rst_n, .load_i(load), .init_i(init), .en_i(en), .ctrl_i(ctrl),
    .p_c_i(pc), .p_s_i(ps), .mult_i(mpos), .add_c_i(zw), .add_s_i(zw),
    .add_c_o(add_c), .add_s_o(add_s), .x_c_o(xc[0]), .x_s_o(xs[0]));
  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(3), .HAS_MULT(1'b1), .NEG_MULT(1'b0),
                .ADD_SHARED(1'b1)) dut_s (
    .clk, .rst_n, .load_i(load), .init_i(init), .en_i(en), .ctrl_i(ctrl),
    .p_c_i(pc), .p_s_i(ps), .mult_i(mpos), .add_c_i(add_c), .add_s_i(add_s),
    .add_c_o(), .add_s_o(), .x_c_o(xc[3]), .x_s_o(xs[3]));
  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(3), .HAS_MULT(1'b1), .NEG_MULT(1'b1)) dut_m (
    .clk, .rst_n, .load_i(load), .init_i(init), .en_i(en), .ctrl_i(ctrl),
    .p_c_i(pc), .p_s_i(ps), .mult_i(mneg), .add_c_i(zw), .add_s_i(zw),
    .add_c_o(), .add_s_o(), .x_c_o(xc[1]), .x_s_o(xs[1]));
  xgcd_update #(.W(W), .SIDE_B(1'b0), .MAX_SHIFT(3), .HAS_MULT(1'b0), .NEG_MULT(1'b0)) dut_a (
    .clk, .rst_n, .load_i(load), .init_i(init), .en_i(en), .ctrl_i(ctrl),
    .p_c_i(pc), .p_s_i(ps), .mult_i(mzero), .add_c_i(zw), .add_s_i(zw),
    .add_c_o(), .add_s_o(), .x_c_o(xc[2]), .x_s_o(xs[2]));

  function automatic int val(logic [W-1:0] c, logic [W-1:0] s);
    return int'(signed'(c + s));
  endfunction

  // expected next value of variable v (0: +M, 1: -M, 2: no multiple)
  function automatic bit next_val(int x, int p, int m, op_e op, output int r,
                                  output logic [2:0] k);
    int sh, num;
    sh = (op == OP_SHR1) ? 1 : (op == OP_SHR2) ? 2 : (op == OP_SHR3) ? 3 : 2;
    for (int kk = 0; kk < (1 << sh); kk++) begin
      num = (op == OP_ADD) ? x + p + kk * m : (op == OP_SUB) ? x - p + kk * m : x + kk * m;
      if ((num & ((1 << sh) - 1)) == 0) begin
        r = num >>> sh;
        k = 3'(kk);
        return 1'b1;
      end
    end
    r = 0; k = '0;
    return 1'b0;
  endfunction

  initial begin
    int x [3], p, mm, r, lim;
    int mult [3];
    logic [2:0] k;
    op_e op;
    bit ok;
    load = 1'b0; en = 1'b0; init = '0; pc = '0; ps = '0; ctrl = '0;
    for (int j = 0; j < 8; j++) begin mpos[j] = '0; mneg[j] = '0; mzero[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    lim = 1 << 20;
    for (int t = 0; t < 300; t++) begin
      mm = int'($urandom_range(1, lim)) | 1;
      for (int j = 0; j < 8; j++) begin mpos[j] = W'(j * mm); mneg[j] = W'(j * mm); end
      mult[0] = mm; mult[1] = -mm; mult[2] = 0;
      init = W'(int'($urandom_range(0, 2 * lim)) - lim);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int v = 0; v < 3; v++) x[v] = int'(signed'(init));
      for (int step = 0; step < 12; step++) begin
        p  = int'($urandom_range(0, 2 * lim)) - lim;
        ps = W'($urandom);
        pc = W'(p) - ps;
        op = op_e'($urandom_range(0, 5));
        ctrl.side_b = ($urandom_range(0, 7) == 0);
        ctrl.op = op;
        // the three instances need their own k: run them one at a time
        for (int v = 0; v < 3; v++) begin
          ok = next_val(x[v], p, mult[v], op, r, k);
          if (op == OP_HOLD) begin ok = 1'b1; r = x[v]; k = '0; end
          if (!ok) continue;  // no k makes it divisible (odd operand, no multiple)
          ctrl.k = k;
          en = 1'b1;
          force dut_u.en_i = (v == 0);
          force dut_m.en_i = (v == 1);
          force dut_a.en_i = (v == 2);
          force dut_s.en_i = (v == 0);
          @(negedge clk);
          release dut_u.en_i; release dut_m.en_i; release dut_a.en_i;
          release dut_s.en_i;
          en = 1'b0;
          if (ctrl.side_b || op == OP_HOLD) r = x[v];
          checks++;
          seen[int'(op)]++;
          if (val(xc[v], xs[v]) != r) begin
            failures++;
            $display("FAIL inst %0d op %s k=%0d side_b=%0b: x=%0d p=%0d M=%0d got %0d want %0d",
                     v, op.name(), k, ctrl.side_b, x[v], p, mult[v], val(xc[v], xs[v]), r);
          end
          if (v == 0) begin
            checks++;
            if (val(xc[3], xs[3]) != r) begin
              failures++;
              $display("FAIL shared-add inst op %s k=%0d: got %0d want %0d",
                       op.name(), k, val(xc[3], xs[3]), r);
            end
          end
          x[v] = r;
        end
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL: update type %0d never applied", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
