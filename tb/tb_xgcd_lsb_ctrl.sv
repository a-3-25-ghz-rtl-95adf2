// tb_xgcd_lsb_ctrl: self-checking test of the early control path. The
// testbench runs the reduction algorithm itself on plain integers (a, b, u,
// y and delta, with u*a0 + m*b0 = a implied) and feeds only the six-bit
// residues to the block. Every cycle the registered control word must be
// the one the algorithm calls for on the current full values: divide an
// even a (else b) by the largest of 8, 4, 2 dividing it (only 2 when
// MAX_SHIFT = 1), otherwise replace the operand picked by the sign of delta
// by the sum or difference divisible by 4, with k the multiple of b0 that
// makes the coefficient update exact. Runs both MAX_SHIFT settings.
module tb_xgcd_lsb_ctrl
  import xgcd_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int seen [2][6];

  logic       load, en;
  logic [2:0] a0r;
  logic [5:0] b0r, a6, b6, u6, y6;
  logic       dneg;
  ctrl_t      ctrl [2];

  xgcd_lsb_ctrl #(.MAX_SHIFT(3)) dut3 (.clk, .rst_n, .load_i(load), .a0_i(a0r), .b0_i(b0r),
    .en_i(en), .a6_i(a6), .b6_i(b6), .u6_i(u6), .y6_i(y6), .delta_next_neg_i(dneg), .ctrl_o(ctrl[0]));
  xgcd_lsb_ctrl #(.MAX_SHIFT(1)) dut1 (.clk, .rst_n, .load_i(load), .a0_i(a0r), .b0_i(b0r),
    .en_i(en), .a6_i(a6), .b6_i(b6), .u6_i(u6), .y6_i(y6), .delta_next_neg_i(dneg), .ctrl_o(ctrl[1]));

  typedef struct { longint a, b, u, y, d; } st_t;

  // decision of the algorithm on full values
  function automatic void decide(st_t s, longint b0, int ms, output bit side_b,
                                 output op_e op, output int k, output int sh);
    longint x, p, cx, cp, num;
    bit sub;
    if (s.a % 2 == 0 || s.b % 2 == 0) begin
      side_b = (s.a % 2 != 0);
      x = side_b ? s.b : s.a;
      cx = side_b ? s.y : s.u;
      sh = (ms == 3 && x % 8 == 0) ? 3 : (ms == 3 && x % 4 == 0) ? 2 : 1;
      op = op_e'(sh);
      for (k = 0; k < (1 << sh); k++) if (((cx + k * b0) % (1 << sh)) == 0) break;
    end else begin
      side_b = (s.d < 0);
      sub = ((s.a + s.b) % 4 != 0);
      op = sub ? OP_SUB : OP_ADD;
      sh = 2;
      cx = side_b ? s.y : s.u;
      cp = side_b ? s.u : s.y;
      for (k = 0; k < 4; k++) begin
        num = sub ? cx - cp + k * b0 : cx + cp + k * b0;
        if (num % 4 == 0) break;
      end
    end
  endfunction

  initial begin
    st_t s [2];
    longint a0, b0, x, p, cx, cp, num;
    bit side_b; op_e op; int k, sh, guard;
    load = 0; en = 0; a0r = 0; b0r = 0; a6 = 0; b6 = 0; u6 = 0; y6 = 0; dneg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      // the two configurations diverge, so each gets its own trial
      for (int cfg = 0; cfg < 2; cfg++) begin
        a0 = longint'($urandom_range(1, 1 << 30)) | 1;
        b0 = longint'($urandom_range(1, 1 << 30)) | 1;
        s[cfg] = '{a: a0, b: b0, u: 1, y: 0, d: 0};
        a0r = 3'(a0); b0r = 6'(b0);
        load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        guard = 0;
        while (s[cfg].a != 0 && s[cfg].b != 0 && guard < 400) begin
          decide(s[cfg], b0, cfg == 0 ? 3 : 1, side_b, op, k, sh);
          checks++;
          seen[cfg][int'(op)]++;
          if (ctrl[cfg].side_b != side_b || ctrl[cfg].op != op ||
              (op != OP_HOLD && int'(ctrl[cfg].k) != k)) begin
            failures++;
            $display("FAIL cfg %0d: got side %0b %s k=%0d, want side %0b %s k=%0d",
                     cfg, ctrl[cfg].side_b, ctrl[cfg].op.name(), ctrl[cfg].k, side_b, op.name(), k);
          end
          // present the residues of the values before the update, then step
          a6 = 6'(s[cfg].a); b6 = 6'(s[cfg].b); u6 = 6'(s[cfg].u); y6 = 6'(s[cfg].y);
          x  = side_b ? s[cfg].b : s[cfg].a;
          p  = side_b ? s[cfg].a : s[cfg].b;
          cx = side_b ? s[cfg].y : s[cfg].u;
          cp = side_b ? s[cfg].u : s[cfg].y;
          if (op == OP_ADD)      begin x = (x + p) / 4; cx = (cx + cp + k * b0) / 4; end
          else if (op == OP_SUB) begin x = (x - p) / 4; cx = (cx - cp + k * b0) / 4; end
          else                   begin x = x / (1 << sh); cx = (cx + k * b0) / (1 << sh); end
          if (side_b) begin s[cfg].b = x; s[cfg].y = cx; s[cfg].d += (op >= OP_ADD) ? 1 : sh; end
          else        begin s[cfg].a = x; s[cfg].u = cx; s[cfg].d -= (op >= OP_ADD) ? 1 : sh; end
          dneg = (s[cfg].d < 0);
          en = 1'b1;
          @(negedge clk);
          en = 1'b0;
          guard++;
        end
      end
    end
    // every update type occurs with MAX_SHIFT = 3; none of the wide shifts
    // with MAX_SHIFT = 1
    for (int i = 1; i < 6; i++) begin
      checks++;
      if (seen[0][i] == 0) begin failures++; $display("FAIL: op %0d never chosen", i); end
    end
    checks++;
    if (seen[1][2] + seen[1][3] != 0) begin failures++; $display("FAIL: wide shift with MAX_SHIFT=1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
