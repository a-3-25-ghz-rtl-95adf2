// xgcd_unit_checker: drives one xgcd_unit through a set of operand pairs in
// fast, constant-time and debug mode and checks every result against an
// independent reference: Euclid's algorithm for gcd(a, b), the Bezout
// identity ca*a + cb*b = g evaluated with wide multiplications, the latency
// (R + 10 clocks), and in debug mode the invariants u*a0 + m*b0 = a and
// y*a0 + n*b0 = b on the carry-save state read through the debug port.
// Counts are reported on its outputs; done_o rises when all tests ran.
module xgcd_unit_checker
  import xgcd_pkg::*;
#(
  parameter int unsigned N         = 64,
  parameter int unsigned MAX_SHIFT = 3,
  parameter int unsigned CT_CYCLES = 120,
  parameter int unsigned NRAND     = 10
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   failures_o,
  output int   max_cycles_o,
  output int   sum_cycles_o,
  output int   runs_o,
  output logic done_o
);
  localparam int unsigned W  = N + 8;
  localparam int unsigned CW = 16;
  localparam int unsigned XW = 2 * W + 8;   // width of the reference products

  logic          start;
  mode_e         mode;
  logic [CW-1:0] dbg_cycles;
  logic [N-1:0]  a, b;
  logic          busy, done, halted, ovr;
  logic [CW-1:0] cycles;
  logic [W-1:0]  g, ca, cb, dbg_c, dbg_s;
  logic [2:0]    dbg_sel;
  ctrl_t         dbg_ctrl;
  logic [9:0]    dbg_delta;

  xgcd_unit #(.N(N), .MAX_SHIFT(MAX_SHIFT), .CT_CYCLES(CT_CYCLES)) dut (
    .clk, .rst_n, .start_i(start), .mode_i(mode), .dbg_cycles_i(dbg_cycles),
    .a_i(a), .b_i(b), .busy_o(busy), .done_o(done), .halted_o(halted),
    .ct_overrun_o(ovr), .cycles_o(cycles), .g_o(g), .ca_o(ca), .cb_o(cb),
    .dbg_sel_i(dbg_sel), .dbg_c_o(dbg_c), .dbg_s_o(dbg_s),
    .dbg_ctrl_o(dbg_ctrl), .dbg_delta_o(dbg_delta));

  int checks = 0, failures = 0, maxc = 0, sumc = 0, runs = 0;
  assign checks_o = checks;
  assign failures_o = failures;
  assign max_cycles_o = maxc;
  assign sum_cycles_o = sumc;
  assign runs_o = runs;

  function automatic logic [N:0] ref_gcd(logic [N:0] x, logic [N:0] y);
    logic [N:0] t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic logic signed [XW-1:0] sx(logic [W-1:0] v);
    return XW'(signed'(v));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d: %s (a=%h b=%h)", N, what, a, b);
    end
  endtask

  // one run in fast or constant-time mode
  task automatic run(mode_e md);
    int lat;
    logic [N:0] gr;
    logic signed [XW-1:0] lhs, gs, mag;
    @(negedge clk);
    mode = md; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 40000) begin @(negedge clk); lat++; end
    gr  = ref_gcd({1'b0, a}, {1'b0, b});
    lhs = sx(ca) * XW'(a) + sx(cb) * XW'(b);
    gs  = sx(g);
    mag = gs < 0 ? -gs : gs;
    check(done, "finished");
    check(lhs == gs, "Bezout identity ca*a + cb*b == g");
    check(mag == XW'(gr), "|g| == gcd(a,b)");
    if (md == MODE_CONST) begin
      check(lat == int'(CT_CYCLES) + 10, "constant-time latency CT_CYCLES + 10");
      check(!ovr, "constant-time budget sufficient");
    end else begin
      check(lat == int'(cycles) + 10, "fast-mode latency cycles + 10");
      runs++;
      sumc += int'(cycles);
      if (int'(cycles) > maxc) maxc = int'(cycles);
    end
  endtask

  // debug run: stop every `step` cycles and check the invariants
  task automatic run_debug(int step);
    logic [N:0] a0v, b0v;
    logic signed [XW-1:0] av, bv, uv, mv, yv, nv;
    int guard;
    a0v = a[0] ? {1'b0, a} : {1'b0, a} + {1'b0, b};
    b0v = b[0] ? {1'b0, b} : {1'b0, a} + {1'b0, b};
    @(negedge clk);
    mode = MODE_DEBUG; dbg_cycles = CW'(step); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    guard = 0;
    while (!done && guard < 40000) begin
      if (halted) begin
        dbg_sel = 3'd0; #1; av = sx(dbg_c + dbg_s);
        dbg_sel = 3'd1; #1; bv = sx(dbg_c + dbg_s);
        dbg_sel = 3'd2; #1; uv = sx(dbg_c + dbg_s);
        dbg_sel = 3'd3; #1; mv = sx(dbg_c + dbg_s);
        dbg_sel = 3'd4; #1; yv = sx(dbg_c + dbg_s);
        dbg_sel = 3'd5; #1; nv = sx(dbg_c + dbg_s);
        check(uv * XW'(a0v) + mv * XW'(b0v) == av, "debug: u*a0 + m*b0 == a");
        check(yv * XW'(a0v) + nv * XW'(b0v) == bv, "debug: y*a0 + n*b0 == b");
        check(int'(cycles) % step == 0, "debug: halted on a step boundary");
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
      end else begin
        @(negedge clk);
      end
      guard++;
    end
    check(done, "debug run finished");
    check(sx(ca) * XW'(a) + sx(cb) * XW'(b) == sx(g), "debug: Bezout identity");
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int i = 0; i < (N + 31) / 32; i++) v = (v << 32) | N'($urandom);
    // random bit length, so that operands of unequal size occur
    if ($urandom_range(0, 3) == 0) v = v >> $urandom_range(0, N - 1);
    return v;
  endfunction

  initial begin
    start = 1'b0; mode = MODE_FAST; dbg_cycles = '0; dbg_sel = '0;
    a = '0; b = '0;
    done_o = 1'b0;
    @(posedge rst_n);
    // corner cases
    a = N'(1); b = N'(1);              run(MODE_FAST);
    a = N'(0); b = N'(7);              run(MODE_FAST);
    a = N'(12); b = N'(9);             run(MODE_FAST);
    a = '1; b = '1;                    run(MODE_FAST);
    a = '1; b = N'(2);                 run(MODE_FAST);
    a = N'(3) << (N - 3); b = '1;      run(MODE_FAST);
    for (int t = 0; t < int'(NRAND); t++) begin
      a = rnd(); b = rnd();
      if ($urandom_range(0, 1) == 0) a[0] = 1'b1; else b[0] = 1'b1;
      run(MODE_FAST);
      if (t < 3) run(MODE_CONST);
      if (t < 2) run_debug(4);
    end
    done_o = 1'b1;
  end

endmodule
