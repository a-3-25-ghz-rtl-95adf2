// tb_xgcd_chip: end-to-end test of the whole accelerator at its default
// sizes (255-bit and 512-bit units), driven only through the processor bus.
// For each unit it runs extended GCDs in fast mode (including inputs where
// a or b is even and is replaced by a + b), two constant-time runs (their
// busy time must be identical and cover the budget), and a debug run that
// halts every 32 cycles, reads the carry-save state and checks
// u*a0 + m*b0 = a and y*a0 + n*b0 = b on it, then resumes to the end.
// Every result is checked against Euclid's algorithm and the Bezout
// identity. Monitors count how often each mechanism happened: each update
// type on each side, a sum/difference update of the smaller operand (delta
// disagreeing with the true comparison), negative intermediate operands, a
// negative gcd, debug halts and resumes, quarter-rate bus acknowledges, and
// the 255-bit unit must never divide an operand by 4 or 8.
module tb_xgcd_chip
  import xgcd_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  logic        req, we, ack;
  logic [12:0] addr;
  logic [31:0] wdata, rdata;
  logic [1:0]  done;

  xgcd_chip dut (.clk, .rst_n, .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
                 .ack_o(ack), .rdata_o(rdata), .done_o(done));

  localparam int unsigned NMAX = 512;
  localparam int unsigned WMAX = NMAX + 8;
  localparam int unsigned XW   = 2 * WMAX + 8;

  // ---- mechanism monitors ----------------------------------------------------
  int ops [2][2][6];        // [unit][side][op]
  int wrong_side [2], neg_operand [2], neg_gcd [2], halts [2], resumes [2], acks;
  int busy_len [2], busy_cnt [2];

  function automatic logic signed [XW-1:0] sxw(logic [WMAX-1:0] v, int w);
    logic signed [XW-1:0] r;
    r = XW'(v);
    r = (r <<< (XW - w)) >>> (XW - w);
    return r;
  endfunction

  task automatic observe(int u, logic en, ctrl_t c, logic signed [XW-1:0] av,
                         logic signed [XW-1:0] bv, logic busy);
    logic signed [XW-1:0] ma, mb;
    if (en) begin
      ops[u][c.side_b][int'(c.op)]++;
      ma = av < 0 ? -av : av;
      mb = bv < 0 ? -bv : bv;
      if (c.op == OP_ADD || c.op == OP_SUB)
        if ((c.side_b && ma > mb) || (!c.side_b && mb > ma)) wrong_side[u]++;
      if (av < 0 || bv < 0) neg_operand[u]++;
    end
    if (busy) busy_cnt[u]++;
    else if (busy_cnt[u] != 0) begin busy_len[u] = busy_cnt[u]; busy_cnt[u] = 0; end
  endtask

  always @(posedge clk) begin
    observe(0, dut.g_unit[0].u_xgcd.en, dut.g_unit[0].u_xgcd.ctrl,
            sxw(WMAX'(dut.g_unit[0].u_xgcd.a_c + dut.g_unit[0].u_xgcd.a_s), 263),
            sxw(WMAX'(dut.g_unit[0].u_xgcd.b_c + dut.g_unit[0].u_xgcd.b_s), 263),
            dut.g_unit[0].u_xgcd.busy_o);
    observe(1, dut.g_unit[1].u_xgcd.en, dut.g_unit[1].u_xgcd.ctrl,
            sxw(WMAX'(dut.g_unit[1].u_xgcd.a_c + dut.g_unit[1].u_xgcd.a_s), 520),
            sxw(WMAX'(dut.g_unit[1].u_xgcd.b_c + dut.g_unit[1].u_xgcd.b_s), 520),
            dut.g_unit[1].u_xgcd.busy_o);
    if (ack) acks++;
  end

  // ---- bus access --------------------------------------------------------------
  task automatic xfer(bit w, int u, logic [11:0] ad, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    req = 1'b1; we = w; addr = {1'(u), ad}; wdata = d;
    do @(negedge clk); while (!ack);
    r = rdata;
    req = 1'b0;
  endtask

  task automatic wr(int u, logic [11:0] ad, logic [31:0] d);
    logic [31:0] r;
    xfer(1'b1, u, ad, d, r);
  endtask

  task automatic rd_wide(int u, logic [3:0] page, output logic [WMAX-1:0] v);
    logic [31:0] r;
    v = '0;
    for (int i = 0; i < (WMAX + 31) / 32; i++) begin
      xfer(1'b0, u, {page, 8'(i)}, 32'd0, r);
      v = v | (WMAX'(r) << (32 * i));
    end
  endtask

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [NMAX:0] ref_gcd(logic [NMAX:0] x, logic [NMAX:0] y);
    logic [NMAX:0] t;
    while (y != 0) begin t = x % y; x = y; y = t; end
    return x;
  endfunction

  // load operands, start, wait; in debug mode check the state at each halt
  task automatic run(int u, logic [NMAX-1:0] a, logic [NMAX-1:0] b, mode_e md);
    int n, w, guard;
    logic [31:0] st;
    logic [WMAX-1:0] g, ca, cb, vc, vs;
    logic signed [XW-1:0] gs, lhs, v [6], a0, b0;
    n = (u == 0) ? 255 : 512;
    w = n + 8;
    for (int i = 0; i < (n + 31) / 32; i++) begin
      wr(u, 12'h100 + 12'(i), a[32*i +: 32]);
      wr(u, 12'h200 + 12'(i), b[32*i +: 32]);
    end
    a0 = a[0] ? XW'(a) : XW'(a) + XW'(b);
    b0 = b[0] ? XW'(b) : XW'(a) + XW'(b);
    wr(u, 12'h002, 32'd8);                     // debug stop every 32 cycles
    wr(u, 12'h000, {29'd0, md, 1'b1});
    guard = 0;
    do begin
      xfer(1'b0, u, 12'h001, 32'd0, st);
      if (st[2]) begin
        halts[u]++;
        for (int s = 0; s < 6; s++) begin
          wr(u, 12'h004, 32'(s));
          rd_wide(u, 4'h6, vc);
          rd_wide(u, 4'h7, vs);
          v[s] = sxw(vc + vs, w);
        end
        chk(v[2] * a0 + v[3] * b0 == v[0], "debug invariant u*a0 + m*b0 == a");
        chk(v[4] * a0 + v[5] * b0 == v[1], "debug invariant y*a0 + n*b0 == b");
        resumes[u]++;
        wr(u, 12'h000, {29'd0, md, 1'b1});
      end
      guard++;
    end while (!st[1] && guard < 5000);
    chk(st[1], "run finished");
    chk(!st[3], "no constant-time overrun");
    rd_wide(u, 4'h3, g);
    rd_wide(u, 4'h4, ca);
    rd_wide(u, 4'h5, cb);
    gs  = sxw(g, w);
    lhs = sxw(ca, w) * XW'(a) + sxw(cb, w) * XW'(b);
    if (gs < 0) neg_gcd[u]++;
    chk(lhs == gs, $sformatf("unit %0d: Bezout identity", u));
    chk((gs < 0 ? -gs : gs) == XW'(ref_gcd({1'b0, a}, {1'b0, b})), $sformatf("unit %0d: |g| == gcd", u));
  endtask

  function automatic logic [NMAX-1:0] rnd(int n);
    logic [NMAX-1:0] v;
    for (int i = 0; i < 16; i++) v = (v << 32) | NMAX'($urandom);
    return v & ((NMAX'(1) << n) - 1);
  endfunction

  initial begin
    logic [NMAX-1:0] a, b;
    int n, ct_len;
    req = 0; we = 0; addr = 0; wdata = 0; acks = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 2; u++) begin
      n = (u == 0) ? 255 : 512;
      for (int t = 0; t < 6; t++) begin
        a = rnd(n); b = rnd(n);
        if (t % 3 == 0) begin a[0] = 1; b[0] = 1; end
        if (t % 3 == 1) begin a[0] = 0; b[0] = 1; end
        if (t % 3 == 2) begin a[0] = 1; b[0] = 0; end
        if (t == 5) b = b >> (n / 2);       // unequal lengths
        if (t == 4) begin a = rnd(n - 3) | 1; b = a * 3; a = a * 5; end  // common factor
        run(u, a, b, MODE_FAST);
      end
      a = rnd(n) | 1; b = rnd(n);
      run(u, a, b, MODE_CONST);
      @(negedge clk);
      ct_len = busy_len[u];
      a = rnd(n); b = rnd(n) | 1;
      run(u, a, b, MODE_CONST);
      @(negedge clk);
      chk(busy_len[u] == ct_len && ct_len > ((u == 0) ? 512 : 769),
          $sformatf("unit %0d: constant-time runs take equal time (%0d, %0d)", u, ct_len, busy_len[u]));
      a = rnd(n) | 1; b = rnd(n);
      run(u, a, b, MODE_DEBUG);
    end
    // mechanism coverage
    for (int u = 0; u < 2; u++) begin
      for (int s = 0; s < 2; s++)
        for (int o = 1; o < 6; o++) begin
          if (u == 0 && (o == 2 || o == 3))
            chk(ops[u][s][o] == 0, "255-bit unit never divides by 4 or 8");
          else
            chk(ops[u][s][o] > 0, $sformatf("unit %0d side %0d op %0d happened", u, s, o));
        end
      chk(wrong_side[u] > 0, "delta picked the smaller operand at least once");
      chk(neg_operand[u] > 0, "negative operand occurred");
      chk(halts[u] > 0 && resumes[u] > 0, "debug halt and resume");
      $display("unit %0d: shr1 %0d shr2 %0d shr3 %0d add %0d sub %0d, wrong-side %0d, negative %0d, negative gcd %0d, halts %0d",
               u, ops[u][0][1] + ops[u][1][1], ops[u][0][2] + ops[u][1][2], ops[u][0][3] + ops[u][1][3],
               ops[u][0][4] + ops[u][1][4], ops[u][0][5] + ops[u][1][5], wrong_side[u], neg_operand[u],
               neg_gcd[u], halts[u]);
    end
    chk(neg_gcd[0] + neg_gcd[1] > 0, "a negative gcd came out at least once");
    chk(acks > 0, "bus acknowledges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
