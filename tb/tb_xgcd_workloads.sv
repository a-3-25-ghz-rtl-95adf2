// tb_xgcd_workloads: the three average-latency workloads of the accelerator,
// run in fast mode on random full-length inputs (one of them odd):
//   512-bit XGCD on the 512-bit unit  (expected about 176 ns)
//   255-bit XGCD on the 512-bit unit  (expected about  87 ns)
//   255-bit XGCD on the 255-bit unit  (expected about 119 ns)
// and the two constant-time cases. Each result is checked (Bezout identity,
// |g| against Euclid); the average start-to-done latency in cycles is
// converted to ns at 3.25 GHz and must lie within 12 % of the expected time,
// and constant-time runs must take exactly CT_CYCLES + 10 cycles.
module tb_xgcd_workloads
  import xgcd_pkg::*;
;
  localparam int unsigned NRUN = 120;
  localparam int unsigned XW   = 2 * 520 + 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start [2];
  mode_e         mode [2];
  logic [511:0]  a [2];
  logic [511:0]  b [2];
  logic          done [2];
  logic [519:0]  g [2];
  logic [519:0]  ca [2];
  logic [519:0]  cb [2];

  // unit 0: 255-bit (halves only, constant-time budget 512), unit 1: 512-bit
  xgcd_unit #(.N(255), .MAX_SHIFT(1), .CT_CYCLES(512)) u255 (
    .clk, .rst_n, .start_i(start[0]), .mode_i(mode[0]), .dbg_cycles_i('0),
    .a_i(a[0][254:0]), .b_i(b[0][254:0]), .busy_o(), .done_o(done[0]), .halted_o(),
    .ct_overrun_o(), .cycles_o(), .g_o(g[0][262:0]), .ca_o(ca[0][262:0]), .cb_o(cb[0][262:0]),
    .dbg_sel_i(3'd0), .dbg_c_o(), .dbg_s_o(), .dbg_ctrl_o(), .dbg_delta_o());
  xgcd_unit u512 (
    .clk, .rst_n, .start_i(start[1]), .mode_i(mode[1]), .dbg_cycles_i('0),
    .a_i(a[1]), .b_i(b[1]), .busy_o(), .done_o(done[1]), .halted_o(),
    .ct_overrun_o(), .cycles_o(), .g_o(g[1]), .ca_o(ca[1]), .cb_o(cb[1]),
    .dbg_sel_i(3'd0), .dbg_c_o(), .dbg_s_o(), .dbg_ctrl_o(), .dbg_delta_o());

  assign g[0][519:263] = '0;
  assign ca[0][519:263] = '0;
  assign cb[0][519:263] = '0;

  function automatic logic [512:0] ref_gcd(logic [512:0] x, logic [512:0] y);
    logic [512:0] t;
    while (y != 0) begin t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic logic signed [XW-1:0] sx(logic [519:0] v, int w);
    logic signed [XW-1:0] r;
    r = XW'(v);
    return (r <<< (XW - w)) >>> (XW - w);
  endfunction

  // one run; returns start-to-done cycles
  task automatic run(int u, int nbits, mode_e md, output int lat);
    logic signed [XW-1:0] gs, lhs;
    int w;
    w = (u == 0) ? 263 : 520;
    for (int i = 0; i < 16; i++) begin
      a[u][32*i +: 32] = $urandom;
      b[u][32*i +: 32] = $urandom;
    end
    a[u] = a[u] & ((512'd1 << nbits) - 1);
    b[u] = b[u] & ((512'd1 << nbits) - 1);
    if ($urandom_range(0, 1) == 0) a[u][0] = 1'b1; else b[u][0] = 1'b1;
    @(negedge clk);
    mode[u] = md; start[u] = 1'b1;
    @(negedge clk);
    start[u] = 1'b0;
    lat = 1;
    while (!done[u] && lat < 5000) begin @(negedge clk); lat++; end
    gs  = sx(g[u], w);
    lhs = sx(ca[u], w) * XW'(a[u]) + sx(cb[u], w) * XW'(b[u]);
    checks += 2;
    if (lhs != gs) begin failures++; $display("FAIL unit %0d: Bezout identity", u); end
    if ((gs < 0 ? -gs : gs) != XW'(ref_gcd({1'b0, a[u]}, {1'b0, b[u]}))) begin
      failures++; $display("FAIL unit %0d: gcd", u);
    end
  endtask

  task automatic workload(string name, int u, int nbits, real exp_ns);
    int lat, sum;
    real avg_ns;
    sum = 0;
    for (int t = 0; t < int'(NRUN); t++) begin run(u, nbits, MODE_FAST, lat); sum += lat; end
    avg_ns = real'(sum) / real'(NRUN) / 3.25;
    checks++;
    if (avg_ns < 0.88 * exp_ns || avg_ns > 1.12 * exp_ns) begin
      failures++; $display("FAIL %s: average %.1f ns, expected about %.0f ns", name, avg_ns, exp_ns);
    end
    $display("%s: average %.1f cycles = %.1f ns at 3.25 GHz (expected about %.0f ns)",
             name, real'(sum) / real'(NRUN), avg_ns, exp_ns);
  endtask

  initial begin
    int lat;
    for (int u = 0; u < 2; u++) begin start[u] = 1'b0; mode[u] = MODE_FAST; a[u] = '0; b[u] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    workload("512-bit XGCD, 512-bit unit", 1, 512, 176.0);
    workload("255-bit XGCD, 512-bit unit", 1, 255, 87.0);
    workload("255-bit XGCD, 255-bit unit", 0, 255, 119.0);
    for (int t = 0; t < 4; t++) begin
      run(1, 512, MODE_CONST, lat);
      checks++;
      if (lat != 769 + 10) begin failures++; $display("FAIL constant-time 512: %0d cycles", lat); end
      run(0, 255, MODE_CONST, lat);
      checks++;
      if (lat != 512 + 10) begin failures++; $display("FAIL constant-time 255: %0d cycles", lat); end
    end
    $display("constant-time 512-bit: %0d cycles = %.1f ns; 255-bit unit: %0d cycles = %.1f ns",
             779, 779 / 3.25, 522, 522 / 3.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
