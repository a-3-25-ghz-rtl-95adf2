// tb_xgcd_regs: self-checking test of the quarter-rate register interface at
// N = 64 (W = 72), with the unit side driven by the testbench. Checks that
// requests are acknowledged only every fourth core cycle, that operand
// words reach a_o / b_o, that CTRL produces a one-cycle start pulse and the
// mode, that DBG_QUADS is scaled by four, and that status, cycle count,
// result words, debug window and control word read back correctly.
module tb_xgcd_regs
  import xgcd_pkg::*;
;
  localparam int unsigned N = 64;
  localparam int unsigned W = N + 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0, starts = 0;
  longint cyc = 0;
  longint last_ack = -1;

  logic req, we, ack, start, busy, done, halted, ovr;
  logic [11:0] addr;
  logic [31:0] wdata, rdata;
  mode_e mode;
  logic [15:0] dbgc, cycles;
  logic [N-1:0] a, b;
  logic [2:0] dsel;
  logic [W-1:0] g, ca, cb, dc, ds;
  ctrl_t dctrl;
  logic [9:0] ddelta;

  xgcd_regs #(.N(N), .W(W)) dut (.clk, .rst_n, .req_i(req), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .ack_o(ack), .rdata_o(rdata), .start_o(start), .mode_o(mode),
    .dbg_cycles_o(dbgc), .a_o(a), .b_o(b), .dbg_sel_o(dsel), .busy_i(busy), .done_i(done),
    .halted_i(halted), .ct_overrun_i(ovr), .cycles_i(cycles), .g_i(g), .ca_i(ca), .cb_i(cb),
    .dbg_c_i(dc), .dbg_s_i(ds), .dbg_ctrl_i(dctrl), .dbg_delta_i(ddelta));

  // sampled at the falling edge, away from the register updates
  always @(negedge clk) begin
    cyc = cyc + 1;
    if (start) starts++;
    if (ack) begin
      checks++;
      if (last_ack >= 0 && (cyc - last_ack) % 4 != 0) begin
        failures++; $display("FAIL: ack off the quarter-rate grid");
      end
      last_ack = cyc;
    end
  end

  task automatic xfer(bit w, logic [11:0] ad, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    req = 1'b1; we = w; addr = ad; wdata = d;
    do @(negedge clk); while (!ack);
    r = rdata;
    req = 1'b0;
  endtask

  task automatic expect_rd(logic [11:0] ad, logic [31:0] want, string what);
    logic [31:0] r;
    xfer(1'b0, ad, 32'd0, r);
    checks++;
    if (r !== want) begin failures++; $display("FAIL %s: %h want %h", what, r, want); end
  endtask

  initial begin
    logic [31:0] r;
    logic [N-1:0] av, bv;
    req = 0; we = 0; addr = 0; wdata = 0;
    busy = 0; done = 0; halted = 0; ovr = 0; cycles = 0;
    g = 0; ca = 0; cb = 0; dc = 0; ds = 0; dctrl = '0; ddelta = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    av = {$urandom, $urandom}; bv = {$urandom, $urandom};
    xfer(1, 12'h100, av[31:0], r);  xfer(1, 12'h101, av[63:32], r);
    xfer(1, 12'h200, bv[31:0], r);  xfer(1, 12'h201, bv[63:32], r);
    checks++;
    if (a != av || b != bv) begin failures++; $display("FAIL operands"); end
    expect_rd(12'h101, av[63:32], "operand read-back");
    xfer(1, 12'h002, 32'd5, r);
    checks++;
    if (dbgc != 16'd20) begin failures++; $display("FAIL debug cycles %0d", dbgc); end
    xfer(1, 12'h004, 32'd3, r);
    checks++;
    if (dsel != 3'd3) begin failures++; $display("FAIL dbg_sel"); end
    xfer(1, 12'h000, {29'd0, MODE_DEBUG, 1'b1}, r);
    repeat (4) @(negedge clk);
    checks++;
    if (starts != 1 || mode != MODE_DEBUG) begin failures++; $display("FAIL start/mode %0d", starts); end
    busy = 1; halted = 1; ovr = 1; cycles = 16'd1234;
    expect_rd(12'h001, 32'b1101, "status");
    expect_rd(12'h003, 32'd1234, "cycles");
    g  = {8'h5a, {$urandom, $urandom}};
    ca = {8'ha5, {$urandom, $urandom}};
    cb = {8'h3c, {$urandom, $urandom}};
    dc = {8'h11, {$urandom, $urandom}};
    ds = {8'h22, {$urandom, $urandom}};
    dctrl = '{side_b: 1'b1, op: OP_SUB, k: 3'd2};
    ddelta = 10'h3f5;
    expect_rd(12'h300, g[31:0], "g word 0");
    expect_rd(12'h302, 32'(g[W-1:64]), "g word 2");
    expect_rd(12'h401, ca[63:32], "ca word 1");
    expect_rd(12'h502, 32'(cb[W-1:64]), "cb word 2");
    expect_rd(12'h600, dc[31:0], "debug carry");
    expect_rd(12'h702, 32'(ds[W-1:64]), "debug sum");
    expect_rd(12'h303, 32'd0, "beyond result width");
    expect_rd(12'h005, {6'd0, ddelta, 9'd0, dctrl}, "control word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
