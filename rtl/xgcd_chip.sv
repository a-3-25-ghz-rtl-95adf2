// xgcd_chip: the accelerator as a whole: a 255-bit and a 512-bit extended
// GCD unit, each behind its own quarter-rate register interface, on one
// processor bus.
//
// The 512-bit unit (MAX_SHIFT = 3) divides even operands by up to eight and
// is the faster one on average; the 255-bit unit (MAX_SHIFT = 1) only halves
// even operands, which removes most coefficient update options and makes it
// much smaller, and is meant for constant-time modular inversion. Both run
// from the single core clock clk, which on the described chip comes from an
// on-chip adjustable clock generator, and are configured by an external
// control processor through the bus below (both outside this RTL).
//
// Bus: a request (req_i, we_i, addr_i, wdata_i) is held until ack_o pulses;
// read data is valid with ack_o. addr_i[12] selects the unit (0: 255-bit,
// 1: 512-bit), addr_i[11:0] is the word address of xgcd_regs. Requests are
// served every fourth core cycle.
//
// CT_CYCLES_255 / CT_CYCLES_512 are the constant-time reduction budgets.
module xgcd_chip #(
  parameter int unsigned N_SMALL       = 255,
  parameter int unsigned N_LARGE       = 512,
  parameter int unsigned CT_CYCLES_255 = 512,
  parameter int unsigned CT_CYCLES_512 = 769
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_i,
  input  logic        we_i,
  input  logic [12:0] addr_i,
  input  logic [31:0] wdata_i,
  output logic        ack_o,
  output logic [31:0] rdata_o,
  output logic [1:0]  done_o      // per-unit completion, [0] 255-bit, [1] 512-bit
);

  localparam int unsigned CW = 16;
  localparam int unsigned DW = 10;

  logic [1:0]  req, ack;
  logic [31:0] rdata [2];

  assign req[0] = req_i && !addr_i[12];
  assign req[1] = req_i &&  addr_i[12];
  assign ack_o   = |ack;
  assign rdata_o = ack[1] ? rdata[1] : rdata[0];

  for (genvar g = 0; g < 2; g++) begin : g_unit
    localparam int unsigned N  = (g == 0) ? N_SMALL : N_LARGE;
    localparam int unsigned W  = N + 8;
    localparam int unsigned MS = (g == 0) ? 1 : 3;
    localparam int unsigned CT = (g == 0) ? CT_CYCLES_255 : CT_CYCLES_512;

    logic                 start, busy, done, halted, ovr;
    xgcd_pkg::mode_e      mode;
    xgcd_pkg::ctrl_t      dctrl;
    logic [CW-1:0]        dbg_cycles, cycles;
    logic [N-1:0]         a, b;
    logic [2:0]           dsel;
    logic [W-1:0]         gcd, ca, cb, dc, ds;
    logic [DW-1:0]        ddelta;

    xgcd_regs #(.N(N), .W(W), .DW(DW), .CW(CW)) u_regs (
      .clk, .rst_n, .req_i(req[g]), .we_i, .addr_i(addr_i[11:0]), .wdata_i,
      .ack_o(ack[g]), .rdata_o(rdata[g]),
      .start_o(start), .mode_o(mode), .dbg_cycles_o(dbg_cycles),
      .a_o(a), .b_o(b), .dbg_sel_o(dsel),
      .busy_i(busy), .done_i(done), .halted_i(halted), .ct_overrun_i(ovr),
      .cycles_i(cycles), .g_i(gcd), .ca_i(ca), .cb_i(cb),
      .dbg_c_i(dc), .dbg_s_i(ds), .dbg_ctrl_i(dctrl), .dbg_delta_i(ddelta));

    xgcd_unit #(.N(N), .W(W), .MAX_SHIFT(MS), .DW(DW), .CW(CW), .CT_CYCLES(CT)) u_xgcd (
      .clk, .rst_n, .start_i(start), .mode_i(mode), .dbg_cycles_i(dbg_cycles),
      .a_i(a), .b_i(b), .busy_o(busy), .done_o(done), .halted_o(halted),
      .ct_overrun_o(ovr), .cycles_o(cycles), .g_o(gcd), .ca_o(ca), .cb_o(cb),
      .dbg_sel_i(dsel), .dbg_c_o(dc), .dbg_s_o(ds),
      .dbg_ctrl_o(dctrl), .dbg_delta_o(ddelta));

    assign done_o[g] = done;
  end

endmodule
