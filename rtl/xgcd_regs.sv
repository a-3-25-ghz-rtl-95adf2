// xgcd_regs: register interface between the control processor and one XGCD
// unit: configuration, operands, results and the debug read-out.
//
// The processor side runs at one quarter of the core clock: a divide-by-four
// counter produces a strobe every fourth core cycle, and a request (req_i,
// held by the host until acknowledged) is served only on a strobe cycle,
// when ack_o pulses and rdata_o is valid. Consequently the start pulse sent
// to the unit is one core cycle wide, and debug stops are programmed in
// units of four core cycles, so the computation can be stopped and
// inspected every four cycles.
//
// Word address map (32-bit words):
//   0x000 CTRL      W  bit 0 start (or resume a halted debug run), bits 2:1 mode
//   0x001 STATUS    R  bit 0 busy, 1 done, 2 halted, 3 constant-time overrun
//   0x002 DBG_QUADS RW debug stop interval in units of 4 cycles
//   0x003 CYCLES    R  reduction cycles of the last run
//   0x004 DBG_SEL   RW variable shown by the debug window (0 a,1 b,2 u,3 m,4 y,5 n)
//   0x005 DBG_CTRL  R  bits 6:0 control word, bits 25:16 delta
//   0x100+i A[i]    RW operand a, word i (little-endian words)
//   0x200+i B[i]    RW operand b
//   0x300+i G[i]    R  gcd, W-bit two's complement
//   0x400+i CA[i]   R  coefficient of a
//   0x500+i CB[i]   R  coefficient of b
//   0x600+i DC[i]   R  carry vector of the selected variable
//   0x700+i DS[i]   R  sum vector of the selected variable
// The map, the bus handshake and the operand staging registers are this
// design's own; the quarter rate, the modes and the debug read-out of all
// carry-save variables and control signals follow the described chip.
module xgcd_regs
  import xgcd_pkg::*;
#(
  parameter int unsigned N  = 512,
  parameter int unsigned W  = N + 8,
  parameter int unsigned DW = 10,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          req_i,
  input  logic          we_i,
  input  logic [11:0]   addr_i,
  input  logic [31:0]   wdata_i,
  output logic          ack_o,
  output logic [31:0]   rdata_o,
  // unit side
  output logic          start_o,
  output mode_e         mode_o,
  output logic [CW-1:0] dbg_cycles_o,
  output logic [N-1:0]  a_o,
  output logic [N-1:0]  b_o,
  output logic [2:0]    dbg_sel_o,
  input  logic          busy_i,
  input  logic          done_i,
  input  logic          halted_i,
  input  logic          ct_overrun_i,
  input  logic [CW-1:0] cycles_i,
  input  logic [W-1:0]  g_i,
  input  logic [W-1:0]  ca_i,
  input  logic [W-1:0]  cb_i,
  input  logic [W-1:0]  dbg_c_i,
  input  logic [W-1:0]  dbg_s_i,
  input  ctrl_t         dbg_ctrl_i,
  input  logic [DW-1:0] dbg_delta_i
);

  localparam int unsigned NWI = (N + 31) / 32;
  localparam int unsigned NWO = (W + 31) / 32;
  localparam int unsigned IW  = (NWI > 1) ? $clog2(NWI) : 1;  // operand word index

  logic [1:0]    div_q;
  logic          strobe, acc;
  logic [31:0]   a_w [NWI];
  logic [31:0]   b_w [NWI];
  logic [CW-3:0] quads_q;
  logic [3:0]    page;
  logic [7:0]    idx;
  logic [IW-1:0] widx;

  assign strobe = (div_q == 2'd3);
  assign acc    = strobe && req_i;
  assign page   = addr_i[11:8];
  assign idx    = addr_i[7:0];
  assign widx   = idx[IW-1:0];

  // word i of a wide value, zero beyond its width
  function automatic logic [31:0] word_of(logic [W-1:0] v, logic [7:0] i);
    logic [NWO*32-1:0] ext;
    ext = (NWO*32)'(v);
    return (int'(i) < NWO) ? ext[int'(i)*32 +: 32] : 32'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q     <= '0;
      ack_o     <= 1'b0;
      rdata_o   <= '0;
      start_o   <= 1'b0;
      mode_o    <= MODE_FAST;
      quads_q   <= '0;
      dbg_sel_o <= '0;
      for (int i = 0; i < int'(NWI); i++) begin a_w[i] <= '0; b_w[i] <= '0; end
    end else begin
      div_q   <= div_q + 2'd1;
      ack_o   <= acc;
      start_o <= 1'b0;
      if (acc && we_i) begin
        unique case (page)
          4'h0: unique case (idx)
            8'h00: begin
              start_o <= wdata_i[0];
              mode_o  <= mode_e'(wdata_i[2:1]);
            end
            8'h02:   quads_q   <= wdata_i[CW-3:0];
            8'h04:   dbg_sel_o <= wdata_i[2:0];
            default: ;
          endcase
          4'h1: if (int'(idx) < NWI) a_w[widx] <= wdata_i;
          4'h2: if (int'(idx) < NWI) b_w[widx] <= wdata_i;
          default: ;
        endcase
      end
      if (acc && !we_i) begin
        unique case (page)
          4'h0: unique case (idx)
            8'h00:   rdata_o <= {29'd0, mode_o, 1'b0};
            8'h01:   rdata_o <= {28'd0, ct_overrun_i, halted_i, done_i, busy_i};
            8'h02:   rdata_o <= 32'(quads_q);
            8'h03:   rdata_o <= 32'(cycles_i);
            8'h04:   rdata_o <= {29'd0, dbg_sel_o};
            8'h05:   rdata_o <= {6'd0, DW'(dbg_delta_i), 9'd0, dbg_ctrl_i};
            default: rdata_o <= '0;
          endcase
          4'h1:    rdata_o <= (int'(idx) < NWI) ? a_w[widx] : 32'd0;
          4'h2:    rdata_o <= (int'(idx) < NWI) ? b_w[widx] : 32'd0;
          4'h3:    rdata_o <= word_of(g_i, idx);
          4'h4:    rdata_o <= word_of(ca_i, idx);
          4'h5:    rdata_o <= word_of(cb_i, idx);
          4'h6:    rdata_o <= word_of(dbg_c_i, idx);
          4'h7:    rdata_o <= word_of(dbg_s_i, idx);
          default: rdata_o <= '0;
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NWI); i++) begin
      for (int j = 0; j < 32; j++) begin
        if (i * 32 + j < int'(N)) begin
          a_o[i*32 + j] = a_w[i][j];
          b_o[i*32 + j] = b_w[i][j];
        end
      end
    end
  end

  assign dbg_cycles_o = {quads_q, 2'b00};

  // a request is acknowledged exactly once, on a strobe cycle
  assert property (@(posedge clk) disable iff (!rst_n) ack_o |-> $past(strobe));

endmodule
