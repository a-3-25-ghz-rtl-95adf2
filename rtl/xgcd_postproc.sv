// xgcd_postproc: post-processing stage of an XGCD unit.
//
// At the end of the reduction one of a, b is zero and the other is the GCD
// (possibly negated). Rather than find out which one with a full-width zero
// test and a selection, the stage adds them: g = a + b, and likewise the
// Bezout coefficients U = u + y and M = m + n, so that U*a0 + M*b0 = g. Each
// sum of two carry-save values is a four-input carry-save tree followed by
// one carry-propagate adder. The coefficients are then moved from the basis
// (a0, b0) back to the inputs (a, b): if a0 = a + b the coefficient of b
// becomes M + U, if b0 = a + b the coefficient of a becomes U + M.
//
// Four-cycle pipeline, as described: (1) 4:2 carry-save trees,
// (2) carry-propagate adders, (3) change of basis, (4) output register.
// valid_o pulses four cycles after start_i. The GCD is not forced positive:
// with the approximate operand choice it may come out negated, together with
// both coefficients, and g = ca*a + cb*b still holds. Basis change and the
// split into cycles are this design's own.
module xgcd_postproc #(
  parameter int unsigned W = 520
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [W-1:0] a_c_i, a_s_i,
  input  logic [W-1:0] b_c_i, b_s_i,
  input  logic [W-1:0] u_c_i, u_s_i,
  input  logic [W-1:0] y_c_i, y_s_i,
  input  logic [W-1:0] m_c_i, m_s_i,
  input  logic [W-1:0] n_c_i, n_s_i,
  input  logic         a_sum_i,     // a0 was formed as a + b
  input  logic         b_sum_i,     // b0 was formed as a + b
  output logic         valid_o,
  output logic [W-1:0] g_o,         // gcd (two's complement, sign may be -)
  output logic [W-1:0] ca_o,        // coefficient of a
  output logic [W-1:0] cb_o         // coefficient of b
);

  typedef struct packed {
    logic [W-1:0] c;
    logic [W-1:0] s;
  } cs_t;

  // sum of two CS values as one CS value: two 3:2 rows
  function automatic cs_t add42(logic [W-1:0] x0, logic [W-1:0] x1,
                                logic [W-1:0] x2, logic [W-1:0] x3);
    logic [W-1:0] s1, c1;
    cs_t r;
    s1  = x0 ^ x1 ^ x2;
    c1  = {((x0[W-2:0] & x1[W-2:0]) | (x0[W-2:0] & x2[W-2:0]) | (x1[W-2:0] & x2[W-2:0])), 1'b0};
    r.s = s1 ^ c1 ^ x3;
    r.c = {((s1[W-2:0] & c1[W-2:0]) | (s1[W-2:0] & x3[W-2:0]) | (c1[W-2:0] & x3[W-2:0])), 1'b0};
    return r;
  endfunction

  logic [3:0]   vld;
  cs_t          g1, u1, m1;
  logic [W-1:0] g2, u2, m2, g3, u3, m3;
  logic [1:0]   sel1, sel2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      g1 <= '0; u1 <= '0; m1 <= '0;
      g2 <= '0; u2 <= '0; m2 <= '0;
      g3 <= '0; u3 <= '0; m3 <= '0;
      sel1 <= '0; sel2 <= '0;
      g_o <= '0; ca_o <= '0; cb_o <= '0;
    end else begin
      vld <= {vld[2:0], start_i};
      if (start_i) begin
        g1   <= add42(a_c_i, a_s_i, b_c_i, b_s_i);
        u1   <= add42(u_c_i, u_s_i, y_c_i, y_s_i);
        m1   <= add42(m_c_i, m_s_i, n_c_i, n_s_i);
        sel1 <= {b_sum_i, a_sum_i};
      end
      if (vld[0]) begin
        g2 <= g1.c + g1.s;
        u2 <= u1.c + u1.s;
        m2 <= m1.c + m1.s;
        sel2 <= sel1;
      end
      if (vld[1]) begin
        g3 <= g2;
        u3 <= sel2[1] ? u2 + m2 : u2;
        m3 <= sel2[0] ? m2 + u2 : m2;
      end
      if (vld[2]) begin
        g_o  <= g3;
        ca_o <= u3;
        cb_o <= m3;
      end
    end
  end

  assign valid_o = vld[3];

endmodule
