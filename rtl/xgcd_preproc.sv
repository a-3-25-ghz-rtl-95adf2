// xgcd_preproc: pre-processing stage of an XGCD unit.
//
// Turns the two N-bit unsigned inputs a, b into odd reduction inputs with the
// same GCD and precomputes the constant multiples j*a0 and j*b0, j = 0..7,
// that the coefficient updates add. a0 is a if a is odd, else a + b; b0 is b
// if b is odd, else a + b. At least one input must be odd (the reduction
// needs two odd starting values), which holds for modular inversion with an
// odd modulus. Results are W-bit two's complement (W > N + 3).
//
// The stage is a fixed four-cycle pipeline of carry-propagate adders:
//   cycle 1: a0, b0 (one N+1-bit addition)
//   cycle 2: 3x = 2x + x
//   cycle 3: 5x = 4x + x, 7x = 8x - x (2x, 4x, 6x are shifts)
//   cycle 4: output register
// The schedule inside the four cycles is this design's own. valid_o pulses
// four cycles after start_i; a_sum_o / b_sum_o tell the post-processing
// which input was replaced by a + b.
module xgcd_preproc #(
  parameter int unsigned N = 512,
  parameter int unsigned W = N + 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  output logic         valid_o,
  output logic [W-1:0] a0_o,
  output logic [W-1:0] b0_o,
  output logic [W-1:0] amul_o [8],   // j * a0
  output logic [W-1:0] bmul_o [8],   // j * b0
  output logic         a_sum_o,      // a0 = a + b
  output logic         b_sum_o       // b0 = a + b
);

  logic [2:0]   vld;
  logic [W-1:0] a0_q, b0_q, a3_q, b3_q;
  logic [W-1:0] am_q [8];
  logic [W-1:0] bm_q [8];
  logic         as_q, bs_q;
  logic [W-1:0] sum;

  always_comb sum = W'(a_i) + W'(b_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      a0_q <= '0; b0_q <= '0; a3_q <= '0; b3_q <= '0;
      as_q <= 1'b0; bs_q <= 1'b0;
      for (int j = 0; j < 8; j++) begin am_q[j] <= '0; bm_q[j] <= '0; end
    end else begin
      vld <= {vld[1:0], start_i};
      // cycle 1: odd starting values
      if (start_i) begin
        a0_q <= a_i[0] ? W'(a_i) : sum;
        b0_q <= b_i[0] ? W'(b_i) : sum;
        as_q <= ~a_i[0];
        bs_q <= ~b_i[0];
      end
      // cycle 2: three times
      if (vld[0]) begin
        a3_q <= (a0_q << 1) + a0_q;
        b3_q <= (b0_q << 1) + b0_q;
      end
      // cycle 3: the full table
      if (vld[1]) begin
        am_q[0] <= '0;        bm_q[0] <= '0;
        am_q[1] <= a0_q;      bm_q[1] <= b0_q;
        am_q[2] <= a0_q << 1; bm_q[2] <= b0_q << 1;
        am_q[3] <= a3_q;      bm_q[3] <= b3_q;
        am_q[4] <= a0_q << 2; bm_q[4] <= b0_q << 2;
        am_q[5] <= (a0_q << 2) + a0_q;
        bm_q[5] <= (b0_q << 2) + b0_q;
        am_q[6] <= a3_q << 1; bm_q[6] <= b3_q << 1;
        am_q[7] <= (a0_q << 3) - a0_q;
        bm_q[7] <= (b0_q << 3) - b0_q;
      end
    end
  end

  // cycle 4: outputs are the registered table, flagged valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      a0_o <= '0; b0_o <= '0; a_sum_o <= 1'b0; b_sum_o <= 1'b0;
      for (int j = 0; j < 8; j++) begin amul_o[j] <= '0; bmul_o[j] <= '0; end
    end else begin
      valid_o <= vld[2];
      if (vld[2]) begin
        a0_o <= a0_q; b0_o <= b0_q; a_sum_o <= as_q; b_sum_o <= bs_q;
        for (int j = 0; j < 8; j++) begin amul_o[j] <= am_q[j]; bmul_o[j] <= bm_q[j]; end
      end
    end
  end

endmodule
