// tb_cs_shift: self-checking test of cs_shift for shifts by 1, 2 and 3 at a
// small width. Random carry-save pairs are built for random values v with
// |v| < 2^(W-3) and v divisible by 2^SHIFT (the sum vector is random, the
// carry vector is v minus it, so every carry pattern occurs, including those
// that drop a carry at the LSBs and those whose MSBs wrap); the shifted pair
// must add up to v / 2^SHIFT as a signed W-bit number.
module tb_cs_shift;
  localparam int unsigned W = 24;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int drops = 0, wraps = 0;

  logic [W-1:0] ci [3];
  logic [W-1:0] si [3];
  logic [W-1:0] co [3];
  logic [W-1:0] so [3];

  for (genvar s = 1; s <= 3; s++) begin : g_dut
    cs_shift #(.W(W), .SHIFT(s)) dut (
      .c_i(ci[s-1]), .s_i(si[s-1]), .c_o(co[s-1]), .s_o(so[s-1]));
  end

  initial begin
    int v, lim;
    logic [W-1:0] got;
    lim = 1 << (W - 3);
    for (int t = 0; t < 3000; t++) begin
      for (int s = 1; s <= 3; s++) begin
        v = (int'($urandom_range(0, 2 * lim - 2)) - (lim - 1)) & ~((1 << s) - 1);
        si[s-1] = W'($urandom);
        ci[s-1] = W'(v) - si[s-1];
        if (t == 0) begin ci[s-1] = W'((1 << s) - 1); si[s-1] = W'(1); v = 1 << s; end
      end
      @(negedge clk);
      for (int s = 1; s <= 3; s++) begin
        v = (int'(signed'(ci[s-1] + si[s-1])) <<< (32 - W)) >>> (32 - W);
        got = co[s-1] + so[s-1];
        checks++;
        if (int'(signed'(got)) != (v >>> s)) begin
          failures++;
          $display("FAIL shift %0d: c=%h s=%h got %h", s, ci[s-1], si[s-1], got);
        end
        if (((32'(ci[s-1]) & ((32'd1 << s) - 1)) + (32'(si[s-1]) & ((32'd1 << s) - 1))) != 0) drops++;
        if (32'(ci[s-1]) + 32'(si[s-1]) >= (32'd1 << W)) wraps++;
      end
    end
    checks++;
    if (drops == 0 || wraps == 0) begin
      failures++;
      $display("FAIL: dropped-carry or wrap case never exercised");
    end
    $display("dropped carries %0d, wrapped sums %0d", drops, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
