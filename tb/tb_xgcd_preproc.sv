// tb_xgcd_preproc: self-checking test of the pre-processing stage at
// N = 64. For random inputs (each parity combination with at least one odd
// input, including all-ones values) it checks that valid rises exactly four
// cycles after start, that a0 / b0 are the input or a + b as their parity
// requires, the flags, and every entry j*a0, j*b0 of the multiple tables.
module tb_xgcd_preproc;
  localparam int unsigned N = 64;
  localparam int unsigned W = N + 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, valid, as, bs;
  logic [N-1:0] a, b;
  logic [W-1:0] a0, b0;
  logic [W-1:0] am [8];
  logic [W-1:0] bm [8];

  xgcd_preproc #(.N(N), .W(W)) dut (.clk, .rst_n, .start_i(start), .a_i(a), .b_i(b),
    .valid_o(valid), .a0_o(a0), .b0_o(b0), .amul_o(am), .bmul_o(bm), .a_sum_o(as), .b_sum_o(bs));

  task automatic chk(bit c, string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s a=%h b=%h", w, a, b); end
  endtask

  initial begin
    logic [W-1:0] ea, eb;
    int lat;
    start = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (t == 0) begin a = '1; b = '1; end
      case (t % 3)
        0: begin a[0] = 1; b[0] = 1; end
        1: begin a[0] = 0; b[0] = 1; end
        default: begin a[0] = 1; b[0] = 0; end
      endcase
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!valid && lat < 20) begin @(negedge clk); lat++; end
      chk(lat == 4, "latency of four cycles");
      ea = a[0] ? W'(a) : W'(a) + W'(b);
      eb = b[0] ? W'(b) : W'(a) + W'(b);
      chk(a0 == ea && b0 == eb, "a0 / b0");
      chk(as == !a[0] && bs == !b[0], "a+b flags");
      for (int j = 0; j < 8; j++) chk(am[j] == W'(j) * ea && bm[j] == W'(j) * eb, "multiple table");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
