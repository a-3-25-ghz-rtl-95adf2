// tb_xgcd_postproc: self-checking test of the post-processing stage at
// W = 40. Random values are split into random carry-save pairs; the stage
// must return g = a + b, and ca = u + y, cb = m + n moved to the input
// basis (cb += ca when a0 was a + b, ca += cb when b0 was a + b), exactly
// four cycles after start.
module tb_xgcd_postproc;
  localparam int unsigned W = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, valid, as, bs;
  logic [W-1:0] vc [6];
  logic [W-1:0] vs [6];
  logic [W-1:0] g, ca, cb;

  xgcd_postproc #(.W(W)) dut (.clk, .rst_n, .start_i(start),
    .a_c_i(vc[0]), .a_s_i(vs[0]), .b_c_i(vc[1]), .b_s_i(vs[1]),
    .u_c_i(vc[2]), .u_s_i(vs[2]), .y_c_i(vc[3]), .y_s_i(vs[3]),
    .m_c_i(vc[4]), .m_s_i(vs[4]), .n_c_i(vc[5]), .n_s_i(vs[5]),
    .a_sum_i(as), .b_sum_i(bs), .valid_o(valid), .g_o(g), .ca_o(ca), .cb_o(cb));

  initial begin
    longint v [6];
    longint eg, eu, em;
    int lat;
    start = 0; as = 0; bs = 0;
    for (int i = 0; i < 6; i++) begin vc[i] = '0; vs[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 6; i++) begin
        v[i] = longint'($urandom) - longint'($urandom);
        vs[i] = {$urandom, $urandom};
        vc[i] = W'(v[i]) - vs[i];
      end
      as = (t % 3 == 1); bs = (t % 3 == 2);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int i = 0; i < 6; i++) begin vc[i] = W'($urandom); vs[i] = W'($urandom); end
      lat = 1;
      while (!valid && lat < 20) begin @(negedge clk); lat++; end
      eg = v[0] + v[1]; eu = v[2] + v[3]; em = v[4] + v[5];
      if (as) em = em + eu;
      if (bs) eu = eu + em;
      checks += 2;
      if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
      if (g != W'(eg) || ca != W'(eu) || cb != W'(em)) begin
        failures++;
        $display("FAIL t=%0d g=%h/%h ca=%h/%h cb=%h/%h", t, g, W'(eg), ca, W'(eu), cb, W'(em));
      end
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
