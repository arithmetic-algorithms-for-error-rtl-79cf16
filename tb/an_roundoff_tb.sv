// an_roundoff_tb: roundoff constant. For random uncoded products xy, forms
// 15*xy = H*2^32 + N, feeds N and checks that K is the low 32 bits of xy, that
// the rounding direction follows K, and that H + add_const is 15 times xy
// rounded to a multiple of 2^32. Also checks the worked 8-bit case scaled up:
// K = 1100 1011 in the top byte rounds up.
module an_roundoff_tb;
  logic [31:0] n_corr, k_low;
  logic round_up;
  logic signed [5:0] add_const;
  int checks = 0, failures = 0;
  an_roundoff dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint xy, h, r;
      logic [63:0] p;
      xy = (longint'($urandom()) << 20) ^ longint'($urandom());
      if (i % 2 == 1) xy = -xy;
      if (i == 0) xy = 64'h0000_0007_CB00_0000;   // K = 1100 1011 0...: rounds up
      p = 64'(15 * xy);
      n_corr = p[31:0];
      h = (15 * xy - longint'({32'b0, p[31:0]})) >>> 32;
      #1;
      r = (xy >>> 32) + (xy[31] ? 1 : 0);
      checks++;
      if (k_low != xy[31:0] || round_up != xy[31] || h + longint'(add_const) != 15 * r) begin
        failures++; $display("FAIL xy=%0d K=%h up=%0d const=%0d", xy, k_low, round_up, add_const);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
