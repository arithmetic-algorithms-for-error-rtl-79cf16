// an_adder3_tb: exhaustive test of the three-input byte adder: for all
// 4096 input combinations SB must be the low four bits and CB the high bits
// of the integer sum.
module an_adder3_tb;
  logic [3:0] a, b, cb_in, sb, cb;
  int checks = 0, failures = 0;
  an_adder3 dut (.*);
  initial begin
    for (int i = 0; i < 4096; i++) begin
      int s;
      {a, b, cb_in} = 12'(i);
      #1;
      s = int'(a) + int'(b) + int'(cb_in);
      checks++;
      if ({cb, sb} != 8'(s)) begin failures++; $display("FAIL %0d+%0d+%0d -> %h%h", a, b, cb_in, cb, sb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
