// ir_main_proc_tb: main processor of the inverse-residue unit. Random
// 32-bit adds and subtracts are compared with integer arithmetic modulo 2^32,
// and C_n with the carry out of X + Y (or X + NOT Y + 1).
module ir_main_proc_tb;
  logic sub; logic [31:0] x, y, z; logic cn;
  int checks = 0, failures = 0;
  ir_main_proc dut (.*);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint unsigned s;
      x = $urandom(); y = $urandom(); sub = 1'(i % 2);
      #1;
      s = sub ? longint'(x) + longint'(32'(~y)) + 1 : longint'(x) + longint'(y);
      checks++;
      if (z != 32'(s) || cn != s[32]) begin failures++; $display("FAIL %h %h sub=%0d", x, y, sub); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
