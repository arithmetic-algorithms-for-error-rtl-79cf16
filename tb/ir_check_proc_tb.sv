// ir_check_proc_tb: check processor. Reproduces the two worked cases (check
// symbols 1011 + 0101 with C_n = 0 gives 0001, with a wrongly raised C_n gives
// 0010; 1011 + 0100 with C_n = 1 gives 0001, with C_n suppressed gives 1111)
// and checks random add/subtract against the inverse residue of the true
// 32-bit result.
module ir_check_proc_tb;
  import ir_ref_pkg::*;
  logic sub, cn; logic [3:0] x_chk, y_chk, z_chk;
  int checks = 0, failures = 0;
  ir_check_proc dut (.*);

  task automatic expect_chk(logic [3:0] e, string what);
    #1; checks++;
    if (z_chk != e) begin failures++; $display("FAIL %s: %b expected %b", what, z_chk, e); end
  endtask

  initial begin
    sub = 0;
    x_chk = 4'b1011; y_chk = 4'b0101; cn = 0; expect_chk(4'b0001, "example 4 correct");
    cn = 1; expect_chk(4'b0010, "example 4 incorrect");
    x_chk = 4'b1011; y_chk = 4'b0100; cn = 1; expect_chk(4'b0001, "example 5 correct");
    cn = 0; expect_chk(4'b1111, "example 5 incorrect");
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, y; longint unsigned s;
      x = $urandom(); y = $urandom(); sub = 1'(i % 2);
      s = sub ? longint'(x) + longint'(32'(~y)) + 1 : longint'(x) + longint'(y);
      x_chk = inv_res(x); y_chk = inv_res(y); cn = s[32];
      #1; checks++;
      if ((z_chk % 15) != (inv_res(32'(s)) % 15)) begin failures++; $display("FAIL %h %h sub=%0d", x, y, sub); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
