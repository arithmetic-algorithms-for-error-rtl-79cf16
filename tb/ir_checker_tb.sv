// ir_checker_tb: checker algorithm. The worked 8-bit cases (correct sum
// 1111 1110 with S'' = 0001 passes; 0000 1110 with 0010 and 1111 1110 with
// 1111 fail) and random 32-bit words with right and wrong check symbols.
module ir_checker_tb;
  import ir_ref_pkg::*;
  logic [7:0] zs; logic [3:0] cs; logic es;
  logic [31:0] z; logic [3:0] z_chk; logic error;
  int checks = 0, failures = 0;
  ir_checker #(.K(2), .A(4)) u_small (.z(zs), .z_chk(cs), .error(es));
  ir_checker dut (.*);

  task automatic chk_small(logic [7:0] v, logic [3:0] c, logic bad);
    zs = v; cs = c; #1; checks++;
    if (es != bad) begin failures++; $display("FAIL %b %b", v, c); end
  endtask

  initial begin
    chk_small(8'b1111_1110, 4'b0001, 1'b0);
    chk_small(8'b0000_1110, 4'b0010, 1'b1);
    chk_small(8'b1111_1110, 4'b1111, 1'b1);
    chk_small(8'b0000_1110, 4'b0001, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      z = $urandom(); z_chk = inv_res(z); #1; checks++;
      if (error) begin failures++; $display("FAIL good %h", z); end
      z_chk = 4'((int'(z_chk) + $urandom_range(1, 14) - 1) % 15 + 1); #1; checks++;
      if (!error) begin failures++; $display("FAIL bad %h %b", z, z_chk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
