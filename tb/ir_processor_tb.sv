// ir_processor_tb: inverse-residue processor. Runs the two worked 8-bit
// additions (no error, correction signal as stated) and random 32-bit
// adds/subtracts with correct check symbols: Z must be the modulo 2^32 result,
// Z'' its inverse residue, C_n the carry out and error low. Operands with a
// corrupted check symbol must raise error.
module ir_processor_tb;
  import ir_ref_pkg::*;
  logic sub; logic [31:0] x, y, z; logic [3:0] x_chk, y_chk, z_chk; logic error, cn;
  logic [7:0] xs, ys, zs; logic [3:0] xsc, ysc, zsc; logic es, cns;
  int checks = 0, failures = 0, n_cn = 0;
  ir_processor dut (.*);
  ir_processor #(.K(2), .A(4)) u_small (.sub(1'b0), .x(xs), .y(ys), .x_chk(xsc), .y_chk(ysc),
                                        .z(zs), .z_chk(zsc), .error(es), .cn(cns));
  initial begin
    xs = 8'b1111_0100; ys = 8'b0000_1010; xsc = 4'b1011; ysc = 4'b0101; #1;
    checks++; if (zs != 8'b1111_1110 || cns || zsc != 4'b0001 || es) begin failures++; $display("FAIL example 4"); end
    ys = 8'b0001_1010; ysc = 4'b0100; #1;
    checks++; if (zs != 8'b0000_1110 || !cns || zsc != 4'b0001 || es) begin failures++; $display("FAIL example 5"); end
    for (int i = 0; i < 3000; i++) begin
      longint unsigned s;
      x = $urandom(); y = $urandom(); sub = 1'(i % 2);
      x_chk = inv_res(x); y_chk = inv_res(y);
      #1;
      s = sub ? longint'(x) + longint'(32'(~y)) + 1 : longint'(x) + longint'(y);
      if (cn) n_cn++;
      checks++;
      if (z != 32'(s) || cn != s[32] || (z_chk % 15) != (inv_res(32'(s)) % 15) || error) begin
        failures++; $display("FAIL %h %h sub=%0d", x, y, sub);
      end
      x_chk = 4'((int'(x_chk) + $urandom_range(1, 14) - 1) % 15 + 1);
      #1; checks++;
      if (!error) begin failures++; $display("FAIL corrupted check not seen"); end
    end
    checks++; if (n_cn == 0) begin failures++; $display("FAIL no correction signal seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
