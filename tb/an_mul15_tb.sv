// an_mul15_tb: multiply-by-15 unit. Checks the worked 12-bit example
// (16X = 0011 0111 0000 gives 15X = 0011 0011 1001) and, at the processor's
// width of 36 bits, random positive and negative one's complement operands
// against 15 * value.
module an_mul15_tb;
  int checks = 0, failures = 0;
  logic [7:0]  zs;  logic [11:0] ys;
  logic [31:0] z;   logic [35:0] y;
  an_mul15 #(.N(12), .A(4)) u_small (.z(zs), .y(ys));
  an_mul15 dut (.z(z), .y(y));

  function automatic logic [35:0] oc36(longint v);
    if (v < 0) return ~(36'(-v));
    return 36'(v);
  endfunction

  initial begin
    zs = 8'h37; #1;
    checks++; if (ys != 12'h339) begin failures++; $display("FAIL example: %h", ys); end
    for (int i = 0; i < 2000; i++) begin
      longint v;
      v = longint'($urandom_range(1, 32'h7FFF_FFFE));
      if (i % 2 == 1) v = -v;
      z = (v < 0) ? ~(32'(-v)) : 32'(v);
      #1;
      checks++;
      if (y != oc36(15 * v)) begin failures++; $display("FAIL %0d: %h", v, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
