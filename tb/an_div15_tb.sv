// an_div15_tb: divide-by-15 unit. Checks the worked 24-bit example
// (Y = 0000 0010 0111 0100 0110 1011 gives Z = 0000 0000 0010 1001 1110 0101)
// and, at 36 bits, random positive and negative multiples of 15.
module an_div15_tb;
  int checks = 0, failures = 0;
  logic [23:0] ys, zs;
  logic [35:0] y, z;
  an_div15 #(.N(24), .A(4)) u_small (.y(ys), .z(zs));
  an_div15 dut (.y(y), .z(z));

  function automatic logic [35:0] oc36(longint v);
    if (v < 0) return ~(36'(-v));
    return 36'(v);
  endfunction

  initial begin
    ys = 24'h02746B; #1;
    checks++; if (zs != 24'h0029E5) begin failures++; $display("FAIL example: %h", zs); end
    for (int i = 0; i < 2000; i++) begin
      longint v;
      v = longint'($urandom_range(1, 32'h7FFF_FFFF));
      if (i % 2 == 1) v = -v;
      y = oc36(15 * v);
      #1;
      checks++;
      if (z != oc36(v)) begin failures++; $display("FAIL %0d: %h", v, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
