// an_recoder_tb: exhaustive test of the multiplier byte recoder. For every
// byte, carry and top flag the two signed terms must add up to the digit the
// byte stands for (byte + carry - 16 * carry_out, or for the top byte the two's
// complement reading plus carry), k must count the terms, and whole random
// 32-bit multipliers must be rebuilt exactly from their recoded digits.
module an_recoder_tb;
  logic [3:0] byte_in; logic carry_in, top;
  logic t0_en, t0_neg, t1_en, t1_neg, carry_out;
  logic [1:0] t0_shift, t1_shift, k;
  int checks = 0, failures = 0;
  an_recoder dut (.*);

  function automatic int term(logic en, logic neg, logic [1:0] sh);
    if (!en) return 0;
    return neg ? -(1 << sh) : (1 << sh);
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      int d, want;
      {top, carry_in, byte_in} = 6'(i);
      #1;
      d = term(t0_en, t0_neg, t0_shift) + term(t1_en, t1_neg, t1_shift);
      if (top) want = int'(byte_in) + int'(carry_in) - (byte_in[3] ? 16 : 0);
      else     want = int'(byte_in) + int'(carry_in) - 16 * int'(carry_out);
      checks++;
      if (d != want || int'(k) != int'(t0_en) + int'(t1_en) || (top && carry_out)) begin
        failures++; $display("FAIL byte %h c %0d top %0d: d=%0d want %0d", byte_in, carry_in, top, d, want);
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [31:0] b; longint acc, w; logic c;
      b = $urandom();
      c = b[31]; acc = 0; w = 1;
      for (int i = 0; i < 8; i++) begin
        byte_in = b[i*4 +: 4]; carry_in = c; top = (i == 7); #1;
        acc += w * (term(t0_en, t0_neg, t0_shift) + term(t1_en, t1_neg, t1_shift));
        c = carry_out; w = w * 16;
      end
      checks++;
      if (acc != (b[31] ? -longint'({32'b0, ~b}) : longint'({32'b0, b}))) begin
        failures++; $display("FAIL multiplier %h rebuilt as %0d", b, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
