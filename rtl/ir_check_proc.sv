// ir_check_proc: check processor of the inverse-residue code arithmetic unit.
//
// Works only on the A-bit check symbols X'' = A - (A|X) with a modulo 2^A - 1
// adder (A-bit sum with end-around carry, 1111 standing for zero). For add,
// Z'' = X'' + Y''; when the main processor reports C_n = 1 the check sum is
// increased by 1, matching the 2^n dropped from the main sum. For subtract
// the complemented Y'' is used and 1 is taken off for the main processor's
// carry-in of 1, before the same C_n correction. Combinational.
//
// The add rule and the C_n correction are the document's; the subtract rule
// is this design's.
module ir_check_proc #(
  parameter int unsigned A = 4
) (
  input  logic         sub,
  input  logic [A-1:0] x_chk,
  input  logic [A-1:0] y_chk,
  input  logic         cn,
  output logic [A-1:0] z_chk
);
  function automatic logic [A-1:0] m15(logic [A-1:0] p, logic [A-1:0] q);
    logic [A:0] s;
    s = {1'b0, p} + {1'b0, q};
    return s[A-1:0] + {{(A-1){1'b0}}, s[A]};
  endfunction

  always_comb begin
    logic [A-1:0] t;
    t = m15(x_chk, sub ? ~y_chk : y_chk);
    if (sub) t = m15(t, ~{{(A-1){1'b0}}, 1'b1});
    z_chk = m15(t, {{(A-1){1'b0}}, cn});
  end
endmodule
