// ir_main_proc: main processor of the inverse-residue code arithmetic unit.
//
// An n-bit (n = K*A) two's complement adder working modulo 2^n. For add,
// Z = X + Y; for subtract, Z = X + NOT(Y) + 1. The carry out of the leftmost
// position, discarded from Z, is sent to the check processor as the
// correction signal C_n, because dropping 2^n changes the residue of the sum
// by 2^n mod (2^A - 1) = 1. Combinational.
//
// Addition and the correction signal are the document's; subtraction by
// complement and carry-in is this design's extension in the same style.
module ir_main_proc #(
  parameter int unsigned K = 8,
  parameter int unsigned A = 4
) (
  input  logic             sub,
  input  logic [K*A-1:0]   x,
  input  logic [K*A-1:0]   y,
  output logic [K*A-1:0]   z,
  output logic             cn
);
  logic [K*A:0] s;

  always_comb begin
    s  = {1'b0, x} + {1'b0, sub ? ~y : y} + {{(K*A){1'b0}}, sub};
    z  = s[K*A-1:0];
    cn = s[K*A];
  end
endmodule
