// an_mul15: "multiply by 2^a - 1" for AN-coded one's complement operands.
//
// The (N-A)-bit operand Z is extended by A sign bits to N bits; 2^A * Z
// (Z shifted A places left, the vacated bits filled with the sign, i.e. a
// rotation of the extended word) is added modulo 2^N - 1 to the one's
// complement of the extended Z. One N-bit end-around-carry addition gives
// (2^A - 1) * Z. Combinational.
//
// The algorithm is the document's; N = 36 (nine bytes, PR with its extension
// byte) is where the processor uses it on a 32-bit dividend.
module an_mul15 #(
  parameter int unsigned N = 36,
  parameter int unsigned A = 4
) (
  input  logic [N-A-1:0] z,
  output logic [N-1:0]   y
);
  logic [N-1:0] ze, z16, zc;
  logic [N:0]   s;

  always_comb begin
    ze  = {{A{z[N-A-1]}}, z};
    z16 = {ze[N-A-1:0], {A{ze[N-1]}}};
    zc  = ~ze;
    s   = {1'b0, z16} + {1'b0, zc};
    y   = s[N-1:0] + {{(N-1){1'b0}}, s[N]};
  end
endmodule
