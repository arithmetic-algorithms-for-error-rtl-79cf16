// an_div15: "divide by 2^a - 1" for AN-coded one's complement operands.
//
// Given Y = (2^A - 1) * Z (N bits, one's complement), computes Z one A-bit
// byte at a time, least significant byte first, from
//   Z = NOT( (Y + W) mod (2^N - 1) ),  W = NOT(2^A * Z).
// The first byte of W and the end-around carry C0 follow from the sign of Y:
// a positive Y gives C0 = 0 and W0 = 1111, a negative Y gives C0 = 1 and
// W0 = 0000. Each later byte of W is the complement of the Z byte just found,
// which equals the sum byte of the previous step, and each step's carry feeds
// the next. The chain of N/A A-bit adders is written out combinationally.
//
// The recurrence and its starting rule are the document's.
module an_div15 #(
  parameter int unsigned N = 36,
  parameter int unsigned A = 4
) (
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);
  localparam int unsigned NB = N / A;

  always_comb begin
    logic [A-1:0] w;
    logic         c;
    logic [A:0]   s;
    c = y[N-1];
    w = y[N-1] ? '0 : '1;
    z = '0;
    for (int i = 0; i < NB; i++) begin
      s            = {1'b0, y[i*A +: A]} + {1'b0, w} + {{A{1'b0}}, c};
      z[i*A +: A]  = ~s[A-1:0];
      w            = s[A-1:0];
      c            = s[A];
    end
  end
endmodule
