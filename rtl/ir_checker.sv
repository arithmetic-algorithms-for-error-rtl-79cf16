// ir_checker: checker algorithm of the inverse-residue code arithmetic unit.
//
// Forms the modulo 2^A - 1 residue of the result Z by adding its A-bit bytes
// with end-around carry, adds the check result Z'', and raises error unless
// the total is all ones (1111 for A = 4), which is what a correct pair
// (Z, Z'') gives since Z'' = -(Z mod 2^A-1). Combinational.
//
// The test (2^A - 1 | Z) + Z'' = 1111 is the document's.
module ir_checker #(
  parameter int unsigned K = 8,
  parameter int unsigned A = 4
) (
  input  logic [K*A-1:0] z,
  input  logic [A-1:0]   z_chk,
  output logic           error
);
  function automatic logic [A-1:0] m15(logic [A-1:0] p, logic [A-1:0] q);
    logic [A:0] s;
    s = {1'b0, p} + {1'b0, q};
    return s[A-1:0] + {{(A-1){1'b0}}, s[A]};
  endfunction

  always_comb begin
    logic [A-1:0] r;
    r = '0;
    for (int i = 0; i < K; i++) r = m15(r, z[i*A +: A]);
    error = (m15(r, z_chk) != '1);
  end
endmodule
