// an_roundoff: roundoff constant for the AN-coded product.
//
// After the radix-16 steps and the divide-by-15 cycle the double-length coded
// product is H * 2^32 + N = 15 * XY, where H = (15XY - N) / 2^32 is the 8-byte
// high part and N (the correction bytes kept in MQ) the low part. The
// rightmost 32 bits K of the uncoded product XY satisfy 15 K = N (mod 2^32),
// so K = -(N + 16 N + 16^2 N + ... + 16^7 N) mod 2^32, one byte-shifted copy of
// N per byte. With m = (15 K - N) / 2^32 (0..14), rounding down gives the coded
// result H - m and rounding up (K >= 2^31) gives H - m + 15; that is, adding
// the coded roundoff constant 15G to (15XY - N) + N. add_const is the signed
// amount the processor adds to H. Combinational.
//
// That G is formed from the bytes of N and added as 15G is the document's;
// the formula used for K and the half-way rounding rule are this design's.
module an_roundoff #(
  parameter int unsigned NBITS = 32
) (
  input  logic [NBITS-1:0]       n_corr,
  output logic [NBITS-1:0]       k_low,
  output logic                   round_up,
  output logic signed [5:0]      add_const
);
  logic [NBITS-1:0] acc;
  logic [NBITS+3:0] p15;
  logic [3:0]       m;

  always_comb begin
    acc = '0;
    for (int j = 0; j < NBITS / 4; j++)
      acc = acc + (n_corr << (4 * j));
    k_low    = -acc;
    p15      = ({4'b0, k_low} << 4) - {4'b0, k_low} - {4'b0, n_corr};
    m        = p15[NBITS+3:NBITS];
    round_up = k_low[NBITS-1];
    add_const = round_up ? (6'sd15 - $signed({2'b0, m})) : -$signed({2'b0, m});
  end
endmodule
