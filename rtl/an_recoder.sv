// an_recoder: multiplier byte recoder (the "REC" part of the MQB logic).
//
// The multiplier is scanned one 4-bit byte per radix-16 step, least
// significant first. The byte plus the carry from the previous byte,
// v = byte_in + carry_in (0..16), is turned into a signed digit d and a carry:
// for an ordinary byte d = v if v < 8, else d = v - 16 with carry_out = 1;
// for the most significant byte the byte is read as two's complement,
// d = v - 16 * byte_in[3], and no carry leaves. The digit d (-8..8) is then
// written as at most two signed powers of two (t0 and t1, multiples +-1, +-2,
// +-4, +-8), and k counts them: the processor spends one addition cycle on
// each term. For a one's complement multiplier, the processor feeds its sign
// bit in as carry_in of byte 0, which turns the two's complement reading into
// the one's complement value.
//
// That the recoded byte has at most two nonzero +-1 digits is the document's;
// the exact recoding table is this design's. Combinational.
module an_recoder (
  input  logic [3:0] byte_in,
  input  logic       carry_in,
  input  logic       top,
  output logic       t0_en,
  output logic       t0_neg,
  output logic [1:0] t0_shift,
  output logic       t1_en,
  output logic       t1_neg,
  output logic [1:0] t1_shift,
  output logic [1:0] k,
  output logic       carry_out
);
  logic signed [5:0] v, d;
  logic        [3:0] mag;
  logic              neg;

  always_comb begin
    v = $signed({1'b0, byte_in}) + $signed({5'b0, carry_in});
    if (top) begin
      d         = v - (byte_in[3] ? 6'sd16 : 6'sd0);
      carry_out = 1'b0;
    end else if (v >= 6'sd8) begin
      d         = v - 6'sd16;
      carry_out = 1'b1;
    end else begin
      d         = v;
      carry_out = 1'b0;
    end
    neg = d < 0;
    mag = neg ? 4'(-d) : 4'(d);

    t0_en = 1'b1; t0_shift = 2'd0;
    t1_en = 1'b0; t1_shift = 2'd0;
    t1_neg = neg;
    unique case (mag)
      4'd0: t0_en = 1'b0;
      4'd1: t0_shift = 2'd0;
      4'd2: t0_shift = 2'd1;
      4'd3: begin t0_shift = 2'd2; t1_en = 1'b1; t1_shift = 2'd0; t1_neg = ~neg; end
      4'd4: t0_shift = 2'd2;
      4'd5: begin t0_shift = 2'd2; t1_en = 1'b1; t1_shift = 2'd0; end
      4'd6: begin t0_shift = 2'd2; t1_en = 1'b1; t1_shift = 2'd1; end
      4'd7: begin t0_shift = 2'd3; t1_en = 1'b1; t1_shift = 2'd0; t1_neg = ~neg; end
      4'd8: t0_shift = 2'd3;
      default: t0_en = 1'b0;
    endcase
    t0_neg = neg;
    k = 2'(t0_en) + 2'(t1_en);
  end
endmodule
