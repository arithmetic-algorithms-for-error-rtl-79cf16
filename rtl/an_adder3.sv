// an_adder3: the three-input byte adder of the AN-code processor.
//
// Adds, in one byte time, a byte from the ACC-MD side (a), a byte from the
// data input or PR side (b) and the carry byte held in the carry-byte
// register CBR (cb_in). The result is split into a sum byte SB (the low A_BITS
// bits) and a carry byte CB (the bits above), which the processor stores in
// CBR for the next, more significant, byte. Purely combinational.
//
// The document names the adder, its three inputs and its SB/CB outputs; the
// split of the sum into SB and CB is this design's reading of that.
module an_adder3 #(
  parameter int unsigned A_BITS = 4
) (
  input  logic [A_BITS-1:0] a,
  input  logic [A_BITS-1:0] b,
  input  logic [A_BITS-1:0] cb_in,
  output logic [A_BITS-1:0] sb,
  output logic [A_BITS-1:0] cb
);
  logic [2*A_BITS-1:0] sum;

  always_comb begin
    sum = {{A_BITS{1'b0}}, a} + {{A_BITS{1'b0}}, b} + {{A_BITS{1'b0}}, cb_in};
    sb  = sum[A_BITS-1:0];
    cb  = sum[2*A_BITS-1:A_BITS];
  end
endmodule
