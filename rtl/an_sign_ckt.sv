// an_sign_ckt: duplexed sign-test circuit.
//
// When load is high the sign bits of the ACC-MD word and of the incoming
// operand are recorded, in two independent copies. The outputs come from
// the first copy; err is high whenever the two copies disagree, so a fault in
// one copy is seen. res_neg is the sign of a product or quotient (operand
// signs differ). Registered; reset clears both copies.
//
// The document gives a duplexed sign circuit recording the operand signs; its
// structure here is this design's. Because both copies are fed the same
// signals, a synthesis tool that merges equivalent flip-flops will fold them
// into one and reduce err to a constant 0; a fault-tolerant build has to keep
// the copies apart (for example with the tool's keep attribute or a separate
// physical partition).
module an_sign_ckt (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic acc_msb,
  input  logic opd_msb,
  output logic acc_neg,
  output logic opd_neg,
  output logic res_neg,
  output logic err
);
  logic [1:0] a_cp, o_cp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_cp <= '0;
      o_cp <= '0;
    end else if (load) begin
      a_cp <= {2{acc_msb}};
      o_cp <= {2{opd_msb}};
    end
  end

  assign acc_neg = a_cp[0];
  assign opd_neg = o_cp[0];
  assign res_neg = a_cp[0] ^ o_cp[0];
  assign err     = (a_cp[0] != a_cp[1]) || (o_cp[0] != o_cp[1]);
endmodule
