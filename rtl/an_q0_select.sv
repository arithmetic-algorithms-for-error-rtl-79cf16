// an_q0_select: last quotient digit of the AN-coded division.
//
// Dividing (A^2)X by AY with a plain radix-16 division would give a quotient
// that overshoots the coded quotient AQ by K (0..14). The quotient becomes a
// multiple of 15 when the last digit q0 brings the digit sum to a multiple of
// 15: with N = 15 | (q7 + ... + q1) (16 = 1 mod 15), q0 is either -N or
// 15 - N. The processor tries the positive choice with a trial subtraction
// and reports trial_ok when the trial remainder stays non-negative; q0 is then
// 15 - N, otherwise -N. N = 0 with a failed trial gives q0 = 0. Combinational.
//
// The residue rule, the choice q0 = -N and the trial for N = 14 are the
// document's; applying the trial for every N (so that a remainder between 15
// and 16 divisors is also caught) is this design's.
module an_q0_select (
  input  logic [7:0]        digit_sum,
  input  logic              trial_ok,
  output logic [3:0]        n_res,
  output logic [3:0]        pos_q0,
  output logic signed [4:0] q0
);
  always_comb begin
    n_res  = 4'(digit_sum % 8'd15);
    pos_q0 = 4'd15 - n_res;
    q0     = trial_ok ? $signed({1'b0, pos_q0}) : -$signed({1'b0, n_res});
  end
endmodule
