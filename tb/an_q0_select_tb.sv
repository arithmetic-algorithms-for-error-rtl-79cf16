// an_q0_select_tb: last quotient digit. For every digit sum 0..105 and both
// trial outcomes, q0 must bring the digit sum to a multiple of 15 and be
// 15 - N after a successful trial and -N otherwise.
module an_q0_select_tb;
  logic [7:0] digit_sum; logic trial_ok;
  logic [3:0] n_res, pos_q0; logic signed [4:0] q0;
  int checks = 0, failures = 0;
  an_q0_select dut (.*);
  initial begin
    for (int s = 0; s <= 105; s++)
      for (int t = 0; t < 2; t++) begin
        int n;
        digit_sum = 8'(s); trial_ok = 1'(t); #1;
        n = s % 15;
        checks++;
        if (int'(n_res) != n || ((s + int'(q0)) % 15) != 0 || int'(q0) != (t ? 15 - n : -n)) begin
          failures++; $display("FAIL sum %0d trial %0d: N=%0d q0=%0d", s, t, n_res, q0);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
