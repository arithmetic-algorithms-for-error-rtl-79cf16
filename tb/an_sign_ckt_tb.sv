// an_sign_ckt_tb: duplexed sign circuit. Loads every sign combination and
// checks the recorded signs, the result sign and that the copies agree; also
// checks that the signs hold while load is low.
module an_sign_ckt_tb;
  logic clk = 0, rst_n = 0, load = 0, acc_msb = 0, opd_msb = 0;
  logic acc_neg, opd_neg, res_neg, err;
  int checks = 0, failures = 0;
  an_sign_ckt dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      {acc_msb, opd_msb} = 2'(i); load = 1; @(negedge clk); load = 0;
      {acc_msb, opd_msb} = ~2'(i); @(negedge clk);
      checks++;
      if (acc_neg != i[1] || opd_neg != i[0] || res_neg != (i[1] ^ i[0]) || err) begin
        failures++; $display("FAIL case %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
