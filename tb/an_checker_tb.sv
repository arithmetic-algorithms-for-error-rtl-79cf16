// an_checker_tb: mod-15 Checker. Sends random AN-coded 8-byte words (and
// 10-byte words), least significant byte first, with check on the last byte:
// a multiple of 15 must pass and any word off by a nonzero amount below 15
// must fail; the all-zero word must fail. Condition-code bytes are sent for all
// 16 values and the 2/4 test must flag exactly those without two ones.
module an_checker_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] bus = 0;
  logic reset = 0, add = 0, check = 0, cc_test = 0;
  logic sum_status, cc_status, check_done;
  int checks = 0, failures = 0;
  an_checker dut (.*);
  always #5 clk = ~clk;

  task automatic send(logic [39:0] w, int nb, logic expect_bad);
    for (int i = 0; i < nb; i++) begin
      bus = w[i*4 +: 4]; add = 1; check = (i == nb - 1);
      @(negedge clk);
    end
    add = 0; check = 0;
    checks++;
    if (!check_done || sum_status != expect_bad) begin
      failures++; $display("FAIL word %h bad=%0d status=%0d", w, expect_bad, sum_status);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    reset = 1; @(negedge clk); reset = 0;
    for (int i = 0; i < 300; i++) begin
      logic [39:0] v;
      int e;
      v = 40'(15 * longint'($urandom_range(1, 32'h7FFF_FFFF)));
      send(v, 10, 1'b0);
      e = $urandom_range(1, 14);
      send(v + 40'(e), 10, 1'b1);
      send(~40'(15 * longint'($urandom_range(1, 32'h7FFF_FFF))) & 40'hFF_FFFF_FFFF, 10, 1'b0);
    end
    send('0, 8, 1'b1);
    send(40'hFF_FFFF_FFFF, 8, 1'b0);
    for (int c = 0; c < 16; c++) begin
      bus = 4'(c); cc_test = 1; @(negedge clk); cc_test = 0;
      checks++;
      if (cc_status != ($countones(4'(c)) != 2)) begin failures++; $display("FAIL cc %b", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
