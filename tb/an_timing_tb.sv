// an_timing_tb: operation times of the AN-code processor, at default sizes.
//
// Runs every operation through the top level and holds its duration against
// the processor's stated timing: clear add 1 cycle; add and subtract 1 cycle,
// or 2 with an end-around carry; multiply 1 + sum(k_i + 1) + 3 cycles, with
// the extremes 14 (multiplier 15 or -15, two nonzero recoded digits) and 28
// (multipliers 0xA5555555 and 0x5AAAAAAA, two nonzero digits in every byte);
// multiply with a zero operand 2 cycles; divide 44 cycles; divide by zero or
// of zero 2 cycles. The 5-cycle quotient overflow is this design's own count.
// Each operation's length is also measured in clocks from the start pulse to
// done, which must be 10 byte times per processor cycle. Results are compared
// with integer arithmetic and the Checker must pass every result.
module an_timing_tb;
  import an_pkg::*;
  import an_proc_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        an_start = 1'b0;
  an_op_e      an_op = OP_CLA;
  logic [3:0]  an_di = '0;
  logic [3:0]  an_do;
  logic        an_do_valid, an_perform_check, an_cc_valid, an_busy, an_done, an_sign_err;
  logic [31:0] an_acc;
  logic [7:0]  an_cycles;
  logic        chk_fault, chk_cc_fault, chk_done;
  logic        ir_sub = 1'b0;
  logic [31:0] ir_x = '0, ir_y = '0, ir_z;
  logic [3:0]  ir_x_chk = 4'hF, ir_y_chk = 4'hF, ir_z_chk;
  logic        ir_error, ir_cn;

  star_arith_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clocks;

  always @(posedge clk) if (rst_n && chk_done) begin
    checks++;
    if (chk_fault) begin failures++; $display("FAIL: checker fault at %0t", $time); end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s got %0d expected %0d", what, got, exp); end
  endtask

  // Issue one operation and count the clocks until done.
  task automatic run(an_op_e o, logic [31:0] opd);
    @(negedge clk);
    an_start = 1'b1; an_op = o; an_di = opd[3:0];
    n_clocks = 0;
    @(negedge clk);
    an_start = 1'b0;
    n_clocks++;
    for (int i = 1; i < 8; i++) begin
      an_di = opd[i*4 +: 4];
      if (an_done) break;
      @(negedge clk); n_clocks++;
    end
    while (!an_done) begin @(negedge clk); n_clocks++; end
    @(negedge clk);
  endtask

  task automatic timed(string what, an_op_e o, logic [31:0] opd, int exp_cycles);
    run(o, opd);
    expect_eq({what, " cycles"}, longint'(an_cycles), longint'(exp_cycles));
    expect_eq({what, " clocks"}, longint'(n_clocks), longint'(exp_cycles * 10));
  endtask

  task automatic mul_case(logic [31:0] a, logic [31:0] b, int exp_cycles);
    timed("clear add", OP_CLA, a, 1);
    timed("multiply", OP_MUL, b, exp_cycles);
    expect_eq("product", longint'(an_acc), longint'(ref_mul(a, b)));
  endtask

  task automatic div_case(logic [31:0] dvs, logic [31:0] dvd, int exp_cycles);
    timed("clear add", OP_CLA, dvs, 1);
    timed("divide", OP_DIV, dvd, exp_cycles);
    if (exp_cycles == 44)
      expect_eq("quotient", longint'(an_acc), longint'(ref_div(dvd, dvs)));
  endtask

  initial begin
    logic [31:0] a, b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Additive operations
    timed("clear add", OP_CLA, oc_word(15 * 1000), 1);
    timed("add, no end-around carry", OP_ADD, oc_word(15 * 20), 1);
    timed("add, end-around carry", OP_ADD, oc_word(-15 * 7), 2);
    expect_eq("sum", longint'(an_acc), longint'(oc_word(15 * 1013)));
    timed("subtract, end-around carry", OP_SUB, oc_word(15 * 13), 2);
    expect_eq("difference", longint'(an_acc), longint'(oc_word(15 * 1000)));

    // Multiply: the shortest and the longest nonzero cases, both signs
    for (int i = 0; i < 10; i++) begin
      a = oc_word(15 * longint'($urandom_range(1, 140000000)));
      if (i[0]) a = ~a;
      mul_case(a, oc_word(15), 14);
      mul_case(a, oc_word(-15), 14);
      mul_case(a, 32'hA555_5555, 28);
      mul_case(a, 32'h5AAA_AAAA, 28);
    end
    mul_case(oc_word(15 * 99), '1, 2);
    mul_case('1, oc_word(15 * 99), 2);

    // Multiply: random multipliers, 1 + sum(k_i + 1) + 3 from the recoding
    for (int i = 0; i < 50; i++) begin
      a = oc_word(15 * longint'($urandom_range(1, 140000000)));
      b = oc_word(15 * longint'($urandom_range(1, 140000000)));
      if ($urandom_range(0, 1) == 1) b = ~b;
      mul_case(a, b, ref_mul_cycles(b));
      checks++;
      if (an_cycles < 14 || an_cycles > 28) begin
        failures++; $display("FAIL: multiply took %0d cycles", an_cycles);
      end
    end

    // Divide: full length, singular cases
    for (int i = 0; i < 20; i++) begin
      a = oc_word(15 * longint'($urandom_range(3000000, 140000000)));
      b = oc_word(15 * longint'($urandom_range(1, 90000)));
      if (i[0]) a = ~a;
      if (i[1]) b = ~b;
      div_case(a, b, 44);
    end
    div_case('1, oc_word(15 * 5), 2);
    div_case(oc_word(15 * 5000), '1, 2);
    div_case(oc_word(15 * 5), oc_word(15 * 5000), 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
