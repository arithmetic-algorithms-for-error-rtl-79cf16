// an_processor_tb: self-checking test of the AN-coded arithmetic processor.
//
// Runs clear add, add (with and without end-around carry, with overflow),
// subtract, multiply (random and zero operands) and divide (random, zero
// divisor, zero dividend, quotient overflow). For every operation it checks
// the final result on DO and in ACC-MD, the condition code, and the number of
// processor cycles (add 1 or 2, multiply 1 + sum(k_i+1) + 3, divide 44, the
// zero cases 2). A model of the mod-15 checker watches DO throughout: every
// perform-check must see a byte sum that is a nonzero multiple of 15, and
// every condition-code byte must be two-out-of-four.
module an_processor_tb;
  import an_pkg::*;
  import an_proc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  an_op_e      op = OP_CLA;
  logic [3:0]  di = '0;
  logic [3:0]  do_byte;
  logic        do_valid, perform_check, cc_valid, busy, done, sign_err;
  logic [31:0] acc;
  logic [7:0]  cycles;

  int checks = 0, failures = 0;
  int n_eac = 0, n_ovf = 0, n_qovf = 0, n_zdiv = 0;

  an_processor dut (.*);

  always #5 clk = ~clk;

  // ---- checker model on DO
  int unsigned bsum = 0, nbytes = 0;
  logic [3:0] last8 [8];
  logic [3:0] last_cc;
  always @(posedge clk) if (rst_n) begin
    if (do_valid) begin
      bsum += do_byte;
      for (int i = 0; i < 7; i++) last8[i] <= last8[i+1];
      last8[7] <= do_byte;
      if (perform_check) begin
        checks++;
        if (bsum % 15 != 0 || bsum == 0) begin
          failures++;
          $display("FAIL: check sum %0d not a nonzero multiple of 15 at %0t", bsum, $time);
        end
        bsum = 0;
      end
    end
    if (cc_valid) begin
      last_cc <= do_byte;
      checks++;
      if ($countones(do_byte) != 2) begin failures++; $display("FAIL: cc %b not 2-of-4", do_byte); end
    end
  end

  function automatic logic [31:0] last_result();
    return {last8[7], last8[6], last8[5], last8[4], last8[3], last8[2], last8[1], last8[0]};
  endfunction

  task automatic run(an_op_e o, logic [31:0] opd);
    @(negedge clk);
    start = 1'b1; op = o; di = opd[3:0];
    @(negedge clk);
    start = 1'b0;
    for (int i = 1; i < 8; i++) begin di = opd[i*4 +: 4]; @(negedge clk); end
    di = '0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [3:0] cc_of(logic [31:0] r);
    return (r == '1) ? CC_ZERO : (r[31] ? CC_NEG : CC_POS);
  endfunction

  function automatic logic [31:0] rnd_coded(longint lim);
    longint x;
    x = longint'($urandom_range(0, 32'(lim)));
    if ($urandom_range(0, 1) == 1) x = -x;
    if (x == 0) x = 1;
    return oc_word(15 * x);
  endfunction

  // ---- operations with expected values
  task automatic do_cla(logic [31:0] a);
    run(OP_CLA, a);
    expect_eq("cla acc", acc, a);
    expect_eq("cla result", last_result(), a);
    expect_eq("cla cycles", 32'(cycles), 1);
  endtask

  task automatic do_addsub(logic [31:0] a, logic [31:0] b, logic sub);
    longint s;
    logic [32:0] raw;
    int ecyc;
    logic ovf;
    s   = sub ? oc_val(a) - oc_val(b) : oc_val(a) + oc_val(b);
    raw = {1'b0, a} + {1'b0, sub ? ~b : b};
    ecyc = raw[32] ? 2 : 1;
    if (raw[32]) n_eac++;
    ovf = (s > 64'sd2147483647) || (s < -64'sd2147483647);
    do_cla(a);
    run(sub ? OP_SUB : OP_ADD, b);
    expect_eq("add cycles", 32'(cycles), 32'(ecyc));
    if (ovf) begin
      n_ovf++;
      expect_eq("add ovf cc", 32'(last_cc), 32'(CC_ADD_OVF));
    end else begin
      expect_eq("add acc", acc, oc_word(s));
      expect_eq("add result", last_result(), oc_word(s));
      expect_eq("add cc", 32'(last_cc), 32'(cc_of(oc_word(s))));
    end
  endtask

  task automatic do_mul(logic [31:0] a, logic [31:0] b);
    logic [31:0] e;
    int ec;
    e  = ref_mul(a, b);
    ec = (oc_val(a) == 0 || oc_val(b) == 0) ? 2 : ref_mul_cycles(b);
    do_cla(a);
    run(OP_MUL, b);
    expect_eq("mul acc", acc, e);
    expect_eq("mul result", last_result(), e);
    expect_eq("mul cc", 32'(last_cc), 32'(cc_of(e)));
    expect_eq("mul cycles", 32'(cycles), 32'(ec));
    if (ec != 2) begin
      checks++;
      if (cycles < 14 || cycles > 28) begin failures++; $display("FAIL: mul cycles %0d outside 14..28", cycles); end
    end
  endtask

  task automatic do_div(logic [31:0] dvs, logic [31:0] dvd);
    logic [31:0] e;
    do_cla(dvs);
    run(OP_DIV, dvd);
    if (oc_val(dvs) == 0) begin
      n_zdiv++;
      expect_eq("div0 cc", 32'(last_cc), 32'(CC_ZERO_DIV));
      expect_eq("div0 cycles", 32'(cycles), 2);
    end else if (oc_val(dvd) == 0) begin
      expect_eq("div zero result", acc, '1);
      expect_eq("div zero cc", 32'(last_cc), 32'(CC_ZERO));
      expect_eq("div zero cycles", 32'(cycles), 2);
    end else if (ref_cstar(dvd, dvs) >= 128'h8000_0000) begin
      n_qovf++;
      expect_eq("qovf cc", 32'(last_cc), 32'(CC_QUO_OVF));
      expect_eq("qovf acc", acc, '1);
      expect_eq("qovf cycles", 32'(cycles), 5);
    end else begin
      e = ref_div(dvd, dvs);
      expect_eq("div acc", acc, e);
      expect_eq("div result", last_result(), e);
      expect_eq("div cc", 32'(last_cc), 32'(cc_of(e)));
      expect_eq("div cycles", 32'(cycles), 44);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // clear add and add/subtract
    do_cla(oc_word(15 * 12345));
    do_addsub(oc_word(15 * 1000), oc_word(15 * 234), 1'b0);
    do_addsub(oc_word(15 * 1000), oc_word(-15 * 234), 1'b0);   // end-around carry
    do_addsub(oc_word(-15 * 1000), oc_word(15 * 1000), 1'b0);  // zero
    do_addsub(oc_word(15 * 100000000), oc_word(15 * 100000000), 1'b0); // overflow
    do_addsub(oc_word(15 * 77), oc_word(15 * 500), 1'b1);
    for (int i = 0; i < 20; i++)
      do_addsub(rnd_coded(140000000), rnd_coded(140000000), 1'($urandom_range(0, 1)));
    // multiply
    do_mul(oc_word(15 * 123456789), oc_word(15 * 98765432));
    do_mul(oc_word(-15 * 123456789), oc_word(15 * 98765432));
    do_mul(oc_word(15 * 1), oc_word(15 * 1));
    do_mul(oc_word(15 * 5), '1);                                // zero multiplier
    do_mul('1, oc_word(15 * 5));                                // zero multiplicand
    for (int i = 0; i < 40; i++) do_mul(rnd_coded(143000000), rnd_coded(143000000));
    // divide
    do_div(oc_word(15 * 100000000), oc_word(15 * 12345678));
    do_div(oc_word(-15 * 100000000), oc_word(15 * 12345678));
    do_div(oc_word(15 * 3), oc_word(15 * 1));
    do_div('1, oc_word(15 * 7));                                // zero divisor
    do_div(oc_word(15 * 7), '1);                                // zero dividend
    do_div(oc_word(15 * 1000), oc_word(15 * 100000));           // overflow
    for (int i = 0; i < 40; i++) begin
      logic [31:0] dv;
      dv = rnd_coded(143000000);
      do_div(dv, oc_word(oc_val(dv) / longint'($urandom_range(3, 1000)) / 15 * 15 + 15));
    end
    checks++;
    if (n_eac == 0 || n_ovf == 0 || n_qovf == 0 || n_zdiv == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised eac=%0d ovf=%0d qovf=%0d zdiv=%0d", n_eac, n_ovf, n_qovf, n_zdiv);
    end
    checks++;
    if (sign_err) begin failures++; $display("FAIL: sign circuits disagree"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
