// star_arith_top_tb: end-to-end test of both units at their default sizes.
//
// The AN half runs sequences of clear add, add, subtract, multiply and divide
// on random and chosen operands; results, condition codes and cycle counts
// are compared with independent integer arithmetic, and the on-chip Checker
// must pass every perform-check and every condition-code byte. The test
// counts how often each mechanism of the processor occurred (end-around carry
// second cycle, additive overflow, one- and two-term multiplier steps, steps
// with no addition, zero operands, remainder restoration in the shift cycle,
// the positive and negative last quotient digit, quotient overflow, zero
// divisor) and fails if any never did. The inverse-residue half runs random
// adds and subtracts, with C_n both 0 and 1, and with corrupted check symbols
// that must raise the error signal.
module star_arith_top_tb;
  import an_pkg::*;
  import an_proc_ref_pkg::*;
  import ir_ref_pkg::*;

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
  logic [3:0]  ir_x_chk = '0, ir_y_chk = '0, ir_z_chk;
  logic        ir_error, ir_cn;

  star_arith_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_eac = 0, n_aovf = 0, n_two = 0, n_noadd = 0, n_mzero = 0, n_restore = 0;
  int n_q0pos = 0, n_q0neg = 0, n_qovf = 0, n_zdiv = 0, n_zdvd = 0, n_cn = 0, n_irerr = 0;

  // Checker verdicts and mechanism counters
  logic [4:0] prev_ph;
  logic [3:0] last8 [8];
  logic [3:0] last_cc;
  always @(posedge clk) if (rst_n) begin
    if (chk_done) begin
      checks++;
      if (chk_fault) begin failures++; $display("FAIL: checker fault at %0t", $time); end
    end
    if (an_do_valid) begin
      for (int i = 0; i < 7; i++) last8[i] <= last8[i+1];
      last8[7] <= an_do;
    end
    if (an_cc_valid) last_cc <= an_do;
    if (dut.u_an.end_cyc) begin
      prev_ph <= 5'(dut.u_an.ph);
      case (dut.u_an.ph)
        P_MADD:   if (dut.u_an.term) n_two++;
        P_MCON:   if (prev_ph != 5'(P_MADD)) n_noadd++;
        P_DSHIFT: if (dut.u_an.pend) n_restore++;
        P_DQ0A:   if (dut.u_an.trial_ok) n_q0pos++; else if (dut.u_an.n_res != 0) n_q0neg++;
        default: ;
      endcase
    end
  end
  // The 2/4 verdict is registered on the clock that takes the code byte;
  // it is read half a clock later, once per code byte.
  logic cc_q = 1'b0;
  always @(posedge clk) cc_q <= rst_n && an_cc_valid;
  always @(negedge clk) if (rst_n && cc_q) begin
    checks++;
    if (chk_cc_fault) begin failures++; $display("FAIL: 2/4 test failed"); end
  end

  function automatic logic [31:0] last_result();
    return {last8[7], last8[6], last8[5], last8[4], last8[3], last8[2], last8[1], last8[0]};
  endfunction

  task automatic run(an_op_e o, logic [31:0] opd);
    @(negedge clk);
    an_start = 1'b1; an_op = o; an_di = opd[3:0];
    @(negedge clk);
    an_start = 1'b0;
    for (int i = 1; i < 8; i++) begin an_di = opd[i*4 +: 4]; @(negedge clk); end
    while (!an_done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL: %s got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [3:0] cc_of(logic [31:0] r);
    return (r == '1) ? CC_ZERO : (r[31] ? CC_NEG : CC_POS);
  endfunction

  function automatic logic [31:0] rnd_coded(longint lim);
    longint x;
    x = longint'($urandom_range(1, 32'(lim)));
    if ($urandom_range(0, 1) == 1) x = -x;
    return oc_word(15 * x);
  endfunction

  task automatic addsub(logic [31:0] a, logic [31:0] b, logic sub);
    longint s; logic [32:0] raw;
    s   = sub ? oc_val(a) - oc_val(b) : oc_val(a) + oc_val(b);
    raw = {1'b0, a} + {1'b0, sub ? ~b : b};
    run(OP_CLA, a);
    expect_eq("clear add", an_acc, a);
    run(sub ? OP_SUB : OP_ADD, b);
    expect_eq("add cycles", 32'(an_cycles), raw[32] ? 2 : 1);
    if (raw[32]) n_eac++;
    if (s > 64'sd2147483647 || s < -64'sd2147483647) begin
      n_aovf++;
      expect_eq("overflow cc", 32'(last_cc), 32'(CC_ADD_OVF));
    end else begin
      expect_eq("sum", last_result(), oc_word(s));
      expect_eq("sum acc", an_acc, oc_word(s));
      expect_eq("sum cc", 32'(last_cc), 32'(cc_of(oc_word(s))));
    end
  endtask

  task automatic mul(logic [31:0] a, logic [31:0] b);
    logic [31:0] e; int ec;
    e  = ref_mul(a, b);
    ec = (oc_val(a) == 0 || oc_val(b) == 0) ? 2 : ref_mul_cycles(b);
    if (ec == 2) n_mzero++;
    run(OP_CLA, a);
    run(OP_MUL, b);
    expect_eq("product", last_result(), e);
    expect_eq("product acc", an_acc, e);
    expect_eq("product cc", 32'(last_cc), 32'(cc_of(e)));
    expect_eq("multiply cycles", 32'(an_cycles), 32'(ec));
  endtask

  task automatic div(logic [31:0] dvs, logic [31:0] dvd);
    run(OP_CLA, dvs);
    run(OP_DIV, dvd);
    if (oc_val(dvs) == 0) begin
      n_zdiv++;
      expect_eq("zero divisor cc", 32'(last_cc), 32'(CC_ZERO_DIV));
      expect_eq("zero divisor cycles", 32'(an_cycles), 2);
    end else if (oc_val(dvd) == 0) begin
      n_zdvd++;
      expect_eq("zero dividend", an_acc, '1);
      expect_eq("zero dividend cycles", 32'(an_cycles), 2);
    end else if (ref_cstar(dvd, dvs) >= 128'h8000_0000) begin
      n_qovf++;
      expect_eq("quotient overflow cc", 32'(last_cc), 32'(CC_QUO_OVF));
      expect_eq("quotient overflow cycles", 32'(an_cycles), 5);
    end else begin
      expect_eq("quotient", last_result(), ref_div(dvd, dvs));
      expect_eq("quotient acc", an_acc, ref_div(dvd, dvs));
      expect_eq("quotient cc", 32'(last_cc), 32'(cc_of(ref_div(dvd, dvs))));
      expect_eq("divide cycles", 32'(an_cycles), 44);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- AN-code processor
    addsub(oc_word(15 * 1000), oc_word(-15 * 234), 1'b0);
    addsub(oc_word(15 * 100000000), oc_word(-15 * 100000000), 1'b1);
    for (int i = 0; i < 30; i++)
      addsub(rnd_coded(143000000), rnd_coded(143000000), 1'($urandom_range(0, 1)));
    mul(oc_word(15 * 5), '1);
    mul(oc_word(15 * 123456789), oc_word(15 * 16));
    for (int i = 0; i < 60; i++) mul(rnd_coded(143000000), rnd_coded(143000000));
    div('1, oc_word(15 * 9));
    div(oc_word(15 * 9), '1);
    div(oc_word(15 * 1000), oc_word(15 * 900));
    for (int i = 0; i < 120; i++) begin
      logic [31:0] dv; longint q;
      dv = rnd_coded(143000000);
      q  = oc_val(dv) / longint'($urandom_range(31, 100000)) / 15;
      if (q == 0) q = 1;
      if ($urandom_range(0, 1) == 1) q = -q;
      div(dv, oc_word(15 * q));
    end

    // ---- inverse-residue processor
    for (int i = 0; i < 2000; i++) begin
      longint unsigned s;
      ir_x = $urandom(); ir_y = $urandom(); ir_sub = 1'(i % 2);
      ir_x_chk = inv_res(ir_x); ir_y_chk = inv_res(ir_y);
      #1;
      s = ir_sub ? longint'(ir_x) + longint'(32'(~ir_y)) + 1 : longint'(ir_x) + longint'(ir_y);
      if (ir_cn) n_cn++;
      checks++;
      if (ir_z != 32'(s) || ir_error || (ir_z_chk % 15) != (inv_res(32'(s)) % 15)) begin
        failures++; $display("FAIL: inverse-residue %h %h", ir_x, ir_y);
      end
      ir_y_chk = 4'((int'(ir_y_chk) + $urandom_range(1, 14) - 1) % 15 + 1);
      #1;
      checks++;
      if (ir_error) n_irerr++; else begin failures++; $display("FAIL: corrupted check symbol not detected"); end
    end

    $display("mechanisms: eac=%0d add_ovf=%0d two_term=%0d no_add_step=%0d mul_zero=%0d restore=%0d q0_pos=%0d q0_neg=%0d quo_ovf=%0d zero_div=%0d zero_dvd=%0d cn=%0d ir_err=%0d",
             n_eac, n_aovf, n_two, n_noadd, n_mzero, n_restore, n_q0pos, n_q0neg, n_qovf, n_zdiv, n_zdvd, n_cn, n_irerr);
    checks++;
    if (n_eac == 0 || n_aovf == 0 || n_two == 0 || n_noadd == 0 || n_mzero == 0 || n_restore == 0 ||
        n_q0pos == 0 || n_q0neg == 0 || n_qovf == 0 || n_zdiv == 0 || n_zdvd == 0 || n_cn == 0 || n_irerr == 0) begin
      failures++; $display("FAIL: a mechanism never occurred");
    end
    checks++;
    if (an_sign_err) begin failures++; $display("FAIL: sign circuits disagree"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
