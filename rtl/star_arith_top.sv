// star_arith_top: the two error-coded arithmetic units side by side.
//
// Left half: the AN-coded (A = 15) byte-serial processor with one external
// mod-15 Checker listening on its data-output lines. Every numeric DO byte is
// added into the check sum, perform-check closes a result, and the
// condition-code byte goes through the 2/4 test. chk_fault / chk_cc_fault
// report the Checker's verdicts (registered, one clock after the byte);
// chk_done pulses after each check. The check sum is cleared when an
// operation starts.
//
// Right half: the inverse-residue (two's complement) processor, whose main
// and check processors are linked only by the correction signal C_n; it is
// combinational and has its own ports.
//
// The document places the Checker outside the processor with one copy per
// voted test-and-repair processor; a single copy is built here.
module star_arith_top
  import an_pkg::*;
#(
  parameter int unsigned IR_K = 8,
  parameter int unsigned IR_A = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // AN-code processor
  input  logic                 an_start,
  input  an_op_e               an_op,
  input  logic [3:0]           an_di,
  output logic [3:0]           an_do,
  output logic                 an_do_valid,
  output logic                 an_perform_check,
  output logic                 an_cc_valid,
  output logic                 an_busy,
  output logic                 an_done,
  output logic [31:0]          an_acc,
  output logic [7:0]           an_cycles,
  output logic                 an_sign_err,
  output logic                 chk_fault,
  output logic                 chk_cc_fault,
  output logic                 chk_done,
  // inverse-residue processor
  input  logic                 ir_sub,
  input  logic [IR_K*IR_A-1:0] ir_x,
  input  logic [IR_K*IR_A-1:0] ir_y,
  input  logic [IR_A-1:0]      ir_x_chk,
  input  logic [IR_A-1:0]      ir_y_chk,
  output logic [IR_K*IR_A-1:0] ir_z,
  output logic [IR_A-1:0]      ir_z_chk,
  output logic                 ir_error,
  output logic                 ir_cn
);

  an_processor u_an (
    .clk, .rst_n,
    .start(an_start), .op(an_op), .di(an_di),
    .do_byte(an_do), .do_valid(an_do_valid), .perform_check(an_perform_check),
    .cc_valid(an_cc_valid), .busy(an_busy), .done(an_done),
    .acc(an_acc), .cycles(an_cycles), .sign_err(an_sign_err)
  );

  an_checker #(.A_BITS(4)) u_checker (
    .clk, .rst_n,
    .bus(an_do),
    .reset(an_start && !an_busy),
    .add(an_do_valid),
    .check(an_perform_check),
    .cc_test(an_cc_valid),
    .sum_status(chk_fault),
    .cc_status(chk_cc_fault),
    .check_done(chk_done)
  );

  ir_processor #(.K(IR_K), .A(IR_A)) u_ir (
    .sub(ir_sub), .x(ir_x), .y(ir_y), .x_chk(ir_x_chk), .y_chk(ir_y_chk),
    .z(ir_z), .z_chk(ir_z_chk), .error(ir_error), .cn(ir_cn)
  );

endmodule
