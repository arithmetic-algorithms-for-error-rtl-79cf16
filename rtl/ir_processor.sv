// ir_processor: inverse-residue code arithmetic processor (two's complement).
//
// Operands X, Y go to the main processor (modulo 2^n, n = K*A), their check
// symbols X'', Y'' to the check processor (modulo 2^A - 1). The only link
// between the two is the correction signal C_n, the main adder's carry out.
// The checker compares the residue of the result Z with the check result Z''
// and raises error on disagreement. The document shows that an error that
// creates or suppresses C_n is still detected. Combinational; sub is the
// algorithm command (0 add, 1 subtract).
//
// The structure is the document's; n = 32 (K = 8) is this design's choice.
module ir_processor #(
  parameter int unsigned K = 8,
  parameter int unsigned A = 4
) (
  input  logic           sub,
  input  logic [K*A-1:0] x,
  input  logic [K*A-1:0] y,
  input  logic [A-1:0]   x_chk,
  input  logic [A-1:0]   y_chk,
  output logic [K*A-1:0] z,
  output logic [A-1:0]   z_chk,
  output logic           error,
  output logic           cn
);
  ir_main_proc #(.K(K), .A(A)) u_main (.sub(sub), .x(x), .y(y), .z(z), .cn(cn));
  ir_check_proc #(.A(A)) u_chk (.sub(sub), .x_chk(x_chk), .y_chk(y_chk), .cn(cn), .z_chk(z_chk));
  ir_checker #(.K(K), .A(A)) u_ck (.z(z), .z_chk(z_chk), .error(error));
endmodule
