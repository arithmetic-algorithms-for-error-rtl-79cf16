// an_checker: external Checker for the AN-code processor's data output.
//
// Every numeric byte on the 4-bit bus with add high is added into a 4-bit
// check sum by a modulo-15 adder (4-bit sum with end-around carry). The byte
// that comes with check high is added too and the completed sum is inspected:
// a properly AN-coded result (a multiple of 15 other than the all-zero word)
// leaves 1111, anything else sets sum_status. The check sum then clears for
// the next result; reset clears it at any time. A byte with cc_test high is a
// condition-code byte: the 2/4 test sets cc_status unless exactly two of its
// four bits are one. Both status outputs and check_done are registered, one
// clock after the byte.
//
// The adder, accumulator, RESET/ADD controls and the 2/4 test follow the
// document; clearing the sum after each check is this design's choice.
module an_checker #(
  parameter int unsigned A_BITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [A_BITS-1:0] bus,
  input  logic              reset,
  input  logic              add,
  input  logic              check,
  input  logic              cc_test,
  output logic              sum_status,
  output logic              cc_status,
  output logic              check_done
);
  logic [A_BITS-1:0] csum, nsum;
  logic [A_BITS:0]   s;

  always_comb begin
    s    = {1'b0, csum} + {1'b0, bus};
    nsum = s[A_BITS-1:0] + {{(A_BITS-1){1'b0}}, s[A_BITS]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csum       <= '0;
      sum_status <= 1'b0;
      cc_status  <= 1'b0;
      check_done <= 1'b0;
    end else begin
      check_done <= 1'b0;
      if (reset) begin
        csum <= '0;
      end else if (add) begin
        if (check) begin
          sum_status <= (nsum != '1);
          check_done <= 1'b1;
          csum       <= '0;
        end else begin
          csum <= nsum;
        end
      end
      if (cc_test) cc_status <= ($countones(bus) != 2);
    end
  end
endmodule
