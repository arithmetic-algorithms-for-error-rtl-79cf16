// an_pkg: shared types, constants and one's complement helpers for the
// AN-coded (A = 15) byte-serial arithmetic processor.
//
// Numbers are one's complement words. Zero is normally written as all ones
// (the all-zero word is not a properly coded number, because its mod-15 check
// sum is 0000 rather than 1111). Internal partial results are 40 bits wide
// (10 bytes): the 8-byte registers, the PR extension byte and one guard byte.
//
// The condition-code byte uses a two-out-of-four code. The six code words are
// assigned to the six outcomes (three singularities, three result signs); the
// assignment itself is this design's choice.
package an_pkg;

  localparam int unsigned ABITS = 4;   // a: bits per byte, A = 2^a - 1 = 15
  localparam int unsigned WBITS = 40;  // internal partial result width

  typedef enum logic [2:0] {
    OP_CLA = 3'd0,  // clear add
    OP_ADD = 3'd1,
    OP_SUB = 3'd2,
    OP_MUL = 3'd3,
    OP_DIV = 3'd4
  } an_op_e;

  // Sequencer phases; each lasts one or more processor cycles.
  //   ADD1/ADD2        : byte-serial add pass, end-around-carry pass
  //   MLOAD .. MT3     : multiply load, zero result, addition, contraction and
  //                      shift, divide by 15, send N, add roundoff constant
  //   DLOAD .. DT2     : divide load, zero result, zero divisor, times 15,
  //                      shift, quotient bit, last digit (Q0A..Q0D),
  //                      quotient overflow, quotient to MQ, quotient to ACC-MD
  typedef enum logic [4:0] {
    P_IDLE, P_ADD1, P_ADD2,
    P_MLOAD, P_MZERO, P_MADD, P_MCON, P_MT1, P_MT2, P_MT3,
    P_DLOAD, P_DZRES, P_DZDIV, P_DMUL15, P_DSHIFT, P_DBIT,
    P_DQ0A, P_DQ0B, P_DQ0C, P_DQ0D, P_DOVF, P_DT1, P_DT2
  } an_phase_e;

  // two-out-of-four condition codes
  localparam logic [3:0] CC_POS      = 4'b0011;
  localparam logic [3:0] CC_ZERO     = 4'b0101;
  localparam logic [3:0] CC_NEG      = 4'b0110;
  localparam logic [3:0] CC_ADD_OVF  = 4'b1001;
  localparam logic [3:0] CC_QUO_OVF  = 4'b1010;
  localparam logic [3:0] CC_ZERO_DIV = 4'b1100;

  typedef logic [WBITS-1:0] word_t;

  // One's complement (mod 2^40 - 1) addition: raw sum and end-around carry.
  typedef struct packed {
    logic  eac;
    word_t raw;
  } oc_sum_t;

  function automatic oc_sum_t oc_add_raw(word_t a, word_t b);
    logic [WBITS:0] s;
    oc_sum_t r;
    s     = {1'b0, a} + {1'b0, b};
    r.eac = s[WBITS];
    r.raw = s[WBITS-1:0];
    return r;
  endfunction

  // Completed one's complement sum (end-around carry added back in).
  function automatic word_t oc_add(word_t a, word_t b);
    oc_sum_t r;
    r = oc_add_raw(a, b);
    return r.raw + word_t'(r.eac);
  endfunction

  // Sign-extend a 32-bit one's complement word to 40 bits.
  function automatic word_t sext32(logic [31:0] x);
    return {{(WBITS-32){x[31]}}, x};
  endfunction

  // Multiply by 2^j (j = 0..3): shift left, vacated bits take the sign.
  function automatic word_t oc_shl(word_t x, logic [1:0] j);
    word_t r;
    r = x;
    for (int i = 0; i < 3; i++)
      if (i < int'(j)) r = {r[WBITS-2:0], r[WBITS-1]};
    return r;
  endfunction

  // True if x is negative and not minus zero.
  function automatic logic oc_neg(word_t x);
    return x[WBITS-1] && (x != '1);
  endfunction

  // One's complement zero test (either representation).
  function automatic logic oc_zero32(logic [31:0] x);
    return (x == '1) || (x == '0);
  endfunction

endpackage
