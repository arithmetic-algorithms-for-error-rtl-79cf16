// an_processor: byte-serial radix-16 arithmetic processor for AN-coded
// operands (A = 15, 32-bit coded words 15X, one's complement).
//
// Every number the processor accepts or delivers is a multiple of 15, so an
// external mod-15 checker on the output lines can test each result. Five
// operations are executed: clear add, add, subtract, multiply and divide.
// Time is counted in processor cycles of CYCLE_BYTES (10) byte times; one
// byte time is one clock.
//
// Interface and timing
//   start/op   : start is a one-clock pulse in IDLE; op is sampled with it. The
//                start clock is byte time 0 of the first cycle.
//   di         : the operand, 8 bytes, least significant first, in byte times
//                0..7 of the first cycle (clear add, add, subtract, and the
//                load cycle of multiply and divide).
//   do_byte    : results, least significant byte first. do_valid marks the
//                numeric bytes that go to the checker, perform_check the last
//                byte of a result that must check, cc_valid the two-out-of-four
//                condition-code byte that follows every final result.
//   done       : one clock after the last byte time of the operation; cycles
//                then holds the number of processor cycles used.
//
// Clear add, add and subtract are done byte by byte through the three-input
// adder: the ACC-MD shift register rotates one byte per clock against the DI
// byte, the sum byte enters ACC-MD and the adder output buffer AOB, and the
// carry waits in the carry-byte register CBR. The sum leaves on DO one byte
// time later. A sum with an end-around carry (eac) sends the carry byte with
// perform-check and takes a second cycle that adds the eac into ACC-MD.
//
// Multiply (multiplicand already in ACC-MD): one load cycle shifts the
// multiplier into MQ; zero operands end after one more cycle. Otherwise eight
// radix-16 steps follow, each with one addition cycle per nonzero recoded
// digit (multiples +-1, +-2, +-4, +-8 of ACC-MD added to PR) and one
// contraction-and-shift cycle that subtracts 15*Ni so the partial product is
// a multiple of 16, shifts it one byte right and stores Ni in MQ. Three
// terminal cycles divide PR by 15, send the correction bytes N, and add the
// roundoff constant. Cycles: 1 + sum(k_i + 1) + 3, 14..28.
//
// Divide (divisor already in ACC-MD): load cycle (dividend into PR, sign
// record, zero tests), a cycle that multiplies the dividend magnitude by 15,
// eight steps of five cycles (shift, then four non-restoring bit cycles with
// 8, 4, 2, 1 times the divisor; the eighth step instead fixes the last digit
// from the mod-15 residue of the others), and two terminal cycles: 44 cycles.
// Quotient overflow is found in the second cycle of the first step and ends
// the operation one cycle later with an all-ones (zero) pseudoresult.
//
// Every adder result of multiply and divide is streamed on DO in the cycle
// that forms it and checks on its own. The algorithms, cycle budgets and
// output order follow the document. This design's own choices: the adder is
// used byte-serially only for clear add, add and subtract, while the wider
// multiply and divide cycles evaluate one whole adder pass per cycle (word
// level) and stream its bytes during the cycle; the eac of those passes is
// added at once and sent as the tenth byte; PR is 40 bits (PR, PRE and a guard
// byte); the divide works on magnitudes with the sign applied at the end; the
// condition-code assignment; and zero results are written as all ones.
module an_processor
  import an_pkg::*;
#(
  parameter int unsigned CYCLE_BYTES = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  an_op_e      op,
  input  logic [3:0]  di,
  output logic [3:0]  do_byte,
  output logic        do_valid,
  output logic        perform_check,
  output logic        cc_valid,
  output logic        busy,
  output logic        done,
  output logic [31:0] acc,
  output logic [7:0]  cycles,
  output logic        sign_err
);

  localparam int unsigned LAST_T = CYCLE_BYTES - 1;
  localparam logic [31:0] ONES32 = '1;

  // ---------------------------------------------------------------- state
  an_phase_e      phase;
  an_op_e      op_r;
  logic [3:0]  t;          // byte time within the cycle
  logic [31:0] acc_r;      // ACC-MD
  word_t       pr;         // PR with PRE and guard byte
  logic [31:0] mq;         // MQ
  logic [3:0]  aob;        // adder output buffer
  logic        cbr;        // carry byte register (carry bit used here)
  logic        sa, sbs, rsign, zones;   // add: operand signs, result sign, all-ones
  logic [2:0]  step;
  logic        term;       // multiply: second recoded term pending
  logic        rcarry;     // multiply: recoder carry into the current byte
  logic signed [5:0] rconst;
  logic [1:0]  bitj;       // divide: bit within the quotient byte
  logic        lastbit, pend;
  logic signed [4:0] q0r;
  logic [7:0]  cyc_cnt;

  // ------------------------------------------- effective phase / byte time
  an_phase_e ph;
  an_op_e opc;
  logic [3:0] tt;
  logic   end_cyc;

  function automatic an_phase_e first_phase(an_op_e o);
    case (o)
      OP_MUL:  return P_MLOAD;
      OP_DIV:  return P_DLOAD;
      default: return P_ADD1;
    endcase
  endfunction

  always_comb begin
    if (phase == P_IDLE && start) begin
      ph  = first_phase(op);
      opc = op;
      tt  = '0;
    end else begin
      ph  = phase;
      opc = op_r;
      tt  = t;
    end
    end_cyc = (ph != P_IDLE) && (tt == 4'(LAST_T));
  end

  // --------------------------------------------------- byte-serial adder
  logic [3:0] a_byte, b_byte, cb_in, sb, cb;

  always_comb begin
    a_byte = (ph == P_ADD1 && opc == OP_CLA) ? 4'h0 : acc_r[3:0];
    if (ph == P_ADD2)       b_byte = 4'h0;
    else if (opc == OP_SUB) b_byte = ~di;
    else                    b_byte = di;
    if (tt == 0) cb_in = (ph == P_ADD2) ? 4'h1 : 4'h0;
    else         cb_in = {3'b0, cbr};
  end

  an_adder3 #(.A_BITS(4)) u_add3 (.a(a_byte), .b(b_byte), .cb_in(cb_in), .sb(sb), .cb(cb));

  // --------------------------------------------------------- sign circuit
  logic sc_load, acc_neg, opd_neg, res_neg;

  assign sc_load = end_cyc && (ph == P_MLOAD || ph == P_DLOAD);

  an_sign_ckt u_sign (
    .clk, .rst_n, .load(sc_load),
    .acc_msb(acc_r[31]),
    .opd_msb(ph == P_DLOAD ? pr[31] : mq[31]),
    .acc_neg, .opd_neg, .res_neg, .err(sign_err)
  );

  // ---------------------------------------------------- multiply helpers
  logic       r0_t0_en, r0_t0_neg, r0_t1_en, r0_t1_neg, r0_cout;
  logic [1:0] r0_t0_sh, r0_t1_sh, r0_k;
  logic [1:0] r1_k;
  logic       rc_in;

  assign rc_in = (ph == P_MLOAD) ? mq[31] : rcarry;

  // recoder for the current multiplier byte
  an_recoder u_rec0 (
    .byte_in(mq[3:0]), .carry_in(rc_in), .top(step == 3'd7),
    .t0_en(r0_t0_en), .t0_neg(r0_t0_neg), .t0_shift(r0_t0_sh),
    .t1_en(r0_t1_en), .t1_neg(r0_t1_neg), .t1_shift(r0_t1_sh),
    .k(r0_k), .carry_out(r0_cout)
  );
  // look-ahead recoder for the next byte (decides whether its step adds)
  an_recoder u_rec1 (
    .byte_in(mq[7:4]), .carry_in(r0_cout), .top(step == 3'd6),
    .t0_en(), .t0_neg(), .t0_shift(), .t1_en(), .t1_neg(), .t1_shift(),
    .k(r1_k), .carry_out()
  );

  logic [35:0] h36;
  an_div15 #(.N(36), .A(4)) u_div15 (.y(pr[35:0]), .z(h36));

  logic [31:0]       rk_low;
  logic              r_up;
  logic signed [5:0] r_const;
  an_roundoff #(.NBITS(32)) u_round (.n_corr(mq), .k_low(rk_low), .round_up(r_up), .add_const(r_const));

  // ------------------------------------------------------ divide helpers
  logic [31:0] xmag;
  logic [35:0] x15;
  an_mul15 #(.N(36), .A(4)) u_mul15 (.z(xmag), .y(x15));

  logic [7:0]        dsum;
  logic [3:0]        n_res, pos_q0;
  logic signed [4:0] q0_sel;
  logic              trial_ok;
  an_q0_select u_q0 (.digit_sum(dsum), .trial_ok(trial_ok), .n_res(n_res), .pos_q0(pos_q0), .q0(q0_sel));

  // ----------------------------------------------- word-level cycle values
  word_t      dsh_r, dsh, d40, mul_m, trial, dstep, dq0b, pc, pn, madd_next, mt3_w;
  oc_sum_t    madd;
  logic       t_en, t_neg;
  logic [1:0] t_sh;
  logic [3:0] vlow, ni;
  logic       dbit, dsub;
  logic [31:0] mres, qfin, dmag;

  // stream of the current cycle
  word_t      st_word;
  logic [3:0] st_len;
  logic       st_chk, st_cc_en;
  logic [3:0] st_cc;

  always_comb begin
    // multiply: current term
    t_en  = term ? r0_t1_en  : r0_t0_en;
    t_neg = term ? r0_t1_neg : r0_t0_neg;
    t_sh  = term ? r0_t1_sh  : r0_t0_sh;
    mul_m = oc_shl(sext32(acc_r), t_sh);
    if (t_neg) mul_m = ~mul_m;
    madd      = oc_add_raw(pr, mul_m);
    madd_next = madd.raw + word_t'(madd.eac);

    // multiply: contraction and shift, P = (P* - 15 Ni) / 16
    vlow = pr[3:0] + {3'b0, pr[WBITS-1]};
    ni   = 4'(-vlow);
    pc   = oc_add(pr, ~word_t'(15 * ni));
    pn   = {{4{pc[WBITS-1]}}, pc[WBITS-1:4]};

    // multiply: rounded result
    mt3_w = oc_add(sext32(pr[31:0]),
                   rconst < 0 ? ~word_t'(unsigned'(-rconst)) : word_t'(unsigned'(rconst)));
    mres  = (mt3_w[31:0] == '0) ? ONES32 : mt3_w[31:0];

    // divide
    dmag  = acc_neg ? ~acc_r : acc_r;
    d40   = word_t'(dmag);
    xmag  = opd_neg ? ~pr[31:0] : pr[31:0];
    dsub  = (bitj == 2'd3) || lastbit;
    dstep = oc_add(pr, dsub ? ~(d40 << bitj) : (d40 << bitj));
    dbit  = !oc_neg(dstep);
    dsum  = '0;
    for (int i = 1; i < 8; i++) dsum = dsum + 8'(mq[(i-1)*4 +: 4]);
    trial    = oc_add(pr, ~(d40 * word_t'(pos_q0)));
    trial_ok = !oc_neg(trial);
    dq0b     = (q0r < 0) ? oc_add(pr, d40 * word_t'(unsigned'(-q0r))) : pr;
    dsh_r    = pend ? oc_add(pr, d40) : pr;
    dsh      = {dsh_r[WBITS-5:0], {4{dsh_r[WBITS-1]}}};
    qfin     = (mq == '0) ? ONES32 : (res_neg ? ~mq : mq);

    // what goes out on DO this cycle
    st_word  = '0;
    st_len   = '0;
    st_chk   = 1'b0;
    st_cc_en = 1'b0;
    st_cc    = CC_ZERO;
    unique case (ph)
      P_MZERO, P_DZRES: begin
        st_word = word_t'(ONES32); st_len = 4'd8; st_chk = 1'b1; st_cc_en = 1'b1; st_cc = CC_ZERO;
      end
      P_DOVF: begin
        st_word = word_t'(ONES32); st_len = 4'd8; st_chk = 1'b1; st_cc_en = 1'b1; st_cc = CC_QUO_OVF;
      end
      P_DZDIV: begin
        st_word = word_t'(acc_r); st_len = 4'd8; st_chk = 1'b1; st_cc_en = 1'b1; st_cc = CC_ZERO_DIV;
      end
      P_MADD: begin
        st_word = {3'b0, madd.eac, madd.raw[35:0]}; st_len = 4'd10; st_chk = 1'b1;
      end
      P_MCON: begin
        st_word = {4'b0, pn[35:0]}; st_len = 4'd10; st_chk = 1'b1;
      end
      P_MT1: begin
        st_word = word_t'(h36[31:0]); st_len = 4'd8;
      end
      P_MT2: begin
        st_word = word_t'(mq); st_len = 4'd8; st_chk = 1'b1;
      end
      P_MT3: begin
        st_word = word_t'(mres); st_len = 4'd8; st_chk = 1'b1; st_cc_en = 1'b1;
        st_cc = (mres == ONES32) ? CC_ZERO : (mres[31] ? CC_NEG : CC_POS);
      end
      P_DMUL15: begin
        st_word = {4'b0, x15}; st_len = 4'd10; st_chk = 1'b1;
      end
      P_DSHIFT: begin
        st_word = dsh;
        st_len = 4'd10; st_chk = 1'b1;
      end
      P_DBIT: begin
        st_word = dstep; st_len = 4'd10; st_chk = 1'b1;
      end
      P_DQ0A: begin
        st_word = trial; st_len = 4'd10; st_chk = 1'b1;
      end
      P_DQ0B: begin
        st_word = dq0b; st_len = 4'd10; st_chk = 1'b1;
      end
      P_DQ0C, P_DQ0D: begin
        st_word = pr; st_len = 4'd10; st_chk = 1'b1;
      end
      P_DT2: begin
        st_word = word_t'(mq); st_len = 4'd8; st_chk = 1'b1; st_cc_en = 1'b1;
        st_cc = (mq == ONES32) ? CC_ZERO : (mq[31] ? CC_NEG : CC_POS);
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------- output lines
  logic [3:0] add_cc;

  always_comb begin
    logic ovf;
    ovf    = (sa == sbs) && (rsign != sa);
    add_cc = ovf ? CC_ADD_OVF : (zones ? CC_ZERO : (rsign ? CC_NEG : CC_POS));

    do_byte       = '0;
    do_valid      = 1'b0;
    perform_check = 1'b0;
    cc_valid      = 1'b0;
    if (ph == P_ADD1 || ph == P_ADD2) begin
      if (tt >= 4'd1 && tt <= 4'd8) begin
        do_byte  = aob;
        do_valid = 1'b1;
        if (tt == 4'd8) perform_check = (ph == P_ADD2) || !cbr;
      end else if (tt == 4'd9) begin
        if (ph == P_ADD1 && cbr) begin
          do_byte = 4'h1; do_valid = 1'b1; perform_check = 1'b1;
        end else begin
          do_byte = add_cc; cc_valid = 1'b1;
        end
      end
    end else if (ph != P_IDLE) begin
      if (tt < st_len) begin
        do_byte  = 4'(st_word >> (4 * tt));
        do_valid = 1'b1;
        perform_check = st_chk && (tt == st_len - 4'd1);
      end else if (st_cc_en && tt == st_len) begin
        do_byte  = st_cc;
        cc_valid = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= P_IDLE;
      op_r    <= OP_CLA;
      t       <= '0;
      acc_r   <= '1;
      pr      <= '0;
      mq      <= '0;
      aob     <= '0;
      cbr     <= 1'b0;
      sa      <= 1'b0;
      sbs     <= 1'b0;
      rsign   <= 1'b0;
      zones   <= 1'b0;
      step    <= '0;
      term    <= 1'b0;
      rcarry  <= 1'b0;
      rconst  <= '0;
      bitj    <= '0;
      lastbit <= 1'b0;
      pend    <= 1'b0;
      q0r     <= '0;
      cyc_cnt <= '0;
      cycles  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ph != P_IDLE) begin
        if (phase == P_IDLE) begin
          op_r    <= opc;
          cyc_cnt <= 8'd1;
          step    <= '0;
        end else if (end_cyc) begin
          cyc_cnt <= cyc_cnt + 8'd1;
        end
        t     <= end_cyc ? 4'd0 : tt + 4'd1;
        phase <= ph;

        // ---- byte-serial phases
        if (ph == P_ADD1 || ph == P_ADD2) begin
          if (tt <= 4'd7) begin
            acc_r <= {sb, acc_r[31:4]};
            aob   <= sb;
            cbr   <= cb[0];
            zones <= ((tt == 0) ? 1'b1 : zones) && (sb == 4'hF);
            if (tt == 0 && ph == P_ADD1) sa <= (opc == OP_CLA) ? 1'b0 : acc_r[31];
            if (tt == 7) begin
              rsign <= sb[3];
              if (ph == P_ADD1) sbs <= b_byte[3];
            end
          end
        end
        if (ph == P_MLOAD && tt <= 4'd7) mq <= {di, mq[31:4]};
        if (ph == P_DLOAD && tt <= 4'd7) pr[31:0] <= {di, pr[31:4]};

        // ---- end of a processor cycle
        if (end_cyc) begin
          unique case (ph)
            P_ADD1: begin
              if (cbr) phase <= P_ADD2;
              else begin phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end
            end
            P_ADD2: begin phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end

            P_MLOAD: begin
              pr     <= '0;
              step   <= '0;
              term   <= 1'b0;
              rcarry <= mq[31];
              if (oc_zero32(acc_r) || oc_zero32(mq)) phase <= P_MZERO;
              else phase <= (r0_k == 2'd0) ? P_MCON : P_MADD;
            end
            P_MZERO: begin acc_r <= ONES32; phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end
            P_MADD: begin
              pr <= madd_next;
              if (!term && r0_t1_en) term <= 1'b1;
              else begin term <= 1'b0; phase <= P_MCON; end
            end
            P_MCON: begin
              pr     <= pn;
              mq     <= {ni, mq[31:4]};
              rcarry <= r0_cout;
              step   <= step + 3'd1;
              if (step == 3'd7) phase <= P_MT1;
              else phase <= (r1_k == 2'd0) ? P_MCON : P_MADD;
            end
            P_MT1: begin pr <= sext32(h36[31:0]); phase <= P_MT2; end
            P_MT2: begin rconst <= r_const; phase <= P_MT3; end
            P_MT3: begin acc_r <= mres; phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end

            P_DLOAD: begin
              pr[WBITS-1:32] <= {(WBITS-32){pr[31]}};
              if (oc_zero32(acc_r))         phase <= P_DZDIV;
              else if (oc_zero32(pr[31:0])) phase <= P_DZRES;
              else                          phase <= P_DMUL15;
            end
            P_DZRES: begin acc_r <= ONES32; phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end
            P_DZDIV: begin phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end
            P_DMUL15: begin
              pr    <= {4'b0, x15};
              mq    <= '0;
              step  <= '0;
              pend  <= 1'b0;
              phase <= P_DSHIFT;
            end
            P_DSHIFT: begin
              pr    <= st_word;
              pend  <= 1'b0;
              bitj  <= 2'd3;
              phase <= (step == 3'd7) ? P_DQ0A : P_DBIT;
            end
            P_DBIT: begin
              pr      <= dstep;
              mq      <= {mq[30:0], dbit};
              lastbit <= dbit;
              if (step == 3'd0 && bitj == 2'd3 && dbit) phase <= P_DOVF;
              else if (bitj == 2'd0) begin
                pend  <= !dbit;
                step  <= step + 3'd1;
                phase <= P_DSHIFT;
              end else begin
                bitj <= bitj - 2'd1;
              end
            end
            P_DQ0A: begin
              if (trial_ok) pr <= trial;
              q0r   <= q0_sel;
              phase <= P_DQ0B;
            end
            P_DQ0B: begin pr <= dq0b; phase <= P_DQ0C; end
            P_DQ0C: begin
              mq    <= {mq[27:0], 4'b0} + 32'(signed'(q0r));
              phase <= P_DQ0D;
            end
            P_DQ0D: phase <= P_DT1;
            P_DT1:  begin mq <= qfin; phase <= P_DT2; end
            P_DT2:  begin acc_r <= mq; phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end
            P_DOVF: begin acc_r <= ONES32; phase <= P_IDLE; done <= 1'b1; cycles <= cyc_cnt; end
            default: phase <= P_IDLE;
          endcase
        end
      end
    end
  end

  assign acc  = acc_r;
  assign busy = (phase != P_IDLE);

  // a DO byte can never be both a numeric byte and a condition code
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(do_valid && cc_valid));
  a_check_on_numeric: assert property (@(posedge clk) disable iff (!rst_n) perform_check |-> do_valid);

endmodule
