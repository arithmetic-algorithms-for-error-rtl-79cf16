// an_proc_ref_pkg: reference arithmetic for the AN-coded processor
// testbenches, written independently of the RTL. Values are computed on
// plain integers: a 32-bit one's complement word z stands for 15*x, and the
// expected results follow from x and y directly.
package an_proc_ref_pkg;

  // one's complement word -> signed integer
  function automatic longint oc_val(logic [31:0] z);
    return z[31] ? -longint'({32'b0, ~z}) : longint'({32'b0, z});
  endfunction

  // signed integer -> one's complement word, zero written as all ones
  function automatic logic [31:0] oc_word(longint v);
    if (v == 0) return '1;
    if (v < 0) return ~(32'(-v));
    return 32'(v);
  endfunction

  // coded product 15 * round(x*y / 2^32), half rounded up
  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    longint x, y, p, r;
    x = oc_val(a) / 15;
    y = oc_val(b) / 15;
    p = x * y;
    r = p >>> 32;                       // floor
    if (p[31]) r = r + 1;               // low 32 bits >= 2^31
    return oc_word(15 * r);
  endfunction

  // number of nonzero signed digits when a multiplier byte is recoded
  function automatic int ref_mul_cycles(logic [31:0] b);
    int c, v, d, m, tot;
    c   = int'(b[31]);
    tot = 1 + 3;
    for (int i = 0; i < 8; i++) begin
      v = int'(b[i*4 +: 4]) + c;
      if (i == 7) begin d = v - (b[31] ? 16 : 0); c = 0; end
      else if (v >= 8) begin d = v - 16; c = 1; end
      else begin d = v; c = 0; end
      m = d < 0 ? -d : d;
      tot += 1 + ((m == 0) ? 0 : (m == 1 || m == 2 || m == 4 || m == 8) ? 1 : 2);
    end
    return tot;
  endfunction

  // restoring quotient of 15|dividend| * 2^32 / |divisor|, as used for the
  // overflow test, and the correct coded quotient
  function automatic logic [127:0] ref_cstar(logic [31:0] dvd, logic [31:0] dvs);
    logic [127:0] n, d;
    longint a, b;
    a = oc_val(dvd); if (a < 0) a = -a;
    b = oc_val(dvs); if (b < 0) b = -b;
    n = (128'(a) * 128'd15) << 32;
    d = 128'(b);
    return n / d;
  endfunction

  function automatic logic [31:0] ref_div(logic [31:0] dvd, logic [31:0] dvs);
    logic [127:0] q;
    longint a, b, qq;
    a = oc_val(dvd) / 15; if (a < 0) a = -a;
    b = oc_val(dvs) / 15; if (b < 0) b = -b;
    q  = (128'(a) << 32) / 128'(b);
    qq = 15 * longint'(q[62:0]);
    if ((oc_val(dvd) < 0) != (oc_val(dvs) < 0)) qq = -qq;
    return oc_word(qq);
  endfunction

endpackage
