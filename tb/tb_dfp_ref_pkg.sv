// tb_dfp_ref_pkg - reference arithmetic for the testbenches.
//
// The reference model works on binary integers, not on BCD hardware
// structures. Coefficients are converted to binary and divided with wide
// integer division. Rounding, exponent selection (preferred exponent Ex - Ey
// for exact results, clamping, subnormals) and flags follow IEEE 754-2008
// decimal64. DPD declets are encoded and decoded here from the standard's
// tables, written independently of the RTL package. Helpers for 4221 vectors
// and BCD strings are also here.
package tb_dfp_ref_pkg;

  typedef logic [255:0] big_t;

  function automatic big_t pow10(input int n);
    big_t r = 1;
    for (int i = 0; i < n; i++) r = r * 10;
    return r;
  endfunction

  // binary -> n-digit BCD (8421)
  function automatic logic [255:0] to_bcd(input big_t v, input int n);
    logic [255:0] r = '0;
    for (int i = 0; i < n; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // value of an n-digit BCD vector; all ones if a digit is not 0..9
  function automatic big_t from_bcd(input logic [255:0] b, input int n);
    big_t r = 0;
    for (int i = n - 1; i >= 0; i--) begin
      if (b[4*i +: 4] > 4'd9) return '1;
      r = r * 10 + big_t'(b[4*i +: 4]);
    end
    return r;
  endfunction

  // value of an n-digit 4221 vector
  function automatic big_t from_4221(input logic [255:0] b, input int n);
    big_t r = 0;
    for (int i = n - 1; i >= 0; i--)
      r = r * 10 + big_t'(4 * b[4*i+3] + 2 * b[4*i+2] + 2 * b[4*i+1] + b[4*i]);
    return r;
  endfunction

  // n-digit 4221 vector of v, each digit given a random one of its codes
  function automatic logic [255:0] to_4221(input big_t v, input int n);
    logic [255:0] r = '0;
    logic [3:0] c;
    int d;
    for (int i = 0; i < n; i++) begin
      d = int'(v % 10);
      v = v / 10;
      do c = 4'($urandom); while (4 * c[3] + 2 * c[2] + 2 * c[1] + c[0] != d);
      r[4*i +: 4] = c;
    end
    return r;
  endfunction

  // random number of up to n digits, every length equally likely
  function automatic big_t rand_num(input int n);
    big_t r = 0;
    int len = 1 + int'($urandom % n);
    for (int i = 0; i < len; i++) r = r * 10 + big_t'($urandom % 10);
    return r;
  endfunction

  function automatic int ndigits(input big_t v);
    int n = 0;
    while (v != 0) begin
      v = v / 10;
      n++;
    end
    return n;
  endfunction

  // three decimal digits -> declet, written from the IEEE 754-2008 table
  function automatic logic [9:0] enc_declet(input int v);
    int d2, d1, d0;
    logic [3:0] a, b, c;
    d2 = v / 100; d1 = (v / 10) % 10; d0 = v % 10;
    a = 4'(d2); b = 4'(d1); c = 4'(d0);
    if (d2 < 8 && d1 < 8 && d0 < 8) return {a[2:0], b[2:0], 1'b0, c[2:0]};
    if (d2 < 8 && d1 < 8)           return {a[2:0], b[2:0], 1'b1, 2'b00, c[0]};
    if (d2 < 8 && d0 < 8)           return {a[2:0], c[2:1], b[0], 1'b1, 2'b01, c[0]};
    if (d1 < 8 && d0 < 8)           return {c[2:1], a[0], b[2:0], 1'b1, 2'b10, c[0]};
    if (d2 < 8)                     return {a[2:0], 2'b10, b[0], 1'b1, 2'b11, c[0]};
    if (d1 < 8)                     return {b[2:1], a[0], 2'b01, b[0], 1'b1, 2'b11, c[0]};
    if (d0 < 8)                     return {c[2:1], a[0], 2'b00, b[0], 1'b1, 2'b11, c[0]};
    return {2'b00, a[0], 2'b11, b[0], 1'b1, 2'b11, c[0]};
  endfunction

  int dec_tab [1024];
  bit tab_ready = 0;

  function automatic int dec_declet(input logic [9:0] d);
    if (!tab_ready) begin
      for (int i = 0; i < 1024; i++) dec_tab[i] = -1;
      for (int v = 0; v < 1000; v++) dec_tab[enc_declet(v)] = v;
      tab_ready = 1;
    end
    // non-canonical declets do not occur in the generated stimulus
    return dec_tab[d];
  endfunction

  typedef struct {
    bit     sign;
    bit     inf, nan, snan;
    int     exp;         // unbiased
    big_t   coef;
    logic [49:0] payload;
  } dec64_t;

  function automatic logic [63:0] encode(input bit sign, input int exp_unb, input big_t coef);
    logic [63:0] f;
    int eb, msd;
    logic [9:0] e;
    eb = exp_unb + 398;
    e = 10'(eb);
    msd = int'(coef / pow10(15));
    f[63] = sign;
    if (msd >= 8) f[62:58] = {2'b11, e[9:8], 1'(msd & 1)};
    else          f[62:58] = {e[9:8], 3'(msd)};
    f[57:50] = e[7:0];
    for (int j = 0; j < 5; j++) f[10*j +: 10] = enc_declet(int'((coef / pow10(3*j)) % 1000));
    return f;
  endfunction

  function automatic logic [63:0] encode_inf(input bit sign);
    return {sign, 5'b11110, 58'b0};
  endfunction

  function automatic dec64_t decode(input logic [63:0] f);
    dec64_t r;
    int msd;
    logic [9:0] e;
    r.sign = f[63];
    r.inf  = (f[62:58] == 5'b11110);
    r.nan  = (f[62:58] == 5'b11111);
    r.snan = r.nan & f[57];
    r.payload = f[49:0];
    if (f[62:61] == 2'b11) begin e = {f[60:59], f[57:50]}; msd = 8 + int'(f[58]); end
    else                   begin e = {f[62:61], f[57:50]}; msd = int'(f[60:58]); end
    r.exp = int'(e) - 398;
    r.coef = big_t'(msd);
    for (int j = 4; j >= 0; j--) r.coef = r.coef * 1000 + big_t'(dec_declet(f[10*j +: 10]));
    if (r.inf | r.nan) begin r.coef = 0; r.exp = 0; end
    return r;
  endfunction

  // flags packed as {invalid, div_by_zero, overflow, underflow, inexact}
  function automatic void ref_div(input logic [63:0] fx, input logic [63:0] fy, input int rm,
                                  output logic [63:0] fq, output logic [4:0] flags);
    dec64_t x, y;
    bit s;
    big_t num, q, r;
    int e;
    x = decode(fx);
    y = decode(fy);
    s = x.sign ^ y.sign;
    flags = '0;
    if (x.nan | y.nan) begin
      fq = {x.nan ? x.sign : y.sign, 6'b111110, 7'b0, x.nan ? x.payload : y.payload};
      flags[4] = x.snan | y.snan;
      return;
    end
    if ((x.inf & y.inf) | (!x.inf & !y.inf & x.coef == 0 & y.coef == 0)) begin
      fq = {1'b0, 6'b111110, 57'b0};
      flags[4] = 1;
      return;
    end
    if (x.inf) begin fq = encode_inf(s); return; end
    if (y.inf) begin fq = encode(s, -398, 0); return; end
    if (y.coef == 0) begin fq = encode_inf(s); flags[3] = 1; return; end
    if (x.coef == 0) begin
      e = x.exp - y.exp;
      if (e < -398) e = -398;
      if (e > 369) e = 369;
      fq = encode(s, e, 0);
      return;
    end
    num = x.coef * pow10(34);
    q = num / y.coef;
    r = num % y.coef;
    ref_round(s, q, x.exp - y.exp - 34, x.exp - y.exp, r == 0, rm, fq, flags);
  endfunction

  // Rounds q * 10^e (q > 0, exact or with a non-zero tail below its last
  // digit) to decimal64, exponent as close to pe as the value allows.
  function automatic void ref_round(input bit s, input big_t q, input int e, input int pe,
                                    input bit exact, input int rm,
                                    output logic [63:0] fq, output logic [4:0] flags);
    big_t c, div, rem2, gd;
    int nd, k, guard;
    bit sticky, inexact, tiny, inc, to_inf;
    flags = '0;
    if (exact)
      while (q % 10 == 0 && e < pe) begin q = q / 10; e++; end
    nd = ndigits(q);
    if (exact)
      while (e > 369 && nd < 16) begin q = q * 10; e--; nd++; end
    tiny = (e + nd - 1) < -383;
    k = nd - 16;
    if (-398 - e > k) k = -398 - e;
    if (k < 0) k = 0;
    if (k > 70) begin
      c = 0; guard = 0; sticky = 1;
    end else begin
      div = pow10(k);
      c = q / div;
      rem2 = q % div;
      if (k >= 1) begin
        gd = pow10(k - 1);
        guard = int'(rem2 / gd);
        sticky = (rem2 % gd) != 0;
      end else begin
        guard = 0; sticky = 0;
      end
    end
    sticky = sticky | !exact;
    inexact = (guard != 0) | sticky;
    case (rm)
      0: inc = (guard > 5) || (guard == 5 && (sticky || c % 2 == 1));
      1: inc = guard >= 5;
      2: inc = !s && inexact;
      3: inc = s && inexact;
      5: inc = (guard > 5) || (guard == 5 && sticky);
      6: inc = inexact;
      default: inc = 0;
    endcase
    if (inc) c = c + 1;
    e = e + k;
    if (c == pow10(16)) begin c = pow10(15); e++; end
    if (e > 369) begin
      to_inf = (rm == 0) || (rm == 1) || (rm == 5) || (rm == 6) || (rm == 2 && !s) || (rm == 3 && s);
      fq = to_inf ? encode_inf(s) : encode(s, 369, pow10(16) - 1);
      flags[2] = 1;
      flags[0] = 1;
      return;
    end
    fq = encode(s, e, c);
    flags[1] = tiny & inexact;
    flags[0] = inexact;
  endfunction

endpackage
