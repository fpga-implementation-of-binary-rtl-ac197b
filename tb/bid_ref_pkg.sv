// bid_ref_pkg: reference model of decimal32 BID multiplication for the
// testbenches. It works from the definition, not from the hardware's method:
// exact 64-bit product, digit count by repeated comparison with powers of
// ten, integer division and remainder by 10^d, then the rounding rule of each
// mode. Out-of-range exponents and special operands follow the same rules as
// the RTL (exponent > 191: infinity, or the largest exponent for a zero; < 0: signed zero; NaN or inf*0: NaN).
package bid_ref_pkg;

  typedef struct {
    bit          s;
    int          e;
    longint      c;
    int          cls;     // 0 finite, 1 inf, 2 nan
    bit          big_form;   // 11-prefixed layout
  } ref_op_t;

  typedef struct {
    bit [31:0] z;
    bit        rounded;   // exact product had more than 7 digits
    int        d;         // digits dropped (before adjustment)
    bit        dplus;     // d = d' + 1 (product above 10^n for its k)
    int        rclass;    // 0 exact, 1 below half, 2 half, 3 above half
    bit        inc;       // truncated product was incremented
    bit        adjusted;  // increment reached 10^7
    bit        overflow;
    bit        underflow;
    bit        special;
  } ref_res_t;

  function automatic longint pow10(int n);
    longint r = 1;
    for (int i = 0; i < n; i++) r *= 10;
    return r;
  endfunction

  function automatic int ndigits(longint x);
    int n = 1;
    while (x >= pow10(n)) n++;
    return n;
  endfunction

  function automatic int lop(longint x);
    int p = 0;
    for (int i = 0; i < 63; i++) if (x[i]) p = i;
    return p;
  endfunction

  function automatic ref_op_t ref_decode(bit [31:0] x);
    ref_op_t o;
    longint  y;
    o.s = x[31];
    o.big_form = (x[30:29] == 2'b11);
    if (!o.big_form) begin
      o.e = int'(x[30:23]);
      y   = longint'(x[22:0]);
    end else begin
      o.e = int'(x[28:21]);
      y   = longint'(x[20:0]) + 64'd8388608;   // implicit 100 prefix: + 2^23
    end
    o.c   = (y < 10000000) ? y : 0;
    o.cls = (x[30:27] == 4'b1111) ? (x[26] ? 2 : 1) : 0;
    return o;
  endfunction

  function automatic bit [31:0] ref_encode(bit s, int e, longint c);
    bit [31:0] z;
    if (c < 8388608) z = {s, 8'(e), 23'(c)};
    else             z = {s, 2'b11, 8'(e), 21'(c - 8388608)};
    return z;
  endfunction

  function automatic ref_res_t ref_mul(bit [31:0] a, bit [31:0] b, int mode);
    ref_res_t res;
    ref_op_t  oa, ob;
    longint   p, q, r, half, m;
    int       ie, ze, d, k, nlow;
    bit       s, inc;
    res = '{default: 0};
    oa = ref_decode(a);
    ob = ref_decode(b);
    s  = oa.s ^ ob.s;
    if (oa.cls == 2 || ob.cls == 2 ||
        ((oa.cls == 1 || ob.cls == 1) && ((oa.cls == 0 && oa.c == 0) || (ob.cls == 0 && ob.c == 0)))) begin
      res.z = 32'h7C00_0000;
      res.special = 1;
      return res;
    end
    if (oa.cls == 1 || ob.cls == 1) begin
      res.z = {s, 5'b11110, 26'd0};
      res.special = 1;
      return res;
    end
    p  = oa.c * ob.c;
    ie = oa.e + ob.e - 101;
    if (p < 10000000) begin
      q  = p;
      ze = ie;
    end else begin
      res.rounded = 1;
      d = ndigits(p) - 7;
      res.d = d;
      if (oa.c != 0 && ob.c != 0) begin
        k    = lop(oa.c) + lop(ob.c);
        nlow = ndigits(longint'(1) << k);
        res.dplus = (ndigits(p) > nlow);
      end
      m    = pow10(d);
      q    = p / m;
      r    = p % m;
      half = m / 2;
      res.rclass = (r == 0) ? 0 : (r < half) ? 1 : (r == half) ? 2 : 3;
      case (mode)
        1:       inc = 0;                              // toward zero
        2:       inc = !s && (r != 0);                 // toward +inf
        3:       inc = s && (r != 0);                  // toward -inf
        4:       inc = (r >= half);                    // ties away
        default: inc = (r > half) || (r == half && q[0]);  // ties even
      endcase
      res.inc = inc;
      q = q + longint'(inc);
      if (q == 10000000) begin
        q = 1000000;
        d++;
        res.adjusted = 1;
      end
      ze = ie + d;
    end
    if (ze > 191 && q == 0) begin
      res.z = ref_encode(s, 191, 0);          // zero: exponent clamped
    end else if (ze > 191) begin
      res.z = {s, 5'b11110, 26'd0};
      res.overflow = 1;
    end else if (ze < 0) begin
      res.z = {s, 31'd0};
      res.underflow = 1;
    end else begin
      res.z = ref_encode(s, ze, q);
    end
    return res;
  endfunction

  // Random operand: mostly canonical finite values with 1..7 digits, some
  // raw random words (non-canonical and special patterns included).
  function automatic bit [31:0] rand_operand();
    int     sel, nd, e;
    longint c;
    bit     s;
    sel = $urandom_range(0, 15);
    if (sel == 0) return $urandom();
    s  = $urandom_range(0, 1);
    nd = $urandom_range(1, 7);
    c  = longint'($urandom()) % pow10(nd);
    if (sel == 1) c = 9999999 - longint'($urandom_range(0, 3));
    e  = (sel == 2) ? $urandom_range(0, 191) : $urandom_range(60, 140);
    return ref_encode(s, e, c);
  endfunction

endpackage
