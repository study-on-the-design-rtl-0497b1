// bf16_ref_pkg: exact reference model of a bfloat16 addition for testbenches.
//
// Adds the two operands exactly in 128-bit integer arithmetic, then truncates
// the result toward zero to 8 significant bits. An exponent of 0 reads as
// zero, a result exponent <= 0 gives a signed zero, >= 255 gives infinity and
// an exact zero sum is +0. Exponent differences above 100 are treated as 100,
// which cannot change a truncated result because the smaller operand is then
// far below the result's last place. The model also reports which of the
// adder's mechanisms the operation exercises.
package bf16_ref_pkg;

  typedef struct {
    logic [15:0] y;
    bit swap;        // b has the larger exponent
    bit sub;         // effective subtraction
    bit negative;    // subtraction gave a negative significand difference
    bit carry;       // significand sum overflowed into the carry position
    bit cancel;      // normalisation shifted left by two or more places
    bit sticky;      // nonzero bits were shifted out during alignment
    bit overflow;
    bit underflow;
    bit zero;        // exact zero result of nonzero operands
  } ref_t;

  function automatic ref_t bf16_add_ref(input logic [15:0] a, input logic [15:0] b);
    ref_t r;
    logic [7:0]   ea, eb, eh, el;
    logic [7:0]   sa, sb, sh, sl;
    logic         gh, gl;
    int           d, dc, q, e;
    logic [127:0] hi, lo, m;
    bit           neg;
    r = '{default: 0};
    ea = a[14:7];
    eb = b[14:7];
    sa = (ea != 0) ? {1'b1, a[6:0]} : 8'd0;
    sb = (eb != 0) ? {1'b1, b[6:0]} : 8'd0;
    r.swap = eb > ea;
    if (r.swap) begin eh = eb; el = ea; sh = sb; sl = sa; gh = b[15]; gl = a[15]; end
    else        begin eh = ea; el = eb; sh = sa; sl = sb; gh = a[15]; gl = b[15]; end
    r.sub = gh ^ gl;
    d  = int'(eh) - int'(el);
    dc = (d > 100) ? 100 : d;
    r.sticky = (d > 3) && ((d >= 12) ? (sl != 0)
                                     : ((({3'b0, sl, 3'b0} & ((14'd1 << d) - 14'd1)) != 0)));
    if (sh == 0 && sl == 0) begin
      r.y = 16'h0000;
      return r;
    end
    hi = 128'(sh) << dc;
    lo = 128'(sl);
    if (!r.sub) m = hi + lo;
    else if (hi >= lo) m = hi - lo;
    else begin m = lo - hi; neg = 1; end
    r.negative = neg;
    if (m == 0) begin
      r.zero = 1;
      r.y = 16'h0000;
      return r;
    end
    q = 127;
    while (!m[q]) q--;
    r.carry  = (q > 7 + dc);
    r.cancel = (q < 6 + dc);
    e = q + int'(eh) - dc - 7;
    if (e <= 0) begin
      r.underflow = 1;
      r.y = {gh ^ neg, 15'd0};
    end else if (e >= 255) begin
      r.overflow = 1;
      r.y = {gh ^ neg, 8'hFF, 7'd0};
    end else begin
      logic [127:0] f;
      f = (q >= 7) ? (m >> (q - 7)) : (m << (7 - q));
      r.y = {gh ^ neg, 8'(e), f[6:0]};
    end
    return r;
  endfunction

endpackage
