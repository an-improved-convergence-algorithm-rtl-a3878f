// ln_ref_pkg: reference model of the ln(x) iteration for the testbenches.
//
// run() replays the algorithm step by step on an integer copy of x (n
// fraction bits, truncating shifts) following the loop as written:
// exit when x = 1; digit a = -x_j when x > 1, a = x_j AND NOT x_{j+1} when
// x < 1; with acceleration, jump to the first j with a non-zero digit and exit
// when there is none; stop after step n-1. It counts the iterations (one per
// clock in the unit) and the events the unit's tests must see, and sums y
// twice: with table values rounded from the double-precision logarithm (exact
// for n <= 40) and with exactly rounded values from ln_term_exact(). ln_term_real() gives ln(1 +/- 2^-j) in double precision, using a
// short series for small terms.
package ln_ref_pkg;

  typedef struct {
    int          cycles;     // iterations, i.e. clocks from start to done
    int          adds;       // steps with a = +1
    int          subs;       // steps with a = -1
    int          trivial;    // steps performed with a = 0 (plain unit only)
    int          skipped;    // trivial steps jumped over before a non-trivial one
    bit          exit_one;   // loop left because x reached exactly 1
    bit          exit_none;  // loop left because no non-trivial step was left
    bit          hit_last;   // step n-1 was performed
    longint      y_lsb;      // y in units of 2^-n, double-precision tables (n <= 40)
    logic signed [127:0] y_exact;  // y in units of 2^-n, exact tables (any n <= 100)
    real         y_real;     // y summed from double-precision terms
    logic [127:0] x_final;
  } ref_t;

  function automatic real ln_term_real(input int j, input bit minus);
    real t;
    real s;
    t = 2.0 ** (-j);
    if (minus) t = -t;
    if (j < 12) return $ln(1.0 + t);
    // ln(1+t) = t - t^2/2 + t^3/3 - t^4/4 + t^5/5, exact to double for |t| < 2^-11
    s = t - t * t / 2.0 + t * t * t / 3.0 - t * t * t * t / 4.0 + t * t * t * t * t / 5.0;
    return s;
  endfunction

  // ln(1 +/- 2^-j) rounded to nearest at n fraction bits, computed exactly
  // with a different series from the one the tables use:
  // ln(1+t) = 2*(u + u^3/3 + u^5/5 + ...), u = t/(2+t), which for t = +/-2^-j
  // is u = +/-1/(2^(j+1) +/- 1). Fixed point with 2n+16 fraction bits.
  logic signed [127:0] exact_cache [int];

  function automatic logic signed [127:0] ln_term_exact(input int j, input int n, input bit minus);
    int key;
    int g;
    logic signed [383:0] u, u2, p, acc, one, den;
    key = n * 4096 + j * 2 + int'(minus);
    if (exact_cache.exists(key)) return exact_cache[key];
    g   = 2 * n + 16;
    one = 384'sd1 <<< g;
    den = (384'sd1 <<< (j + 1));
    den = minus ? den - 384'sd1 : den + 384'sd1;
    u   = one / den;
    if (minus) u = -u;
    u2  = (u * u) >>> g;
    p   = u;
    acc = '0;
    for (int k = 1; p != 0 && k < 4000; k += 2) begin
      acc = acc + p / 384'(k);
      p   = (p * u2) >>> g;
    end
    acc = acc <<< 1;                                  // times 2
    acc = (acc + (384'sd1 <<< (g - n - 1))) >>> (g - n);
    exact_cache[key] = acc[127:0];
    return acc[127:0];
  endfunction

  function automatic longint ln_term_lsb(input int j, input int n, input bit minus);
    return longint'(ln_term_real(j, minus) * (2.0 ** n));
  endfunction

  function automatic bit xbit(input logic [127:0] x, input int n, input int k);
    if (k > n) return 1'b0;
    return x[n - k];
  endfunction

  // digit of step j: +1, -1 or 0
  function automatic int digit(input logic [127:0] x, input int n, input int j);
    logic [127:0] one;
    one = 128'd1 << n;
    if (x > one) return xbit(x, n, j) ? -1 : 0;
    if (x < one) return (xbit(x, n, j) && !xbit(x, n, j + 1)) ? 1 : 0;
    return 0;
  endfunction

  function automatic ref_t run(input logic [127:0] x_in, input int n, input bit accel);
    ref_t r;
    logic [127:0] x;
    logic [127:0] one;
    int i;
    int j;
    int a;
    r = '{default: 0};
    x = x_in;
    one = 128'd1 << n;
    i = 1;
    forever begin
      r.cycles++;
      if (x == one) begin
        r.exit_one = 1'b1;
        break;
      end
      j = i;
      if (accel) begin
        while (j <= n - 1 && digit(x, n, j) == 0) j++;
        if (j > n - 1) begin
          r.exit_none = 1'b1;
          break;
        end
        r.skipped += j - i;
      end
      a = digit(x, n, j);
      if (a == 1) begin
        x = x + (x >> j);
        r.adds++;
        r.y_lsb  -= ln_term_lsb(j, n, 1'b0);
        r.y_exact -= ln_term_exact(j, n, 1'b0);
        r.y_real -= ln_term_real(j, 1'b0);
      end else if (a == -1) begin
        x = x - (x >> j);
        r.subs++;
        r.y_lsb  -= ln_term_lsb(j, n, 1'b1);
        r.y_exact -= ln_term_exact(j, n, 1'b1);
        r.y_real -= ln_term_real(j, 1'b1);
      end else begin
        r.trivial++;
      end
      if (j == n - 1) begin
        r.hit_last = 1'b1;
        break;
      end
      i = j + 1;
    end
    r.x_final = x;
    return r;
  endfunction

  // Value of a signed fixed-point number with n fraction bits held in the low
  // bits of a 128-bit vector of width w.
  function automatic real fix_to_real(input logic [127:0] v, input int w, input int n);
    logic signed [127:0] s;
    logic signed [127:0] hi;
    s  = (v << (128 - w));
    s  = s >>> (128 - w);
    hi = s >>> 32;
    return (real'(longint'(hi)) * (2.0 ** 32) + real'(longint'({32'd0, s[31:0]}))) / (2.0 ** n);
  endfunction

endpackage
