// ln_pkg: constants and elaboration-time helpers shared by the ln(x) unit.
//
// Number formats used throughout:
//   x  : unsigned fixed point, 1 integer bit x_0 and N fraction bits x_1..x_N.
//        Bit N of the vector is x_0, bit N-k is x_k (weight 2^-k).
//   y  : two's-complement fixed point, N fraction bits, N+2 bits wide
//        (sign, one integer bit, N fraction bits).
//
// ln_pow2_term() computes ln(1+2^-i) or ln(1-2^-i) rounded to FRAC fraction
// bits with exact integer arithmetic (the Mercator series
// ln(1+t) = t - t^2/2 + t^3/3 - ..., ln(1-t) = -(t + t^2/2 + t^3/3 + ...),
// with t = 2^-i, evaluated with FRAC+16 guard bits so that the terms left out
// cannot move the rounding). It runs at elaboration only, so the tables are
// built from the formula and need no data file. FRAC must not exceed 100.
package ln_pkg;

  // Width of a step index able to hold 0..n.
  function automatic int step_width(input int n);
    return $clog2(n + 1);
  endfunction

  // ln(1 + 2^-i) when minus == 0, ln(1 - 2^-i) when minus == 1, rounded to
  // nearest at frac fraction bits, as a 128-bit two's-complement number.
  function automatic logic signed [127:0] ln_pow2_term(input int i, input int frac,
                                                       input bit minus);
    int g;
    int guard;
    logic signed [255:0] acc;
    logic signed [255:0] term;
    guard = frac + 16;
    g     = frac + guard;
    acc = '0;
    if (i >= 1) begin
      for (int k = 1; i * k <= g; k++) begin
        term = (256'sd1 <<< (g - i * k)) / 256'(k);
        if (minus || (k % 2 == 0)) acc = acc - term;
        else                       acc = acc + term;
      end
    end
    acc = acc + (256'sd1 <<< (guard - 1));
    acc = acc >>> guard;
    return acc[127:0];
  endfunction

endpackage
