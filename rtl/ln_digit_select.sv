// ln_digit_select: picks the normalization digit a'_i of step i.
//
// How it works: the auxiliary value x(i) lies in [1/2, 2[. When its integer
// bit x_0 is 1 (x >= 1) the digit is the fraction bit x_i, and the step will
// subtract x*2^-i. When x_0 is 0 (x < 1) the digit is x_i AND NOT x_{i+1}, and
// the step will add x*2^-i. The bit pair (x_i, x_{i+1}) is read by shifting x
// left by i, so the block is a barrel shifter followed by a 2:1 choice driven
// by x_0. For i = N the missing bit x_{N+1} reads as 0.
//
// Interface: x (1 integer bit, N fraction bits, bit N is x_0), step (i) in;
// a_prime (the digit magnitude) and sub (= x_0: subtract when 1, add when 0)
// out. sub is x_0 itself, brought out because it steers the add/subtract unit
// and the table multiplexer. Timing: combinational.
//
// The selection rules, the x_0-driven choice and the subtract/add control
// follow the published method; reading the bits through a shifter is this design's
// choice.
module ln_digit_select #(
  parameter int N  = 64,
  parameter int SW = ln_pkg::step_width(N)
) (
  input  logic [N:0]    x,
  input  logic [SW-1:0] step,
  output logic          a_prime,
  output logic          sub
);

  logic [N:0] x_aligned;   // x_aligned[N] = x_i, x_aligned[N-1] = x_{i+1}
  logic       bit_i;
  logic       bit_i1;

  assign x_aligned = x << step;
  assign bit_i     = x_aligned[N];
  assign bit_i1    = x_aligned[N-1];
  assign sub       = x[N];
  assign a_prime   = sub ? bit_i : (bit_i & ~bit_i1);

endmodule
