// ln_skip_detect: the step-skipping circuit of the accelerated unit.
//
// How it works: a step whose digit a'_j is 0 leaves both x and y unchanged, so
// from the current step i the unit can jump straight to the first step j >= i
// whose digit is non-zero. The digit of every position j = 1..N-1 is formed in
// parallel from the present x with the same rule as ln_digit_select
// (x_0 = 1: x_j; x_0 = 0: x_j AND NOT x_{j+1}); positions below i are masked,
// and a priority encoder returns the lowest remaining position. Whether x is
// above or below 1, this finds the end of the run of 0s (x > 1) or of 1s
// (x < 1) that starts at position i. The skip length is s = next_step - i.
//
// Interface: x (1 integer bit, N fraction bits) and step (i) in; found = 1 and
// next_step = j when some j in [i, N-1] has a non-zero digit, found = 0 when
// every step left is trivial. Timing: combinational.
//
// The published method states what the circuit must achieve; the parallel digit
// vector and priority encoder are this design's choice.
module ln_skip_detect #(
  parameter int N  = 64,
  parameter int SW = ln_pkg::step_width(N)
) (
  input  logic [N:0]    x,
  input  logic [SW-1:0] step,
  output logic          found,
  output logic [SW-1:0] next_step
);

  logic [N-1:0] digit;   // digit[j] = a'_j for j = 1..N-1; digit[0] unused

  always_comb begin
    digit = '0;
    for (int j = 1; j < N; j++) begin
      if (x[N]) digit[j] = x[N-j];
      else      digit[j] = x[N-j] & ~x[N-j-1];
    end
  end

  always_comb begin
    found     = 1'b0;
    next_step = '0;
    for (int j = N - 1; j >= 1; j--) begin
      if (digit[j] && (j >= int'(step))) begin
        found     = 1'b1;
        next_step = SW'(j);
      end
    end
  end

endmodule
