// ln_unit: iterative natural-logarithm unit for an argument x in [1/2, 2[.
//
// Method (multiplicative normalization): x(1) = x is driven towards 1 by
// factors c(i) = 1 + a_i*2^-i, a_i in {-1, 0, +1}, while y(1) = 0 collects
// y(i+1) = y(i) - ln c(i). When x(p) = 1, y(p) = ln(x). Each factor is applied
// as a shift and an add or subtract (x +/- x*2^-i), so no multiplier is
// needed; the digit is read from two bits of x (ln_digit_select), the term
// ln(1 +/- 2^-i) from two tables (ln_lut).
//
// Structure: ln_step_control (step number i, sequencing), ln_digit_select,
// ln_x_normalizer (shifter, gate, adder/subtractor, x register), ln_lut,
// ln_y_accumulator (4:1 multiplexer, subtractor, accumulator). With
// ACCEL = 1 the ln_skip_detect circuit sits between the step counter and the
// datapath: every clock performs the next step with a non-zero digit, so runs
// of trivial steps cost no cycles (the accelerated unit). With ACCEL = 0 every
// step 1..N-1 takes one clock, trivial or not.
//
// Interface: x_in has 1 integer bit and N fraction bits (x_in[N] is the units
// bit) and must lie in [1/2, 2[; arguments outside must be pre-scaled,
// x = x'*2^s, and s*ln 2 added to the result outside this unit. A start pulse
// while busy = 0 takes the operand. done pulses for one cycle when y is valid;
// y (signed, N fraction bits, N+2 bits) holds the result until the next start.
// Timing: ACCEL = 0 takes N-1 cycles from start to done (fewer if x reaches
// exactly 1 early); ACCEL = 1 takes one cycle per non-trivial step plus one
// final check cycle unless step N-1 is non-trivial.
//
// The algorithm, the datapath of shifter, adder/subtractor, digit selection,
// tables and accumulator, and the skipping of trivial steps follow the
// published method. Defaults: N = 64, the largest precision published for
// the method; ACCEL = 1, the accelerated version, its last refinement. The handshake, number
// formats, truncation in the shifter and table rounding are this design's own.
module ln_unit #(
  parameter int N     = 64,
  parameter bit ACCEL = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N:0]          x_in,
  output logic                busy,
  output logic                done,
  output logic signed [N+1:0] y
);

  localparam int SW = ln_pkg::step_width(N);

  logic          load;
  logic          step_en;
  logic [SW-1:0] step;
  logic [SW-1:0] i;
  logic          next_valid;
  logic [SW-1:0] next_step;
  logic [N:0]    x;
  logic          x_is_one;
  logic          a_prime;
  logic          sub;
  logic signed [N+1:0] ln_plus;
  logic signed [N+1:0] ln_minus;

  ln_step_control #(.N(N), .SW(SW)) u_ctrl (
    .clk, .rst_n, .start, .x_is_one, .next_valid, .next_step,
    .load, .step_en, .i, .busy, .done
  );

  assign step = next_step;   // index of the step performed this cycle

  if (ACCEL) begin : g_skip
    ln_skip_detect #(.N(N), .SW(SW)) u_skip (
      .x, .step(i), .found(next_valid), .next_step
    );
  end else begin : g_plain
    assign next_valid = 1'b1;
    assign next_step  = i;
  end

  ln_digit_select #(.N(N), .SW(SW)) u_digit (
    .x, .step, .a_prime, .sub
  );

  ln_x_normalizer #(.N(N), .SW(SW)) u_xnorm (
    .clk, .rst_n, .load, .x_load(x_in), .step_en, .step, .a_prime,
    .x, .x_is_one
  );

  ln_lut #(.N(N), .SW(SW)) u_lut (
    .step, .ln_plus, .ln_minus
  );

  ln_y_accumulator #(.N(N)) u_yacc (
    .clk, .rst_n, .clear(load), .step_en, .x0(sub), .a_prime,
    .ln_plus, .ln_minus, .y
  );

  a_arg_range: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (x_in[N] || x_in[N-1]))
    else $error("argument below 1/2");

endmodule
