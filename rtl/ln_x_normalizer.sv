// ln_x_normalizer: the auxiliary-sequence datapath, x(i+1) = x(i) * c(i)
// computed without a multiplier.
//
// How it works: because c(i) = 1 + a_i*2^-i with a_i in {-1, 0, +1}, the
// product is x(i) +/- (x(i) >> i). A right shifter forms x >> i, a gate forces
// it to zero when the digit a'_i is 0, and an adder/subtractor adds it
// (x_0 = 0, x < 1) or subtracts it (x_0 = 1, x >= 1). The shifted-out bits
// are dropped (truncation). The sum is stored in the x register.
//
// Interface: load writes x_load into the register; step_en applies one step
// with index step and digit a_prime; load has priority. x is the register,
// x_is_one flags x = 1.000...0 (the convergence target). x has 1 integer bit
// and N fraction bits, bit N being x_0.
// Timing: one step per rising clk edge; the active-low synchronous reset
// rst_n clears the register.
//
// The shifter, gate, add/subtract unit and register follow the published method's
// shift-and-add scheme; truncation of the shifted-out bits and the reset are
// this design's choices.
module ln_x_normalizer #(
  parameter int N  = 64,
  parameter int SW = ln_pkg::step_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N:0]    x_load,
  input  logic          step_en,
  input  logic [SW-1:0] step,
  input  logic          a_prime,
  output logic [N:0]    x,
  output logic          x_is_one
);

  logic         sub;
  logic [N:0]   shifted;
  logic [N:0]   gated;
  logic [N+1:0] x_next;    // one extra bit to catch a carry out of x_0

  assign sub      = x[N];
  assign shifted  = x >> step;
  assign gated    = a_prime ? shifted : '0;
  assign x_next   = sub ? ({1'b0, x} - {1'b0, gated}) : ({1'b0, x} + {1'b0, gated});
  assign x_is_one = (x == {1'b1, {N{1'b0}}});

  always_ff @(posedge clk) begin
    if (!rst_n)       x <= '0;
    else if (load)    x <= x_load;
    else if (step_en) x <= x_next[N:0];
  end

  // The convergence rules keep x inside [1/2, 2[: a step never carries out of
  // x_0 nor borrows below zero.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (step_en && !load) |-> !x_next[N+1])
    else $error("x left the range [0, 2[");

endmodule
