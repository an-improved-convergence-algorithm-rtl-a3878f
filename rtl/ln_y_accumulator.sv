// ln_y_accumulator: the result sequence y(i+1) = y(i) - ln(c(i)).
//
// How it works: a 4:1 multiplexer picks the term to subtract from the two LUT
// outputs, selected by {x_0, a'_i}: 00 -> 0, 01 -> ln(1+2^-i) (x < 1, adding
// step), 10 -> 0, 11 -> ln(1-2^-i) (x >= 1, subtracting step). A subtractor
// takes it from the accumulator, which is written back on every step.
//
// Interface: clear sets the accumulator to y(1) = 0 (used when a new operand is
// loaded); step_en applies one step; clear has priority. ln_plus and ln_minus
// come from the tables for the current step. y is signed, N fraction bits,
// N+2 bits wide. Timing: one step per rising clk edge; the active-low
// synchronous reset rst_n clears the accumulator.
//
// The multiplexer coding, subtractor and accumulator follow the published method; the
// number format and reset are this design's choices.
module ln_y_accumulator #(
  parameter int N = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                step_en,
  input  logic                x0,
  input  logic                a_prime,
  input  logic signed [N+1:0] ln_plus,
  input  logic signed [N+1:0] ln_minus,
  output logic signed [N+1:0] y
);

  logic signed [N+1:0] term;

  always_comb begin
    unique case ({x0, a_prime})
      2'b01:   term = ln_plus;
      2'b11:   term = ln_minus;
      default: term = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       y <= '0;
    else if (clear)   y <= '0;
    else if (step_en) y <= y - term;
  end

endmodule
