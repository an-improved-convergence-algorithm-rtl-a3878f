// ln_step_control: sequences one ln(x) operation.
//
// How it works: a start pulse while idle loads the operand (load = 1) and sets
// the step counter to i = 1. While busy, each clock performs one iteration of
// the loop. The step performed is next_step, which the datapath supplies:
// either i itself (plain unit) or the first non-trivial step at or after i
// (accelerated unit). The iteration ends the operation instead of stepping when
// x = 1 already, or when next_valid is 0 (no non-trivial step is left); it ends
// the operation after stepping when the step performed was N-1. Otherwise the
// counter moves to next_step + 1.
//
// Interface: start, x_is_one, next_valid, next_step in; load (one cycle, with
// the start), step_en (step next_step is applied this cycle), i (the counter),
// busy, done out. done is a one-cycle pulse in the cycle after the
// last iteration; the result is then in the accumulator and stays there until
// the next start. A start while busy is ignored.
// Timing: rst_n is an active-low synchronous reset. The number of cycles from the edge that takes start to the edge that
// raises done equals the number of iterations: N-1 for the plain unit with no
// early exit.
//
// The loop bounds (steps 1 to N-1) and the exit on x = 1 follow the published method;
// the handshake (start/busy/done) and reset are this design's choices.
module ln_step_control #(
  parameter int N  = 64,
  parameter int SW = ln_pkg::step_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          x_is_one,
  input  logic          next_valid,
  input  logic [SW-1:0] next_step,
  output logic          load,
  output logic          step_en,
  output logic [SW-1:0] i,
  output logic          busy,
  output logic          done
);

  logic exit_now;
  logic last_step;

  assign load      = start && !busy;
  assign exit_now  = busy && (x_is_one || !next_valid);
  assign step_en   = busy && !exit_now;
  assign last_step = step_en && (int'(next_step) >= N - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      i    <= '0;
      done <= 1'b0;
    end else begin
      done <= busy && (exit_now || last_step);
      if (load) begin
        busy <= 1'b1;
        i    <= SW'(1);
      end else if (busy) begin
        if (exit_now || last_step) busy <= 1'b0;
        else                       i    <= next_step + SW'(1);
      end
    end
  end

  // The step performed is never behind the counter.
  a_step_ahead: assert property (@(posedge clk) disable iff (!rst_n)
    step_en |-> (next_step >= i))
    else $error("step index moved backwards");

endmodule
