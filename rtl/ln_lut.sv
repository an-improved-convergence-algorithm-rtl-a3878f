// ln_lut: the two logarithm tables of the unit, LUT ln(1+2^-i) and
// LUT ln(1-2^-i), both addressed by the step number i.
//
// How it works: every entry is a constant computed at elaboration from the
// series in ln_pkg::ln_pow2_term, rounded to nearest at N fraction bits; the
// read is purely combinational (an N-entry ROM per table). Entry 0 and
// indices above N-1 read as zero (step 0 always has a_0 = 0); the unit only
// addresses 1..N-1.
//
// Interface: step (step number i) in, ln_plus = ln(1+2^-i) and
// ln_minus = ln(1-2^-i) out, both signed with N fraction bits, N+2 bits wide.
// Timing: combinational, no clock.
//
// The published method specifies the tables' contents and that their precision sets
// the result precision; rounding to nearest and the output format are this
// design's choice.
module ln_lut #(
  parameter int N  = 64,
  parameter int SW = ln_pkg::step_width(N)
) (
  input  logic [SW-1:0]          step,
  output logic signed [N+1:0]    ln_plus,
  output logic signed [N+1:0]    ln_minus
);

  localparam int AW = (N > 1) ? $clog2(N) : 1;

  logic signed [N+1:0] rom_plus  [N];
  logic signed [N+1:0] rom_minus [N];
  logic                in_range;

  for (genvar k = 0; k < N; k++) begin : g_rom
    localparam logic signed [127:0] PLUS  = ln_pkg::ln_pow2_term(k, N, 1'b0);
    localparam logic signed [127:0] MINUS = ln_pkg::ln_pow2_term(k, N, 1'b1);
    assign rom_plus[k]  = PLUS[N+1:0];
    assign rom_minus[k] = MINUS[N+1:0];
  end

  assign in_range = (int'(step) < N);
  assign ln_plus  = in_range ? rom_plus[step[AW-1:0]]  : '0;
  assign ln_minus = in_range ? rom_minus[step[AW-1:0]] : '0;

endmodule
