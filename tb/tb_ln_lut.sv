// tb_ln_lut: checks both tables against the real-valued logarithm.
// Instance A (N = 16): every entry must equal ln(1 +/- 2^-i) rounded to
// nearest at 16 fraction bits. Instance B (N = 64, the default): every entry
// must match ln(1 +/- 2^-i) to double precision (absolute 2^-62, or relative
// 2^-50 for the larger terms) and equal the exactly rounded value from a
// different series (ln_ref_pkg::ln_term_exact). Entry 0 and unused indices
// must read zero.
module tb_ln_lut;
  import ln_ref_pkg::*;

  localparam int NA = 16;
  localparam int NB = 64;
  localparam int SWA = $clog2(NA + 1);
  localparam int SWB = $clog2(NB + 1);

  logic [SWA-1:0] step_a;
  logic signed [NA+1:0] plus_a, minus_a;
  logic [SWB-1:0] step_b;
  logic signed [NB+1:0] plus_b, minus_b;

  int checks = 0;
  int failures = 0;

  ln_lut #(.N(NA)) u_a (.step(step_a), .ln_plus(plus_a), .ln_minus(minus_a));
  ln_lut #(.N(NB)) u_b (.step(step_b), .ln_plus(plus_b), .ln_minus(minus_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit close(input real got, input real want);
    real d;
    real tol;
    d   = got - want;
    if (d < 0.0) d = -d;
    tol = (want < 0.0 ? -want : want) * (2.0 ** -50);
    if (tol < 2.0 ** -62) tol = 2.0 ** -62;
    return d <= tol;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** SWA; i++) begin
      step_a = SWA'(i);
      #1;
      if (i >= 1 && i < NA) begin
        check(longint'(plus_a)  == ln_term_lsb(i, NA, 1'b0), $sformatf("N=16 ln(1+2^-%0d) = %0d", i, plus_a));
        check(longint'(minus_a) == ln_term_lsb(i, NA, 1'b1), $sformatf("N=16 ln(1-2^-%0d) = %0d", i, minus_a));
      end else begin
        check(plus_a == 0 && minus_a == 0, $sformatf("N=16 entry %0d not zero", i));
      end
    end
    for (int i = 0; i < 2 ** SWB; i++) begin
      step_b = SWB'(i);
      #1;
      if (i >= 1 && i < NB) begin
        check(close(fix_to_real(128'(plus_b),  NB + 2, NB), ln_term_real(i, 1'b0)),
              $sformatf("N=64 ln(1+2^-%0d)", i));
        check(close(fix_to_real(128'(minus_b), NB + 2, NB), ln_term_real(i, 1'b1)),
              $sformatf("N=64 ln(1-2^-%0d)", i));
        check(plus_b == ln_term_exact(i, NB, 1'b0), $sformatf("N=64 ln(1+2^-%0d) = %h, exact %h", i, plus_b, ln_term_exact(i, NB, 1'b0)));
        check(minus_b == ln_term_exact(i, NB, 1'b1), $sformatf("N=64 ln(1-2^-%0d) = %h, exact %h", i, minus_b, ln_term_exact(i, NB, 1'b1)));
      end else begin
        check(plus_b == 0 && minus_b == 0, $sformatf("N=64 entry %0d not zero", i));
      end
    end
    // ln(1-2^-1) = -ln 2 at full precision: 0.693147180559945309417 * 2^64
    step_b = SWB'(1);
    #1;
    check(-minus_b == 66'sh0B17217F7D1CF79AC, $sformatf("N=64 ln 2 = %h", -minus_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
