// tb_ln_digit_select: random arguments in [0, 2[ and every step index, at
// N = 16 and at the default N = 64. The expected digit is taken from the bit
// positions directly: x >= 1 gives x_i, x < 1 gives x_i AND NOT x_{i+1}
// (x_{N+1} = 0); sub must equal the integer bit.
module tb_ln_digit_select;
  import ln_ref_pkg::*;

  localparam int NA = 16;
  localparam int NB = 64;

  logic [NA:0] xa;
  logic [$clog2(NA+1)-1:0] sa;
  logic aa, suba;
  logic [NB:0] xb;
  logic [$clog2(NB+1)-1:0] sb;
  logic ab, subb;

  int checks = 0;
  int failures = 0;

  ln_digit_select #(.N(NA)) u_a (.x(xa), .step(sa), .a_prime(aa), .sub(suba));
  ln_digit_select #(.N(NB)) u_b (.x(xb), .step(sb), .a_prime(ab), .sub(subb));

  function automatic bit expect_digit(input logic [127:0] x, input int n, input int i);
    if (x[n]) return xbit(x, n, i);
    return xbit(x, n, i) && !xbit(x, n, i + 1);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      xa = (NA+1)'($urandom);
      xb = (NB+1)'({$urandom, $urandom, $urandom});
      // bias some operands towards the run patterns the algorithm produces
      if (t % 4 == 1) xa = {1'b1, {(NA/2){1'b0}}, (NA/2)'($urandom)};
      if (t % 4 == 2) xa = {1'b0, {(NA/2){1'b1}}, (NA/2)'($urandom)};
      for (int i = 1; i <= NA; i++) begin
        sa = ($clog2(NA+1))'(i);
        #1;
        checks++;
        if (aa !== expect_digit(128'(xa), NA, i) || suba !== xa[NA]) begin
          failures++;
          $display("FAIL N=16 x=%h i=%0d a'=%b sub=%b", xa, i, aa, suba);
        end
      end
      for (int i = 1; i <= NB; i++) begin
        sb = ($clog2(NB+1))'(i);
        #1;
        checks++;
        if (ab !== expect_digit(128'(xb), NB, i) || subb !== xb[NB]) begin
          failures++;
          $display("FAIL N=64 x=%h i=%0d a'=%b sub=%b", xb, i, ab, subb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
