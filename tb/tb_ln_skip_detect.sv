// tb_ln_skip_detect: N = 16 and the default N = 64. For random arguments
// (half of them shaped like the algorithm's x(i): 1.000..01.. or 0.111..10..)
// and every start step i, the expected answer is found by walking j = i,
// i+1, ... N-1 and evaluating the digit rule at each position.
module tb_ln_skip_detect;
  import ln_ref_pkg::*;

  localparam int NA = 16;
  localparam int NB = 64;
  localparam int SWA = $clog2(NA + 1);
  localparam int SWB = $clog2(NB + 1);

  logic [NA:0] xa;
  logic [SWA-1:0] sa, na;
  logic fa;
  logic [NB:0] xb;
  logic [SWB-1:0] sb, nb;
  logic fb;

  int checks = 0;
  int failures = 0;

  ln_skip_detect #(.N(NA)) u_a (.x(xa), .step(sa), .found(fa), .next_step(na));
  ln_skip_detect #(.N(NB)) u_b (.x(xb), .step(sb), .found(fb), .next_step(nb));

  function automatic int expect_next(input logic [127:0] x, input int n, input int i);
    for (int j = i; j <= n - 1; j++) if (digit(x, n, j) != 0) return j;
    return -1;
  endfunction

  task automatic check_one(input int want, input bit f, input int got, input string what);
    checks++;
    if ((want < 0 && f) || (want >= 0 && (!f || got != want))) begin
      failures++;
      $display("FAIL %s want %0d found %b got %0d", what, want, f, got);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    for (int t = 0; t < 300; t++) begin
      int r;
      r  = 1 + $urandom % (NA - 2);
      xa = (NA+1)'($urandom);
      if (t % 3 == 1) xa = ({1'b1, {NA{1'b0}}} | ((NA+1)'($urandom) >> r));
      if (t % 3 == 2) xa = ({1'b0, {NA{1'b1}}} & ~((NA+1)'($urandom) >> r));
      r  = 1 + $urandom % (NB - 2);
      xb = (NB+1)'({$urandom, $urandom, $urandom});
      if (t % 3 == 1) xb = ({1'b1, {NB{1'b0}}} | ((NB+1)'({$urandom, $urandom, $urandom}) >> r));
      if (t % 3 == 2) xb = ({1'b0, {NB{1'b1}}} & ~((NB+1)'({$urandom, $urandom, $urandom}) >> r));
      for (int i = 1; i <= NA; i++) begin
        sa = SWA'(i);
        #1;
        w = (xa == {1'b1, {NA{1'b0}}}) ? -1 : expect_next(128'(xa), NA, i);
        check_one(w, fa, int'(na), $sformatf("N=16 x=%h i=%0d", xa, i));
      end
      for (int i = 1; i <= NB; i++) begin
        sb = SWB'(i);
        #1;
        w = (xb == {1'b1, {NB{1'b0}}}) ? -1 : expect_next(128'(xb), NB, i);
        check_one(w, fb, int'(nb), $sformatf("N=64 x=%h i=%0d", xb, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
