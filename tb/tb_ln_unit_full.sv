// tb_ln_unit_full: the ln(x) unit at its default size (N = 64, accelerated),
// with no parameter overridden. Runs the two worked examples (1.71875 and
// 0.59375), x = 1, x = 1/2, the largest argument and 4000 random arguments
// (three in four from [1, 2[). For each it checks the clock count from start
// to done, the final x register and the result bit for bit against
// ln_ref_pkg::run() with exactly rounded tables, and the result against the
// double-precision ln(x) (within 2^-50, the reference's own accuracy, plus
// 34 LSB). It also checks the average latency over [1, 2[
// against 31.1 cycles, the figure for 64-bit operands.
module tb_ln_unit_full;
  import ln_ref_pkg::*;

  localparam int N = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [N:0] x_in = '0;
  logic busy, done;
  logic signed [N+1:0] y;

  ln_unit dut (.clk, .rst_n, .start, .x_in, .busy, .done, .y);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  real lat_sum = 0.0;
  int lat_n = 0;
  real max_err = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic one_op(input logic [N:0] x);
    ref_t r;
    int cyc;
    real yr, want, err;
    r = run(128'(x), N, 1'b1);
    @(negedge clk);
    start = 1'b1;
    x_in  = x;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    cyc = 0;
    while (!done && cyc < 4 * N) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == r.cycles, $sformatf("x=%h cycles %0d want %0d", x, cyc, r.cycles));
    check(128'(dut.x) == r.x_final, $sformatf("x=%h final x %h want %h", x, dut.x, r.x_final));
    check(y == r.y_exact[N+1:0], $sformatf("x=%h y=%h want %h", x, y, r.y_exact[N+1:0]));
    yr   = fix_to_real(128'(y), N + 2, N);
    want = $ln(fix_to_real(128'(x), N + 2, N));
    err  = yr - want;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
    check(err <= 34.0 * (2.0 ** (-N)) + 2.0 ** (-50), $sformatf("x=%h |y - ln x| = %g", x, err));
    if (x[N]) begin
      lat_sum += real'(cyc);
      lat_n++;
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] x;
    real avg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one_op({2'b11, 1'b0, 1'b1, 1'b1, 1'b1, {(N-5){1'b0}}});   // 1.71875
    one_op({2'b01, 1'b0, 1'b0, 1'b1, 1'b1, {(N-5){1'b0}}});   // 0.59375
    one_op({1'b1, {N{1'b0}}});
    one_op({2'b01, {(N-1){1'b0}}});
    one_op({1'b1, {N{1'b1}}});
    lat_sum = 0.0;
    lat_n = 0;
    for (int t = 0; t < 4000; t++) begin
      x = (N+1)'({$urandom, $urandom, $urandom});
      if (t % 4 == 3) x[N:N-1] = 2'b01;
      else            x[N]     = 1'b1;
      one_op(x);
    end
    avg = lat_sum / real'(lat_n);
    $display("average latency over [1,2[ = %0.3f cycles (%0d operands); largest |y - ln x| = %g",
             avg, lat_n, max_err);
    check(avg > 30.6 && avg < 31.6, $sformatf("average latency %0.3f, expected about 31.1", avg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
