// ln_unit_harness: drives one ln_unit instance through a list of operands and
// checks every result. Used by tb_ln_unit, which runs several sizes side by
// side.
//
// Operands: the two worked examples 1.71875 and 0.59375, x = 1, x = 1/2 and
// the largest argument, then either every argument in [1/2, 2[
// (COUNT = 0) or COUNT random ones (three in four drawn from [1, 2[).
// For each operation it checks against ln_ref_pkg::run():
//   - the number of clocks from start to done,
//   - the final x register, bit for bit,
//   - y bit for bit against exactly rounded tables, and also against tables
//     rounded from double precision (N <= 40), and |y - ln(x)| within
//     (2 + N/2) LSB,
//   - the number of add steps, subtract steps, trivial steps and skipped steps
//     the unit actually performed (observed inside the unit).
// It also averages the latency over the arguments in [1, 2[ and, when
// TABLE_L > 0, checks it against that figure within LAT_TOL cycles.
module ln_unit_harness #(
  parameter int  N       = 8,
  parameter bit  ACCEL   = 1'b0,
  parameter int  COUNT   = 0,
  parameter real TABLE_L = 0.0,
  parameter real LAT_TOL = 0.2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished,
  output int   n_add,
  output int   n_sub,
  output int   n_trivial,
  output int   n_skipped,
  output int   n_exit_one,
  output int   n_exit_none,
  output int   n_hit_last,
  output int   n_below_one
);
  import ln_ref_pkg::*;

  logic start = 1'b0;
  logic [N:0] x_in = '0;
  logic busy, done;
  logic signed [N+1:0] y;

  ln_unit #(.N(N), .ACCEL(ACCEL)) dut (.clk, .rst_n, .start, .x_in, .busy, .done, .y);

  // events seen inside the unit during one operation
  int hw_add, hw_sub, hw_triv, hw_skip;
  always @(posedge clk) begin
    if (dut.step_en) begin
      if (dut.a_prime && !dut.sub) hw_add++;
      if (dut.a_prime &&  dut.sub) hw_sub++;
      if (!dut.a_prime)            hw_triv++;
      hw_skip += int'(dut.step) - int'(dut.i);
    end
  end

  real lat_sum = 0.0;
  real max_err_lsb = 0.0;
  int  lat_n = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d ACCEL=%0b %s", N, ACCEL, what);
    end
  endtask

  task automatic one_op(input logic [N:0] x);
    ref_t r;
    int   cyc;
    real  yr, want, err, tol;
    r = run(128'(x), N, ACCEL);
    hw_add = 0; hw_sub = 0; hw_triv = 0; hw_skip = 0;
    @(negedge clk);
    start = 1'b1;
    x_in  = x;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 4 * N) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == r.cycles, $sformatf("x=%h cycles %0d want %0d", x, cyc, r.cycles));
    check(128'(dut.x) == r.x_final, $sformatf("x=%h final x %h want %h", x, dut.x, r.x_final));
    if (N <= 40) check(longint'(y) == r.y_lsb, $sformatf("x=%h y=%0d want %0d", x, y, r.y_lsb));
    check(y == r.y_exact[N+1:0], $sformatf("x=%h y=%h want %h (exact tables)", x, y, r.y_exact[N+1:0]));
    yr   = fix_to_real(128'(y), N + 2, N);
    want = $ln(fix_to_real(128'(x), N + 2, N));
    err  = yr - want;
    if (err < 0.0) err = -err;
    tol  = (2.0 + N / 2.0) * (2.0 ** (-N)) + 2.0 ** (-50);
    if (err * (2.0 ** N) > max_err_lsb) max_err_lsb = err * (2.0 ** N);
    check(err <= tol, $sformatf("x=%h |y - ln x| = %g", x, err));
    check(hw_add == r.adds && hw_sub == r.subs && hw_triv == r.trivial && hw_skip == r.skipped,
          $sformatf("x=%h steps +%0d -%0d 0:%0d skip %0d, want +%0d -%0d 0:%0d skip %0d", x,
                    hw_add, hw_sub, hw_triv, hw_skip, r.adds, r.subs, r.trivial, r.skipped));
    n_add += hw_add;
    n_sub += hw_sub;
    n_trivial += hw_triv;
    n_skipped += hw_skip;
    n_exit_one += int'(r.exit_one);
    n_exit_none += int'(r.exit_none);
    n_hit_last += int'(r.hit_last);
    if (!x[N]) n_below_one++;
    if (x[N]) begin
      lat_sum += real'(cyc);
      lat_n++;
    end
  endtask

  function automatic logic [N:0] from_real(input real v);
    return (N+1)'(longint'(v * (2.0 ** N)));
  endfunction

  initial begin
    logic [N:0] x;
    checks = 0; failures = 0; finished = 0;
    n_add = 0; n_sub = 0; n_trivial = 0; n_skipped = 0;
    n_exit_one = 0; n_exit_none = 0; n_hit_last = 0; n_below_one = 0;
    @(posedge rst_n);
    one_op({2'b11, 1'b0, 1'b1, 1'b1, 1'b1, {(N-5){1'b0}}});   // 1.10111 = 1.71875
    one_op({2'b01, 1'b0, 1'b0, 1'b1, 1'b1, {(N-5){1'b0}}});   // 0.10011 = 0.59375
    one_op({1'b1, {N{1'b0}}});
    one_op({2'b01, {(N-1){1'b0}}});
    one_op({1'b1, {N{1'b1}}});
    lat_sum = 0.0;
    lat_n = 0;
    if (COUNT == 0) begin
      for (longint v = longint'(1) << (N - 1); v < (longint'(1) << (N + 1)); v++) one_op((N+1)'(v));
    end else begin
      for (int t = 0; t < COUNT; t++) begin
        x = (N+1)'({$urandom, $urandom, $urandom});
        if (t % 4 == 3) x[N:N-1] = 2'b01;
        else            x[N]     = 1'b1;
        one_op(x);
      end
    end
    if (TABLE_L > 0.0) begin
      real avg;
      avg = lat_sum / real'(lat_n);
      $display("N=%0d ACCEL=%0b average latency over [1,2[ = %0.3f cycles (%0d operands)",
               N, ACCEL, avg, lat_n);
      check(avg > TABLE_L - LAT_TOL && avg < TABLE_L + LAT_TOL,
            $sformatf("average latency %0.3f, expected about %0.1f", avg, TABLE_L));
    end
    $display("N=%0d ACCEL=%0b largest |y - ln x| = %0.2f LSB", N, ACCEL, max_err_lsb);
    finished = 1;
  end
endmodule
