// tb_ln_examples: the two worked examples, step by step.
//   Example 1: x = 1.10111b = 1.71875 at 8 bits. Expected non-trivial steps
//     i=1 a=-1 x=0.11011100b, i=2 a=+1 x=1.00010011b, i=4 a=-1 x=1.00000010b,
//     i=7 a=-1 x=1.00000000b; result near 0.542385 (the example's y(8),
//     which sums unrounded logarithms) and ln(1.71875) = 0.541597.
//   Example 2: x = 0.10011b = 0.59375 at 10 bits. Expected steps
//     i=1 a=+1 x=0.1110010000b, i=3 a=+1 x=1.0000000010b, i=9 a=-1 x=1.0b;
//     result near -0.521293 (the example's y(10)) and ln(0.59375) = -0.521297.
// Each example runs on a plain (ACCEL = 0) and an accelerated unit; both
// must take the same steps. The plain unit takes N-1 cycles; the accelerated
// unit one cycle per non-trivial step (step N-1 is non-trivial in both).
module tb_ln_examples;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 1'b0;
  logic [8:0]  x8 = 9'h1B8;      // 1.10111000
  logic [10:0] x10 = 11'h260;    // 0.1001100000
  logic        busy [4], done [4];
  logic signed [9:0]  y8p, y8a;
  logic signed [11:0] y10p, y10a;

  ln_unit #(.N(8),  .ACCEL(1'b0)) u8p  (.clk, .rst_n, .start, .x_in(x8),  .busy(busy[0]), .done(done[0]), .y(y8p));
  ln_unit #(.N(8),  .ACCEL(1'b1)) u8a  (.clk, .rst_n, .start, .x_in(x8),  .busy(busy[1]), .done(done[1]), .y(y8a));
  ln_unit #(.N(10), .ACCEL(1'b0)) u10p (.clk, .rst_n, .start, .x_in(x10), .busy(busy[2]), .done(done[2]), .y(y10p));
  ln_unit #(.N(10), .ACCEL(1'b1)) u10a (.clk, .rst_n, .start, .x_in(x10), .busy(busy[3]), .done(done[3]), .y(y10a));

  // trace of non-trivial steps: {i, a (+1/-1), x after the step}
  typedef struct { int i; int a; int x; } step_t;
  step_t tr [4][$];
  int    cyc [4];
  bit    seen_done [4];

  // x after a step is the register value one clock later
  always @(posedge clk) begin
    if (u8p.step_en && u8p.a_prime)   tr[0].push_back('{int'(u8p.step),  u8p.sub  ? -1 : 1, 0});
    if (u8a.step_en && u8a.a_prime)   tr[1].push_back('{int'(u8a.step),  u8a.sub  ? -1 : 1, 0});
    if (u10p.step_en && u10p.a_prime) tr[2].push_back('{int'(u10p.step), u10p.sub ? -1 : 1, 0});
    if (u10a.step_en && u10a.a_prime) tr[3].push_back('{int'(u10a.step), u10a.sub ? -1 : 1, 0});
  end
  always @(negedge clk) begin
    if (tr[0].size() > 0) tr[0][$].x = int'(u8p.x);
    if (tr[1].size() > 0) tr[1][$].x = int'(u8a.x);
    if (tr[2].size() > 0) tr[2][$].x = int'(u10p.x);
    if (tr[3].size() > 0) tr[3][$].x = int'(u10a.x);
  end

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_trace(input int k, input step_t want [$], input string name);
    check(tr[k].size() == want.size(), $sformatf("%s: %0d non-trivial steps, want %0d", name, tr[k].size(), want.size()));
    for (int s = 0; s < want.size() && s < tr[k].size(); s++)
      check(tr[k][s] == want[s], $sformatf("%s step %0d: i=%0d a=%0d x=%h, want i=%0d a=%0d x=%h", name, s,
            tr[k][s].i, tr[k][s].a, tr[k][s].x, want[s].i, want[s].a, want[s].x));
  endtask

  function automatic bit near(input real got, input real want, input real tol);
    return (got - want <= tol) && (want - got <= tol);
  endfunction

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_t e1 [$];
    step_t e2 [$];
    real r;
    e1 = '{'{1, -1, 'h0DC}, '{2, 1, 'h113}, '{4, -1, 'h102}, '{7, -1, 'h100}};
    e2 = '{'{1, 1, 'h390}, '{3, 1, 'h402}, '{9, -1, 'h400}};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 1; c <= 20; c++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) if (done[k] && !seen_done[k]) begin
        seen_done[k] = 1'b1;
        cyc[k] = c;
      end
    end
    check_trace(0, e1, "example 1 plain");
    check_trace(1, e1, "example 1 accelerated");
    check_trace(2, e2, "example 2 plain");
    check_trace(3, e2, "example 2 accelerated");
    check(cyc[0] == 7 && cyc[2] == 9, $sformatf("plain cycles %0d, %0d want 7, 9", cyc[0], cyc[2]));
    check(cyc[1] == 4 && cyc[3] == 3, $sformatf("accelerated cycles %0d, %0d want 4, 3", cyc[1], cyc[3]));
    check(y8p == y8a && y10p == y10a, "plain and accelerated results differ");
    r = real'(y8a) / 256.0;
    $display("example 1: y = %0.6f", r);
    check(near(r, 0.542385326, 2.0 / 256.0) && near(r, 0.541597282, 3.0 / 256.0), "example 1 result");
    r = real'(y10a) / 1024.0;
    $display("example 2: y = %0.6f", r);
    check(near(r, -0.521293108, 2.0 / 1024.0) && near(r, -0.521296923, 3.0 / 1024.0), "example 2 result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
