// tb_ln_step_control: N = 8. The testbench plays the datapath: it feeds back
// next_step = i (plain unit), or next_step = i + s with a random skip s and
// next_valid = 0 once i + s passes N-1 (accelerated unit), and raises x_is_one
// after a chosen number of steps. For each run it checks the sequence of step
// indices performed, the number of cycles from start to done, the one-cycle
// load and done pulses, and that a start while busy is ignored.
module tb_ln_step_control;
  localparam int N  = 8;
  localparam int SW = $clog2(N + 1);

  logic clk = 0;
  logic rst_n = 0;
  logic start = 0;
  logic x_is_one = 0;
  logic next_valid;
  logic [SW-1:0] next_step;
  logic load, step_en, busy, done;
  logic [SW-1:0] i;

  int checks = 0;
  int failures = 0;

  // environment
  int skip_of [int];      // skip to apply when the counter is at a given i
  bit accel_mode = 0;
  int one_after = 1000;   // raise x_is_one after this many steps
  int steps_done;
  int seen [$];
  int loads;

  always_comb begin
    int t;
    t = int'(i) + (accel_mode && skip_of.exists(int'(i)) ? skip_of[int'(i)] : 0);
    next_valid = !(accel_mode && t > N - 1);
    next_step  = SW'(t);
  end

  ln_step_control #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (load) loads++;
    if (step_en) begin
      seen.push_back(int'(next_step));
      steps_done++;
    end
  end
  always @(negedge clk) x_is_one = (steps_done >= one_after);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // run one operation; returns cycles from the start edge to done
  task automatic run(output int cycles);
    seen = {};
    steps_done = 0;
    loads = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy && !done, "busy after start");
    cycles = 0;
    while (!done) begin
      if (cycles == 3) start = 1;    // must be ignored while busy
      @(negedge clk);
      start = 0;
      cycles++;
      if (cycles > 50) break;
    end
    check(loads == 1, $sformatf("load pulses %0d", loads));
    @(negedge clk);
    check(!done && !busy, "done is one pulse and unit idle");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int want [$];
    int ii;
    repeat (2) @(negedge clk);
    check(!busy && !done, "reset state");
    rst_n = 1;

    // plain unit: steps 1..N-1, N-1 cycles
    accel_mode = 0;
    one_after = 1000;
    run(cyc);
    check(cyc == N - 1, $sformatf("plain cycles %0d", cyc));
    want = {};
    for (int k = 1; k < N; k++) want.push_back(k);
    check(seen == want, "plain step sequence");

    // plain unit, x reaches 1 after 3 steps: 3 steps and one exit cycle
    one_after = 3;
    run(cyc);
    check(cyc == 4 && seen.size() == 3, $sformatf("early exit cycles %0d steps %0d", cyc, seen.size()));
    one_after = 1000;

    // accelerated unit with random skips
    accel_mode = 1;
    for (int t = 0; t < 40; t++) begin
      skip_of.delete();
      for (int k = 1; k <= N; k++) skip_of[k] = $urandom % 3;
      want = {};
      ii = 1;
      while (1) begin
        int j;
        j = ii + skip_of[ii];
        if (j > N - 1) break;
        want.push_back(j);
        if (j == N - 1) break;
        ii = j + 1;
      end
      run(cyc);
      check(seen == want, $sformatf("accelerated sequence run %0d", t));
      check(cyc == want.size() + ((want.size() > 0 && want[$] == N - 1) ? 0 : 1),
            $sformatf("accelerated cycles %0d for %0d steps", cyc, want.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
