// tb_ln_x_normalizer: N = 16. Loads random values in [0, 2[ and applies
// random steps (index 1..16, digit 0 or 1); the expected register value is
// x - floor(x / 2^i) when x >= 1 and x + floor(x / 2^i) when x < 1, or x
// unchanged for a zero digit. Also checks load priority, hold when idle,
// reset, and the x = 1 flag.
module tb_ln_x_normalizer;
  localparam int N  = 16;
  localparam int SW = $clog2(N + 1);

  logic clk = 0;
  logic rst_n = 0;
  logic load = 0;
  logic [N:0] x_load = '0;
  logic step_en = 0;
  logic [SW-1:0] step = '0;
  logic a_prime = 0;
  logic [N:0] x;
  logic x_is_one;

  int checks = 0;
  int failures = 0;
  longint model;

  ln_x_normalizer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
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
    @(negedge clk);
    @(negedge clk);
    check(x == 0, "reset");
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      load = 1;
      x_load = (N+1)'($urandom);
      step_en = 1;                 // load must win over a step
      step = SW'(1);
      a_prime = 1;
      @(negedge clk);
      model = longint'(x_load);
      check(longint'(x) == model, $sformatf("load %h got %h", x_load, x));
      load = 0;
      for (int k = 0; k < 6; k++) begin
        step_en = ($urandom % 4) != 0;
        step = SW'(1 + $urandom % N);
        a_prime = $urandom % 2;
        @(negedge clk);
        if (step_en && a_prime) begin
          if (model >= (64'd1 << N)) model = model - (model >> step);
          else                       model = model + (model >> step);
        end
        check(longint'(x) == model, $sformatf("step i=%0d a'=%b en=%b got %h want %h",
                                              step, a_prime, step_en, x, model));
        check(x_is_one == (model == (64'd1 << N)), "x_is_one");
      end
    end
    // exactly one
    load = 1;
    x_load = {1'b1, {N{1'b0}}};
    @(negedge clk);
    load = 0;
    step_en = 0;
    check(x_is_one, "x_is_one at 1.0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
