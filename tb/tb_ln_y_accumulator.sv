// tb_ln_y_accumulator: N = 16. Random table values and random {x_0, a'}
// selections; the model subtracts ln_plus for 01, ln_minus for 11 and nothing
// for 00 and 10. Also checks clear priority, hold when idle and reset.
module tb_ln_y_accumulator;
  localparam int N = 16;

  logic clk = 0;
  logic rst_n = 0;
  logic clear = 0;
  logic step_en = 0;
  logic x0 = 0;
  logic a_prime = 0;
  logic signed [N+1:0] ln_plus = '0;
  logic signed [N+1:0] ln_minus = '0;
  logic signed [N+1:0] y;

  int checks = 0;
  int failures = 0;
  longint model;

  ln_y_accumulator #(.N(N)) dut (.*);

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
    check(y == 0, "reset");
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      clear = 1;
      step_en = 1;               // clear must win over a step
      x0 = 0;
      a_prime = 1;
      ln_plus = 18'sh01234;
      @(negedge clk);
      clear = 0;
      model = 0;
      check(y == 0, "clear");
      for (int k = 0; k < 8; k++) begin
        step_en  = ($urandom % 4) != 0;
        x0       = $urandom % 2;
        a_prime  = $urandom % 2;
        ln_plus  = (N+2)'($urandom % (1 << (N - 3)));            // positive terms
        ln_minus = -(N+2)'($urandom % (1 << (N - 3)));           // negative terms
        @(negedge clk);
        if (step_en && a_prime) model -= x0 ? longint'(ln_minus) : longint'(ln_plus);
        check(longint'(y) == model, $sformatf("sel=%b%b en=%b got %0d want %0d",
                                              x0, a_prime, step_en, y, model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
