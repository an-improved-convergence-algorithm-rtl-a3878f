// tb_ln_unit: end-to-end test of the ln(x) unit at reduced precision, plain
// (ACCEL = 0) and accelerated (ACCEL = 1) side by side:
//   N = 8  : every argument in [1/2, 2[, both versions;
//   N = 16 : every argument in [1/2, 2[, both versions;
//   N = 32 : 3000 random arguments, both versions;
//   N = 64 : 1000 random arguments, plain version (the accelerated one at
//            this size is tb_ln_unit_full).
// Every result is checked by ln_unit_harness (cycles, final x, y bit for bit
// and against ln(x), steps performed). The accelerated runs also check the
// average latency over [1, 2[ against 3.4, 7.1 and 15.1 cycles for 8, 16 and
// 32 bits. At the end
// each mechanism must have occurred: add and subtract steps, trivial steps
// (plain), skipped steps (accelerated), exit on x = 1, exit with no
// non-trivial step left, step N-1 reached, arguments below 1.
module tb_ln_unit;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int H = 7;
  int  chk [H], fail [H], add [H], sub [H], triv [H], skip [H];
  int  ex1 [H], exn [H], last [H], below [H];
  bit  fin [H];

  ln_unit_harness #(.N(8),  .ACCEL(1'b0), .COUNT(0))    h0 (clk, rst_n, chk[0], fail[0], fin[0],
    add[0], sub[0], triv[0], skip[0], ex1[0], exn[0], last[0], below[0]);
  ln_unit_harness #(.N(8),  .ACCEL(1'b1), .COUNT(0), .TABLE_L(3.4), .LAT_TOL(0.1)) h1 (clk, rst_n,
    chk[1], fail[1], fin[1], add[1], sub[1], triv[1], skip[1], ex1[1], exn[1], last[1], below[1]);
  ln_unit_harness #(.N(16), .ACCEL(1'b0), .COUNT(0))    h2 (clk, rst_n, chk[2], fail[2], fin[2],
    add[2], sub[2], triv[2], skip[2], ex1[2], exn[2], last[2], below[2]);
  ln_unit_harness #(.N(16), .ACCEL(1'b1), .COUNT(0), .TABLE_L(7.1), .LAT_TOL(0.1)) h3 (clk, rst_n,
    chk[3], fail[3], fin[3], add[3], sub[3], triv[3], skip[3], ex1[3], exn[3], last[3], below[3]);
  ln_unit_harness #(.N(32), .ACCEL(1'b0), .COUNT(3000)) h4 (clk, rst_n, chk[4], fail[4], fin[4],
    add[4], sub[4], triv[4], skip[4], ex1[4], exn[4], last[4], below[4]);
  ln_unit_harness #(.N(32), .ACCEL(1'b1), .COUNT(3000), .TABLE_L(15.1), .LAT_TOL(0.3)) h5 (clk, rst_n,
    chk[5], fail[5], fin[5], add[5], sub[5], triv[5], skip[5], ex1[5], exn[5], last[5], below[5]);
  ln_unit_harness #(.N(64), .ACCEL(1'b0), .COUNT(1000)) h6 (clk, rst_n, chk[6], fail[6], fin[6],
    add[6], sub[6], triv[6], skip[6], ex1[6], exn[6], last[6], below[6]);

  int checks;
  int failures;

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    #200ms;
    $display("FAIL watchdog");
    checks = 0;
    failures = 1;
    for (int k = 0; k < H; k++) begin
      checks += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int plain_add, plain_sub, plain_triv, acc_skip, all_ex1, all_exn, all_last, all_below, acc_add;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin.and() == 1'b1);
    checks = 0;
    failures = 0;
    plain_add = 0; plain_sub = 0; plain_triv = 0; acc_skip = 0; acc_add = 0;
    all_ex1 = 0; all_exn = 0; all_last = 0; all_below = 0;
    for (int k = 0; k < H; k++) begin
      checks += chk[k];
      failures += fail[k];
      all_ex1 += ex1[k];
      all_last += last[k];
      all_below += below[k];
      if (k % 2 == 0) begin
        plain_add += add[k];
        plain_sub += sub[k];
        plain_triv += triv[k];
      end else begin
        acc_add += add[k] + sub[k];
        acc_skip += skip[k];
        all_exn += exn[k];
      end
    end
    $display("mechanisms:");
    need(plain_add, "add steps (x < 1), plain unit");
    need(plain_sub, "subtract steps (x >= 1), plain unit");
    need(plain_triv, "trivial steps taken, plain unit");
    need(acc_add, "non-trivial steps, accelerated unit");
    need(acc_skip, "trivial steps skipped, accelerated unit");
    need(all_ex1, "exits on x = 1");
    need(all_exn, "exits with no non-trivial step left");
    need(all_last, "operations reaching step N-1");
    need(all_below, "arguments below 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
