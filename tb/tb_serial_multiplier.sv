// tb_serial_multiplier: runs serial multipliers of N = 32 (default: L = 5,
// 13 product blocks), N = 16 (L = 4, 2N/L whole: 2N + log N = 36 cycles) and
// N = 8 (L = 3) and N = 64 (L = 6) through random, all-ones, late-operand and back-to-back
// products; see mul_harness.
module tb_serial_multiplier;
  logic clk = 0, rst_n = 0;
  int c [4], f [4], nc [4], nl [4], nb [4], no [4];
  logic d [4];
  int checks, failures;

  always #5 clk = ~clk;

  mul_harness #(.N(32)) h0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]),
    .n_carry(nc[0]), .n_late(nl[0]), .n_b2b(nb[0]), .n_ontime(no[0]), .done(d[0]));
  mul_harness #(.N(16)) h1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]),
    .n_carry(nc[1]), .n_late(nl[1]), .n_b2b(nb[1]), .n_ontime(no[1]), .done(d[1]));
  mul_harness #(.N(8)) h2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]),
    .n_carry(nc[2]), .n_late(nl[2]), .n_b2b(nb[2]), .n_ontime(no[2]), .done(d[2]));
  mul_harness #(.N(64), .NOPS(30)) h3 (.clk(clk), .rst_n(rst_n), .checks(c[3]), .failures(f[3]),
    .n_carry(nc[3]), .n_late(nl[3]), .n_b2b(nb[3]), .n_ontime(no[3]), .done(d[3]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < 4; i++) begin
      $display("harness %0d: carries %0d late %0d back-to-back %0d on-time %0d",
               i, nc[i], nl[i], nb[i], no[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (nc[i] == 0 || nl[i] == 0 || nb[i] == 0 || no[i] == 0) begin
        failures++;
        $display("FAIL harness %0d: a mechanism never occurred", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
