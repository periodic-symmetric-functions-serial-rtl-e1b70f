// tb_serial_adder: runs three serial adders, N=32 with delta=5 (the defaults,
// last block 2 bits wide), N=16 with delta=8 (K=2) and N=64 with delta=6, through random,
// carry-chain, bubbled and back-to-back additions; see adder_harness.
module tb_serial_adder;
  logic clk = 0, rst_n = 0;
  int c0, f0, cf0, bb0, bt0, c1, f1, cf1, bb1, bt1, c2, f2, cf2, bb2, bt2;
  logic d0, d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  adder_harness #(.N(32), .K(1)) h0 (.clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0),
    .n_carry_fb(cf0), .n_bubble(bb0), .n_b2b(bt0), .done(d0));
  adder_harness #(.N(16), .K(2)) h1 (.clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1),
    .n_carry_fb(cf1), .n_bubble(bb1), .n_b2b(bt1), .done(d1));
  adder_harness #(.N(64), .K(1), .NOPS(100)) h2 (.clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2),
    .n_carry_fb(cf2), .n_bubble(bb2), .n_b2b(bt2), .done(d2));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("carry feedback 1: %0d/%0d  bubbles: %0d/%0d  back-to-back: %0d/%0d",
             cf0, cf1, bb0, bb1, bt0, bt1);
    checks += 3;
    if (cf0 == 0 || cf1 == 0 || cf2 == 0) begin failures++; $display("FAIL no carry fed back"); end
    if (bb0 == 0 || bb1 == 0 || bb2 == 0) begin failures++; $display("FAIL no bubble"); end
    if (bt0 == 0 || bt1 == 0 || bt2 == 0) begin failures++; $display("FAIL no back-to-back addition"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
