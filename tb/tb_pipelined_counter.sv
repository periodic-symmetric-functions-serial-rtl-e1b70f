// tb_pipelined_counter: feeds random vectors, with random gaps, into two
// pipelined counters (default 5 inputs / 3 levels, and 8 inputs with weights
// 3,1,4,1,5,9,2,6 / 5 levels). Checks each result against the weighted sum
// worked out here, the R-cycle latency, the order and tags, and that cum[0]
// shows the MSB one cycle after a vector enters. Stimulus is driven and
// sampled on the falling clock edge.
module tb_pipelined_counter;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0, gaps = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  localparam int W1 [8] = '{3, 1, 4, 1, 5, 9, 2, 6};

  logic       v0, v1, ov0, ov1;
  logic [4:0] x0;
  logic [7:0] x1;
  logic [7:0] t0, t1, ot0, ot1;
  logic [2:0] s0;
  logic [4:0] s1;
  logic [2:0] cum0 [3];
  logic [4:0] cum1 [5];

  pipelined_counter #(.TW(8)) dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(v0), .x(x0), .in_tag(t0),
    .cum(cum0), .out_valid(ov0), .out_s(s0), .out_tag(ot0));
  pipelined_counter #(.NIN(8), .W(W1), .R(5), .TW(8)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .x(x1), .in_tag(t1),
    .cum(cum1), .out_valid(ov1), .out_s(s1), .out_tag(ot1));

  int     exp0 [$], exp1 [$];
  longint lc0 [$], lc1 [$];
  int     tg0 [$], tg1 [$];

  task automatic chk(string nm, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", nm, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive
  initial begin
    v0 = 0; v1 = 0; x0 = '0; x1 = '0; t0 = '0; t1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      v0 = ($urandom_range(3, 0) != 0);
      v1 = ($urandom_range(3, 0) != 0);
      if (!v0) gaps++;
      x0 = 5'($urandom);
      x1 = 8'($urandom);
      t0 = 8'(n);
      t1 = 8'(n + 7);
      if (v0) begin
        exp0.push_back(x0[0] + 2 * x0[1] + x0[2] + 2 * x0[3] + x0[4]);
        lc0.push_back(cyc + 1);
        tg0.push_back(t0);
      end
      if (v1) begin
        automatic int e = 0;
        for (int i = 0; i < 8; i++) e += x1[i] * W1[i];
        exp1.push_back(e);
        lc1.push_back(cyc + 1);
        tg1.push_back(t1);
      end
    end
    @(negedge clk);
    v0 = 0; v1 = 0;
    repeat (10) @(negedge clk);
    chk("drained0", exp0.size(), 0);
    chk("drained1", exp1.size(), 0);
    chk("gaps", gaps > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results (out_valid seen at a falling edge was set at rising edge cyc)
  always @(negedge clk) begin
    #1;
    if (rst_n && ov0) begin
      chk("sum0", s0, exp0.pop_front());
      chk("lat0", cyc - lc0.pop_front(), 3);
      chk("tag0", ot0, tg0.pop_front());
    end
    if (rst_n && ov1) begin
      chk("sum1", s1, exp1.pop_front());
      chk("lat1", cyc - lc1.pop_front(), 5);
      chk("tag1", ot1, tg1.pop_front());
    end
    // MSB is known in stage 0, the full value in the last stage
    if (rst_n && dut1.st[0].v_q) begin
      automatic int e = 0;
      for (int i = 0; i < 8; i++) e += dut1.st[0].x_q[i] * W1[i];
      chk("cum0_msb", cum1[0][4], e >> 4);
    end
    if (rst_n && dut1.st[4].v_q) begin
      automatic int e = 0;
      for (int i = 0; i < 8; i++) e += dut1.st[4].x_q[i] * W1[i];
      chk("cum4", cum1[4], e);
    end
  end
endmodule
