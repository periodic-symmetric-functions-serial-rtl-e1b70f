// adder_harness: drives one serial_adder with random additions (some with
// all-ones operands for long carry chains), random bubbles and back-to-back
// additions, and checks every result against a + b + cin and every block's
// latency against DELTA + 1 cycles. It also checks that a contiguous addition
// takes DELTA + ceil(N/DELTA) cycles from the first load to the last result.
// Counts how often a fed-back carry was 1, a bubble occurred and two additions
// followed each other without a gap.
module adder_harness #(
  parameter int N    = 32,
  parameter int K    = 1,
  parameter int NOPS = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_carry_fb,
  output int   n_bubble,
  output int   n_b2b,
  output logic done
);
  localparam int DELTA = K * neural_pkg::ceil_log2(N);
  localparam int NBLK  = (N + DELTA - 1) / DELTA;

  logic             in_valid, in_first, cin;
  logic [DELTA-1:0] a_blk, b_blk;
  logic             out_valid, out_first, out_carry;
  logic [DELTA-1:0] out_sum;

  serial_adder #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_first(in_first), .a_blk(a_blk), .b_blk(b_blk), .cin(cin),
    .out_valid(out_valid), .out_first(out_first), .out_sum(out_sum), .out_carry(out_carry)
  );

  typedef logic [127:0] wide_t;

  wide_t  exp_q [$];
  longint load_cyc_q [$];
  longint cyc = 0;
  longint first_load_cyc;
  bit     contiguous;

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic wide_t rnd_operand(int kind);
    wide_t v = '0;
    for (int w = 0; w < 4; w++) v[w*32 +: 32] = $urandom;
    if (kind == 1) v = '1;
    v &= (wide_t'(1) << N) - 1;
    return v;
  endfunction

  // driver
  initial begin
    checks = 0; failures = 0; n_carry_fb = 0; n_bubble = 0; n_b2b = 0; done = 1'b0;
    in_valid = 0; in_first = 0; cin = 0; a_blk = '0; b_blk = '0;
    @(posedge clk iff rst_n);
    for (int op = 0; op < NOPS; op++) begin
      wide_t a, b;
      bit    c;
      int    kind;
      kind = ($urandom_range(7, 0) == 0) ? 1 : 0;
      a = rnd_operand(kind);
      b = rnd_operand(0);
      if (kind == 1) b = 1;
      c = $urandom_range(1, 0);
      exp_q.push_back(a + b + wide_t'(c));
      for (int k = 0; k < NBLK; k++) begin
        // bubbles inside an addition and between additions
        while ($urandom_range(5, 0) == 0 && op > 2) begin
          in_valid <= 1'b0;
          n_bubble++;
          @(posedge clk);
        end
        if (k == 0 && in_valid) n_b2b++;
        in_valid <= 1'b1;
        in_first <= (k == 0);
        cin      <= c;
        a_blk    <= DELTA'(a >> (k * DELTA));
        b_blk    <= DELTA'(b >> (k * DELTA));
        load_cyc_q.push_back(cyc);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (DELTA + 4) @(posedge clk);
    done = 1'b1;
  end

  // count fed-back carries that were 1 (a block loaded while the block in the
  // input latch produced a carry)
  always @(posedge clk)
    if (rst_n && in_valid && !in_first && dut.carry_fb) n_carry_fb++;

  // monitor
  wide_t  got;
  int     blk = 0;
  initial begin
    @(posedge clk iff rst_n);
    forever begin
      @(posedge clk);
      if (out_valid) begin
        longint lc;
        lc = load_cyc_q.pop_front();
        checks++;
        // lc was sampled one edge before the load edge, and out_valid is seen
        // one edge after the edge that set it: latency = cyc - lc - 2
        if (cyc - lc - 2 != DELTA + 1) begin
          failures++;
          $display("FAIL latency %0d cycles, expected %0d", cyc - lc - 2, DELTA + 1);
        end
        if (out_first != (blk == 0)) begin
          failures++;
          $display("FAIL out_first");
        end
        if (blk == 0) begin
          got = '0;
          first_load_cyc = lc;
        end
        got |= wide_t'(out_sum) << (blk * DELTA);
        blk++;
        if (blk == NBLK) begin
          wide_t e;
          got |= wide_t'(out_carry) << (NBLK * DELTA);
          e = exp_q.pop_front();
          checks++;
          if (got != e) begin
            failures++;
            $display("FAIL N=%0d sum %h expected %h", N, got, e);
          end
          // whole-addition delay: DELTA + NBLK cycles when no bubble intervened
          if (cyc - 2 - first_load_cyc == DELTA + NBLK) contiguous = 1;
          blk = 0;
        end
      end
    end
  end

  final begin
    if (!contiguous) $display("note: no contiguous addition observed");
  end

  // at least one addition must have run without bubbles in DELTA + NBLK cycles
  always @(posedge done) begin
    checks++;
    if (!contiguous) begin
      failures++;
      $display("FAIL no addition finished in DELTA + N/DELTA cycles");
    end
  end
endmodule
