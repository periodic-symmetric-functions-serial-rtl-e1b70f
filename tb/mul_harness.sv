// mul_harness: drives one serial_multiplier with random products (some with
// all-ones operands, which give the largest carries), operand blocks that are
// sometimes late, and back-to-back products. Checks every product against
// a * b, the latency of every result block (2L cycles from the block entering
// the counter), that blocks enter no faster than one per L cycles, and that a
// product whose operands arrive on time takes L*NB + L cycles (2N + log N
// when L divides 2N) from its first block to its last result.
// All signals are driven and sampled on the falling clock edge.
module mul_harness #(
  parameter int N    = 32,
  parameter int NOPS = 60
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_carry,      // blocks that entered with a nonzero carry
  output int   n_late,       // blocks that took their carries from the latch
  output int   n_b2b,        // products started right after the previous one
  output int   n_ontime,     // products that met the L*NB + L delay
  output logic done
);
  localparam int L   = neural_pkg::ceil_log2(N);
  localparam int NBI = (N + L - 1) / L;
  localparam int NB  = (2 * N + L - 1) / L;

  typedef logic [127:0] wide_t;

  logic         in_valid, in_ready, busy, out_valid, out_first, out_last;
  logic [L-1:0] a_blk, b_blk, out_blk;

  serial_multiplier #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .a_blk(a_blk), .b_blk(b_blk),
    .busy(busy), .out_valid(out_valid), .out_first(out_first),
    .out_last(out_last), .out_blk(out_blk)
  );

  wide_t  exp_q [$];
  bit     late_q [$];
  longint load_q [$];
  longint cyc = 0;
  longint last_load = -100;
  bit     op_late;

  always @(posedge clk) cyc++;

  function automatic wide_t rnd_operand(bit ones);
    wide_t v = '0;
    for (int w = 0; w < 4; w++) v[w*32 +: 32] = $urandom;
    if (ones) v = '1;
    return v & ((wide_t'(1) << N) - 1);
  endfunction

  // driver
  initial begin
    checks = 0; failures = 0; n_carry = 0; n_late = 0; n_b2b = 0; n_ontime = 0;
    done = 1'b0; in_valid = 1'b0; a_blk = '0; b_blk = '0;
    @(posedge clk iff rst_n);
    for (int op = 0; op < NOPS; op++) begin
      wide_t a, b;
      bit    ones, lateop;
      ones = ($urandom_range(4, 0) == 0);
      a = rnd_operand(ones);
      b = rnd_operand(ones);
      lateop = (op % 3 == 2);
      exp_q.push_back(a * b);
      late_q.push_back(lateop);
      for (int k = 0; k < NBI; k++) begin
        @(negedge clk);
        if (lateop) begin
          // hold the block back for a few cycles
          in_valid = 1'b0;
          repeat ($urandom_range(2 * L, 1)) @(negedge clk);
        end
        in_valid = 1'b1;
        a_blk = L'(a >> (k * L));
        b_blk = L'(b >> (k * L));
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    wait (exp_q.size() == 0);
    repeat (4) @(negedge clk);
    done = 1'b1;
  end

  // block entry: the counter loads at the next rising edge (number cyc + 1)
  always @(negedge clk) begin
    #2;
    if (rst_n && dut.load) begin
      if (dut.cur_j != 0) begin
        if (dut.carry_now != 0) n_carry++;
        if (int'(dut.since_q) != L - 1) n_late++;
        checks++;
        if (cyc + 1 - last_load < L) begin
          failures++;
          $display("FAIL block entered %0d cycles after the previous one", cyc + 1 - last_load);
        end
      end else if (cyc + 1 - last_load == 1) begin
        n_b2b++;
      end
      load_q.push_back(cyc + 1);
      last_load = cyc + 1;
    end
  end

  // results: out_valid seen at the falling edge was set at rising edge cyc
  wide_t  got;
  int     blk = 0;
  longint first_load;
  always @(negedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      longint lc;
      lc = load_q.pop_front();
      checks++;
      if (cyc - lc != 2 * L) begin
        failures++;
        $display("FAIL block latency %0d, expected %0d", cyc - lc, 2 * L);
      end
      checks++;
      if (out_first != (blk == 0) || out_last != (blk == NB - 1)) begin
        failures++;
        $display("FAIL first/last flags at block %0d", blk);
      end
      if (blk == 0) begin
        got = '0;
        first_load = lc;
      end
      got |= wide_t'(out_blk) << (blk * L);
      blk++;
      if (blk == NB) begin
        wide_t e;
        bit    lt;
        e  = exp_q.pop_front();
        lt = late_q.pop_front();
        checks++;
        if (got != e) begin
          failures++;
          $display("FAIL N=%0d product %h expected %h", N, got, e);
        end
        if (!lt) begin
          checks++;
          if (cyc - first_load != L * NB + L) begin
            failures++;
            $display("FAIL product took %0d cycles, expected %0d", cyc - first_load, L * NB + L);
          end else n_ontime++;
        end
        blk = 0;
      end
    end
  end
endmodule
