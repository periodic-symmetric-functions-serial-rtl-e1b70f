// tb_neural_arith_top: end-to-end test of neural_arith_top at its default
// parameters. In parallel it
//   - sweeps every count of ones through the four symmetric-function
//     networks and checks them against their definitions,
//   - streams random and carry-chain additions, with bubbles and back-to-back
//     additions, through the serial adder and checks the sums and the
//     DELTA + ceil(N/DELTA) cycle delay,
//   - streams random and all-ones products, some with late operand blocks,
//     through the serial multiplier and checks the products and the
//     L*NB + L cycle delay.
// Each mechanism (cutoff forcing, fed-back carry, bubble, back-to-back
// addition, nonzero multiplier carry, carry latch, back-to-back product) must
// occur at least once. Stimulus is driven and sampled on the falling edge.
`include "tb/sym_vec.svh"
module tb_neural_arith_top;
  localparam int NF    = 16;
  localparam int NA    = 32;
  localparam int NM    = 32;
  localparam int DELTA = 5;
  localparam int NBA   = 7;      // ceil(32/5) adder blocks
  localparam int LM    = 5;
  localparam int NBIM  = 7;      // ceil(32/5) operand blocks
  localparam int NBM   = 13;     // ceil(64/5) product blocks

  typedef logic [127:0] wide_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic [NF-1:0] per_x, cut_x, multi_x, cnt_x;
  logic          per_y, cut_y, cut_active, multi_y;
  logic [2:0]    per_g;
  logic [1:0]    multi_sub;
  logic [4:0]    cnt_s;
  logic          add_in_valid, add_in_first, add_cin, add_out_valid, add_out_first, add_out_carry;
  logic [DELTA-1:0] add_a_blk, add_b_blk, add_out_sum;
  logic          mul_in_valid, mul_in_ready, mul_busy, mul_out_valid, mul_out_first, mul_out_last;
  logic [LM-1:0] mul_a_blk, mul_b_blk, mul_out_blk;

  neural_arith_top dut (.*);

  int checks = 0, failures = 0;
  int n_cutoff = 0, n_carry_fb = 0, n_bubble = 0, n_add_b2b = 0;
  int n_mul_carry = 0, n_mul_late = 0, n_mul_b2b = 0, n_add_ontime = 0, n_mul_ontime = 0;
  bit fn_done = 0, add_done = 0, mul_done = 0;

  task automatic chk(string nm, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", nm, got, exp);
    end
  endtask

  function automatic bit pf(int x, int a, int b, int t);
    return (x >= a) && (((x - a) % t) < (b - a));
  endfunction

  function automatic wide_t rnd_operand(int n, bit ones);
    wide_t v = '0;
    for (int w = 0; w < 4; w++) v[w*32 +: 32] = $urandom;
    if (ones) v = '1;
    return v & ((wide_t'(1) << n) - 1);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- symmetric-function networks
  initial begin
    per_x = '0; cut_x = '0; multi_x = '0; cnt_x = '0;
    for (int rep = 0; rep < 10; rep++)
      for (int c = 0; c <= NF; c++) begin
        @(negedge clk);
        `SYM_RANDOM_VECTOR(NF, c, per_x)
        `SYM_RANDOM_VECTOR(NF, c, cut_x)
        `SYM_RANDOM_VECTOR(NF, c, multi_x)
        `SYM_RANDOM_VECTOR(NF, c, cnt_x)
        #1;
        chk("periodic", per_y, pf(c, 2, 4, 5));
        chk("cutoff", cut_y, pf(c > 12 ? 12 : c, 2, 4, 5));
        chk("cut_active", cut_active, c > 12);
        if (cut_active && !pf(c, 2, 4, 5)) n_cutoff++;
        chk("multi", multi_y, pf(c, 1, 2, 4) | pf(c, 3, 5, 7));
        chk("counter", cnt_s, c);
      end
    fn_done = 1;
  end

  // ---------------- serial adder
  wide_t  add_exp_q [$];
  longint add_first_q [$];
  initial begin
    add_in_valid = 0; add_in_first = 0; add_cin = 0; add_a_blk = '0; add_b_blk = '0;
    @(posedge clk iff rst_n);
    for (int op = 0; op < 40; op++) begin
      wide_t a, b;
      bit c, ones;
      ones = (op % 5 == 1);
      a = rnd_operand(NA, ones);
      b = ones ? wide_t'(1) : rnd_operand(NA, 0);
      c = $urandom_range(1, 0);
      add_exp_q.push_back(a + b + wide_t'(c));
      for (int k = 0; k < NBA; k++) begin
        @(negedge clk);
        if (op % 4 == 3 && $urandom_range(2, 0) == 0) begin
          add_in_valid = 0;
          n_bubble++;
          @(negedge clk);
        end
        if (k == 0 && add_in_valid) n_add_b2b++;
        if (add_in_valid && !add_in_first && k != 0 && dut.u_add.carry_fb) n_carry_fb++;
        if (k == 0) add_first_q.push_back(cyc + 1);
        add_in_valid = 1;
        add_in_first = (k == 0);
        add_cin = c;
        add_a_blk = DELTA'(a >> (k * DELTA));
        add_b_blk = DELTA'(b >> (k * DELTA));
      end
    end
    @(negedge clk);
    add_in_valid = 0;
    wait (add_exp_q.size() == 0);
    add_done = 1;
  end

  wide_t add_got;
  int    add_blk = 0;
  always @(negedge clk) begin
    #1;
    if (rst_n && add_out_valid) begin
      if (add_blk == 0) add_got = '0;
      chk("add_first", add_out_first, add_blk == 0);
      add_got |= wide_t'(add_out_sum) << (add_blk * DELTA);
      add_blk++;
      if (add_blk == NBA) begin
        longint fl;
        add_got |= wide_t'(add_out_carry) << (NBA * DELTA);
        chk("sum", add_got, add_exp_q.pop_front());
        fl = add_first_q.pop_front();
        if (cyc - fl == DELTA + NBA) n_add_ontime++;
        add_blk = 0;
      end
    end
  end

  // ---------------- serial multiplier
  wide_t  mul_exp_q [$];
  bit     mul_late_q [$];
  longint mul_first_load;
  initial begin
    mul_in_valid = 0; mul_a_blk = '0; mul_b_blk = '0;
    @(posedge clk iff rst_n);
    for (int op = 0; op < 16; op++) begin
      wide_t a, b;
      bit ones, late;
      ones = (op % 4 == 1);
      late = (op % 3 == 2);
      a = rnd_operand(NM, ones);
      b = rnd_operand(NM, ones);
      mul_exp_q.push_back(a * b);
      mul_late_q.push_back(late);
      for (int k = 0; k < NBIM; k++) begin
        @(negedge clk);
        if (late) begin
          mul_in_valid = 0;
          repeat ($urandom_range(8, 1)) @(negedge clk);
        end
        mul_in_valid = 1;
        mul_a_blk = LM'(a >> (k * LM));
        mul_b_blk = LM'(b >> (k * LM));
        #1;
        while (!mul_in_ready) begin
          @(negedge clk);
          #1;
        end
      end
      @(negedge clk);
      mul_in_valid = 0;
    end
    wait (mul_exp_q.size() == 0);
    mul_done = 1;
  end

  longint mul_last_load = -100;
  always @(negedge clk) begin
    #2;
    if (rst_n && dut.u_mul.load) begin
      if (dut.u_mul.cur_j != 0) begin
        if (dut.u_mul.carry_now != 0) n_mul_carry++;
        if (int'(dut.u_mul.since_q) != LM - 1) n_mul_late++;
      end else begin
        if (cyc + 1 - mul_last_load == 1) n_mul_b2b++;
        mul_first_load = cyc + 1;
      end
      mul_last_load = cyc + 1;
    end
  end

  wide_t  mul_got;
  int     mul_blk = 0;
  longint mul_first_q [$];
  always @(negedge clk) begin
    #1;
    if (rst_n && dut.u_mul.load && dut.u_mul.cur_j == 0) mul_first_q.push_back(cyc + 1);
    if (rst_n && mul_out_valid) begin
      if (mul_blk == 0) mul_got = '0;
      chk("mul_flags", {mul_out_last, mul_out_first}, {mul_blk == NBM - 1, mul_blk == 0});
      mul_got |= wide_t'(mul_out_blk) << (mul_blk * LM);
      mul_blk++;
      if (mul_blk == NBM) begin
        longint fl;
        bit late;
        chk("product", mul_got, mul_exp_q.pop_front());
        fl = mul_first_q.pop_front();
        late = mul_late_q.pop_front();
        if (!late) begin
          chk("mul_delay", cyc - fl, LM * NBM + LM);
          n_mul_ontime++;
        end
        mul_blk = 0;
      end
    end
  end

  // ---------------- end
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (fn_done && add_done && mul_done);
    repeat (3) @(posedge clk);
    $display("cutoff %0d  carry_fb %0d  bubble %0d  add_b2b %0d  add_ontime %0d",
             n_cutoff, n_carry_fb, n_bubble, n_add_b2b, n_add_ontime);
    $display("mul_carry %0d  mul_late %0d  mul_b2b %0d  mul_ontime %0d",
             n_mul_carry, n_mul_late, n_mul_b2b, n_mul_ontime);
    chk("mech_cutoff", n_cutoff > 0, 1);
    chk("mech_carry_fb", n_carry_fb > 0, 1);
    chk("mech_bubble", n_bubble > 0, 1);
    chk("mech_add_b2b", n_add_b2b > 0, 1);
    chk("mech_add_ontime", n_add_ontime > 0, 1);
    chk("mech_mul_carry", n_mul_carry > 0, 1);
    chk("mech_mul_late", n_mul_late > 0, 1);
    chk("mech_mul_b2b", n_mul_b2b > 0, 1);
    chk("mech_mul_ontime", n_mul_ontime > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
