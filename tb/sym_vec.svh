// Shared testbench helper: a random N-bit vector with exactly `ones` bits set.
`ifndef SYM_VEC_SVH
`define SYM_VEC_SVH
`define SYM_RANDOM_VECTOR(N, ones, vec) \
  begin \
    vec = '0; \
    for (int q_ = 0; q_ < (ones); q_++) vec[q_] = 1'b1; \
    for (int q_ = (N) - 1; q_ > 0; q_--) begin \
      automatic int r_ = $urandom_range(q_, 0); \
      automatic logic t_ = vec[q_]; \
      vec[q_] = vec[r_]; \
      vec[r_] = t_; \
    end \
  end
`endif
