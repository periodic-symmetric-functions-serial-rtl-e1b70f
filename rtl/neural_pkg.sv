// neural_pkg: sizing helpers shared by the threshold-gate networks.
//
// All networks here are built from linear threshold gates ("neural gates")
// arranged in the level structure of Kautz's logarithmic parity network: every
// gate sees the whole input vector, plus the outputs of all gates on earlier
// levels. The functions below compute the number of levels such a network
// needs; logarithms are base 2 throughout.
package neural_pkg;

  // ceil(p / q) for p >= 0, q > 0.
  function automatic int ceil_div(int p, int q);
    return (p + q - 1) / q;
  endfunction

  // ceil(log2(v)) for v >= 1 (0 for v == 1).
  function automatic int ceil_log2(int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Gates (and levels) of the network for a periodic symmetric function of
  // n inputs with period t and first positive transition at a:
  // 1 + ceil(log(ceil((n - a) / t) + 1)).
  function automatic int periodic_gates(int n, int a, int t);
    int m;
    m = (n > a) ? ceil_div(n - a, t) : 0;
    return 1 + ceil_log2(m + 1);
  endfunction

  // Output bits (and gates) of an n|r counter: 1 + ceil(log n).
  function automatic int counter_bits(int n);
    return 1 + ceil_log2(n);
  endfunction

endpackage
