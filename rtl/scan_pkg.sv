// scan_pkg: sizes shared by the scan-chain-disable test infrastructure.
//
// The NUM_FF scan flip-flops of the circuit are split into NUM_CHAINS scan
// chains. Every chain but the last holds ceil(NUM_FF/NUM_CHAINS) flip-flops;
// the last holds what remains. This is the group size the flip-flop grouping
// fills each group up to, and ceil(F/N) is the per-chain shift length used in
// the test application time formula. Chain k occupies the flat flip-flop
// indices [k*chain_stride(F,N) +: chain_len(F,N,k)].
package scan_pkg;

  // Longest chain: ceil(F/N).
  function automatic int unsigned chain_stride(int unsigned num_ff, int unsigned num_chains);
    return (num_ff + num_chains - 1) / num_chains;
  endfunction

  // Length of chain k (0-based). A chain that would be empty is given length 1
  // so that every chain exists; configurations with such a chain are rejected
  // by the top's elaboration check.
  function automatic int unsigned chain_len(int unsigned num_ff, int unsigned num_chains,
                                            int unsigned k);
    int unsigned stride, first;
    stride = chain_stride(num_ff, num_chains);
    first  = k * stride;
    if (first >= num_ff) return 1;
    return (num_ff - first < stride) ? (num_ff - first) : stride;
  endfunction

  // Width of the chain select Cs.
  function automatic int unsigned cs_width(int unsigned num_chains);
    return (num_chains <= 1) ? 1 : $clog2(num_chains);
  endfunction

  // Test application time in clock cycles (shift plus capture cycles) for
  // n original cubes, r duplicated cubes and m D-compatible subsets:
  //   TAT = m*ceil(F/N)*(N-1) + (n+r+1)*(ceil(F/N)+1) - 1
  function automatic longint unsigned test_time(int unsigned num_ff, int unsigned num_chains,
                                                int unsigned n, int unsigned r, int unsigned m);
    longint unsigned l, nn, nr, nm;
    l  = 64'(chain_stride(num_ff, num_chains));
    nn = 64'(num_chains);
    nr = 64'(n) + 64'(r);
    nm = 64'(m);
    return nm * l * (nn - 1) + (nr + 1) * (l + 1) - 1;
  endfunction

endpackage
