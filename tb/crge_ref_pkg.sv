// crge_ref_pkg -- reference model for the CRGE testbenches.
//
// It computes a permutation the long way, by the rotation picture of the
// method and without the per-element functions the RTL uses: start from the
// identity arrangement, rotate the first k+1 entries left by d_k for
// k = 1 .. n-1, then invert the arrangement (sigma(v) = final position of
// value v). Also: random factorial-base digits, the digits of a given index,
// and the Lehmer rank of a permutation, used to prove that an exhaustive run
// produced n! distinct permutations.
package crge_ref_pkg;

  typedef int unsigned uvec_t [];

  // Random index: d[k] uniform in [0, k]; d[0] = 0.
  function automatic uvec_t rand_digits(int unsigned n);
    uvec_t d = new[n];
    d[0] = 0;
    for (int unsigned k = 1; k < n; k++) d[k] = $urandom_range(k, 0);
    return d;
  endfunction

  // Digits of index r in the factorial number system.
  function automatic uvec_t index_digits(int unsigned n, longint unsigned r);
    uvec_t d = new[n];
    d[0] = 0;
    for (int unsigned k = 1; k < n; k++) begin
      d[k] = int'(r % (k + 1));
      r    = r / (k + 1);
    end
    return d;
  endfunction

  // Rotation-and-inverse model.
  function automatic uvec_t ref_perm(int unsigned n, uvec_t d);
    uvec_t arr = new[n];
    uvec_t tmp = new[n];
    uvec_t sg  = new[n];
    for (int unsigned p = 0; p < n; p++) arr[p] = p;
    for (int unsigned k = 1; k < n; k++) begin
      for (int unsigned p = 0; p <= k; p++) tmp[p] = arr[(p + d[k]) % (k + 1)];
      for (int unsigned p = 0; p <= k; p++) arr[p] = tmp[p];
    end
    for (int unsigned p = 0; p < n; p++) sg[arr[p]] = p;
    return sg;
  endfunction

  // 1 if s holds every value 0 .. n-1 exactly once.
  function automatic bit is_perm(int unsigned n, uvec_t s);
    bit seen [] = new[n];
    foreach (s[i]) begin
      if (s[i] >= n || seen[s[i]]) return 0;
      seen[s[i]] = 1;
    end
    return 1;
  endfunction

  // Lehmer rank in [0, n!-1] (small n only).
  function automatic longint unsigned perm_rank(int unsigned n, uvec_t s);
    longint unsigned r = 0;
    for (int unsigned i = 0; i < n; i++) begin
      int unsigned smaller = 0;
      for (int unsigned j = i + 1; j < n; j++) if (s[j] < s[i]) smaller++;
      r = r * (n - i) + smaller;
    end
    return r;
  endfunction

endpackage
