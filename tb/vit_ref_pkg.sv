// Reference model for the Viterbi accelerator testbenches.
//
// Plain integer software, written independently of the RTL: a rate-1/n
// convolutional encoder, output-table construction, the soft-decision
// distance (as a sum of absolute differences to the ideal levels), one
// trellis step of add-compare-select on unbounded integer metrics, and a
// traceback. Encoder state convention: the newest input bit is the most
// significant state bit; output bit i is the parity of generator i applied to
// {input, state}, with the generator's most significant bit on the input.
package vit_ref_pkg;

  localparam int MAXS = 256;   // states for constraint length up to 9
  localparam int MAXN = 4;

  typedef int unsigned uint_t;

  // Encoder output bits (bit i = output i) for input u in state s.
  function automatic int unsigned enc_out(int k, int n, int unsigned gens[MAXN],
                                          int unsigned u, int unsigned s);
    int unsigned reg_v, o;
    reg_v = (u << (k - 1)) | s;
    o = 0;
    for (int i = 0; i < n; i++) o |= ($countones(reg_v & gens[i]) & 1) << i;
    return o;
  endfunction

  function automatic int unsigned enc_next(int k, int unsigned u, int unsigned s);
    return (u << (k - 2)) | (s >> 1);
  endfunction

  // Distance of a soft symbol (n values, max level vmax) to expected bits.
  function automatic int ref_dist(int n, int vmax, int r[MAXN], int unsigned code);
    int d;
    d = 0;
    for (int i = 0; i < n; i++) begin
      int ideal;
      ideal = (((code >> i) & 1) != 0) ? vmax : 0;
      d += (r[i] > ideal) ? r[i] - ideal : ideal - r[i];
    end
    return d;
  endfunction

  // Pack n soft values into a symbol word.
  function automatic longint unsigned pack_sym(int n, int soft_w, int r[MAXN]);
    longint unsigned w;
    w = 0;
    for (int i = 0; i < n; i++) w |= longint'(r[i]) << (i * soft_w);
    return w;
  endfunction

  // One trellis step on unbounded metrics: new[j] = min over the two
  // predecessors p = 2*(j mod 2**(k-2)) + b of old[p] + distance. Ties keep
  // b = 0. dec[j] records the surviving b.
  function automatic void ref_step(int k, int n, int vmax, int unsigned gens[MAXN],
                                   int r[MAXN], ref longint pm_old[MAXS],
                                   ref longint pm_new[MAXS], ref bit dec[MAXS]);
    int ns;
    ns = 1 << (k - 1);
    for (int j = 0; j < ns; j++) begin
      int unsigned u, jp;
      longint c0, c1;
      u  = j >> (k - 2);
      jp = j & ((1 << (k - 2)) - 1);
      c0 = pm_old[2*jp]   + longint'(ref_dist(n, vmax, r, enc_out(k, n, gens, u, 2*jp)));
      c1 = pm_old[2*jp+1] + longint'(ref_dist(n, vmax, r, enc_out(k, n, gens, u, 2*jp+1)));
      dec[j]    = (c1 < c0);
      pm_new[j] = (c1 < c0) ? c1 : c0;
    end
  endfunction

endpackage
