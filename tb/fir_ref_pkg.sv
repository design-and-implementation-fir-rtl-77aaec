// fir_ref_pkg: behavioural reference for the filter testbenches.
//
// Keeps the last NTAPS input samples in a software history and works out
// y[n] = sum_k h[k] * x[n-k] with plain integer arithmetic, independently of
// any of the hardware structures under test.
package fir_ref_pkg;

  localparam int NTAPS = fir_pkg::NTAPS;

  typedef longint hist_t [NTAPS];
  typedef longint coefs_t [NTAPS];

  function automatic coefs_t default_coefs();
    coefs_t c;
    for (int k = 0; k < NTAPS; k++) c[k] = longint'(fir_pkg::H_DEFAULT[k]);
    return c;
  endfunction

  // Push a new sample: hist[0] = x[n], hist[k] = x[n-k].
  function automatic void push(ref hist_t hist, input longint x);
    for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
  endfunction

  function automatic longint fir_out(const ref hist_t hist, input coefs_t c);
    longint y = 0;
    for (int k = 0; k < NTAPS; k++) y += c[k] * hist[k];
    return y;
  endfunction

  // A random 16-bit signed sample, with the extreme values now and then.
  function automatic longint rand_sample();
    int unsigned r = $urandom_range(0, 19);
    if (r == 0) return -32768;
    if (r == 1) return 32767;
    return longint'($signed(16'($urandom())));
  endfunction

endpackage
