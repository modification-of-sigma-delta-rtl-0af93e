// Shared constants and helpers of the spike-to-analog Sigma-Delta MASH DAC.
//
// The noise-shaping feedback of every truncation stage realises the noise
// transfer function (1 - z^-1)^L. Written as an error-feedback loop, the
// correction added to the input is  sum_{k=1..L} c_k * e[n-k]  with
// c_k = (-1)^(k+1) * C(L,k). fb_coef() returns c_k; it is evaluated at
// elaboration time only. The binomial form of the loop filter is this
// design's choice: the coefficients are not published with the design.
package sd_dac_pkg;

  // Highest loop-filter order supported by noise_loop_filter.
  localparam int unsigned MAX_ORDER = 4;

  // Binomial coefficient C(n,k) for small n.
  function automatic int binom(input int n, input int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  // Feedback coefficient of e[n-k] for a loop filter of order L.
  function automatic int fb_coef(input int L, input int k);
    return ((k % 2) == 1) ? binom(L, k) : -binom(L, k);
  endfunction

endpackage
