// vedic_pkg: constants and helper functions shared by the convolution and
// deconvolution units.
//
// The convolution of two N-sample sequences has 2N-1 output columns. Column n
// collects the products x[i]*h[j] with i+j == n, so it holds min(n+1, 2N-1-n)
// products. The width of every output sample is 2W + clog2(N), enough for the
// worst case sum of N products of W-bit unsigned samples.
package vedic_pkg;

  // Number of products that fall into output column n of an N x N convolution.
  function automatic int unsigned col_terms(int unsigned n, int unsigned len);
    int unsigned lo;
    int unsigned hi;
    lo = n + 1;
    hi = 2 * len - 1 - n;
    return (lo < hi) ? lo : hi;
  endfunction

  // Width of one convolution output sample for W-bit inputs and N samples.
  function automatic int unsigned conv_out_width(int unsigned w, int unsigned len);
    return 2 * w + ((len > 1) ? $clog2(len) : 1);
  endfunction

endpackage
