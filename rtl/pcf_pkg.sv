// pcf_pkg: constants, types and the coefficient function shared by the
// polyphase SINC^K comb decimator.
//
// The filter is H(z) = (1 + z^-1 + ... + z^-(M-1))^K. Its impulse response
// h[k], k = 0 .. K*(M-1), is the K-fold convolution of an M-tap boxcar. For the
// main configuration (K = 3, M = 8) that gives the 22 coefficients
// 1 3 6 10 15 21 28 36 42 46 48 48 46 42 36 28 21 15 10 6 3 1, whose sum is 512.
// Polyphase branch E_i holds h[i], h[i+M], h[i+2M], ... (the "products" of that
// sub-filter). The 8-bit coefficient width and the 12-bit two's-complement
// accumulator width are the values of the published design; the function
// below lets the same RTL be elaborated for other K and M.
//
// In the published design the 11 distinct coefficient values (the response is
// symmetric) and a zero value sit in shared registers that drive the product
// multiplexers. Here they are elaboration-time constants produced by
// sinc_coef(), which a synthesiser folds into the multiplexer inputs.
package pcf_pkg;

  // Main configuration: SINC^3, decimation by 8.
  localparam int unsigned PCF_M      = 8;   // decimation factor = number of sub-filters
  localparam int unsigned PCF_K      = 3;   // filter order = products per sub-filter
  localparam int unsigned PCF_COEF_W = 8;   // coefficient width (bits)
  localparam int unsigned PCF_ACC_W  = 12;  // adder, register and output width (bits)

  // h[k] of (1 + z^-1 + ... + z^-(m-1))^kk: number of ways to write k as an
  // ordered sum of kk integers, each in 0 .. m-1. Computed by repeated
  // convolution with the boxcar.
  function automatic int unsigned sinc_coef(int unsigned m, int unsigned kk, int unsigned k);
    int unsigned cur [0:127];
    int unsigned nxt [0:127];
    int unsigned len;
    for (int n = 0; n < 128; n++) begin
      cur[n] = 0;
      nxt[n] = 0;
    end
    cur[0] = 1;
    len    = 1;
    for (int unsigned stage = 0; stage < kk; stage++) begin
      for (int n = 0; n < 128; n++) nxt[n] = 0;
      for (int unsigned n = 0; n < len; n++)
        for (int unsigned t = 0; t < m; t++)
          if (n + t < 128) nxt[n+t] += cur[n];
      len = len + m - 1;
      for (int n = 0; n < 128; n++) cur[n] = nxt[n];
    end
    return (k < len && k < 128) ? cur[k] : 0;
  endfunction

  // Number of non-zero products of polyphase branch i: the taps i + m*j that
  // fall inside the impulse response of length kk*(m-1)+1.
  function automatic int unsigned branch_taps(int unsigned m, int unsigned kk, int unsigned i);
    int unsigned n;
    n = 0;
    for (int unsigned j = 0; j < kk; j++)
      if (i + m*j <= kk*(m-1)) n++;
    return n;
  endfunction

endpackage
