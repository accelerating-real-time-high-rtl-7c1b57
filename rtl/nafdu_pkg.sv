// nafdu_pkg: types and constants shared by the NAFDU depth-upsampling accelerator.
//
// Both input streams are 8 bits per pixel (intensity from the colour camera, depth from the
// pre-upsampled ToF map), as the accelerator's data path is drawn. The package also holds the
// elaboration-time functions that fill the lookup tables:
//   gauss_weight(d, sigma, wbits)  = round((2^wbits - 1) * exp(-d^2 / (2 sigma^2)))
//                                    range term g (intensity) and h (depth) of the filter
//   sigmoid_alpha(d, tau, eps, f)  = round(2^f / (1 + exp(-eps * (d - tau))))
//                                    blending factor alpha(Delta) as an f-bit fraction (0..2^f)
// The gaussian shape of g and h and the sigmoid shape of alpha follow the filter definition;
// the table resolution and the sigma/tau/eps defaults are this design's own choices.
// These functions run only during elaboration; no real arithmetic reaches the hardware.
package nafdu_pkg;

  localparam int PIX_BITS = 8;
  typedef logic [PIX_BITS-1:0] pix_t;

  // One pixel pair as delivered by the input stream (raster order).
  typedef struct packed {
    pix_t intensity;
    pix_t depth;
  } pix_pair_t;

  function automatic int gauss_weight(int d, int sigma, int wbits);
    real s = real'(sigma);
    real v = real'((1 << wbits) - 1) * $exp(-(real'(d) * real'(d)) / (2.0 * s * s));
    return $rtoi(v + 0.5);
  endfunction

  // eps is given in thousandths (eps_milli = 250 means 0.25 per grey level).
  function automatic int sigmoid_alpha(int d, int tau, int eps_milli, int frac);
    real e = real'(eps_milli) / 1000.0;
    real v = real'(1 << frac) / (1.0 + $exp(-e * (real'(d) - real'(tau))));
    return $rtoi(v + 0.5);
  endfunction

endpackage
