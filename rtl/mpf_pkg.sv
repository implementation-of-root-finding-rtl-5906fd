// mpf_pkg - number format and complex arithmetic shared by the root finder.
//
// Every sample, lamda, error and epsilon value is a complex number held as
// two signed fixed-point words of DW bits with FW fraction bits (Q23.24 by
// default: range about +/-8.4e6, resolution 6e-8). The word format is this
// design's choice; the algorithm only needs complex add, subtract, multiply
// and divide. Products are formed at full width and truncated (arithmetic
// shift right by FW); sums wrap on overflow, which the value ranges of a
// 10-tap channel with taps below a few thousand never reach.
package mpf_pkg;

  localparam int DW = 48;            // bits per real or imaginary part
  localparam int FW = 24;            // fraction bits
  localparam int G_DEFAULT = 10;     // taps per channel, Y(9:0)

  typedef logic signed [DW-1:0]   fx_t;
  typedef logic signed [2*DW:0]   fx_wide_t;   // full product or sum of two products
  typedef logic        [2*DW-1:0] mag2_t;      // |z|^2 with 2*FW fraction bits

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  localparam fx_t   FX_ONE   = fx_t'(64'sd1 <<< FW);
  localparam mag2_t MAG2_ONE = mag2_t'(1) << (2 * FW);
  localparam cplx_t C_ZERO   = '{re: '0, im: '0};
  localparam cplx_t C_ONE    = '{re: FX_ONE, im: '0};

  // Nearest fixed-point word to a real constant (elaboration time only)
  function automatic fx_t to_fx(real r);
    return fx_t'(longint'(r * (2.0 ** FW)));   // a real-to-integer cast rounds
  endfunction

  // Nearest |z|^2-format word (2*FW fraction bits) to a real constant
  function automatic mag2_t to_mag2(real r);
    return mag2_t'(longint'(r * (2.0 ** (2 * FW))));
  endfunction

  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    return '{re: a.re + b.re, im: a.im + b.im};
  endfunction

  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    return '{re: a.re - b.re, im: a.im - b.im};
  endfunction

  function automatic cplx_t c_neg(cplx_t a);
    return '{re: -a.re, im: -a.im};
  endfunction

  function automatic cplx_t c_conj(cplx_t a);
    return '{re: a.re, im: -a.im};
  endfunction

  // (a.re + j a.im)(b.re + j b.im), rescaled to FW fraction bits
  function automatic cplx_t c_mul(cplx_t a, cplx_t b);
    fx_wide_t pr, pi;
    pr = fx_wide_t'(a.re) * fx_wide_t'(b.re) - fx_wide_t'(a.im) * fx_wide_t'(b.im);
    pi = fx_wide_t'(a.re) * fx_wide_t'(b.im) + fx_wide_t'(a.im) * fx_wide_t'(b.re);
    return '{re: fx_t'(pr >>> FW), im: fx_t'(pi >>> FW)};
  endfunction

  // |a|^2, exact, with 2*FW fraction bits
  function automatic mag2_t c_mag2(cplx_t a);
    return mag2_t'(fx_wide_t'(a.re) * fx_wide_t'(a.re))
         + mag2_t'(fx_wide_t'(a.im) * fx_wide_t'(a.im));
  endfunction

endpackage
