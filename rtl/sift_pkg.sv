// sift_pkg: types, constants and small functions shared by the SIFT engine.
//
// Numbers: every fractional quantity is a 16-bit fixed-point value with an
// 8-bit integer part and an 8-bit fraction (Q8.8), as in the original design.
// Gauss-pyramid pixels are unsigned Q8.8 (0 .. 255.996); Difference-of-Gauss
// values are signed Q8.8 (-128 .. 127.996) and saturate at those limits.
//
// The Gaussian kernels are 7x7 (radius 3), one per filter sigma_1..sigma_5.
// The sigmas are this design's choice: the incremental blurs of Lowe's scheme
// with three scales per octave, sigma_i = 1.6 * 2^((i-1)/3) * sqrt(2^(2/3)-1),
// i.e. 1.226, 1.545, 1.947, 2.453, 3.090. Each 2D tap is
// round(t * g(a) * g(b)) with g the normalised 1D Gaussian, a and b the
// absolute row and column offsets, and t a scale near 256 chosen so that all 49
// taps sum to exactly 256 (unity gain in Q8.8); the residue is put on the
// centre tap. By symmetry only the 4x4 quadrant of each kernel is stored.
package sift_pkg;

  localparam int FRAC = 8;               // fraction bits of Q8.8
  localparam int GR   = 3;               // Gaussian kernel radius
  localparam int NSIG = 5;               // number of Gaussian filters

  typedef logic        [15:0] pix_t;     // unsigned Q8.8 Gauss pixel
  typedef logic signed [15:0] fx_t;      // signed Q8.8 DoG value

  // GK[sigma][|dy|][|dx|], Q0.8 weights (value/256)
  localparam logic [7:0] GK [NSIG][GR+1][GR+1] = '{
    '{'{28, 20, 7, 1}, '{20, 15, 5, 1}, '{7, 5, 2, 0}, '{1, 1, 0, 0}},
    '{'{20, 15, 8, 3}, '{15, 12, 6, 2}, '{8, 6, 3, 1}, '{3, 2, 1, 0}},
    '{'{12, 11, 7, 4}, '{11, 10, 7, 3}, '{7, 7, 4, 2}, '{4, 3, 2, 1}},
    '{'{12, 9, 7, 4}, '{9, 8, 6, 4}, '{7, 6, 5, 3}, '{4, 4, 3, 2}},
    '{'{12, 7, 6, 5}, '{7, 7, 6, 4}, '{6, 6, 5, 4}, '{5, 4, 4, 3}}
  };

  // One SIFT feature: location in its octave, scale (octave and DoG interval)
  // and dominant orientation as a histogram bin.
  typedef struct packed {
    logic [7:0] x;
    logic [7:0] y;
    logic [2:0] oct;
    logic [2:0] intv;
    logic [5:0] ori;
  } feat_t;

  // Steering decision taken after each test image.
  typedef enum logic [1:0] {
    STEER_NONE   = 2'd0,
    STEER_LEFT   = 2'd1,
    STEER_RIGHT  = 2'd2,
    STEER_CENTER = 2'd3
  } steer_t;

  // Absolute value as a multiplexer on the sign bit: the value itself when the
  // top bit is 0, its negation when it is 1.
  function automatic logic signed [39:0] abs40(input logic signed [39:0] v);
    return v[39] ? -v : v;
  endfunction

  function automatic fx_t fx_abs(input fx_t v);
    return v[15] ? fx_t'(-v) : v;
  endfunction

  // Word offset of the first image of octave 'oct' in a pyramid that stores
  // 'per_oct' images per octave and whose first octave is w x w.
  function automatic int unsigned oct_base(input int unsigned oct,
                                           input int unsigned per_oct,
                                           input int unsigned w);
    int unsigned b = 0;
    for (int unsigned k = 0; k < 8; k++)
      if (k < oct) b += per_oct * ((w >> k) * (w >> k));
    return b;
  endfunction

  // Total words of such a pyramid with n_oct octaves.
  function automatic int unsigned pyr_words(input int unsigned n_oct,
                                            input int unsigned per_oct,
                                            input int unsigned w);
    return oct_base(n_oct, per_oct, w);
  endfunction

endpackage
