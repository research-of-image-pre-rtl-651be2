// Shared types, constants and helper functions of the image pre-processing
// design: the 5x5 Gaussian template, the four 5x5 directional gradient
// templates, the 2-bit gradient-direction code, saturation helpers and an
// integer square root used to size the Hough accumulator.
//
// The Gaussian template and the direction codes (00 horizontal, 01 vertical,
// 11 left diagonal, 10 right diagonal) follow the source description. The
// gradient templates are this design's own choice: the description names
// EH, EV, EDL and EDR but does not print their coefficients.
package ipp_pkg;

  typedef logic [7:0] pix_t;

  // Gradient direction code, as the description assigns it.
  typedef enum logic [1:0] {
    DIR_H  = 2'b00,   // horizontal gradient (left/right neighbours)
    DIR_V  = 2'b01,   // vertical gradient   (up/down neighbours)
    DIR_DL = 2'b11,   // left diagonal  (top-left / bottom-right neighbours)
    DIR_DR = 2'b10    // right diagonal (top-right / bottom-left neighbours)
  } dir_e;

  typedef int kern5_t [5][5];

  // 5x5 Gaussian template; its coefficients add up to 79.
  localparam kern5_t GAUSS_K = '{
    '{1, 2, 3, 2, 1},
    '{2, 4, 6, 4, 2},
    '{3, 6, 7, 6, 3},
    '{2, 4, 6, 4, 2},
    '{1, 2, 3, 2, 1}};
  localparam int GAUSS_SUM = 79;
  // Division by 79 done as (sum * 830) >> 16, 830 = round(65536 / 79).
  localparam int GAUSS_RECIP = 830;
  localparam int GAUSS_RSHIFT = 16;

  // Directional templates. Each has positive weights summing to 8 and the
  // mirrored negative weights, so |E| <= 8 * 255 and |E| >> 3 fits 8 bits.
  localparam kern5_t KERN_H = '{
    '{ 0, 0, 0, 0, 0},
    '{-1,-1, 0, 1, 1},
    '{-2,-2, 0, 2, 2},
    '{-1,-1, 0, 1, 1},
    '{ 0, 0, 0, 0, 0}};
  localparam kern5_t KERN_V = '{
    '{ 0,-1,-2,-1, 0},
    '{ 0,-1,-2,-1, 0},
    '{ 0, 0, 0, 0, 0},
    '{ 0, 1, 2, 1, 0},
    '{ 0, 1, 2, 1, 0}};
  localparam kern5_t KERN_DL = '{
    '{-2,-1, 0, 0, 0},
    '{-1,-2,-1, 0, 0},
    '{ 0,-1, 0, 1, 0},
    '{ 0, 0, 1, 2, 1},
    '{ 0, 0, 0, 1, 2}};
  localparam kern5_t KERN_DR = '{
    '{ 0, 0, 0,-1,-2},
    '{ 0, 0,-1,-2,-1},
    '{ 0, 1, 0,-1, 0},
    '{ 1, 2, 1, 0, 0},
    '{ 2, 1, 0, 0, 0}};
  localparam int GRAD_SHIFT = 3;

  // Clamp a signed value to 0..255.
  function automatic pix_t clamp8(input int v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return pix_t'(v);
  endfunction

  // Integer square root, rounded up (elaboration-time sizing only).
  function automatic int isqrt_ceil(input int v);
    int r;
    r = 0;
    while (r * r < v) r++;
    return r;
  endfunction

  // Largest |rho| the Hough accumulator must hold for an image of w x h
  // pixels with the origin at its centre: the half-diagonal, grown by the 2.5%
  // that fifty uncorrected rotation steps of tan = 1/32 add (1.04 used), plus
  // two for rounding.
  function automatic int hough_rho_max(input int w, input int h);
    return isqrt_ceil((w / 2) * (w / 2) + (h / 2) * (h / 2)) * 104 / 100 + 2;
  endfunction

endpackage
