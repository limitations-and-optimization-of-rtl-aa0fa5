// Shared constants, types and helper functions for the blind nonlinearity
// calibration backend.
//
// Number formats (all two's complement):
//   ADC codes        : DATA_W bits, DATA_W-1 fractional bits (full scale is +/-1.0)
//   internal samples : INT_W bits, INT_F fractional bits (D_cal, powers of D_out)
//   coefficients     : ALPHA_W bits, ALPHA_F fractional bits (alpha3, alpha5)
//   window weights   : unsigned WIN_F+1 bits, WIN_F fractional bits
// The algorithm leaves the ADC resolution and all internal word lengths open;
// the values here are this implementation's choice.
package bc_pkg;

  localparam int unsigned INT_W   = 20;
  localparam int unsigned INT_F   = 16;
  localparam int unsigned ALPHA_W = 24;
  localparam int unsigned ALPHA_F = 20;
  localparam int unsigned WIN_F   = 15;

  // Window shape applied to D_nosig and D_ds before the error sum.
  // RECT is plain summation; the others are the classic tapered windows.
  typedef enum logic [1:0] {
    WIN_RECT     = 2'd0,
    WIN_HANN     = 2'd1,
    WIN_HAMMING  = 2'd2,
    WIN_BLACKMAN = 2'd3
  } win_e;

  // Symmetric window value w(k), k = 0..len-1, as a real number in [0,1].
  function automatic real win_value(win_e kind, int k, int len);
    real ph;
    ph = 2.0 * 3.14159265358979323846 * real'(k) / real'(len - 1);
    case (kind)
      WIN_HANN:     return 0.5 - 0.5 * $cos(ph);
      WIN_HAMMING:  return 0.54 - 0.46 * $cos(ph);
      WIN_BLACKMAN: return 0.42 - 0.5 * $cos(ph) + 0.08 * $cos(2.0 * ph);
      default:      return 1.0;
    endcase
  endfunction

  // Weight of tap k in the error sum. The window multiplies both D_nosig and
  // D_ds, so the product at tap k is scaled by w(k)^2. Returned rounded to
  // WIN_F fractional bits.
  function automatic int unsigned win_sq_weight(win_e kind, int k, int len);
    real v;
    v = win_value(kind, k, len);
    v = v * v;
    if (v < 0.0) v = 0.0;
    return int'($floor(v * real'(1 << WIN_F) + 0.5));
  endfunction

endpackage
