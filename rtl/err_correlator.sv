// Error correlator of the LMS engine: the multiplier and summer that turn the
// windowed D_nosig and D_ds samples into the error term
//   err = sum_k  g(k) * nosig[k] * ds[k],   k = 0..TAPS-1
// (equations 3.10 and 4.3a). g(k) is 1 for the rectangular window; for the
// tapered windows (Hann, Hamming, Blackman) the window w(k) is applied to both
// operands, so g(k) = w(k)^2, computed at elaboration from the closed-form
// window formulas and held with WIN_F fractional bits.
//
// All TAPS products are formed in parallel and summed combinationally, so a
// new error is available for every input sample. err carries the sum of the
// fractional bits of the two operands (the window scaling is removed again).
module err_correlator
  import bc_pkg::*;
#(
  parameter int unsigned A_W    = 22,
  parameter int unsigned B_W    = 12,
  parameter int unsigned TAPS   = 32,
  parameter win_e        WINDOW = WIN_RECT,
  parameter int unsigned ERR_W  = A_W + B_W + $clog2(TAPS) + 1
) (
  input  logic signed [A_W-1:0]   a [TAPS],
  input  logic signed [B_W-1:0]   b [TAPS],
  output logic signed [ERR_W-1:0] err
);

  localparam int unsigned PW = A_W + B_W + WIN_F + 2;

  typedef int unsigned weight_t [TAPS];

  function automatic weight_t make_weights();
    weight_t wt;
    for (int k = 0; k < TAPS; k++) wt[k] = win_sq_weight(WINDOW, k, TAPS);
    return wt;
  endfunction

  localparam weight_t WEIGHTS = make_weights();

  logic signed [PW-1:0]    prod;
  logic signed [ERR_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) begin
      prod = PW'(a[k]) * PW'(b[k]);
      if (WINDOW != WIN_RECT) begin
        prod = (prod * $signed(PW'(WEIGHTS[k]))) >>> WIN_F;
      end
      acc = acc + ERR_W'(prod);
    end
    err = acc;
  end

endmodule
