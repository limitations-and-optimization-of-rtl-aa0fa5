// Signal-free combiner: D_nosig = D_cal - 2 * D_cal2 (equation 3.11a).
//
// The second ADC sees the input scaled by 0.5, so doubling its calibrated
// output cancels the fundamental, which scales linearly, while the harmonics
// added by the nonlinearity do not cancel. What is left is the residual
// distortion that drives the coefficient update. Combinational; the output is
// two bits wider than the inputs so that neither the doubling nor the
// subtraction can overflow.
module nosig_combiner #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] d_cal,
  input  logic signed [W-1:0] d_cal2,
  output logic signed [W+1:0] d_nosig
);

  always_comb begin
    d_nosig = (W+2)'(d_cal) - ((W+2)'(d_cal2) <<< 1);
  end

endmodule
