// Integer power of a sample: y = x^ORDER, the "( )^3" and "( )^5" boxes of
// the calibration datapath.
//
// x is a signed fraction with IN_F fractional bits (|x| <= 1), so every power
// also stays within +/-1. The full-precision product is formed
// combinationally and then truncated (arithmetic shift) to OUT_F fractional
// bits. Purely combinational, no latency. Interface and word lengths are this
// implementation's choice; the algorithm only names the operation.
module power_unit #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned IN_F  = 11,
  parameter int unsigned ORDER = 3,
  parameter int unsigned OUT_W = 20,
  parameter int unsigned OUT_F = 16
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam int unsigned FULL_W = IN_W * ORDER;
  localparam int unsigned DROP   = IN_F * ORDER - OUT_F;

  logic signed [FULL_W-1:0] prod;
  logic signed [FULL_W-1:0] shifted;

  always_comb begin
    prod = FULL_W'(x);
    for (int unsigned i = 1; i < ORDER; i++) begin
      prod = prod * FULL_W'(x);
    end
    shifted = prod >>> DROP;
    y = OUT_W'(shifted);
  end

  initial begin
    assert (ORDER >= 1) else $error("power_unit: ORDER must be at least 1");
    assert (IN_F * ORDER >= OUT_F) else $error("power_unit: OUT_F too large");
  end

endmodule
