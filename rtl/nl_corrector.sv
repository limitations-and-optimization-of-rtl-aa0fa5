// Nonlinearity corrector for one ADC channel:
//   D_cal = D_out - alpha * D_out^ORDER - alpha5 * D_out^5
// With ORDER = 3 this is the third-order correction of the algorithm
// (D_cal = D_out - alpha3*D_out^3); ORDER = 2 gives the second-order form.
// The fifth-order term belongs to the two-harmonic variant and exists only
// when HARM5 = 1.
//
// d_out is an ADC code (DATA_W bits, DATA_W-1 fractional), the coefficients
// carry ALPHA_F fractional bits and d_cal is returned with INT_F fractional
// bits in INT_W bits, saturated to that range. Combinational; the caller
// registers the result.
// Products are truncated toward minus infinity (arithmetic shift).
module nl_corrector
  import bc_pkg::*;
#(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned ORDER  = 3,
  parameter bit          HARM5  = 1'b0
) (
  input  logic signed [DATA_W-1:0]  d_out,
  input  logic signed [ALPHA_W-1:0] alpha,
  input  logic signed [ALPHA_W-1:0] alpha5,
  output logic signed [INT_W-1:0]   d_cal
);

  localparam int unsigned IN_F  = DATA_W - 1;
  localparam int unsigned PW    = INT_W + ALPHA_W;

  logic signed [INT_W-1:0] pow1;
  logic signed [INT_W-1:0] pow5;
  logic signed [PW-1:0]    corr1;
  logic signed [PW-1:0]    corr5;
  logic signed [PW-1:0]    base;
  logic signed [PW-1:0]    sum;

  localparam logic signed [PW-1:0] D_MAX = PW'({1'b0, {(INT_W-1){1'b1}}});
  localparam logic signed [PW-1:0] D_MIN = -D_MAX - 1;

  power_unit #(.IN_W(DATA_W), .IN_F(IN_F), .ORDER(ORDER), .OUT_W(INT_W), .OUT_F(INT_F))
    u_pow1 (.x(d_out), .y(pow1));

  if (HARM5) begin : g_pow5
    power_unit #(.IN_W(DATA_W), .IN_F(IN_F), .ORDER(5), .OUT_W(INT_W), .OUT_F(INT_F))
      u_pow5 (.x(d_out), .y(pow5));
  end else begin : g_no_pow5
    assign pow5 = '0;
  end

  always_comb begin
    base  = PW'(d_out) <<< (INT_F - IN_F);
    corr1 = (PW'(alpha) * PW'(pow1)) >>> ALPHA_F;
    if (HARM5) corr5 = (PW'(alpha5) * PW'(pow5)) >>> ALPHA_F;
    else       corr5 = '0;
    sum   = base - corr1 - corr5;
    if (sum > D_MAX)      sum = D_MAX;
    else if (sum < D_MIN) sum = D_MIN;
    d_cal = INT_W'(sum);
  end

  initial begin
    assert (ORDER >= 2 && ORDER != 5) else $error("nl_corrector: ORDER must be 2, 3 or above, and not 5");
  end

endmodule
