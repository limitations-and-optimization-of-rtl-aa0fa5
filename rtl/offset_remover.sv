// ADC offset remover: centres a periodic signal around zero before it enters
// the calibration, since any offset left in D_out would also appear in
// D_nosig and bias the error term.
//
// The offset is tracked with a first-order leaky average,
//   m <- m + (x - m) * 2^-AVG_SHIFT,
// kept with AVG_SHIFT extra fractional bits, and y = x - round(m), saturated
// to DATA_W bits. With en low the estimate is held at zero and y = x. The
// output is registered: one cycle of latency, y_valid follows x_valid.
// The estimator itself is this implementation's choice; the algorithm only
// requires that the offset be removed.
module offset_remover #(
  parameter int unsigned DATA_W    = 12,
  parameter int unsigned AVG_SHIFT = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     y_valid,
  output logic signed [DATA_W-1:0] y,
  output logic signed [DATA_W-1:0] offset
);

  localparam int unsigned MW = DATA_W + AVG_SHIFT + 1;

  localparam logic signed [DATA_W+1:0] Y_MAX = (DATA_W+2)'({1'b0, {(DATA_W-1){1'b1}}});
  localparam logic signed [DATA_W+1:0] Y_MIN = -Y_MAX - 1;

  logic signed [MW-1:0]       m;
  logic signed [MW-1:0]       m_nxt;
  logic signed [DATA_W+1:0]   diff;
  logic signed [DATA_W-1:0]   m_round;

  always_comb begin
    m_round = DATA_W'((m + (MW'(1) <<< (AVG_SHIFT - 1))) >>> AVG_SHIFT);
    m_nxt   = m + ((( MW'(x) <<< AVG_SHIFT) - m) >>> AVG_SHIFT);
    diff    = (DATA_W+2)'(x) - (DATA_W+2)'(m_round);
    if (diff > Y_MAX)      diff = Y_MAX;
    else if (diff < Y_MIN) diff = Y_MIN;
  end

  assign offset = m_round;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m       <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (!en) begin
        m <= '0;
        if (x_valid) y <= x;
      end else if (x_valid) begin
        m <= m_nxt;
        y <= DATA_W'(diff);
      end
    end
  end

  initial begin
    assert (AVG_SHIFT >= 1) else $error("offset_remover: AVG_SHIFT must be at least 1");
  end

endmodule
