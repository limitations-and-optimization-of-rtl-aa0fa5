// Coefficient register and LMS update:  alpha[n] = alpha[n-1] + mu * err.
//
// mu is a power of two, mu = 2^-MU_SHIFT measured on the real values of err
// and alpha, so the update is an arithmetic shift and an add. The result
// saturates at the limits of the ALPHA_W-bit coefficient.
//
// Window sliding: the coefficient is updated once every SLIDE strobes of
// sample_en (SLIDE = 1 updates with every sample; SLIDE = w moves the window
// by its own length between updates). Between updates the strobes only count.
// An update happens on the clock edge on which sample_en and err_valid are
// both high and the slide counter is at its last value; upd pulses with it.
//
// The sign of the update follows from D_nosig = D_cal - 2*D_cal2 and
// D_cal = D_out - alpha*D_out^3: a coefficient below the true one leaves a
// positive correlation, so err is added. The algorithm's update equation is
// usually written with a minus sign; with the finite-buffer error used here
// that form diverges, so this design adds. Reset sets alpha to zero.
module lms_update
  import bc_pkg::*;
#(
  parameter int unsigned ERR_W    = 40,
  parameter int unsigned ERR_F    = INT_F + 11,
  parameter int unsigned MU_SHIFT = 9,
  parameter int unsigned SLIDE    = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sample_en,
  input  logic                      err_valid,
  input  logic signed [ERR_W-1:0]   err,
  output logic signed [ALPHA_W-1:0] alpha,
  output logic                      upd
);

  localparam int SHIFT  = int'(ERR_F) - int'(ALPHA_F) + int'(MU_SHIFT);
  localparam int SUM_W  = (ERR_W > ALPHA_W ? ERR_W : ALPHA_W) + 2;
  localparam int CNT_W  = (SLIDE > 1) ? $clog2(SLIDE) : 1;

  localparam logic signed [SUM_W-1:0] A_MAX = SUM_W'({1'b0, {(ALPHA_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] A_MIN = -A_MAX - 1;

  logic [CNT_W-1:0]        cnt;
  logic                    fire;
  logic signed [SUM_W-1:0] step;
  logic signed [SUM_W-1:0] nxt;

  assign fire = sample_en && err_valid && (cnt == CNT_W'(SLIDE - 1));

  always_comb begin
    if (SHIFT >= 0) step = SUM_W'(err) >>> SHIFT;
    else            step = SUM_W'(err) <<< (-SHIFT);
    nxt = SUM_W'(alpha) + step;
    if (nxt > A_MAX)      nxt = A_MAX;
    else if (nxt < A_MIN) nxt = A_MIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      alpha <= '0;
      upd   <= 1'b0;
    end else begin
      upd <= fire;
      if (sample_en && err_valid) begin
        cnt <= (cnt == CNT_W'(SLIDE - 1)) ? '0 : cnt + 1'b1;
      end
      if (fire) alpha <= ALPHA_W'(nxt);
    end
  end

  initial begin
    assert (SLIDE >= 1) else $error("lms_update: SLIDE must be at least 1");
  end

endmodule
