// Blind background calibration of ADC nonlinearity (digital backend).
//
// Two identical ADCs convert the same input; the second sees it scaled by
// 0.5 (that scaling and both ADCs are analog and lie outside this module).
// Both output streams are corrected with the same coefficient estimate,
//   D_cal  = D_out  - alpha*D_out^ORDER  (- alpha5*D_out^5),
//   D_cal2 = D_out2 - alpha*D_out2^ORDER (- alpha5*D_out2^5),
// and combined into D_nosig = D_cal - 2*D_cal2, in which the input signal
// cancels and only residual distortion remains. Finite buffers of
// ORDER*(WIN_LEN-1)+1 samples hold D_out and D_nosig; a window of WIN_LEN
// samples taken at stride ORDER (the downsampling factor equals the order
// being calibrated) from each is multiplied pairwise (optionally tapered by a
// Hann, Hamming or Blackman window), summed into err, and the coefficient is
// moved by mu*err every SLIDE samples. D_cal is the calibrated output.
//
// Structure follows the algorithm's block diagrams: a third-order path by
// default (ORDER = 3, so alpha is alpha3), and with HARM5 = 1 a parallel
// fifth-order path (its own stride-5 buffers, correlator and coefficient).
// With HARM5 = 0, alpha5 and upd5 are constant zero. Optional offset removal sits in front
// of both channels (offset_en). Word lengths, the step-size value, the
// offset estimator and the exact alignment of D_nosig with the downsampled
// samples are this implementation's choices.
//
// Timing: one sample per clock at most, qualified by in_valid. The offset
// stage adds one cycle; the corrected sample d_cal appears with out_valid two
// cycles after its in_valid. The coefficient used for a sample is the one
// held when it leaves the offset stage; each update uses the window ending at
// the previous sample. Coefficient updates start once the buffers are full.
module blind_cal_top
  import bc_pkg::*;
#(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned WIN_LEN    = 32,
  parameter int unsigned ORDER      = 3,
  parameter int unsigned MU_SHIFT   = 9,
  parameter int unsigned SLIDE      = 1,
  parameter win_e        WINDOW     = WIN_RECT,
  parameter bit          HARM5      = 1'b0,
  parameter int unsigned OFFSET_AVG = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [DATA_W-1:0]  d_out1,
  input  logic signed [DATA_W-1:0]  d_out2,
  input  logic                      offset_en,
  output logic                      out_valid,
  output logic signed [INT_W-1:0]   d_cal,
  output logic signed [INT_W+1:0]   d_nosig,
  output logic signed [ALPHA_W-1:0] alpha,
  output logic signed [ALPHA_W-1:0] alpha5,
  output logic                      upd,
  output logic                      upd5
);

  localparam int unsigned NW    = INT_W + 2;
  localparam int unsigned ERR_W = NW + DATA_W + $clog2(WIN_LEN) + 1;
  localparam int unsigned ERR_F = INT_F + DATA_W - 1;
  localparam int unsigned LEN1  = ORDER * (WIN_LEN - 1) + 1;
  localparam int unsigned LEN5  = 5 * (WIN_LEN - 1) + 1;
  localparam int unsigned FILL  = (HARM5 && LEN5 > LEN1) ? LEN5 : LEN1;
  localparam int unsigned FW    = $clog2(FILL + 1);

  // ---- offset removal -----------------------------------------------------
  logic                     v1, v1b;
  logic signed [DATA_W-1:0] x1, x2;

  offset_remover #(.DATA_W(DATA_W), .AVG_SHIFT(OFFSET_AVG)) u_ofs1 (
    .clk, .rst_n, .en(offset_en), .x_valid(in_valid), .x(d_out1),
    .y_valid(v1), .y(x1), .offset());
  offset_remover #(.DATA_W(DATA_W), .AVG_SHIFT(OFFSET_AVG)) u_ofs2 (
    .clk, .rst_n, .en(offset_en), .x_valid(in_valid), .x(d_out2),
    .y_valid(v1b), .y(x2), .offset());

  // ---- correction of both channels and signal-free combination -------------
  logic signed [INT_W-1:0] cal1, cal2;
  logic signed [NW-1:0]    nosig;

  nl_corrector #(.DATA_W(DATA_W), .ORDER(ORDER), .HARM5(HARM5)) u_cor1 (
    .d_out(x1), .alpha, .alpha5, .d_cal(cal1));
  nl_corrector #(.DATA_W(DATA_W), .ORDER(ORDER), .HARM5(HARM5)) u_cor2 (
    .d_out(x2), .alpha, .alpha5, .d_cal(cal2));
  nosig_combiner #(.W(INT_W)) u_nosig (.d_cal(cal1), .d_cal2(cal2), .d_nosig(nosig));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d_cal     <= '0;
      d_nosig   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        d_cal   <= cal1;
        d_nosig <= nosig;
      end
    end
  end

  // ---- buffer fill tracking: updates start on a full window --------------
  logic [FW-1:0] fill;
  logic          full;

  assign full = (fill == FW'(FILL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              fill <= '0;
    else if (v1 && !full)    fill <= fill + 1'b1;
  end

  // ---- main LMS engine (order ORDER, downsampling by ORDER) -----------------
  logic signed [DATA_W-1:0] ds1   [WIN_LEN];
  logic signed [NW-1:0]     nos1  [WIN_LEN];
  logic signed [ERR_W-1:0]  err1;

  window_buffer #(.W(DATA_W), .STRIDE(ORDER), .TAPS(WIN_LEN)) u_dbuf1 (
    .clk, .rst_n, .shift_en(v1), .din(x1), .taps(ds1));
  window_buffer #(.W(NW), .STRIDE(ORDER), .TAPS(WIN_LEN)) u_nbuf1 (
    .clk, .rst_n, .shift_en(v1), .din(nosig), .taps(nos1));
  err_correlator #(.A_W(NW), .B_W(DATA_W), .TAPS(WIN_LEN), .WINDOW(WINDOW), .ERR_W(ERR_W))
    u_err1 (.a(nos1), .b(ds1), .err(err1));
  lms_update #(.ERR_W(ERR_W), .ERR_F(ERR_F), .MU_SHIFT(MU_SHIFT), .SLIDE(SLIDE)) u_lms1 (
    .clk, .rst_n, .sample_en(v1), .err_valid(full), .err(err1),
    .alpha(alpha), .upd(upd));

  // ---- optional fifth-order LMS engine -------------------------------------
  if (HARM5) begin : g_h5
    logic signed [DATA_W-1:0] ds5  [WIN_LEN];
    logic signed [NW-1:0]     nos5 [WIN_LEN];
    logic signed [ERR_W-1:0]  err5;

    window_buffer #(.W(DATA_W), .STRIDE(5), .TAPS(WIN_LEN)) u_dbuf5 (
      .clk, .rst_n, .shift_en(v1), .din(x1), .taps(ds5));
    window_buffer #(.W(NW), .STRIDE(5), .TAPS(WIN_LEN)) u_nbuf5 (
      .clk, .rst_n, .shift_en(v1), .din(nosig), .taps(nos5));
    err_correlator #(.A_W(NW), .B_W(DATA_W), .TAPS(WIN_LEN), .WINDOW(WINDOW), .ERR_W(ERR_W))
      u_err5 (.a(nos5), .b(ds5), .err(err5));
    lms_update #(.ERR_W(ERR_W), .ERR_F(ERR_F), .MU_SHIFT(MU_SHIFT), .SLIDE(SLIDE)) u_lms5 (
      .clk, .rst_n, .sample_en(v1), .err_valid(full), .err(err5),
      .alpha(alpha5), .upd(upd5));
  end else begin : g_no_h5
    assign alpha5 = '0;
    assign upd5   = 1'b0;
  end

  // both offset stages see the same valid strobe
  a_valid_pair: assert property (@(posedge clk) disable iff (!rst_n) v1 == v1b);

endmodule
