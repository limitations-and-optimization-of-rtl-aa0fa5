// Finite input buffer with a built-in downsampler (the "practical input
// buffer" of the algorithm, and its "down-by-N" box).
//
// A shift register of LEN = STRIDE*(TAPS-1)+1 samples; for STRIDE = 3 and
// TAPS = w this is the 3w-2 entries the algorithm prescribes. Every cycle
// with shift_en high the newest sample enters at position 0 and the oldest
// falls out. The downsampled window is read from the buffer itself, starting
// at the oldest sample and taking every STRIDE-th one:
//   taps[k] = sample[n + STRIDE*k],  k = 0..TAPS-1,
// where n is the index of the oldest stored sample. After one shift the whole
// window therefore moves by one input sample, e.g. [1 4 7 10] -> [2 5 8 11].
// The same module, fed with D_nosig, provides the matching D_nosig taps.
//
// Reset clears the buffer to zero. taps is a registered output (no
// combinational path from din).
module window_buffer #(
  parameter int unsigned W      = 12,
  parameter int unsigned STRIDE = 3,
  parameter int unsigned TAPS   = 32,
  parameter int unsigned LEN    = STRIDE * (TAPS - 1) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [TAPS]
);

  logic signed [W-1:0] sr [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) sr[i] <= '0;
    end else if (shift_en) begin
      sr[0] <= din;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  // oldest sample sits at sr[LEN-1]
  always_comb begin
    for (int k = 0; k < TAPS; k++) taps[k] = sr[LEN - 1 - STRIDE * k];
  end

  initial begin
    assert (LEN >= STRIDE * (TAPS - 1) + 1) else $error("window_buffer: LEN too short");
  end

endmodule
