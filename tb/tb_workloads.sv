// Parameter-sweep testbench of the calibration backend, covering the
// studies the algorithm was evaluated with (a3 = 0.05, w = 32, 12-bit codes,
// amplitude 0.9):
//   * input frequency: all k/32 fs (whole periods in the window) and all
//     odd k/64 and odd k/128 fs (not whole periods), up to 0.5 fs;
//   * step size mu = 2^2 .. 2^-2, mapped to MU_SHIFT = 8 .. 12, plus one
//     step twice the largest (MU_SHIFT = 7), which must fail to settle;
//   * window slide of 1, 2, 3 and w samples between updates;
//   * rectangular, Hann, Hamming and Blackman windows.
// All twelve configurations see the same stimulus; each frequency starts
// from reset. Every stable configuration must settle in 0.041 .. 0.047, the
// oversized step must not (the loop goes unstable), a larger mu
// must never settle more slowly than a smaller one, and a larger slide must
// never settle faster. A table of settled values and settling times (first
// sample with alpha >= 0.039) is printed.
`timescale 1ns/1ps
module tb_workloads;
  import bc_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam int  NSAMP = 12000;
  localparam int  NCFG  = 12;
  localparam int  MU_SH [5]  = '{8, 9, 10, 11, 12};
  localparam int  SLIDES [4] = '{1, 2, 3, 32};
  // configuration index: 0..4 mu sweep (1 is the default MU_SHIFT = 9),
  // 5..7 slide 2/3/32, 8..10 Hann/Hamming/Blackman, 11 oversized step
  localparam string NAMES [NCFG] = '{"mu=2^2", "mu=2^1", "mu=2^0", "mu=2^-1", "mu=2^-2",
                                     "slide=2", "slide=3", "slide=w", "hann", "hamming", "blackman",
                                     "mu=2^3"};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               in_valid;
  logic signed [11:0] d1, d2;
  logic signed [ALPHA_W-1:0] al [NCFG];

  for (genvar i = 0; i < 5; i++) begin : g_mu
    blind_cal_top #(.MU_SHIFT(MU_SH[i])) u (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2),
      .offset_en(1'b0), .out_valid(), .d_cal(), .d_nosig(), .alpha(al[i]), .alpha5(), .upd(), .upd5());
  end
  for (genvar i = 1; i < 4; i++) begin : g_slide
    blind_cal_top #(.SLIDE(SLIDES[i])) u (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2),
      .offset_en(1'b0), .out_valid(), .d_cal(), .d_nosig(), .alpha(al[4 + i]), .alpha5(), .upd(), .upd5());
  end
  blind_cal_top #(.WINDOW(WIN_HANN)) u_hann (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2),
    .offset_en(1'b0), .out_valid(), .d_cal(), .d_nosig(), .alpha(al[8]), .alpha5(), .upd(), .upd5());
  blind_cal_top #(.WINDOW(WIN_HAMMING)) u_hamm (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2),
    .offset_en(1'b0), .out_valid(), .d_cal(), .d_nosig(), .alpha(al[9]), .alpha5(), .upd(), .upd5());
  blind_cal_top #(.MU_SHIFT(7)) u_big (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2),
    .offset_en(1'b0), .out_valid(), .d_cal(), .d_nosig(), .alpha(al[11]), .alpha5(), .upd(), .upd5());
  blind_cal_top #(.WINDOW(WIN_BLACKMAN)) u_black (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2),
    .offset_en(1'b0), .out_valid(), .d_cal(), .d_nosig(), .alpha(al[10]), .alpha5(), .upd(), .upd5());

  function automatic logic signed [11:0] quant(real v);
    real s;
    s = v * 2048.0;
    s = (s >= 0.0) ? $floor(s + 0.5) : -$floor(-s + 0.5);
    if (s >  2047.0) s =  2047.0;
    if (s < -2048.0) s = -2048.0;
    return 12'(int'(s));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(real fin);
    real x, a [NCFG];
    int  tset [NCFG];
    string line;
    for (int i = 0; i < NCFG; i++) tset[i] = -1;
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NSAMP; t++) begin
      x  = 0.9 * $sin(2.0 * PI * fin * real'(t) + 0.3);
      d1 = quant(x + 0.05 * x * x * x);
      d2 = quant(0.5 * x + 0.05 * (0.5 * x) * (0.5 * x) * (0.5 * x));
      in_valid = 1'b1;
      @(posedge clk); #1;
      for (int i = 0; i < NCFG; i++)
        if (tset[i] < 0 && real'(al[i]) / real'(1 << ALPHA_F) >= 0.039) tset[i] = t;
    end
    in_valid = 1'b0;
    repeat (3) @(posedge clk); #1;
    line = $sformatf("f=%7.5f", fin);
    for (int i = 0; i < NCFG; i++) begin
      a[i] = real'(al[i]) / real'(1 << ALPHA_F);
      line = {line, $sformatf(" | %s %6.4f @%0d", NAMES[i], a[i], tset[i])};
      if (i < 11) begin
        check(a[i] > 0.041 && a[i] < 0.047, $sformatf("f=%f %s alpha %f", fin, NAMES[i], a[i]));
        check(tset[i] >= 0, $sformatf("f=%f %s never settled", fin, NAMES[i]));
      end else begin
        check(!(a[i] > 0.041 && a[i] < 0.047), $sformatf("f=%f %s unexpectedly stable", fin, NAMES[i]));
      end
    end
    $display("%s", line);
    for (int i = 0; i < 4; i++)
      check(tset[i] <= tset[i + 1], $sformatf("f=%f larger mu settles later (%0d)", fin, i));
    check(tset[1] <= tset[5] && tset[5] <= tset[6] && tset[6] <= tset[7],
          $sformatf("f=%f larger slide settles sooner", fin));
  endtask

  initial begin
    for (int k = 1; k < 16; k++) run(real'(k) / 32.0);
    for (int k = 1; k < 32; k += 2) run(real'(k) / 64.0);
    for (int k = 1; k < 64; k += 2) run(real'(k) / 128.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64 * (NSAMP + 10)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
