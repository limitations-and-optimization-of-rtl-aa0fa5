// Full-size run of the calibration backend at its default configuration
// (w = 32, third order, rectangular window, update on every sample).
//
// Behavioural ADC stand-in: D_out = x + a3*x^3 and D_out2 = 0.5x + a3*(0.5x)^3,
// a3 = 0.05, x = 0.9*sin(2*pi*f*n), quantised to 12 bits, one pair per clock.
// Two input frequencies are run back to back, each after a reset: 5/32 fs,
// an integer number of cycles in the 32-sample window, and 3/32 fs. The
// coefficient must settle at 0.044 +/- 0.002 (a floating-point model of the
// finite-window algorithm gives 0.0442 for both), the third harmonic of
// the calibrated output must fall below 10% of the uncorrected one, and the
// first update must come when the 94-sample buffer is full.
`timescale 1ns/1ps
module tb_blind_cal_full;
  import bc_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam int  NSAMP = 4096;
  localparam int  NMEAS = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                      in_valid;
  logic signed [11:0]        d1, d2;
  logic                      out_valid, upd3, upd5;
  logic signed [INT_W-1:0]   d_cal;
  logic signed [INT_W+1:0]   d_nosig;
  logic signed [ALPHA_W-1:0] alpha3, alpha5;

  blind_cal_top dut (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2), .offset_en(1'b0),
    .out_valid, .d_cal, .d_nosig, .alpha(alpha3), .alpha5, .upd(upd3), .upd5);

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
    real x, hs, hc, rs, rc, ph, al;
    int  nout, first_upd, nin;
    hs = 0.0; hc = 0.0; rs = 0.0; rc = 0.0; nout = 0; first_upd = -1; nin = 0;
    rst_n = 1'b0; in_valid = 1'b0; d1 = '0; d2 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      begin
        for (int t = 0; t < NSAMP; t++) begin
          x  = 0.9 * $sin(2.0 * PI * fin * real'(t) + 0.3);
          d1 = quant(x + 0.05 * x * x * x);
          d2 = quant(0.5 * x + 0.05 * (0.5 * x) * (0.5 * x) * (0.5 * x));
          in_valid = 1'b1;
          if (t >= NSAMP - NMEAS) begin
            ph = 2.0 * PI * 3.0 * fin * real'(t);
            rs += real'(d1) / 2048.0 * $sin(ph);
            rc += real'(d1) / 2048.0 * $cos(ph);
          end
          @(posedge clk); #1;
          nin++;
        end
        in_valid = 1'b0;
      end
      begin
        // output of sample t appears after the edge t+2
        while (nout < NSAMP) begin
          @(negedge clk);
          if (upd3 && first_upd < 0) first_upd = nin;
          if (out_valid) begin
            if (nout >= NSAMP - NMEAS) begin
              ph = 2.0 * PI * 3.0 * fin * real'(nout);
              hs += real'(d_cal) / 65536.0 * $sin(ph);
              hc += real'(d_cal) / 65536.0 * $cos(ph);
            end
            if (nout < NSAMP - 2) check(nin - nout == 2, $sformatf("latency %0d", nin - nout));
            nout++;
          end
        end
      end
    join
    al = real'(alpha3) / real'(1 << ALPHA_F);
    $display("fin=%f alpha3=%f h3 ratio=%f first update after %0d samples",
             fin, al, $sqrt(hs*hs + hc*hc) / $sqrt(rs*rs + rc*rc), first_upd);
    check(al > 0.042 && al < 0.046, $sformatf("alpha3 %f", al));
    check($sqrt(hs*hs + hc*hc) < 0.1 * $sqrt(rs*rs + rc*rc), "third harmonic not reduced");
    // the window of 3*32-2 = 94 samples is full after sample 94; the update
    // that uses it is seen one sample later
    check(first_upd == 96, $sformatf("first update after %0d samples", first_upd));
  endtask

  initial begin
    run(5.0 / 32.0);
    run(3.0 / 32.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NSAMP) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
