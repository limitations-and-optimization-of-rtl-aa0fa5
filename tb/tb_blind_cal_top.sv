// End-to-end testbench of the blind calibration backend.
//
// A behavioural stand-in for the two ADCs produces coherent sine codes with
// cubic distortion, D_out = x + a3*x^3 and D_out2 = 0.5x + a3*(0.5x)^3
// (a3 = 0.05, amplitude 0.9, f = 5/32 fs), quantised to 12 bits, with about
// 10% idle cycles. Four instances run side by side:
//   u_base : default configuration, clean input
//   u_ofs  : default configuration, inputs carry a DC offset, offset removal on
//   u_hann : Hann-shaped window, coefficient updated every 4th sample
//   u_h5   : third- and fifth-order paths
//   u_raw  : default configuration, offset inputs, offset removal off
// Checks: alpha3 settles at 0.0442 +/- 0.002 (a floating-point model of the
// same finite-window algorithm settles at 0.0442; the shortfall from 0.05 is
// the higher-order distortion that the correction itself creates), the third
// harmonic of d_cal drops below 30% of the uncorrected one, the output latency
// is two cycles, update counts match the slide setting, and each mechanism
// (update, slide skip, offset removal, window shaping, fifth-order update,
// buffer fill wait) happens at least once. Two effects the algorithm is known
// for are checked as well: an offset left in the codes biases the estimate
// (u_raw settles lower than u_ofs), and the correction itself creates a
// fifth harmonic that the uncorrected third-order distortion did not have.
`timescale 1ns/1ps
module tb_blind_cal_top;
  import bc_pkg::*;

  localparam int    DW     = 12;
  localparam real   A      = 0.9;
  localparam real   A3     = 0.05;
  localparam real   FIN    = 5.0 / 32.0;
  localparam real   PI     = 3.14159265358979323846;
  localparam int    NSAMP  = 6000;
  localparam int    NMEAS  = 2048;          // last samples used for the harmonic measure
  localparam int    OFS    = 100;           // LSB offset added for u_ofs and u_raw

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 in_valid;
  logic signed [DW-1:0] d1, d2, d1o, d2o;

  // ---- instances -----------------------------------------------------------
  localparam int NI = 5;
  logic                      ov [NI];
  logic signed [INT_W-1:0]   dc [NI];
  logic signed [INT_W+1:0]   dn [NI];
  logic signed [ALPHA_W-1:0] a3 [NI], a5 [NI];
  logic                      u3 [NI], u5 [NI];

  blind_cal_top u_base (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2), .offset_en(1'b0),
    .out_valid(ov[0]), .d_cal(dc[0]), .d_nosig(dn[0]), .alpha(a3[0]), .alpha5(a5[0]), .upd(u3[0]), .upd5(u5[0]));
  blind_cal_top u_ofs (.clk, .rst_n, .in_valid, .d_out1(d1o), .d_out2(d2o), .offset_en(1'b1),
    .out_valid(ov[1]), .d_cal(dc[1]), .d_nosig(dn[1]), .alpha(a3[1]), .alpha5(a5[1]), .upd(u3[1]), .upd5(u5[1]));
  blind_cal_top #(.SLIDE(4), .WINDOW(WIN_HANN)) u_hann (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2), .offset_en(1'b0),
    .out_valid(ov[2]), .d_cal(dc[2]), .d_nosig(dn[2]), .alpha(a3[2]), .alpha5(a5[2]), .upd(u3[2]), .upd5(u5[2]));
  blind_cal_top #(.HARM5(1'b1)) u_h5 (.clk, .rst_n, .in_valid, .d_out1(d1), .d_out2(d2), .offset_en(1'b0),
    .out_valid(ov[3]), .d_cal(dc[3]), .d_nosig(dn[3]), .alpha(a3[3]), .alpha5(a5[3]), .upd(u3[3]), .upd5(u5[3]));

  blind_cal_top u_raw (.clk, .rst_n, .in_valid, .d_out1(d1o), .d_out2(d2o), .offset_en(1'b0),
    .out_valid(ov[4]), .d_cal(dc[4]), .d_nosig(dn[4]), .alpha(a3[4]), .alpha5(a5[4]), .upd(u3[4]), .upd5(u5[4]));

  // ---- ADC stand-in ---------------------------------------------------------
  function automatic logic signed [DW-1:0] quant(real v);
    real s;
    s = v * real'(1 << (DW-1));
    s = (s >= 0.0) ? $floor(s + 0.5) : -$floor(-s + 0.5);
    if (s >  2047.0) s =  2047.0;
    if (s < -2048.0) s = -2048.0;
    return DW'(int'(s));
  endfunction

  function automatic real xin(int t);
    return A * $sin(2.0 * PI * FIN * real'(t) + 0.3);
  endfunction

  function automatic real to_real(logic signed [INT_W-1:0] v);
    return real'(v) / real'(1 << INT_F);
  endfunction

  function automatic real alpha_real(logic signed [ALPHA_W-1:0] v);
    return real'(v) / real'(1 << ALPHA_F);
  endfunction

  // ---- bookkeeping ----------------------------------------------------------
  int   t_in = 0;                 // sample index of the pair being driven
  int   q [NI][$];                // sample indices in flight per instance
  int   cyc_q [NI][$];            // cycle of each in_valid
  int   cycle = 0;
  real  h_s [NI], h_c [NI];       // third-harmonic correlation of d_cal, last NMEAS samples
  real  r_s, r_c;                 // same for the uncorrected D_out
  real  f_s, f_c, g_s, g_c;       // fifth harmonic of d_cal (u_base) and of D_out
  int   nupd3 [NI], nupd5 [NI];
  int   n_lat_bad = 0;
  int   n_slide_skip = 0, n_ofs_active = 0, n_fill_wait = 0;
  int   nout [NI];

  always @(posedge clk) cycle <= cycle + 1;

  // sample the outputs after each edge
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NI; i++) begin
      if (u3[i]) nupd3[i]++;
      if (u5[i]) nupd5[i]++;
      if (ov[i]) begin
        int t, c;
        real ph;
        t = q[i].pop_front();
        c = cyc_q[i].pop_front();
        if (cycle - c != 2) n_lat_bad++;
        nout[i]++;
        if (t >= NSAMP - NMEAS) begin
          ph = 2.0 * PI * 3.0 * FIN * real'(t) + 0.9;
          h_s[i] += to_real(dc[i]) * $sin(ph);
          h_c[i] += to_real(dc[i]) * $cos(ph);
          if (i == 0) begin
            ph = 2.0 * PI * 5.0 * FIN * real'(t);
            f_s += to_real(dc[i]) * $sin(ph);
            f_c += to_real(dc[i]) * $cos(ph);
          end
        end
      end
    end
    if (u_ofs.u_ofs1.offset != 0) n_ofs_active++;
    if (ov[0] && !u_base.full) n_fill_wait++;
    if (u_hann.v1 && u_hann.full && !u_hann.u_lms1.fire) n_slide_skip++;
  end

  // ---- driver ----------------------------------------------------------------
  initial begin
    real x, y1, y2, ph;
    in_valid = 1'b0; d1 = '0; d2 = '0; d1o = '0; d2o = '0;
    r_s = 0.0; r_c = 0.0; f_s = 0.0; f_c = 0.0; g_s = 0.0; g_c = 0.0;
    for (int i = 0; i < NI; i++) begin h_s[i] = 0.0; h_c[i] = 0.0; nupd3[i] = 0; nupd5[i] = 0; nout[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (t_in < NSAMP) begin
      @(posedge clk);
      #1;
      if (($urandom % 10) == 0) begin
        in_valid = 1'b0;
      end else begin
        x  = xin(t_in);
        y1 = x + A3 * x * x * x;
        y2 = 0.5 * x + A3 * (0.5 * x) * (0.5 * x) * (0.5 * x);
        d1 = quant(y1);  d2 = quant(y2);
        d1o = quant(y1 + real'(OFS) / 2048.0);
        d2o = quant(y2 + real'(OFS) / 2048.0);
        in_valid = 1'b1;
        if (t_in >= NSAMP - NMEAS) begin
          ph = 2.0 * PI * 3.0 * FIN * real'(t_in) + 0.9;
          r_s += real'(d1) / 2048.0 * $sin(ph);
          r_c += real'(d1) / 2048.0 * $cos(ph);
          ph = 2.0 * PI * 5.0 * FIN * real'(t_in);
          g_s += real'(d1) / 2048.0 * $sin(ph);
          g_c += real'(d1) / 2048.0 * $cos(ph);
        end
        for (int i = 0; i < NI; i++) begin q[i].push_back(t_in); cyc_q[i].push_back(cycle); end
        t_in++;
      end
    end
    @(posedge clk); #1 in_valid = 1'b0;
    repeat (6) @(posedge clk);
    @(negedge clk);
    report();
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic report();
    real ref_h, h, al;
    ref_h = $sqrt(r_s * r_s + r_c * r_c);
    for (int i = 0; i < NI; i++) begin
      al = alpha_real(a3[i]);
      h  = $sqrt(h_s[i] * h_s[i] + h_c[i] * h_c[i]);
      $display("instance %0d: alpha3=%f alpha5=%f upd3=%0d upd5=%0d h3 ratio=%f outputs=%0d",
               i, al, alpha_real(a5[i]), nupd3[i], nupd5[i], h / ref_h, nout[i]);
      check(nout[i] == NSAMP, $sformatf("instance %0d produced %0d outputs", i, nout[i]));
      if (i < 3) begin
        check(al > 0.0422 && al < 0.0462, $sformatf("instance %0d alpha3 %f out of range", i, al));
      end
      if (i < 4) check(h / ref_h < 0.30, $sformatf("instance %0d third harmonic ratio %f", i, h / ref_h));
    end
    // updates: every sample after the fill for SLIDE=1, one in four for SLIDE=4
    check(nupd3[0] == NSAMP - 94 + 1 || nupd3[0] == NSAMP - 94,
          $sformatf("base update count %0d", nupd3[0]));
    check(nupd3[2] >= (NSAMP - 94) / 4 - 1 && nupd3[2] <= (NSAMP - 94) / 4 + 1,
          $sformatf("slide-4 update count %0d", nupd3[2]));
    check(nupd5[3] > 0 && nupd5[0] == 0, "fifth-order updates");
    check(n_lat_bad == 0, $sformatf("%0d outputs with latency other than 2", n_lat_bad));
    // offset estimate must be close to the injected offset
    check(u_ofs.u_ofs1.offset >= OFS - 3 && u_ofs.u_ofs1.offset <= OFS + 3,
          $sformatf("offset estimate %0d", u_ofs.u_ofs1.offset));
    // an offset that is not removed biases the estimate
    $display("offset bias: with removal %f, without %f", alpha_real(a3[1]), alpha_real(a3[4]));
    check(alpha_real(a3[1]) - alpha_real(a3[4]) > 0.003, "offset left in does not bias the estimate");
    // the correction creates a fifth harmonic
    $display("fifth harmonic: uncorrected %f, corrected %f", $sqrt(g_s*g_s + g_c*g_c), $sqrt(f_s*f_s + f_c*f_c));
    // expected: alpha*3*a3*x^5 has a fifth-harmonic amplitude of about
    // 0.044*0.15*0.9^5/16 = 2.4e-4, i.e. 0.25 in these 2048-sample sums; the
    // uncorrected codes carry only quantisation error there (about 0.1)
    check($sqrt(f_s*f_s + f_c*f_c) > 0.15 && $sqrt(f_s*f_s + f_c*f_c) > 1.5 * $sqrt(g_s*g_s + g_c*g_c),
          "no fifth harmonic created by the correction");
    // mechanisms seen
    $display("mechanisms: coefficient updates=%0d slide skips=%0d offset-removal cycles=%0d window-shaped updates=%0d fifth-order updates=%0d fill waits=%0d",
             nupd3[0], n_slide_skip, n_ofs_active, nupd3[2], nupd5[3], n_fill_wait);
    check(nupd3[0] > 0, "no coefficient update");
    check(n_slide_skip > 0, "no slide skip");
    check(n_ofs_active > 0, "offset removal never active");
    check(nupd3[2] > 0, "no window-shaped update");
    check(nupd5[3] > 0, "no fifth-order update");
    check(n_fill_wait > 0, "no buffer fill wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NSAMP * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
