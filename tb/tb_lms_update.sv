// Testbench of lms_update, the coefficient register.
// With ERR_F = 27, ALPHA_F = 20 and MU_SHIFT = 9 each update adds
// floor(err / 2^16) to the 20-bit-fraction coefficient. A reference model
// in the testbench tracks the expected coefficient for random errors and
// random strobes, for SLIDE = 1 and SLIDE = 3 (one update per three strobes),
// checks that nothing moves while err_valid is low, that upd pulses one
// cycle after each update, and that the coefficient saturates at its limits.
`timescale 1ns/1ps
module tb_lms_update;
  import bc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      sample_en, err_valid;
  logic signed [39:0]        err;
  logic signed [ALPHA_W-1:0] al1, al3;
  logic                      up1, up3;

  lms_update #(.ERR_W(40), .ERR_F(27), .MU_SHIFT(9), .SLIDE(1)) u1 (
    .clk, .rst_n, .sample_en, .err_valid, .err, .alpha(al1), .upd(up1));
  lms_update #(.ERR_W(40), .ERR_F(27), .MU_SHIFT(9), .SLIDE(3)) u3 (
    .clk, .rst_n, .sample_en, .err_valid, .err, .alpha(al3), .upd(up3));

  longint m1, m3;
  int     cnt3;
  bit     exp_up1, exp_up3;
  localparam longint AMAX = (64'sd1 <<< 23) - 1;
  localparam longint AMIN = -(64'sd1 <<< 23);

  function automatic longint sat(longint v);
    if (v > AMAX) return AMAX;
    if (v < AMIN) return AMIN;
    return v;
  endfunction

  function automatic longint fdiv(longint v);
    longint q;
    q = v / 65536;
    if (v < 0 && (v % 65536) != 0) q = q - 1;
    return q;
  endfunction

  int n_sat = 0;

  initial begin
    m1 = 0; m3 = 0; cnt3 = 0;
    sample_en = 0; err_valid = 0; err = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      sample_en = ($urandom % 3) != 0;
      err_valid = (i > 20) && (($urandom % 8) != 0);
      if (i < 1500)       err = 40'($signed($urandom) % (1 << 24));
      else if (i < 2500)  err = 40'sd1 <<< 36;               // drive to +limit
      else                err = -(40'sd1 <<< 36);            // drive to -limit
      exp_up1 = 0; exp_up3 = 0;
      if (sample_en && err_valid) begin
        m1 = sat(m1 + fdiv(longint'(err)));
        exp_up1 = 1;
        if (cnt3 == 2) begin m3 = sat(m3 + fdiv(longint'(err))); exp_up3 = 1; cnt3 = 0; end
        else cnt3++;
      end
      @(posedge clk); #1;
      checks += 4;
      if (longint'(al1) != m1) begin failures++; if (failures < 10) $display("FAIL slide1 %0d exp %0d", al1, m1); end
      if (longint'(al3) != m3) begin failures++; if (failures < 10) $display("FAIL slide3 %0d exp %0d", al3, m3); end
      if (up1 != exp_up1) begin failures++; if (failures < 10) $display("FAIL upd1"); end
      if (up3 != exp_up3) begin failures++; if (failures < 10) $display("FAIL upd3"); end
      if (m1 == AMAX || m1 == AMIN) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
