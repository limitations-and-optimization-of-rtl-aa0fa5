// Testbench of window_buffer, the finite input buffer with stride taps.
// Part 1 reproduces the practical-buffer example for w = 4, stride 3 (a
// 10-entry buffer): after samples 1..10 the taps are [1 4 7 10], after 11
// they are [2 5 8 11], after 12 [3 6 9 12]. Part 2 runs the default size
// (w = 32, 94 entries) with random samples and random shift enables against
// a queue model, and checks that taps change only on enabled cycles.
`timescale 1ns/1ps
module tb_window_buffer;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              en_s, en_l;
  logic signed [11:0] din_s, din_l;
  logic signed [11:0] taps_s [4];
  logic signed [11:0] taps_l [32];

  window_buffer #(.W(12), .STRIDE(3), .TAPS(4))  u_s (.clk, .rst_n, .shift_en(en_s), .din(din_s), .taps(taps_s));
  window_buffer #(.W(12), .STRIDE(3), .TAPS(32)) u_l (.clk, .rst_n, .shift_en(en_l), .din(din_l), .taps(taps_l));

  int model [$];

  task automatic expect_small(int b0, int b1, int b2, int b3);
    int e [4];
    e = '{b0, b1, b2, b3};
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(taps_s[k]) != e[k]) begin
        failures++; $display("FAIL small tap %0d = %0d, expected %0d", k, taps_s[k], e[k]);
      end
    end
  endtask

  initial begin
    en_s = 0; en_l = 0; din_s = 0; din_l = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // reset contents are zero
    for (int k = 0; k < 32; k++) begin checks++; if (taps_l[k] != 0) failures++; end
    for (int s = 1; s <= 12; s++) begin
      en_s = 1; din_s = 12'(s);
      @(posedge clk); #1;
      if (s == 10) expect_small(1, 4, 7, 10);
      if (s == 11) expect_small(2, 5, 8, 11);
      if (s == 12) expect_small(3, 6, 9, 12);
    end
    en_s = 0; din_s = 12'd99;
    @(posedge clk); #1;
    expect_small(3, 6, 9, 12);     // hold without shift_en
    // large buffer, random enables
    for (int i = 0; i < 94; i++) model.push_back(0);
    for (int i = 0; i < 3000; i++) begin
      en_l = ($urandom % 4) != 0;
      din_l = 12'($urandom);
      if (en_l) begin model.push_back(int'(din_l)); void'(model.pop_front()); end
      @(posedge clk); #1;
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (int'(taps_l[k]) != model[3 * k]) begin
          failures++;
          if (failures < 10) $display("FAIL large tap %0d = %0d, expected %0d", k, taps_l[k], model[3*k]);
        end
      end
    end
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
