// Testbench of power_unit: cube and fifth power of 12-bit fractions.
// Exhaustive over all 4096 codes for both orders. The expected value is
// floor(x^n * 2^16) with x = code/2^11, formed in 64-bit integer arithmetic
// (x^3 exactly, x^5 via two 64-bit steps), i.e. the truncated real power.
`timescale 1ns/1ps
module tb_power_unit;
  int checks = 0, failures = 0;
  logic signed [11:0] x;
  logic signed [19:0] y3, y5;

  power_unit #(.ORDER(3)) u3 (.x(x), .y(y3));
  power_unit #(.ORDER(5)) u5 (.x(x), .y(y5));

  function automatic longint floor_div_pow2(longint v, int s);
    longint q;
    q = v / (64'sd1 <<< s);
    if (v < 0 && (v % (64'sd1 <<< s)) != 0) q = q - 1;
    return q;
  endfunction

  initial begin
    longint xv, e3, e5;
    for (int c = -2048; c < 2048; c++) begin
      x = 12'(c);
      #1;
      xv = c;
      e3 = floor_div_pow2(xv * xv * xv, 33 - 16);
      e5 = floor_div_pow2(xv * xv * xv * xv * xv, 55 - 16);
      checks += 2;
      if (longint'(y3) != e3) begin
        failures++;
        if (failures < 10) $display("FAIL cube x=%0d got %0d exp %0d", c, y3, e3);
      end
      if (longint'(y5) != e5) begin
        failures++;
        if (failures < 10) $display("FAIL fifth x=%0d got %0d exp %0d", c, y5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
