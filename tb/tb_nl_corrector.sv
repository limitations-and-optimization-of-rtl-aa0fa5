// Testbench of nl_corrector: D_cal = D_out - alpha3*D_out^3 - alpha5*D_out^5.
// Random codes and coefficients; the expected value is computed in real
// arithmetic from the real-valued code and coefficients and must agree
// within 3 LSB of the 16-bit fraction (the block truncates twice per term),
// after clamping to the 20-bit output range, which the block saturates to.
// A third-order-only and a third+fifth-order instance are checked, and the
// fifth-order instance must differ from the other when alpha5 is non-zero.
`timescale 1ns/1ps
module tb_nl_corrector;
  import bc_pkg::*;
  int checks = 0, failures = 0;
  logic signed [11:0]        x;
  logic signed [ALPHA_W-1:0] a3, a5;
  logic signed [INT_W-1:0]   y3, y35;
  int n_differ = 0;

  nl_corrector #(.HARM5(1'b0)) u3  (.d_out(x), .alpha(a3), .alpha5(a5), .d_cal(y3));
  nl_corrector #(.HARM5(1'b1)) u35 (.d_out(x), .alpha(a3), .alpha5(a5), .d_cal(y35));

  initial begin
    real xr, a3r, a5r, e3, e35;
    for (int i = 0; i < 5000; i++) begin
      x  = 12'($urandom);
      a3 = ALPHA_W'($signed($urandom) % (1 << 19));   // |alpha| < 0.5
      a5 = ALPHA_W'($signed($urandom) % (1 << 19));
      if (i < 4) begin x = (i[0]) ? 12'sh7ff : 12'sh800; a3 = (i[1]) ? 24'sh7fffff : 24'sh800000; end
      #1;
      xr  = real'(x) / 2048.0;
      a3r = real'(a3) / real'(1 << ALPHA_F);
      a5r = real'(a5) / real'(1 << ALPHA_F);
      e3  = (xr - a3r * xr * xr * xr) * 65536.0;
      e35 = (xr - a3r * xr * xr * xr - a5r * xr * xr * xr * xr * xr) * 65536.0;
      if (e3  >  524287.0) e3  =  524287.0;
      if (e3  < -524288.0) e3  = -524288.0;
      if (e35 >  524287.0) e35 =  524287.0;
      if (e35 < -524288.0) e35 = -524288.0;
      checks += 2;
      if (real'(y3) - e3 > 3.0 || e3 - real'(y3) > 3.0) begin
        failures++; $display("FAIL 3rd x=%0d a3=%0d got %0d exp %f", x, a3, y3, e3);
      end
      if (real'(y35) - e35 > 3.0 || e35 - real'(y35) > 3.0) begin
        failures++; $display("FAIL 5th x=%0d a5=%0d got %0d exp %f", x, a5, y35, e35);
      end
      if (y3 != y35) n_differ++;
    end
    checks++;
    if (n_differ < 1000) begin failures++; $display("FAIL fifth-order term rarely active"); end
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
