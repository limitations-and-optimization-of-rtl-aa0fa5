// Testbench of err_correlator. Random 22-bit D_nosig and 12-bit D_ds taps
// (w = 32). The rectangular instance must equal the exact integer sum of
// products. The Hann instance is compared with a real-valued sum in which
// the Hann window 0.5 - 0.5*cos(2*pi*k/31) multiplies both operands; the
// tolerance allows for the 15-bit weights and per-tap truncation. The
// Hamming and Blackman instances are checked the same way.
`timescale 1ns/1ps
module tb_err_correlator;
  import bc_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  logic signed [21:0] a [32];
  logic signed [11:0] b [32];
  logic signed [39:0] e_rect, e_hann, e_hamm, e_black;

  err_correlator #(.WINDOW(WIN_RECT))     u_r (.a, .b, .err(e_rect));
  err_correlator #(.WINDOW(WIN_HANN))     u_h (.a, .b, .err(e_hann));
  err_correlator #(.WINDOW(WIN_HAMMING))  u_m (.a, .b, .err(e_hamm));
  err_correlator #(.WINDOW(WIN_BLACKMAN)) u_b (.a, .b, .err(e_black));

  function automatic real wfun(int kind, int k);
    real p;
    p = 2.0 * PI * real'(k) / 31.0;
    case (kind)
      1: return 0.5 - 0.5 * $cos(p);
      2: return 0.54 - 0.46 * $cos(p);
      default: return 0.42 - 0.5 * $cos(p) + 0.08 * $cos(2.0 * p);
    endcase
  endfunction

  real sabs;   // sum of |a*b| of the current vector

  task automatic cmp_real(string nm, logic signed [39:0] got, real exp_v);
    real d, tol;
    d = real'(got) - exp_v;
    // per tap: < 1 LSB of truncation, and the weight is rounded to 2^-16
    tol = 40.0 + sabs / 65536.0;
    checks++;
    if (d > tol || d < -tol) begin
      failures++;
      $display("FAIL %s got %0d exp %f", nm, got, exp_v);
    end
  endtask

  initial begin
    longint s;
    real sh, sm, sb, p;
    for (int it = 0; it < 500; it++) begin
      for (int k = 0; k < 32; k++) begin
        a[k] = 22'($urandom);
        b[k] = 12'($urandom);
      end
      if (it == 0) for (int k = 0; k < 32; k++) begin a[k] = 22'sh200000; b[k] = 12'sh800; end
      #1;
      s = 0; sh = 0.0; sm = 0.0; sb = 0.0; sabs = 0.0;
      for (int k = 0; k < 32; k++) begin
        s += longint'(a[k]) * longint'(b[k]);
        p = real'(a[k]) * real'(b[k]);
        sabs += (p < 0.0) ? -p : p;
        sh += p * wfun(1, k) * wfun(1, k);
        sm += p * wfun(2, k) * wfun(2, k);
        sb += p * wfun(3, k) * wfun(3, k);
      end
      checks++;
      if (longint'(e_rect) != s) begin failures++; $display("FAIL rect got %0d exp %0d", e_rect, s); end
      cmp_real("hann", e_hann, sh);
      cmp_real("hamming", e_hamm, sm);
      cmp_real("blackman", e_black, sb);
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
