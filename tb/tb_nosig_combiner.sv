// Testbench of nosig_combiner: D_nosig = D_cal - 2*D_cal2 on random and
// extreme 20-bit operands, compared with 64-bit integer arithmetic. Also
// checks that a pure linear signal (D_cal = 2*D_cal2) cancels to zero.
`timescale 1ns/1ps
module tb_nosig_combiner;
  int checks = 0, failures = 0;
  logic signed [19:0] a, b;
  logic signed [21:0] y;

  nosig_combiner #(.W(20)) dut (.d_cal(a), .d_cal2(b), .d_nosig(y));

  task automatic one(longint av, longint bv);
    a = 20'(av); b = 20'(bv);
    #1;
    checks++;
    if (longint'(y) != longint'(a) - 2 * longint'(b)) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d", a, b, y);
    end
  endtask

  initial begin
    one(-524288, 524287);
    one(524287, -524288);
    one(0, 0);
    for (int i = 0; i < 2000; i++) one($signed($urandom) % 524288, $signed($urandom) % 524288);
    for (int i = 0; i < 200; i++) begin
      longint h;
      h = $signed($urandom) % 262144;
      one(2 * h, h);
      checks++;
      if (y != 0) failures++;
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
