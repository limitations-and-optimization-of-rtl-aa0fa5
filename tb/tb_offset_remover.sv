// Testbench of offset_remover. A 12-bit sine of amplitude 1000 LSB with a
// DC offset of +150 LSB (later -90 LSB) is applied. With en high the offset
// estimate must settle within 2 LSB of the applied offset and the output
// average over whole periods must be within 2 LSB of zero; the output must
// equal input minus estimate with one cycle of latency. With en low the
// output must equal the input delayed by one cycle.
`timescale 1ns/1ps
module tb_offset_remover;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam real PI = 3.14159265358979323846;

  logic               en, xv, yv;
  logic signed [11:0] x, y, ofs;

  offset_remover #(.DATA_W(12), .AVG_SHIFT(8)) dut (
    .clk, .rst_n, .en, .x_valid(xv), .x, .y_valid(yv), .y, .offset(ofs));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int dc, bit ena, int n);
    logic signed [11:0] xp, op;
    real acc;
    int  cnt;
    acc = 0.0; cnt = 0;
    en = ena;
    for (int t = 0; t < n; t++) begin
      x  = 12'(dc + $rtoi(1000.0 * $sin(2.0 * PI * real'(t) / 64.0)));
      xv = 1'b1;
      xp = x; op = ofs;
      @(posedge clk); #1;
      check(yv == 1'b1, "y_valid");
      if (ena) check(y == xp - op, $sformatf("y=%0d x=%0d ofs=%0d", y, xp, op));
      else     check(y == xp, "bypass");
      if (t >= n - 1024) begin acc += real'(y); cnt++; end
    end
    if (ena) begin
      check(int'(ofs) >= dc - 2 && int'(ofs) <= dc + 2, $sformatf("offset estimate %0d for %0d", ofs, dc));
      check(acc / cnt > -2.0 && acc / cnt < 2.0, $sformatf("output mean %f", acc / cnt));
    end
  endtask

  initial begin
    en = 0; xv = 0; x = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(150, 1'b0, 200);
    run(150, 1'b1, 6000);
    run(-90, 1'b1, 6000);
    run(-90, 1'b0, 200);
    xv = 0;
    @(posedge clk); #1;
    check(yv == 1'b0, "y_valid low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
