// tb_core_clk_div: self-checking testbench for the per-core clock divider.
//
// Checks that every chip-clock cycle is a core cycle at full frequency,
// that exactly every second one is at half frequency (counting core cycles
// over long stretches and checking the spacing between them), that no core
// cycle is given while stalled, and that the first core cycle after a stall
// comes at once. A DIV=3 instance checks the general ratio.
module tb_core_clk_div;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  logic half_freq, stall, ce, ce3;

  int checks = 0, failures = 0;

  core_clk_div dut (.clk, .rst_n, .half_freq, .stall, .ce);
  core_clk_div #(.DIV(3)) dut3 (.clk, .rst_n, .half_freq, .stall, .ce(ce3));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Run n cycles in one setting; return core cycles seen by both instances.
  // Checks, cycle by cycle, the spacing expected for that setting.
  task automatic run(bit h, bit s, int n, output int cnt2, output int cnt3);
    half_freq <= h; stall <= s;
    cnt2 = 0; cnt3 = 0;
    for (int i = 0; i < n; i++) begin
      #0.5;
      if (s) begin
        chk(!ce && !ce3, "no core cycle while stalled");
      end else if (!h) begin
        chk(ce && ce3, "every cycle at full speed");
      end else begin
        chk(ce == (i % 2 == 0), "half rate spacing");
        chk(ce3 == (i % 3 == 0), "third rate spacing");
      end
      cnt2 += ce; cnt3 += ce3;
      @(posedge clk);
    end
  endtask

  initial begin
    int a, b;
    half_freq = 0; stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      run(0, 0, 30, a, b);
      chk(a == 30 && b == 30, "full rate count");
      run(1, 1, 7 + k % 5, a, b);
      chk(a == 0, "stall count");
      run(1, 0, 60 + k % 7, a, b);
      chk(a == (60 + k % 7 + 1) / 2, "half rate count");
      chk(b == (60 + k % 7 + 2) / 3, "third rate count");
      run(1, 1, 5, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
