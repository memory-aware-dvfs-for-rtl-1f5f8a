// tb_dvfs_ctrl: self-checking testbench for the consolidated DVFS
// controller.
//
// Each of the four cores gets its own random request pattern, held for
// random lengths, some shorter than a transition. For every core the
// testbench measures each stall and checks that it lasts exactly
// TRANS_CYCLES cycles, that it begins the cycle after the request differs
// from the settled operating point, that the voltage select never shows
// VDD_L while the clock is at full speed, and that after each transition
// the operating point matches the direction taken. It runs once with the
// 12 ns latency (36 cycles); a second instance uses a short latency.
module tb_dvfs_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import vsv_pkg::*;

  localparam int unsigned NC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0] req;
  logic [NC-1:0] vdd_low, half_freq, stall;
  dvfs_mode_t    mode [NC];
  logic [NC-1:0] vdd_low2, half_freq2, stall2;
  dvfs_mode_t    mode2 [NC];

  int checks = 0, failures = 0;

  dvfs_ctrl #(.NUM_CORES(NC)) dut (
    .clk, .rst_n, .req, .vdd_low, .half_freq, .stall, .mode);
  dvfs_ctrl #(.NUM_CORES(NC), .TRANS_CYCLES(1)) dut_fast (
    .clk, .rst_n, .req, .vdd_low(vdd_low2), .half_freq(half_freq2),
    .stall(stall2), .mode(mode2));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
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

  // Reference per core and per instance: settled point (0 full, 1 low),
  // transition target and remaining stall cycles.
  typedef struct {
    bit low;
    bit target;
    int left;
  } ref_t;

  ref_t r1 [NC], r2 [NC];
  int   n_down = 0, n_up = 0;

  task automatic ref_step(ref ref_t r, input bit rq, input int lat,
                         output bit dn, output bit up);
    dn = 0; up = 0;
    if (r.left > 0) begin
      r.left--;
      if (r.left == 0) r.low = r.target;
    end else if (rq != r.low) begin
      r.target = rq;
      r.left   = lat;
      if (rq) dn = 1; else up = 1;
    end
  endtask

  task automatic check_core(ref_t r, bit v, bit h, bit s, string tag);
    bit exp_s, exp_h, exp_v;
    exp_s = r.left > 0;
    exp_h = exp_s ? 1'b1 : r.low;
    exp_v = exp_s ? r.target : r.low;
    chk(s == exp_s, {tag, " stall"});
    chk(h == exp_h, {tag, " half_freq"});
    chk(v == exp_v, {tag, " vdd_low"});
    chk(!(v && !h), {tag, " low voltage at full clock"});
  endtask

  int hold [NC];

  initial begin
    req = '0;
    foreach (r1[c]) begin r1[c] = '{0, 0, 0}; r2[c] = '{0, 0, 0}; hold[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100000; t++) begin
      bit dn, up;
      for (int c = 0; c < NC; c++) begin
        if (hold[c] == 0) begin
          req[c]  <= ~req[c];
          hold[c] = 1 + $urandom % ((c == 0) ? 20 : 120);
        end else hold[c]--;
      end
      @(posedge clk);
      for (int c = 0; c < NC; c++) begin
        ref_step(r1[c], req[c], TRANS_CYC_DEF, dn, up);
        n_down += dn; n_up += up;
        ref_step(r2[c], req[c], 1, dn, up);
      end
      #0.5;
      for (int c = 0; c < NC; c++) begin
        check_core(r1[c], vdd_low[c], half_freq[c], stall[c], $sformatf("core%0d", c));
        check_core(r2[c], vdd_low2[c], half_freq2[c], stall2[c], $sformatf("fast core%0d", c));
      end
    end
    chk(n_down > 100 && n_up > 100, "transitions exercised");
    $display("down=%0d up=%0d", n_down, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
