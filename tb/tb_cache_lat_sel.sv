// tb_cache_lat_sel: self-checking testbench for the cache latency select.
//
// At full speed the core must see the nominal L1, L2 and DRAM latencies of
// 2, 12 and 100 cycles; with the core clock halved it must see 1, 6 and 50
// core cycles, the same time in nanoseconds. An instance with odd
// latencies checks that a fraction of a core cycle is rounded up.
module tb_cache_lat_sel;
  timeunit 1ns; timeprecision 1ps;

  logic       half_freq;
  logic [6:0] l1_lat, l2_lat, mem_lat;
  logic [6:0] o1, o2, o3;

  int checks = 0, failures = 0;

  cache_lat_sel dut (.half_freq, .l1_lat, .l2_lat, .mem_lat);
  cache_lat_sel #(.L1_LAT(3), .L2_LAT(13), .MEM_LAT(99)) dut_odd (
    .half_freq, .l1_lat(o1), .l2_lat(o2), .mem_lat(o3));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      half_freq = 1'b0;
      #1;
      chk(l1_lat == 2 && l2_lat == 12 && mem_lat == 100, "full-speed latencies");
      chk(o1 == 3 && o2 == 13 && o3 == 99, "full-speed odd latencies");
      half_freq = 1'b1;
      #1;
      chk(l1_lat == 1 && l2_lat == 6 && mem_lat == 50, "half-speed latencies");
      chk(o1 == 2 && o2 == 7 && o3 == 50, "half-speed latencies rounded up");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
