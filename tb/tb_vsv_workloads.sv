// tb_vsv_workloads: runs the six four-program workload mixes at the three
// DVFS transition latencies (12 ns, 100 ns and 8.9 us, i.e. 36, 300 and
// 26700 cycles of a 3 GHz clock) on synthetic cores.
//
// Each program is reduced to its L2 miss rate per 1000 cycles (the rates of
// the SPEC CPU2000 programs measured without DVFS) and to how often it
// finds no work while one of its misses is pending (memory-bound programs
// 95%, balanced 60%, compute-bound 30%, a modelling choice). Every mix runs
// for RUN_CYCLES chip cycles on three copies of the design, one per
// latency. The testbench checks every stall length, that every
// memory-bound core gets throttled, that no core makes more transitions
// than its latency allows, that the time at half frequency covers all
// transitions, and prints the share of time each core spent at half
// frequency.
module tb_vsv_workloads;
  timeunit 1ns; timeprecision 1ps;

  localparam int RUN_CYCLES = 300000;
  localparam int NL = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  int miss_ppm [4], idle_pct [4];
  int cyc_low [NL][4], n_down [NL][4], n_miss [NL][4];
  int n_cycles [NL], e_checks [NL], e_errors [NL];

  int checks = 0, failures = 0;

  cmp_env #(.TRANS_CYCLES(36)) env12 (
    .clk, .rst_n, .miss_ppm, .idle_pct, .cyc_low(cyc_low[0]), .n_down(n_down[0]),
    .n_miss(n_miss[0]), .n_cycles(n_cycles[0]), .checks(e_checks[0]), .errors(e_errors[0]));
  cmp_env #(.TRANS_CYCLES(300)) env100 (
    .clk, .rst_n, .miss_ppm, .idle_pct, .cyc_low(cyc_low[1]), .n_down(n_down[1]),
    .n_miss(n_miss[1]), .n_cycles(n_cycles[1]), .checks(e_checks[1]), .errors(e_errors[1]));
  cmp_env #(.TRANS_CYCLES(26700)) env8900 (
    .clk, .rst_n, .miss_ppm, .idle_pct, .cyc_low(cyc_low[2]), .n_down(n_down[2]),
    .n_miss(n_miss[2]), .n_cycles(n_cycles[2]), .checks(e_checks[2]), .errors(e_errors[2]));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (6 * RUN_CYCLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // L2 misses per 1000 cycles (x10000) and class: 0 compute, 1 balanced, 2 memory.
  typedef struct { string name; int rate; int cls; } prog_t;
  function automatic prog_t prog(string n);
    case (n)
      "ammp":    return '{n, 81081, 2};
      "applu":   return '{n, 119820, 2};
      "apsi":    return '{n, 6400, 0};
      "art":     return '{n, 51089, 1};
      "bzip2":   return '{n, 16567, 1};
      "quake":   return '{n, 39249, 1};
      "gcc":     return '{n, 2444, 0};
      "mcf":     return '{n, 185145, 2};
      "mesa":    return '{n, 13061, 1};
      "mgrid":   return '{n, 48130, 1};
      "parser":  return '{n, 10515, 1};
      "swim":    return '{n, 151755, 2};
      "twolf":   return '{n, 464, 0};
      "vortex":  return '{n, 4884, 0};
      "vpr":     return '{n, 391, 0};
      "wupwise": return '{n, 18476, 1};
      default:   return '{n, 0, 0};
    endcase
  endfunction

  string mixes [6][5] = '{
    '{"agmt", "ammp", "gcc", "mesa", "twolf"},
    '{"apsv", "applu", "parser", "swim", "vortex"},
    '{"aaew", "apsi", "art", "quake", "wupwise"},
    '{"benm", "bzip2", "quake", "mesa", "mgrid"},
    '{"sgav", "swim", "gcc", "apsi", "vortex"},
    '{"vamw", "vpr", "art", "mcf", "wupwise"}};

  initial begin
    int idle_of [3] = '{30, 60, 95};
    int trans [NL] = '{36, 300, 26700};
    for (int w = 0; w < 6; w++) begin
      rst_n = 0;
      for (int c = 0; c < 4; c++) begin
        prog_t p;
        p = prog(mixes[w][c + 1]);
        miss_ppm[c] = p.rate / 10;     // per million cycles
        idle_pct[c] = idle_of[p.cls];
      end
      repeat (4) @(posedge clk);
      @(negedge clk) rst_n = 1;
      repeat (RUN_CYCLES) @(posedge clk);
      #0.5;
      for (int l = 0; l < NL; l++) begin
        chk(e_errors[l] == 0, $sformatf("%s latency %0d stall lengths", mixes[w][0], l));
        chk(n_cycles[l] == RUN_CYCLES, $sformatf("cycle count %0d", n_cycles[l]));
      end
      for (int c = 0; c < 4; c++) begin
        if (prog(mixes[w][c + 1]).cls == 2) chk(n_down[0][c] > 0, $sformatf("%s core%0d throttled", mixes[w][0], c));
        for (int l = 0; l < NL; l++) begin
          // A round trip takes at least two transitions, and the time at
          // half frequency includes every transition to low power.
          chk(n_down[l][c] <= RUN_CYCLES / (2 * trans[l]) + 1,
              $sformatf("%s core%0d transitions bounded by latency", mixes[w][0], c));
          chk(cyc_low[l][c] >= n_down[l][c] * trans[l],
              $sformatf("%s core%0d low time covers transitions", mixes[w][0], c));
        end
      end
      $display("%s: %% of time at half frequency, cores 0..3 (12ns | 100ns | 8.9us)", mixes[w][0]);
      for (int c = 0; c < 4; c++)
        $display("  %-8s misses/1000cyc=%8.4f  %3d%% | %3d%% | %3d%%   transitions %0d | %0d | %0d",
                 mixes[w][c + 1], real'(prog(mixes[w][c + 1]).rate) / 10000.0,
                 100 * cyc_low[0][c] / RUN_CYCLES, 100 * cyc_low[1][c] / RUN_CYCLES,
                 100 * cyc_low[2][c] / RUN_CYCLES, n_down[0][c], n_down[1][c], n_down[2][c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
