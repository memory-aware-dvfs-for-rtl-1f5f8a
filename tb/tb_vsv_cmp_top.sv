// tb_vsv_cmp_top: end-to-end testbench of the quad-core multicore VSV
// control at its default size (4 cores, 64 L2 MSHRs, 12 ns = 36-cycle DVFS
// transitions, 10-cycle window, 3-cycle idle threshold).
//
// Around the design the testbench models what it connects to: four cores
// with different behaviour (core 0 memory bound and idle while it waits for
// its own misses, core 1 compute bound, core 2 balanced, core 3 memory
// bound with some work left during misses), the shared L2's miss requests
// (one per chip cycle, addresses mostly private to a core with a small
// shared pool so that other cores' secondary misses merge), and main memory
// returning each primary miss 100 chip cycles later. A burst phase issues
// misses faster than memory returns them so the MSHR file fills up; a final
// drain phase lets every core run at full issue so that all of them return
// to full speed.
//
// Checks: each core leaves state A exactly on the first core cycle after a
// primary miss of its own and leaves C exactly on the first core cycle after
// a return of its own (so attribution through the MSHRs is exact); every
// stall lasts 36 chip cycles; core cycles come every cycle at full speed and
// every second cycle at half speed; low voltage is never applied at full
// clock; the latencies follow the clock mode; at the end all MSHRs are free
// and every core is in A at full speed. Each mechanism (the six FSM
// transitions, a miss restarting the window, an event held between core
// cycles, secondary merge, MSHR full, down and up transitions, half-rate
// running) is counted and must occur.
module tb_vsv_cmp_top;
  timeunit 1ns; timeprecision 1ps;
  import vsv_pkg::*;

  localparam int unsigned NC      = 4;
  localparam int unsigned NM      = 64;
  localparam int unsigned TRANS   = 36;   // 12 ns at 3 GHz
  localparam int unsigned MEM_LAT = 100;  // DRAM latency, chip cycles

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0][2:0]    issue_cnt;
  logic                  miss_valid;
  logic [BLK_ADDR_W-1:0] miss_addr;
  logic [2:0]            miss_l1;
  logic                  miss_ready, miss_primary;
  logic [5:0]            miss_idx;
  logic                  fill_valid;
  logic [5:0]            fill_idx;
  logic [6:0]            mshr_busy;
  logic [NC-1:0]         core_ce, stall, half_freq, vdd_low;
  vsv_state_t            vsv_state [NC];
  dvfs_mode_t            dvfs_mode [NC];
  logic [NC-1:0][6:0]    l1_lat, l2_lat, mem_lat;

  vsv_cmp_top dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- environment state ----------------
  int unsigned now = 0;
  int          owner [NM];          // core that allocated each entry, -1 free
  int          own_cnt [NC];        // outstanding primary misses per core
  int          mq_idx [$];          // memory return queue
  int unsigned mq_due [$];
  bit          req_pend;            // a miss request is being held
  int          phase = 0;           // 0 random, 1 burst, 2 drain

  // expected-event bookkeeping for the A and C checks
  bit ev_miss [NC], ev_ret [NC], pend_miss [NC], pend_ret [NC];
  int stall_len [NC];

  // mechanism counters
  int n_ab, n_ba, n_bc, n_cd, n_da, n_dc, n_restart, n_held;
  int n_secondary, n_full, n_down, n_up, n_half_cycles;

  function automatic bit wants_issue(int c);
    int p;
    case (c)
      0: p = (own_cnt[0] > 0) ? 0 : 85;
      1: p = 90;
      2: p = (own_cnt[2] > 0) ? 45 : 70;
      default: p = (own_cnt[3] > 0) ? 20 : 80;
    endcase
    if (phase == 2) p = 100;
    return ($urandom % 100) < p;
  endfunction

  function automatic bit wants_miss(int c);
    int p;   // per mille per core cycle
    case (c)
      0: p = 25;
      1: p = 4;
      2: p = 10;
      default: p = 30;
    endcase
    if (phase == 1) p = 600;
    if (phase == 2) p = 0;
    return ($urandom % 1000) < p;
  endfunction

  initial begin
    vsv_state_t ps [NC];
    logic [NC-1:0] pce;
    bit acc, prim;
    int acc_core, acc_idx, fill_core, fill_i;
    int unsigned total = 0;

    issue_cnt = '0; miss_valid = 0; miss_addr = '0; miss_l1 = '0;
    fill_valid = 0; fill_idx = '0; req_pend = 0;
    foreach (owner[i]) owner[i] = -1;
    for (int c = 0; c < NC; c++) begin
      own_cnt[c] = 0; ev_miss[c] = 0; ev_ret[c] = 0;
      pend_miss[c] = 0; pend_ret[c] = 0; stall_len[c] = 0;
    end
    {n_ab, n_ba, n_bc, n_cd, n_da, n_dc, n_restart, n_held} = '0;
    {n_secondary, n_full, n_down, n_up, n_half_cycles} = '0;

    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int cyc = 0; cyc < 260000; cyc++) begin
      phase = (cyc < 200000) ? 0 : (cyc < 200600) ? 1 : 2;
      // ---- drive inputs for this cycle ----
      for (int c = 0; c < NC; c++)
        issue_cnt[c] = wants_issue(c) ? 3'(1 + $urandom % 4) : 3'd0;
      if (!req_pend) begin
        int start, c;
        miss_valid = 0;
        start = $urandom % NC;
        for (int k = 0; k < NC; k++) begin
          c = (start + k) % NC;
          if (!miss_valid && core_ce[c] && wants_miss(c)) begin
            miss_valid = 1;
            miss_l1    = 3'(2 * c + ($urandom % 2));
            if (($urandom % 100) < 6) miss_addr = BLK_ADDR_W'(24'hF0000 + $urandom % 4);
            else miss_addr = BLK_ADDR_W'((c << 16) | ($urandom % 65536));
          end
        end
      end
      fill_valid = 0;
      if (mq_due.size() > 0 && mq_due[0] <= now) begin
        fill_valid = 1;
        fill_idx   = 6'(mq_idx[0]);
      end
      #0.5;
      // ---- sample before the edge ----
      pce = core_ce;
      for (int c = 0; c < NC; c++) ps[c] = vsv_state[c];
      acc  = miss_valid && miss_ready;
      prim = miss_primary;
      acc_idx  = int'(miss_idx);
      acc_core = int'(miss_l1) / 2;
      if (miss_valid && !miss_ready) n_full++;
      for (int c = 0; c < NC; c++) begin
        chk(!(vdd_low[c] && !half_freq[c]), "low voltage at full clock");
        chk(l2_lat[c] == (half_freq[c] ? 7'd6 : 7'd12), "L2 latency select");
        chk(l1_lat[c] == (half_freq[c] ? 7'd1 : 7'd2), "L1 latency select");
        if (stall[c]) chk(!core_ce[c], "no core cycle while stalled");
        else if (!half_freq[c]) chk(core_ce[c], "core cycle every chip cycle");
        if (half_freq[c] && !stall[c] && core_ce[c]) n_half_cycles++;
        if ((ev_miss[c] || ev_ret[c]) && !core_ce[c]) n_held++;
      end
      fill_core = -1;
      if (fill_valid) begin
        fill_i = mq_idx.pop_front();
        void'(mq_due.pop_front());
        fill_core = owner[fill_i];
        owner[fill_i] = -1;
        own_cnt[fill_core]--;
      end
      @(posedge clk);
      now++;
      #0.2;
      // ---- bookkeeping after the edge ----
      req_pend = miss_valid && !acc;
      if (acc && prim) begin
        owner[acc_idx] = acc_core;
        own_cnt[acc_core]++;
        mq_idx.push_back(acc_idx);
        mq_due.push_back(now + MEM_LAT);
        total++;
      end
      if (acc && !prim) n_secondary++;
      if (acc) miss_valid = 0;
      for (int c = 0; c < NC; c++) begin
        bit m, r;
        m = ev_miss[c] | pend_miss[c];
        r = ev_ret[c]  | pend_ret[c];
        if (pce[c]) begin
          // A and C react to the first core cycle that sees their event.
          if (ps[c] == VSV_A) chk(vsv_state[c] == (m ? VSV_B : VSV_A),
                                  $sformatf("core%0d A exit on own miss", c));
          if (ps[c] == VSV_C) chk(vsv_state[c] == (r ? VSV_D : VSV_C),
                                  $sformatf("core%0d C exit on own return", c));
          if (ps[c] == VSV_B && m) begin
            chk(vsv_state[c] == VSV_B, "miss in B keeps B");
            n_restart++;
          end
          pend_miss[c] = 0; pend_ret[c] = 0;
        end else begin
          chk(vsv_state[c] == ps[c], "state frozen between core cycles");
          pend_miss[c] |= ev_miss[c];
          pend_ret[c]  |= ev_ret[c];
        end
        case ({ps[c], vsv_state[c]})
          {VSV_A, VSV_B}: n_ab++;
          {VSV_B, VSV_A}: n_ba++;
          {VSV_B, VSV_C}: n_bc++;
          {VSV_C, VSV_D}: n_cd++;
          {VSV_D, VSV_A}: n_da++;
          {VSV_D, VSV_C}: n_dc++;
          default: ;
        endcase
        // events visible during the coming cycle
        ev_miss[c] = acc && prim && acc_core == c;
        ev_ret[c]  = fill_core == c;
        // stall length
        if (stall[c]) stall_len[c]++;
        else if (stall_len[c] != 0) begin
          chk(stall_len[c] == TRANS, $sformatf("stall length %0d", stall_len[c]));
          if (half_freq[c]) n_down++; else n_up++;
          stall_len[c] = 0;
        end
      end
    end

    // ---- end state ----
    repeat (200) @(posedge clk);
    chk(mshr_busy == 0, "all MSHRs free at the end");
    for (int c = 0; c < NC; c++) begin
      chk(vsv_state[c] == VSV_A, $sformatf("core%0d back in A", c));
      chk(dvfs_mode[c] == DV_FULL && !half_freq[c] && !vdd_low[c],
          $sformatf("core%0d back at full speed", c));
    end

    $display("primary misses=%0d secondary=%0d mshr-full cycles=%0d", total, n_secondary, n_full);
    $display("A->B=%0d B->A=%0d B->C=%0d C->D=%0d D->A=%0d D->C=%0d restart=%0d held=%0d",
             n_ab, n_ba, n_bc, n_cd, n_da, n_dc, n_restart, n_held);
    $display("down=%0d up=%0d half-rate core cycles=%0d", n_down, n_up, n_half_cycles);
    chk(n_ab > 0, "A->B happened");       chk(n_ba > 0, "B->A happened");
    chk(n_bc > 0, "B->C happened");       chk(n_cd > 0, "C->D happened");
    chk(n_da > 0, "D->A happened");       chk(n_dc > 0, "D->C happened");
    chk(n_restart > 0, "window restart happened");
    chk(n_held > 0, "held event happened");
    chk(n_secondary > 0, "secondary merge happened");
    chk(n_full > 0, "MSHR full happened");
    chk(n_down > 0 && n_up > 0, "DVFS transitions happened");
    chk(n_half_cycles > 0, "half-rate running happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
