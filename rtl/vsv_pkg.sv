// vsv_pkg: types and constants shared by the multicore VSV (variable supply
// voltage) DVFS control logic.
//
// The numbers come from the baseline quad-core configuration: 4 cores, a
// 3 GHz chip clock that is halved in low-power mode, 64 L2 MSHRs, 1 GB of
// DRAM, a 12-cycle L2, 2-cycle L1s, 100-cycle DRAM, a 4-way issue width and
// a 12 ns DVFS transition (36 cycles of the 3 GHz clock). The FSM window of
// 10 cycles and the idle threshold of 3 cycles are also from the baseline.
// The 64-byte cache block (and so the block-address width) is this design's
// own choice.
package vsv_pkg;

  localparam int unsigned NUM_CORES_DEF  = 4;
  localparam int unsigned NUM_MSHR_DEF   = 64;
  localparam int unsigned ISSUE_WIDTH    = 4;     // 4-way issue
  localparam int unsigned PADDR_W        = 30;    // 1 GB physical memory
  localparam int unsigned BLK_OFF_W      = 6;     // 64-byte block (assumed)
  localparam int unsigned BLK_ADDR_W     = PADDR_W - BLK_OFF_W;

  localparam int unsigned CLK_MHZ        = 3000;  // full chip frequency
  localparam int unsigned TRANS_NS_DEF   = 12;    // DVFS transition latency
  localparam int unsigned TRANS_CYC_DEF  = TRANS_NS_DEF * CLK_MHZ / 1000;

  localparam int unsigned VSV_WINDOW_DEF = 10;    // ILP observation window
  localparam int unsigned VSV_THRESH_DEF = 3;     // idle-cycle threshold

  localparam int unsigned L1_LAT_DEF     = 2;     // IL1/DL1 latency, full-speed cycles
  localparam int unsigned L2_LAT_DEF     = 12;    // L2 latency, full-speed cycles
  localparam int unsigned MEM_LAT_DEF    = 100;   // DRAM latency, full-speed cycles

  // States of the per-core VSV FSM. A and B run at full speed, C and D with
  // DVFS engaged.
  typedef enum logic [1:0] {
    VSV_A = 2'd0,   // idle, waiting for an L2 miss
    VSV_B = 2'd1,   // miss seen, watching ILP before engaging DVFS
    VSV_C = 2'd2,   // low ILP, DVFS engaged, waiting for a miss return
    VSV_D = 2'd3    // miss returned, watching ILP before disengaging DVFS
  } vsv_state_t;

  // Operating point of one core as sequenced by the DVFS controller.
  typedef enum logic [1:0] {
    DV_FULL    = 2'd0,  // VDD, full frequency
    DV_TO_LOW  = 2'd1,  // stalled, voltage falling
    DV_LOW     = 2'd2,  // VDD_L, half frequency
    DV_TO_FULL = 2'd3   // stalled, voltage rising
  } dvfs_mode_t;

  // Number of slower-clock cycles that cover a latency given in full-speed
  // cycles when the core clock is divided by div.
  function automatic int unsigned scaled_latency(int unsigned full_cycles,
                                                 int unsigned div);
    return (full_cycles + div - 1) / div;
  endfunction

endpackage
