// vsv_cmp_top: memory-aware per-core DVFS (multicore VSV) for a chip
// multiprocessor whose cores share one L2 cache.
//
// The idea: while a core waits for an L2 miss and its issue window has run
// dry, it burns power doing nothing, so it can run at half frequency and at
// the lower supply VDD_L. Each core has a VSV state machine (vsv_fsm) that
// watches its own L2 misses, miss returns and issue activity. Because the L2
// is shared, its MSHR file (l2_mshr_file) keeps the originating L1 of each
// primary miss and routes miss and return events to the right core. The
// state machines' decisions go to one consolidated DVFS controller
// (dvfs_ctrl) that switches each core's regulator select and clock divider
// and stalls the core during the transition. Per core, core_clk_div turns
// the chip clock into the core's clock enable (every cycle at full speed,
// every second cycle in low-power mode, none while stalled), and
// cache_lat_sel gives the latencies the core must assume for the caches,
// which are never slowed. The per-core state machine runs on the core clock
// enable, as it sits in the core.
//
// Interface: clk is the full-speed chip clock (3 GHz in the baseline);
// rst_n is an asynchronous active-low reset. issue_cnt is each core's number
// of instructions issued in its current core cycle. The miss_* and fill_*
// ports connect the shared L2 (miss requests with block address and L1
// index = 2*core + 0/1 for IL1/DL1) and main memory (fills by MSHR entry).
// vdd_low goes to each core's on-chip voltage regulator; core_ce, stall and
// the latency outputs go to each core. All outputs except the MSHR lookup
// results and core_ce are registered.
module vsv_cmp_top
  import vsv_pkg::*;
#(
  parameter int unsigned NUM_CORES    = NUM_CORES_DEF,
  parameter int unsigned NUM_MSHR     = NUM_MSHR_DEF,
  parameter int unsigned TRANS_CYCLES = TRANS_CYC_DEF,
  parameter int unsigned WINDOW       = VSV_WINDOW_DEF,
  parameter int unsigned THRESH       = VSV_THRESH_DEF,
  localparam int unsigned ISS_W       = $clog2(ISSUE_WIDTH + 1),
  localparam int unsigned L1_W        = $clog2(2 * NUM_CORES),
  localparam int unsigned IDX_W       = $clog2(NUM_MSHR),
  localparam int unsigned LAT_W       = $clog2(MEM_LAT_DEF + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // issue-window activity of each core
  input  logic [NUM_CORES-1:0][ISS_W-1:0]  issue_cnt,
  // shared L2: miss requests
  input  logic                             miss_valid,
  input  logic [BLK_ADDR_W-1:0]            miss_addr,
  input  logic [L1_W-1:0]                  miss_l1,
  output logic                             miss_ready,
  output logic                             miss_primary,
  output logic [IDX_W-1:0]                 miss_idx,
  // main memory fills
  input  logic                             fill_valid,
  input  logic [IDX_W-1:0]                 fill_idx,
  output logic [IDX_W:0]                   mshr_busy,
  // per-core DVFS state
  output logic [NUM_CORES-1:0]             core_ce,
  output logic [NUM_CORES-1:0]             stall,
  output logic [NUM_CORES-1:0]             half_freq,
  output logic [NUM_CORES-1:0]             vdd_low,
  output vsv_state_t                       vsv_state [NUM_CORES],
  output dvfs_mode_t                       dvfs_mode [NUM_CORES],
  // per-core cache latencies, in core cycles
  output logic [NUM_CORES-1:0][LAT_W-1:0]  l1_lat,
  output logic [NUM_CORES-1:0][LAT_W-1:0]  l2_lat,
  output logic [NUM_CORES-1:0][LAT_W-1:0]  mem_lat
);

  logic [NUM_CORES-1:0] core_miss, core_ret, dvfs_req;

  l2_mshr_file #(
    .NUM_MSHR  (NUM_MSHR),
    .NUM_CORES (NUM_CORES),
    .ADDR_W    (BLK_ADDR_W)
  ) u_mshr (
    .clk, .rst_n,
    .miss_valid, .miss_addr, .miss_l1, .miss_ready, .miss_primary, .miss_idx,
    .fill_valid, .fill_idx,
    .core_miss, .core_ret,
    .num_busy (mshr_busy)
  );

  dvfs_ctrl #(
    .NUM_CORES    (NUM_CORES),
    .TRANS_CYCLES (TRANS_CYCLES)
  ) u_dvfs (
    .clk, .rst_n,
    .req (dvfs_req),
    .vdd_low, .half_freq, .stall,
    .mode (dvfs_mode)
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    core_clk_div #(.DIV(2)) u_div (
      .clk, .rst_n,
      .half_freq (half_freq[c]),
      .stall     (stall[c]),
      .ce        (core_ce[c])
    );

    vsv_fsm #(.WINDOW(WINDOW), .THRESH(THRESH)) u_fsm (
      .clk, .rst_n,
      .ce       (core_ce[c]),
      .issue    (issue_cnt[c] != '0),
      .l2_miss  (core_miss[c]),
      .l2_ret   (core_ret[c]),
      .dvfs_req (dvfs_req[c]),
      .state    (vsv_state[c])
    );

    cache_lat_sel #(.DIV(2)) u_lat (
      .half_freq (half_freq[c]),
      .l1_lat    (l1_lat[c]),
      .l2_lat    (l2_lat[c]),
      .mem_lat   (mem_lat[c])
    );
  end

endmodule
