// cache_lat_sel: cache-interface logic that tells a core which of two
// latency sets to use for the caches and memory.
//
// The caches (including the shared L2) always run at the full chip clock,
// even when their core is throttled, so an access takes the same time in
// nanoseconds but fewer cycles of a slowed core clock. In full-speed mode
// the latencies are the nominal ones (L1 2, L2 12, DRAM 100 cycles); with
// the core clock divided by DIV each becomes ceil(latency / DIV) core
// cycles (1, 6 and 50 for the defaults). The core's scheduler uses these to
// time the wake-up of instructions that depend on loads. That caches are not
// slowed and the interface picks one of two latencies follows the design
// description; rounding up to whole core cycles is this design's choice.
//
// Timing: purely combinational from half_freq.
module cache_lat_sel
  import vsv_pkg::*;
#(
  parameter int unsigned L1_LAT  = L1_LAT_DEF,
  parameter int unsigned L2_LAT  = L2_LAT_DEF,
  parameter int unsigned MEM_LAT = MEM_LAT_DEF,
  parameter int unsigned DIV     = 2,
  localparam int unsigned LAT_W  = $clog2(MEM_LAT + 1)
) (
  input  logic             half_freq,
  output logic [LAT_W-1:0] l1_lat,   // in core cycles
  output logic [LAT_W-1:0] l2_lat,
  output logic [LAT_W-1:0] mem_lat
);

  localparam logic [LAT_W-1:0] L1_FULL  = LAT_W'(L1_LAT);
  localparam logic [LAT_W-1:0] L2_FULL  = LAT_W'(L2_LAT);
  localparam logic [LAT_W-1:0] MEM_FULL = LAT_W'(MEM_LAT);
  localparam logic [LAT_W-1:0] L1_SLOW  = LAT_W'(scaled_latency(L1_LAT, DIV));
  localparam logic [LAT_W-1:0] L2_SLOW  = LAT_W'(scaled_latency(L2_LAT, DIV));
  localparam logic [LAT_W-1:0] MEM_SLOW = LAT_W'(scaled_latency(MEM_LAT, DIV));

  assign l1_lat  = half_freq ? L1_SLOW  : L1_FULL;
  assign l2_lat  = half_freq ? L2_SLOW  : L2_FULL;
  assign mem_lat = half_freq ? MEM_SLOW : MEM_FULL;

endmodule
