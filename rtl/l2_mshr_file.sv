// l2_mshr_file: miss status holding registers of the shared L2 cache, with
// the originating-L1 pointer that lets per-core DVFS see its own L2 misses.
//
// Each entry holds a block address and, for the primary miss that allocated
// it, the index of the L1 cache that sent the request. Because every L1
// belongs to exactly one core (L1 index = 2*core + 0 for the IL1, +1 for the
// DL1), the pointer names the core that caused the miss. A miss request is
// compared with all valid entries: a match is a secondary miss and is merged
// without a new entry or event; otherwise the lowest free entry is allocated
// and a one-cycle core_miss pulse goes to the requesting core. When DRAM
// returns the data for an entry (fill, addressed by the entry number that
// tagged the memory request) the entry is freed and a core_ret pulse goes to
// the core whose L1 allocated it. That the MSHRs hold the originating-L1
// pointer and that there are 64 of them follows the design description; the
// fully associative address compare, lowest-free allocation, the L1
// numbering and fill-by-index are this design's choices.
//
// NUM_CORES must be a power of two, at least 2.
//
// Interface/timing: miss_valid/miss_ready is a valid/ready handshake;
// miss_ready is low only when no entry is free and the address misses in the
// file (a secondary miss is always accepted). miss_primary and miss_idx are
// combinational results for the request in the same cycle. A fill of a
// valid entry is taken every cycle it is offered. Events and entries update
// on the next clock edge.
module l2_mshr_file
  import vsv_pkg::*;
#(
  parameter int unsigned NUM_MSHR   = NUM_MSHR_DEF,
  parameter int unsigned NUM_CORES  = NUM_CORES_DEF,
  parameter int unsigned ADDR_W     = BLK_ADDR_W,
  localparam int unsigned L1_W      = $clog2(2 * NUM_CORES),
  localparam int unsigned IDX_W     = $clog2(NUM_MSHR),
  localparam int unsigned CORE_W    = L1_W - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // miss requests from the L2 tag lookup
  input  logic                  miss_valid,
  input  logic [ADDR_W-1:0]     miss_addr,     // block address
  input  logic [L1_W-1:0]       miss_l1,       // originating L1 cache
  output logic                  miss_ready,
  output logic                  miss_primary,  // request allocates a new entry
  output logic [IDX_W-1:0]      miss_idx,      // entry allocated or merged into
  // fills from main memory
  input  logic                  fill_valid,
  input  logic [IDX_W-1:0]      fill_idx,
  // per-core events
  output logic [NUM_CORES-1:0]  core_miss,
  output logic [NUM_CORES-1:0]  core_ret,
  output logic [IDX_W:0]        num_busy
);

  logic [NUM_MSHR-1:0]             vld_q;
  logic [NUM_MSHR-1:0][ADDR_W-1:0] addr_q;
  logic [NUM_MSHR-1:0][L1_W-1:0]   l1_q;

  // An L1 index names its core in all bits but the lowest.
  function automatic logic [CORE_W-1:0] core_of(logic [L1_W-1:0] l1);
    return CORE_W'(l1 >> 1);
  endfunction

  logic              hit, any_free;
  logic [IDX_W-1:0]  hit_idx, free_idx;
  logic              alloc, fill_ok;

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    any_free = 1'b0;
    free_idx = '0;
    for (int i = NUM_MSHR - 1; i >= 0; i--) begin
      if (vld_q[i] && addr_q[i] == miss_addr) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
      if (!vld_q[i]) begin
        any_free = 1'b1;
        free_idx = IDX_W'(i);
      end
    end
  end

  assign miss_ready   = hit | any_free;
  assign miss_primary = !hit;
  assign miss_idx     = hit ? hit_idx : free_idx;
  assign alloc        = miss_valid && !hit && any_free;
  assign fill_ok      = fill_valid && vld_q[fill_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q     <= '0;
      core_miss <= '0;
      core_ret  <= '0;
    end else begin
      core_miss <= '0;
      core_ret  <= '0;
      if (fill_ok) begin
        vld_q[fill_idx] <= 1'b0;
        core_ret[core_of(l1_q[fill_idx])] <= 1'b1;
      end
      if (alloc) begin
        vld_q[free_idx] <= 1'b1;
        core_miss[core_of(miss_l1)] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      addr_q[free_idx] <= miss_addr;
      l1_q[free_idx]   <= miss_l1;
    end
  end

  always_comb begin
    num_busy = '0;
    for (int i = 0; i < NUM_MSHR; i++) num_busy += (IDX_W + 1)'(vld_q[i]);
  end

  // A fill must name an entry that is waiting for data.
  a_fill_valid: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> vld_q[fill_idx]);
  // The requester must hold a miss until it is accepted.
  a_miss_hold: assert property (@(posedge clk) disable iff (!rst_n)
    miss_valid && !miss_ready |=> miss_valid);

endmodule
