// tb_l2_mshr_file: self-checking testbench for the L2 MSHR file with
// originating-L1 pointers.
//
// The testbench keeps its own list of outstanding block addresses and the
// L1 that first missed on each. Random misses (from a small address pool,
// so that secondary misses are common) and random fills of outstanding
// entries are driven; for every request it checks primary/secondary,
// acceptance, the entry used, and on the next cycle that exactly the
// requesting core (for a primary miss) and the allocating core (for a fill)
// see a one-cycle event. It also fills the file completely to check that a
// new address is refused while a secondary miss is still merged.
module tb_l2_mshr_file;
  timeunit 1ns; timeprecision 1ps;
  import vsv_pkg::*;

  localparam int unsigned NUM_MSHR  = 64;
  localparam int unsigned NUM_CORES = 4;
  localparam int unsigned ADDR_W    = BLK_ADDR_W;
  localparam int unsigned L1_W      = 3;
  localparam int unsigned IDX_W     = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                 miss_valid;
  logic [ADDR_W-1:0]    miss_addr;
  logic [L1_W-1:0]      miss_l1;
  logic                 miss_ready, miss_primary;
  logic [IDX_W-1:0]     miss_idx;
  logic                 fill_valid;
  logic [IDX_W-1:0]     fill_idx;
  logic [NUM_CORES-1:0] core_miss, core_ret;
  logic [IDX_W:0]       num_busy;

  int checks = 0, failures = 0;

  l2_mshr_file #(.NUM_MSHR(NUM_MSHR), .NUM_CORES(NUM_CORES), .ADDR_W(ADDR_W)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: per entry, valid flag, address and allocating L1.
  bit            r_vld  [NUM_MSHR];
  int unsigned   r_addr [NUM_MSHR];
  int unsigned   r_l1   [NUM_MSHR];
  int unsigned   n_primary = 0, n_secondary = 0, n_full = 0, n_fill = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int find_addr(int unsigned a);
    for (int i = 0; i < NUM_MSHR; i++) if (r_vld[i] && r_addr[i] == a) return i;
    return -1;
  endfunction

  function automatic int find_free();
    for (int i = 0; i < NUM_MSHR; i++) if (!r_vld[i]) return i;
    return -1;
  endfunction

  function automatic int count_busy();
    int n = 0;
    for (int i = 0; i < NUM_MSHR; i++) n += r_vld[i];
    return n;
  endfunction

  // One clock with an optional miss and an optional fill.
  task automatic step(bit do_miss, int unsigned a, int unsigned l1,
                      bit do_fill, int unsigned fi);
    int hit, fr;
    logic [NUM_CORES-1:0] exp_miss, exp_ret;
    miss_valid <= do_miss; miss_addr <= ADDR_W'(a); miss_l1 <= L1_W'(l1);
    fill_valid <= do_fill; fill_idx <= IDX_W'(fi);
    #0.5;
    exp_miss = '0; exp_ret = '0;
    hit = find_addr(a); fr = find_free();
    if (do_miss) begin
      chk(miss_primary == (hit < 0), "primary/secondary");
      chk(miss_ready == (hit >= 0 || fr >= 0), "ready");
      if (hit >= 0) begin
        chk(int'(miss_idx) == hit, "merge index");
        n_secondary++;
      end else if (fr >= 0) begin
        chk(int'(miss_idx) == fr, "allocate index");
        n_primary++;
      end else n_full++;
    end
    chk(int'(num_busy) == count_busy(), "busy count");
    @(posedge clk);
    if (do_fill) begin
      exp_ret[r_l1[fi] / 2] = 1'b1;
      r_vld[fi] = 0;
      n_fill++;
    end
    if (do_miss && hit < 0 && fr >= 0) begin
      r_vld[fr] = 1; r_addr[fr] = a; r_l1[fr] = l1;
      exp_miss[l1 / 2] = 1'b1;
    end
    #0.5;
    chk(core_miss == exp_miss, $sformatf("core_miss %b exp %b", core_miss, exp_miss));
    chk(core_ret  == exp_ret,  $sformatf("core_ret %b exp %b",  core_ret,  exp_ret));
  endtask

  function automatic int pick_valid();
    int start = $urandom % NUM_MSHR;
    for (int k = 0; k < NUM_MSHR; k++)
      if (r_vld[(start + k) % NUM_MSHR]) return (start + k) % NUM_MSHR;
    return -1;
  endfunction

  initial begin
    miss_valid = 0; miss_addr = '0; miss_l1 = '0; fill_valid = 0; fill_idx = '0;
    foreach (r_vld[i]) r_vld[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // Fill the file to the top with distinct addresses.
    for (int i = 0; i < NUM_MSHR; i++) step(1, 1000 + i, i % 8, 0, 0);
    // Full: a new address is refused, a secondary miss is merged.
    step(1, 5, 2, 0, 0);
    chk(n_full == 1, "refused when full");
    step(1, 1000 + 17, 6, 0, 0);
    // Drain everything in random order.
    while (count_busy() > 0) step(0, 0, 0, 1, pick_valid());

    // Random traffic from all eight L1s; small pool for frequent merges.
    for (int i = 0; i < 20000; i++) begin
      int v;
      bit dm, df;
      v  = pick_valid();
      dm = ($urandom % 100) < 60;
      df = (v >= 0) && (($urandom % 100) < 45);
      step(dm, $urandom % 96, $urandom % 8, df, df ? v : 0);
    end

    chk(n_secondary > 100 && n_primary > 100 && n_fill > 100, "traffic mix");
    $display("primary=%0d secondary=%0d refused=%0d fills=%0d",
             n_primary, n_secondary, n_full, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
