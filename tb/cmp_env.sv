// cmp_env: simulation environment around one vsv_cmp_top, used to run
// synthetic multiprogrammed workloads.
//
// It stands in for the parts the control logic connects to: four cores,
// each issuing in most of its core cycles and starting L2 misses at a given
// rate (misses per million core cycles), and going idle with a given
// probability while one of its own misses is outstanding; the shared L2's
// miss port (one request per chip cycle, private addresses per core); and
// main memory returning each primary miss MEM_LAT chip cycles later. It
// counts per core the chip cycles spent at half frequency, the DVFS
// transitions and the misses, and checks that every stall lasts
// TRANS_CYCLES chip cycles. Counters clear while rst_n is low.
module cmp_env #(
  parameter int unsigned TRANS_CYCLES = 36,
  parameter int unsigned MEM_LAT      = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  int   miss_ppm [4],   // misses per million core cycles
  input  int   idle_pct [4],   // % of core cycles idle while own miss pending
  output int   cyc_low  [4],   // chip cycles with the core at half frequency
  output int   n_down   [4],
  output int   n_miss   [4],
  output int   n_cycles,
  output int   checks,
  output int   errors
);
  import vsv_pkg::*;

  logic [3:0][2:0]       issue_cnt;
  logic                  miss_valid;
  logic [BLK_ADDR_W-1:0] miss_addr;
  logic [2:0]            miss_l1;
  logic                  miss_ready, miss_primary;
  logic [5:0]            miss_idx;
  logic                  fill_valid;
  logic [5:0]            fill_idx;
  logic [6:0]            mshr_busy;
  logic [3:0]            core_ce, stall, half_freq, vdd_low;
  vsv_state_t            vsv_state [4];
  dvfs_mode_t            dvfs_mode [4];
  logic [3:0][6:0]       l1_lat, l2_lat, mem_lat;

  vsv_cmp_top #(.TRANS_CYCLES(TRANS_CYCLES)) dut (.*);

  int          owner [64];
  int          own_cnt [4];
  int          mq_idx [$];
  longint      mq_due [$];
  longint      now;
  int          stall_len [4];
  logic [3:0]  want;

  initial begin
    miss_valid = 0; miss_addr = '0; miss_l1 = '0;
    fill_valid = 0; fill_idx = '0; want = '0; issue_cnt = '0;
  end

  // Requests: one core per chip cycle, picked from a random starting core
  // among those that want to miss; a refused request is held.
  always @(posedge clk) begin
    if (!rst_n) begin
      now = 0; n_cycles <= 0; checks <= 0; errors <= 0;
      mq_idx.delete(); mq_due.delete();
      foreach (owner[i]) owner[i] = -1;
      for (int c = 0; c < 4; c++) begin
        own_cnt[c] = 0; stall_len[c] = 0;
        cyc_low[c] <= 0; n_down[c] <= 0; n_miss[c] <= 0;
      end
      miss_valid <= 0; fill_valid <= 0;
    end else begin
      // outcome of the cycle that just ended
      if (fill_valid) begin
        own_cnt[owner[fill_idx]]--;
        owner[fill_idx] = -1;
        void'(mq_idx.pop_front());
        void'(mq_due.pop_front());
      end
      if (miss_valid && miss_ready && miss_primary) begin
        owner[miss_idx] = int'(miss_l1) / 2;
        own_cnt[int'(miss_l1) / 2]++;
        n_miss[int'(miss_l1) / 2] <= n_miss[int'(miss_l1) / 2] + 1;
        mq_idx.push_back(int'(miss_idx));
        mq_due.push_back(now + MEM_LAT);
      end
      for (int c = 0; c < 4; c++) begin
        if (half_freq[c]) cyc_low[c] <= cyc_low[c] + 1;
        if (stall[c]) stall_len[c]++;
        else if (stall_len[c] != 0) begin
          checks <= checks + 1;
          if (stall_len[c] != TRANS_CYCLES) errors <= errors + 1;
          if (half_freq[c]) n_down[c] <= n_down[c] + 1;
          stall_len[c] = 0;
        end
      end
      now++;
      n_cycles <= n_cycles + 1;
      // next cycle's memory return
      fill_valid <= 0;
      if (mq_due.size() > 0 && mq_due[0] <= now) begin
        fill_valid <= 1;
        fill_idx   <= 6'(mq_idx[0]);
      end
      // next cycle's miss request
      if (!(miss_valid && !miss_ready)) begin
        int start, c;
        bit got;
        got = 0;
        start = $urandom % 4;
        for (int k = 0; k < 4; k++) begin
          c = (start + k) % 4;
          if (!got && want[c]) begin
            got = 1;
            miss_l1   <= 3'(2 * c + 1);
            miss_addr <= BLK_ADDR_W'((longint'(c) << 20) | ($urandom % 1048576));
          end
        end
        miss_valid <= got;
      end
    end
  end

  // Core models: decide issue and miss wishes for the next chip cycle.
  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      bit idle;
      idle = (own_cnt[c] > 0) ? (($urandom % 100) < idle_pct[c])
                              : (($urandom % 100) < 10);
      issue_cnt[c] <= idle ? 3'd0 : 3'(1 + $urandom % 4);
      want[c] <= core_ce[c] && (($urandom % 1000000) < miss_ppm[c]);
    end
  end

endmodule
