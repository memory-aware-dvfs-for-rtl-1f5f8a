// dvfs_ctrl: consolidated DVFS controller that moves each core between its
// full-speed operating point (VDD, full clock) and its low-power one (VDD_L,
// half clock) as the core's VSV state machine requests.
//
// Each core has its own sequencer with four modes: FULL, TO_LOW, LOW and
// TO_FULL. When req differs from the settled mode, the sequencer starts a
// transition that lasts TRANS_CYCLES full-speed clock cycles; the core is
// stalled for all of it. Scaling down, the clock is halved and the regulator
// is switched to VDD_L at the start of the transition. Scaling up, the
// regulator is switched back to VDD at the start and the clock returns to
// full speed only when the transition ends, so the core never runs fast at
// the low voltage. A request that changes during a transition is acted on
// after it ends. Per-core throttling, a central controller driving per-core
// on-chip regulators, halving the frequency, stalling the core during the
// transition and the 12 ns (36 cycles at 3 GHz) default latency follow the
// design description; the ordering of voltage and clock changes and the
// handling of requests during a transition are this design's choices.
//
// Interface/timing: req is sampled every clk cycle. vdd_low, half_freq,
// stall and mode are registered; stall rises the cycle after req changes and
// stays high for exactly TRANS_CYCLES cycles. TRANS_CYCLES must be >= 1.
module dvfs_ctrl
  import vsv_pkg::*;
#(
  parameter int unsigned NUM_CORES    = NUM_CORES_DEF,
  parameter int unsigned TRANS_CYCLES = TRANS_CYC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_CORES-1:0] req,        // engage DVFS for core i
  output logic [NUM_CORES-1:0] vdd_low,    // regulator select: 1 = VDD_L
  output logic [NUM_CORES-1:0] half_freq,  // core clock divided by two
  output logic [NUM_CORES-1:0] stall,      // core stalled by a transition
  output dvfs_mode_t           mode [NUM_CORES]
);

  localparam int unsigned CNT_W = $clog2(TRANS_CYCLES + 1);

  logic [CNT_W-1:0] cnt_q [NUM_CORES];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mode[c]      <= DV_FULL;
        cnt_q[c]     <= '0;
        vdd_low[c]   <= 1'b0;
        half_freq[c] <= 1'b0;
        stall[c]     <= 1'b0;
      end else begin
        unique case (mode[c])
          DV_FULL: if (req[c]) begin
            mode[c]      <= DV_TO_LOW;
            cnt_q[c]     <= CNT_W'(TRANS_CYCLES - 1);
            vdd_low[c]   <= 1'b1;
            half_freq[c] <= 1'b1;
            stall[c]     <= 1'b1;
          end
          DV_LOW: if (!req[c]) begin
            mode[c]      <= DV_TO_FULL;
            cnt_q[c]     <= CNT_W'(TRANS_CYCLES - 1);
            vdd_low[c]   <= 1'b0;
            stall[c]     <= 1'b1;
          end
          DV_TO_LOW, DV_TO_FULL: begin
            if (cnt_q[c] == '0) begin
              stall[c] <= 1'b0;
              if (mode[c] == DV_TO_LOW) begin
                mode[c] <= DV_LOW;
              end else begin
                mode[c]      <= DV_FULL;
                half_freq[c] <= 1'b0;
              end
            end else begin
              cnt_q[c] <= cnt_q[c] - CNT_W'(1);
            end
          end
        endcase
      end
    end
  end

  // The stall lasts as long as a transition is in progress.
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_chk
    a_stall: assert property (@(posedge clk) disable iff (!rst_n)
      stall[c] == (mode[c] == DV_TO_LOW || mode[c] == DV_TO_FULL));
    a_volt_before_clock: assert property (@(posedge clk) disable iff (!rst_n)
      vdd_low[c] |-> half_freq[c]);
  end

endmodule
