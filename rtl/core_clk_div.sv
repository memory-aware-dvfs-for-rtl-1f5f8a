// core_clk_div: per-core clock divider, built as a clock enable, that lets a
// core run at half the chip frequency in low-power mode.
//
// The chip clock is never re-locked: a one-bit counter toggles every clk
// cycle and, while half_freq is high, only cycles where it is zero become
// core cycles, so the core (and its VSV state machine) advance at half
// rate. At full frequency every cycle is a core cycle. While stall is high
// (a DVFS transition is in progress) no core cycles are given. Halving the
// frequency with a counter rather than re-locking the PLL follows the design
// description; expressing the divided clock as an enable on one clock tree,
// parameter DIV for the division ratio, and restarting the counter on every
// stall are this design's choices.
//
// Timing: ce is combinational from the registered counter, half_freq and
// stall. After stall falls in half-frequency mode the first core cycle comes
// at once, then every DIV-th cycle.
module core_clk_div #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic half_freq,
  input  logic stall,
  output logic ce
);

  localparam int unsigned CNT_W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt_q <= '0;
    else if (stall || !half_freq)      cnt_q <= '0;
    else if (32'(cnt_q) == DIV - 1)    cnt_q <= '0;
    else                               cnt_q <= cnt_q + CNT_W'(1);
  end

  assign ce = !stall && (!half_freq || cnt_q == '0);

endmodule
