// vsv_fsm: per-core VSV state machine that decides when the core should run
// in low-power (DVFS) mode.
//
// The machine has four states. A waits for an L2 miss attributed to this
// core and then moves to B. In B it counts the core cycles since the last
// instruction issue; when that count exceeds THRESH the ILP is judged low,
// DVFS is engaged and the machine moves to C. If the count stays at or below
// THRESH for a whole WINDOW-cycle observation window, the ILP is judged high
// and it returns to A. A further L2 miss while in B restarts the window. C
// holds DVFS engaged until an L2 miss return for this core, then D watches
// ILP the same way: a full window of regular issue disengages DVFS (back to
// A), a run of idle cycles above THRESH goes back to C. C and D engage DVFS.
// These states, transitions and the values 10 and 3 follow the design
// description; the following are this design's choices: the idle count and
// window both restart on entry to B and D, a miss seen in C or D and a
// return seen in A or B are dropped, and "low ILP" means the idle count is
// strictly greater than THRESH.
//
// Timing: everything advances on core cycles, i.e. clk cycles with ce high,
// because the machine sits inside the core and must count at the core's
// current frequency. l2_miss and l2_ret are one-cycle pulses in the
// full-speed clk domain; each is held in a pending flag until the next core
// cycle consumes it. issue is sampled on core cycles. dvfs_req and state are
// registered.
module vsv_fsm
  import vsv_pkg::*;
#(
  parameter int unsigned WINDOW = VSV_WINDOW_DEF,
  parameter int unsigned THRESH = VSV_THRESH_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,        // core clock enable
  input  logic       issue,     // at least one instruction issued this core cycle
  input  logic       l2_miss,   // primary L2 miss from this core (pulse)
  input  logic       l2_ret,    // L2 miss data return to this core (pulse)
  output logic       dvfs_req,  // 1: DVFS should be engaged
  output vsv_state_t state
);

  localparam int unsigned WIN_W  = $clog2(WINDOW + 1);
  localparam int unsigned IDLE_W = $clog2(THRESH + 2);

  logic              miss_pend, ret_pend;
  logic [WIN_W-1:0]  win_q;
  logic [IDLE_W-1:0] idle_q;

  logic              miss_now, ret_now;
  logic [IDLE_W-1:0] idle_nx;
  logic              low_ilp, win_done;
  vsv_state_t        state_d;
  logic              restart;      // clear window and idle counters

  assign miss_now = l2_miss | miss_pend;
  assign ret_now  = l2_ret  | ret_pend;
  assign idle_nx  = issue ? '0 : idle_q + IDLE_W'(1);
  assign low_ilp  = 32'(idle_nx) > THRESH;
  assign win_done = 32'(win_q) + 1 >= WINDOW;

  always_comb begin
    state_d = state;
    restart = 1'b0;
    unique case (state)
      VSV_A: if (miss_now) begin
        state_d = VSV_B;
        restart = 1'b1;
      end
      VSV_B: begin
        if (miss_now)      restart = 1'b1;
        else if (low_ilp)  state_d = VSV_C;
        else if (win_done) state_d = VSV_A;
      end
      VSV_C: if (ret_now) begin
        state_d = VSV_D;
        restart = 1'b1;
      end
      VSV_D: begin
        if (low_ilp)       state_d = VSV_C;
        else if (win_done) state_d = VSV_A;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= VSV_A;
      miss_pend <= 1'b0;
      ret_pend  <= 1'b0;
      win_q     <= '0;
      idle_q    <= '0;
    end else if (ce) begin
      state     <= state_d;
      miss_pend <= 1'b0;
      ret_pend  <= 1'b0;
      if (restart) begin
        win_q  <= '0;
        idle_q <= '0;
      end else begin
        win_q  <= win_done ? '0 : win_q + WIN_W'(1);
        idle_q <= low_ilp ? idle_q : idle_nx;   // saturates above THRESH
      end
    end else begin
      if (l2_miss) miss_pend <= 1'b1;
      if (l2_ret)  ret_pend  <= 1'b1;
    end
  end

  assign dvfs_req = (state == VSV_C) || (state == VSV_D);

endmodule
