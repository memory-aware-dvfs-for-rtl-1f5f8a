// tb_vsv_fsm: self-checking testbench for the per-core VSV state machine.
//
// Directed sequences first walk every transition of the machine (A->B on a
// miss, B->C after more than 3 idle core cycles, B->A after a 10-cycle
// window of steady issue, a miss restarting the window, C->D on a return,
// D->A and D->C), checking the cycle on which each happens. Then a long
// random run, with the core clock enable toggling as it does at half
// frequency, is compared every cycle with a reference model kept as plain
// integers in this file.
module tb_vsv_fsm;
  timeunit 1ns; timeprecision 1ps;
  import vsv_pkg::*;

  localparam int unsigned WINDOW = 10;
  localparam int unsigned THRESH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce, issue, l2_miss, l2_ret;
  logic dvfs_req;
  vsv_state_t state;

  int checks = 0, failures = 0;

  vsv_fsm #(.WINDOW(WINDOW), .THRESH(THRESH)) dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, advanced once per clk edge alongside the design.
  int  m_state;      // 0..3 for A..D
  int  m_idle, m_win;
  bit  m_mp, m_rp;

  task automatic model_step(bit ce_i, bit iss, bit miss, bit ret);
    bit mn, rn, restart;
    int idle_n;
    if (!ce_i) begin
      if (miss) m_mp = 1;
      if (ret)  m_rp = 1;
      return;
    end
    mn = miss | m_mp;  rn = ret | m_rp;
    m_mp = 0;  m_rp = 0;
    idle_n = iss ? 0 : m_idle + 1;
    restart = 0;
    case (m_state)
      0: if (mn) begin m_state = 1; restart = 1; end
      1: if (mn) restart = 1;
         else if (idle_n > THRESH) m_state = 2;
         else if (m_win + 1 >= WINDOW) m_state = 0;
      2: if (rn) begin m_state = 3; restart = 1; end
      3: if (idle_n > THRESH) m_state = 2;
         else if (m_win + 1 >= WINDOW) m_state = 0;
      default: ;
    endcase
    if (restart) begin m_idle = 0; m_win = 0; end
    else begin
      m_win  = (m_win + 1 >= WINDOW) ? 0 : m_win + 1;
      m_idle = (idle_n > THRESH) ? m_idle : idle_n;
    end
  endtask

  task automatic check_state(int exp, string what);
    checks++;
    if (int'(state) != exp || dvfs_req != (exp >= 2)) begin
      failures++;
      $display("FAIL %s: state=%0d req=%0b expected state=%0d", what,
               state, dvfs_req, exp);
    end
  endtask

  // One core cycle with the given inputs, then compare with the model.
  task automatic cyc(bit iss, bit miss = 0, bit ret = 0, bit ce_i = 1);
    ce <= ce_i; issue <= iss; l2_miss <= miss; l2_ret <= ret;
    @(posedge clk);
    model_step(ce_i, iss, miss, ret);
    #0.1;
    check_state(m_state, "model");
  endtask

  task automatic expect_state(int exp, string what);
    check_state(exp, what);
  endtask

  initial begin
    ce = 1; issue = 0; l2_miss = 0; l2_ret = 0;
    m_state = 0; m_idle = 0; m_win = 0; m_mp = 0; m_rp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.1;
    expect_state(0, "reset to A");

    // A stays in A with no miss, whatever the issue activity.
    repeat (20) cyc(0);
    expect_state(0, "A without miss");

    // A -> B on a miss; B -> C after THRESH+1 idle cycles, not earlier.
    cyc(1, 1);
    expect_state(1, "A->B on miss");
    repeat (THRESH) cyc(0);
    expect_state(1, "B holds at threshold");
    cyc(0);
    expect_state(2, "B->C on low ILP");

    // C waits for the return however long the core is idle.
    repeat (50) cyc(0);
    expect_state(2, "C waits");
    cyc(0, 0, 1);
    expect_state(3, "C->D on return");
    // D -> A after WINDOW cycles of steady issue.
    repeat (WINDOW - 1) cyc(1);
    expect_state(3, "D inside window");
    cyc(1);
    expect_state(0, "D->A on high ILP");

    // B -> A after a full window of issue (with short idle gaps).
    cyc(1, 1);
    for (int i = 0; i < WINDOW - 1; i++) cyc(i % 3 != 0);
    expect_state(1, "B inside window");
    cyc(1);
    expect_state(0, "B->A on high ILP");

    // A further miss in B restarts the window.
    cyc(1, 1);
    repeat (WINDOW - 2) cyc(1);
    cyc(1, 1);
    repeat (WINDOW - 1) cyc(1);
    expect_state(1, "window restarted by miss");
    cyc(1);
    expect_state(0, "B->A after restarted window");

    // D -> C when the core goes idle again after the return.
    cyc(0, 1);
    repeat (THRESH + 1) cyc(0);
    expect_state(2, "B->C again");
    cyc(1, 0, 1);
    repeat (3) cyc(1);
    repeat (THRESH + 1) cyc(0);
    expect_state(2, "D->C on low ILP");

    // A return offered between core cycles is held until the next one.
    cyc(0, 0, 1, 0);
    cyc(0, 0, 0, 0);
    expect_state(2, "event held while ce low");
    cyc(1, 0, 0, 1);
    expect_state(3, "held return taken on core cycle");

    // Random run against the model, with ce at full and half rate.
    for (int i = 0; i < 100000; i++) begin
      bit half;
      half = (i / 5000) % 2;
      cyc(($urandom % 100) < 55, ($urandom % 100) < 4, ($urandom % 100) < 4,
          half ? bit'(i % 2) : 1'b1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
