// Self-checking testbench of the global scheduler: period counter reload
// interval, budget consumption per granted transaction of the own PID
// only, budget exhaustion and replenishment at the period boundary.
module tb_icrt_gsched;
  import icrt_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_pri = '0;
  cfg_reg_e cfg_reg = CFG_P_RESET;
  cnt_t cfg_data = '0;
  logic grant = 0;
  pid_t grant_pid = '0;
  cnt_t [N-1:0] s_value, p_value;
  prio_t [N-1:0] p_prio;
  logic [N-1:0] has_budget;
  int checks = 0, failures = 0;

  icrt_gsched #(.N_PRI(N), .DEF_PERIOD(cnt_t'(5)), .DEF_BUDGET(cnt_t'(3))) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(input int pri, input cfg_reg_e r, input int unsigned d);
    cfg_we = 1; cfg_pri = 2'(pri); cfg_reg = r; cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic give(input int pid);
    grant = 1; grant_pid = pid_t'(pid);
    @(negedge clk);
    grant = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(has_budget == 3'b111 && s_value[1] == 3, "reset budgets");
    check(p_prio[0] == 0 && p_prio[2] == 2, "reset Primary priorities");
    // program Primary 0: period reload 9 (10 cycles), budget 2; priority 5
    cfg(0, CFG_P_RESET, 9);
    cfg(0, CFG_S_RESET, 2);
    cfg(0, CFG_P_PRIO, 5);
    check(p_prio[0] == 5, "priority configured");
    // wait for a period boundary of Primary 0
    while (p_value[0] != 0) @(negedge clk);
    @(negedge clk);
    check(p_value[0] == 9 && s_value[0] == 2, "reload with configured values");
    t0 = $time;
    while (p_value[0] != 0) @(negedge clk);
    @(negedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == 10, $sformatf("period is 10 cycles (%0d)", (t1 - t0) / 10));
    // budget: two grants of PID 1 exhaust it; PID 2 grants do not touch it
    give(2);
    check(s_value[0] == 2, "other PID does not consume");
    give(1);
    check(s_value[0] == 1 && has_budget[0], "one grant consumes one");
    give(1);
    check(s_value[0] == 0 && !has_budget[0], "budget exhausted");
    give(1);
    check(s_value[0] == 0, "no wrap below zero");
    // replenished at the next period boundary
    while (p_value[0] != 0) @(negedge clk);
    @(negedge clk);
    check(has_budget[0] && s_value[0] == 2, "budget replenished");
    // Primary 1 runs on the defaults (period 6, budget 3)
    check(s_value[1] <= 3, "defaults untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
