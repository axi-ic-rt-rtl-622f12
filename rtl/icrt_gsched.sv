// Global scheduler (G-Sched) of one Transaction Control Unit.
//
// Every Primary i (PID = i+1) owns a periodic server (Pi_i, Theta_i),
// realised by two countdown counters:
//   * the period counter (P-Counter) counts clock cycles down; its value
//     output drives its own active-low reload port and that of the budget
//     counter, so both reload together whenever the period counter reaches
//     zero. Programming a reload value of R gives a period of R+1 cycles.
//     The P-Counter also holds the Primary's priority.
//   * the budget counter (S-Counter) counts the Primary's granted
//     transactions down. Its enable is the comparison of the PID of the
//     transaction being granted with the counter's own PID, so it drops by
//     one per transaction of that Primary. A Primary whose budget counter
//     reads zero has no budget left until the next period.
// The budget is counted in transactions (one time slot = one transaction),
// the period in clock cycles; both units are this design's reading.
//
// Configuration: one write port (cfg_we, cfg_pri, cfg_reg, cfg_data)
// fed by the APB configuration block. Reset values let every Primary run
// unconstrained (long period, large budget) until software programs the
// interfaces.
//
// Timing: `grant` is a one-cycle pulse; the budget output reflects it on
// the next cycle.
module icrt_gsched
  import icrt_pkg::*;
#(
  parameter int unsigned N_PRI      = 16,
  parameter cnt_t        DEF_PERIOD = cnt_t'(1023),
  parameter cnt_t        DEF_BUDGET = cnt_t'(1023),
  localparam int unsigned PW        = (N_PRI > 1) ? $clog2(N_PRI) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration write port
  input  logic             cfg_we,
  input  logic [PW-1:0]    cfg_pri,
  input  cfg_reg_e         cfg_reg,
  input  cnt_t             cfg_data,
  // a transaction of Primary `grant_pid` starts
  input  logic             grant,
  input  pid_t             grant_pid,
  // per-Primary state
  output cnt_t [N_PRI-1:0] s_value,
  output prio_t [N_PRI-1:0] p_prio,
  output cnt_t [N_PRI-1:0] p_value,
  output logic [N_PRI-1:0] has_budget
);

  for (genvar i = 0; i < N_PRI; i++) begin : g_pri
    localparam pid_t MY_PID = pid_t'(i + 1);
    logic sel;
    logic p_reload_n;
    assign sel        = cfg_we && (cfg_pri == PW'(i));
    assign p_reload_n = (p_value[i] != '0);

    icrt_counter #(
      .RESET_VALUE(DEF_PERIOD),
      .RESET_PRIO (prio_t'(i))
    ) u_p (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg_value_we(sel && cfg_reg == CFG_P_RESET),
      .cfg_prio_we (sel && cfg_reg == CFG_P_PRIO),
      .cfg_value   (cfg_data),
      .cfg_prio    (cfg_data[PRIO_W-1:0]),
      .reload_n    (p_reload_n),
      .en          (1'b1),
      .value       (p_value[i]),
      .prio        (p_prio[i])
    );

    // The budget counter's priority port is not used.
    prio_t s_prio_unused;
    icrt_counter #(
      .RESET_VALUE(DEF_BUDGET),
      .RESET_PRIO (prio_t'(0))
    ) u_s (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg_value_we(sel && cfg_reg == CFG_S_RESET),
      .cfg_prio_we (1'b0),
      .cfg_value   (cfg_data),
      .cfg_prio    (prio_t'(0)),
      .reload_n    (p_reload_n),
      .en          (grant && grant_pid == MY_PID),
      .value       (s_value[i]),
      .prio        (s_prio_unused)
    );

    assign has_budget[i] = (s_value[i] != '0);
  end

endmodule
