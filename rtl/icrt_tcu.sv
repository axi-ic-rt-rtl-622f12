// Transaction Control Unit (TCU): the scheduler of one Secondary.
//
// Two-layer compositional scheduling in hardware:
//   * local layer: one TIB and one L-Sched per Primary; each L-Sched
//     names that Primary's most urgent waiting transaction;
//   * global layer: the G-Sched's per-Primary period/budget counters tell
//     which Primaries still have budget in their current period;
//   * the switch returns PID and TID of the most urgent L-Sched pick among
//     the Primaries that have budget.
// On the switch, ties between equal transaction priorities go to the
// Primary with the more urgent Primary priority (the value held in its
// period counter), then to the lower PID; the tie rule is this design's.
//
// Interface: `tib_we[i]`/`tib_info[i]` write a decoded header of Primary i
// (PID i+1); `ctrl_*` is the scheduling decision (CTRL_Secondary), valid
// whenever a transaction is eligible; `grant` is pulsed by the Secondary's
// port sequencer when it takes the decision; the entry then leaves the TIB
// and the Primary's budget drops by one. Combinational from TIB state to
// `ctrl_*`; one cycle from `tib_we` to eligibility.
module icrt_tcu
  import icrt_pkg::*;
#(
  parameter int unsigned N_PRI      = 16,
  parameter int unsigned TIB_DEPTH  = 8,
  parameter cnt_t        DEF_PERIOD = cnt_t'(1023),
  parameter cnt_t        DEF_BUDGET = cnt_t'(1023),
  localparam int unsigned PW        = (N_PRI > 1) ? $clog2(N_PRI) : 1,
  localparam int unsigned IW        = (TIB_DEPTH > 1) ? $clog2(TIB_DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration of the global scheduler
  input  logic                   cfg_we,
  input  logic [PW-1:0]          cfg_pri,
  input  cfg_reg_e               cfg_reg,
  input  cnt_t                   cfg_data,
  // transaction information from the AXI-decoders
  input  logic   [N_PRI-1:0]     tib_we,
  input  tinfo_t [N_PRI-1:0]     tib_info,
  output logic   [N_PRI-1:0][IW:0] tib_n_free,
  // scheduling decision (CTRL_Secondary)
  output logic                   ctrl_valid,
  output pid_t                   ctrl_pid,
  output tid_t                   ctrl_tid,
  output prio_t                  ctrl_prio,
  input  logic                   grant,
  // observation: a Primary has work waiting but no budget left
  output logic   [N_PRI-1:0]     budget_blocked,
  output cnt_t   [N_PRI-1:0]     s_value
);

  logic   [N_PRI-1:0]         ls_valid;
  logic   [N_PRI-1:0][IW-1:0] ls_idx;
  tinfo_t [N_PRI-1:0]         ls_info;
  prio_t  [N_PRI-1:0]         p_prio;
  cnt_t   [N_PRI-1:0]         p_value;
  logic   [N_PRI-1:0]         has_budget;
  logic   [PW-1:0]            win;

  for (genvar i = 0; i < N_PRI; i++) begin : g_pri
    tinfo_t [TIB_DEPTH-1:0] entry;
    logic   [TIB_DEPTH-1:0] valid;

    icrt_tib #(.DEPTH(TIB_DEPTH)) u_tib (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_en  (tib_we[i]),
      .wr_info(tib_info[i]),
      .rm_en  (grant && ctrl_valid && win == PW'(i)),
      .rm_idx (ls_idx[i]),
      .entry  (entry),
      .valid  (valid),
      .n_free (tib_n_free[i])
    );

    icrt_lsched #(.DEPTH(TIB_DEPTH)) u_ls (
      .entry     (entry),
      .valid     (valid),
      .best_valid(ls_valid[i]),
      .best_idx  (ls_idx[i]),
      .best_info (ls_info[i])
    );

    assign budget_blocked[i] = ls_valid[i] && !has_budget[i];
  end

  icrt_gsched #(
    .N_PRI     (N_PRI),
    .DEF_PERIOD(DEF_PERIOD),
    .DEF_BUDGET(DEF_BUDGET)
  ) u_gs (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we),
    .cfg_pri   (cfg_pri),
    .cfg_reg   (cfg_reg),
    .cfg_data  (cfg_data),
    .grant     (grant && ctrl_valid),
    .grant_pid (ctrl_pid),
    .s_value   (s_value),
    .p_prio    (p_prio),
    .p_value   (p_value),
    .has_budget(has_budget)
  );

  // Switch: most urgent eligible L-Sched result.
  always_comb begin
    logic found;
    found = 1'b0;
    win   = '0;
    for (int i = 0; i < N_PRI; i++) begin
      if (ls_valid[i] && has_budget[i]) begin
        if (!found
            || prio_wins(ls_info[i].prio, ls_info[win].prio)
            || (ls_info[i].prio == ls_info[win].prio
                && prio_wins(p_prio[i], p_prio[win]))) begin
          found = 1'b1;
          win   = PW'(i);
        end
      end
    end
    ctrl_valid = found;
    ctrl_pid   = ls_info[win].pid;
    ctrl_tid   = ls_info[win].tid;
    ctrl_prio  = ls_info[win].prio;
  end

endmodule
