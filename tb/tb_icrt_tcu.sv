// Self-checking testbench of the Transaction Control Unit.
//  1. A worked TIB example (three Primaries, two rows
//     each) must be served in priority order, with equal priorities going
//     to the Primary of more urgent Primary priority.
//  2. Random writes and grants against a reference model of the TIBs and
//     of the switch (budgets unconstrained).
//  3. Budget enforcement: Primary 1 (PID 1) gets period 20 cycles and a
//     budget of 1 transaction; with urgent work always waiting it must be
//     granted exactly once per period while PID 2 takes the rest.
module tb_icrt_tcu;
  import icrt_pkg::*;
  localparam int N = 3, D = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_pri = '0;
  cfg_reg_e cfg_reg = CFG_P_RESET;
  cnt_t cfg_data = '0;
  logic [N-1:0] tib_we = '0;
  tinfo_t [N-1:0] tib_info = '0;
  logic [N-1:0][2:0] tib_n_free;
  logic ctrl_valid, grant = 0;
  pid_t ctrl_pid;
  tid_t ctrl_tid;
  prio_t ctrl_prio;
  logic [N-1:0] budget_blocked;
  cnt_t [N-1:0] s_value;
  int checks = 0, failures = 0;

  icrt_tcu #(.N_PRI(N), .TIB_DEPTH(D), .DEF_PERIOD(cnt_t'(4999)), .DEF_BUDGET(cnt_t'(100000))) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model
  bit     mv [N][D];
  tinfo_t mi [N][D];

  task automatic expect_pick(output bit v, output int bp, output int bs);
    v = 0; bp = 0; bs = 0;
    for (int p = 0; p < N; p++)
      for (int s = 0; s < D; s++)
        if (mv[p][s]) begin
          if (!v || mi[p][s].prio < mi[bp][bs].prio
              || (mi[p][s].prio == mi[bp][bs].prio && p == bp && s < bs)) begin
            v = 1; bp = p; bs = s;
          end
        end
  endtask

  task automatic write_entry(input int p, input tinfo_t t);
    for (int s = 0; s < D; s++) if (!mv[p][s]) begin mv[p][s] = 1; mi[p][s] = t; break; end
  endtask

  task automatic cfg(input int pri, input cfg_reg_e r, input int unsigned d);
    cfg_we = 1; cfg_pri = 2'(pri); cfg_reg = r; cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) for (int s = 0; s < D; s++) mv[p][s] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(!ctrl_valid, "nothing to schedule after reset");
    // ---- 1: worked TIB example
    begin
      tinfo_t ex [6];
      pid_t   exp_pid [6];
      tid_t   exp_tid [6];
      ex[0] = '{8'h01, 8'h03, 16'h0400}; ex[1] = '{8'h01, 8'h01, 16'h0200};
      ex[2] = '{8'h02, 8'h04, 16'h0700}; ex[3] = '{8'h02, 8'hF1, 16'h0200};
      ex[4] = '{8'h03, 8'h32, 16'h1100}; ex[5] = '{8'h03, 8'h45, 16'hF000};
      for (int r = 0; r < 2; r++) begin
        for (int p = 0; p < N; p++) begin tib_we[p] = 1; tib_info[p] = ex[2*p + r]; end
        @(negedge clk);
      end
      tib_we = '0;
      // smaller value = more urgent; PID 1 has the more urgent Primary priority
      exp_pid = '{8'h01, 8'h02, 8'h01, 8'h02, 8'h03, 8'h03};
      exp_tid = '{8'h01, 8'hF1, 8'h03, 8'h04, 8'h32, 8'h45};
      for (int k = 0; k < 6; k++) begin
        check(ctrl_valid && ctrl_pid == exp_pid[k] && ctrl_tid == exp_tid[k],
              $sformatf("example order %0d: got %h/%h", k, ctrl_pid, ctrl_tid));
        grant = 1;
        @(negedge clk);
        grant = 0;
      end
      check(!ctrl_valid, "example drained");
    end
    // ---- 2: random against the model
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit v; int bp, bs;
      for (int p = 0; p < N; p++) begin
        int nf;
        nf = 0;
        for (int s = 0; s < D; s++) if (!mv[p][s]) nf++;
        check(tib_n_free[p] == 3'(nf), "free count");
        tib_we[p] = (nf > 0) && ($urandom % 3 == 0);
        tib_info[p] = '{pid_t'(p + 1), tid_t'($urandom), prio_t'($urandom % 6)};
      end
      expect_pick(v, bp, bs);
      grant = ($urandom % 2);
      #1;
      check(ctrl_valid == v, "decision valid");
      if (v) check(ctrl_pid == pid_t'(bp + 1) && ctrl_tid == mi[bp][bs].tid
                   && ctrl_prio == mi[bp][bs].prio,
                   $sformatf("decision: exp %0d/%h got %h/%h", bp + 1, mi[bp][bs].tid, ctrl_pid, ctrl_tid));
      @(negedge clk);
      // the TIB picks its slot from the state before this edge's removal
      for (int p = 0; p < N; p++) if (tib_we[p]) write_entry(p, tib_info[p]);
      if (grant && v) mv[bp][bs] = 0;
      tib_we = '0; grant = 0;
    end
    // drain
    while (ctrl_valid) begin grant = 1; @(negedge clk); end
    grant = 0;
    // ---- 3: budget enforcement for PID 1
    begin
      int g1, g2, periods, blocked, t_last;
      int g1_in_period [int];
      cfg(0, CFG_P_RESET, 19);
      cfg(0, CFG_S_RESET, 1);
      // wait for the counters to reload with the new values
      while (dut.p_value[0] != 0) @(negedge clk);
      @(negedge clk);
      g1 = 0; g2 = 0; blocked = 0; t_last = 0;
      for (int cyc = 0; cyc < 400; cyc++) begin
        // keep both Primaries supplied: PID 1 urgent, PID 2 less urgent
        for (int p = 0; p < 2; p++) begin
          tib_we[p] = tib_n_free[p] > 1;
          tib_info[p] = '{pid_t'(p + 1), tid_t'(cyc), (p == 0) ? 16'h0001 : 16'h0100};
        end
        grant = (cyc % 2 == 0);   // a transaction every other cycle
        #1;
        if (budget_blocked[0]) blocked++;
        if (grant && ctrl_valid) begin
          if (ctrl_pid == 1) begin
            g1++;
            g1_in_period[cyc / 20]++;
          end else g2++;
        end
        @(negedge clk);
        tib_we = '0; grant = 0;
      end
      foreach (g1_in_period[k]) check(g1_in_period[k] == 1, $sformatf("PID 1 grants in period %0d: %0d", k, g1_in_period[k]));
      check(g1 == 20, $sformatf("PID 1 grants %0d (20 periods)", g1));
      check(g2 >= 178 && g1 + g2 >= 198, $sformatf("PID 2 takes the remaining slots: %0d", g2));
      check(blocked > 100, "budget blocking observed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
