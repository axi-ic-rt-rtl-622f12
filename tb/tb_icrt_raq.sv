// Self-checking testbench of the Random Access Queue. Three write
// controllers allocate cells and push bursts of 1..4 entries at random
// while the read controller fetches buffered transactions in random order
// (not in arrival order) by PID+TID. A reference model tracks every
// buffered burst: grants, hits, payload order, cell freeing and the free
// count are checked every cycle.
module tb_icrt_raq;
  import icrt_pkg::*;
  localparam int NW = 3, NC = 4, D = 4, PWD = 16;
  logic clk = 0, rst_n = 0;
  logic [NW-1:0] alloc_req = '0, alloc_commit = '0, alloc_gnt;
  pid_t [NW-1:0] alloc_pid = '0;
  tid_t [NW-1:0] alloc_tid = '0;
  logic [NW-1:0] push_valid = '0, push_last = '0, push_ready;
  logic [NW-1:0][PWD-1:0] push_data = '0;
  pid_t rd_pid = '0;
  tid_t rd_tid = '0;
  logic rd_hit, rd_valid, rd_pop = 0, rd_free = 0;
  logic [2:0] rd_addr;
  logic [PWD-1:0] rd_data;
  logic [NC-1:0] cell_valid;
  logic [2:0] n_free;
  int checks = 0, failures = 0;

  icrt_raq #(.N_WR(NW), .NCELLS(NC), .DEPTH(D), .PWIDTH(PWD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  logic [PWD-1:0] q [int][$];
  bit             complete [int];
  int             used;
  bit             open [NW];
  int             okey [NW];
  int             left [NW];
  int             next_tid [NW];
  int             rkey;       // key being read, -1 none
  int             served, reordered, full_seen;

  function automatic int key(int pid, int tid); return pid * 256 + tid; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    used = 0; rkey = -1; served = 0; reordered = 0; full_seen = 0;
    for (int p = 0; p < NW; p++) begin open[p] = 0; next_tid[p] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int nfree_m, rank;
      bit  will_alloc [NW];
      bit  accepted [NW];
      // ---- drive write side
      for (int p = 0; p < NW; p++) begin
        alloc_req[p] = 0; alloc_commit[p] = 0; push_valid[p] = 0; push_last[p] = 0;
        if (!open[p] && $urandom % 3 == 0) begin
          alloc_req[p]    = 1;
          alloc_commit[p] = ($urandom % 4) != 0;
          alloc_pid[p]    = pid_t'(p + 1);
          alloc_tid[p]    = tid_t'(next_tid[p]);
          left[p]         = 1 + $urandom % D;
          // first entry may come with the allocation
          push_valid[p]   = alloc_commit[p] && ($urandom % 2);
        end else if (open[p] && $urandom % 2) begin
          push_valid[p] = 1;
        end
        push_data[p] = PWD'($urandom);
        push_last[p] = (left[p] == 1);
      end
      // ---- drive read side: pick a buffered transaction at random
      if (rkey < 0 && q.size() > 0 && $urandom % 2) begin
        int n, pick;
        n = 0;
        foreach (q[k]) n++;
        pick = $urandom % n;
        n = 0;
        foreach (q[k]) begin
          if (n == pick) rkey = k;
          n++;
        end
        // fetched out of arrival order if an older transaction is buffered
        foreach (q[k]) if (k % 256 < rkey % 256 && k / 256 == rkey / 256) begin
          reordered++;
          break;
        end
      end
      if (rkey >= 0) begin rd_pid = pid_t'(rkey / 256); rd_tid = tid_t'(rkey % 256); end
      else begin rd_pid = '0; rd_tid = '0; end
      rd_pop = 0; rd_free = 0;
      #1;
      // ---- check combinational outputs against the model
      nfree_m = NC - used;
      check(n_free == 3'(nfree_m), "free count");
      if (nfree_m == 0) full_seen++;
      rank = 0;
      for (int p = 0; p < NW; p++) begin
        will_alloc[p] = 0;
        if (alloc_req[p]) begin
          check(alloc_gnt[p] == (rank < nfree_m), $sformatf("grant port %0d", p));
          if (rank < nfree_m) begin
            rank++;
            will_alloc[p] = alloc_commit[p];
          end
        end
      end
      if (rkey >= 0) begin
        check(rd_hit, "read hit on buffered transaction");
        check(rd_valid == (q[rkey].size() > 0), "read valid");
        if (rd_valid && $urandom % 4 != 0) begin
          check(rd_data == q[rkey][0], "payload order");
          rd_pop = 1;
          rd_free = complete[rkey] && q[rkey].size() == 1;
        end
      end else begin
        check(!rd_hit, "no hit for PID 0");
      end
      // push acceptance
      for (int p = 0; p < NW; p++) begin
        if (push_valid[p]) begin
          bit ok;
          int k;
          k = will_alloc[p] ? key(p + 1, next_tid[p]) : okey[p];
          ok = will_alloc[p] || open[p];
          if (ok && q.exists(k)) ok = q[k].size() < D;
          check(push_ready[p] == ok, $sformatf("push ready port %0d", p));
        end
      end
      for (int p = 0; p < NW; p++) accepted[p] = push_valid[p] && push_ready[p];
      @(negedge clk);
      // ---- update the model with what happened at the edge
      if (rd_pop) begin
        void'(q[rkey].pop_front());
        if (rd_free) begin
          q.delete(rkey); complete.delete(rkey); used--; served++; rkey = -1;
        end
      end
      for (int p = 0; p < NW; p++) begin
        if (will_alloc[p]) begin
          okey[p] = key(p + 1, next_tid[p]);
          next_tid[p] = (next_tid[p] + 1) % 256;
          q[okey[p]] = {};
          complete[okey[p]] = 0;
          open[p] = 1;
          used++;
        end
        if (accepted[p]) begin
          q[okey[p]].push_back(push_data[p]);
          left[p]--;
          if (push_last[p]) begin complete[okey[p]] = 1; open[p] = 0; end
        end
      end
    end
    check(served > 100, $sformatf("served %0d transactions", served));
    check(reordered > 10, $sformatf("out-of-order fetches %0d", reordered));
    check(full_seen > 0, "bank full reached");
    $display("served=%0d reordered=%0d full=%0d", served, reordered, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
