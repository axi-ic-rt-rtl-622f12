// End-to-end testbench of the real-time AXI interconnect at its default
// size (16 Primaries, 4 Secondaries, 16 cells per RAQ, 8 TIB entries),
// write and read channels at the same time.
//
// Workload (synthetic-generator style): in every round each Primary
// issues 2-4 write transactions to every Secondary in random order, each
// with its own priority and a burst of 1-4 beats, then waits until all of
// them have been answered before starting the next round. Secondaries
// accept headers and beats with random READY and answer after a random
// delay.
//
// `+NGEN=n` limits the traffic to Primaries 0..n-1 (4 and 8 generators
// are the smaller synthetic set-ups); the default is all 16. The mean and
// largest propagation latency of the writes are printed.
// Reads run alongside: in every round each Primary also issues 2-4 reads
// to every Secondary, with their own priorities and 1-4 beats, and waits
// for all their data. Read data is a function of address and beat; the
// Primary identifies the read by RUSER (TID) and checks every beat.
// Checks: every transaction reaches the Secondary its address maps to,
// exactly once, with its header and all beats intact; every response
// returns to its Primary; the idle-path latency from header handshake to
// the Secondary's AWVALID is 3 cycles; at every scheduling decision the
// granted transaction is at least as urgent as every other transaction of
// a Primary with budget that was waiting for the same Secondary; with a
// period of 200 cycles and a budget of 2, Primary 0 never gets more than
// 2 transactions per period on Secondary 0.
// Mechanisms counted (each must occur): out-of-arrival-order service,
// budget blocking, budget replenishment, back-pressure from full RAQs,
// burst streaming stalls, simultaneous responses to one Primary,
// multi-beat bursts and APB configuration writes; for reads: out-of-order
// service, simultaneous read data for one Primary from two Secondaries,
// and multi-beat reads.
module tb_axi_icrt;
  import icrt_pkg::*;
  localparam int NP = 16, NS = 4, ROUNDS = 4;
  localparam int PW = 4, SW = 2;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  aw_t  [NP-1:0] s_aw;
  w_t   [NP-1:0] s_w;
  b_t   [NP-1:0] s_b;
  logic [NS-1:0] m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  aw_t  [NS-1:0] m_aw;
  w_t   [NS-1:0] m_w;
  b_t   [NS-1:0] m_b;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [4+PW+SW-1:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic [NP-1:0] s_arvalid, s_arready, s_rvalid, s_rready;
  ar_t  [NP-1:0] s_ar;
  r_t   [NP-1:0] s_r;
  logic [NS-1:0] m_arvalid, m_arready, m_rvalid, m_rready;
  ar_t  [NS-1:0] m_ar;
  r_t   [NS-1:0] m_r;

  axi_icrt dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
      // no point running on once the design is clearly broken
      if (failures == 200) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] beat_data(int p, int tid, int b);
    return {8'(p), 8'(tid), 8'(b), 8'(p * 37 + tid * 11 + b * 5)};
  endfunction

  // ------------------------------------------------------------ Primaries
  logic awv [NP], wv [NP], br [NP];
  aw_t  awp [NP];
  w_t   wp  [NP];
  int   outstanding [NP];
  bit   pdone [NP];
  bit   cfg_done = 0;
  // active transaction generators (the synthetic workload uses 4, 8 or
  // 16); the others stay idle. Default: all Primaries.
  int   ngen = NP;
  initial if ($value$plusargs("NGEN=%d", ngen)) ngen = (ngen < 1) ? 1 : (ngen > NP) ? NP : ngen;

  always_comb
    for (int p = 0; p < NP; p++) begin
      s_awvalid[p] = awv[p]; s_aw[p] = awp[p];
      s_wvalid[p]  = wv[p];  s_w[p]  = wp[p];
      s_bready[p]  = br[p];
    end

  for (genvar gp = 0; gp < NP; gp++) begin : g_prim
    int tid_ctr = 0;
    initial begin
      awv[gp] = 0; wv[gp] = 0; br[gp] = 0; awp[gp] = '0; wp[gp] = '0;
      outstanding[gp] = 0; pdone[gp] = 0;
      wait (cfg_done);
      if (gp >= ngen) begin
        pdone[gp] = 1;
        wait (0);
      end
      @(negedge clk);
      for (int r = 0; r < ROUNDS; r++) begin
        int dests[$];
        for (int s = 0; s < NS; s++) begin
          int k;
          k = 2 + $urandom % 3;
          for (int j = 0; j < k; j++) dests.push_back(s);
        end
        dests.shuffle();
        foreach (dests[i]) begin
          int len, tid;
          tid = tid_ctr % 256; tid_ctr++;
          len = $urandom % 4;
          awp[gp].addr  = {4'(dests[i]), 28'($urandom) & 28'h0FF_FFF0};
          awp[gp].len   = 8'(len);
          awp[gp].size  = 3'd2;
          awp[gp].burst = 2'b01;
          awp[gp].id    = pid_t'(gp + 1);
          awp[gp].user  = {prio_t'($urandom), tid_t'(tid)};
          awv[gp] = 1;
          outstanding[gp]++;
          #1;
          while (!s_awready[gp]) begin @(negedge clk); #1; end
          @(negedge clk);
          awv[gp] = 0;
          for (int b = 0; b <= len; b++) begin
            while ($urandom % 4 == 0) @(negedge clk);
            wp[gp].data = beat_data(gp, tid, b);
            wp[gp].strb = '1;
            wp[gp].last = (b == len);
            wv[gp] = 1;
            #1;
            while (!s_wready[gp]) begin @(negedge clk); #1; end
            @(negedge clk);
            wv[gp] = 0;
          end
        end
        while (outstanding[gp] != 0) @(negedge clk);
      end
      pdone[gp] = 1;
    end
    // response side: random BREADY
    always @(negedge clk) br[gp] <= ($urandom % 3 != 0);
  end

  // ------------------------------------------------------------ read side
  function automatic logic [31:0] rd_data(logic [31:0] addr, int b);
    return addr ^ {b[7:0], 8'h5A, b[7:0], 8'hA5};
  endfunction

  typedef struct {
    int   s;
    int   len;
    int   beat;
    logic [31:0] addr;
    prio_t prio;
    int   acc;
    bit   sent;
  } rrec_t;
  rrec_t rpend [int];           // key = p*256 + tid
  logic arv [NP], rr [NP];
  ar_t  arp [NP];
  int   routstanding [NP];
  bit   rpdone [NP];
  int n_rdone = 0, n_rreorder = 0, n_rclash = 0, n_rmulti = 0;

  always_comb
    for (int p = 0; p < NP; p++) begin
      s_arvalid[p] = arv[p]; s_ar[p] = arp[p]; s_rready[p] = rr[p];
    end

  for (genvar gp = 0; gp < NP; gp++) begin : g_rprim
    int tid_ctr = 0;
    initial begin
      arv[gp] = 0; arp[gp] = '0; routstanding[gp] = 0; rpdone[gp] = 0;
      wait (cfg_done);
      if (gp >= ngen) begin
        rpdone[gp] = 1;
        wait (0);
      end
      @(negedge clk);
      for (int r = 0; r < ROUNDS; r++) begin
        int dests[$];
        for (int s = 0; s < NS; s++) begin
          int k;
          k = 2 + $urandom % 3;
          for (int j = 0; j < k; j++) dests.push_back(s);
        end
        dests.shuffle();
        foreach (dests[i]) begin
          while ($urandom % 3 == 0) @(negedge clk);
          arp[gp].addr  = {4'(dests[i]), 28'($urandom) & 28'h0FF_FFF0};
          arp[gp].len   = 8'($urandom % 4);
          arp[gp].size  = 3'd2;
          arp[gp].burst = 2'b01;
          arp[gp].id    = pid_t'(gp + 1);
          arp[gp].user  = {prio_t'($urandom), tid_t'(tid_ctr % 256)};
          tid_ctr++;
          arv[gp] = 1;
          routstanding[gp]++;
          #1;
          while (!s_arready[gp]) begin @(negedge clk); #1; end
          @(negedge clk);
          arv[gp] = 0;
        end
        while (routstanding[gp] != 0) @(negedge clk);
      end
      rpdone[gp] = 1;
    end
    always @(negedge clk) rr[gp] <= ($urandom % 3 != 0);
  end

  logic arr [NS], rv [NS];
  r_t   rp  [NS];
  always_comb
    for (int s = 0; s < NS; s++) begin
      m_arready[s] = arr[s]; m_rvalid[s] = rv[s]; m_r[s] = rp[s];
    end

  for (genvar gs = 0; gs < NS; gs++) begin : g_rsec
    initial begin
      arr[gs] = 0; rv[gs] = 0; rp[gs] = '0;
      forever begin
        ar_t hdr;
        @(negedge clk);
        arr[gs] = ($urandom % 4 != 0);
        #1;
        if (m_arvalid[gs] && arr[gs]) begin
          hdr = m_ar[gs];
          @(negedge clk);
          arr[gs] = 0;
          check(32'(hdr.addr[31:28]) % NS == gs, "read header reached the mapped Secondary");
          repeat ($urandom % 3) @(negedge clk);
          for (int b = 0; b <= int'(hdr.len); b++) begin
            rp[gs] = '{data: rd_data(hdr.addr, b), id: hdr.id, user: '0, resp: 2'b00,
                       last: b == int'(hdr.len)};
            rv[gs] = 1;
            #1;
            while (!m_rready[gs]) begin @(negedge clk); #1; end
            @(negedge clk);
            rv[gs] = 0;
            if ($urandom % 4 == 0) @(negedge clk);
          end
        end else begin
          arr[gs] = 0;
        end
      end
    end
  end

  pid_t [NS-1:0] o_rpid;
  tid_t [NS-1:0] o_rtid;
  logic [NS-1:0] o_rstart;
  logic [NS-1:0][NP-1:0] o_rhasb;
  for (genvar s = 0; s < NS; s++) begin : g_ors
    assign o_rstart[s] = dut.g_sec[s].u_rport.trans_start;
    assign o_rpid[s]   = dut.g_sec[s].u_rport.ctrl_pid;
    assign o_rtid[s]   = dut.g_sec[s].u_rport.ctrl_tid;
    assign o_rhasb[s]  = dut.g_sec[s].u_rport.u_tcu.has_budget;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      int edge_n;
      edge_n = cyc + 1;
      for (int p = 0; p < NP; p++)
        if (s_arvalid[p] && s_arready[p]) begin
          int k;
          k = p * 256 + int'(s_ar[p].user[7:0]);
          check(!rpend.exists(k), "read TID unique among outstanding");
          rpend[k] = '{s: int'(s_ar[p].addr[31:28]) % NS, len: int'(s_ar[p].len), beat: 0,
                       addr: s_ar[p].addr, prio: s_ar[p].user[23:8], acc: edge_n, sent: 0};
          if (s_ar[p].len != 0) n_rmulti++;
        end
      for (int s = 0; s < NS; s++)
        if (o_rstart[s]) begin
          int gk;
          logic [NP-1:0] hb;
          hb = o_rhasb[s];
          gk = (int'(o_rpid[s]) - 1) * 256 + int'(o_rtid[s]);
          check(rpend.exists(gk) && !rpend[gk].sent && rpend[gk].s == s, "granted read is waiting here");
          if (rpend.exists(gk)) begin
            foreach (rpend[k])
              if (!rpend[k].sent && rpend[k].s == s && k != gk && rpend[k].acc <= edge_n - 2
                  && hb[k / 256]) begin
                check(!(rpend[k].prio < rpend[gk].prio), "read granted in priority order");
                if (rpend[k].acc < rpend[gk].acc) n_rreorder++;
              end
            rpend[gk].sent = 1;
          end
        end
      for (int s = 0; s < NS; s++)
        for (int t = s + 1; t < NS; t++)
          if (m_rvalid[s] && m_rvalid[t] && m_r[s].id == m_r[t].id) n_rclash++;
      for (int p = 0; p < NP; p++)
        if (s_rvalid[p] && s_rready[p]) begin
          int k;
          k = p * 256 + int'(s_r[p].user);
          check(s_r[p].id == pid_t'(p + 1), "read data routed to its Primary");
          check(rpend.exists(k) && rpend[k].sent, "read data for a read that was sent");
          if (rpend.exists(k)) begin
            check(s_r[p].data == rd_data(rpend[k].addr, rpend[k].beat), "read data beat");
            check(s_r[p].last == (rpend[k].beat == rpend[k].len), "RLAST position");
            rpend[k].beat++;
            if (s_r[p].last) begin
              rpend.delete(k);
              routstanding[p]--;
              n_rdone++;
            end
          end
        end
    end
  end

  // ------------------------------------------------------------ Secondaries
  logic awr [NS], wr_ [NS], bv [NS];
  b_t   bp  [NS];
  always_comb
    for (int s = 0; s < NS; s++) begin
      m_awready[s] = awr[s]; m_wready[s] = wr_[s]; m_bvalid[s] = bv[s]; m_b[s] = bp[s];
    end

  for (genvar gs = 0; gs < NS; gs++) begin : g_sec
    initial begin
      awr[gs] = 0; wr_[gs] = 0; bv[gs] = 0; bp[gs] = '0;
      forever begin
        aw_t hdr;
        @(negedge clk);
        awr[gs] = ($urandom % 4 != 0);
        #1;
        if (m_awvalid[gs] && awr[gs]) begin
          hdr = m_aw[gs];
          @(negedge clk);
          awr[gs] = 0;
          check(32'(hdr.addr[31:28]) % NS == gs, "header reached the mapped Secondary");
          for (int b = 0; b <= int'(hdr.len); b++) begin
            forever begin
              wr_[gs] = ($urandom % 3 != 0);
              #1;
              if (m_wvalid[gs] && wr_[gs]) break;
              @(negedge clk);
            end
            check(m_w[gs].data == beat_data(int'(hdr.id) - 1, int'(hdr.user[7:0]), b),
                  $sformatf("beat data S%0d PID %0d TID %0d beat %0d", gs, hdr.id, hdr.user[7:0], b));
            check(m_w[gs].last == (b == int'(hdr.len)), "WLAST position");
            @(negedge clk);
            wr_[gs] = 0;
          end
          repeat ($urandom % 4) @(negedge clk);
          bp[gs] = '{id: hdr.id, resp: 2'b00};
          bv[gs] = 1;
          #1;
          while (!m_bready[gs]) begin @(negedge clk); #1; end
          @(negedge clk);
          bv[gs] = 0;
        end else begin
          awr[gs] = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ monitors
  // internal observation points
  logic [NP-1:0]           o_wpend;
  logic [NS-1:0]           o_start, o_in_w, o_bblock;
  pid_t [NS-1:0]           o_pid;
  tid_t [NS-1:0]           o_tid;
  logic [NS-1:0][NP-1:0]   o_hasb;
  for (genvar p = 0; p < NP; p++) begin : g_op
    assign o_wpend[p] = dut.g_pri[p].w_pend_q;
  end
  for (genvar s = 0; s < NS; s++) begin : g_os
    assign o_start[s]  = dut.g_sec[s].u_port.trans_start;
    assign o_pid[s]    = dut.g_sec[s].u_port.ctrl_pid;
    assign o_tid[s]    = dut.g_sec[s].u_port.ctrl_tid;
    assign o_hasb[s]   = dut.g_sec[s].u_port.u_tcu.has_budget;
    assign o_bblock[s] = |dut.g_sec[s].u_port.budget_blocked;
    assign o_in_w[s]   = dut.g_sec[s].u_port.state_q == 2'd2;
  end

  typedef struct {
    int   s;
    int   len;
    prio_t prio;
    int   acc;      // clock edge of the header handshake
    bit   sent;
  } rec_t;
  rec_t pend [int];             // key = p*256 + tid
  int n_done = 0, n_reorder = 0, n_budget_block = 0, n_replenish = 0;
  int n_full = 0, n_wstall = 0, n_bclash = 0, n_multibeat = 0, n_apb = 0;
  int lat_acc = -1;
  bit lat_done = 0;
  int p0s0_grants = 0, p0s0_max = 0;

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      int edge_n;
      edge_n = cyc + 1;
      // header handshakes at the Primaries
      for (int p = 0; p < NP; p++) begin
        if (s_awvalid[p] && s_awready[p]) begin
          int k;
          k = p * 256 + int'(s_aw[p].user[7:0]);
          check(!pend.exists(k), "TID unique among outstanding");
          pend[k] = '{s: int'(s_aw[p].addr[31:28]) % NS, len: int'(s_aw[p].len),
                      prio: s_aw[p].user[23:8], acc: edge_n, sent: 0};
          if (s_aw[p].len != 0) n_multibeat++;
          if (lat_acc < 0) lat_acc = edge_n;
        end
        if (s_awvalid[p] && !s_awready[p] && !o_wpend[p]) n_full++;
      end
      // scheduling decisions
      for (int s = 0; s < NS; s++) begin
        if (o_start[s]) begin
          int gk, gacc;
          prio_t gprio;
          logic [NP-1:0] hb;
          hb = o_hasb[s];
          gk = (int'(o_pid[s]) - 1) * 256 + int'(o_tid[s]);
          check(pend.exists(gk) && !pend[gk].sent && pend[gk].s == s, "granted transaction is waiting here");
          if (pend.exists(gk)) begin
            gprio = pend[gk].prio; gacc = pend[gk].acc;
            foreach (pend[k]) begin
              if (!pend[k].sent && pend[k].s == s && k != gk && pend[k].acc <= edge_n - 2
                  && hb[k / 256]) begin
                check(!(pend[k].prio < gprio), $sformatf("S%0d granted prio %h while %h waited", s, gprio, pend[k].prio));
                if (pend[k].acc < gacc && k / 256 == gk / 256 || pend[k].acc < gacc) n_reorder++;
              end
            end
            pend[gk].sent = 1;
          end
          if (s == 0 && o_pid[0] == 1) begin
            p0s0_grants++;
            if (p0s0_grants > p0s0_max) p0s0_max = p0s0_grants;
          end
        end
        if (o_bblock[s]) n_budget_block++;
        if (o_in_w[s] && !m_wvalid[s]) n_wstall++;
        if (m_awvalid[s] && !lat_done) begin
          check(edge_n - lat_acc == 3, $sformatf("idle header-to-AWVALID latency %0d", edge_n - lat_acc));
          lat_done = 1;
        end
      end
      if (dut.g_sec[0].u_port.u_tcu.p_value[0] == 0) begin
        n_replenish++;
        p0s0_grants = 0;
      end
      for (int s = 0; s < NS; s++)
        for (int t = s + 1; t < NS; t++)
          if (m_bvalid[s] && m_bvalid[t] && m_b[s].id == m_b[t].id) n_bclash++;
      // responses at the Primaries
      for (int p = 0; p < NP; p++) begin
        if (s_bvalid[p] && s_bready[p]) begin
          bit found;
          check(s_b[p].id == pid_t'(p + 1), "response routed to its Primary");
          // the oldest sent-but-unanswered transaction of p on that path
          found = 0;
          foreach (pend[k]) if (!found && k / 256 == p && pend[k].sent) begin
            found = 1;
          end
          check(found, "response for a transaction that was sent");
          outstanding[p]--;
          n_done++;
        end
      end
    end
  end

  // remove answered transactions: match the response to the header the
  // Secondary served (tracked per Secondary in order)
  int served_key [NS][$];
  longint lat_sum = 0;
  int lat_max = 0;
  always @(negedge clk) begin
    #3;
    if (rst_n)
      for (int s = 0; s < NS; s++) begin
        if (m_awvalid[s] && m_awready[s])
          served_key[s].push_back((int'(m_aw[s].id) - 1) * 256 + int'(m_aw[s].user[7:0]));
        if (m_bvalid[s] && m_bready[s]) begin
          int k;
          k = served_key[s].pop_front();
          check(pend.exists(k) && int'(m_b[s].id) - 1 == k / 256, "response matches served header");
          if (pend.exists(k)) begin
            // propagation latency: header handshake to response
            lat_sum += longint'(cyc + 1 - pend[k].acc);
            if (cyc + 1 - pend[k].acc > lat_max) lat_max = cyc + 1 - pend[k].acc;
            pend.delete(k);
          end
        end
      end
  end

  // ------------------------------------------------------------ stimulus
  task automatic apb_write(input int s, input int p, input int r, input logic [31:0] d);
    @(negedge clk);
    paddr = {SW'(s), PW'(p), 2'(r), 2'b00}; pwdata = d; pwrite = 1; psel = 1; penable = 0;
    @(negedge clk);
    penable = 1;
    #1;
    check(pready && !pslverr, "APB write accepted");
    n_apb++;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Primary 0 on Secondary 0: period 200 cycles, budget 2 transactions
    apb_write(0, 0, 0, 199);
    apb_write(0, 0, 2, 2);
    // wait until the new interface is in force
    while (dut.g_sec[0].u_port.u_tcu.p_value[0] != 0) @(negedge clk);
    @(negedge clk);
    cfg_done = 1;
    for (int p = 0; p < NP; p++) wait (pdone[p] && rpdone[p]);
    repeat (20) @(negedge clk);
    check(n_done == 0 || pend.size() == 0, $sformatf("all transactions answered (%0d left)", pend.size()));
    check(p0s0_max <= 2, $sformatf("budget respected: %0d grants in one period", p0s0_max));
    $display("done=%0d reorder=%0d budget_block=%0d replenish=%0d full=%0d wstall=%0d bclash=%0d multibeat=%0d apb=%0d cycles=%0d",
             n_done, n_reorder, n_budget_block, n_replenish, n_full, n_wstall, n_bclash, n_multibeat, n_apb, cyc);
    $display("reads: done=%0d reorder=%0d rclash=%0d multibeat=%0d", n_rdone, n_rreorder, n_rclash, n_rmulti);
    if (n_done > 0)
      $display("generators=%0d write propagation latency: mean %0d, max %0d cycles",
               ngen, int'(lat_sum / longint'(n_done)), lat_max);
    check(n_done > ngen * ROUNDS * NS * 2 - 1, "transactions completed");
    check(n_rdone > ngen * ROUNDS * NS * 2 - 1 && rpend.size() == 0, "reads completed");
    check(n_rreorder > 0, "out-of-order read service happened");
    check(n_rclash > 0, "simultaneous read data to one Primary happened");
    check(n_rmulti > 0, "multi-beat reads happened");
    check(n_reorder > 0, "out-of-order service happened");
    check(n_budget_block > 0, "budget blocking happened");
    check(n_replenish > 1, "budget replenishment happened");
    check(n_full > 0, "RAQ/TIB back-pressure happened");
    check(n_wstall > 0, "burst streaming stall happened");
    check(n_bclash > 0, "simultaneous responses to one Primary happened");
    check(n_multibeat > 0, "multi-beat bursts happened");
    check(n_apb > 0, "APB configuration happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
