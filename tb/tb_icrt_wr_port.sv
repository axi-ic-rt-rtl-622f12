// Self-checking testbench of one Secondary's write port (RAQs, TCU and
// sequencer), with 3 Primaries, 4 cells per RAQ and 4-beat bursts.
//  * idle latency: header taken at edge A -> AWVALID to the Secondary
//    after edge A+3;
//  * while the Secondary holds the first response back, four more
//    transactions are buffered (filling all cells: a fifth finds no
//    room); they must then be served in priority order, not arrival
//    order, each with its header and its burst intact;
//  * random traffic with a model of the expected service order.
module tb_icrt_wr_port;
  import icrt_pkg::*;
  localparam int N = 3, NC = 4, WD = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_pri = '0;
  cfg_reg_e cfg_reg = CFG_P_RESET;
  cnt_t cfg_data = '0;
  logic [N-1:0] aw_req = '0, aw_room, aw_take = '0, tib_we = '0;
  aw_t [N-1:0] aw_hdr = '0;
  tinfo_t [N-1:0] tib_info = '0;
  logic [N-1:0] w_valid = '0, w_ready;
  w_t [N-1:0] w_beat = '0;
  logic m_awvalid, m_awready = 0, m_wvalid, m_wready = 0, b_done = 0;
  aw_t m_aw;
  w_t m_w;
  logic busy, trans_start, trans_done;
  logic [N-1:0] budget_blocked;
  logic [2:0] aw_cells_free;
  int checks = 0, failures = 0;

  icrt_wr_port #(.N_PRI(N), .NCELLS(NC), .W_DEPTH(WD), .TIB_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] bd(int p, int tid, int b);
    return {8'(p), 8'(tid), 8'(b), 8'hC3};
  endfunction

  // offer one header of Primary p; returns the edge of the handshake
  task automatic put(input int p, input int tid, input prio_t pr, input int len, output bit ok);
    aw_hdr[p] = '{addr: 32'h1000_0000 | 32'(tid << 4), len: 8'(len), size: 3'd2, burst: 2'b01,
                  id: pid_t'(p + 1), user: {pr, tid_t'(tid)}};
    aw_req[p] = 1;
    #1;
    ok = aw_room[p];
    aw_take[p] = ok;
    @(negedge clk);
    aw_req[p] = 0; aw_take[p] = 0;
    if (ok) begin
      // decoded information arrives one cycle after the handshake
      tib_we[p] = 1; tib_info[p] = '{pid_t'(p + 1), tid_t'(tid), pr};
      // burst
      for (int b = 0; b <= len; b++) begin
        w_valid[p] = 1; w_beat[p] = '{data: bd(p, tid, b), strb: '1, last: b == len};
        #1;
        check(w_ready[p], "burst accepted into its reserved cell");
        @(negedge clk);
        tib_we[p] = 0;
      end
      w_valid[p] = 0;
    end
  endtask

  // serve one transaction as the Secondary; returns PID/TID served
  task automatic serve(output int p, output int tid, input int hold_b);
    aw_t h;
    m_awready = 1;
    #1;
    while (!m_awvalid) begin @(negedge clk); #1; end
    h = m_aw;
    @(negedge clk);
    m_awready = 0;
    p = int'(h.id) - 1; tid = int'(h.user[7:0]);
    for (int b = 0; b <= int'(h.len); b++) begin
      m_wready = 1;
      #1;
      while (!m_wvalid) begin @(negedge clk); #1; end
      check(m_w.data == bd(p, tid, b) && m_w.last == (b == int'(h.len)), "burst beat");
      @(negedge clk);
    end
    m_wready = 0;
    repeat (hold_b) @(negedge clk);
    b_done = 1;
    #1;
    check(trans_done, "transaction done with the response");
    @(negedge clk);
    b_done = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    int p, tid, a_edge, v_edge;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // ---- idle latency and a held response
    fork
      begin put(0, 1, 16'h0500, 0, ok); end
      begin
        a_edge = cyc;
        wait (m_awvalid);
        v_edge = cyc;
      end
    join
    @(negedge clk);
    check(ok, "first header taken");
    check(v_edge - a_edge == 3, $sformatf("idle latency %0d edges", v_edge - a_edge));
    // serve header+beat but keep the response back while others queue up
    fork
      serve(p, tid, 40);
      begin
        repeat (4) @(negedge clk);
        put(1, 2, 16'h0700, 3, ok); check(ok, "T2 taken");
        put(2, 3, 16'h0300, 1, ok); check(ok, "T3 taken");
        put(0, 4, 16'h0100, 2, ok); check(ok, "T4 taken");
        check(aw_cells_free == 1, "one cell left");
        put(1, 5, 16'h0050, 0, ok); check(ok, "T5 taken");
        check(aw_cells_free == 0, "bank full");
        put(2, 6, 16'h0001, 0, ok); check(!ok, "no room when the bank is full");
      end
    join
    check(p == 0 && tid == 1, "first served");
    begin
      int exp_tid [4] = '{5, 4, 3, 2};
      for (int k = 0; k < 4; k++) begin
        serve(p, tid, $urandom % 3);
        check(tid == exp_tid[k], $sformatf("priority order %0d: got TID %0d", k, tid));
      end
    end
    check(!busy && aw_cells_free == NC, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
