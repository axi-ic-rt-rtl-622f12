// Self-checking testbench of one Secondary's read port (AR RAQ, TCU and
// sequencer), with 3 Primaries and 4 cells.
//  * idle latency: header taken at edge A -> ARVALID to the Secondary
//    after edge A+3;
//  * while the first read's data is still being returned, four more reads
//    are buffered (filling all cells: a fifth finds no room); they must
//    then be served in priority order, not arrival order, each header
//    intact, and each only after the previous one's last data beat.
module tb_icrt_rd_port;
  import icrt_pkg::*;
  localparam int N = 3, NC = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_pri = '0;
  cfg_reg_e cfg_reg = CFG_P_RESET;
  cnt_t cfg_data = '0;
  logic [N-1:0] ar_req = '0, ar_room, ar_take = '0, tib_we = '0;
  ar_t [N-1:0] ar_hdr = '0;
  tinfo_t [N-1:0] tib_info = '0;
  logic m_arvalid, m_arready = 0, r_last_done = 0;
  ar_t m_ar;
  tid_t cur_tid;
  logic busy, trans_start, trans_done;
  logic [N-1:0] budget_blocked;
  logic [2:0] ar_cells_free;
  int checks = 0, failures = 0;

  icrt_rd_port #(.N_PRI(N), .NCELLS(NC), .TIB_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input int p, input int tid, input prio_t pr, output bit ok);
    ar_hdr[p] = '{addr: 32'h2000_0000 | 32'(tid << 4), len: 8'(tid), size: 3'd2, burst: 2'b01,
                  id: pid_t'(p + 1), user: {pr, tid_t'(tid)}};
    ar_req[p] = 1;
    #1;
    ok = ar_room[p];
    ar_take[p] = ok;
    @(negedge clk);
    ar_req[p] = 0; ar_take[p] = 0;
    if (ok) begin
      tib_we[p] = 1; tib_info[p] = '{pid_t'(p + 1), tid_t'(tid), pr};
      @(negedge clk);
      tib_we[p] = 0;
    end
  endtask

  // serve one read as the Secondary; its data takes `beats` cycles
  task automatic serve(output int p, output int tid, input int beats);
    ar_t h;
    m_arready = 1;
    #1;
    while (!m_arvalid) begin @(negedge clk); #1; end
    h = m_ar;
    @(negedge clk);
    m_arready = 0;
    p = int'(h.id) - 1; tid = int'(h.user[7:0]);
    check(h.addr == (32'h2000_0000 | 32'(tid << 4)) && int'(h.len) == tid, "read header intact");
    repeat (beats) begin
      #1;
      check(busy && !m_arvalid, "no new read while data returns");
      check(cur_tid == tid_t'(tid), "data tagged with the read's TID");
      @(negedge clk);
    end
    r_last_done = 1;
    #1;
    check(trans_done, "transaction done with the last beat");
    @(negedge clk);
    r_last_done = 0;
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
    fork
      begin put(0, 1, 16'h0500, ok); end
      begin
        a_edge = cyc;
        wait (m_arvalid);
        v_edge = cyc;
      end
    join
    @(negedge clk);
    check(ok, "first header taken");
    check(v_edge - a_edge == 3, $sformatf("idle latency %0d edges", v_edge - a_edge));
    fork
      serve(p, tid, 30);
      begin
        repeat (4) @(negedge clk);
        put(1, 2, 16'h0700, ok); check(ok, "R2 taken");
        put(2, 3, 16'h0300, ok); check(ok, "R3 taken");
        put(0, 4, 16'h0100, ok); check(ok, "R4 taken");
        check(ar_cells_free == 1, "one cell left");
        put(1, 5, 16'h0050, ok); check(ok, "R5 taken");
        check(ar_cells_free == 0, "bank full");
        put(2, 6, 16'h0001, ok); check(!ok, "no room when the bank is full");
      end
    join
    check(p == 0 && tid == 1, "first served");
    begin
      int exp_tid [4] = '{5, 4, 3, 2};
      for (int k = 0; k < 4; k++) begin
        serve(p, tid, 1 + $urandom % 4);
        check(tid == exp_tid[k], $sformatf("priority order %0d: got TID %0d", k, tid));
      end
    end
    check(!busy && ar_cells_free == NC, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
