// Random Access Queue (RAQ): the transaction buffer that replaces the FIFO
// queues of a conventional interconnect. One RAQ buffers the AW headers
// and one the W bursts that are bound for one Secondary.
//
// Structure (after the description):
//   * RAQ bank of NCELLS bank cells, addressed 1..NCELLS (address 0 means
//     "no cell"). Each cell is a payload FIFO of DEPTH entries plus a cell
//     header {V, PID[7:0], TID[7:0]} (V at bit 16).
//   * one write controller (W_Ctrl) per Primary: it looks for a cell whose
//     V bit is 0, sets V and the header, then pushes the payload into that
//     cell's FIFO. Several write controllers can allocate in the same
//     cycle; they receive distinct cells, the lower-numbered port the
//     lower-numbered cell (this ranking is this design's own).
//   * one read controller (R_Ctrl): a combinational match of the scheduler's
//     PID+TID against all cell headers finds the cell's address in the same
//     cycle; the payload is popped from that cell, and freeing the cell
//     clears V.
//
// Write port i:
//   alloc_req  : ask for a cell for {alloc_pid, alloc_tid}; alloc_gnt says
//                one is available to this port in this cycle
//   alloc_commit : take it (only looked at with alloc_req && alloc_gnt);
//                the caller may need several resources before it commits
//   push_valid/push_data/push_last/push_ready : payload into the port's
//                open cell (or into the cell allocated in the same cycle);
//                push_last closes the port's cell
// Read port: rd_pid/rd_tid select; rd_hit, rd_addr (1-based) and, when the
//   cell holds payload, rd_valid with rd_data at the FIFO head; rd_pop
//   removes the head; rd_free releases the cell (may come with the pop).
// Allocation, push and pop take effect at the next clock edge.
module icrt_raq
  import icrt_pkg::*;
#(
  parameter int unsigned N_WR   = 16,   // write controllers (Primaries)
  parameter int unsigned NCELLS = 16,   // bank cells
  parameter int unsigned DEPTH  = 1,    // payload FIFO depth of a cell
  parameter int unsigned PWIDTH = 32,   // payload width
  localparam int unsigned AW    = $clog2(NCELLS + 1),
  localparam int unsigned DW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // write controllers
  input  logic  [N_WR-1:0]              alloc_req,
  input  logic  [N_WR-1:0]              alloc_commit,
  input  pid_t  [N_WR-1:0]              alloc_pid,
  input  tid_t  [N_WR-1:0]              alloc_tid,
  output logic  [N_WR-1:0]              alloc_gnt,
  input  logic  [N_WR-1:0]              push_valid,
  input  logic  [N_WR-1:0][PWIDTH-1:0]  push_data,
  input  logic  [N_WR-1:0]              push_last,
  output logic  [N_WR-1:0]              push_ready,
  // read controller
  input  pid_t                          rd_pid,
  input  tid_t                          rd_tid,
  output logic                          rd_hit,
  output logic  [AW-1:0]                rd_addr,
  output logic                          rd_valid,
  output logic  [PWIDTH-1:0]            rd_data,
  input  logic                          rd_pop,
  input  logic                          rd_free,
  // status
  output logic  [NCELLS-1:0]            cell_valid,
  output logic  [AW-1:0]                n_free
);

  typedef struct packed {
    logic v;
    pid_t pid;
    tid_t tid;
  } cell_hdr_t;

  cell_hdr_t                     hdr_q   [NCELLS];
  logic [PWIDTH-1:0]             mem_q   [NCELLS][DEPTH];
  logic [DW-1:0]                 wptr_q  [NCELLS];
  logic [DW-1:0]                 rptr_q  [NCELLS];
  logic [DW:0]                   count_q [NCELLS];

  // write controller state: the cell each port is filling
  logic [N_WR-1:0]               open_q;
  logic [N_WR-1:0][AW-1:0]       open_addr_q;

  // ---------------------------------------------------------------- W_Ctrl
  logic [N_WR-1:0][AW-1:0]       alloc_addr;   // 1-based, 0 = none
  logic [N_WR-1:0][AW-1:0]       tgt_addr;     // cell a push goes to
  logic [N_WR-1:0]               do_alloc;
  logic [N_WR-1:0]               do_push;

  always_comb begin
    logic [NCELLS-1:0] taken;
    taken = '0;
    for (int p = 0; p < N_WR; p++) begin
      alloc_addr[p] = '0;
      alloc_gnt[p]  = 1'b0;
      if (alloc_req[p]) begin
        for (int c = NCELLS - 1; c >= 0; c--)
          if (!hdr_q[c].v && !taken[c]) alloc_addr[p] = AW'(c + 1);
        if (alloc_addr[p] != '0) begin
          alloc_gnt[p] = 1'b1;
          taken[alloc_addr[p] - 1] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < N_WR; p++) begin
      do_alloc[p] = alloc_req[p] && alloc_gnt[p] && alloc_commit[p];
      tgt_addr[p] = do_alloc[p] ? alloc_addr[p] : open_addr_q[p];
      push_ready[p] = (do_alloc[p] || open_q[p])
                      && (count_q[tgt_addr[p] - 1] < (DW+1)'(DEPTH));
      do_push[p] = push_valid[p] && push_ready[p];
    end
  end

  // ---------------------------------------------------------------- R_Ctrl
  // Combinational ID-to-address conversion: compare every cell header
  // with {1, PID, TID}; at most one cell matches.
  logic [NCELLS-1:0] match;
  always_comb begin
    rd_addr = '0;
    for (int c = 0; c < NCELLS; c++) begin
      match[c] = hdr_q[c].v && hdr_q[c].pid == rd_pid && hdr_q[c].tid == rd_tid;
      if (match[c]) rd_addr = rd_addr | AW'(c + 1);
    end
    rd_hit   = |match;
    rd_valid = rd_hit && count_q[rd_addr - 1] != '0;
    rd_data  = rd_hit ? mem_q[rd_addr - 1][rptr_q[rd_addr - 1]] : '0;
  end

  // ---------------------------------------------------------------- bank
  logic [NCELLS-1:0] push_here, pop_here, free_here;
  always_comb begin
    for (int c = 0; c < NCELLS; c++) begin
      push_here[c] = 1'b0;
      for (int p = 0; p < N_WR; p++)
        if (do_push[p] && tgt_addr[p] == AW'(c + 1)) push_here[c] = 1'b1;
      pop_here[c]  = rd_pop && rd_valid && rd_addr == AW'(c + 1);
      free_here[c] = rd_free && rd_hit && rd_addr == AW'(c + 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCELLS; c++) begin
        hdr_q[c]   <= '0;
        wptr_q[c]  <= '0;
        rptr_q[c]  <= '0;
        count_q[c] <= '0;
      end
      open_q      <= '0;
      open_addr_q <= '0;
    end else begin
      for (int c = 0; c < NCELLS; c++) begin
        for (int p = 0; p < N_WR; p++) begin
          if (do_alloc[p] && alloc_addr[p] == AW'(c + 1)) begin
            hdr_q[c] <= '{v: 1'b1, pid: alloc_pid[p], tid: alloc_tid[p]};
          end
        end
        if (free_here[c]) begin
          hdr_q[c].v <= 1'b0;
          wptr_q[c]  <= '0;
          rptr_q[c]  <= '0;
          count_q[c] <= '0;
        end else begin
          if (push_here[c]) wptr_q[c] <= (wptr_q[c] == DW'(DEPTH - 1)) ? '0 : wptr_q[c] + DW'(1);
          if (pop_here[c])  rptr_q[c] <= (rptr_q[c] == DW'(DEPTH - 1)) ? '0 : rptr_q[c] + DW'(1);
          count_q[c] <= count_q[c] + (DW+1)'(push_here[c]) - (DW+1)'(pop_here[c]);
        end
      end
      for (int p = 0; p < N_WR; p++) begin
        if (do_push[p] && push_last[p]) begin
          open_q[p] <= 1'b0;
        end else if (do_alloc[p]) begin
          open_q[p]      <= 1'b1;
          open_addr_q[p] <= alloc_addr[p];
        end
      end
    end
  end

  // payload storage (no reset: only written entries are ever read)
  always_ff @(posedge clk) begin
    for (int p = 0; p < N_WR; p++)
      if (do_push[p])
        mem_q[tgt_addr[p] - 1][wptr_q[tgt_addr[p] - 1]] <= push_data[p];
  end

  always_comb begin
    n_free = '0;
    for (int c = 0; c < NCELLS; c++) begin
      cell_valid[c] = hdr_q[c].v;
      n_free += AW'(!hdr_q[c].v);
    end
  end

  // at most one cell may carry a given {PID, TID}
  always_ff @(posedge clk)
    if (rst_n) a_unique_match: assert ($onehot0(match))
      else $error("two RAQ cells carry the same PID+TID");

endmodule
