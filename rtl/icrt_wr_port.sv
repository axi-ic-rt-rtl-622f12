// Write side of one Primary port of the interconnect (the port that drives
// one Secondary): its AW RAQ, its W RAQ, its TCU and the sequencer that
// plays the scheduled transactions out to the Secondary.
//
// Request side (from the N_PRI Secondary ports, already routed by
// destination):
//   * a header of Primary p is accepted (aw_take[p]) only when this port
//     can give it an AW cell, a W cell (reserved for its burst) and a TIB
//     entry; aw_room[p] reports that. Header and cell reservation happen
//     in the same cycle; the AXI-decoder's information reaches the TIB one
//     cycle later.
//   * the W beats of Primary p are pushed into its reserved W cell.
// Secondary side: one transaction at a time (one time slot). The sequencer
//   IDLE : waits for the TCU decision (PID+TID), takes it (grant)
//   AW   : finds the header cell by PID+TID, sends it, frees the cell
//   W    : finds the burst cell by PID+TID, streams beats until WLAST,
//          frees the cell (stalls while beats have not yet arrived)
//   B    : waits for the write response to pass back to the Primary
//          (b_done), then signals transaction done and returns to IDLE.
// A transaction thus occupies the Secondary from its grant to its write
// response; the next decision is taken in the cycle after. Serving one
// transaction per slot follows the scheduling model; the state machine
// itself is this design's.
module icrt_wr_port
  import icrt_pkg::*;
#(
  parameter int unsigned N_PRI      = 16,
  parameter int unsigned NCELLS     = 16,
  parameter int unsigned W_DEPTH    = 16,
  parameter int unsigned TIB_DEPTH  = 8,
  parameter cnt_t        DEF_PERIOD = cnt_t'(1023),
  parameter cnt_t        DEF_BUDGET = cnt_t'(1023),
  localparam int unsigned PW        = (N_PRI > 1) ? $clog2(N_PRI) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration of this port's global scheduler
  input  logic                 cfg_we,
  input  logic [PW-1:0]        cfg_pri,
  input  cfg_reg_e             cfg_reg,
  input  cnt_t                 cfg_data,
  // headers from the Primaries
  input  logic   [N_PRI-1:0]   aw_req,    // header for this port on the channel
  input  aw_t    [N_PRI-1:0]   aw_hdr,
  output logic   [N_PRI-1:0]   aw_room,   // this port can take it
  input  logic   [N_PRI-1:0]   aw_take,   // header handshake happens
  // decoded information from the AXI-decoders
  input  logic   [N_PRI-1:0]   tib_we,
  input  tinfo_t [N_PRI-1:0]   tib_info,
  // write beats from the Primaries
  input  logic   [N_PRI-1:0]   w_valid,
  input  w_t     [N_PRI-1:0]   w_beat,
  output logic   [N_PRI-1:0]   w_ready,
  // Secondary side
  output logic                 m_awvalid,
  input  logic                 m_awready,
  output aw_t                  m_aw,
  output logic                 m_wvalid,
  input  logic                 m_wready,
  output w_t                   m_w,
  input  logic                 b_done,     // write response handed back
  // observation
  output logic                 busy,
  output logic                 trans_start,
  output logic                 trans_done,
  output logic   [N_PRI-1:0]   budget_blocked,
  output logic   [$clog2(NCELLS+1)-1:0] aw_cells_free
);

  localparam int unsigned AWB = $bits(aw_t);
  localparam int unsigned WB  = $bits(w_t);
  localparam int unsigned IW  = (TIB_DEPTH > 1) ? $clog2(TIB_DEPTH) : 1;
  localparam int unsigned CA  = $clog2(NCELLS + 1);

  typedef enum logic [1:0] {S_IDLE, S_AW, S_W, S_B} state_e;
  state_e state_q;
  pid_t   cur_pid_q;
  tid_t   cur_tid_q;

  // ------------------------------------------------------------ TCU
  logic                     ctrl_valid;
  pid_t                     ctrl_pid;
  tid_t                     ctrl_tid;
  prio_t                    ctrl_prio;
  logic                     grant;
  logic [N_PRI-1:0][IW:0]   tib_n_free;
  cnt_t [N_PRI-1:0]         s_value;

  icrt_tcu #(
    .N_PRI     (N_PRI),
    .TIB_DEPTH (TIB_DEPTH),
    .DEF_PERIOD(DEF_PERIOD),
    .DEF_BUDGET(DEF_BUDGET)
  ) u_tcu (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_we        (cfg_we),
    .cfg_pri       (cfg_pri),
    .cfg_reg       (cfg_reg),
    .cfg_data      (cfg_data),
    .tib_we        (tib_we),
    .tib_info      (tib_info),
    .tib_n_free    (tib_n_free),
    .ctrl_valid    (ctrl_valid),
    .ctrl_pid      (ctrl_pid),
    .ctrl_tid      (ctrl_tid),
    .ctrl_prio     (ctrl_prio),
    .grant         (grant),
    .budget_blocked(budget_blocked),
    .s_value       (s_value)
  );

  assign grant = (state_q == S_IDLE) && ctrl_valid;

  // ------------------------------------------------------------ RAQs
  pid_t [N_PRI-1:0]          a_pid;
  tid_t [N_PRI-1:0]          a_tid;
  logic [N_PRI-1:0]          aw_gnt, w_gnt, aw_push_ready;
  logic [N_PRI-1:0]          tib_ok;
  logic [N_PRI-1:0][AWB-1:0] aw_bits;
  logic [N_PRI-1:0][WB-1:0]  w_bits;
  logic [N_PRI-1:0]          w_last;

  for (genvar p = 0; p < N_PRI; p++) begin : g_pri
    assign a_pid[p]   = aw_hdr[p].id;
    assign a_tid[p]   = aw_hdr[p].user[TID_W-1:0];
    assign aw_bits[p] = aw_hdr[p];
    assign w_bits[p]  = w_beat[p];
    assign w_last[p]  = w_beat[p].last;
    // a TIB write still in flight occupies an entry already
    assign tib_ok[p]  = tib_n_free[p] > (IW+1)'(tib_we[p]);
    assign aw_room[p] = aw_gnt[p] && w_gnt[p] && tib_ok[p];
  end

  logic           aw_rd_hit, aw_rd_valid, aw_rd_pop;
  logic [CA-1:0]  aw_rd_addr;
  logic [AWB-1:0] aw_rd_data;
  logic [NCELLS-1:0] aw_cell_valid;

  icrt_raq #(
    .N_WR  (N_PRI),
    .NCELLS(NCELLS),
    .DEPTH (1),
    .PWIDTH(AWB)
  ) u_aw_raq (
    .clk         (clk),
    .rst_n       (rst_n),
    .alloc_req   (aw_req),
    .alloc_commit(aw_take),
    .alloc_pid   (a_pid),
    .alloc_tid   (a_tid),
    .alloc_gnt   (aw_gnt),
    .push_valid  (aw_take),
    .push_data   (aw_bits),
    .push_last   ({N_PRI{1'b1}}),
    .push_ready  (aw_push_ready),
    .rd_pid      (cur_pid_q),
    .rd_tid      (cur_tid_q),
    .rd_hit      (aw_rd_hit),
    .rd_addr     (aw_rd_addr),
    .rd_valid    (aw_rd_valid),
    .rd_data     (aw_rd_data),
    .rd_pop      (aw_rd_pop),
    .rd_free     (aw_rd_pop),
    .cell_valid  (aw_cell_valid),
    .n_free      (aw_cells_free)
  );

  logic           w_rd_hit, w_rd_valid, w_rd_pop, w_rd_free;
  logic [CA-1:0]  w_rd_addr;
  logic [WB-1:0]  w_rd_data;
  logic [NCELLS-1:0] w_cell_valid;
  logic [CA-1:0]  w_cells_free;

  icrt_raq #(
    .N_WR  (N_PRI),
    .NCELLS(NCELLS),
    .DEPTH (W_DEPTH),
    .PWIDTH(WB)
  ) u_w_raq (
    .clk         (clk),
    .rst_n       (rst_n),
    .alloc_req   (aw_req),
    .alloc_commit(aw_take),
    .alloc_pid   (a_pid),
    .alloc_tid   (a_tid),
    .alloc_gnt   (w_gnt),
    .push_valid  (w_valid),
    .push_data   (w_bits),
    .push_last   (w_last),
    .push_ready  (w_ready),
    .rd_pid      (cur_pid_q),
    .rd_tid      (cur_tid_q),
    .rd_hit      (w_rd_hit),
    .rd_addr     (w_rd_addr),
    .rd_valid    (w_rd_valid),
    .rd_data     (w_rd_data),
    .rd_pop      (w_rd_pop),
    .rd_free     (w_rd_free),
    .cell_valid  (w_cell_valid),
    .n_free      (w_cells_free)
  );

  // ------------------------------------------------------------ sequencer
  assign m_aw      = aw_t'(aw_rd_data);
  assign m_awvalid = (state_q == S_AW) && aw_rd_valid;
  assign aw_rd_pop = m_awvalid && m_awready;

  assign m_w       = w_t'(w_rd_data);
  assign m_wvalid  = (state_q == S_W) && w_rd_valid;
  assign w_rd_pop  = m_wvalid && m_wready;
  assign w_rd_free = w_rd_pop && m_w.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cur_pid_q <= '0;
      cur_tid_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (grant) begin
          cur_pid_q <= ctrl_pid;
          cur_tid_q <= ctrl_tid;
          state_q   <= S_AW;
        end
        S_AW:   if (aw_rd_pop) state_q <= S_W;
        S_W:    if (w_rd_free) state_q <= S_B;
        S_B:    if (b_done)    state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy        = (state_q != S_IDLE);
  assign trans_start = grant;
  assign trans_done  = (state_q == S_B) && b_done;

  // The scheduled header must be buffered: the TIB entry is written a
  // cycle after the AW cell.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_hdr_present: assert (state_q != S_AW || aw_rd_hit)
        else $error("scheduled header not buffered");
      a_take_has_room: assert ((aw_req & aw_room & aw_take) == aw_take)
        else $error("header taken without room");
    end
  end

endmodule
