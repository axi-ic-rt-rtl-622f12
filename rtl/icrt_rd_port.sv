// Read side of one Primary port of the interconnect (the port that drives
// one Secondary): its AR RAQ, its TCU and the sequencer that plays the
// scheduled read transactions out to the Secondary. It is built the same
// way as the write side, with the read channels in place of AW/W/B.
//
// Request side (from the N_PRI Secondary ports, already routed by
// destination): a read header of Primary p is accepted (ar_take[p]) only
// when this port can give it an AR cell and a TIB entry; ar_room[p]
// reports that. The AXI-decoder's information reaches the TIB one cycle
// after the handshake.
// Secondary side: one transaction at a time. The sequencer
//   IDLE : waits for the TCU decision (PID+TID), takes it (grant)
//   AR   : finds the header cell by PID+TID, sends it, frees the cell
//   R    : the read data travels back to the Primary outside this block,
//          tagged with `cur_tid`; `r_last_done` (last beat handed back)
//          ends the transaction.
// Timing is that of the write side: with nothing else waiting, ARVALID
// to the Secondary rises after the third edge counted from the header
// handshake. The sequencer and the end-of-transaction rule are this
// design's own.
module icrt_rd_port
  import icrt_pkg::*;
#(
  parameter int unsigned N_PRI      = 16,
  parameter int unsigned NCELLS     = 16,
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
  // read headers from the Primaries
  input  logic   [N_PRI-1:0]   ar_req,    // header for this port on the channel
  input  ar_t    [N_PRI-1:0]   ar_hdr,
  output logic   [N_PRI-1:0]   ar_room,   // this port can take it
  input  logic   [N_PRI-1:0]   ar_take,   // header handshake happens
  // decoded information from the AXI-decoders
  input  logic   [N_PRI-1:0]   tib_we,
  input  tinfo_t [N_PRI-1:0]   tib_info,
  // Secondary side
  output logic                 m_arvalid,
  input  logic                 m_arready,
  output ar_t                  m_ar,
  input  logic                 r_last_done, // last read beat handed back
  output tid_t                 cur_tid,     // TID of the read being served
  // observation
  output logic                 busy,
  output logic                 trans_start,
  output logic                 trans_done,
  output logic   [N_PRI-1:0]   budget_blocked,
  output logic   [$clog2(NCELLS+1)-1:0] ar_cells_free
);

  localparam int unsigned ARB = $bits(ar_t);
  localparam int unsigned IW  = (TIB_DEPTH > 1) ? $clog2(TIB_DEPTH) : 1;
  localparam int unsigned CA  = $clog2(NCELLS + 1);

  typedef enum logic [1:0] {S_IDLE, S_AR, S_R} state_e;
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

  // ------------------------------------------------------------ RAQ
  pid_t [N_PRI-1:0]          a_pid;
  tid_t [N_PRI-1:0]          a_tid;
  logic [N_PRI-1:0]          ar_gnt, ar_push_ready, tib_ok;
  logic [N_PRI-1:0][ARB-1:0] ar_bits;

  for (genvar p = 0; p < N_PRI; p++) begin : g_pri
    assign a_pid[p]   = ar_hdr[p].id;
    assign a_tid[p]   = ar_hdr[p].user[TID_W-1:0];
    assign ar_bits[p] = ar_hdr[p];
    // a TIB write still in flight occupies an entry already
    assign tib_ok[p]  = tib_n_free[p] > (IW+1)'(tib_we[p]);
    assign ar_room[p] = ar_gnt[p] && tib_ok[p];
  end

  logic              ar_rd_hit, ar_rd_valid, ar_rd_pop;
  logic [CA-1:0]     ar_rd_addr;
  logic [ARB-1:0]    ar_rd_data;
  logic [NCELLS-1:0] ar_cell_valid;

  icrt_raq #(
    .N_WR  (N_PRI),
    .NCELLS(NCELLS),
    .DEPTH (1),
    .PWIDTH(ARB)
  ) u_ar_raq (
    .clk         (clk),
    .rst_n       (rst_n),
    .alloc_req   (ar_req),
    .alloc_commit(ar_take),
    .alloc_pid   (a_pid),
    .alloc_tid   (a_tid),
    .alloc_gnt   (ar_gnt),
    .push_valid  (ar_take),
    .push_data   (ar_bits),
    .push_last   ({N_PRI{1'b1}}),
    .push_ready  (ar_push_ready),
    .rd_pid      (cur_pid_q),
    .rd_tid      (cur_tid_q),
    .rd_hit      (ar_rd_hit),
    .rd_addr     (ar_rd_addr),
    .rd_valid    (ar_rd_valid),
    .rd_data     (ar_rd_data),
    .rd_pop      (ar_rd_pop),
    .rd_free     (ar_rd_pop),
    .cell_valid  (ar_cell_valid),
    .n_free      (ar_cells_free)
  );

  // ------------------------------------------------------------ sequencer
  assign m_ar      = ar_t'(ar_rd_data);
  assign m_arvalid = (state_q == S_AR) && ar_rd_valid;
  assign ar_rd_pop = m_arvalid && m_arready;

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
          state_q   <= S_AR;
        end
        S_AR:   if (ar_rd_pop)   state_q <= S_R;
        S_R:    if (r_last_done) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign cur_tid     = cur_tid_q;
  assign busy        = (state_q != S_IDLE);
  assign trans_start = grant;
  assign trans_done  = (state_q == S_R) && r_last_done;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_hdr_present: assert (state_q != S_AR || ar_rd_hit)
        else $error("scheduled read header not buffered");
      a_take_has_room: assert ((ar_req & ar_room & ar_take) == ar_take)
        else $error("read header taken without room");
    end
  end

endmodule
