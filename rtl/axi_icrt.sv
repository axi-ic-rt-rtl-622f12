// Real-time AXI interconnect: write channels (AW, W, B) and read channels
// (AR, R).
//
// N_PRI Primaries (processors, DMAs, accelerators) reach N_SEC Secondaries
// (memories, I/O) through this interconnect. Instead of per-port FIFO
// queues it keeps, for every Secondary, one Random Access Queue (RAQ) for
// write headers and one for write bursts, shared by all Primaries, and a
// Transaction Control Unit (TCU) that decides which buffered transaction
// the Secondary serves next. Any buffered transaction can be taken out of
// a RAQ, so a later, more urgent transaction is never stuck behind an
// earlier, less urgent one.
//
// Per Primary (interconnect slave port, "Secondary port"):
//   * an AXI-decoder watches AW: at each header handshake it extracts the
//     destination (address look-up table), the PID (AWID), the TID
//     (AWUSER[7:0]) and the 16-bit priority (AWUSER[23:8]) and writes them
//     into the TIB of the destination's TCU one cycle later;
//   * the header goes into the destination's AW RAQ and a cell of its W
//     RAQ is reserved for the burst; AWREADY is 1 only when both cells and
//     a TIB entry are free. One burst is outstanding on W per Primary: the
//     next header waits until the previous burst's WLAST was accepted
//     (W carries no ID, so W follows AW order). This W tracking is this
//     design's choice.
// Per Secondary (interconnect master port, "Primary port"): icrt_wr_port
//   holds the RAQs, the TCU and the sequencer issuing one transaction at a
//   time (header, burst, then waits for the response).
// Response path: B is passed through without buffering. BID carries the
//   PID, which selects the Primary (PID p+1 -> Primary p); when several
//   Secondaries answer the same Primary at once, the lowest-numbered
//   Secondary goes first (this design's choice).
// Read channels: built the same way. Per Primary a second AXI-decoder
//   watches AR; per Secondary icrt_rd_port holds an AR RAQ, a TCU and a
//   sequencer (header, then wait for the last data beat). R data is passed
//   through like B, routed by RID = PID, with RUSER set to the TID of the
//   read being served so that the Primary can tell its reads apart. Once
//   a Secondary has started a burst to a Primary, that Primary takes R
//   only from it until RLAST, so bursts never interleave (this design's
//   choice, as is the lowest-Secondary-first rule among new bursts).
// Configuration: an APB slave programs every TCU's periodic-server
//   interfaces (period, budget, Primary priority). A write for Secondary
//   s programs the write-side and the read-side TCU of s alike (this
//   design's choice).
//
// Conventions: Primary p must drive AWID = p+1 and use each TID only once
// among its outstanding transactions; Secondaries return BID = AWID.
// ARID = p+1 and unique ARUSER TIDs likewise; RID = ARID.
// Priorities: numerically smaller = more urgent.
module axi_icrt
  import icrt_pkg::*;
#(
  parameter int unsigned N_PRI      = 16,
  parameter int unsigned N_SEC      = 4,
  parameter int unsigned NCELLS     = 16,
  parameter int unsigned W_DEPTH    = 16,
  parameter int unsigned TIB_DEPTH  = 8,
  parameter cnt_t        DEF_PERIOD = cnt_t'(1023),
  parameter cnt_t        DEF_BUDGET = cnt_t'(1023),
  parameter lut_t        ADDR_LUT   = lut_mod(N_SEC),
  localparam int unsigned PW        = (N_PRI > 1) ? $clog2(N_PRI) : 1,
  localparam int unsigned SW        = (N_SEC > 1) ? $clog2(N_SEC) : 1,
  localparam int unsigned APB_AW    = 4 + PW + SW
) (
  input  logic                clk,
  input  logic                rst_n,
  // slave ports, one per Primary
  input  logic [N_PRI-1:0]    s_awvalid,
  output logic [N_PRI-1:0]    s_awready,
  input  aw_t  [N_PRI-1:0]    s_aw,
  input  logic [N_PRI-1:0]    s_wvalid,
  output logic [N_PRI-1:0]    s_wready,
  input  w_t   [N_PRI-1:0]    s_w,
  output logic [N_PRI-1:0]    s_bvalid,
  input  logic [N_PRI-1:0]    s_bready,
  output b_t   [N_PRI-1:0]    s_b,
  // master ports, one per Secondary
  output logic [N_SEC-1:0]    m_awvalid,
  input  logic [N_SEC-1:0]    m_awready,
  output aw_t  [N_SEC-1:0]    m_aw,
  output logic [N_SEC-1:0]    m_wvalid,
  input  logic [N_SEC-1:0]    m_wready,
  output w_t   [N_SEC-1:0]    m_w,
  input  logic [N_SEC-1:0]    m_bvalid,
  output logic [N_SEC-1:0]    m_bready,
  input  b_t   [N_SEC-1:0]    m_b,
  // read channels: slave ports (per Primary), master ports (per Secondary)
  input  logic [N_PRI-1:0]    s_arvalid,
  output logic [N_PRI-1:0]    s_arready,
  input  ar_t  [N_PRI-1:0]    s_ar,
  output logic [N_PRI-1:0]    s_rvalid,
  input  logic [N_PRI-1:0]    s_rready,
  output r_t   [N_PRI-1:0]    s_r,
  output logic [N_SEC-1:0]    m_arvalid,
  input  logic [N_SEC-1:0]    m_arready,
  output ar_t  [N_SEC-1:0]    m_ar,
  input  logic [N_SEC-1:0]    m_rvalid,
  output logic [N_SEC-1:0]    m_rready,
  input  r_t   [N_SEC-1:0]    m_r,
  // APB configuration port
  input  logic                psel,
  input  logic                penable,
  input  logic                pwrite,
  input  logic [APB_AW-1:0]   paddr,
  input  logic [31:0]         pwdata,
  output logic                pready,
  output logic [31:0]         prdata,
  output logic                pslverr
);

  // ------------------------------------------------------------ config
  logic          cfg_we;
  logic [SW-1:0] cfg_sec;
  logic [PW-1:0] cfg_pri;
  cfg_reg_e      cfg_reg;
  cnt_t          cfg_data;

  icrt_apb_cfg #(.N_PRI(N_PRI), .N_SEC(N_SEC)) u_cfg (
    .clk     (clk),
    .rst_n   (rst_n),
    .psel    (psel),
    .penable (penable),
    .pwrite  (pwrite),
    .paddr   (paddr),
    .pwdata  (pwdata),
    .pready  (pready),
    .prdata  (prdata),
    .pslverr (pslverr),
    .cfg_we  (cfg_we),
    .cfg_sec (cfg_sec),
    .cfg_pri (cfg_pri),
    .cfg_reg (cfg_reg),
    .cfg_data(cfg_data)
  );

  // ------------------------------------------------------------ routing
  logic   [N_SEC-1:0][N_PRI-1:0] aw_req, aw_room, aw_take, tib_we;
  logic   [N_SEC-1:0][N_PRI-1:0] w_valid, w_ready;
  tinfo_t [N_PRI-1:0]            tib_info;
  logic   [N_SEC-1:0]            b_done;
  logic   [N_SEC-1:0][N_PRI-1:0] ar_req, ar_room, ar_take, rtib_we;
  tinfo_t [N_PRI-1:0]            rtib_info;
  logic   [N_SEC-1:0]            r_last_done;
  tid_t   [N_SEC-1:0]            r_tid;
  logic   [N_PRI-1:0]            r_sel_v;
  logic   [N_PRI-1:0][SW-1:0]    r_sel;

  for (genvar p = 0; p < N_PRI; p++) begin : g_pri
    logic          dec_valid;
    logic [SW-1:0] dec_tcu;
    logic [SW-1:0] dest;
    pid_t          dec_pid;
    tid_t          dec_tid;
    prio_t         dec_prio;
    logic          w_pend_q;
    logic [SW-1:0] w_dest_q;
    logic          aw_hs, w_hs;

    icrt_axi_decoder #(.N_SEC(N_SEC), .ADDR_LUT(ADDR_LUT)) u_dec (
      .clk       (clk),
      .rst_n     (rst_n),
      .valid     (s_awvalid[p]),
      .ready     (s_awready[p]),
      .addr      (s_aw[p].addr),
      .id        (s_aw[p].id),
      .user      (s_aw[p].user),
      .info_valid(dec_valid),
      .tcu_id    (dec_tcu),
      .pid       (dec_pid),
      .tid       (dec_tid),
      .prio      (dec_prio),
      .dest      (dest)
    );

    assign tib_info[p] = '{pid: dec_pid, tid: dec_tid, prio: dec_prio};
    assign s_awready[p] = !w_pend_q && aw_room[dest][p];
    assign aw_hs        = s_awvalid[p] && s_awready[p];
    assign s_wready[p]  = w_pend_q && w_ready[w_dest_q][p];
    assign w_hs         = s_wvalid[p] && s_wready[p];

    for (genvar s = 0; s < N_SEC; s++) begin : g_sec
      assign aw_req[s][p]  = s_awvalid[p] && !w_pend_q && dest == SW'(s);
      assign aw_take[s][p] = aw_hs && dest == SW'(s);
      assign tib_we[s][p]  = dec_valid && dec_tcu == SW'(s);
      assign w_valid[s][p] = s_wvalid[p] && w_pend_q && w_dest_q == SW'(s);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        w_pend_q <= 1'b0;
        w_dest_q <= '0;
      end else if (aw_hs) begin
        w_pend_q <= 1'b1;
        w_dest_q <= dest;
      end else if (w_hs && s_w[p].last) begin
        w_pend_q <= 1'b0;
      end
    end

    // ---- read side
    logic          rdec_valid;
    logic [SW-1:0] rdec_tcu;
    logic [SW-1:0] rdest;
    pid_t          rdec_pid;
    tid_t          rdec_tid;
    prio_t         rdec_prio;
    logic          r_own_q;     // a burst to this Primary is under way
    logic [SW-1:0] r_own_sec_q; // from this Secondary

    icrt_axi_decoder #(.N_SEC(N_SEC), .ADDR_LUT(ADDR_LUT)) u_rdec (
      .clk       (clk),
      .rst_n     (rst_n),
      .valid     (s_arvalid[p]),
      .ready     (s_arready[p]),
      .addr      (s_ar[p].addr),
      .id        (s_ar[p].id),
      .user      (s_ar[p].user),
      .info_valid(rdec_valid),
      .tcu_id    (rdec_tcu),
      .pid       (rdec_pid),
      .tid       (rdec_tid),
      .prio      (rdec_prio),
      .dest      (rdest)
    );

    assign rtib_info[p] = '{pid: rdec_pid, tid: rdec_tid, prio: rdec_prio};
    assign s_arready[p] = ar_room[rdest][p];

    for (genvar s = 0; s < N_SEC; s++) begin : g_rsec
      assign ar_req[s][p]  = s_arvalid[p] && rdest == SW'(s);
      assign ar_take[s][p] = s_arvalid[p] && s_arready[p] && rdest == SW'(s);
      assign rtib_we[s][p] = rdec_valid && rdec_tcu == SW'(s);
    end

    // R pass-through: the Secondary owning the burst under way, else the
    // lowest-numbered Secondary starting one for this PID
    always_comb begin
      r_sel_v[p] = 1'b0;
      r_sel[p]   = '0;
      for (int s = N_SEC - 1; s >= 0; s--) begin
        if (m_rvalid[s] && m_r[s].id == pid_t'(p + 1)
            && (!r_own_q || r_own_sec_q == SW'(s))) begin
          r_sel_v[p] = 1'b1;
          r_sel[p]   = SW'(s);
        end
      end
    end

    always_comb begin
      s_rvalid[p] = r_sel_v[p];
      s_r[p]      = r_sel_v[p] ? m_r[r_sel[p]] : '0;
      if (r_sel_v[p]) s_r[p].user = r_tid[r_sel[p]];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_own_q     <= 1'b0;
        r_own_sec_q <= '0;
      end else if (s_rvalid[p] && s_rready[p]) begin
        r_own_q     <= !m_r[r_sel[p]].last;
        r_own_sec_q <= r_sel[p];
      end
    end

    // B pass-through: the lowest-numbered Secondary answering this PID
    always_comb begin
      s_bvalid[p] = 1'b0;
      s_b[p]      = '0;
      for (int s = N_SEC - 1; s >= 0; s--) begin
        if (m_bvalid[s] && m_b[s].id == pid_t'(p + 1)) begin
          s_bvalid[p] = 1'b1;
          s_b[p]      = m_b[s];
        end
      end
    end
  end

  // B ready back to the Secondaries
  always_comb begin
    for (int s = 0; s < N_SEC; s++) begin
      logic first;
      int   pidx;
      first = 1'b1;
      for (int t = 0; t < s; t++)
        if (m_bvalid[t] && m_b[t].id == m_b[s].id) first = 1'b0;
      pidx = int'(m_b[s].id) - 1;
      m_bready[s] = 1'b0;
      for (int p = 0; p < N_PRI; p++)
        if (pidx == p) m_bready[s] = s_bready[p] && first;
      b_done[s] = m_bvalid[s] && m_bready[s];
    end
  end

  // R ready back to the Secondaries: a Secondary's beat is taken when its
  // Primary selected it and is ready
  always_comb begin
    for (int s = 0; s < N_SEC; s++) begin
      m_rready[s] = 1'b0;
      for (int p = 0; p < N_PRI; p++)
        if (r_sel_v[p] && r_sel[p] == SW'(s) && s_rready[p]) m_rready[s] = 1'b1;
      r_last_done[s] = m_rvalid[s] && m_rready[s] && m_r[s].last;
    end
  end

  // ------------------------------------------------------------ ports
  for (genvar s = 0; s < N_SEC; s++) begin : g_sec
    logic                  busy, trans_start, trans_done;
    logic [N_PRI-1:0]      budget_blocked;
    logic [$clog2(NCELLS+1)-1:0] aw_cells_free;

    icrt_wr_port #(
      .N_PRI     (N_PRI),
      .NCELLS    (NCELLS),
      .W_DEPTH   (W_DEPTH),
      .TIB_DEPTH (TIB_DEPTH),
      .DEF_PERIOD(DEF_PERIOD),
      .DEF_BUDGET(DEF_BUDGET)
    ) u_port (
      .clk           (clk),
      .rst_n         (rst_n),
      .cfg_we        (cfg_we && cfg_sec == SW'(s)),
      .cfg_pri       (cfg_pri),
      .cfg_reg       (cfg_reg),
      .cfg_data      (cfg_data),
      .aw_req        (aw_req[s]),
      .aw_hdr        (s_aw),
      .aw_room       (aw_room[s]),
      .aw_take       (aw_take[s]),
      .tib_we        (tib_we[s]),
      .tib_info      (tib_info),
      .w_valid       (w_valid[s]),
      .w_beat        (s_w),
      .w_ready       (w_ready[s]),
      .m_awvalid     (m_awvalid[s]),
      .m_awready     (m_awready[s]),
      .m_aw          (m_aw[s]),
      .m_wvalid      (m_wvalid[s]),
      .m_wready      (m_wready[s]),
      .m_w           (m_w[s]),
      .b_done        (b_done[s]),
      .busy          (busy),
      .trans_start   (trans_start),
      .trans_done    (trans_done),
      .budget_blocked(budget_blocked),
      .aw_cells_free (aw_cells_free)
    );

    logic                  rd_busy, rd_start, rd_done;
    logic [N_PRI-1:0]      rd_budget_blocked;
    logic [$clog2(NCELLS+1)-1:0] ar_cells_free;

    icrt_rd_port #(
      .N_PRI     (N_PRI),
      .NCELLS    (NCELLS),
      .TIB_DEPTH (TIB_DEPTH),
      .DEF_PERIOD(DEF_PERIOD),
      .DEF_BUDGET(DEF_BUDGET)
    ) u_rport (
      .clk           (clk),
      .rst_n         (rst_n),
      .cfg_we        (cfg_we && cfg_sec == SW'(s)),
      .cfg_pri       (cfg_pri),
      .cfg_reg       (cfg_reg),
      .cfg_data      (cfg_data),
      .ar_req        (ar_req[s]),
      .ar_hdr        (s_ar),
      .ar_room       (ar_room[s]),
      .ar_take       (ar_take[s]),
      .tib_we        (rtib_we[s]),
      .tib_info      (rtib_info),
      .m_arvalid     (m_arvalid[s]),
      .m_arready     (m_arready[s]),
      .m_ar          (m_ar[s]),
      .r_last_done   (r_last_done[s]),
      .cur_tid       (r_tid[s]),
      .busy          (rd_busy),
      .trans_start   (rd_start),
      .trans_done    (rd_done),
      .budget_blocked(rd_budget_blocked),
      .ar_cells_free (ar_cells_free)
    );
  end

endmodule
