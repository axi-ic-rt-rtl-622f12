// Shared types and constants of the real-time AXI interconnect.
//
// The interconnect buffers AXI write requests in Random Access Queues
// (RAQs) and orders them per Secondary with a two-layer (global/local)
// compositional scheduler held in a Transaction Control Unit (TCU).
//
// Field widths that follow the design description: the Primary ID (PID)
// and the transaction ID (TID) are 8 bits each, the cell header of a RAQ
// is {valid, PID, TID} = 17 bits, the transaction priority is 16 bits and
// AWUSER carries {priority[15:0], TID[7:0]} (24 bits), budget/period
// counters are 32 bits wide. Address width (32), data width (32), the AXI
// length field (8 bits) and the B response encoding are this design's own
// choices (standard AXI4 sizes).
package icrt_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 8;   // AWID carries the PID
  localparam int unsigned TID_W  = 8;
  localparam int unsigned PRIO_W = 16;
  localparam int unsigned USER_W = TID_W + PRIO_W;  // AWUSER = {prio, tid}
  localparam int unsigned LEN_W  = 8;
  localparam int unsigned CNT_W  = 32;  // P-/S-counter width

  typedef logic [ID_W-1:0]   pid_t;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [PRIO_W-1:0] prio_t;
  typedef logic [CNT_W-1:0]  cnt_t;

  // Header of an AXI write (AW channel payload).
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;    // beats - 1
    logic [2:0]        size;
    logic [1:0]        burst;
    logic [ID_W-1:0]   id;     // PID of the issuing Primary
    logic [USER_W-1:0] user;   // {priority, TID}
  } aw_t;

  // One beat of a write burst (W channel payload).
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } w_t;

  // Write response (B channel payload).
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [1:0]      resp;
  } b_t;

  // Read address (AR channel payload): same fields as AW.
  typedef aw_t ar_t;

  // Read data (R channel payload). `user` (RUSER) carries the TID of the
  // read; the Secondary may leave it 0, the interconnect fills it in.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [ID_W-1:0]   id;
    logic [TID_W-1:0]  user;
    logic [1:0]        resp;
    logic              last;
  } r_t;

  // Transaction information as decoded from a header and kept in a TIB.
  typedef struct packed {
    pid_t  pid;
    tid_t  tid;
    prio_t prio;
  } tinfo_t;

  // Register selector of the configuration port of one Primary's counters.
  typedef enum logic [1:0] {
    CFG_P_RESET = 2'd0,  // period counter reload value
    CFG_P_PRIO  = 2'd1,  // Primary priority (held in the period counter)
    CFG_S_RESET = 2'd2   // budget counter reload value
  } cfg_reg_e;

  // Address decoder look-up table: Secondary index for each of the
  // 2**LUT_BITS address regions selected by the top address bits.
  localparam int unsigned LUT_BITS = 4;
  typedef logic [(1<<LUT_BITS)-1:0][7:0] lut_t;

  function automatic lut_t lut_mod(int unsigned n_sec);
    lut_t t;
    for (int r = 0; r < (1 << LUT_BITS); r++) t[r] = 8'(r % n_sec);
    return t;
  endfunction

  // Priority order used by every comparator: the numerically smaller
  // value is the more urgent one.
  function automatic logic prio_wins(prio_t a, prio_t b);
    return a < b;
  endfunction

endpackage
