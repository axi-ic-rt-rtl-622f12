// Transaction Information Block (TIB): the table, kept per Primary inside
// a Transaction Control Unit, of that Primary's buffered transactions
// (PID, TID, priority) waiting for this Secondary.
//
// Entries are written by the AXI-decoder of the Primary (one write per
// accepted header) into the lowest free slot and removed by slot index
// when the local scheduler's pick is granted. `n_free` lets the request
// side hold off a header for which there is no room. Slot placement and
// the free count are this design's choices; the description gives only
// the table's contents.
//
// Timing: a write or removal is visible on the outputs the next cycle.
module icrt_tib
  import icrt_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  tinfo_t               wr_info,
  input  logic                 rm_en,
  input  logic [IW-1:0]        rm_idx,
  output tinfo_t [DEPTH-1:0]   entry,
  output logic   [DEPTH-1:0]   valid,
  output logic   [IW:0]        n_free
);

  tinfo_t [DEPTH-1:0] entry_q;
  logic   [DEPTH-1:0] valid_q;
  logic   [DEPTH-1:0] wr_onehot;

  // Lowest free slot.
  always_comb begin
    wr_onehot = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!valid_q[i]) wr_onehot = DEPTH'(1) << i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      entry_q <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (rm_en && rm_idx == IW'(i)) valid_q[i] <= 1'b0;
        if (wr_en && wr_onehot[i]) begin
          valid_q[i] <= 1'b1;
          entry_q[i] <= wr_info;
        end
      end
    end
  end

  always_comb begin
    n_free = '0;
    for (int i = 0; i < DEPTH; i++)
      n_free += (IW+1)'(!valid_q[i]);
  end

  assign entry = entry_q;
  assign valid = valid_q;

  // A header must never arrive for a full table.
  always_ff @(posedge clk)
    if (rst_n && wr_en) a_no_overflow: assert (valid_q != '1)
      else $error("TIB written while full");

endmodule
