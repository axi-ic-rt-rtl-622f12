// AXI-decoder: watches the address channel (AW, or AR in the same way) of
// one Primary and, at each header handshake, decomposes the header into
// the information the schedulers need.
//
// A header is taken when VALID and READY are both 1. In that cycle the
// address decoder (a look-up table indexed by the top LUT_BITS address
// bits) turns the address into the destination (TCU_ID, i.e. Secondary
// index), the ID field gives the Primary ID and the USER field gives the
// transaction ID (bits 7:0) and the 16-bit priority (bits 23:8). The
// register bank (four data registers and the Info_Valid control register)
// latches them, so the decoded information appears one cycle after the
// handshake and Info_Valid is a one-cycle pulse per header; without a
// handshake Info_Valid is cleared.
//
// The address map is this design's choice: the top LUT_BITS (4) address
// bits select one of 16 regions, and by default region r goes to
// Secondary r mod N_SEC (ADDR_LUT overrides it).
module icrt_axi_decoder
  import icrt_pkg::*;
#(
  parameter int unsigned N_SEC    = 4,
  parameter lut_t        ADDR_LUT = lut_mod(N_SEC),
  localparam int unsigned SW      = (N_SEC > 1) ? $clog2(N_SEC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // monitored address channel
  input  logic              valid,
  input  logic              ready,
  input  logic [ADDR_W-1:0] addr,
  input  logic [ID_W-1:0]   id,
  input  logic [USER_W-1:0] user,
  // decoded information (register bank outputs)
  output logic              info_valid,
  output logic [SW-1:0]     tcu_id,
  output pid_t              pid,
  output tid_t              tid,
  output prio_t             prio,
  // combinational destination of the header now on the channel
  output logic [SW-1:0]     dest
);

  logic load;
  assign load = valid && ready;
  assign dest = SW'(ADDR_LUT[addr[ADDR_W-1 -: LUT_BITS]]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info_valid <= 1'b0;
      tcu_id     <= '0;
      pid        <= '0;
      tid        <= '0;
      prio       <= '0;
    end else begin
      info_valid <= load;
      if (load) begin
        tcu_id <= dest;
        pid    <= id;
        tid    <= user[TID_W-1:0];
        prio   <= user[TID_W +: PRIO_W];
      end
    end
  end

endmodule
