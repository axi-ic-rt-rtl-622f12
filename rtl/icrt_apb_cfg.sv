// APB configuration port of the schedulers.
//
// Software programs each Primary's periodic-server interface (period and
// budget) and its Primary priority in every TCU's global scheduler through
// an APB slave, as the global scheduler's counters take their configure
// port from the APB bus. Each write is turned into a one-cycle
// configuration pulse broadcast to the TCUs together with the target TCU,
// Primary and register. Reads return the last value written to the
// addressed register (a shadow copy kept here); out-of-range addresses
// answer with PSLVERR.
//
// Register map (this design's own; byte addresses, 32-bit registers):
//   PADDR = {sec, pri, reg[1:0], 2'b00}
//   reg 0 : period counter reload value (period = value + 1 cycles)
//   reg 1 : Primary priority (bits 15:0, smaller is more urgent)
//   reg 2 : budget counter reload value (transactions per period)
// Zero wait states: PREADY is always 1; a write takes effect in the
// ACCESS cycle.
// The pulse's TCU, Primary, register and data fields are the APB address
// and write-data fields wired straight through; only the write strobe and
// PSLVERR are decoded.
module icrt_apb_cfg
  import icrt_pkg::*;
#(
  parameter int unsigned N_PRI = 16,
  parameter int unsigned N_SEC = 4,
  localparam int unsigned PW   = (N_PRI > 1) ? $clog2(N_PRI) : 1,
  localparam int unsigned SW   = (N_SEC > 1) ? $clog2(N_SEC) : 1,
  localparam int unsigned A_W  = 4 + PW + SW
) (
  input  logic               clk,
  input  logic               rst_n,
  // APB slave
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [A_W-1:0]     paddr,
  input  logic [31:0]        pwdata,
  output logic               pready,
  output logic [31:0]        prdata,
  output logic               pslverr,
  // configuration pulse to the TCUs
  output logic               cfg_we,
  output logic [SW-1:0]      cfg_sec,
  output logic [PW-1:0]      cfg_pri,
  output cfg_reg_e           cfg_reg,
  output cnt_t               cfg_data
);

  logic [1:0]    reg_sel;
  logic [PW-1:0] pri_sel;
  logic [SW-1:0] sec_sel;
  logic          in_range;
  logic          access;

  assign reg_sel  = paddr[3:2];
  assign pri_sel  = paddr[4 +: PW];
  assign sec_sel  = paddr[4 + PW +: SW];
  assign in_range = (reg_sel != 2'd3) && (32'(pri_sel) < N_PRI)
                    && (32'(sec_sel) < N_SEC) && (paddr[1:0] == 2'b00);
  assign access   = psel && penable;

  assign pready   = 1'b1;
  assign pslverr  = access && !in_range;
  assign cfg_we   = access && pwrite && in_range;
  assign cfg_sec  = sec_sel;
  assign cfg_pri  = pri_sel;
  assign cfg_reg  = cfg_reg_e'(reg_sel);
  assign cfg_data = pwdata;

  // shadow registers for read-back
  logic [31:0] shadow_q [N_SEC][N_PRI][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SEC; s++)
        for (int p = 0; p < N_PRI; p++)
          for (int r = 0; r < 3; r++)
            shadow_q[s][p][r] <= '0;
    end else if (cfg_we) begin
      shadow_q[sec_sel][pri_sel][reg_sel] <= pwdata;
    end
  end

  assign prdata = (access && !pwrite && in_range) ? shadow_q[sec_sel][pri_sel][reg_sel] : '0;

endmodule
