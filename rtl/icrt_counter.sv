// Countdown counter of the global scheduler (one period counter and one
// budget counter per Primary).
//
// The counter holds three registers, as in the description: a reload
// value, the current value and a priority. It has a configure port (writes
// the reload value and/or the priority, e.g. from the APB configuration
// bus), an active-low reload port and an enable port, and outputs its
// current value and its priority.
//
// Behaviour per clock cycle, in order of precedence:
//   * reload_n == 0       : current value <= reload value
//   * en == 1             : current value <= current value - 1 (stops at 0)
// A write on the configure port takes effect on the next clock edge; the
// new reload value is used at the next reload.
//
// The description speaks of the enable "meeting a rising edge"; this
// synchronous version decrements once per clock cycle in which `en` is 1,
// so callers drive `en` as a one-cycle pulse per event (or tie it high to
// count clock cycles). Saturating at 0 and the reset values are this
// design's choices.
module icrt_counter
  import icrt_pkg::*;
#(
  parameter cnt_t  RESET_VALUE = cnt_t'(0),
  parameter prio_t RESET_PRIO  = prio_t'(0)
) (
  input  logic  clk,
  input  logic  rst_n,
  // configure port
  input  logic  cfg_value_we,
  input  logic  cfg_prio_we,
  input  cnt_t  cfg_value,
  input  prio_t cfg_prio,
  // reload (active low) and enable ports
  input  logic  reload_n,
  input  logic  en,
  // value and priority ports
  output cnt_t  value,
  output prio_t prio
);

  cnt_t  reset_value_q;
  cnt_t  current_q;
  prio_t prio_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reset_value_q <= RESET_VALUE;
      prio_q        <= RESET_PRIO;
      current_q     <= RESET_VALUE;
    end else begin
      if (cfg_value_we) reset_value_q <= cfg_value;
      if (cfg_prio_we)  prio_q        <= cfg_prio;
      if (!reload_n)
        current_q <= reset_value_q;
      else if (en && current_q != '0)
        current_q <= current_q - cnt_t'(1);
    end
  end

  assign value = current_q;
  assign prio  = prio_q;

endmodule
