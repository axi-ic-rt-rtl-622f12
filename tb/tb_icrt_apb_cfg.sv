// Self-checking testbench of the APB configuration port: each write
// produces one configuration pulse with the decoded TCU, Primary and
// register; reads return what was written; bad addresses give PSLVERR.
module tb_icrt_apb_cfg;
  import icrt_pkg::*;
  localparam int NP = 4, NS = 2;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [6:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic cfg_we;
  logic [0:0] cfg_sec;
  logic [1:0] cfg_pri;
  cfg_reg_e cfg_reg;
  cnt_t cfg_data;
  int checks = 0, failures = 0, pulses = 0;
  logic [31:0] model [NS][NP][3];

  icrt_apb_cfg #(.N_PRI(NP), .N_SEC(NS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cfg_we) pulses++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb(input logic wr, input int s, input int p, input int r,
                     input logic [31:0] d, output logic [31:0] rd, output logic err);
    paddr = {1'(s), 2'(p), 2'(r), 2'b00}; pwrite = wr; pwdata = d; psel = 1; penable = 0;
    @(negedge clk);
    check(!cfg_we, "no pulse in SETUP");
    penable = 1;
    #1;
    check(pready, "PREADY");
    rd = prdata; err = pslverr;
    if (wr && !err)
      check(cfg_we && cfg_sec == 1'(s) && cfg_pri == 2'(p) && cfg_reg == cfg_reg_e'(r)
            && cfg_data == d, "configuration pulse fields");
    if (err) check(!cfg_we, "no pulse on error");
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic err;
    int exp_pulses;
    for (int s = 0; s < NS; s++) for (int p = 0; p < NP; p++) for (int r = 0; r < 3; r++) model[s][p][r] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_pulses = 0;
    for (int k = 0; k < 60; k++) begin
      int s, p, r;
      logic [31:0] d;
      s = $urandom % NS; p = $urandom % NP; r = $urandom % 4; d = $urandom;
      if ($urandom % 2) begin
        apb(1, s, p, r, d, rd, err);
        check(err == (r == 3), "PSLVERR on write");
        if (r != 3) begin model[s][p][r] = d; exp_pulses++; end
      end else begin
        apb(0, s, p, r, 0, rd, err);
        check(err == (r == 3), "PSLVERR on read");
        if (r != 3) check(rd == model[s][p][r], "read-back");
      end
    end
    check(pulses == exp_pulses, $sformatf("pulse count %0d/%0d", pulses, exp_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
