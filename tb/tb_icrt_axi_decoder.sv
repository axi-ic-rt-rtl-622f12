// Self-checking testbench of the AXI-decoder. Replays the three headers
// of the AW example (PID 0x02; TIDs 0xF1, 0x0F, 0x01; priorities 0x0700,
// 0x0300, 0x0400) with idle cycles and VALID-without-READY cycles, then
// random headers, and checks the register bank one cycle after each
// handshake and the destination look-up.
module tb_icrt_axi_decoder;
  import icrt_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [ID_W-1:0] id = '0;
  logic [USER_W-1:0] user = '0;
  logic info_valid;
  logic [1:0] tcu_id, dest;
  pid_t pid;
  tid_t tid;
  prio_t prio;
  int checks = 0, failures = 0;

  icrt_axi_decoder #(.N_SEC(NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive one header; `stall` cycles with VALID high and READY low first
  task automatic header(input logic [31:0] a, input logic [7:0] i,
                        input logic [7:0] t, input logic [15:0] p, input int stall);
    addr = a; id = i; user = {p, t}; valid = 1; ready = 0;
    for (int k = 0; k < stall; k++) begin
      @(negedge clk);
      check(!info_valid, "no capture without READY");
    end
    ready = 1;
    #1;
    check(dest == 2'(a[31:28] % NS), "combinational destination");
    @(negedge clk);
    valid = 0; ready = 0; addr = '1; id = '1; user = '1;
    check(info_valid, "Info_Valid after handshake");
    check(pid == i && tid == t && prio == p, $sformatf("fields %h %h %h", pid, tid, prio));
    check(tcu_id == 2'(a[31:28] % NS), "TCU_ID");
    @(negedge clk);
    check(!info_valid, "Info_Valid is a pulse");
    check(pid == i && tid == t && prio == p, "fields held");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(!info_valid, "reset");
    header(32'h1000_0000, 8'h02, 8'hF1, 16'h0700, 1);
    header(32'h2000_0040, 8'h02, 8'h0F, 16'h0300, 2);
    header(32'h7000_0000, 8'h02, 8'h01, 16'h0400, 0);
    for (int k = 0; k < 50; k++)
      header($urandom, 8'($urandom), 8'($urandom), 16'($urandom), $urandom % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
