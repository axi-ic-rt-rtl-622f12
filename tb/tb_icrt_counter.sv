// Self-checking testbench of the scheduler countdown counter: reload,
// decrement per enabled cycle, saturation at zero, configuration of the
// reload value and priority (taking effect at the next reload).
module tb_icrt_counter;
  import icrt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_value_we = 0, cfg_prio_we = 0, reload_n = 1, en = 0;
  cnt_t cfg_value = '0, value;
  prio_t cfg_prio = '0, prio;
  int checks = 0, failures = 0;

  icrt_counter #(.RESET_VALUE(cnt_t'(4)), .RESET_PRIO(prio_t'(7))) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(value == 4 && prio == 7, "reset values");
    en = 1;
    @(negedge clk); check(value == 3, "decrement 1");
    @(negedge clk); check(value == 2, "decrement 2");
    en = 0;
    @(negedge clk); check(value == 2, "hold without enable");
    en = 1;
    repeat (4) @(negedge clk);
    check(value == 0, "saturate at zero");
    en = 0;
    // configure new reload value and priority: no effect on current value
    cfg_value_we = 1; cfg_value = 32'd9; cfg_prio_we = 1; cfg_prio = 16'h0123;
    @(negedge clk);
    cfg_value_we = 0; cfg_prio_we = 0;
    check(value == 0, "config does not touch current value");
    check(prio == 16'h0123, "priority written");
    reload_n = 0;
    @(negedge clk);
    reload_n = 1;
    check(value == 9, "reload takes configured value");
    // reload wins over enable
    en = 1; reload_n = 0;
    @(negedge clk);
    check(value == 9, "reload has precedence over enable");
    reload_n = 1;
    repeat (5) @(negedge clk);
    check(value == 4, "five decrements after reload");
    // random decrement sequence against a model
    begin
      int unsigned model;
      model = 4;
      for (int i = 0; i < 40; i++) begin
        en = 1'($urandom);
        reload_n = ($urandom % 8) != 0;
        @(negedge clk);
        if (!reload_n) model = 9;
        else if (en && model != 0) model--;
        check(value == cnt_t'(model), "random sequence");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
