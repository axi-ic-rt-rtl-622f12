// Self-checking testbench of the Transaction Information Block: writes go
// to free slots, removal by slot, free count, contents against a model.
module tb_icrt_tib;
  import icrt_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rm_en = 0;
  tinfo_t wr_info = '0;
  logic [1:0] rm_idx = '0;
  tinfo_t [D-1:0] entry;
  logic [D-1:0] valid;
  logic [2:0] n_free;
  int checks = 0, failures = 0;
  tinfo_t model [D];
  logic   mvalid [D];

  icrt_tib #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    int nf;
    nf = 0;
    for (int i = 0; i < D; i++) begin
      check(valid[i] == mvalid[i], $sformatf("valid[%0d]", i));
      if (mvalid[i]) check(entry[i] == model[i], $sformatf("entry[%0d]", i));
      if (!mvalid[i]) nf++;
    end
    check(n_free == 3'(nf), "free count");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) mvalid[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    compare();
    for (int k = 0; k < 200; k++) begin
      int nf, lowest;
      nf = 0; lowest = -1;
      for (int i = D - 1; i >= 0; i--) if (!mvalid[i]) begin nf++; lowest = i; end
      wr_en = (nf > 0) && ($urandom % 2 == 0);
      wr_info = tinfo_t'($urandom);
      rm_en = $urandom % 3 == 0;
      rm_idx = 2'($urandom);
      @(negedge clk);
      if (rm_en) mvalid[rm_idx] = 0;
      if (wr_en) begin mvalid[lowest] = 1; model[lowest] = wr_info; end
      wr_en = 0; rm_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
