// Self-checking testbench of the local scheduler: random TIB contents,
// result compared with a linear search for the most urgent entry.
module tb_icrt_lsched;
  import icrt_pkg::*;
  localparam int D = 6;  // not a power of two: exercises tree padding
  tinfo_t [D-1:0] entry;
  logic   [D-1:0] valid;
  logic           best_valid;
  logic   [2:0]   best_idx;
  tinfo_t         best_info;
  int checks = 0, failures = 0;

  icrt_lsched #(.DEPTH(D)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example, rows of one Primary: 0x0400 and 0x0200 -> 0x0200 wins
    valid = '0; entry = '0;
    entry[0] = '{pid: 8'h01, tid: 8'h03, prio: 16'h0400};
    entry[1] = '{pid: 8'h01, tid: 8'h01, prio: 16'h0200};
    valid[1:0] = 2'b11;
    #1;
    check(best_valid && best_idx == 1 && best_info.tid == 8'h01, "example pick");
    for (int k = 0; k < 2000; k++) begin
      int bi;
      for (int i = 0; i < D; i++) begin
        entry[i] = '{pid: 8'h01, tid: 8'(i), prio: prio_t'($urandom % 8)};
        valid[i] = 1'($urandom);
      end
      #1;
      bi = -1;
      for (int i = 0; i < D; i++)
        if (valid[i] && (bi < 0 || entry[i].prio < entry[bi].prio)) bi = i;
      check(best_valid == (bi >= 0), "valid");
      if (bi >= 0) check(best_idx == 3'(bi) && best_info == entry[bi],
                         $sformatf("pick %0d got %0d", bi, best_idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
