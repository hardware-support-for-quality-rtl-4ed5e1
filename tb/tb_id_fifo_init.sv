// Unit test of id_fifo_init.
//
// After reset the initialiser must enqueue, one per cycle, the 512 free TIDs
// 0..511 in order, then the 64 unipath flow IDs 128..191, then the 16
// multipath group bases 192, 196, ..., 252, never two at once, and then
// raise done (after 592 cycles) and stay quiet. A second reset restarts it.
module tb_id_fifo_init;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       tid_enq, fid1_enq, fid4_enq, done;
  logic [9:0] tid_data;
  logic [7:0] fid1_data, fid4_data;

  id_fifo_init dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic run_once();
    int nt, n1, n4, cyc;
    nt = 0; n1 = 0; n4 = 0; cyc = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!done && cyc < 1000) begin
      check(32'(tid_enq) + 32'(fid1_enq) + 32'(fid4_enq) == 1, "one ID per cycle");
      if (tid_enq)  begin check(tid_data == 10'(nt), $sformatf("TID %0d", nt)); nt++; end
      if (fid1_enq) begin check(nt == 512 && fid1_data == 8'(128 + n1), $sformatf("1xFID %0d", n1)); n1++; end
      if (fid4_enq) begin check(n1 == 64 && fid4_data == 8'(192 + 4 * n4), $sformatf("4xFID %0d", n4)); n4++; end
      cyc++;
      @(negedge clk);
    end
    check(cyc == 592, $sformatf("initialisation takes %0d cycles", cyc));
    check(nt == 512 && n1 == 64 && n4 == 16, "all IDs enqueued");
    repeat (20) begin
      check(done && !tid_enq && !fid1_enq && !fid4_enq, "quiet after done");
      @(negedge clk);
    end
  endtask

  initial begin
    @(negedge clk);
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
