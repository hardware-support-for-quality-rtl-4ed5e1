// Unit test of transaction_table.
//
// A segmenter model writes block descriptors through valid/ready while a
// send-unit model stalls at random (su_ready). Each accepted write must raise
// issue_valid for exactly one cycle with its TID; the send unit then reads
// the entry (data one cycle after rd_en) and compares it with what was
// written. Writes while not ready must be ignored.
module tb_transaction_table;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       wr_valid = 0, wr_ready, su_ready = 0, issue_valid, rd_en = 0;
  logic [9:0] wr_tid = 0, issue_tid, rd_addr = 0;
  txn_desc_t  wr_data = '0, rd_data;

  transaction_table dut (.*);

  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  txn_desc_t mdl [1024];
  bit        exp_issue = 0;
  logic [9:0] exp_tid;
  bit        rd_pend = 0;
  txn_desc_t rd_exp;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      check(issue_valid == exp_issue, $sformatf("issue strobe, cycle %0d", n));
      if (exp_issue) check(issue_tid == exp_tid, "issue TID");
      if (rd_pend) check(rd_data == rd_exp, $sformatf("entry read back, cycle %0d", n));
      rd_pend = 0; rd_en = 0;
      // send unit reads the block announced now
      if (issue_valid) begin
        rd_en = 1; rd_addr = issue_tid; rd_pend = 1; rd_exp = mdl[issue_tid];
      end
      su_ready = ($urandom % 3 != 0);
      check(wr_ready == su_ready, "ready follows the send unit");
      wr_valid = ($urandom % 2);
      wr_tid   = 10'($urandom % 32);
      if (rd_en && wr_tid == rd_addr) wr_tid = wr_tid + 1'b1;
      wr_data  = txn_desc_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      exp_issue = wr_valid && su_ready;
      exp_tid   = wr_tid;
      if (exp_issue) begin mdl[wr_tid] = wr_data; n_acc++; end
      else if (wr_valid) n_rej++;
      @(negedge clk);
    end
    check(n_acc > 100 && n_rej > 100, "accepted and refused writes both exercised");
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
