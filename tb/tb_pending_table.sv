// Unit test of pending_table.
//
// Port A (segmenter) writes entries, port B (message handler) reads and
// writes them back. Random traffic on a small set of TIDs is compared with a
// model: read data one cycle after b_rd_en, and the valid bit of every entry
// is 0 after reset even though the memory itself is not cleared.
module tb_pending_table;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       a_wr_en = 0, b_rd_en = 0, b_wr_en = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  pend_t      a_wr_data = '0, b_wr_data = '0, b_rd_data;

  pending_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  pend_t mdl [1024];
  bit    vmdl [1024];
  pend_t exp_q;
  bit    exp_v = 0;

  function automatic pend_t rnd();
    return pend_t'({$urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) vmdl[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // every entry reads as invalid after reset
    for (int i = 0; i < 1024; i++) begin
      b_rd_en = 1; b_addr = 10'(i);
      @(negedge clk);
      check(!b_rd_data.valid, $sformatf("entry %0d invalid after reset", i));
    end
    b_rd_en = 0;
    for (int n = 0; n < 6000; n++) begin
      if (exp_v) begin
        check(b_rd_data.valid == exp_q.valid, $sformatf("valid bit, cycle %0d", n));
        if (exp_q.valid) check(b_rd_data == exp_q, $sformatf("entry, cycle %0d", n));
      end
      exp_v = 0;
      a_wr_en = ($urandom % 3 == 0);
      a_addr  = 10'($urandom % 16);
      a_wr_data = rnd();
      b_addr  = 10'($urandom % 16);
      b_rd_en = ($urandom % 2) && !(a_wr_en && a_addr == b_addr);
      b_wr_en = !b_rd_en && ($urandom % 3 == 0) && !(a_wr_en && a_addr == b_addr);
      b_wr_data = rnd();
      if (b_rd_en) begin exp_q = mdl[b_addr]; exp_q.valid = vmdl[b_addr]; exp_v = 1; end
      if (a_wr_en) begin mdl[a_addr] = a_wr_data; vmdl[a_addr] = a_wr_data.valid; end
      if (b_wr_en) begin mdl[b_addr] = b_wr_data; vmdl[b_addr] = b_wr_data.valid; end
      @(negedge clk);
    end
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
