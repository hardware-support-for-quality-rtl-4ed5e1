// Unit test of metadata_table.
//
// Random writes and reads of qos_pkg::meta_t entries on a small set of
// indices are compared with a model. Reads return data one cycle after
// rd_en and hold otherwise; a read in the same cycle as a write to the same
// entry must return the value being written (write-first forwarding).
module tb_metadata_table;
  import qos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en = 0, rd_en = 0;
  logic [10:0] wr_addr = 0, rd_addr = 0;
  meta_t       wr_data = '0, rd_data;

  metadata_table dut (.*);

  int checks = 0, failures = 0, n_fwd = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  meta_t mdl [2048];
  bit    written [2048];
  meta_t exp_q;
  bit    exp_v = 0;

  initial begin
    for (int i = 0; i < 2048; i++) written[i] = 0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      if (exp_v) check(rd_data == exp_q, $sformatf("read data, cycle %0d", n));
      wr_en   = ($urandom % 2);
      wr_addr = ($urandom % 5 == 0) ? 11'($urandom) : 11'($urandom % 16);
      wr_data = meta_t'({$urandom, $urandom, $urandom});
      rd_addr = ($urandom % 3 == 0) ? wr_addr : 11'($urandom % 16);
      rd_en   = (written[rd_addr] || (wr_en && wr_addr == rd_addr)) && ($urandom % 4 != 0);
      if (wr_en) begin mdl[wr_addr] = wr_data; written[wr_addr] = 1; end
      if (rd_en) begin
        exp_q = mdl[rd_addr]; exp_v = 1;  // new value on a collision
        if (wr_en && wr_addr == rd_addr) n_fwd++;
      end
      @(negedge clk);
    end
    check(n_fwd > 100, "same-cycle read/write collisions exercised");
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
