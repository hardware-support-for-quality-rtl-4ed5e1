// Unit test of status_regs.
//
// Random BUSY updates (AXI writes), DONE/ERROR updates (message handler) and
// single- or 32-channel reads are compared with a model of the 1024 channel
// statuses. Checked: the 2-bit codes returned in the read cycle, the reset to
// IDLE of every returned DONE/ERROR channel at the following edge (and of
// nothing else: BUSY stays BUSY), and the priority message handler > AXI
// write > read-reset when updates hit the same channel in one cycle.
module tb_status_regs;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       busy_en = 0, mh_en = 0, mh_error = 0, rd_en = 0, rd_multi = 0;
  logic [9:0] busy_ch = 0, mh_ch = 0;
  logic [3:0] rd_page = 0;
  logic [5:0] rd_ch = 0;
  logic [63:0] rd_data;

  status_regs dut (.*);

  int checks = 0, failures = 0, n_clr = 0, n_multi = 0, n_prio = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [1:0] mdl [1024];   // binary codes

  // channels 0..63 of pages 0, 3 and 15 only, so that collisions happen
  function automatic logic [9:0] pick();
    logic [3:0] pg;
    pg = ($urandom % 3 == 0) ? 4'd0 : ($urandom % 2) ? 4'd3 : 4'd15;
    return {pg, 6'($urandom % 64)};
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) mdl[i] = 2'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      busy_en  = ($urandom % 3 == 0);
      busy_ch  = pick();
      mh_en    = ($urandom % 3 == 0);
      mh_ch    = ($urandom % 4 == 0) ? busy_ch : pick();
      mh_error = ($urandom % 4 == 0);
      rd_en    = ($urandom % 2);
      rd_multi = ($urandom % 2);
      rd_page  = ($urandom % 3 == 0) ? 4'd0 : ($urandom % 2) ? 4'd3 : 4'd15;
      rd_ch    = 6'($urandom);
      #1;
      // returned codes (combinational)
      if (rd_multi) begin
        n_multi++;
        for (int i = 0; i < 32; i++)
          check(rd_data[2*i +: 2] == mdl[{rd_page, rd_ch[5], 5'(i)}],
                $sformatf("32-channel read, page %0d channel %0d", rd_page, 32 * rd_ch[5] + i));
      end else begin
        check(rd_data[1:0] == mdl[{rd_page, rd_ch}], $sformatf("single read, page %0d channel %0d", rd_page, rd_ch));
        check(rd_data[63:2] == '0, "single read upper bits zero");
      end
      // model update at the edge: read-reset, then AXI write, then message handler
      if (rd_en) begin
        if (rd_multi) begin
          for (int i = 0; i < 32; i++)
            if (mdl[{rd_page, rd_ch[5], 5'(i)}] >= 2'd2) begin mdl[{rd_page, rd_ch[5], 5'(i)}] = 2'd0; n_clr++; end
        end else if (mdl[{rd_page, rd_ch}] >= 2'd2) begin mdl[{rd_page, rd_ch}] = 2'd0; n_clr++; end
      end
      if (busy_en) mdl[busy_ch] = 2'd1;
      if (mh_en) mdl[mh_ch] = mh_error ? 2'd3 : 2'd2;
      if (busy_en && mh_en && busy_ch == mh_ch) n_prio++;
      @(negedge clk);
    end
    busy_en = 0; mh_en = 0; rd_en = 0;
    // final sweep of every channel with single reads
    for (int c = 0; c < 1024; c++) begin
      rd_multi = 0; rd_page = 4'(c / 64); rd_ch = 6'(c % 64);
      #1;
      check(rd_data[1:0] == mdl[c], $sformatf("final status of channel %0d", c));
      @(negedge clk);
    end
    check(n_clr > 500 && n_multi > 1000 && n_prio > 50, "clears, 32-channel reads and collisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
