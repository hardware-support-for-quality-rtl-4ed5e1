// Unit test of md_arbiter (metadata read arbitration).
//
// Checks, for random requests: a lone request is granted at once, never two
// grants, never a grant without a request, and when both request the one
// served less recently wins (the message handler first after reset). Under
// constant contention the grants must alternate.
module tb_md_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic seg_req = 0, mh_req = 0, seg_gnt, mh_gnt;

  md_arbiter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  bit last_mh = 1;   // model: last served was the message handler

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      if (n < 2000) begin seg_req = $urandom % 2; mh_req = $urandom % 2; end
      else if (n < 2100) begin seg_req = 1; mh_req = 1; end
      else begin seg_req = ($urandom % 4 != 0); mh_req = ($urandom % 4 != 0); end
      #1;
      check(!(seg_gnt && mh_gnt), "one grant");
      check(!(seg_gnt && !seg_req) && !(mh_gnt && !mh_req), "grant only on request");
      if (seg_req && !mh_req) check(seg_gnt, "lone segmenter request");
      if (mh_req && !seg_req) check(mh_gnt, "lone message-handler request");
      if (seg_req && mh_req) check(seg_gnt == last_mh && mh_gnt == !last_mh, "contention: least recently served wins");
      if (seg_gnt) last_mh = 0;
      if (mh_gnt)  last_mh = 1;
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
