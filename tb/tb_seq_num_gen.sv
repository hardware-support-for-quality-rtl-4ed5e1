// Unit test of seq_num_gen: the sequence number starts at 0 after reset,
// advances by one on each cycle with inc, holds otherwise and wraps from
// 4095 to 0.
module tb_seq_num_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        inc = 0;
  logic [11:0] seq;

  seq_num_gen dut (.*);

  int checks = 0, failures = 0, wraps = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [11:0] mdl = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      check(seq == mdl, $sformatf("sequence number %0d, expected %0d", seq, mdl));
      inc = ($urandom % 4 != 0);
      if (inc) begin
        if (mdl == 12'hFFF) wraps++;
        mdl = mdl + 1'b1;
      end
      @(negedge clk);
    end
    check(wraps >= 1, "wrap-around exercised");
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
