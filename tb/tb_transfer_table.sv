// Unit test of transfer_table (2048 x 256-bit descriptor lines).
//
// Random writes and reads on a small set of lines, with same-line read and
// write in one cycle, are compared with a model: the read data appear one
// cycle after rd_en, hold while rd_en is low, and a read colliding with a
// write returns the old contents. The corner lines 0 and 2047 are included.
module tb_transfer_table;
  localparam int DEPTH = 2048;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         wr_en = 0, rd_en = 0;
  logic [10:0]  wr_addr = 0, rd_addr = 0;
  logic [255:0] wr_data = 0, rd_data;

  transfer_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [255:0] mdl [DEPTH];
  bit           written [DEPTH];
  logic [255:0] exp_q;
  bit           exp_v = 0;

  function automatic logic [10:0] pick();
    case ($urandom % 4)
      0: return 11'd0;
      1: return 11'd2047;
      default: return 11'($urandom % 24);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      // outputs of the previous cycle
      if (exp_v) check(rd_data == exp_q, $sformatf("read data, cycle %0d", n));
      wr_en   = ($urandom % 2);
      wr_addr = pick();
      wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      rd_addr = pick();
      rd_en   = written[rd_addr] && ($urandom % 3 != 0);
      if (rd_en) begin exp_q = mdl[rd_addr]; exp_v = 1; end  // old contents on a collision
      if (wr_en) begin mdl[wr_addr] = wr_data; written[wr_addr] = 1; end
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
