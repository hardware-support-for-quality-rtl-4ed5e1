// Unit test of id_fifo at the depth of the 1xFID FIFO (64 x 8 bits) and of
// the TID FIFO (512 x 10 bits).
//
// Random enqueues and dequeues (never enqueueing to a full or dequeueing from
// an empty FIFO) are compared with a queue model: head data, empty, full and
// count after every cycle, simultaneous enqueue and dequeue, and wrap-around
// of both pointers. Each FIFO is filled completely once.
module tb_id_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // FIFO A: 64 x 8
  logic       a_enq = 0, a_deq = 0, a_empty, a_full;
  logic [7:0] a_in = 0, a_out;
  logic [6:0] a_cnt;
  id_fifo #(.DEPTH(64), .WIDTH(8)) u_a (.clk, .rst_n, .enq(a_enq), .enq_data(a_in), .deq(a_deq),
                                       .deq_data(a_out), .empty(a_empty), .full(a_full), .count(a_cnt));
  // FIFO B: default size (512 x 10)
  logic       b_enq = 0, b_deq = 0, b_empty, b_full;
  logic [9:0] b_in = 0, b_out;
  logic [9:0] b_cnt;
  id_fifo u_b (.clk, .rst_n, .enq(b_enq), .enq_data(b_in), .deq(b_deq),
               .deq_data(b_out), .empty(b_empty), .full(b_full), .count(b_cnt));

  logic [7:0] qa[$];
  logic [9:0] qb[$];
  int maxa = 0, maxb = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      // bias: fill during the first and third quarter, drain otherwise
      automatic int bias = ((n / 2500) % 2 == 0) ? 3 : 1;
      check(a_empty == (qa.size() == 0) && a_full == (qa.size() == 64) && int'(a_cnt) == qa.size(), "A flags/count");
      check(b_empty == (qb.size() == 0) && b_full == (qb.size() == 512) && int'(b_cnt) == qb.size(), "B flags/count");
      if (qa.size() > 0) check(a_out == qa[0], "A head");
      if (qb.size() > 0) check(b_out == qb[0], "B head");
      a_enq = (qa.size() < 64) && ($urandom % 4 < bias);
      a_deq = (qa.size() > 0) && ($urandom % 4 >= bias);
      a_in  = 8'($urandom);
      b_enq = (qb.size() < 512) && ($urandom % 4 < bias);
      b_deq = (qb.size() > 0) && ($urandom % 4 >= bias);
      if ($urandom % 5 == 0) begin a_enq = qa.size() < 64; a_deq = qa.size() > 0; end
      b_in  = 10'($urandom);
      if (a_deq) void'(qa.pop_front());
      if (a_enq) qa.push_back(a_in);
      if (b_deq) void'(qb.pop_front());
      if (b_enq) qb.push_back(b_in);
      if (qa.size() > maxa) maxa = qa.size();
      if (qb.size() > maxb) maxb = qb.size();
      @(negedge clk);
    end
    check(maxa == 64 && maxb == 512, $sformatf("both FIFOs filled (%0d, %0d)", maxa, maxb));
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
