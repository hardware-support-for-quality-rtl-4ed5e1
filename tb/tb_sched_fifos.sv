// Unit test of sched_fifos (66 scheduling queues in a shared 2048-node space).
//
// Three enqueue clients and one dequeue client run at random on a few queues
// (0, 1, 17, 40 and 65) so that every case meets: enqueue to an empty queue,
// dequeue of a one-node queue, enqueue and dequeue of the same queue in one
// cycle (also when it holds one node), back-to-back dequeues of the same
// queue (next-pointer forwarding) and fixed-priority enqueue arbitration
// (port 0 > 1 > 2, enq_ready independent of the port's own valid). A model
// keeps one queue of (index, started) per queue; each index is in at most one
// queue, as in the engine. Checked every cycle: empty flags, the head shown
// for the selected queue and the started bit returned with it.
module tb_sched_fifos;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       [2:0]       enq_valid = '0, enq_ready;
  sched_req_t [2:0]       enq_req = '0;
  logic       [NUM_Q-1:0] empty;
  logic       [Q_W-1:0]   deq_q = '0;
  logic                   deq = 0;
  logic       [IDX_W-1:0] deq_idx;
  logic                   deq_started;

  sched_fifos dut (.*);

  int checks = 0, failures = 0, n_b2b = 0, n_same = 0, n_same1 = 0, n_arb = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef struct { logic [IDX_W-1:0] idx; bit started; } ent_t;
  ent_t mq [NUM_Q][$];
  bit   inq [NUM_LINES];
  int   qs [5] = '{0, 1, 17, 40, 65};
  logic [Q_W-1:0] last_deq_q;
  bit   last_deq = 0;

  function automatic logic [IDX_W-1:0] free_idx();
    logic [IDX_W-1:0] i;
    do i = ($urandom % 2) ? IDX_W'($urandom % 48) : IDX_W'($urandom); while (inq[i]);
    return i;
  endfunction

  initial begin
    for (int i = 0; i < NUM_LINES; i++) inq[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 30000; n++) begin
      automatic bit busy = (n / 1000) % 2;
      automatic int total = 0;
      for (int q = 0; q < 5; q++) total += mq[qs[q]].size();
      // enqueue requests with distinct free indices
      for (int p = 0; p < 3; p++) begin
        enq_valid[p] = ($urandom % 4 < (busy ? 3 : 1)) && total < 300;
        enq_req[p].q = Q_W'(qs[$urandom % 5]);
        enq_req[p].started = $urandom % 2;
        enq_req[p].idx = free_idx();
        for (int r = 0; r < p; r++)
          if (enq_valid[r] && enq_req[r].idx == enq_req[p].idx) enq_valid[p] = 0;
      end
      // dequeue request: prefer repeating the last queue
      deq_q = (last_deq && $urandom % 2) ? last_deq_q : Q_W'(qs[$urandom % 5]);
      deq   = (mq[deq_q].size() > 0) && ($urandom % 4 < (busy ? 2 : 3));
      #1;
      for (int q = 0; q < NUM_Q; q++)
        check(empty[q] == (mq[q].size() == 0), $sformatf("empty flag of queue %0d", q));
      check(enq_ready == {!enq_valid[0] && !enq_valid[1], !enq_valid[0], 1'b1}, "enqueue priority");
      if (mq[deq_q].size() > 0) begin
        check(deq_idx == mq[deq_q][0].idx, $sformatf("head of queue %0d", deq_q));
        check(deq_started == mq[deq_q][0].started, $sformatf("started bit of queue %0d head", deq_q));
      end
      // model: dequeue, then the granted enqueue
      if (deq) begin
        if (last_deq && last_deq_q == deq_q && mq[deq_q].size() > 1) n_b2b++;
        inq[mq[deq_q][0].idx] = 0;
        void'(mq[deq_q].pop_front());
      end
      if (enq_valid != 0) begin
        automatic int p = enq_valid[0] ? 0 : enq_valid[1] ? 1 : 2;
        automatic ent_t e;
        if ($countones(enq_valid) > 1) n_arb++;
        if (deq && enq_req[p].q == deq_q) begin n_same++; if (mq[deq_q].size() == 0) n_same1++; end
        e.idx = enq_req[p].idx; e.started = enq_req[p].started;
        mq[enq_req[p].q].push_back(e);
        inq[e.idx] = 1;
      end
      last_deq = deq; last_deq_q = deq_q;
      @(negedge clk);
    end
    check(n_b2b > 100 && n_same > 100 && n_same1 > 20 && n_arb > 100,
          $sformatf("corner cases exercised (%0d %0d %0d %0d)", n_b2b, n_same, n_same1, n_arb));
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
