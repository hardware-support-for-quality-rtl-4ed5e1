// Scheduling FIFO queues in a dynamically shared space.
//
// NUM_Q FIFO queues of transfer-table indices share one 2048-node space: a
// transfer appears in at most one queue at a time, so node x is the transfer
// at line x and only a next pointer per node is needed (2048 x 11 bits, a
// dual-port memory). Each queue is a head register, a tail register and an
// empty bit. A per-node bit records whether the transfer's first block has
// already been issued; it is written on enqueue and returned on dequeue.
//
// Per cycle one enqueue and one dequeue are served:
//   * enqueue (next-pointer write port): on an empty queue head = tail = x,
//     otherwise nextptr[tail] = x and tail = x. One cycle.
//   * dequeue (next-pointer read port): returns the head; if it was the only
//     node the queue becomes empty, otherwise nextptr[head] is read and
//     becomes the new head one cycle later. A dequeue from the same queue in
//     that next cycle takes the value straight from the memory output
//     (forwarding), so back-to-back dequeues work.
//   * enqueue and dequeue on a one-node queue in the same cycle leave the new
//     node as the only one.
// Three enqueue clients compete, fixed priority: port 0 (message handler
// ACK re-scheduling and control-queue entries) over port 1 (segmenter
// re-scheduling) over port 2 (AXI slave, new transfers). enq_ready[i] is
// combinational and does not depend on enq_valid[i]. The dequeue port is
// driven by the segmenter: deq_q selects the queue, deq_idx/deq_started show
// its head combinationally, and deq pops it (only for a non-empty queue).
// The algorithm, the port split and the priority order follow the reference
// design; the fourth enqueue client (remote read requests) is not built.
module sched_fifos
  import qos_pkg::*;
#(
  parameter int unsigned NQ    = NUM_Q,
  parameter int unsigned NODES = NUM_LINES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic       [2:0]         enq_valid,
  input  sched_req_t [2:0]         enq_req,
  output logic       [2:0]         enq_ready,
  output logic       [NQ-1:0]      empty,
  input  logic       [Q_W-1:0]     deq_q,
  input  logic                     deq,
  output logic       [IDX_W-1:0]   deq_idx,
  output logic                     deq_started
);
  logic [IDX_W-1:0] head_q [NQ];
  logic [IDX_W-1:0] tail_q [NQ];
  logic [NQ-1:0]    empty_q;
  logic [NODES-1:0] started_q;

  // next-pointer memory
  logic [IDX_W-1:0] nxt_mem [NODES];
  logic [IDX_W-1:0] nxt_rdata;
  logic             nxt_we, nxt_re;
  logic [IDX_W-1:0] nxt_waddr, nxt_wdata, nxt_raddr;

  // pending head update from last cycle's dequeue
  logic             pend_v;
  logic [Q_W-1:0]   pend_q;

  // selected enqueue
  logic             e_v;
  sched_req_t       e;

  always_comb begin
    enq_ready[0] = 1'b1;
    enq_ready[1] = !enq_valid[0];
    enq_ready[2] = !enq_valid[0] && !enq_valid[1];
    e_v = |enq_valid;
    e   = enq_valid[0] ? enq_req[0] : enq_valid[1] ? enq_req[1] : enq_req[2];
  end

  function automatic logic [IDX_W-1:0] head_eff(input logic [Q_W-1:0] q);
    return (pend_v && pend_q == q) ? nxt_rdata : head_q[q];
  endfunction

  assign empty       = empty_q;
  assign deq_idx     = head_eff(deq_q);
  assign deq_started = started_q[deq_idx];

  wire deq_single = (deq_idx == tail_q[deq_q]);
  wire same_q     = e_v && deq && (e.q == deq_q);

  always_comb begin
    nxt_we    = e_v && !empty_q[e.q];
    nxt_waddr = tail_q[e.q];
    nxt_wdata = e.idx;
    nxt_re    = deq && !deq_single;
    nxt_raddr = deq_idx;
  end

  always_ff @(posedge clk) begin
    if (nxt_we) nxt_mem[nxt_waddr] <= nxt_wdata;
    if (nxt_re) nxt_rdata <= nxt_mem[nxt_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      empty_q   <= '1;
      pend_v    <= 1'b0;
      pend_q    <= '0;
      started_q <= '0;
      for (int q = 0; q < NQ; q++) begin
        head_q[q] <= '0;
        tail_q[q] <= '0;
      end
    end else begin
      // commit last cycle's head update
      if (pend_v) head_q[pend_q] <= nxt_rdata;
      pend_v <= nxt_re;
      pend_q <= deq_q;
      // dequeue of the last node
      if (deq && deq_single && !same_q) empty_q[deq_q] <= 1'b1;
      // enqueue
      if (e_v) begin
        started_q[e.idx] <= e.started;
        tail_q[e.q]      <= e.idx;
        if (empty_q[e.q] || (same_q && deq_single)) begin
          head_q[e.q]  <= e.idx;
          empty_q[e.q] <= 1'b0;
        end
      end
    end
  end

  // Rules of use: no dequeue from an empty queue; no transfer enqueued twice
  // in the same cycle onto an empty queue that is being dequeued.
  a_deq_nonempty: assert property (@(posedge clk) disable iff (!rst_n) deq |-> !empty_q[deq_q]);
  a_enq_q_range:  assert property (@(posedge clk) disable iff (!rst_n) e_v |-> (32'(e.q) < NQ));
endmodule
