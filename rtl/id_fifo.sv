// Free-ID FIFO: holds the transaction IDs or flow IDs that are not in use.
//
// A plain circular FIFO used three times in the engine: the TID FIFO (512 IDs
// of 10 bits, for blocks without congestion management and inline-payload
// transfers), the 1xFID FIFO (64 unipath flow IDs) and the 4xFID FIFO (16
// groups of 4 multipath flow IDs, stored by the first FID of the group).
// One enqueue and one dequeue per cycle. The head is visible combinationally
// on deq_data while not empty; deq removes it at the clock edge. enq while
// full is ignored (it cannot happen: every ID enqueued was dequeued before).
// IDs are filled in after reset by id_fifo_init. The depths follow the
// reference; the circular-buffer implementation is this design's choice.
module id_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enq,
  input  logic [WIDTH-1:0]         enq_data,
  input  logic                     deq,
  output logic [WIDTH-1:0]         deq_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = AW + 1;
  typedef logic [CW-1:0] cnt_t;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_enq = enq && !full;
  wire do_deq = deq && !empty;

  assign empty    = (count == 0);
  assign full     = (count == cnt_t'(DEPTH));
  assign deq_data = mem[rp];

  always_ff @(posedge clk) if (do_enq) mem[wp] <= enq_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_enq) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_deq) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + cnt_t'(do_enq) - cnt_t'(do_deq);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(enq && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(deq && empty));
endmodule
