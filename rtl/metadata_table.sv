// Transfer Metadata Table: per-transfer bookkeeping of the segmentation.
//
// 2048 entries of qos_pkg::meta_t (flow ID, TID bitmap, next TID, in-queue
// bit, blocks issued, outstanding blocks, last-block flags, last TID and
// sequence number). One port is dedicated to writes and one to reads, as in
// the reference design, so only reads need arbitration (md_arbiter). Reads
// are synchronous (data one cycle after rd_en). A read issued in the same
// cycle as a write to the same entry returns the new value: the segmenter and
// the message handler read-modify-write entries in consecutive cycles and
// this forwarding keeps them coherent (this design's choice; the reference
// does not say how the collision is resolved).
module metadata_table #(
  parameter int unsigned DEPTH = qos_pkg::NUM_LINES
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  qos_pkg::meta_t           wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output qos_pkg::meta_t           rd_data
);
  qos_pkg::meta_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= (wr_en && wr_addr == rd_addr) ? wr_data : mem[rd_addr];
  end
endmodule
