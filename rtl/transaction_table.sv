// Transaction Table: block descriptors handed to the RDMA send unit.
//
// 1024 entries of qos_pkg::txn_desc_t (256 bits), indexed by transaction ID.
// The transfer segmenter writes through a valid/ready handshake; ready comes
// from the send unit side (its rate limiter runs on a slower, derived clock,
// so ready may lag valid by some cycles). Each accepted write also raises
// issue_valid for one cycle with the TID, telling the send unit that a new
// block is ready. The send unit reads entries through a synchronous read
// port. Sizes follow the reference design; the issue strobe is this design's
// way of telling the send unit about new entries.
module transaction_table #(
  parameter int unsigned DEPTH = qos_pkg::NUM_TIDS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // segmenter write handshake
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [$clog2(DEPTH)-1:0] wr_tid,
  input  qos_pkg::txn_desc_t       wr_data,
  // send unit side
  input  logic                     su_ready,     // send unit / rate limiter can take a block
  output logic                     issue_valid,
  output logic [$clog2(DEPTH)-1:0] issue_tid,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output qos_pkg::txn_desc_t       rd_data
);
  qos_pkg::txn_desc_t mem [DEPTH];

  assign wr_ready = su_ready;

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wr_tid] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issue_valid <= 1'b0;
      issue_tid   <= '0;
    end else begin
      issue_valid <= wr_valid && wr_ready;
      if (wr_valid && wr_ready) issue_tid <= wr_tid;
    end
  end
endmodule
