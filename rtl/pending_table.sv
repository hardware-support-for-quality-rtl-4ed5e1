// Pending Transactions Table: one entry per transaction ID in flight.
//
// 1024 entries of qos_pkg::pend_t, indexed by TID. Port A is written by the
// transfer segmenter when it issues a block or an inline-payload packet;
// port B is read and written by the message handler when a response arrives
// (read in its first state, entry invalidated later). Reads are synchronous.
// The valid bits are kept in resettable registers so that a response with a
// stale or unknown TID always finds an invalid entry after reset; the rest
// of each entry is plain memory. Port B's write has priority over port A's
// for the valid bit of the same entry (cannot happen in normal operation,
// since a TID is not re-issued before it is acknowledged).
module pending_table #(
  parameter int unsigned DEPTH = qos_pkg::NUM_TIDS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // port A: segmenter writes
  input  logic                     a_wr_en,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  qos_pkg::pend_t           a_wr_data,
  // port B: message handler reads and writes
  input  logic                     b_rd_en,
  input  logic                     b_wr_en,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  qos_pkg::pend_t           b_wr_data,
  output qos_pkg::pend_t           b_rd_data
);
  qos_pkg::pend_t   mem [DEPTH];
  logic [DEPTH-1:0] valid_q;
  qos_pkg::pend_t   rd_q;
  logic             rd_valid_q;

  always_ff @(posedge clk) begin
    if (a_wr_en) mem[a_addr] <= a_wr_data;
    if (b_wr_en) mem[b_addr] <= b_wr_data;
    if (b_rd_en) rd_q <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      rd_valid_q <= 1'b0;
    end else begin
      if (a_wr_en) valid_q[a_addr] <= a_wr_data.valid;
      if (b_wr_en) valid_q[b_addr] <= b_wr_data.valid;
      if (b_rd_en) rd_valid_q <= valid_q[b_addr];
    end
  end

  always_comb begin
    b_rd_data       = rd_q;
    b_rd_data.valid = rd_valid_q;
  end
endmodule
