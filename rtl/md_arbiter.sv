// Transfer Metadata Table read arbiter.
//
// The segmenter (stage 1) and the message handler (second state) both read
// the metadata table through one port. A one-bit state remembers who was
// served last; when both request in the same cycle the other one is
// granted, so neither can starve ("last served" adaptive priority, as in the
// reference design). A lone requester is granted at once. Grants are
// combinational; the state advances at the clock edge of a grant.
module md_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic seg_req,
  input  logic mh_req,
  output logic seg_gnt,
  output logic mh_gnt
);
  typedef enum logic {LAST_SEG = 1'b0, LAST_MH = 1'b1} last_e;
  last_e last_q;

  always_comb begin
    seg_gnt = seg_req && (!mh_req || last_q == LAST_MH);
    mh_gnt  = mh_req && !seg_gnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= LAST_MH;
    else if (seg_gnt) last_q <= LAST_SEG;
    else if (mh_gnt) last_q <= LAST_MH;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(seg_gnt && mh_gnt));
endmodule
