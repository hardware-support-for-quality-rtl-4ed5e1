// Packet Creator FSM: builds the packets the QoS engine sends itself.
//
// Two kinds of packet go to the packet queue (qos_pkg::packet_t):
//   * inline payload - a transfer of at most 32 bytes whose data sit in its
//     descriptor (payload_0 in the first line, payload_1..3 in the second);
//   * control        - the completion-notification packet of a transfer,
//     carrying the last TID and sequence number of the transfer and the
//     three notification words of the descriptor's second line.
// The segmenter hands over a request with the first descriptor line. An
// inline transfer of up to 8 bytes needs nothing more: the packet is pushed
// in the same cycle (req_ready follows pkt_ready) and nothing stalls. Any
// other request is registered (IDLE), the second line is read from the
// transfer table read port shared with the segmenter (READ2: tt_busy is high
// so the segmenter's stage 1 does not use the port), and the packet is pushed
// when the line arrives (EMIT), waiting there while the packet queue is
// full; tt_busy stays high while it waits, so that the line on the shared
// read port is not replaced. The state sequence follows the reference design's packet creator;
// the packet layout is this design's choice.
module packet_creator
  import qos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  pkt_kind_e         req_kind,
  input  logic [IDX_W-1:0]  req_idx,
  input  desc_line0_t       req_line0,
  input  logic [TID_W-1:0]  req_tid,
  input  logic [SEQ_W-1:0]  req_seq,
  // transfer table read port (shared)
  output logic              tt_busy,
  output logic              tt_rd_en,
  output logic [IDX_W-1:0]  tt_rd_addr,
  input  logic [LINE_W-1:0] tt_rd_data,
  // packet queue
  output logic              pkt_valid,
  input  logic              pkt_ready,
  output packet_t           pkt_data
);
  typedef enum logic [1:0] {IDLE, READ2, EMIT} state_e;
  state_e state;

  pkt_kind_e        kind_q;
  logic [IDX_W-1:0] idx_q;
  desc_line0_t      line0_q;
  logic [TID_W-1:0] tid_q;
  logic [SEQ_W-1:0] seq_q;
  desc_line1_t      line1;

  wire short_inline = (req_kind == PKT_INLINE) && (req_line0.size <= 32'd8);

  assign line1      = desc_line1_t'(tt_rd_data);
  assign tt_busy    = (state == READ2) || (state == EMIT && !pkt_ready);
  assign tt_rd_en   = (state == READ2);
  assign tt_rd_addr = idx_q + 1'b1;

  always_comb begin
    req_ready = 1'b0;
    pkt_valid = 1'b0;
    pkt_data  = '0;
    case (state)
      IDLE: begin
        req_ready = short_inline ? pkt_ready : 1'b1;
        pkt_valid = req_valid && short_inline;
        pkt_data.kind    = PKT_INLINE;
        pkt_data.tid     = req_tid;
        pkt_data.seq     = req_seq;
        pkt_data.pdid    = req_idx[10:7];
        pkt_data.size    = req_line0.size[5:0];
        pkt_data.dst     = req_line0.dst;
        pkt_data.payload = {192'd0, req_line0.src};
      end
      EMIT: begin
        pkt_valid = 1'b1;
        pkt_data.kind = kind_q;
        pkt_data.tid  = tid_q;
        pkt_data.seq  = seq_q;
        pkt_data.pdid = idx_q[10:7];
        pkt_data.dst  = line0_q.dst;
        if (kind_q == PKT_INLINE) begin
          pkt_data.size    = line0_q.size[5:0];
          pkt_data.payload = {line1.w2, line1.w1, line1.w0, line0_q.src};
        end else begin
          pkt_data.size    = 6'd24;
          pkt_data.payload = {64'd0, line1.w2, line1.w1, line1.w0};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      kind_q  <= PKT_INLINE;
      idx_q   <= '0;
      line0_q <= '0;
      tid_q   <= '0;
      seq_q   <= '0;
    end else begin
      case (state)
        IDLE: if (req_valid && !short_inline) begin
          state   <= READ2;
          kind_q  <= req_kind;
          idx_q   <= req_idx;
          line0_q <= req_line0;
          tid_q   <= req_tid;
          seq_q   <= req_seq;
        end
        READ2: state <= EMIT;
        EMIT:  if (pkt_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
