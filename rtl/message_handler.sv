// Message Handler: processes block acknowledgements from the network.
//
// A three-state FSM, one response at a time:
//   RX   - header handshake (rsp_ready is high here once the free-ID FIFOs
//          are initialised). The response's TID addresses the pending
//          transactions table; its sequence number and ACK/NACK flag are
//          registered.
//   PEND - the pending entry is available. An invalid entry drops the
//          response. A NACK, or an ACK whose sequence number differs from the
//          entry's, marks the transfer's channel ERROR (re-transmission is not
//          supported). A matching ACK requests the transfer's metadata through
//          the metadata arbiter and waits here for the grant.
//   META - the metadata are available. The outstanding count drops by one
//          and ACKs received = blocks issued - outstanding. If blocks remain
//          to be issued and the transfer is not already in a scheduling queue,
//          it is re-enqueued (to the queue recorded in the pending entry). If
//          all blocks have been issued: all ACKed -> channel DONE and, for a
//          congestion-managed transfer, its flow ID (group) returns to its
//          FID FIFO; all but one ACKed and a completion notification wanted ->
//          the transfer goes to the control queue. The metadata are written
//          back (outstanding, in-queue bit, TID bitmap bit cleared, last-ACKed
//          flag), the pending entry is invalidated and, for a block without
//          congestion management (or an inline packet), its TID returns to the
//          TID FIFO. Back to RX.
// A response therefore takes 3 cycles when the metadata read is granted at
// once. The enqueue port used is the scheduling queues' highest-priority one,
// which is always ready. The state sequence and decisions follow the
// reference design; remote read requests are not handled.
module message_handler
  import qos_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ids_ready,
  // network response header
  input  logic             rsp_valid,
  output logic             rsp_ready,
  input  logic [TID_W-1:0] rsp_tid,
  input  logic [SEQ_W-1:0] rsp_seq,
  input  logic             rsp_nack,
  // pending transactions table port B
  output logic             pt_rd_en,
  output logic             pt_wr_en,
  output logic [TID_W-1:0] pt_addr,
  output pend_t            pt_wr_data,
  input  pend_t            pt_rd_data,
  // metadata table
  output logic             md_req,
  input  logic             md_gnt,
  output logic             md_rd_en,
  output logic [IDX_W-1:0] md_rd_addr,
  input  meta_t            md_rd_data,
  output logic             md_wr_en,
  output logic [IDX_W-1:0] md_wr_addr,
  output meta_t            md_wr_data,
  // scheduling queue enqueue (highest priority port)
  output logic             enq_valid,
  input  logic             enq_ready,
  output sched_req_t       enq_req,
  // status registers
  output logic             st_en,
  output logic [WCH_W-1:0] st_ch,
  output logic             st_error,
  // ID returns
  output logic             tid_ret,
  output logic [TID_W-1:0] tid_ret_id,
  output logic             f1_ret,
  output logic [FID_W-1:0] f1_ret_id,
  output logic             f4_ret,
  output logic [FID_W-1:0] f4_ret_id,
  // observation
  output logic             ev_ack,
  output logic             ev_drop,
  output logic             ev_error,
  output logic             ev_done,
  output logic             ev_ctrl
);
  typedef enum logic [1:0] {RX, PEND, META} state_e;
  state_e state;

  logic [TID_W-1:0] tid_q;
  logic [SEQ_W-1:0] seq_q;
  logic             nack_q;
  pend_t            p_q;

  // ------------------------------------------------------------ RX
  assign rsp_ready = (state == RX) && ids_ready;
  wire   rx_fire   = rsp_valid && rsp_ready;

  // ------------------------------------------------------------ PEND
  pend_t p;
  assign p = pt_rd_data;
  wire pend_st    = (state == PEND);
  wire pend_bad   = pend_st && p.valid && (nack_q || p.seq != seq_q);
  wire pend_match = pend_st && p.valid && !nack_q && p.seq == seq_q;
  assign md_req     = pend_match;
  assign md_rd_en   = pend_match && md_gnt;
  assign md_rd_addr = p.xfer;

  // ------------------------------------------------------------ META
  meta_t           m, mw;
  logic [3:0]      new_out;
  logic [BN_W-1:0] acks;
  logic            all_issued, all_acked, want_ctrl, reenq;
  wire             meta_st = (state == META);

  always_comb begin
    m          = md_rd_data;
    new_out    = m.outstanding - 1'b1;
    acks       = m.block_num - BN_W'(new_out);
    all_issued = (m.block_num == p_q.total_blocks);
    all_acked  = all_issued && acks == p_q.total_blocks;
    want_ctrl  = all_issued && p_q.has_notif && acks == p_q.total_blocks - 1'b1;
    reenq      = !all_issued && !m.in_sched;
    mw             = m;
    mw.outstanding = new_out;
    mw.in_sched    = m.in_sched || reenq || want_ctrl;
    mw.last_acked  = m.last_acked || p_q.last;
    if (p_q.cm != CM_NONE) mw.tid_bitmap[tid_q[3:0] & (p_q.cm == CM_UNI ? 4'h3 : 4'hF)] = 1'b0;
  end

  assign md_wr_en   = meta_st;
  assign md_wr_addr = p_q.xfer;
  assign md_wr_data = mw;

  assign enq_valid       = meta_st && (reenq || want_ctrl);
  assign enq_req.q       = want_ctrl ? Q_CTRL : p_q.rq;
  assign enq_req.started = 1'b1;
  assign enq_req.idx     = p_q.xfer;

  // pending table: read in RX, invalidate in META
  assign pt_rd_en   = rx_fire;
  assign pt_wr_en   = meta_st;
  assign pt_addr    = meta_st ? tid_q : rsp_tid;
  always_comb begin
    pt_wr_data       = p_q;
    pt_wr_data.valid = 1'b0;
  end

  // status: ERROR from PEND, DONE from META
  assign st_en    = pend_bad || (meta_st && all_acked);
  assign st_ch    = pend_st ? wch_of(p.xfer) : wch_of(p_q.xfer);
  assign st_error = pend_st;

  assign tid_ret    = meta_st && p_q.cm == CM_NONE;
  assign tid_ret_id = tid_q;
  assign f1_ret     = meta_st && all_acked && p_q.cm == CM_UNI;
  assign f1_ret_id  = m.fid[FID_W-1:0];
  assign f4_ret     = meta_st && all_acked && p_q.cm == CM_MULTI;
  assign f4_ret_id  = m.fid[FID_W-1:0];

  assign ev_ack   = meta_st;
  assign ev_drop  = pend_st && !p.valid;
  assign ev_error = pend_bad;
  assign ev_done  = meta_st && all_acked;
  assign ev_ctrl  = meta_st && want_ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= RX;
      tid_q  <= '0;
      seq_q  <= '0;
      nack_q <= 1'b0;
      p_q    <= '0;
    end else begin
      case (state)
        RX: if (rx_fire) begin
          tid_q  <= rsp_tid;
          seq_q  <= rsp_seq;
          nack_q <= rsp_nack;
          state  <= PEND;
        end
        PEND: begin
          if (!p.valid || pend_bad) state <= RX;
          else if (md_gnt) begin
            p_q   <= p;
            state <= META;
          end
        end
        META: state <= RX;
        default: state <= RX;
      endcase
    end
  end

  a_enq_granted: assert property (@(posedge clk) disable iff (!rst_n) enq_valid |-> enq_ready);
  a_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
                                  meta_st |-> md_rd_data.outstanding != 4'd0);
endmodule
