// Transfer Segmenter: schedules transfers at block level and issues blocks.
//
// A three-stage pipeline that serves one transfer per cycle when nothing
// stalls.
//
// Stage 1 (queue selection). Among the non-empty scheduling queues whose
// resource is available, the highest-priority one is chosen: control queue;
// TID-only queue (needs a free TID); unipath queues that already own a flow
// ID; unipath queues without one (need a free 1xFID); multipath queues with
// flow IDs; multipath queues without (need a free 4xFID group); within a
// class, intra priority 0 first. The head is dequeued only if the metadata
// arbiter grants the read, stage 2 is free in the next cycle and the packet
// creator is not using the transfer-table read port. The head index addresses
// the transfer table and the metadata table (data in the next cycle); a TID
// or flow ID is taken from its free-ID FIFO in the same cycle when needed.
//
// Stage 2 (bookkeeping), first cycle: from the descriptor's first line and
// the metadata (treated as zero when the queue entry says the first block
// has not been issued) it computes the total number of blocks
//   ceil over 64 KB boundaries of [dst, dst + size),
// the block's TID (free TID, or flow ID << 2 + next TID; multipath transfers
// hop over their 4 flow IDs from block to block), the sequence number and
// the number of acknowledged blocks (blocks issued - outstanding). It writes
// the pending-transactions entry and the updated metadata (block count +1,
// outstanding +1, next TID, TID bitmap, in-queue bit, last TID/sequence for
// the last block). Then, until each is accepted, it
//   * re-enqueues the transfer into its "has flow ID" (or TID-only) queue if
//     blocks remain and fewer than 2 are outstanding;
//   * asks the packet creator for an inline-payload packet, or for a control
//     packet when the transfer came from the control queue or when its last
//     block is issued while all the others are already acknowledged and it
//     wants a completion notification;
//   * issues a first block directly to the transaction table (stage 3
//     bypass, first block size = 64 KB - dst mod 64 KB, or the whole transfer)
//     when stage 3 is empty, or passes later blocks to stage 3.
// Stage 3 computes the block's address offset first_size + (n-1)*64 KB for
// source and destination and its size (64 KB, or the remainder for the last
// block) and writes the block descriptor through valid/ready.
//
// Stalls: transaction-table write not ready, packet queue full (through the
// packet creator), metadata read not granted, re-enqueue not granted. The
// last one is kept for safety but cannot occur with this message handler:
// both enqueue in the cycle after their own metadata grant, and the arbiter
// grants one of them per cycle. The
// pipeline organisation, formulas, queue order and stall causes follow the
// reference design; the chained/has-next flags of multipath blocks (a flow
// is the up to 4 blocks that share one flow ID), the descriptor encodings
// and protection-domain ID = page are this design's reading.
module transfer_segmenter
  import qos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ids_ready,    // free-ID FIFOs initialised
  input  logic [31:0]       now,          // free-running time for issue stamps
  // scheduling queues
  input  logic [NUM_Q-1:0]  q_empty,
  output logic [Q_W-1:0]    deq_q,
  output logic              deq,
  input  logic [IDX_W-1:0]  deq_idx,
  input  logic              deq_started,
  output logic              enq_valid,
  input  logic              enq_ready,
  output sched_req_t        enq_req,
  // free-ID FIFOs
  input  logic              tid_empty,
  input  logic [TID_W-1:0]  tid_head,
  output logic              tid_deq,
  input  logic              f1_empty,
  input  logic [FID_W-1:0]  f1_head,
  output logic              f1_deq,
  input  logic              f4_empty,
  input  logic [FID_W-1:0]  f4_head,
  output logic              f4_deq,
  // transfer table read port
  output logic              tt_rd_en,
  output logic [IDX_W-1:0]  tt_rd_addr,
  input  logic [LINE_W-1:0] tt_rd_data,
  input  logic              pc_tt_busy,
  // metadata table
  output logic              md_req,
  input  logic              md_gnt,
  output logic              md_rd_en,
  output logic [IDX_W-1:0]  md_rd_addr,
  input  meta_t             md_rd_data,
  output logic              md_wr_en,
  output logic [IDX_W-1:0]  md_wr_addr,
  output meta_t             md_wr_data,
  // pending transactions table
  output logic              pt_wr_en,
  output logic [TID_W-1:0]  pt_wr_addr,
  output pend_t             pt_wr_data,
  // sequence numbers
  input  logic [SEQ_W-1:0]  seq,
  output logic              seq_inc,
  // packet creator
  output logic              pc_valid,
  input  logic              pc_ready,
  output pkt_kind_e         pc_kind,
  output logic [IDX_W-1:0]  pc_idx,
  output desc_line0_t       pc_line0,
  output logic [TID_W-1:0]  pc_tid,
  output logic [SEQ_W-1:0]  pc_seq,
  // transaction table write
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [TID_W-1:0]  tx_tid,
  output txn_desc_t         tx_data,
  // observation of stalls (one per cause, for statistics and tests)
  output logic              stall_tx,
  output logic              stall_pc,
  output logic              stall_md,
  output logic              stall_enq,
  output logic              bypass_issue
);
  localparam logic [BLOCK_LOG2:0] BS = (BLOCK_LOG2+1)'(1 << BLOCK_LOG2);

  typedef struct packed {
    logic                f_enq, f_pc, f_tx, f_s3;
    sched_req_t          enq;
    pkt_kind_e           pc_kind;
    logic [TID_W-1:0]    pc_tid;
    logic [SEQ_W-1:0]    pc_seq;
    desc_line0_t         line0;
    logic [TID_W-1:0]    tid;
    txn_desc_t           tx;        // final for a first block, base otherwise
    logic [BLOCK_LOG2:0] first_bs;
    logic [BLOCK_LOG2:0] last_bs;
    logic [BN_W-1:0]     bn;
    logic                is_last;
  } s2_res_t;

  // ---------------------------------------------------------------- stage 1
  logic             sel_v;
  logic [Q_W-1:0]   sel_q;

  function automatic logic q_eligible(input int q, input logic t_e, input logic a_e,
                                      input logic b_e);
    if (q == 0) return 1'b1;
    if (q == 1) return !t_e;
    if (q < 2 + INTRA_PRIO) return 1'b1;
    if (q < 2 + 2 * INTRA_PRIO) return !a_e;
    if (q < 2 + 3 * INTRA_PRIO) return 1'b1;
    return !b_e;
  endfunction

  always_comb begin
    sel_v = 1'b0;
    sel_q = '0;
    for (int q = NUM_Q - 1; q >= 0; q--) begin
      if (!q_empty[q] && q_eligible(q, tid_empty, f1_empty, f4_empty)) begin
        sel_v = 1'b1;
        sel_q = Q_W'(q);
      end
    end
  end

  // stage 2/3 registers
  logic             s2_valid, s2_fresh;
  logic [IDX_W-1:0] s2_idx;
  logic [Q_W-1:0]   s2_q;
  logic             s2_started;
  logic [TID_W-1:0] s2_new_tid;
  logic [FID_W-1:0] s2_new_fid;
  s2_res_t          s2c, s2q, s2r;
  logic             f_enq, f_pc, f_tx, f_s3;  // still to do

  logic             s3_valid;
  s2_res_t          s3;
  logic             s2_done_now, s3_free;

  wire s1_try = sel_v && ids_ready && !pc_tt_busy && (!s2_valid || s2_done_now);
  assign md_req = s1_try;
  wire s1_fire = s1_try && md_gnt;

  assign deq        = s1_fire;
  assign deq_q      = sel_q;
  assign tt_rd_en   = s1_fire;
  assign tt_rd_addr = deq_idx;
  assign md_rd_en   = s1_fire;
  assign md_rd_addr = deq_idx;
  assign tid_deq    = s1_fire && sel_q == Q_TID;
  assign f1_deq     = s1_fire && sel_q >= Q_W'(2 + INTRA_PRIO) && sel_q < Q_W'(2 + 2 * INTRA_PRIO);
  assign f4_deq     = s1_fire && sel_q >= Q_W'(2 + 3 * INTRA_PRIO);

  // ---------------------------------------------------------------- stage 2
  desc_line0_t l0;
  meta_t       m, mw;
  pend_t       pw;
  logic [BN_W-1:0] tot, acks;
  logic [8:0]  fid;
  logic [3:0]  nt;
  logic        is_ctrl, is_inl, notify;
  logic [Q_W-1:0] rq;
  logic [1:0]  fpos;

  always_comb begin
    l0   = desc_line0_t'(tt_rd_data);
    m    = s2_started ? md_rd_data : '0;
    is_ctrl = (s2_q == Q_CTRL);
    is_inl  = l0.ttype.inl;
    notify  = l0.ttype.notify && !is_inl;
    tot  = is_inl ? BN_W'(1) : total_blocks(l0.dst, l0.size);
    acks = m.block_num - BN_W'(m.outstanding);
    fid  = s2_started ? m.fid : {1'b0, s2_new_fid};
    nt   = s2_started ? m.next_tid : 4'd0;
    rq   = (is_inl || l0.ttype.cm == CM_NONE) ? Q_TID :
           (l0.ttype.cm == CM_UNI) ? q_uni_have(l0.prio) : q_multi_have(l0.prio);

    s2c = '0;
    s2c.line0   = l0;
    s2c.bn      = m.block_num;
    s2c.is_last = (m.block_num + 1'b1 == tot);
    s2c.first_bs = first_block_size(l0.dst, l0.size);
    s2c.last_bs  = (BLOCK_LOG2+1)'((l0.size - 32'(s2c.first_bs)) & 32'((1 << BLOCK_LOG2) - 1));
    if (s2c.last_bs == '0) s2c.last_bs = BS;

    // transaction ID
    case (is_inl ? CM_NONE : l0.ttype.cm)
      CM_UNI:   s2c.tid = {fid[7:0], nt[1:0]};
      CM_MULTI: s2c.tid = {fid[7:2], nt[3:2], nt[1:0]};
      default:  s2c.tid = s2_new_tid;
    endcase

    // metadata update
    mw = m;
    mw.fid         = fid;
    mw.block_num   = m.block_num + 1'b1;
    mw.outstanding = m.outstanding + 1'b1;
    mw.last_issued = s2c.is_last;
    if (s2c.is_last) begin
      mw.last_tid = s2c.tid;
      mw.last_seq = seq;
    end
    case (is_inl ? CM_NONE : l0.ttype.cm)
      CM_UNI: begin
        mw.next_tid = {2'b00, nt[1:0] + 2'd1};
        mw.tid_bitmap[nt] = 1'b1;
      end
      CM_MULTI: begin
        mw.next_tid = {nt[3:2] + 2'd1, nt[1:0] + {1'b0, nt[3:2] == 2'd3}};
        mw.tid_bitmap[nt] = 1'b1;
      end
      default: ;
    endcase
    s2c.f_enq = !is_ctrl && !s2c.is_last &&
                (32'(m.outstanding) + 1 < MAX_OUTSTANDING);
    mw.in_sched = s2c.f_enq;

    // pending transactions entry
    pw = '0;
    pw.valid        = 1'b1;
    pw.issue_time   = now;
    pw.seq          = seq;
    pw.xfer         = s2_idx;
    pw.prio         = l0.prio;
    pw.qos          = l0.qos[21:0];
    pw.total_blocks = tot;
    pw.last         = s2c.is_last;
    pw.has_notif    = notify;
    pw.cm           = is_inl ? CM_NONE : l0.ttype.cm;
    pw.rq           = rq;

    s2c.enq = '{q: rq, started: 1'b1, idx: s2_idx};

    // packet creator
    s2c.f_pc    = is_ctrl || is_inl || (notify && s2c.is_last && acks == tot - 1'b1);
    s2c.pc_kind = (is_inl && !is_ctrl) ? PKT_INLINE : PKT_CTRL;
    s2c.pc_tid  = is_ctrl ? m.last_tid : s2c.tid;
    s2c.pc_seq  = is_ctrl ? m.last_seq : seq;

    // block descriptor
    fpos = (l0.ttype.cm == CM_MULTI) ? m.block_num[3:2] : m.block_num[1:0];
    s2c.tx = '0;
    s2c.tx.src      = l0.src;
    s2c.tx.dst      = l0.dst;
    s2c.tx.pdid     = {12'd0, s2_idx[10:7]};
    s2c.tx.seq      = {2'b00, seq};
    s2c.tx.cm       = (l0.ttype.cm != CM_NONE);
    s2c.tx.notif_en = notify && s2c.is_last;
    s2c.tx.chained  = (l0.ttype.cm != CM_NONE) && fpos != 2'd0;
    if (l0.ttype.cm == CM_UNI)
      s2c.tx.has_next = fpos != 2'd3 && !s2c.is_last;
    else if (l0.ttype.cm == CM_MULTI)
      s2c.tx.has_next = fpos != 2'd3 && (m.block_num + BN_W'(4) < tot);
    s2c.tx.block_size = s2c.first_bs;
    s2c.f_tx = !is_ctrl && !is_inl && m.block_num == '0;
    s2c.f_s3 = !is_ctrl && !is_inl && m.block_num != '0;
  end

  assign s2r = s2_fresh ? s2c : s2q;

  assign md_wr_en   = s2_valid && s2_fresh && !is_ctrl;
  assign md_wr_addr = s2_idx;
  assign md_wr_data = mw;
  assign pt_wr_en   = s2_valid && s2_fresh && !is_ctrl;
  assign pt_wr_addr = s2c.tid;
  assign pt_wr_data = pw;
  assign seq_inc    = s2_valid && s2_fresh && !is_ctrl;

  wire cur_enq = s2_fresh ? s2c.f_enq : f_enq;
  wire cur_pc  = s2_fresh ? s2c.f_pc  : f_pc;
  wire cur_tx  = s2_fresh ? s2c.f_tx  : f_tx;
  wire cur_s3  = s2_fresh ? s2c.f_s3  : f_s3;

  assign enq_valid = s2_valid && cur_enq;
  assign enq_req   = s2r.enq;
  assign pc_valid  = s2_valid && cur_pc;
  assign pc_kind   = s2r.pc_kind;
  assign pc_idx    = s2_idx;
  assign pc_line0  = s2r.line0;
  assign pc_tid    = s2r.pc_tid;
  assign pc_seq    = s2r.pc_seq;

  // ---------------------------------------------------------------- stage 3
  logic [63:0] off;
  txn_desc_t   s3_tx;
  always_comb begin
    off   = 64'(s3.first_bs) + (64'(s3.bn - 1'b1) << BLOCK_LOG2);
    s3_tx = s3.tx;
    s3_tx.src        = s3.tx.src + off;
    s3_tx.dst        = s3.tx.dst + off;
    s3_tx.block_size = s3.is_last ? s3.last_bs : BS;
  end

  wire byp = s2_valid && cur_tx && !s3_valid;
  assign tx_valid = s3_valid || byp;
  assign tx_tid   = s3_valid ? s3.tid : s2r.tid;
  assign tx_data  = s3_valid ? s3_tx : s2r.tx;
  assign s3_free  = !s3_valid || tx_ready;

  wire enq_done = !cur_enq || enq_ready;
  wire pc_done  = !cur_pc  || pc_ready;
  wire tx_done  = !cur_tx  || (byp && tx_ready);
  wire s3_done  = !cur_s3  || s3_free;
  assign s2_done_now = enq_done && pc_done && tx_done && s3_done;

  assign stall_tx     = tx_valid && !tx_ready;
  assign stall_pc     = s2_valid && cur_pc && !pc_ready;
  assign stall_md     = s1_try && !md_gnt;
  assign stall_enq    = s2_valid && cur_enq && !enq_ready;
  assign bypass_issue = byp && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid   <= 1'b0;
      s2_fresh   <= 1'b0;
      s2_idx     <= '0;
      s2_q       <= '0;
      s2_started <= 1'b0;
      s2_new_tid <= '0;
      s2_new_fid <= '0;
      s2q        <= '0;
      f_enq <= 1'b0; f_pc <= 1'b0; f_tx <= 1'b0; f_s3 <= 1'b0;
      s3_valid   <= 1'b0;
      s3         <= '0;
    end else begin
      // stage 3
      if (s3_valid && tx_ready) s3_valid <= 1'b0;
      if (s2_valid && cur_s3 && s3_free) begin
        s3_valid <= 1'b1;
        s3       <= s2r;
      end
      // stage 2
      if (s2_fresh) s2q <= s2c;
      s2_fresh <= 1'b0;
      f_enq <= cur_enq && !enq_ready;
      f_pc  <= cur_pc && !pc_ready;
      f_tx  <= cur_tx && !(byp && tx_ready);
      f_s3  <= cur_s3 && !s3_free;
      if (s2_valid && s2_done_now) s2_valid <= 1'b0;
      // stage 1 -> 2
      if (s1_fire) begin
        s2_valid   <= 1'b1;
        s2_fresh   <= 1'b1;
        s2_idx     <= deq_idx;
        s2_q       <= sel_q;
        s2_started <= deq_started;
        s2_new_tid <= tid_head;
        s2_new_fid <= (sel_q >= Q_W'(2 + 3 * INTRA_PRIO)) ? f4_head : f1_head;
      end
    end
  end

  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                tx_valid && !tx_ready |=> tx_valid);
endmodule
