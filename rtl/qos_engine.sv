// QoS engine of an RDMA: the top level.
//
// Processors issue transfers by writing descriptors over AXI into one of 2048
// virtual channels (transfer table). Each new transfer is enqueued into a
// scheduling queue chosen by its type and intra priority. The transfer
// segmenter dequeues at block level (one operation per cycle), cuts memory
// transfers into 64 KB blocks written as block descriptors to the
// transaction table for the RDMA send unit, and turns inline-payload
// transfers and completion notifications into packets for the packet queue.
// Each issued block gets a TID (from the free TID FIFO, or statically from
// the transfer's flow ID(s) for congestion-managed transfers), a sequence
// number and a pending-transactions entry. Acknowledgements from the network
// are handled by the message handler, which re-schedules transfers (at most
// 2 outstanding blocks each), returns IDs and marks channels DONE or ERROR in
// the status registers, which processors poll one or 32 channels per read.
//
// Interfaces: AXI slave (128-bit, single beats); transaction table write
// acceptance (su_ready), new-block strobe and read port for the send unit;
// packet queue (valid/ready); response headers (valid/ready). After reset the
// free-ID FIFOs fill for 592 cycles (ids_ready low); transfers written in
// that time wait in their queues. The engine's structure follows the
// reference design; remote read requests, time-outs and re-transmission are
// not part of it.
module qos_engine
  import qos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI slave
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [127:0]      s_wdata,
  input  logic [15:0]       s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [31:0]       s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [127:0]      s_rdata,
  output logic [1:0]        s_rresp,
  // RDMA send unit: block descriptors
  input  logic              su_ready,
  output logic              blk_valid,
  output logic [TID_W-1:0]  blk_tid,
  input  logic              txn_rd_en,
  input  logic [TID_W-1:0]  txn_rd_addr,
  output txn_desc_t         txn_rd_data,
  // RDMA send unit: packets
  output logic              pkt_valid,
  input  logic              pkt_ready,
  output packet_t           pkt_data,
  // network responses
  input  logic              rsp_valid,
  output logic              rsp_ready,
  input  logic [TID_W-1:0]  rsp_tid,
  input  logic [SEQ_W-1:0]  rsp_seq,
  input  logic              rsp_nack,
  output logic              ids_ready
);
  // ------------------------------------------------------------ time base
  logic [31:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  // ------------------------------------------------------------ transfer table
  logic              tt_we;
  logic [IDX_W-1:0]  tt_waddr;
  logic [LINE_W-1:0] tt_wdata;
  logic              tt_re, seg_tt_re, pc_tt_re, pc_tt_busy;
  logic [IDX_W-1:0]  tt_raddr, seg_tt_raddr, pc_tt_raddr;
  logic [LINE_W-1:0] tt_rdata;

  assign tt_re    = seg_tt_re || pc_tt_re;
  assign tt_raddr = pc_tt_re ? pc_tt_raddr : seg_tt_raddr;

  transfer_table u_tt (
    .clk, .wr_en(tt_we), .wr_addr(tt_waddr), .wr_data(tt_wdata),
    .rd_en(tt_re), .rd_addr(tt_raddr), .rd_data(tt_rdata));

  // ------------------------------------------------------------ status registers
  logic             st_busy_en, st_rd_en, st_rd_multi, mh_st_en, mh_st_err;
  logic [WCH_W-1:0] st_busy_ch, mh_st_ch;
  logic [3:0]       st_rd_page;
  logic [5:0]       st_rd_ch;
  logic [63:0]      st_rd_data;

  status_regs u_status (
    .clk, .rst_n, .busy_en(st_busy_en), .busy_ch(st_busy_ch),
    .mh_en(mh_st_en), .mh_ch(mh_st_ch), .mh_error(mh_st_err),
    .rd_en(st_rd_en), .rd_multi(st_rd_multi), .rd_page(st_rd_page), .rd_ch(st_rd_ch),
    .rd_data(st_rd_data));

  // ------------------------------------------------------------ scheduling queues
  logic       [2:0]       sq_enq_valid, sq_enq_ready;
  sched_req_t [2:0]       sq_enq_req;
  logic       [NUM_Q-1:0] sq_empty;
  logic       [Q_W-1:0]   sq_deq_q;
  logic                   sq_deq, sq_deq_started;
  logic       [IDX_W-1:0] sq_deq_idx;

  sched_fifos u_sched (
    .clk, .rst_n, .enq_valid(sq_enq_valid), .enq_req(sq_enq_req), .enq_ready(sq_enq_ready),
    .empty(sq_empty), .deq_q(sq_deq_q), .deq(sq_deq), .deq_idx(sq_deq_idx),
    .deq_started(sq_deq_started));

  // ------------------------------------------------------------ AXI slave
  axi_slave u_axi (
    .clk, .rst_n,
    .awvalid(s_awvalid), .awready(s_awready), .awaddr(s_awaddr),
    .wvalid(s_wvalid), .wready(s_wready), .wdata(s_wdata), .wstrb(s_wstrb),
    .bvalid(s_bvalid), .bready(s_bready), .bresp(s_bresp),
    .arvalid(s_arvalid), .arready(s_arready), .araddr(s_araddr),
    .rvalid(s_rvalid), .rready(s_rready), .rdata(s_rdata), .rresp(s_rresp),
    .tt_wr_en(tt_we), .tt_wr_addr(tt_waddr), .tt_wr_data(tt_wdata),
    .enq_valid(sq_enq_valid[2]), .enq_ready(sq_enq_ready[2]), .enq_req(sq_enq_req[2]),
    .st_busy_en, .st_busy_ch, .st_rd_en, .st_rd_multi, .st_rd_page, .st_rd_ch, .st_rd_data);

  // ------------------------------------------------------------ free-ID FIFOs
  logic             init_tid_enq, init_f1_enq, init_f4_enq;
  logic [TID_W-1:0] init_tid;
  logic [FID_W-1:0] init_f1, init_f4;
  logic             mh_tid_ret, mh_f1_ret, mh_f4_ret;
  logic [TID_W-1:0] mh_tid_id;
  logic [FID_W-1:0] mh_f1_id, mh_f4_id;
  logic             tid_empty, f1_empty, f4_empty, tid_deq, f1_deq, f4_deq;
  logic             tid_full, f1_full, f4_full;
  logic [TID_W-1:0] tid_head;
  logic [FID_W-1:0] f1_head, f4_head;
  logic [9:0]       tid_cnt;
  logic [6:0]       f1_cnt;
  logic [4:0]       f4_cnt;

  id_fifo_init u_init (
    .clk, .rst_n, .tid_enq(init_tid_enq), .tid_data(init_tid),
    .fid1_enq(init_f1_enq), .fid1_data(init_f1), .fid4_enq(init_f4_enq), .fid4_data(init_f4),
    .done(ids_ready));

  id_fifo #(.DEPTH(NUM_FREE_TID), .WIDTH(TID_W)) u_tid_fifo (
    .clk, .rst_n, .enq(init_tid_enq || mh_tid_ret), .enq_data(init_tid_enq ? init_tid : mh_tid_id),
    .deq(tid_deq), .deq_data(tid_head), .empty(tid_empty), .full(tid_full), .count(tid_cnt));
  id_fifo #(.DEPTH(FID1_NUM), .WIDTH(FID_W)) u_fid1_fifo (
    .clk, .rst_n, .enq(init_f1_enq || mh_f1_ret), .enq_data(init_f1_enq ? init_f1 : mh_f1_id),
    .deq(f1_deq), .deq_data(f1_head), .empty(f1_empty), .full(f1_full), .count(f1_cnt));
  id_fifo #(.DEPTH(FID4_NUM), .WIDTH(FID_W)) u_fid4_fifo (
    .clk, .rst_n, .enq(init_f4_enq || mh_f4_ret), .enq_data(init_f4_enq ? init_f4 : mh_f4_id),
    .deq(f4_deq), .deq_data(f4_head), .empty(f4_empty), .full(f4_full), .count(f4_cnt));

  // ------------------------------------------------------------ metadata
  logic             seg_md_req, seg_md_gnt, mh_md_req, mh_md_gnt;
  logic             seg_md_re, mh_md_re, seg_md_we, mh_md_we;
  logic [IDX_W-1:0] seg_md_raddr, mh_md_raddr, seg_md_waddr, mh_md_waddr;
  meta_t            seg_md_wdata, mh_md_wdata, md_rdata;

  md_arbiter u_md_arb (
    .clk, .rst_n, .seg_req(seg_md_req), .mh_req(mh_md_req), .seg_gnt(seg_md_gnt), .mh_gnt(mh_md_gnt));

  metadata_table u_md (
    .clk,
    .wr_en(seg_md_we || mh_md_we), .wr_addr(seg_md_we ? seg_md_waddr : mh_md_waddr),
    .wr_data(seg_md_we ? seg_md_wdata : mh_md_wdata),
    .rd_en(seg_md_re || mh_md_re), .rd_addr(seg_md_re ? seg_md_raddr : mh_md_raddr),
    .rd_data(md_rdata));

  // ------------------------------------------------------------ pending table
  logic             seg_pt_we, mh_pt_re, mh_pt_we;
  logic [TID_W-1:0] seg_pt_addr, mh_pt_addr;
  pend_t            seg_pt_wdata, mh_pt_wdata, pt_rdata;

  pending_table u_pt (
    .clk, .rst_n, .a_wr_en(seg_pt_we), .a_addr(seg_pt_addr), .a_wr_data(seg_pt_wdata),
    .b_rd_en(mh_pt_re), .b_wr_en(mh_pt_we), .b_addr(mh_pt_addr), .b_wr_data(mh_pt_wdata),
    .b_rd_data(pt_rdata));

  // ------------------------------------------------------------ sequence numbers
  logic             seq_inc;
  logic [SEQ_W-1:0] seq;
  seq_num_gen u_seq (.clk, .rst_n, .inc(seq_inc), .seq);

  // ------------------------------------------------------------ packet path
  logic             pc_valid, pc_ready;
  pkt_kind_e        pc_kind;
  logic [IDX_W-1:0] pc_idx;
  desc_line0_t      pc_line0;
  logic [TID_W-1:0] pc_tid;
  logic [SEQ_W-1:0] pc_seq;
  logic             pf_in_valid, pf_in_ready;
  packet_t          pf_in_data;

  packet_creator u_pc (
    .clk, .rst_n, .req_valid(pc_valid), .req_ready(pc_ready), .req_kind(pc_kind),
    .req_idx(pc_idx), .req_line0(pc_line0), .req_tid(pc_tid), .req_seq(pc_seq),
    .tt_busy(pc_tt_busy), .tt_rd_en(pc_tt_re), .tt_rd_addr(pc_tt_raddr), .tt_rd_data(tt_rdata),
    .pkt_valid(pf_in_valid), .pkt_ready(pf_in_ready), .pkt_data(pf_in_data));

  packet_fifo u_pkt_fifo (
    .clk, .rst_n, .in_valid(pf_in_valid), .in_ready(pf_in_ready), .in_data(pf_in_data),
    .out_valid(pkt_valid), .out_ready(pkt_ready), .out_data(pkt_data));

  // ------------------------------------------------------------ transaction table
  logic             tx_valid, tx_ready;
  logic [TID_W-1:0] tx_tid;
  txn_desc_t        tx_data;

  transaction_table u_txn (
    .clk, .rst_n, .wr_valid(tx_valid), .wr_ready(tx_ready), .wr_tid(tx_tid), .wr_data(tx_data),
    .su_ready, .issue_valid(blk_valid), .issue_tid(blk_tid),
    .rd_en(txn_rd_en), .rd_addr(txn_rd_addr), .rd_data(txn_rd_data));

  // ------------------------------------------------------------ segmenter
  logic seg_stall_tx, seg_stall_pc, seg_stall_md, seg_stall_enq, seg_bypass;

  transfer_segmenter u_seg (
    .clk, .rst_n, .ids_ready, .now,
    .q_empty(sq_empty), .deq_q(sq_deq_q), .deq(sq_deq), .deq_idx(sq_deq_idx),
    .deq_started(sq_deq_started),
    .enq_valid(sq_enq_valid[1]), .enq_ready(sq_enq_ready[1]), .enq_req(sq_enq_req[1]),
    .tid_empty, .tid_head, .tid_deq, .f1_empty, .f1_head, .f1_deq, .f4_empty, .f4_head, .f4_deq,
    .tt_rd_en(seg_tt_re), .tt_rd_addr(seg_tt_raddr), .tt_rd_data(tt_rdata), .pc_tt_busy,
    .md_req(seg_md_req), .md_gnt(seg_md_gnt), .md_rd_en(seg_md_re), .md_rd_addr(seg_md_raddr),
    .md_rd_data(md_rdata), .md_wr_en(seg_md_we), .md_wr_addr(seg_md_waddr), .md_wr_data(seg_md_wdata),
    .pt_wr_en(seg_pt_we), .pt_wr_addr(seg_pt_addr), .pt_wr_data(seg_pt_wdata),
    .seq, .seq_inc,
    .pc_valid, .pc_ready, .pc_kind, .pc_idx, .pc_line0, .pc_tid, .pc_seq,
    .tx_valid, .tx_ready, .tx_tid, .tx_data,
    .stall_tx(seg_stall_tx), .stall_pc(seg_stall_pc), .stall_md(seg_stall_md),
    .stall_enq(seg_stall_enq), .bypass_issue(seg_bypass));

  // ------------------------------------------------------------ message handler
  logic mh_ev_ack, mh_ev_drop, mh_ev_error, mh_ev_done, mh_ev_ctrl;

  message_handler u_mh (
    .clk, .rst_n, .ids_ready,
    .rsp_valid, .rsp_ready, .rsp_tid, .rsp_seq, .rsp_nack,
    .pt_rd_en(mh_pt_re), .pt_wr_en(mh_pt_we), .pt_addr(mh_pt_addr), .pt_wr_data(mh_pt_wdata),
    .pt_rd_data(pt_rdata),
    .md_req(mh_md_req), .md_gnt(mh_md_gnt), .md_rd_en(mh_md_re), .md_rd_addr(mh_md_raddr),
    .md_rd_data(md_rdata), .md_wr_en(mh_md_we), .md_wr_addr(mh_md_waddr), .md_wr_data(mh_md_wdata),
    .enq_valid(sq_enq_valid[0]), .enq_ready(sq_enq_ready[0]), .enq_req(sq_enq_req[0]),
    .st_en(mh_st_en), .st_ch(mh_st_ch), .st_error(mh_st_err),
    .tid_ret(mh_tid_ret), .tid_ret_id(mh_tid_id), .f1_ret(mh_f1_ret), .f1_ret_id(mh_f1_id),
    .f4_ret(mh_f4_ret), .f4_ret_id(mh_f4_id),
    .ev_ack(mh_ev_ack), .ev_drop(mh_ev_drop), .ev_error(mh_ev_error), .ev_done(mh_ev_done),
    .ev_ctrl(mh_ev_ctrl));

  // Shared ports are used by one client per cycle.
  a_md_wr_one: assert property (@(posedge clk) disable iff (!rst_n) !(seg_md_we && mh_md_we));
  a_tt_rd_one: assert property (@(posedge clk) disable iff (!rst_n) !(seg_tt_re && pc_tt_re));
  a_tid_enq:   assert property (@(posedge clk) disable iff (!rst_n) !(init_tid_enq && mh_tid_ret));
endmodule
