// Unit test of message_handler.
//
// The pending-transactions and metadata tables are modelled in the
// testbench (synchronous reads), and the metadata arbiter grants at random.
// Each response is checked on its own, against a model of the handler's
// decision:
//   * the response is dropped (invalid pending entry): no status change and
//     no table write;
//   * NACK or wrong sequence number: the channel goes ERROR, nothing else;
//   * matching ACK: the metadata are read only after the grant, written back
//     with one outstanding block less, the in-queue bit and the TID bitmap
//     updated; the transfer is re-enqueued when blocks remain and it is not
//     queued, or sent to the control queue when only the last ACK is
//     missing and a notification is wanted; DONE and the FID return when
//     every block is acknowledged; the TID returns for blocks without
//     congestion management; the pending entry is invalidated.
// It also checks that a response with an immediate grant takes 3 cycles.
module tb_message_handler;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ids_ready = 0, rsp_valid = 0, rsp_ready, rsp_nack = 0;
  logic [TID_W-1:0] rsp_tid = 0;
  logic [SEQ_W-1:0] rsp_seq = 0;
  logic             pt_rd_en, pt_wr_en;
  logic [TID_W-1:0] pt_addr;
  pend_t            pt_wr_data, pt_rd_data;
  logic             md_req, md_gnt, md_rd_en, md_wr_en;
  logic [IDX_W-1:0] md_rd_addr, md_wr_addr;
  meta_t            md_rd_data, md_wr_data;
  logic             enq_valid, enq_ready;
  sched_req_t       enq_req;
  logic             st_en, st_error;
  logic [WCH_W-1:0] st_ch;
  logic             tid_ret, f1_ret, f4_ret;
  logic [TID_W-1:0] tid_ret_id;
  logic [FID_W-1:0] f1_ret_id, f4_ret_id;
  logic             ev_ack, ev_drop, ev_error, ev_done, ev_ctrl;

  message_handler dut (.*);

  assign enq_ready = 1'b1;

  int checks = 0, failures = 0;
  int n_drop = 0, n_err = 0, n_ack = 0, n_done = 0, n_ctrl = 0, n_reenq = 0, n_wait = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // table models
  pend_t pmem [1024];
  meta_t mmem [2048];
  bit    gnt_on = 0;
  assign md_gnt = md_req && gnt_on;
  always @(posedge clk) begin
    if (pt_rd_en) pt_rd_data <= pmem[pt_addr];
    if (pt_wr_en) pmem[pt_addr] <= pt_wr_data;
    if (md_rd_en) md_rd_data <= mmem[md_rd_addr];
    if (md_wr_en) mmem[md_wr_addr] <= md_wr_data;
  end

  // observed during one response
  int    c_st, c_mdw, c_enq, c_tid, c_f1, c_f4, c_ptw, cyc, c_rd_before_gnt;
  bit    o_err;
  logic [WCH_W-1:0] o_ch;
  meta_t o_mw;
  sched_req_t o_enq;
  logic [TID_W-1:0] o_tid;
  logic [FID_W-1:0] o_fid;
  pend_t o_pw;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (st_en)    begin c_st++; o_err = st_error; o_ch = st_ch; end
    if (md_wr_en) begin c_mdw++; o_mw = md_wr_data; check(md_wr_addr == md_rd_addr, "metadata written back to the entry read"); end
    if (md_rd_en && !md_gnt) c_rd_before_gnt++;
    if (enq_valid) begin c_enq++; o_enq = enq_req; end
    if (tid_ret)  begin c_tid++; o_tid = tid_ret_id; end
    if (f1_ret)   begin c_f1++; o_fid = f1_ret_id; end
    if (f4_ret)   begin c_f4++; o_fid = f4_ret_id; end
    if (pt_wr_en) begin c_ptw++; o_pw = pt_wr_data; end
  end

  task automatic one(input int kind);  // 0 drop, 1 NACK, 2 wrong seq, 3 ACK
    logic [TID_W-1:0] tid;
    pend_t p;
    meta_t m, mw;
    logic [BN_W-1:0] acks;
    bit all_issued, all_acked, want_ctrl, reenq;
    tid = 10'($urandom);
    p = pend_t'({$urandom, $urandom, $urandom, $urandom});
    p.valid = (kind != 0);
    p.cm = cm_mode_e'($urandom % 3);
    p.total_blocks = 18'(1 + $urandom % 6);
    m = meta_t'({$urandom, $urandom, $urandom});
    m.outstanding = 4'(1 + $urandom % 2);
    m.block_num = ($urandom % 2) ? p.total_blocks : 18'($urandom % (p.total_blocks + 1));
    if (m.block_num < 18'(m.outstanding)) m.block_num = 18'(m.outstanding);
    if (m.block_num > p.total_blocks) p.total_blocks = m.block_num;
    pmem[tid] = p;
    mmem[p.xfer] = m;
    // model
    acks = m.block_num - 18'(m.outstanding - 1);
    all_issued = m.block_num == p.total_blocks;
    all_acked  = all_issued && acks == p.total_blocks;
    want_ctrl  = all_issued && p.has_notif && acks == p.total_blocks - 1;
    reenq      = !all_issued && !m.in_sched;
    mw = m;
    mw.outstanding = m.outstanding - 1'b1;
    mw.in_sched = m.in_sched || reenq || want_ctrl;
    mw.last_acked = m.last_acked || p.last;
    if (p.cm == CM_UNI) mw.tid_bitmap[tid[1:0]] = 1'b0;
    if (p.cm == CM_MULTI) mw.tid_bitmap[tid[3:0]] = 1'b0;
    // counters
    c_st = 0; c_mdw = 0; c_enq = 0; c_tid = 0; c_f1 = 0; c_f4 = 0; c_ptw = 0; c_rd_before_gnt = 0;
    gnt_on = ($urandom % 2);
    @(negedge clk);
    rsp_valid = 1; rsp_tid = tid; rsp_nack = (kind == 1);
    rsp_seq = (kind == 2) ? p.seq + 1'b1 : p.seq;
    check(rsp_ready, "ready in RX");
    cyc = 0;
    @(negedge clk);
    rsp_valid = 0;
    while (!rsp_ready) begin
      if (!gnt_on && $urandom % 3 == 0) begin gnt_on = 1; n_wait++; end
      @(negedge clk);
    end
    case (kind)
      0: begin
        n_drop++;
        check(c_st == 0 && c_mdw == 0 && c_ptw == 0 && c_enq == 0 && c_tid == 0, "dropped response changes nothing");
        check(cyc == 2, "drop takes 2 cycles");
      end
      1, 2: begin
        n_err++;
        check(c_st == 1 && o_err && o_ch == wch_of(p.xfer), "ERROR status for NACK / wrong sequence number");
        check(c_mdw == 0 && c_ptw == 0 && c_enq == 0 && c_tid == 0 && c_f1 == 0 && c_f4 == 0, "error changes nothing else");
      end
      default: begin
        n_ack++;
        check(c_rd_before_gnt == 0, "metadata read only with the grant");
        check(c_mdw == 1 && o_mw == mw, $sformatf("metadata written back (tid %0d)", tid));
        check(c_ptw == 1 && !o_pw.valid, "pending entry invalidated");
        check(c_st == (all_acked ? 1 : 0), "DONE only when every block is acknowledged");
        if (all_acked) begin check(!o_err && o_ch == wch_of(p.xfer), "DONE status"); n_done++; end
        check(c_enq == ((reenq || want_ctrl) ? 1 : 0), "enqueue decision");
        if (want_ctrl) begin check(o_enq.q == Q_CTRL && o_enq.idx == p.xfer, "control queue"); n_ctrl++; end
        else if (reenq) begin check(o_enq.q == p.rq && o_enq.idx == p.xfer && o_enq.started, "re-enqueue"); n_reenq++; end
        check(c_tid == (p.cm == CM_NONE ? 1 : 0), "TID return");
        if (p.cm == CM_NONE) check(o_tid == tid, "TID returned");
        check(c_f1 == ((all_acked && p.cm == CM_UNI) ? 1 : 0) && c_f4 == ((all_acked && p.cm == CM_MULTI) ? 1 : 0), "FID return");
        if (all_acked && p.cm != CM_NONE) check(o_fid == m.fid[FID_W-1:0], "FID returned");
      end
    endcase
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) pmem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rsp_ready, "not ready before the ID FIFOs are initialised");
    ids_ready = 1;
    // one response with an immediate grant: 3 cycles
    begin
      pend_t p;
      meta_t m;
      p = '0; p.valid = 1; p.xfer = 11'd5; p.total_blocks = 18'd3; p.seq = 12'd7; p.rq = Q_TID;
      m = '0; m.block_num = 18'd1; m.outstanding = 4'd1;
      pmem[9] = p; mmem[5] = m;
      gnt_on = 1;
      @(negedge clk);
      rsp_valid = 1; rsp_tid = 10'd9; rsp_seq = 12'd7; rsp_nack = 0;
      cyc = 0;
      @(negedge clk);
      rsp_valid = 0;
      while (!rsp_ready) @(negedge clk);
      check(cyc == 3, $sformatf("ACK handled in %0d cycles", cyc));
    end
    for (int n = 0; n < 3000; n++) one(($urandom % 5 == 0) ? 0 : ($urandom % 6 == 0) ? 1 : ($urandom % 6 == 0) ? 2 : 3);
    check(n_drop > 50 && n_err > 50 && n_done > 50 && n_ctrl > 20 && n_reenq > 50 && n_wait > 50,
          $sformatf("all decisions exercised (%0d %0d %0d %0d %0d %0d)", n_drop, n_err, n_done, n_ctrl, n_reenq, n_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
