// End-to-end test of the QoS engine at its default sizes.
//
// A processor model writes transfer descriptors over AXI (short and long
// inline-payload transfers, memory transfers without congestion management,
// unipath and multipath congestion-managed transfers, some with completion
// notifications), a send-unit model reads every block descriptor from the
// transaction table and takes packets from the packet queue, and a network
// model returns ACKs (out of order) for every block and inline packet. Every
// block is compared with an independent model of the segmentation (source,
// destination, size, flags, TID class), every packet with its descriptor,
// and at the end the channel statuses are polled with 32-channel reads
// (DONE, or ERROR for the transfers answered with a NACK or a wrong sequence
// number) and must read IDLE afterwards. A first phase measures the latency
// (AW handshake to packet-queue push: 4 cycles) and the rate (one packet per
// 2 cycles) of back-to-back 8-byte inline transfers, with the packet
// consumer stopped so that the 16-entry packet queue fills. The random phase
// has 240 transfers of up to 9 blocks plus two 1 MB transfers (17 blocks).
// The send unit and the packet consumer stall at random, and each stall,
// bypass, forwarding and error mechanism must be seen at least once; the
// refused re-enqueue stall must never be seen (it cannot occur, see the
// segmenter).
module tb_qos_engine;
  import qos_pkg::*;

  localparam int NXFER = 240;   // transfers in the random phase

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic [31:0]  awaddr = 0, araddr = 0;
  logic [127:0] wdata = 0, rdata;
  logic [15:0]  wstrb = 0;
  logic [1:0]   bresp, rresp;
  logic         arvalid = 0, arready, rvalid, rready = 1;
  logic         su_ready = 1, blk_valid;
  logic [TID_W-1:0] blk_tid;
  logic         txn_rd_en = 0;
  logic [TID_W-1:0] txn_rd_addr = 0;
  txn_desc_t    txn_rd_data;
  logic         pkt_valid, pkt_ready = 1;
  packet_t      pkt_data;
  logic         rsp_valid = 0, rsp_ready, rsp_nack = 0, ids_ready;
  logic [TID_W-1:0] rsp_tid = 0;
  logic [SEQ_W-1:0] rsp_seq = 0;

  qos_engine dut (
    .clk, .rst_n,
    .s_awvalid(awvalid), .s_awready(awready), .s_awaddr(awaddr),
    .s_wvalid(wvalid), .s_wready(wready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_bvalid(bvalid), .s_bready(bready), .s_bresp(bresp),
    .s_arvalid(arvalid), .s_arready(arready), .s_araddr(araddr),
    .s_rvalid(rvalid), .s_rready(rready), .s_rdata(rdata), .s_rresp(rresp),
    .su_ready, .blk_valid, .blk_tid, .txn_rd_en, .txn_rd_addr, .txn_rd_data,
    .pkt_valid, .pkt_ready, .pkt_data,
    .rsp_valid, .rsp_ready, .rsp_tid, .rsp_seq, .rsp_nack, .ids_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ transfer model
  typedef struct {
    int          kind;      // 0 short inline, 1 long inline, 2 TID only, 3 uni, 4 multi
    bit          notify;
    bit          nack;      // answer with a NACK (inline) or a wrong sequence number
    logic [63:0] src, dst;
    logic [31:0] size;
    logic [3:0]  prio;
    int          nblk, next_blk, acked;
    logic [63:0] p [4];
    int          fid;
    bit          used;
  } xfer_t;
  xfer_t xf [NUM_LINES];
  int    nctrl_exp = 0, nctrl_got = 0, nerr_exp = 0, nblocks = 0, npkts = 0;

  task automatic clear_x(input int l);
    xf[l].kind = 0; xf[l].notify = 0; xf[l].nack = 0; xf[l].src = 0; xf[l].dst = 0;
    xf[l].size = 0; xf[l].prio = 0; xf[l].nblk = 0; xf[l].next_blk = 0; xf[l].acked = 0;
    xf[l].fid = 0; xf[l].used = 0;
    for (int w = 0; w < 4; w++) xf[l].p[w] = 0;
  endtask

  function automatic int ceil_blocks(logic [63:0] dst, logic [31:0] size);
    longint s = dst % 65536, n = 0, left = size;
    n = 1; left -= (65536 - s < size) ? 65536 - s : size;
    while (left > 0) begin n++; left -= 65536; end
    return int'(n);
  endfunction

  // ------------------------------------------------------------ AXI master
  logic [31:0]  aw_q[$];
  logic [127:0] w_q[$];
  logic [15:0]  s_q[$];
  int           b_pending = 0, b_err = 0;

  always @(posedge clk) if (rst_n) begin
    if (awvalid && awready) void'(aw_q.pop_front());
    if (wvalid && wready) begin void'(w_q.pop_front()); void'(s_q.pop_front()); end
    if (bvalid && bready) begin
      b_pending--;
      if (bresp != 2'b00) b_err++;
    end
  end
  always @(negedge clk) begin
    awvalid = aw_q.size() > 0;
    awaddr  = awvalid ? aw_q[0] : 0;
    wvalid  = w_q.size() > 0;
    wdata   = wvalid ? w_q[0] : 0;
    wstrb   = wvalid ? s_q[0] : 0;
  end

  task automatic put128(input int line, input int half, input logic [127:0] d);
    aw_q.push_back({16'd0, 11'(line), 1'(half), 4'd0});
    w_q.push_back(d); s_q.push_back(16'hFFFF); b_pending++;
  endtask
  task automatic put64(input int line, input int word, input logic [63:0] d);
    aw_q.push_back({16'd0, 11'(line), 2'(word), 3'd0});
    w_q.push_back(word[0] ? {d, 64'd0} : {64'd0, d});
    s_q.push_back(word[0] ? 16'hFF00 : 16'h00FF); b_pending++;
  endtask

  task automatic axi_read(input logic [31:0] a, output logic [127:0] d);
    @(negedge clk); arvalid = 1; araddr = a;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(posedge clk);
  endtask

  // Writes the descriptor of transfer line l (one or two lines).
  task automatic write_desc(input int l, input bit use64);
    desc_line0_t d0;
    desc_line1_t d1;
    bit two;
    xfer_t t = xf[l];
    two = (t.kind == 1) || t.notify;
    d0 = '0;
    d0.src = (t.kind <= 1) ? t.p[0] : t.src;
    d0.dst = t.dst;
    d0.size = t.size;
    d0.prio = t.prio;
    d0.qos  = 23'(l);
    d0.ttype.inl = (t.kind <= 1);
    d0.ttype.cm  = (t.kind == 3) ? CM_UNI : (t.kind == 4) ? CM_MULTI : CM_NONE;
    d0.ttype.notify = t.notify;
    d0.enq = !two;
    d1 = '0;
    d1.w0 = t.p[1]; d1.w1 = t.p[2]; d1.w2 = t.p[3]; d1.enq = 1'b1;
    if (use64) begin
      for (int w = 3; w >= 0; w--) put64(l, w, 64'(LINE_W'(d0) >> (64 * w)));
      if (two) for (int w = 0; w < 4; w++) put64(l + 1, w, 64'(LINE_W'(d1) >> (64 * w)));
    end else begin
      put128(l, 0, 128'(LINE_W'(d0))); put128(l, 1, 128'(LINE_W'(d0) >> 128));
      if (two) begin put128(l + 1, 0, 128'(LINE_W'(d1))); put128(l + 1, 1, 128'(LINE_W'(d1) >> 128)); end
    end
  endtask

  // ------------------------------------------------------------ send unit + network
  typedef struct { logic [TID_W-1:0] tid; logic [SEQ_W-1:0] seq; bit nack; } rsp_t;
  rsp_t rsp_q[$];
  logic rd_pending = 0, rp1 = 0;
  logic [TID_W-1:0] rd_tid, tid1;
  bit   rsp_taken = 0;
  bit   random_stalls = 0;
  bit   net_on = 0;
  bit   pkt_hold = 0;      // packet consumer stopped (fills the packet queue)        // responses are held back during the rate measurement

  function automatic int chan_of(logic [63:0] a);
    return int'(a[50:40]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    // block descriptors: read the entry one cycle after its strobe
    if (rd_pending) begin
      automatic txn_desc_t b = txn_rd_data;
      automatic int l = chan_of(b.src);
      automatic longint off, exp_sz, fbs;
      automatic int k = xf[l].next_blk;
      nblocks++;
      fbs = 65536 - (xf[l].dst % 65536);
      if (fbs > xf[l].size) fbs = xf[l].size;
      off = (k == 0) ? 0 : fbs + longint'(k - 1) * 65536;
      exp_sz = (k == 0) ? fbs : ((xf[l].size - off) < 65536 ? xf[l].size - off : 65536);
      check(xf[l].used && xf[l].kind >= 2, $sformatf("block for unknown transfer %0d", l));
      check(b.src == xf[l].src + 64'(off), $sformatf("xfer %0d blk %0d src %h", l, k, b.src));
      check(b.dst == xf[l].dst + 64'(off), $sformatf("xfer %0d blk %0d dst %h", l, k, b.dst));
      check(longint'(b.block_size) == exp_sz, $sformatf("xfer %0d blk %0d size %0d exp %0d", l, k, b.block_size, exp_sz));
      check(b.notif_en == (xf[l].notify && k == xf[l].nblk - 1), $sformatf("xfer %0d notif_en", l));
      check(b.cm == (xf[l].kind >= 3), "cm flag");
      check(b.pdid == 16'(l >> 7), "pdid");
      case (xf[l].kind)
        2: check(rd_tid < 512, "TID-only block has a free TID");
        3: begin
          if (k == 0) xf[l].fid = rd_tid >> 2;
          check(rd_tid >> 2 == xf[l].fid && xf[l].fid >= 128 && xf[l].fid < 192, "unipath TID in its flow");
          check(rd_tid[1:0] == 2'(k), "unipath TID order");
          check(b.chained == (k % 4 != 0) && b.has_next == (k % 4 != 3 && k != xf[l].nblk - 1), "unipath chained/has_next");
        end
        4: begin
          if (k == 0) xf[l].fid = rd_tid >> 2;
          check(rd_tid >> 2 == xf[l].fid + k % 4 && xf[l].fid >= 192 && xf[l].fid % 4 == 0, "multipath FID hop");
          check(rd_tid[1:0] == 2'((k / 4) % 4), "multipath TID within flow");
        end
        default: ;
      endcase
      xf[l].next_blk++;
      rsp_q.push_back('{rd_tid, b.seq[SEQ_W-1:0], 1'b0});
      if (xf[l].nack && k == 0) rsp_q[$].seq = rsp_q[$].seq + 1'b1;   // wrong sequence number
    end
    rp1        <= blk_valid;
    tid1       <= blk_tid;
    rd_pending <= rp1;
    rd_tid     <= tid1;
    rsp_taken  <= rsp_valid && rsp_ready;
    txn_rd_en   <= blk_valid;
    txn_rd_addr <= blk_tid;

    // packets
    if (pkt_valid && pkt_ready) begin
      automatic int l = chan_of(pkt_data.dst);
      npkts++;
      if (pkt_data.kind == PKT_INLINE) begin
        automatic logic [255:0] exp = {xf[l].p[3], xf[l].p[2], xf[l].p[1], xf[l].p[0]};
        automatic logic [255:0] mask = (256'd1 << (8 * xf[l].size)) - 1;
        check(xf[l].used && xf[l].kind <= 1, $sformatf("inline packet for %0d", l));
        check((pkt_data.payload & mask) == (exp & mask), $sformatf("inline payload of %0d", l));
        check(pkt_data.size == 6'(xf[l].size), "inline size");
        rsp_q.push_back('{pkt_data.tid, pkt_data.seq, xf[l].nack});
      end else begin
        nctrl_got++;
        check(xf[l].used && xf[l].notify, $sformatf("control packet for %0d", l));
        check(pkt_data.payload[191:0] == {xf[l].p[3], xf[l].p[2], xf[l].p[1]}, "control packet notification words");
      end
    end
  end

  // network: responses in random order
  always @(negedge clk) begin
    if (rsp_valid && !rsp_taken) begin
      // hold
    end else begin
      rsp_valid = 0;
      if (net_on && rsp_q.size() > 0 && ($urandom % 4 != 0)) begin
        automatic int i = (rsp_q.size() > 1 && $urandom % 2) ? 1 : 0;
        rsp_valid = 1; rsp_tid = rsp_q[i].tid; rsp_seq = rsp_q[i].seq; rsp_nack = rsp_q[i].nack;
        rsp_q.delete(i);
      end
    end
    if (random_stalls) begin
      su_ready  = ($urandom % 4 != 0);
      pkt_ready = ($urandom % 8 < 5);
    end else begin
      su_ready = 1; pkt_ready = !pkt_hold;
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_stall_tx = 0, n_stall_pc = 0, n_stall_md = 0, n_stall_enq = 0, n_bypass = 0, n_fwd = 0;
  int n_ctrl_mh = 0, n_ctrl_seg = 0, n_drop = 0, n_err = 0, n_reenq_mh = 0, n_pc_long = 0;
  int n_fid1 = 0, n_fid4 = 0, n_pq_full = 0, n_multi_rd = 0, n_single_rd = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall_tx  += int'(dut.seg_stall_tx);
    n_stall_pc  += int'(dut.seg_stall_pc);
    n_stall_md  += int'(dut.seg_stall_md);
    n_stall_enq += int'(dut.seg_stall_enq);
    n_bypass    += int'(dut.seg_bypass);
    n_fwd       += int'(dut.sq_deq && dut.u_sched.pend_v && dut.u_sched.pend_q == dut.sq_deq_q);
    n_ctrl_mh   += int'(dut.mh_ev_ctrl);
    n_ctrl_seg  += int'(dut.pc_valid && dut.pc_ready && dut.pc_kind == PKT_CTRL && dut.u_seg.s2_q != Q_CTRL);
    n_drop      += int'(dut.mh_ev_drop);
    n_err       += int'(dut.mh_ev_error);
    n_reenq_mh  += int'(dut.sq_enq_valid[0] && dut.sq_enq_req[0].q != Q_CTRL);
    n_pc_long   += int'(dut.u_pc.state == dut.u_pc.READ2);
    n_fid1      += int'(dut.f1_deq);
    n_fid4      += int'(dut.f4_deq);
    n_pq_full   += int'(!dut.pf_in_ready);
  end

  // ------------------------------------------------------------ latency / rate probe
  int push_cyc[$];
  int cyc = 0, aw_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.pf_in_valid && dut.pf_in_ready) push_cyc.push_back(cyc);
    if (rst_n && awvalid && awready && aw_cyc < 0) aw_cyc = cyc;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [127:0] d;
    int lines[$];
    for (int l = 0; l < NUM_LINES; l++) clear_x(l);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ids_ready);
    @(posedge clk);

    // Phase 1: 16 back-to-back short inline transfers (128-bit writes).
    for (int i = 0; i < 16; i++) begin
      automatic int l = 2 * i;
      xf[l].size = 8; xf[l].dst = {13'd0, 11'(l), 40'h123}; xf[l].used = 1; xf[l].nblk = 1;
      xf[l].p[0] = {$urandom, $urandom};
    end
    // The packet consumer is stopped so that the 16 packets fill the packet queue.
    pkt_hold = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) write_desc(2 * i, 0);
    wait (push_cyc.size() == 16);
    repeat (4) @(posedge clk);
    pkt_hold = 0;
    net_on = 1;
    // AW of the first descriptor is accepted in the cycle after aw0; the packet
    // is pushed 4 cycles after that handshake.
    check(push_cyc[0] - aw_cyc == 4, $sformatf("first inline packet latency %0d cycles after AW", push_cyc[0] - aw_cyc));
    for (int i = 1; i < 16; i++)
      check(push_cyc[i] - push_cyc[i-1] == 2, $sformatf("inline packet rate: gap %0d", push_cyc[i] - push_cyc[i-1]));
    wait (rsp_q.size() == 0 && b_pending == 0);
    repeat (20) @(posedge clk);

    // AXI interleaving: a word of another line while a line is half written.
    // A response for a TID that is not pending is dropped.
    rsp_q.push_back('{10'd5, 12'd0, 1'b0});
    // The line is completed afterwards as a 1-byte inline transfer.
    xf[62].size = 1; xf[62].dst = {13'd0, 11'd62, 40'h0}; xf[62].used = 1; xf[62].nblk = 1;
    xf[62].p[0] = 64'h5a;
    begin
      desc_line0_t d0;
      d0 = '0;
      d0.src = 64'h5a; d0.dst = xf[62].dst; d0.size = 1; d0.ttype.inl = 1; d0.enq = 1;
      put64(62, 0, d0[63:0]); put64(42, 0, 64'h2);
      wait (b_pending == 0);
      check(b_err == 1, "interleaved descriptor write answered with SLVERR");
      put64(62, 1, d0[127:64]); put64(62, 2, d0[191:128]); put64(62, 3, d0[255:192]);
    end
    wait (b_pending == 0);

    // Phase 2: random transfers with random stalls.
    random_stalls = 1;
    for (int n = 0; n < NXFER; n++) begin
      automatic int l = 128 * (n % 16) + 32 + 2 * (n / 16);
      automatic int k = $urandom % 5;
      xf[l].kind = k; xf[l].used = 1;
      xf[l].prio = 4'($urandom % 3);
      xf[l].dst = {13'd0, 11'(l), 24'd0, 16'($urandom)};
      xf[l].src = {5'd1, 8'd0, 11'(l), 24'd0, 16'($urandom)};
      for (int w = 0; w < 4; w++) xf[l].p[w] = {$urandom, $urandom};
      case (k)
        0: xf[l].size = 1 + $urandom % 8;
        1: xf[l].size = 9 + $urandom % 24;
        default: xf[l].size = ($urandom % 4 == 0) ? 33 + $urandom % 1000 : 33 + $urandom % (65536 * 9);
      endcase
      // two transfers of the largest size evaluated for the engine (1 MB)
      if (n == 7 || n == 8) begin
        xf[l].kind = 3 + n - 7;
        xf[l].size = 32'(1 << 20) + 32'(n - 7) * 333;
      end
      xf[l].notify = (xf[l].kind >= 2) && ($urandom % 3 == 0);
      xf[l].nack   = (n % 37 == 5) && xf[l].kind <= 2;
      if (xf[l].nack && xf[l].kind == 2) begin xf[l].size = 100; xf[l].notify = 0; end
      xf[l].nblk   = (xf[l].kind <= 1) ? 1 : ceil_blocks(xf[l].dst, xf[l].size);
      if (xf[l].notify) nctrl_exp++;
      if (xf[l].nack) nerr_exp++;
      write_desc(l, $urandom % 2);
      while (aw_q.size() > 16) @(posedge clk);
    end
    wait (b_pending == 0);
    // wait for all responses to drain
    begin
      int idle = 0;
      while (idle < 400) begin
        @(posedge clk);
        idle = (rsp_q.size() == 0 && !rsp_valid && !pkt_valid && !dut.u_seg.s2_valid) ? idle + 1 : 0;
      end
    end
    random_stalls = 0;

    // Completion: poll every page with two 32-channel reads.
    for (int pg = 0; pg < 16; pg++) for (int h = 0; h < 2; h++) begin
      axi_read({14'd0, 1'b1, 1'b1, 4'(pg), 1'b0, 1'(h), 5'd0, 5'd0}, d);
      n_multi_rd++;
      for (int c = 0; c < 32; c++) begin
        automatic int l = 128 * pg + 32 * h + c;
        automatic logic [1:0] exp;
        if (xf[l].used) exp = xf[l].nack ? 2'd3 : 2'd2;
        else if (l > 0 && xf[l-1].used && (xf[l-1].kind == 1 || xf[l-1].notify)) exp = 2'd0;
        else exp = 2'd0;
        check(d[2*c +: 2] == exp, $sformatf("status of line %0d = %0d, expected %0d", l, d[2*c +: 2], exp));
      end
    end
    // after the read every channel is IDLE again
    axi_read({14'd0, 1'b1, 1'b1, 4'd0, 1'b0, 1'b0, 10'd0}, d);
    n_multi_rd++;
    check(d[63:0] == 64'd0, "statuses reset to IDLE by the 32-channel read");
    axi_read({14'd0, 1'b0, 1'b1, 4'd15, 1'b0, 6'd2, 5'd0}, d);
    n_single_rd++;
    check(d[1:0] == 2'd0, "single-channel read after reset");
    check(nctrl_got == nctrl_exp, $sformatf("control packets %0d expected %0d", nctrl_got, nctrl_exp));
    check(n_err == nerr_exp, $sformatf("errors %0d expected %0d", n_err, nerr_exp));
    check(int'(dut.tid_cnt) == 512 - nerr_exp, $sformatf("all TIDs free again but those of failed transfers (%0d)", dut.tid_cnt));

    // every mechanism happened
    check(n_stall_tx > 0,  "stall: transaction table not ready");
    check(n_stall_pc > 0,  "stall: packet creator / packet queue full");
    check(n_pq_full > 0,   "packet queue full");
    check(n_stall_md > 0,  "stall: metadata arbitration");
    // The segmenter and the message handler enqueue in the cycle after their
    // own metadata grant, so their re-enqueues never meet.
    check(n_stall_enq == 0, "re-enqueue never refused");
    check(n_bypass > 0,    "stage-3 bypass of first blocks");
    check(n_fwd > 0,       "back-to-back dequeue forwarding");
    check(n_ctrl_mh > 0,   "control-queue enqueue by the message handler");
    check(n_ctrl_seg > 0,  "control packet created directly by the segmenter");
    check(n_drop > 0,      "response for a non-pending TID dropped");
    check(n_reenq_mh > 0,  "re-enqueue on ACK");
    check(n_pc_long > 0,   "second descriptor line read by the packet creator");
    check(n_fid1 > 0 && n_fid4 > 0, "unipath and multipath flow IDs allocated");
    $display("blocks=%0d packets=%0d stall_tx=%0d stall_pc=%0d stall_md=%0d stall_enq=%0d bypass=%0d fwd=%0d ctrl_mh=%0d ctrl_seg=%0d drop=%0d err=%0d reenq=%0d pc_long=%0d fid1=%0d fid4=%0d",
             nblocks, npkts, n_stall_tx, n_stall_pc, n_stall_md, n_stall_enq, n_bypass, n_fwd,
             n_ctrl_mh, n_ctrl_seg, n_drop, n_err, n_reenq_mh, n_pc_long, n_fid1, n_fid4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("DBG rsp_q=%0d b_pending=%0d aw_q=%0d w_q=%0d pkts=%0d blocks=%0d s2=%0b pkt_valid=%0b mh=%0d", rsp_q.size(), b_pending, aw_q.size(), w_q.size(), npkts, nblocks, dut.u_seg.s2_valid, pkt_valid, dut.u_mh.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
