// Unit test of axi_slave.
//
// An AXI master model posts random descriptors (one- and two-line, on random
// pages and channels), each line split at random into 64-bit and 128-bit
// writes in random order, with invalid writes (bad strobes, misaligned
// addresses) and interleaved writes to another line mixed in. The scheduling
// queues refuse enqueues at random. Checked against a model:
//   * every completed line is written to the transfer table once, with the
//     assembled contents, in order;
//   * each descriptor is enqueued once, with the index of its first line and
//     the queue chosen from type, congestion mode and intra priority, and
//     the channel goes BUSY in the same cycle;
//   * every write gets one B response, in order: OKAY, or SLVERR for invalid
//     and interleaved writes, which change nothing;
//   * status reads (single and 32-channel, valid and invalid addresses)
//     return the status word of the addressed channels, or SLVERR.
module tb_axi_slave;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic [31:0]  awaddr = 0, araddr = 0;
  logic [127:0] wdata = 0, rdata;
  logic [15:0]  wstrb = 0;
  logic [1:0]   bresp, rresp;
  logic         arvalid = 0, arready, rvalid, rready = 1;
  logic         tt_wr_en;
  logic [IDX_W-1:0]  tt_wr_addr;
  logic [LINE_W-1:0] tt_wr_data;
  logic         enq_valid, enq_ready = 1;
  sched_req_t   enq_req;
  logic         st_busy_en, st_rd_en, st_rd_multi;
  logic [WCH_W-1:0] st_busy_ch;
  logic [3:0]   st_rd_page;
  logic [5:0]   st_rd_ch;
  logic [63:0]  st_rd_data;

  axi_slave dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // status registers model: a fixed pattern per (mode, page, channel)
  function automatic logic [63:0] st_pat(input logic m, input logic [3:0] pg, input logic [5:0] ch);
    return {m, pg, ch, 21'h0, m, pg, ch, 21'h15a5a};
  endfunction
  assign st_rd_data = st_pat(st_rd_multi, st_rd_page, st_rd_ch);

  // ------------------------------------------------------------ AXI write master
  logic [31:0]  aw_q[$];
  logic [127:0] w_q[$];
  logic [15:0]  s_q[$];
  logic [1:0]   b_exp[$];
  typedef struct { logic [IDX_W-1:0] line; logic [LINE_W-1:0] data; } tt_t;
  tt_t        tt_exp[$];
  sched_req_t enq_exp[$];
  int n_bad = 0, n_clash = 0, n_enq_stall = 0, n_two = 0, n_rd = 0, n_rd_bad = 0;

  always @(posedge clk) if (rst_n) begin
    if (awvalid && awready) void'(aw_q.pop_front());
    if (wvalid && wready) begin void'(w_q.pop_front()); void'(s_q.pop_front()); end
    if (bvalid && bready) begin
      check(b_exp.size() > 0, "B response expected");
      if (b_exp.size() > 0) check(bresp == b_exp.pop_front(), "B response code");
    end
    if (tt_wr_en) begin
      check(tt_exp.size() > 0, "transfer table write expected");
      if (tt_exp.size() > 0) begin
        automatic tt_t e = tt_exp.pop_front();
        check(tt_wr_addr == e.line && tt_wr_data == e.data, $sformatf("line %0d written", e.line));
      end
    end
    if (enq_valid && !enq_ready) n_enq_stall++;
    check(st_busy_en == (enq_valid && enq_ready), "BUSY with the enqueue");
    if (enq_valid && enq_ready) begin
      check(enq_exp.size() > 0, "enqueue expected");
      if (enq_exp.size() > 0) begin
        automatic sched_req_t e = enq_exp.pop_front();
        check(enq_req == e, $sformatf("enqueue of transfer %0d to queue %0d", e.idx, e.q));
        check(st_busy_ch == wch_of(e.idx), "BUSY channel");
      end
    end
  end
  always @(negedge clk) begin
    awvalid = aw_q.size() > 0 && ($urandom % 5 != 0);
    awaddr  = aw_q.size() > 0 ? aw_q[0] : 0;
    wvalid  = w_q.size() > 0 && ($urandom % 5 != 0);
    wdata   = w_q.size() > 0 ? w_q[0] : 0;
    wstrb   = s_q.size() > 0 ? s_q[0] : 0;
    enq_ready = ($urandom % 3 != 0);
    bready  = ($urandom % 4 != 0);
  end

  task automatic wr(input logic [31:0] a, input logic [127:0] d, input logic [15:0] s, input logic [1:0] r);
    aw_q.push_back(a); w_q.push_back(d); s_q.push_back(s); b_exp.push_back(r);
  endtask

  // a write that must be refused; other_line for the interleaving case
  task automatic bad_write(input logic [IDX_W-1:0] line, input bit partial, input logic [IDX_W-1:0] other);
    case ($urandom % 4)
      0: begin wr({16'd0, line, 2'd1, 3'd0}, '1, 16'h0F0F, 2'b10); n_bad++; end
      1: begin wr({16'd0, line, 2'd0, 3'd4}, '1, 16'h00FF, 2'b10); n_bad++; end
      2: begin wr({16'd0, line, 2'd1, 3'd0}, '1, 16'hFFFF, 2'b10); n_bad++; end
      default: if (partial) begin wr({16'd0, other, 2'd0, 3'd0}, '1, 16'h00FF, 2'b10); n_clash++; end
    endcase
  endtask

  // sends one 256-bit line as a random mix of writes
  task automatic send_line(input logic [IDX_W-1:0] line, input logic [LINE_W-1:0] d);
    int order[$];
    bit wide [2];
    wide[0] = $urandom % 2; wide[1] = $urandom % 2;
    for (int h = 0; h < 2; h++)
      if (wide[h]) order.push_back(8 + h); else begin order.push_back(2 * h); order.push_back(2 * h + 1); end
    order.shuffle();
    foreach (order[i]) begin
      automatic int o = order[i];
      if (i > 0 && $urandom % 8 == 0) bad_write(line, 1, line ^ 11'h100);
      if (o >= 8) wr({16'd0, line, 1'(o - 8), 4'd0}, d[128*(o-8) +: 128], 16'hFFFF, 2'b00);
      else        wr({16'd0, line, 2'(o), 3'd0}, o[0] ? {d[64*o +: 64], 64'd0} : {64'd0, d[64*o +: 64]},
                     o[0] ? 16'hFF00 : 16'h00FF, 2'b00);
    end
    tt_exp.push_back('{line, d});
  endtask

  function automatic logic [Q_W-1:0] exp_queue(input desc_line0_t l);
    if (l.ttype.inl || l.ttype.cm == CM_NONE) return Q_TID;
    if (l.ttype.cm == CM_UNI) return q_uni_no(l.prio);
    return q_multi_no(l.prio);
  endfunction

  // ------------------------------------------------------------ status reads
  initial begin : reader
    wait (rst_n);
    repeat (5) @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      automatic logic [31:0] a = {14'd0, 1'($urandom), 1'b1, 4'($urandom), 1'b0, 6'($urandom), 5'd0};
      automatic bit bad = ($urandom % 6 == 0);
      if (bad) begin if ($urandom % 2) a[16] = 1'b0; else a[2] = 1'b1; end
      @(negedge clk); arvalid = 1; araddr = a;
      do @(posedge clk); while (!arready);
      check(st_rd_en == !bad, "status read enable");
      if (!bad) check(st_rd_multi == a[17] && st_rd_page == a[15:12] && st_rd_ch == a[10:5], "status read fields");
      @(negedge clk); arvalid = 0;
      while (!rvalid) @(posedge clk);
      if (bad) begin
        n_rd_bad++;
        check(rresp == 2'b10 && rdata == '0, "invalid read answered with SLVERR");
      end else begin
        n_rd++;
        check(rresp == 2'b00 && rdata == {64'd0, st_pat(a[17], a[15:12], a[10:5])}, "status read data");
      end
      @(posedge clk);
    end
  end

  // ------------------------------------------------------------ descriptors
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      automatic logic [IDX_W-1:0] l = {4'($urandom), 6'($urandom), 1'b0};
      automatic desc_line0_t d0;
      automatic desc_line1_t d1;
      automatic bit two = $urandom % 2;
      automatic sched_req_t e;
      d0 = desc_line0_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      d0.rsvd = 63'($urandom);
      d0.ttype.cm = cm_mode_e'($urandom % 3);
      d0.enq = !two;
      d1 = desc_line1_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      d1.enq = 1'b1;
      if ($urandom % 4 == 0) bad_write(l, 0, 0);
      send_line(l, LINE_W'(d0));
      if (two) begin send_line(l + 1'b1, LINE_W'(d1)); n_two++; end
      e.idx = l; e.q = exp_queue(d0); e.started = 1'b0;
      enq_exp.push_back(e);
      while (aw_q.size() > 12) @(posedge clk);
    end
    wait (aw_q.size() == 0 && w_q.size() == 0 && b_exp.size() == 0);
    repeat (10) @(posedge clk);
    wait (n_rd + n_rd_bad == 400);
    check(tt_exp.size() == 0 && enq_exp.size() == 0, "every line written and every descriptor enqueued");
    check(n_bad > 50 && n_clash > 20 && n_enq_stall > 50 && n_two > 100 && n_rd_bad > 20,
          $sformatf("corner cases exercised (%0d %0d %0d %0d %0d)", n_bad, n_clash, n_enq_stall, n_two, n_rd_bad));
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
