// Unit test of packet_creator.
//
// A segmenter model sends random requests (short inline of 1..8 bytes, long
// inline of 9..32 bytes, control) with valid/ready and, whenever tt_busy is
// low, uses the shared transfer-table read port itself for a random line, as
// stage 1 of the segmenter does. The packet queue accepts at random. The
// transfer table is modelled (synchronous read, data held). Checked: every
// request yields exactly one packet, in order, with the kind, TID, sequence
// number, protection domain, size, destination and payload taken from the
// right descriptor words; short inline packets are pushed in the request
// cycle; the second line is read at index + 1.
module tb_packet_creator;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 0, req_ready;
  pkt_kind_e         req_kind = PKT_INLINE;
  logic [IDX_W-1:0]  req_idx = 0;
  desc_line0_t       req_line0 = '0;
  logic [TID_W-1:0]  req_tid = 0;
  logic [SEQ_W-1:0]  req_seq = 0;
  logic              tt_busy, tt_rd_en;
  logic [IDX_W-1:0]  tt_rd_addr;
  logic [LINE_W-1:0] tt_rd_data;
  logic              pkt_valid, pkt_ready = 1;
  packet_t           pkt_data;

  packet_creator dut (.*);

  int checks = 0, failures = 0, n_short = 0, n_long = 0, n_ctrl = 0, n_full = 0, n_steal = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // transfer table: each word of line x holds a pattern derived from x and
  // the word number
  function automatic logic [LINE_W-1:0] line_pat(input logic [IDX_W-1:0] x);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 4; w++) l[64*w +: 64] = {32'(x) * 32'h9E3779B1, 8'(w), 13'(x), 11'h2a5};
    return l;
  endfunction
  logic seg_rd = 0;
  logic [IDX_W-1:0] seg_addr = 0;
  always @(posedge clk) begin
    if (tt_rd_en) tt_rd_data <= line_pat(tt_rd_addr);
    else if (seg_rd) tt_rd_data <= line_pat(seg_addr);
  end

  packet_t exp_q[$];
  always @(posedge clk) if (rst_n) begin
    check(!(tt_rd_en && seg_rd), "read port used by one client at a time");
    if (pkt_valid && !pkt_ready) n_full++;
    if (pkt_valid && pkt_ready) begin
      check(exp_q.size() > 0, "packet expected");
      if (exp_q.size() > 0) check(pkt_data == exp_q.pop_front(), "packet contents");
    end
  end
  always @(negedge clk) begin
    pkt_ready = ($urandom % 3 != 0);
    // segmenter stage 1 reads when the port is free
    seg_rd   = !tt_busy && ($urandom % 2);
    seg_addr = IDX_W'($urandom);
    if (seg_rd) n_steal++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      automatic packet_t e = '0;
      automatic desc_line1_t l1;
      automatic int k = $urandom % 3;
      req_kind  = (k == 2) ? PKT_CTRL : PKT_INLINE;
      req_idx   = IDX_W'($urandom);
      req_line0 = desc_line0_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      req_line0.size = (k == 0) ? 32'(1 + $urandom % 8) : (k == 1) ? 32'(9 + $urandom % 24) : 32'($urandom);
      req_tid = TID_W'($urandom);
      req_seq = SEQ_W'($urandom);
      l1 = desc_line1_t'(line_pat(req_idx + 1'b1));
      e.kind = req_kind; e.tid = req_tid; e.seq = req_seq; e.pdid = req_idx[10:7]; e.dst = req_line0.dst;
      case (k)
        0: begin e.size = req_line0.size[5:0]; e.payload = {192'd0, req_line0.src}; n_short++; end
        1: begin e.size = req_line0.size[5:0]; e.payload = {l1.w2, l1.w1, l1.w0, req_line0.src}; n_long++; end
        default: begin e.size = 6'd24; e.payload = {64'd0, l1.w2, l1.w1, l1.w0}; n_ctrl++; end
      endcase
      exp_q.push_back(e);
      req_valid = 1;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      if (k == 0) check(pkt_valid && pkt_data == e, "short inline pushed in the request cycle");
      @(negedge clk);
      req_valid = 0;
      if (k != 0) begin
        check(tt_rd_en && tt_rd_addr == req_idx + 1'b1 && tt_busy, "second line read at index + 1");
      end
      if ($urandom % 2) @(negedge clk);
    end
    while (exp_q.size() > 0) @(negedge clk);
    check(n_full > 100 && n_steal > 100, "full packet queue and shared read port exercised");
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
