// AXI slave: processors write transfer descriptors and read channel status.
//
// Writes (AW, W, B channels, single-beat, 128-bit data). A write address is
// {.., line[10:0] = {page, channel} at bits 15:5, 64-bit word at bits 4:3,
// 3'b000}. Writes of 64 bits (strobe 0x00FF or 0xFF00 matching address bit
// 3) and 128 bits (strobe 0xFFFF, address bit 3 clear) are accepted; other
// strobes or a non-zero address bits 2:0 get SLVERR. Addresses wait in an
// 8-deep FIFO, so the data of a write always belongs to the FIFO head (one
// cycle of start-up latency). Words are collected in one set of accumulator
// registers, in any order within a 256-bit line; the word that completes the
// line writes it to the transfer table in the same cycle. A word for a
// different line while the accumulator is partly full is dropped with
// SLVERR (interleaved descriptors are not supported).
// A line whose enq bit (bit 0 of word 3) is set ends a descriptor: in the
// same cycle the transfer is enqueued to its scheduling queue and its
// channel goes BUSY. For a two-line descriptor the transfer is the line
// written just before (its first line, whose type, size and priority pick
// the queue). New transfers start in the TID-only queue (inline payload and
// transfers without congestion management) or in the no-FID queue of their
// class and intra priority. If the enqueue is not granted (lower priority
// than the other clients) the W channel waits. Responses wait in an 8-deep
// FIFO for the B channel.
// Reads (AR, R): address bit 16 selects the status registers, bit 17 the
// mode (0: one channel, 1: 32 channels of half a page), bits 15:12 the page,
// bits 10:5 the channel (bit 10 selects the half in mode 1); bits 3:0 must be
// zero. One read is outstanding at a time; R carries the 2-bit codes in the
// low bits of the 128-bit data. Read channels are not served locally.
// FIFO depths, the accumulator and the two read modes follow the reference;
// the address bit positions are this design's choice.
module axi_slave
  import qos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI write address / data / response
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       awaddr,
  input  logic              wvalid,
  output logic              wready,
  input  logic [127:0]      wdata,
  input  logic [15:0]       wstrb,
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  // AXI read address / data
  input  logic              arvalid,
  output logic              arready,
  input  logic [31:0]       araddr,
  output logic              rvalid,
  input  logic              rready,
  output logic [127:0]      rdata,
  output logic [1:0]        rresp,
  // transfer table port 0
  output logic              tt_wr_en,
  output logic [IDX_W-1:0]  tt_wr_addr,
  output logic [LINE_W-1:0] tt_wr_data,
  // scheduling queue enqueue
  output logic              enq_valid,
  input  logic              enq_ready,
  output sched_req_t        enq_req,
  // status registers
  output logic              st_busy_en,
  output logic [WCH_W-1:0]  st_busy_ch,
  output logic              st_rd_en,
  output logic              st_rd_multi,
  output logic [3:0]        st_rd_page,
  output logic [5:0]        st_rd_ch,
  input  logic [63:0]       st_rd_data
);
  localparam logic [1:0] OKAY = 2'b00, SLVERR = 2'b10;

  // ------------------------------------------------ write address FIFO
  logic        af_empty, af_full, af_deq;
  logic [15:0] af_head;
  logic [3:0]  af_cnt;
  id_fifo #(.DEPTH(8), .WIDTH(16)) u_aw_fifo (
    .clk, .rst_n, .enq(awvalid && awready), .enq_data(awaddr[15:0]),
    .deq(af_deq), .deq_data(af_head), .empty(af_empty), .full(af_full), .count(af_cnt));
  assign awready = !af_full;

  // ------------------------------------------------ response FIFO
  logic       rf_empty, rf_full, rf_enq;
  logic [1:0] rf_data, rf_head;
  logic [3:0] rf_cnt;
  id_fifo #(.DEPTH(8), .WIDTH(2)) u_b_fifo (
    .clk, .rst_n, .enq(rf_enq), .enq_data(rf_data),
    .deq(bvalid && bready), .deq_data(rf_head), .empty(rf_empty), .full(rf_full), .count(rf_cnt));
  assign bvalid = !rf_empty;
  assign bresp  = rf_head;

  // ------------------------------------------------ accumulator
  logic [IDX_W-1:0] acc_line;
  logic [3:0]       acc_mask;
  logic [63:0]      acc_word [4];
  // first line of a two-line descriptor
  logic             first_v;
  logic [IDX_W-1:0] first_idx;
  logic [Q_W-1:0]   first_q;

  logic [IDX_W-1:0] w_line;
  logic [1:0]       w_word;
  logic             w_wide, w_bad, w_clash, w_ok;
  logic [3:0]       new_mask;
  logic [63:0]      line_word [4];
  logic             complete;
  desc_line0_t      line0;
  logic [Q_W-1:0]   line_q;

  function automatic logic [Q_W-1:0] queue_of(input desc_line0_t l);
    if (l.ttype.inl || l.ttype.cm == CM_NONE) return Q_TID;
    if (l.ttype.cm == CM_UNI) return q_uni_no(l.prio);
    return q_multi_no(l.prio);
  endfunction

  always_comb begin
    w_line  = af_head[15:5];
    w_word  = af_head[4:3];
    w_wide  = (wstrb == 16'hFFFF);
    w_bad   = (af_head[2:0] != 3'b000) ||
              !(w_wide ? !af_head[3]
                       : (af_head[3] ? wstrb == 16'hFF00 : wstrb == 16'h00FF));
    w_clash = (acc_mask != 4'b0) && (acc_line != w_line);
    w_ok    = !w_bad && !w_clash;
    new_mask = w_wide ? (4'b0011 << {w_word[1], 1'b0}) : (4'b0001 << w_word);
    for (int i = 0; i < 4; i++) begin
      line_word[i] = acc_mask[i] ? acc_word[i] : 64'd0;
      if (new_mask[i]) line_word[i] = w_wide ? wdata[64*(i%2) +: 64] : wdata[64*af_head[3] +: 64];
    end
    complete = w_ok && ((acc_mask | new_mask) == 4'b1111);
    line0    = desc_line0_t'({line_word[3], line_word[2], line_word[1], line_word[0]});
    line_q   = queue_of(line0);
  end

  wire w_present = wvalid && !af_empty && !rf_full;
  wire need_enq  = complete && line0.enq;
  assign wready  = !af_empty && !rf_full && (!(wvalid && need_enq) || enq_ready);
  wire w_fire    = wvalid && wready;
  assign af_deq  = w_fire;
  assign rf_enq  = w_fire;
  assign rf_data = w_ok ? OKAY : SLVERR;

  wire is_second = first_v && (w_line == first_idx + 1'b1);

  assign tt_wr_en   = w_fire && complete;
  assign tt_wr_addr = w_line;
  assign tt_wr_data = {line_word[3], line_word[2], line_word[1], line_word[0]};

  assign enq_valid      = w_present && need_enq;
  assign enq_req.idx    = is_second ? first_idx : w_line;
  assign enq_req.q      = is_second ? first_q : line_q;
  assign enq_req.started = 1'b0;
  assign st_busy_en     = enq_valid && enq_ready;
  assign st_busy_ch     = wch_of(enq_req.idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_mask  <= '0;
      acc_line  <= '0;
      first_v   <= 1'b0;
      first_idx <= '0;
      first_q   <= '0;
      for (int i = 0; i < 4; i++) acc_word[i] <= '0;
    end else if (w_fire && w_ok) begin
      if (complete) begin
        acc_mask <= '0;
        if (!line0.enq) begin
          first_v   <= 1'b1;
          first_idx <= w_line;
          first_q   <= line_q;
        end else begin
          first_v <= 1'b0;
        end
      end else begin
        acc_mask <= acc_mask | new_mask;
        acc_line <= w_line;
        for (int i = 0; i < 4; i++) if (new_mask[i]) acc_word[i] <= line_word[i];
      end
    end
  end

  // ------------------------------------------------ status reads
  wire ar_bad = (araddr[3:0] != 4'd0) || !araddr[16];
  assign arready     = !rvalid || rready;
  assign st_rd_en    = arvalid && arready && !ar_bad;
  assign st_rd_multi = araddr[17];
  assign st_rd_page  = araddr[15:12];
  assign st_rd_ch    = araddr[10:5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
      rresp  <= OKAY;
    end else begin
      if (rvalid && rready) rvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        rdata  <= ar_bad ? 128'd0 : {64'd0, st_rd_data};
        rresp  <= ar_bad ? SLVERR : OKAY;
      end
    end
  end

  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               enq_valid && !enq_ready |-> !wready);
endmodule
