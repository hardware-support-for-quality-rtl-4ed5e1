// Status Registers: the state of every write channel, readable 32 at a time.
//
// 1024 write channels x 3 one-hot bits (BUSY, DONE, ERROR; all zero is IDLE),
// kept in flip-flops rather than memory so that one processor load can
// return 32 channels at once. Three clients update it, each reading in one
// cycle and updating at the following clock edge:
//   * AXI writes   - a channel goes IDLE -> BUSY when its transfer is enqueued;
//   * the message handler - BUSY -> DONE on completion, -> ERROR on a NACK or
//                    a sequence-number mismatch;
//   * AXI reads    - a single-channel read (mode 0) or a 32-channel read
//                    (mode 1, half a page) returns the statuses as 2-bit
//                    binary codes (IDLE 0, BUSY 1, DONE 2, ERROR 3) and resets
//                    every returned channel found DONE or ERROR to IDLE.
// rd_data is combinational from the registers (cycle 0); the reset to IDLE
// takes effect at the clock edge (cycle 1). When updates hit the same channel
// in one cycle the message handler wins over the AXI write, which wins over
// the read-reset (this priority is this design's choice).
module status_regs
  import qos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI write side: new transfer enqueued
  input  logic              busy_en,
  input  logic [WCH_W-1:0]  busy_ch,
  // message handler: DONE or ERROR
  input  logic              mh_en,
  input  logic [WCH_W-1:0]  mh_ch,
  input  logic              mh_error,
  // AXI read side
  input  logic              rd_en,
  input  logic              rd_multi,   // 0: one channel, 1: 32 channels
  input  logic [3:0]        rd_page,
  input  logic [5:0]        rd_ch,      // channel (mode 0) or bit 5 = half (mode 1)
  output logic [63:0]       rd_data
);
  logic [2:0] st_q [NUM_WCH];
  logic [NUM_WCH-1:0] clr;

  always_comb begin
    rd_data = '0;
    clr     = '0;
    if (rd_multi) begin
      for (int i = 0; i < 32; i++) begin
        automatic logic [WCH_W-1:0] c = {rd_page, rd_ch[5], 5'(i)};
        rd_data[2*i +: 2] = status_bin(st_q[c]);
        clr[c] = rd_en && (st_q[c][2] || st_q[c][1]);
      end
    end else begin
      rd_data[1:0] = status_bin(st_q[{rd_page, rd_ch}]);
      clr[{rd_page, rd_ch}] = rd_en && (st_q[{rd_page, rd_ch}][2] || st_q[{rd_page, rd_ch}][1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_WCH; i++) st_q[i] <= ST_IDLE;
    end else begin
      for (int i = 0; i < NUM_WCH; i++) if (clr[i]) st_q[i] <= ST_IDLE;
      if (busy_en) st_q[busy_ch] <= ST_BUSY;
      if (mh_en)   st_q[mh_ch]   <= mh_error ? ST_ERROR : ST_DONE;
    end
  end
endmodule
