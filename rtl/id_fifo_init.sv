// Transaction/Flow ID FIFO initializer.
//
// After reset the three free-ID FIFOs are empty, but every ID should be
// free. This block enqueues them one per clock cycle: first the 512 TIDs
// 0..511 into the TID FIFO, then the 64 unipath FIDs 128..191 into the
// 1xFID FIFO, then the 16 multipath FID groups 192,196,..,252 into the 4xFID
// FIFO, 592 cycles in all, after which done stays high. No transfer should be
// issued before done (the engine gates its ID users with it). The order and
// one-ID-per-cycle pace follow the reference description.
module id_fifo_init
  import qos_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output logic             tid_enq,
  output logic [TID_W-1:0] tid_data,
  output logic             fid1_enq,
  output logic [FID_W-1:0] fid1_data,
  output logic             fid4_enq,
  output logic [FID_W-1:0] fid4_data,
  output logic             done
);
  localparam int unsigned TOTAL = NUM_FREE_TID + FID1_NUM + FID4_NUM;
  logic [9:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (!done) cnt <= cnt + 1'b1;
  end

  assign done      = (cnt == 10'(TOTAL));
  assign tid_enq   = !done && cnt < 10'(NUM_FREE_TID);
  assign tid_data  = TID_W'(cnt);
  assign fid1_enq  = !done && cnt >= 10'(NUM_FREE_TID) && cnt < 10'(NUM_FREE_TID + FID1_NUM);
  assign fid1_data = FID_W'(FID1_BASE + 32'(cnt) - NUM_FREE_TID);
  assign fid4_enq  = !done && cnt >= 10'(NUM_FREE_TID + FID1_NUM);
  assign fid4_data = FID_W'(FID4_BASE + 4 * (32'(cnt) - NUM_FREE_TID - FID1_NUM));
endmodule
