// Sequence number generator.
//
// A single global counter supplies the sequence number of every issued
// block (and inline-payload packet): seq is the number to use now, and inc
// advances it at the clock edge. Because the counter only grows, a block that
// is re-sent later always carries a higher number than before (wrap-around
// of the 12-bit counter is not handled, as in the reference design). Resets
// to zero.
module seq_num_gen
  import qos_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  output logic [SEQ_W-1:0] seq
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seq <= '0;
    else if (inc) seq <= seq + 1'b1;
  end
endmodule
