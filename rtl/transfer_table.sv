// Transfer Table: one 256-bit descriptor line per virtual channel.
//
// 2048 lines x 256 bits (16 pages x 128 channels), a simple dual-port memory.
// Port 0 (write) takes descriptor lines assembled by the AXI slave; port 1
// (read) serves the transfer segmenter and its packet creator. The read is
// synchronous: the line addressed while rd_en is high appears on rd_data on
// the next clock edge and is held until the next read. A read and a write to
// the same line in one cycle return the old contents. Sizes follow the
// reference design; the read-enable/hold behaviour is this design's choice.
module transfer_table #(
  parameter int unsigned DEPTH = qos_pkg::NUM_LINES,
  parameter int unsigned WIDTH = qos_pkg::LINE_W
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
