// Packet queue between the QoS engine and the RDMA send unit.
//
// Holds complete packets (qos_pkg::packet_t: inline-payload packets and
// completion-notification control packets) built by the packet creator.
// Valid/ready on both sides: in_ready is low while full, which stalls packet
// creation and, through it, the segmenter. out_* shows the head. The depth
// (16) is this design's choice; the reference does not give one.
module packet_fifo #(
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  qos_pkg::packet_t in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output qos_pkg::packet_t out_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] cnt_t;
  qos_pkg::packet_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (cnt != cnt_t'(DEPTH));
  assign out_valid = (cnt != 0);
  assign out_data  = mem[rp];

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      cnt <= cnt + cnt_t'(push) - cnt_t'(pop);
    end
  end
endmodule
