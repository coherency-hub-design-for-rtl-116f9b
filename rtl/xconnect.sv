// xconnect: the cross connect that carries reply-channel packets between the
// link ports. Input port i offers a reply; its destination port is the
// requester's port (pkt.src) for a snoop response and the destination node
// (pkt.dst) for any other reply. Each destination takes one packet per cycle, round-robin among
// the sources that target it. At the destination the link port hands snoop
// responses to its scoreboard and other replies to its output port. Data
// chunks do not pass here: each input port writes them straight into a
// per-source FIFO of the destination output port. The per-destination
// round-robin is this design's choice.
module xconnect
  import zmb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  input  pkt_t              in_pkt  [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  output logic [NPORTS-1:0] out_valid,
  output pkt_t              out_pkt  [NPORTS],
  output logic [PORT_W-1:0] out_from [NPORTS],
  input  logic [NPORTS-1:0] out_ready
);
  logic [PORT_W-1:0] in_dest [NPORTS];
  always_comb
    for (int i = 0; i < NPORTS; i++)
      in_dest[i] = (in_pkt[i].cmd == C_SNP_RSP) ? in_pkt[i].src : in_pkt[i].dst;

  pkt_xbar #(.N(NPORTS)) u_xbar (
    .clk, .rst_n, .in_valid, .in_pkt, .in_dest, .in_ready,
    .out_valid, .out_pkt, .out_from, .out_ready);
endmodule
