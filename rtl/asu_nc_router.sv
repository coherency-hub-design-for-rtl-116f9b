// asu_nc_router: routes non-coherent requests (PIO read/write, interrupts)
// from the four per-port non-coherent FIFOs of the ASU to the output port
// named by the packet's destination node ID. Non-coherent requests are not
// serialized; up to four move per cycle when their destinations differ, and
// requests that collide on one output are taken round-robin.
module asu_nc_router
  import zmb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  input  pkt_t              in_pkt  [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  output logic [NPORTS-1:0] out_valid,
  output pkt_t              out_pkt [NPORTS],
  input  logic [NPORTS-1:0] out_ready
);
  logic [PORT_W-1:0] dest [NPORTS];
  logic [PORT_W-1:0] from [NPORTS];
  always_comb for (int i = 0; i < NPORTS; i++) dest[i] = in_pkt[i].dst;

  pkt_xbar #(.N(NPORTS)) u_xbar (
    .clk, .rst_n, .in_valid, .in_pkt, .in_dest(dest), .in_ready,
    .out_valid, .out_pkt, .out_from(from), .out_ready
  );
endmodule
