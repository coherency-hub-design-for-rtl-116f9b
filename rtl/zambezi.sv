// zambezi: coherency hub for a four-node snooping multiprocessor. One hub
// serves one coherence plane (one quarter of the address space); it connects
// to each of the four nodes through a pair of serial links.
//
// A coherent request from a node passes lfu_rx and the input port of its link
// port unit (lpu) into the Address Serialization Unit (asu). If no other
// transaction to the same line is active, the ASU broadcasts it as a forwarded
// request to the three other nodes and returns a forwarded-request ack to the
// requester; otherwise it pends the request until the earlier one completes.
// Snoop responses from the three nodes cross the cross connect (xconnect) to
// the requester's transaction scoreboard, which sends one consolidated
// response to the requester and reports completion to the ASU. Non-coherent
// requests are routed by destination node; replies and data chunks go
// straight to the destination's output port. The gpd holds the CSRs, the
// error logs, the service processor's LPC port and reset sequencing.
//
// Interface: per node, the received and transmitted 144-bit frames with
// CRC and sequence number (the SerDes is outside), the replay requests in
// both directions and the retrain request. clk is the 800 MHz core clock;
// por_n / wmr_n are the power-on and warm resets. The SerDes, PLL, clock
// circuits and JTAG are not part of this RTL.
// The block split (link port units, ASU, cross connect, GPD), four ports,
// the 96-entry CAM, the 768 pended entries and the 144-bit frame with a
// 24-bit CRC follow the design description; the packet layout, the sideband
// replay signals and the single clock domain are this design's own.
// The core reset rst_n, made by the gpd, is an asynchronous reset for the
// flip-flops; the handshake assertions also sample it through their
// "disable iff" clause, which lint reports as a net used both synchronously
// and asynchronously. No logic uses it synchronously.
module zambezi
  import zmb_pkg::*;
(
  input  logic               clk,
  input  logic               por_n,
  input  logic               wmr_n,
  // links, node -> hub
  input  logic               rx_frame_valid [NPORTS],
  input  logic [FRAME_W-1:0] rx_frame_data  [NPORTS],
  input  logic [CRC_W-1:0]   rx_frame_crc   [NPORTS],
  input  logic [SEQ_W-1:0]   rx_frame_seq   [NPORTS],
  output logic               rx_replay_req  [NPORTS],
  output logic [SEQ_W-1:0]   rx_replay_seq  [NPORTS],
  // links, hub -> node
  output logic               tx_frame_valid [NPORTS],
  output logic [FRAME_W-1:0] tx_frame_data  [NPORTS],
  output logic [CRC_W-1:0]   tx_frame_crc   [NPORTS],
  output logic [SEQ_W-1:0]   tx_frame_seq   [NPORTS],
  input  logic               tx_replay_req  [NPORTS],
  input  logic [SEQ_W-1:0]   tx_replay_seq  [NPORTS],
  output logic               retrain        [NPORTS],
  // service processor
  input  logic               lframe_n,
  input  logic [3:0]         lad_in,
  output logic [3:0]         lad_out,
  output logic               lad_oe,
  output logic               err_fatal_n,
  output logic               sp_intr_n
);
  logic rst_n;

  // ASU <-> LPU
  logic [NPORTS-1:0]    coh_valid, coh_ready, nc_valid, nc_ready, cpl_valid, cpl_ready;
  pkt_t                 coh_pkt [NPORTS];
  pkt_t                 nc_pkt  [NPORTS];
  logic [CAM_IDX_W-1:0] cpl_idx [NPORTS];
  logic [NPORTS-1:0]    fwd_valid, fwd_ready, ncout_valid, ncout_ready, tsb_alloc;
  pkt_t                 fwd_pkt   [NPORTS];
  pkt_t                 ncout_pkt [NPORTS];
  logic [TAG_W-1:0]     tsb_tag;
  logic [CAM_IDX_W-1:0] tsb_cam_idx;
  cmd_e                 tsb_cmd;
  logic                 cam_perr, pend_perr;
  logic [CAM_IDX_W:0]   cam_used;
  logic [PEND_IDX_W:0]  pend_count;

  // cross connect
  logic [NPORTS-1:0] xo_valid, xo_ready, xi_valid, xi_ready;
  pkt_t              xo_pkt [NPORTS];
  pkt_t              xi_pkt [NPORTS];
  logic [PORT_W-1:0] xi_from [NPORTS];

  // data: do_*[src][dst] -> di_*[dst][src]
  logic [NPORTS-1:0] do_valid [NPORTS];
  logic [NPORTS-1:0] do_ready [NPORTS];
  pkt_t              do_pkt   [NPORTS];
  logic [NPORTS-1:0] di_valid [NPORTS];
  logic [NPORTS-1:0] di_ready [NPORTS];

  // errors
  logic [NPORTS-1:0] proto_err, snoop_err, crc_err, overflow, replay_err, retrain_v;
  logic [2:0]        stall_vc [NPORTS];

  always_comb
    for (int s = 0; s < NPORTS; s++)
      for (int d = 0; d < NPORTS; d++) begin
        di_valid[d][s] = do_valid[s][d];
        do_ready[s][d] = di_ready[d][s];
      end

  for (genvar p = 0; p < NPORTS; p++) begin : g_lpu
    lpu #(.PORT(PORT_W'(p))) u_lpu (
      .clk, .rst_n,
      .rx_frame_valid(rx_frame_valid[p]), .rx_frame_data(rx_frame_data[p]),
      .rx_frame_crc(rx_frame_crc[p]), .rx_frame_seq(rx_frame_seq[p]),
      .rx_replay_req(rx_replay_req[p]), .rx_replay_seq(rx_replay_seq[p]),
      .tx_frame_valid(tx_frame_valid[p]), .tx_frame_data(tx_frame_data[p]),
      .tx_frame_crc(tx_frame_crc[p]), .tx_frame_seq(tx_frame_seq[p]),
      .tx_replay_req(tx_replay_req[p]), .tx_replay_seq(tx_replay_seq[p]),
      .retrain(retrain_v[p]),
      .coh_valid(coh_valid[p]), .coh_pkt(coh_pkt[p]), .coh_ready(coh_ready[p]),
      .nc_valid(nc_valid[p]), .nc_pkt(nc_pkt[p]), .nc_ready(nc_ready[p]),
      .cpl_valid(cpl_valid[p]), .cpl_idx(cpl_idx[p]), .cpl_ready(cpl_ready[p]),
      .fwd_valid(fwd_valid[p]), .fwd_pkt(fwd_pkt[p]), .fwd_ready(fwd_ready[p]),
      .ncout_valid(ncout_valid[p]), .ncout_pkt(ncout_pkt[p]), .ncout_ready(ncout_ready[p]),
      .tsb_alloc(tsb_alloc[p]), .tsb_tag, .tsb_cam_idx,
      .xo_valid(xo_valid[p]), .xo_pkt(xo_pkt[p]), .xo_ready(xo_ready[p]),
      .xi_valid(xi_valid[p]), .xi_pkt(xi_pkt[p]), .xi_ready(xi_ready[p]),
      .do_valid(do_valid[p]), .do_pkt(do_pkt[p]), .do_ready(do_ready[p]),
      .di_valid(di_valid[p]), .di_pkt(do_pkt), .di_ready(di_ready[p]),
      .proto_err(proto_err[p]), .snoop_err(snoop_err[p]), .crc_err(crc_err[p]),
      .overflow(overflow[p]), .replay_err(replay_err[p]), .stall_vc(stall_vc[p]));
    assign retrain[p] = retrain_v[p];
  end

  asu u_asu (
    .clk, .rst_n,
    .coh_valid, .coh_pkt, .coh_ready, .nc_valid, .nc_pkt, .nc_ready,
    .cpl_valid, .cpl_idx, .cpl_ready,
    .fwd_valid, .fwd_pkt, .fwd_ready,
    .tsb_alloc, .tsb_tag, .tsb_cam_idx, .tsb_cmd,
    .ncout_valid, .ncout_pkt, .ncout_ready,
    .cam_perr, .pend_perr, .cam_used, .pend_count);

  xconnect u_xconnect (
    .clk, .rst_n, .in_valid(xo_valid), .in_pkt(xo_pkt), .in_ready(xo_ready),
    .out_valid(xi_valid), .out_pkt(xi_pkt), .out_from(xi_from), .out_ready(xi_ready));

  gpd u_gpd (
    .clk, .por_n, .wmr_n, .core_rst_n(rst_n),
    .lframe_n, .lad_in, .lad_out, .lad_oe, .err_fatal_n, .sp_intr_n,
    .cam_perr, .pend_perr, .snoop_err, .proto_err, .overflow, .replay_err,
    .crc_err, .retrain(retrain_v), .cam_used, .pend_count);
endmodule
