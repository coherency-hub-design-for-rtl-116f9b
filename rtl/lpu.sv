// lpu: Link Port Unit, the hub's connection to one processor node. It holds
// the link framing unit (lfu_rx, lfu_tx), the input port, the output port and
// the transaction scoreboard of that node; the SerDes sits outside and the
// frames are brought out as parallel words.
//
// Ingress: frame -> lfu_rx -> input_port, which sends coherent and
// non-coherent requests to the ASU, replies to the cross connect, data chunks
// to the destination's output port and credit returns to this output port.
// Egress: the output port merges forwarded requests/acks and non-coherent
// requests from the ASU, consolidated responses from the scoreboard, replies
// from the cross connect and data from every input port, and feeds lfu_tx.
// Replies arriving from the cross connect go to the scoreboard when they are
// snoop responses and to the output port otherwise.
module lpu
  import zmb_pkg::*;
#(
  parameter logic [PORT_W-1:0] PORT = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // link, node -> hub
  input  logic                 rx_frame_valid,
  input  logic [FRAME_W-1:0]   rx_frame_data,
  input  logic [CRC_W-1:0]     rx_frame_crc,
  input  logic [SEQ_W-1:0]     rx_frame_seq,
  output logic                 rx_replay_req,   // ask the node to resend
  output logic [SEQ_W-1:0]     rx_replay_seq,
  // link, hub -> node
  output logic                 tx_frame_valid,
  output logic [FRAME_W-1:0]   tx_frame_data,
  output logic [CRC_W-1:0]     tx_frame_crc,
  output logic [SEQ_W-1:0]     tx_frame_seq,
  input  logic                 tx_replay_req,   // the node asks us to resend
  input  logic [SEQ_W-1:0]     tx_replay_seq,
  output logic                 retrain,
  // to / from the ASU
  output logic                 coh_valid,
  output pkt_t                 coh_pkt,
  input  logic                 coh_ready,
  output logic                 nc_valid,
  output pkt_t                 nc_pkt,
  input  logic                 nc_ready,
  output logic                 cpl_valid,
  output logic [CAM_IDX_W-1:0] cpl_idx,
  input  logic                 cpl_ready,
  input  logic                 fwd_valid,
  input  pkt_t                 fwd_pkt,
  output logic                 fwd_ready,
  input  logic                 ncout_valid,
  input  pkt_t                 ncout_pkt,
  output logic                 ncout_ready,
  input  logic                 tsb_alloc,
  input  logic [TAG_W-1:0]     tsb_tag,
  input  logic [CAM_IDX_W-1:0] tsb_cam_idx,
  // to / from the cross connect
  output logic                 xo_valid,
  output pkt_t                 xo_pkt,
  input  logic                 xo_ready,
  input  logic                 xi_valid,
  input  pkt_t                 xi_pkt,
  output logic                 xi_ready,
  // data chunks to the output ports (index = destination)
  output logic [NPORTS-1:0]    do_valid,
  output pkt_t                 do_pkt,
  input  logic [NPORTS-1:0]    do_ready,
  // data chunks from the input ports (index = source)
  input  logic [NPORTS-1:0]    di_valid,
  input  pkt_t                 di_pkt [NPORTS],
  output logic [NPORTS-1:0]    di_ready,
  // errors and events
  output logic                 proto_err,
  output logic                 snoop_err,
  output logic                 crc_err,
  output logic                 overflow,
  output logic                 replay_err,
  output logic [2:0]           stall_vc
);
  logic rx_v, rx_r;
  pkt_t rx_p;
  logic tx_v, tx_r;
  pkt_t tx_p;
  logic cr_v;
  logic [2:0] cr_req, cr_rpl;
  logic [1:0] cr_dat;
  logic tsb_rv, tsb_rr;
  pkt_t tsb_rp;
  logic op_rpl_ready, tsb_snp_ready, is_snp, replaying;
  logic [TAG_W:0] active;

  lfu_rx u_lfu_rx (
    .clk, .rst_n, .frame_valid(rx_frame_valid), .frame_data(rx_frame_data),
    .frame_crc(rx_frame_crc), .frame_seq(rx_frame_seq), .out_valid(rx_v),
    .out_pkt(rx_p), .out_ready(rx_r), .replay_req(rx_replay_req),
    .replay_seq(rx_replay_seq), .crc_err, .overflow, .retrain);

  input_port #(.PORT(PORT)) u_in (
    .clk, .rst_n, .in_valid(rx_v), .in_pkt(rx_p), .in_ready(rx_r),
    .coh_valid, .coh_pkt, .coh_ready, .nc_valid, .nc_pkt, .nc_ready,
    .rpl_valid(xo_valid), .rpl_pkt(xo_pkt), .rpl_ready(xo_ready),
    .dat_valid(do_valid), .dat_pkt(do_pkt), .dat_ready(do_ready),
    .cr_valid(cr_v), .cr_req, .cr_rpl, .cr_dat, .proto_err);

  assign is_snp   = (xi_pkt.cmd == C_SNP_RSP);
  assign xi_ready = is_snp ? tsb_snp_ready : op_rpl_ready;

  tsb #(.PORT(PORT)) u_tsb (
    .clk, .rst_n, .alloc(tsb_alloc), .alloc_tag(tsb_tag), .alloc_cam_idx(tsb_cam_idx),
    .snp_valid(xi_valid && is_snp), .snp_pkt(xi_pkt), .snp_ready(tsb_snp_ready),
    .rsp_valid(tsb_rv), .rsp_pkt(tsb_rp), .rsp_ready(tsb_rr),
    .cpl_valid, .cpl_idx, .cpl_ready, .proto_err(snoop_err), .active);

  output_port u_out (
    .clk, .rst_n,
    .coh_valid(fwd_valid), .coh_pkt(fwd_pkt), .coh_ready(fwd_ready),
    .nc_valid(ncout_valid), .nc_pkt(ncout_pkt), .nc_ready(ncout_ready),
    .tsb_valid(tsb_rv), .tsb_pkt(tsb_rp), .tsb_ready(tsb_rr),
    .rpl_valid(xi_valid && !is_snp), .rpl_pkt(xi_pkt), .rpl_ready(op_rpl_ready),
    .dat_valid(di_valid), .dat_pkt(di_pkt), .dat_ready(di_ready),
    .cr_valid(cr_v), .cr_req, .cr_rpl, .cr_dat,
    .out_valid(tx_v), .out_pkt(tx_p), .out_ready(tx_r), .stall_vc);

  lfu_tx u_lfu_tx (
    .clk, .rst_n, .in_valid(tx_v), .in_pkt(tx_p), .in_ready(tx_r),
    .frame_valid(tx_frame_valid), .frame_data(tx_frame_data), .frame_crc(tx_frame_crc),
    .frame_seq(tx_frame_seq), .replay_req(tx_replay_req), .replay_seq(tx_replay_seq),
    .replaying, .replay_err);
endmodule
