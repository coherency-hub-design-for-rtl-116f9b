// asu_coh_router: broadcast stage for coherent requests leaving the ASU.
//
// One serialized coherent request per cycle is accepted (in_valid/in_ready)
// together with the CAM entry that holds its address. The router loads one
// output register per port: the forwarded request (snoop) for every port but
// the requester, and a forwarded-request ack for the requester. It also tells
// the requester's transaction scoreboard (tsb_alloc) to expect snoop responses
// for this tag. A new request is accepted only when all four output registers
// are free or being drained, so the four copies leave as a unit. Because the
// ack and later forwarded requests to the same node travel in one queue,
// an ack always reaches its node before a later-serialized request to the
// same address. Registering the outputs is this design's choice.
module asu_coh_router
  import zmb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pkt_t                 in_pkt,
  input  logic [CAM_IDX_W-1:0] in_cam_idx,
  output logic                 in_ready,
  output logic [NPORTS-1:0]    out_valid,
  output pkt_t                 out_pkt [NPORTS],
  input  logic [NPORTS-1:0]    out_ready,
  output logic [NPORTS-1:0]    tsb_alloc,
  output logic [TAG_W-1:0]     tsb_tag,
  output logic [CAM_IDX_W-1:0] tsb_cam_idx,
  output cmd_e                 tsb_cmd
);
  assign in_ready = &(~out_valid | out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      tsb_alloc <= '0;
    end else begin
      tsb_alloc <= '0;
      for (int p = 0; p < NPORTS; p++)
        if (out_ready[p]) out_valid[p] <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= '1;
        tsb_alloc[in_pkt.src] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      for (int p = 0; p < NPORTS; p++) begin
        out_pkt[p] <= in_pkt;
        out_pkt[p].dst <= PORT_W'(p);
        if (in_pkt.src == PORT_W'(p)) out_pkt[p].cmd <= C_FWD_ACK;
      end
      tsb_tag     <= in_pkt.tag;
      tsb_cam_idx <= in_cam_idx;
      tsb_cmd     <= in_pkt.cmd;
    end
  end
endmodule
