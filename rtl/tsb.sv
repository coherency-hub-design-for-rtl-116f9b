// tsb: transaction scoreboard of one port. It follows the coherent requests
// issued by this port's node and consolidates the snoop responses returned by
// the other three nodes.
//
// When the ASU broadcasts a request from this node it pulses alloc with the
// tag and the CAM entry. Each snoop response (snp_valid, from the cross
// connect) is counted against its tag and the hit states are accumulated.
// With the last of the NPORTS-1 responses the scoreboard
//   * queues a consolidated response for its node: HIT_M if any node had the
//     line modified, else HIT_O, else HIT_S, else MISS;
//   * queues a completion carrying the CAM entry for the ASU, which then frees
//     the entry or wakes the next pended transaction to that address;
//   * flags proto_err for an illegal combination: more than one HIT_M, more
//     than one HIT_O, or HIT_M together with any other hit.
// A response for a tag that is not allocated also sets proto_err. The
// consolidation order and the error rules beyond "HIT_M from more than one
// node" are this design's own; so is completing a transaction when its snoop
// responses are in. snp_ready drops only when an output queue is full.
module tsb
  import zmb_pkg::*;
#(
  parameter logic [PORT_W-1:0] PORT  = '0,
  parameter int unsigned       TAGS  = TAGS_PER_PORT,
  parameter int unsigned       QDEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alloc,
  input  logic [TAG_W-1:0]     alloc_tag,
  input  logic [CAM_IDX_W-1:0] alloc_cam_idx,
  input  logic                 snp_valid,
  input  pkt_t                 snp_pkt,
  output logic                 snp_ready,
  output logic                 rsp_valid,
  output pkt_t                 rsp_pkt,
  input  logic                 rsp_ready,
  output logic                 cpl_valid,
  output logic [CAM_IDX_W-1:0] cpl_idx,
  input  logic                 cpl_ready,
  output logic                 proto_err,
  output logic [TAG_W:0]       active
);
  localparam int QW = $clog2(QDEPTH + 1);

  logic [TAGS-1:0]      vld_q;
  logic [CAM_IDX_W-1:0] cam_q [TAGS];
  logic [1:0]           cnt_q [TAGS];
  logic [1:0]           nm_q  [TAGS], no_q [TAGS], ns_q [TAGS];

  logic rq_full, rq_empty, cq_full, cq_empty;
  logic [QW-1:0] rq_cnt, cq_cnt;

  logic [TAG_W-1:0] t;
  logic             take, last, known;
  logic [1:0]       nm, no, ns;
  pkt_t             cons;

  assign t         = snp_pkt.tag;
  assign snp_ready = !rq_full && !cq_full;
  assign take      = snp_valid && snp_ready;
  assign known     = (t < TAG_W'(TAGS)) && vld_q[t];

  function automatic logic [1:0] sat_inc(logic [1:0] v, logic en);
    return (en && v != 2'd3) ? v + 2'd1 : v;
  endfunction

  always_comb begin
    nm   = sat_inc(nm_q[t], snp_pkt.snp == SNP_HIT_M);
    no   = sat_inc(no_q[t], snp_pkt.snp == SNP_HIT_O);
    ns   = sat_inc(ns_q[t], snp_pkt.snp == SNP_HIT_S);
    last = known && (cnt_q[t] == 2'(NPORTS - 2));
    cons = '0;
    cons.cmd = C_CONS_RSP;
    cons.src = PORT;
    cons.dst = PORT;
    cons.tag = t;
    if      (nm != 0) cons.snp = SNP_HIT_M;
    else if (no != 0) cons.snp = SNP_HIT_O;
    else if (ns != 0) cons.snp = SNP_HIT_S;
    else              cons.snp = SNP_MISS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q     <= '0;
      proto_err <= 1'b0;
      active    <= '0;
    end else begin
      proto_err <= 1'b0;
      if (take && !known) proto_err <= 1'b1;
      if (take && last) begin
        vld_q[t] <= 1'b0;
        if (nm > 1 || no > 1 || (nm == 1 && (no != 0 || ns != 0))) proto_err <= 1'b1;
      end
      if (alloc) vld_q[alloc_tag] <= 1'b1;
      active <= active + $bits(active)'(alloc) - $bits(active)'(take && last);
    end
  end

  always_ff @(posedge clk) begin
    if (take && known) begin
      cnt_q[t] <= cnt_q[t] + 2'd1;
      nm_q[t]  <= nm;
      no_q[t]  <= no;
      ns_q[t]  <= ns;
    end
    if (alloc) begin
      cam_q[alloc_tag] <= alloc_cam_idx;
      cnt_q[alloc_tag] <= '0;
      nm_q[alloc_tag]  <= '0;
      no_q[alloc_tag]  <= '0;
      ns_q[alloc_tag]  <= '0;
    end
  end

  sync_fifo #(.T(pkt_t), .DEPTH(QDEPTH)) u_rspq (
    .clk, .rst_n, .push(take && last), .din(cons), .pop(rsp_valid && rsp_ready),
    .dout(rsp_pkt), .full(rq_full), .empty(rq_empty), .count(rq_cnt));
  assign rsp_valid = !rq_empty;

  sync_fifo #(.T(logic [CAM_IDX_W-1:0]), .DEPTH(QDEPTH)) u_cplq (
    .clk, .rst_n, .push(take && last), .din(cam_q[t]), .pop(cpl_valid && cpl_ready),
    .dout(cpl_idx), .full(cq_full), .empty(cq_empty), .count(cq_cnt));
  assign cpl_valid = !cq_empty;

  a_alloc_free_tag: assert property (@(posedge clk) disable iff (!rst_n)
                                     alloc |-> (alloc_tag < TAG_W'(TAGS) && !vld_q[alloc_tag]));
endmodule
