// asu: Address Serialization Unit. It makes sure at most one coherent
// transaction per cache-line address is active in the hub, and routes both
// coherent and non-coherent requests to their output ports.
//
// Structure (per the design description): four FIFOs for coherent requests
// and four for non-coherent requests, one of each per port; a 96-entry CAM of
// active addresses with a free list; 96 linked lists of pended transactions in
// a 768-entry store; an arbiter over the completions from the four ports;
// a broadcast router for coherent requests and a destination router for
// non-coherent ones.
//
// Each cycle the ASU does at most one completion and one new coherent request:
//  * Completion (round-robin over cpl_valid): if the CAM entry's list is
//    empty the entry is freed; otherwise its head is woken up and reissued to
//    the broadcast router with the address read from the CAM, and the entry
//    stays allocated for it. A wakeup waits until the router can take it.
//  * New request (round-robin over the coherent FIFO heads): the address is
//    looked up in the CAM. On a miss a CAM entry is allocated and the request
//    is broadcast; on a hit it is appended to that entry's list. A request
//    stalls if the router is busy with a wakeup, if the CAM is full on a miss,
//    or if it hits the entry a completion is working on in the same cycle.
// Non-coherent requests bypass the CAM and go through asu_nc_router.
// Latency for a request that misses: FIFO write, then lookup and router
// register, i.e. the router output is valid two cycles after coh_valid.
// Each input FIFO holds FIFO_DEPTH = 192 requests, as many as one node can
// have outstanding (its tag range), and stores only the request fields. A
// node's requests therefore never back up into its link: a request that
// waits here (CAM full, router busy) cannot block the snoop responses and
// data that follow it on the same link and that the active transactions need
// to complete. With shallow FIFOs that blocking deadlocks the hub under load.
// The description asks for internal storage for every pending packet; the
// depth of 192 and the one-operation-per-cycle pipeline are this design's
// choices. cam_perr/pend_perr report parity errors on stored state.
module asu
  import zmb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = TAGS_PER_PORT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coherent requests from the input ports
  input  logic [NPORTS-1:0]    coh_valid,
  input  pkt_t                 coh_pkt [NPORTS],
  output logic [NPORTS-1:0]    coh_ready,
  // non-coherent requests from the input ports
  input  logic [NPORTS-1:0]    nc_valid,
  input  pkt_t                 nc_pkt [NPORTS],
  output logic [NPORTS-1:0]    nc_ready,
  // completions (from each port's transaction scoreboard)
  input  logic [NPORTS-1:0]    cpl_valid,
  input  logic [CAM_IDX_W-1:0] cpl_idx [NPORTS],
  output logic [NPORTS-1:0]    cpl_ready,
  // coherent requests / forwarded acks to the output ports
  output logic [NPORTS-1:0]    fwd_valid,
  output pkt_t                 fwd_pkt [NPORTS],
  input  logic [NPORTS-1:0]    fwd_ready,
  // scoreboard allocation at the requester's port
  output logic [NPORTS-1:0]    tsb_alloc,
  output logic [TAG_W-1:0]     tsb_tag,
  output logic [CAM_IDX_W-1:0] tsb_cam_idx,
  output cmd_e                 tsb_cmd,
  // non-coherent requests to the output ports
  output logic [NPORTS-1:0]    ncout_valid,
  output pkt_t                 ncout_pkt [NPORTS],
  input  logic [NPORTS-1:0]    ncout_ready,
  // status
  output logic                 cam_perr,
  output logic                 pend_perr,
  output logic [CAM_IDX_W:0]   cam_used,
  output logic [PEND_IDX_W:0]  pend_count
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- input FIFOs ----------------
  pkt_t              cf_head [NPORTS];
  logic [NPORTS-1:0] cf_empty, cf_full, cf_pop;
  pkt_t              nf_head [NPORTS];
  logic [NPORTS-1:0] nf_empty, nf_full, nf_pop;

  for (genvar p = 0; p < NPORTS; p++) begin : g_fifo
    logic [CW-1:0] ccount, ncount;
    req_t          ch, nh;
    sync_fifo #(.T(req_t), .DEPTH(FIFO_DEPTH)) u_coh (
      .clk, .rst_n, .push(coh_valid[p] && coh_ready[p]), .din(to_req(coh_pkt[p])),
      .pop(cf_pop[p]), .dout(ch), .full(cf_full[p]), .empty(cf_empty[p]),
      .count(ccount));
    sync_fifo #(.T(req_t), .DEPTH(FIFO_DEPTH)) u_nc (
      .clk, .rst_n, .push(nc_valid[p] && nc_ready[p]), .din(to_req(nc_pkt[p])),
      .pop(nf_pop[p]), .dout(nh), .full(nf_full[p]), .empty(nf_empty[p]),
      .count(ncount));
    assign cf_head[p] = from_req(ch);
    assign nf_head[p] = from_req(nh);
  end
  assign coh_ready = ~cf_full;
  assign nc_ready  = ~nf_full;

  // ---------------- non-coherent path ----------------
  asu_nc_router u_nc_router (
    .clk, .rst_n, .in_valid(~nf_empty), .in_pkt(nf_head), .in_ready(nf_pop),
    .out_valid(ncout_valid), .out_pkt(ncout_pkt), .out_ready(ncout_ready));

  // ---------------- completion arbiter ----------------
  logic [NPORTS-1:0]        cgnt;
  logic [$clog2(NPORTS)-1:0] cgi;
  logic                     cpl_go;
  logic [CAM_IDX_W-1:0]     c_idx;
  rr_arb #(.N(NPORTS)) u_cpl_arb (
    .clk, .rst_n, .req(cpl_valid), .adv(cpl_go), .gnt(cgnt), .gnt_idx(cgi));
  assign c_idx = cpl_idx[cgi];

  // ---------------- coherent request arbiter ----------------
  logic [NPORTS-1:0]        qgnt;
  logic [$clog2(NPORTS)-1:0] qgi;
  logic                     req_go;
  pkt_t                     q_pkt;
  rr_arb #(.N(NPORTS)) u_req_arb (
    .clk, .rst_n, .req(~cf_empty), .adv(req_go), .gnt(qgnt), .gnt_idx(qgi));
  assign q_pkt = cf_head[qgi];

  // ---------------- CAM and pended lists ----------------
  logic                 lk_hit, cam_full, cam_alloc, cam_free;
  logic [CAM_IDX_W-1:0] lk_idx, alloc_idx;
  logic [ADDR_W-1:0]    rd_addr;
  logic                 rd_perr_raw;
  logic                 pend_push, pend_pop, pend_ne, pop_perr;
  logic [PORT_W-1:0]    pop_src;
  logic [TAG_W-1:0]     pop_tag;
  cmd_e                 pop_cmd;

  asu_cam u_cam (
    .clk, .rst_n, .lk_addr(q_pkt.addr), .lk_hit, .lk_idx, .full(cam_full),
    .alloc_idx, .alloc(cam_alloc), .free(cam_free), .free_idx(c_idx),
    .rd_idx(c_idx), .rd_addr, .rd_perr(rd_perr_raw), .used(cam_used));

  asu_pend u_pend (
    .clk, .rst_n, .push(pend_push), .push_list(lk_idx), .push_src(q_pkt.src),
    .push_tag(q_pkt.tag), .push_cmd(q_pkt.cmd), .pop(pend_pop), .pop_list(c_idx),
    .pop_nonempty(pend_ne), .pop_src, .pop_tag, .pop_cmd, .pop_perr,
    .count(pend_count));

  // ---------------- broadcast router ----------------
  logic                 r_valid, r_ready;
  pkt_t                 r_pkt;
  logic [CAM_IDX_W-1:0] r_idx;

  asu_coh_router u_coh_router (
    .clk, .rst_n, .in_valid(r_valid), .in_pkt(r_pkt), .in_cam_idx(r_idx),
    .in_ready(r_ready), .out_valid(fwd_valid), .out_pkt(fwd_pkt), .out_ready(fwd_ready),
    .tsb_alloc, .tsb_tag, .tsb_cam_idx, .tsb_cmd);

  // ---------------- control ----------------
  logic any_cpl, any_req, wake, hazard;
  always_comb begin
    any_cpl   = |cpl_valid;
    any_req   = |(~cf_empty);
    wake      = any_cpl && pend_ne;
    // completion: free (always possible) or wake (needs the router)
    cpl_go    = any_cpl && (!pend_ne || r_ready);
    pend_pop  = cpl_go && pend_ne;
    cam_free  = cpl_go && !pend_ne;
    cpl_ready = cpl_go ? cgnt : '0;

    // new request
    hazard    = any_cpl && lk_hit && (lk_idx == c_idx);
    req_go    = 1'b0;
    pend_push = 1'b0;
    cam_alloc = 1'b0;
    if (any_req && !hazard) begin
      if (lk_hit) begin
        req_go    = 1'b1;
        pend_push = 1'b1;
      end else if (!cam_full && r_ready && !wake) begin
        req_go    = 1'b1;
        cam_alloc = 1'b1;
      end
    end
    cf_pop = req_go ? qgnt : '0;

    // router input: a wakeup has priority over a new miss
    r_valid = 1'b0;
    r_pkt   = q_pkt;
    r_idx   = alloc_idx;
    if (pend_pop) begin
      r_valid     = 1'b1;
      r_pkt       = '0;
      r_pkt.cmd   = pop_cmd;
      r_pkt.src   = pop_src;
      r_pkt.tag   = pop_tag;
      r_pkt.addr  = rd_addr;
      r_idx       = c_idx;
    end else if (cam_alloc) begin
      r_valid     = 1'b1;
    end
  end

  assign cam_perr  = pend_pop && rd_perr_raw;
  assign pend_perr = pend_pop && pop_perr;

  a_one_router_user: assert property (@(posedge clk) disable iff (!rst_n) !(pend_pop && cam_alloc));
endmodule
