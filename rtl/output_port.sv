// output_port: egress side of one link port. It queues everything bound for
// one node and picks one packet per cycle for the link framing unit.
//
// Queues: the request channel has one FIFO for coherent traffic from the ASU
// broadcast router (forwarded requests and forwarded-request acks, kept in one
// FIFO so an ack is never overtaken by a later forwarded request) and one for
// non-coherent requests. The reply channel has one FIFO for consolidated
// snoop responses from this port's scoreboard and one for replies arriving
// through the cross connect. The data channel has one FIFO per input port, so
// the chunks of a cacheline from one source stay in order.
//
// Selection: a weighted round robin over the three virtual channels gives the
// current channel up to W_REQ / W_RPL / W_DAT consecutive packets before moving
// on. Inside the data channel a head carrying a critical chunk (chunk 0 or 1,
// the first 32 bytes of the line) wins over non-critical heads; ties go
// round-robin. Inside the request and reply channels the two FIFOs alternate.
//
// Flow control: credits count free buffers in the node, one counter per
// channel, loaded with the INIT_* values at reset and returned by credit
// packets (cr_valid with per-channel counts). Requests and replies always use
// a credit; in the data channel only write data (PIO write / writeback) does,
// read-return data does not. A channel without a usable credit is skipped.
// Weights, initial credits and FIFO depths are this design's assumptions.
module output_port
  import zmb_pkg::*;
#(
  parameter int unsigned W_REQ = 2,
  parameter int unsigned W_RPL = 2,
  parameter int unsigned W_DAT = 4,
  parameter int unsigned INIT_REQ_CR = 16,
  parameter int unsigned INIT_RPL_CR = 16,
  parameter int unsigned INIT_DAT_CR = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              coh_valid,
  input  pkt_t              coh_pkt,
  output logic              coh_ready,
  input  logic              nc_valid,
  input  pkt_t              nc_pkt,
  output logic              nc_ready,
  input  logic              tsb_valid,
  input  pkt_t              tsb_pkt,
  output logic              tsb_ready,
  input  logic              rpl_valid,
  input  pkt_t              rpl_pkt,
  output logic              rpl_ready,
  input  logic [NPORTS-1:0] dat_valid,
  input  pkt_t              dat_pkt [NPORTS],
  output logic [NPORTS-1:0] dat_ready,
  input  logic              cr_valid,
  input  logic [2:0]        cr_req,
  input  logic [2:0]        cr_rpl,
  input  logic [1:0]        cr_dat,
  output logic              out_valid,
  output pkt_t              out_pkt,
  input  logic              out_ready,
  output logic [2:0]        stall_vc   // per channel: had a packet but no credit (stall)
);
  localparam int CW  = $clog2(DEPTH + 1);
  localparam int NQ  = 4 + NPORTS;  // 0 coh, 1 nc, 2 tsb, 3 rpl, 4.. data
  localparam int CRW = 8;

  pkt_t          head  [NQ];
  logic [NQ-1:0] empty, full, pop, push;
  pkt_t          din   [NQ];

  always_comb begin
    push[0] = coh_valid && !full[0]; din[0] = coh_pkt;
    push[1] = nc_valid  && !full[1]; din[1] = nc_pkt;
    push[2] = tsb_valid && !full[2]; din[2] = tsb_pkt;
    push[3] = rpl_valid && !full[3]; din[3] = rpl_pkt;
    for (int i = 0; i < NPORTS; i++) begin
      push[4+i] = dat_valid[i] && !full[4+i];
      din[4+i]  = dat_pkt[i];
    end
  end
  assign coh_ready = !full[0];
  assign nc_ready  = !full[1];
  assign tsb_ready = !full[2];
  assign rpl_ready = !full[3];
  assign dat_ready = ~full[NQ-1:4];

  for (genvar q = 0; q < NQ; q++) begin : g_q
    logic [CW-1:0] cnt;
    sync_fifo #(.T(pkt_t), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n, .push(push[q]), .din(din[q]), .pop(pop[q]), .dout(head[q]),
      .full(full[q]), .empty(empty[q]), .count(cnt));
  end

  // ---------------- credits ----------------
  logic [CRW-1:0] cr_q [3];
  logic [2:0]     has_cr;
  always_comb for (int v = 0; v < 3; v++) has_cr[v] = (cr_q[v] != '0);

  // ---------------- per-channel candidates ----------------
  logic       alt_req_q, alt_rpl_q;
  logic       req_sel, rpl_sel;           // which FIFO of the pair
  logic [2:0] avail;                      // channel has a packet it may send
  logic [2:0] pending;                    // channel has any packet
  logic [NPORTS-1:0] d_ok, d_crit, d_req;
  logic [$clog2(NPORTS)-1:0] d_idx;
  logic [NPORTS-1:0] d_gnt;
  logic d_adv;

  always_comb begin
    // request pair: alternate when both have a packet
    if (!empty[0] && !empty[1]) req_sel = alt_req_q;
    else                        req_sel = empty[0];
    if (!empty[2] && !empty[3]) rpl_sel = alt_rpl_q;
    else                        rpl_sel = empty[2];
    for (int i = 0; i < NPORTS; i++) begin
      d_ok[i]   = !empty[4+i] && (!head[4+i].cmd[0] || has_cr[VC_DAT]);
      d_crit[i] = d_ok[i] && !head[4+i].chunk[1];
    end
    d_req = (|d_crit) ? d_crit : d_ok;
    pending[VC_REQ] = !empty[0] || !empty[1];
    pending[VC_RPL] = !empty[2] || !empty[3];
    pending[VC_DAT] = |(~empty[NQ-1:4]);
    avail[VC_REQ] = pending[VC_REQ] && has_cr[VC_REQ];
    avail[VC_RPL] = pending[VC_RPL] && has_cr[VC_RPL];
    avail[VC_DAT] = |d_ok;
  end

  rr_arb #(.N(NPORTS)) u_dat_arb (
    .clk, .rst_n, .req(d_req), .adv(d_adv), .gnt(d_gnt), .gnt_idx(d_idx));

  // ---------------- weighted round robin over channels ----------------
  logic [1:0] cur_q;
  logic [3:0] used_q;
  logic [1:0] g;
  logic       g_ok;

  function automatic logic [3:0] weight(logic [1:0] v);
    case (v)
      2'd0:    return 4'(W_REQ);
      2'd1:    return 4'(W_RPL);
      default: return 4'(W_DAT);
    endcase
  endfunction

  function automatic logic [1:0] nxt(logic [1:0] v, int k);
    return 2'((int'(v) + k) % 3);
  endfunction

  always_comb begin
    g = cur_q;
    g_ok = 1'b0;
    if (avail[cur_q] && used_q < weight(cur_q)) begin
      g = cur_q; g_ok = 1'b1;
    end else begin
      for (int k = 3; k >= 1; k--)
        if (avail[nxt(cur_q, k)]) begin
          g = nxt(cur_q, k); g_ok = 1'b1;
        end
    end
  end

  always_comb begin
    out_valid = g_ok;
    pop       = '0;
    d_adv     = 1'b0;
    case (g)
      VC_REQ: begin
        out_pkt = req_sel ? head[1] : head[0];
        pop[req_sel ? 1 : 0] = g_ok && out_ready;
      end
      VC_RPL: begin
        out_pkt = rpl_sel ? head[3] : head[2];
        pop[rpl_sel ? 3 : 2] = g_ok && out_ready;
      end
      default: begin
        out_pkt = head[4 + int'(d_idx)];
        pop[4 + int'(d_idx)] = g_ok && out_ready;
        d_adv = g_ok && out_ready;
      end
    endcase
    stall_vc = pending & ~avail;
  end

  logic fire;
  logic [2:0] spend;   // credit used this cycle, per channel
  assign fire = out_valid && out_ready;
  always_comb begin
    spend = '0;
    if (fire) begin
      spend[VC_REQ] = (g == VC_REQ);
      spend[VC_RPL] = (g == VC_RPL);
      spend[VC_DAT] = (g == VC_DAT) && out_pkt.cmd[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q     <= VC_REQ;
      used_q    <= '0;
      alt_req_q <= 1'b0;
      alt_rpl_q <= 1'b0;
      cr_q[VC_REQ] <= CRW'(INIT_REQ_CR);
      cr_q[VC_RPL] <= CRW'(INIT_RPL_CR);
      cr_q[VC_DAT] <= CRW'(INIT_DAT_CR);
    end else begin
      if (fire) begin
        if (g == cur_q) used_q <= used_q + 4'd1;
        else begin
          cur_q  <= g;
          used_q <= 4'd1;
        end
        if (g == VC_REQ) begin
          alt_req_q <= !req_sel;
        end
        if (g == VC_RPL) begin
          alt_rpl_q <= !rpl_sel;
        end
      end else if (!avail[cur_q]) begin
        used_q <= weight(cur_q);   // idle channel gives up its turn
      end
      cr_q[VC_REQ] <= cr_q[VC_REQ] - CRW'(spend[VC_REQ]) + (cr_valid ? CRW'(cr_req) : '0);
      cr_q[VC_RPL] <= cr_q[VC_RPL] - CRW'(spend[VC_RPL]) + (cr_valid ? CRW'(cr_rpl) : '0);
      cr_q[VC_DAT] <= cr_q[VC_DAT] - CRW'(spend[VC_DAT]) + (cr_valid ? CRW'(cr_dat) : '0);
    end
  end

  a_credit_nonneg: assert property (@(posedge clk) disable iff (!rst_n)
                                    fire |-> (g == VC_DAT && !out_pkt.cmd[0]) || has_cr[g]);
endmodule
