// tb_asu: drives the Address Serialization Unit with coherent requests from
// all four ports to a small pool of addresses (so many collide) plus
// non-coherent traffic, and plays the four scoreboards: every broadcast is
// completed after a random delay. Checks that at most one transaction per
// address is ever active, that requests from one port to one address are
// broadcast in arrival order, that every request is broadcast exactly once
// with the right copies, that non-coherent requests reach their destination,
// that the CAM and pended store are empty at the end, and that an
// uncontended request reaches the router outputs two cycles after it enters.
module tb_asu;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NPORTS-1:0]    coh_valid = '0, coh_ready, nc_valid = '0, nc_ready;
  pkt_t                 coh_pkt [NPORTS];
  pkt_t                 nc_pkt  [NPORTS];
  logic [NPORTS-1:0]    cpl_valid = '0, cpl_ready;
  logic [CAM_IDX_W-1:0] cpl_idx [NPORTS];
  logic [NPORTS-1:0]    fwd_valid, fwd_ready = '1, tsb_alloc, ncout_valid, ncout_ready = '1;
  pkt_t                 fwd_pkt   [NPORTS];
  pkt_t                 ncout_pkt [NPORTS];
  logic [TAG_W-1:0]     tsb_tag;
  logic [CAM_IDX_W-1:0] tsb_cam_idx;
  cmd_e                 tsb_cmd;
  logic                 cam_perr, pend_perr;
  logic [CAM_IDX_W:0]   cam_used;
  logic [PEND_IDX_W:0]  pend_count;

  asu dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  localparam int PER_PORT = 80;
  localparam int NADDR    = 6;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // reference state
  int active_addr [int];              // addr -> count of active transactions
  int seq_sent [NPORTS][NADDR];       // order per port and address
  int seq_seen [NPORTS][NADDR];
  int sent [NPORTS];
  int bcast = 0, pended_max = 0, nc_sent = 0, nc_got = 0;
  // completions waiting: queue per port of {due cycle, cam idx, addr}
  typedef struct { int due; int idx; int addr; } cpl_t;
  cpl_t cq [NPORTS][$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe broadcasts and scoreboard allocations
  always @(posedge clk) if (rst_n) begin
    if (|tsb_alloc) begin
      int s, a, k;
      s = $clog2(tsb_alloc);
      a = int'(fwd_pkt[s].addr);
      chk(fwd_valid == '1, "four copies with the allocation");
      for (int d = 0; d < NPORTS; d++)
        chk(fwd_pkt[d].addr == fwd_pkt[s].addr && fwd_pkt[d].src == PORT_W'(s) &&
            fwd_pkt[d].cmd == ((d == s) ? C_FWD_ACK : tsb_cmd), "broadcast copy");
      chk(!active_addr.exists(a) || active_addr[a] == 0, $sformatf("one active per address %0d", a));
      active_addr[a] = 1;
      k = int'(tsb_tag) / 16;          // tag encodes the order number per port
      chk(int'(tsb_tag) % 16 == a, "tag matches address");
      chk(k == seq_seen[s][a], $sformatf("arrival order port %0d addr %0d", s, a));
      seq_seen[s][a]++;
      bcast++;
      cq[s].push_back('{cyc + $urandom_range(1, 12), int'(tsb_cam_idx), a});
    end
    for (int d = 0; d < NPORTS; d++)
      if (ncout_valid[d] && ncout_ready[d]) begin
        chk(ncout_pkt[d].dst == PORT_W'(d), "non-coherent destination");
        nc_got++;
      end
    if (int'(pend_count) > pended_max) pended_max = int'(pend_count);
    chk(!cam_perr && !pend_perr, "no parity error");
  end

  // completion drivers
  for (genvar p = 0; p < NPORTS; p++) begin : g_cpl
    always @(negedge clk) if (rst_n) begin
      if (cpl_valid[p] && cpl_ready[p] === 1'b1) ;
      if (cq[p].size() > 0 && cq[p][0].due <= cyc) begin
        cpl_valid[p] = 1'b1;
        cpl_idx[p] = CAM_IDX_W'(cq[p][0].idx);
      end else cpl_valid[p] = 1'b0;
    end
    always @(posedge clk) if (rst_n && cpl_valid[p] && cpl_ready[p]) begin
      active_addr[cq[p][0].addr] = 0;
      void'(cq[p].pop_front());
    end
  end

  initial begin
    int t0, lat;
    for (int p = 0; p < NPORTS; p++) begin
      sent[p] = 0; coh_pkt[p] = '0; nc_pkt[p] = '0;
      for (int a = 0; a < NADDR; a++) begin seq_sent[p][a] = 0; seq_seen[p][a] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of one uncontended request
    @(negedge clk);
    coh_valid[0] = 1; coh_pkt[0].cmd = C_RTS; coh_pkt[0].src = 0;
    coh_pkt[0].addr = 34'd5; coh_pkt[0].tag = TAG_W'(0 * 16 + 5);
    seq_sent[0][5] = 1; sent[0] = 1;
    t0 = cyc;
    @(negedge clk);
    coh_valid[0] = 0;
    while (fwd_valid == '0) @(negedge clk);
    lat = cyc - t0;
    chk(lat == 2, $sformatf("uncontended request latency %0d cycles", lat));
    // random traffic
    while (sent[0] + sent[1] + sent[2] + sent[3] < NPORTS * PER_PORT || nc_sent < 40) begin
      @(negedge clk);
      fwd_ready = ($urandom_range(0, 3) != 0) ? '1 : 4'($urandom);
      ncout_ready = 4'($urandom);
      for (int p = 0; p < NPORTS; p++) begin
        if (coh_valid[p] && coh_ready[p] === 1'b0) continue;
        if (sent[p] < PER_PORT && $urandom_range(0, 2) == 0) begin
          int a, k;
          a = $urandom_range(0, NADDR - 1);
          k = seq_sent[p][a];
          if (k < 11) begin
            coh_valid[p] = 1;
            coh_pkt[p].cmd = ($urandom_range(0, 1)) ? C_RTO : C_RTS;
            coh_pkt[p].src = PORT_W'(p);
            coh_pkt[p].addr = ADDR_W'(a);
            coh_pkt[p].tag = TAG_W'(k * 16 + a);
            seq_sent[p][a]++;
            sent[p]++;
          end else begin
            coh_valid[p] = 0;
            sent[p]++;   // slot skipped
          end
        end else coh_valid[p] = 0;
        if (!(nc_valid[p] && nc_ready[p] === 1'b0)) begin
          if (nc_sent < 40 && $urandom_range(0, 3) == 0) begin
            nc_valid[p] = 1;
            nc_pkt[p].cmd = C_PIORD;
            nc_pkt[p].dst = PORT_W'($urandom_range(0, 3));
            nc_sent++;
          end else nc_valid[p] = 0;
        end
      end
    end
    @(negedge clk);
    coh_valid = '0; nc_valid = '0;
    fwd_ready = '1; ncout_ready = '1;
    repeat (400) @(negedge clk);
    begin
      int total;
      total = 0;
      for (int p = 0; p < NPORTS; p++) for (int a = 0; a < NADDR; a++) begin
        total += seq_sent[p][a];
        chk(seq_seen[p][a] == seq_sent[p][a], $sformatf("all broadcast p%0d a%0d", p, a));
      end
      chk(bcast == total, "each request broadcast once");
    end
    chk(nc_got == 40, $sformatf("non-coherent delivered %0d", nc_got));
    chk(pended_max > 0, "some requests were pended behind a busy address");
    chk(cam_used == 0 && pend_count == 0, "CAM and pended store empty at the end");
    $display("broadcasts=%0d max pended=%0d", bcast, pended_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
