// tb_lpu: one link port unit between a node model (a link framing transmit
// and receive pair) and hub-side stubs for the ASU, the cross connect and the
// other ports. Checks every path through the port:
//   node request -> ASU coherent / non-coherent interface
//   node snoop response -> cross connect, node data chunk -> destination port
//   ASU forwarded request, non-coherent request, data from another port -> node
//   snoop responses from the cross connect -> scoreboard -> consolidated
//   response to the node and completion to the ASU
// and that no protocol, snoop or link error is raised.
module tb_lpu;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // link wires
  logic               n2h_v, h2n_v, rx_rq, tx_rq, retrain;
  logic [FRAME_W-1:0] n2h_d, h2n_d;
  logic [CRC_W-1:0]   n2h_c, h2n_c;
  logic [SEQ_W-1:0]   n2h_s, h2n_s, rx_rs, tx_rs;
  // hub side
  logic coh_valid, nc_valid, cpl_valid, fwd_valid = 0, fwd_ready, ncout_valid = 0, ncout_ready;
  logic tsb_alloc = 0, xo_valid, xi_valid = 0, xi_ready;
  pkt_t coh_pkt, nc_pkt, fwd_pkt = '0, ncout_pkt = '0, xo_pkt, xi_pkt = '0, do_pkt;
  logic [CAM_IDX_W-1:0] cpl_idx, tsb_cam_idx = '0;
  logic [TAG_W-1:0]     tsb_tag = '0;
  logic [NPORTS-1:0]    do_valid, di_valid = '0, di_ready;
  pkt_t                 di_pkt [NPORTS];
  logic proto_err, snoop_err, crc_err, overflow, replay_err;
  logic [2:0] stall_vc;

  lpu #(.PORT(2'd0)) dut (
    .clk, .rst_n,
    .rx_frame_valid(n2h_v), .rx_frame_data(n2h_d), .rx_frame_crc(n2h_c), .rx_frame_seq(n2h_s),
    .rx_replay_req(rx_rq), .rx_replay_seq(rx_rs),
    .tx_frame_valid(h2n_v), .tx_frame_data(h2n_d), .tx_frame_crc(h2n_c), .tx_frame_seq(h2n_s),
    .tx_replay_req(tx_rq), .tx_replay_seq(tx_rs), .retrain,
    .coh_valid, .coh_pkt, .coh_ready(1'b1), .nc_valid, .nc_pkt, .nc_ready(1'b1),
    .cpl_valid, .cpl_idx, .cpl_ready(1'b1), .fwd_valid, .fwd_pkt, .fwd_ready,
    .ncout_valid, .ncout_pkt, .ncout_ready, .tsb_alloc, .tsb_tag, .tsb_cam_idx,
    .xo_valid, .xo_pkt, .xo_ready(1'b1), .xi_valid, .xi_pkt, .xi_ready,
    .do_valid, .do_pkt, .do_ready('1), .di_valid, .di_pkt, .di_ready,
    .proto_err, .snoop_err, .crc_err, .overflow, .replay_err, .stall_vc);

  // node model
  logic tv, tr, rv, n_rpl, n_rerr, n_crc, n_ovf, n_rtr;
  pkt_t tp, rp;
  lfu_tx u_ntx (.clk, .rst_n, .in_valid(tv), .in_pkt(tp), .in_ready(tr),
    .frame_valid(n2h_v), .frame_data(n2h_d), .frame_crc(n2h_c), .frame_seq(n2h_s),
    .replay_req(rx_rq), .replay_seq(rx_rs), .replaying(n_rpl), .replay_err(n_rerr));
  lfu_rx u_nrx (.clk, .rst_n, .frame_valid(h2n_v), .frame_data(h2n_d), .frame_crc(h2n_c),
    .frame_seq(h2n_s), .out_valid(rv), .out_pkt(rp), .out_ready(1'b1),
    .replay_req(tx_rq), .replay_seq(tx_rs), .crc_err(n_crc), .overflow(n_ovf), .retrain(n_rtr));

  // capture of everything that leaves
  pkt_t got_coh [$], got_nc [$], got_xo [$], got_do [$], got_node [$];
  int   got_do_dst [$], got_cpl [$];
  always @(posedge clk) if (rst_n) begin
    if (coh_valid) got_coh.push_back(coh_pkt);
    if (nc_valid) got_nc.push_back(nc_pkt);
    if (xo_valid) got_xo.push_back(xo_pkt);
    for (int d = 0; d < NPORTS; d++) if (do_valid[d]) begin got_do.push_back(do_pkt); got_do_dst.push_back(d); end
    if (cpl_valid) got_cpl.push_back(int'(cpl_idx));
    if (rv) got_node.push_back(rp);
  end

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  // node transmit queue; the node returns a credit for every packet it takes
  pkt_t send_q [$];
  int   cr_pend [3] = '{0, 0, 0};
  always @(posedge clk) begin
    if (!rst_n) tv <= 1'b0;
    else if (!tv || tr) begin
      if (send_q.size() > 0) begin tp <= send_q.pop_front(); tv <= 1'b1; end
      else tv <= 1'b0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (rv) case (vc_of(rp.cmd))
      VC_REQ: cr_pend[0]++;
      VC_RPL: cr_pend[1]++;
      default: if (rp.cmd[0]) cr_pend[2]++;
    endcase
    if (cr_pend[0] + cr_pend[1] + cr_pend[2] > 0 && send_q.size() == 0) begin
      pkt_t c;
      int a0, a1, a2;
      a0 = (cr_pend[0] > 7) ? 7 : cr_pend[0];
      a1 = (cr_pend[1] > 7) ? 7 : cr_pend[1];
      a2 = (cr_pend[2] > 3) ? 3 : cr_pend[2];
      cr_pend[0] -= a0; cr_pend[1] -= a1; cr_pend[2] -= a2;
      c = '0; c.cmd = C_CREDIT; c.tag = {3'(a0), 3'(a1), 2'(a2)};
      send_q.push_back(c);
    end
  end

  task automatic node_send(input pkt_t p);
    @(negedge clk);
    send_q.push_back(p);
    do @(posedge clk); while (send_q.size() != 0);
    wait_cycles(2);
  endtask


  function automatic pkt_t mk(cmd_e c, int s, int d, int t, logic [ADDR_W-1:0] a);
    pkt_t p;
    p = '0; p.cmd = c; p.src = PORT_W'(s); p.dst = PORT_W'(d); p.tag = TAG_W'(t); p.addr = a;
    return p;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    pkt_t p;
    for (int i = 0; i < NPORTS; i++) di_pkt[i] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // node coherent and non-coherent requests
    for (int i = 0; i < 20; i++) begin
      p = mk((i % 3 == 0) ? C_RTS : (i % 3 == 1) ? C_RTO : C_WB, 0, 0, i,
             ADDR_W'({$urandom, $urandom}) & ~ADDR_W'(63));
      node_send(p);
      wait_cycles(40);
      chk(got_coh.size() == 1 && got_nc.size() == 0, $sformatf("request %0d on coherent interface", i));
      if (got_coh.size() == 1) begin
        chk(got_coh[0].cmd == p.cmd && got_coh[0].tag == p.tag && got_coh[0].addr == p.addr &&
            got_coh[0].src == 2'd0, "coherent request fields");
      end
      got_coh.delete(); got_nc.delete();
      p = mk((i % 2) ? C_PIORD : C_PIOWR, 0, 1 + i % 3, 128 + i, ADDR_W'(32'h1000 + i));
      node_send(p);
      wait_cycles(40);
      chk(got_nc.size() == 1 && got_coh.size() == 0, $sformatf("PIO %0d on non-coherent interface", i));
      if (got_nc.size() == 1) chk(got_nc[0].cmd == p.cmd && got_nc[0].dst == p.dst && got_nc[0].tag == p.tag,
                                  "non-coherent request fields");
      got_coh.delete(); got_nc.delete();
    end

    // node snoop response -> cross connect; node data chunk -> destination output port
    for (int i = 0; i < 12; i++) begin
      p = mk(C_SNP_RSP, 1 + i % 3, 0, i, '0);
      p.snp = snp_e'(i % 4);
      node_send(p);
      p = mk(C_DATA, 0, 1 + i % 3, i, '0);
      p.chunk = 2'(i % 4);
      p.data = {$urandom, $urandom, $urandom, $urandom};
      node_send(p);
      wait_cycles(40);
      chk(got_xo.size() == 1, "snoop response to cross connect");
      if (got_xo.size() == 1) chk(got_xo[0].cmd == C_SNP_RSP && got_xo[0].src == 2'(1 + i % 3) &&
                                  got_xo[0].snp == snp_e'(i % 4), "snoop response fields");
      chk(got_do.size() == 1 && got_do_dst[0] == 1 + i % 3, "data chunk to its destination");
      if (got_do.size() == 1) chk(got_do[0].data == p.data && got_do[0].chunk == p.chunk, "data chunk fields");
      got_xo.delete(); got_do.delete(); got_do_dst.delete();
    end

    // ASU -> node: forwarded request, non-coherent request; other port -> node: data
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      fwd_valid = 1; fwd_pkt = mk(C_RTO, 1 + i % 3, 0, i, ADDR_W'(34'h3_0000_0000 + i * 64));
      do @(posedge clk); while (!fwd_ready);
      @(negedge clk); fwd_valid = 0;
      ncout_valid = 1; ncout_pkt = mk(C_PIOWR, 1 + i % 3, 0, 130 + i, ADDR_W'(i));
      do @(posedge clk); while (!ncout_ready);
      @(negedge clk); ncout_valid = 0;
      di_valid[1 + i % 3] = 1; di_pkt[1 + i % 3] = mk(C_DATA, 1 + i % 3, 0, i, '0);
      di_pkt[1 + i % 3].data = 128'(i * 7 + 1);
      do @(posedge clk); while (!di_ready[1 + i % 3]);
      @(negedge clk); di_valid = '0;
      wait_cycles(60);
      chk(got_node.size() == 3, $sformatf("three packets reach the node (%0d)", got_node.size()));
      foreach (got_node[k]) begin
        case (got_node[k].cmd)
          C_RTO:   chk(got_node[k].tag == TAG_W'(i) && got_node[k].addr == ADDR_W'(34'h3_0000_0000 + i * 64),
                       "forwarded request fields");
          C_PIOWR: chk(got_node[k].tag == TAG_W'(130 + i), "non-coherent request fields at node");
          C_DATA:  chk(got_node[k].data == 128'(i * 7 + 1), "data fields at node");
          default: chk(0, "unexpected packet at node");
        endcase
      end
      got_node.delete();
    end

    // scoreboard: three snoop responses consolidate into one response
    for (int i = 0; i < 16; i++) begin
      snp_e s [3];
      snp_e exp;
      int nm, no, ns;
      @(negedge clk);
      tsb_alloc = 1; tsb_tag = TAG_W'(20 + i); tsb_cam_idx = CAM_IDX_W'(i * 5);
      @(negedge clk);
      tsb_alloc = 0;
      nm = 0; no = 0; ns = 0;
      for (int k = 0; k < 3; k++) begin
        do s[k] = snp_e'($urandom_range(0, 3)); while ((s[k] == SNP_HIT_M && (nm + no + ns) > 0) ||
                                                       (s[k] != SNP_MISS && nm > 0) ||
                                                       (s[k] == SNP_HIT_O && no > 0));
        nm += (s[k] == SNP_HIT_M); no += (s[k] == SNP_HIT_O); ns += (s[k] == SNP_HIT_S);
      end
      exp = (nm > 0) ? SNP_HIT_M : (no > 0) ? SNP_HIT_O : (ns > 0) ? SNP_HIT_S : SNP_MISS;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        xi_valid = 1; xi_pkt = mk(C_SNP_RSP, 0, k + 1, 20 + i, '0); xi_pkt.snp = s[k];
        do @(posedge clk); while (!xi_ready);
        @(negedge clk); xi_valid = 0;
        wait_cycles(3);
        if (k < 2) chk(got_cpl.size() == 0, $sformatf("no completion after response %0d of 3", k + 1));
      end
      wait_cycles(60);
      chk(got_cpl.size() == 1 && got_cpl[0] == i * 5, "completion carries the CAM index");
      chk(got_node.size() == 1, "one consolidated response");
      if (got_node.size() == 1)
        chk(got_node[0].cmd == C_CONS_RSP && got_node[0].tag == TAG_W'(20 + i) && got_node[0].snp == exp,
            $sformatf("consolidated %0d expected %0d (%0d %0d %0d)", got_node[0].snp, exp, s[0], s[1], s[2]));
      got_cpl.delete(); got_node.delete();
    end

    chk(!proto_err && !snoop_err && !crc_err && !overflow && !replay_err && !retrain, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
