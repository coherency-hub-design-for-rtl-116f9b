// tb_zambezi_load: the whole hub under the heaviest load the processors can
// offer. Same node models, directory and checks as tb_zambezi, but each
// node keeps up to 96 coherent requests outstanding (a processor may have 384
// transactions in flight, which spread over four address planes gives 96 per
// hub) over a pool of 256 cache lines. The 96-entry address CAM fills, new
// requests wait for a free entry, and the pended lists and the 768-entry
// pended store grow deep. On top of the tb_zambezi checks it requires that the
// CAM was completely full at least once, that requests stalled on a full CAM,
// and it reports the peak numbers of outstanding, active and pended
// transactions.
module tb_zambezi_load;
  import zmb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic               por_n = 1, wmr_n = 1, node_rst_n = 0;
  logic               rx_frame_valid [NPORTS];
  logic [FRAME_W-1:0] rx_frame_data  [NPORTS];
  logic [CRC_W-1:0]   rx_frame_crc   [NPORTS];
  logic [SEQ_W-1:0]   rx_frame_seq   [NPORTS];
  logic               rx_replay_req  [NPORTS];
  logic [SEQ_W-1:0]   rx_replay_seq  [NPORTS];
  logic               tx_frame_valid [NPORTS];
  logic [FRAME_W-1:0] tx_frame_data  [NPORTS];
  logic [CRC_W-1:0]   tx_frame_crc   [NPORTS];
  logic [SEQ_W-1:0]   tx_frame_seq   [NPORTS];
  logic               tx_replay_req  [NPORTS];
  logic [SEQ_W-1:0]   tx_replay_seq  [NPORTS];
  logic               retrain        [NPORTS];
  logic               lframe_n = 1, lad_oe, err_fatal_n, sp_intr_n;
  logic [3:0]         lad_in = 4'hF, lad_out;

  zambezi dut (.*);

  `include "lpc_host.svh"

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, m);
    end
  endtask

  localparam int NREQ   = 400;   // coherent requests per node
  localparam int NPIO   = 24;    // non-coherent operations per node
  localparam int MAXOUT = 96;    // outstanding coherent requests per node
  localparam int NADDR  = 256;
  localparam int SNOOP_DLY = 150;  // cycles a node takes to look up its caches

  function automatic int key(int r, int tag);
    return r * 256 + tag;
  endfunction
  function automatic logic [127:0] line_data(logic [ADDR_W-1:0] a, int ch);
    return {a[31:0], 32'(ch), ~a[31:0], 32'h5a5a_0000 + 32'(ch)};
  endfunction

  // ---------------- coherence directory, serialization order ----------------
  int   owner [int];       // addr -> owning node or -1
  int   sharers [int];     // addr -> bitmap
  snp_e exp_rsp [int];     // key*4 + node -> answer the node must give
  snp_e exp_cons [int];    // key -> consolidated answer
  bit   exp_data [int];    // key -> 4 data chunks expected
  int   serial [int];      // key -> serialization index
  int   nserial = 0;
  int   active_on [int];   // addr -> active transactions
  bit   force_illegal = 0;
  int   n_cons [4];

  always @(posedge clk) if (node_rst_n && |dut.u_asu.tsb_alloc) begin
    int r, t, a, o, sh, nm, no, ns;
    cmd_e c;
    r = $clog2(dut.u_asu.tsb_alloc);
    t = int'(dut.u_asu.tsb_tag);
    c = dut.u_asu.tsb_cmd;
    a = int'(dut.u_asu.fwd_pkt[r].addr);
    if (!owner.exists(a)) begin owner[a] = -1; sharers[a] = 0; end
    o = owner[a]; sh = sharers[a];
    nm = 0; no = 0; ns = 0;
    for (int m = 0; m < NPORTS; m++) if (m != r) begin
      snp_e s;
      if (force_illegal)            s = (m == 1 || m == 2) ? SNP_HIT_M : SNP_MISS;
      else if (c == C_WB)           s = SNP_MISS;
      else if (o == m)              s = (sh != 0) ? SNP_HIT_O : SNP_HIT_M;
      else if (sh[m])               s = SNP_HIT_S;
      else                          s = SNP_MISS;
      exp_rsp[key(r, t) * 4 + m] = s;
      nm += (s == SNP_HIT_M); no += (s == SNP_HIT_O); ns += (s == SNP_HIT_S);
    end
    exp_cons[key(r, t)] = (nm > 0) ? SNP_HIT_M : (no > 0) ? SNP_HIT_O : (ns > 0) ? SNP_HIT_S : SNP_MISS;
    exp_data[key(r, t)] = !force_illegal && (nm + no > 0);
    n_cons[exp_cons[key(r, t)]]++;
    serial[key(r, t)] = nserial++;
    case (c)
      C_RTS: sharers[a] = sh | (1 << r);
      C_RTO: begin owner[a] = r; sharers[a] = 0; end
      default: if (o == r) owner[a] = -1;
    endcase
    chk(!active_on.exists(a) || active_on[a] == 0, $sformatf("address %0h active twice", a));
    active_on[a] = 1;
  end
  // a transaction stops being active when its scoreboard completes it
  for (genvar p = 0; p < NPORTS; p++) begin : g_cplmon
    always @(posedge clk) if (node_rst_n && dut.u_asu.cpl_valid[p] && dut.u_asu.cpl_ready[p])
      active_on[int'(dut.u_asu.u_cam.addr_q[dut.u_asu.cpl_idx[p]])] = 0;
  end

  // ---------------- per-node state ----------------
  typedef struct {
    int addr; cmd_e cmd; bit ack; bit cons; int data; int t0; bit pio;
  } txn_t;
  txn_t txns [int];                 // key(node, tag) -> transaction
  int   n_open [NPORTS];
  // read without creating an entry
  function automatic txn_t tget(int k);
    txn_t z;
    z = '{0, C_NOP, 0, 0, 0, 0, 0};
    if (txns.exists(k)) z = txns[k];
    return z;
  endfunction
  pkt_t send_q  [NPORTS][$];
  pkt_t dly_q   [NPORTS][$];       // snoop answers waiting for the cache lookup
  int   dly_t   [NPORTS][$];
  int   issued  [NPORTS];
  int   pio_issued [NPORTS];
  int   done_cnt [NPORTS];
  int   cr_pend [NPORTS][3];
  int   n_intr = 0, n_wdata = 0, n_fwd = 0;
  int   corrupt [$] = '{40, 42, 44, 46};

  for (genvar n = 0; n < NPORTS; n++) begin : g_node
    logic               tv, tr, nf_v, rv, rtr, rperr, ovf, crce;
    pkt_t               tp, rp;
    logic [FRAME_W-1:0] nf_d;
    logic [CRC_W-1:0]   nf_c;
    logic [SEQ_W-1:0]   nf_s;
    logic               rpl, rerr;
    int                 nframes = 0;

    lfu_tx u_ntx (
      .clk, .rst_n(node_rst_n), .in_valid(tv), .in_pkt(tp), .in_ready(tr),
      .frame_valid(nf_v), .frame_data(nf_d), .frame_crc(nf_c), .frame_seq(nf_s),
      .replay_req(rx_replay_req[n]), .replay_seq(rx_replay_seq[n]),
      .replaying(rpl), .replay_err(rerr));

    always_comb begin
      rx_frame_valid[n] = nf_v;
      rx_frame_data[n]  = nf_d;
      rx_frame_crc[n]   = nf_c;
      rx_frame_seq[n]   = nf_s;
      if (n == 3) foreach (corrupt[i]) if (corrupt[i] == nframes) rx_frame_data[n][7] = ~nf_d[7];
    end
    always @(posedge clk) if (nf_v) nframes++;

    lfu_rx u_nrx (
      .clk, .rst_n(node_rst_n), .frame_valid(tx_frame_valid[n]), .frame_data(tx_frame_data[n]),
      .frame_crc(tx_frame_crc[n]), .frame_seq(tx_frame_seq[n]), .out_valid(rv), .out_pkt(rp),
      .out_ready(1'b1), .replay_req(tx_replay_req[n]), .replay_seq(tx_replay_seq[n]),
      .crc_err(crce), .overflow(ovf), .retrain(rtr));

    // snoop answers become ready SNOOP_DLY cycles after the forwarded request
    always @(posedge clk) if (node_rst_n)
      while (dly_t[n].size() > 0 && dly_t[n][0] <= cyc) begin
        void'(dly_t[n].pop_front());
        send_q[n].push_back(dly_q[n].pop_front());
      end

    // transmit driver
    always @(posedge clk) begin
      if (!node_rst_n) tv <= 1'b0;
      else if (!tv || tr) begin
        if (send_q[n].size() > 0) begin
          tp <= send_q[n].pop_front();
          tv <= 1'b1;
        end else tv <= 1'b0;
      end
    end

    // credit return: node 2 returns credits only every 4 cycles
    always @(posedge clk) if (node_rst_n) begin
      if ((n != 2 || cyc % 4 == 0) && (cr_pend[n][0] + cr_pend[n][1] + cr_pend[n][2]) > 0) begin
        pkt_t c;
        int a0, a1, a2;
        a0 = (cr_pend[n][0] > 7) ? 7 : cr_pend[n][0];
        a1 = (cr_pend[n][1] > 7) ? 7 : cr_pend[n][1];
        a2 = (cr_pend[n][2] > 3) ? 3 : cr_pend[n][2];
        cr_pend[n][0] -= a0; cr_pend[n][1] -= a1; cr_pend[n][2] -= a2;
        c = '0; c.cmd = C_CREDIT; c.tag = {3'(a0), 3'(a1), 2'(a2)};
        send_q[n].push_back(c);
      end
    end

    // receive side
    always @(posedge clk) if (node_rst_n && rv) begin
      pkt_t p;
      p = rp;
      chk(!ovf, "node receive overflow");
      case (vc_of(p.cmd))
        VC_REQ: cr_pend[n][0]++;
        VC_RPL: cr_pend[n][1]++;
        default: if (p.cmd[0]) cr_pend[n][2]++;
      endcase
      case (p.cmd)
        C_FWD_ACK: begin
          chk(p.src == PORT_W'(n) && txns.exists(key(n, int'(p.tag))), "ack for own transaction");
          if (txns.exists(key(n, int'(p.tag)))) txns[key(n, int'(p.tag))].ack = 1;
        end
        C_RTS, C_RTO, C_WB: begin
          int r, t, k, a;
          snp_e s;
          pkt_t q;
          r = int'(p.src); t = int'(p.tag); a = int'(p.addr);
          n_fwd++;
          chk(r != n, "forwarded request not sent back to its requester");
          k = key(r, t) * 4 + n;
          chk(exp_rsp.exists(k), "forwarded request was serialized");
          s = exp_rsp.exists(k) ? exp_rsp[k] : SNP_MISS;
          // ordering rule: own earlier-serialized requests to this address are acked
          foreach (txns[kk]) begin
            int tg;
            tg = kk % 256;
            if (kk / 256 == n && !txns[kk].pio && txns[kk].addr == a && serial.exists(key(n, tg)) &&
                serial[key(n, tg)] < serial[key(r, t)])
              chk(txns[kk].ack, "ack before later forwarded request (TSO rule)");
          end
          q = '0; q.cmd = C_SNP_RSP; q.src = p.src; q.dst = PORT_W'(n); q.tag = p.tag; q.snp = s;
          begin dly_q[n].push_back(q); dly_t[n].push_back(cyc + SNOOP_DLY); end
          if ((s == SNP_HIT_M || s == SNP_HIT_O) && !force_illegal)
            for (int ch = 0; ch < 4; ch++) begin
              q = '0; q.cmd = C_DATA; q.dst = p.src; q.tag = p.tag; q.chunk = 2'(ch);
              q.data = line_data(p.addr, ch);
              begin dly_q[n].push_back(q); dly_t[n].push_back(cyc + SNOOP_DLY); end
            end
        end
        C_CONS_RSP: begin
          int t;
          t = int'(p.tag);
          chk(txns.exists(key(n, t)) && !tget(key(n, t)).cons, "consolidated response for open transaction");
          if (txns.exists(key(n, t))) begin
            chk(p.snp == exp_cons[key(n, t)],
                $sformatf("node %0d tag %0d consolidated %0d expected %0d", n, t, p.snp, exp_cons[key(n, t)]));
            txns[key(n, t)].cons = 1;
          end
        end
        C_DATA: begin
          int t;
          t = int'(p.tag);
          chk(txns.exists(key(n, t)) && exp_data[key(n, t)], "data for a transaction that expects it");
          if (txns.exists(key(n, t))) begin
            chk(p.data == line_data(ADDR_W'(txns[key(n, t)].addr), int'(p.chunk)), "cache-to-cache data");
            txns[key(n, t)].data++;
          end
        end
        C_PIORD, C_PIOWR: begin
          pkt_t q;
          q = '0; q.cmd = C_NC_RSP; q.src = PORT_W'(n); q.dst = p.src; q.tag = p.tag;
          send_q[n].push_back(q);
        end
        C_INTR: n_intr++;
        C_WDATA: n_wdata++;
        C_NC_RSP: begin
          int t;
          t = int'(p.tag);
          chk(txns.exists(key(n, t)) && tget(key(n, t)).pio,
              $sformatf("PIO completion for open PIO: node %0d tag %0d from %0d exists %0d", n, t, p.src, txns.exists(key(n, t))));
          if (txns.exists(key(n, t))) begin txns[key(n, t)].cons = 1; txns[key(n, t)].ack = 1; end
        end
        default: chk(0, $sformatf("unexpected packet %0h at node %0d", p.cmd, n));
      endcase
    end

    // retire finished transactions
    always @(negedge clk) if (node_rst_n) begin
      int fin [$];
      fin.delete();
      foreach (txns[kk]) begin
        int t;
        t = kk % 256;
        if (kk / 256 == n && txns[kk].cons && txns[kk].ack &&
            (txns[kk].pio || txns[kk].data == (exp_data[key(n, t)] ? 4 : 0)))
          fin.push_back(t);
      end
      foreach (fin[i]) begin
        txns.delete(key(n, fin[i]));
        n_open[n]--;
        done_cnt[n]++;
      end
    end

    // traffic generator
    always @(negedge clk) if (node_rst_n && !force_illegal) begin
      int ncoh;
      ncoh = 0;
      foreach (txns[kk]) if (kk / 256 == n && !txns[kk].pio) ncoh++;
      if (issued[n] < NREQ && ncoh < MAXOUT && $urandom_range(0, 3) == 0) begin
        int t, x;
        pkt_t q;
        do t = $urandom_range(0, 127); while (txns.exists(key(n, t)));
        q = '0;
        x = $urandom_range(0, 19);
        q.cmd = (x < 9) ? C_RTS : (x < 18) ? C_RTO : C_WB;
        q.src = PORT_W'(n); q.tag = TAG_W'(t);
        q.addr = ADDR_W'(34'h2_0000_0040 + 34'($urandom_range(0, NADDR - 1)) * 34'h101);
        begin n_open[n]++; txns[key(n, t)] = '{int'(q.addr), q.cmd, 0, 0, 0, cyc, 0}; serial.delete(key(n, t)); end
        send_q[n].push_back(q);
        issued[n]++;
      end else if (pio_issued[n] < NPIO && $urandom_range(0, 15) == 0) begin
        int t, d, x;
        pkt_t q;
        do t = $urandom_range(128, 191); while (txns.exists(key(n, t)));
        d = (n + $urandom_range(1, 3)) % NPORTS;
        x = $urandom_range(0, 2);
        q = '0; q.src = PORT_W'(n); q.dst = PORT_W'(d); q.tag = TAG_W'(t);
        q.addr = ADDR_W'(34'h1000 + n);
        q.cmd = (x == 0) ? C_PIORD : (x == 1) ? C_PIOWR : C_INTR;
        send_q[n].push_back(q);
        if (q.cmd == C_PIOWR) begin
          pkt_t w;
          w = '0; w.cmd = C_WDATA; w.dst = PORT_W'(d); w.tag = TAG_W'(t); w.data = 128'(t);
          send_q[n].push_back(w);
        end
        if (q.cmd != C_INTR) begin n_open[n]++; txns[key(n, t)] = '{0, q.cmd, 0, 0, 0, cyc, 1}; end
        pio_issued[n]++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int m_pend = 0, m_wake = 0, m_stall = 0, m_crit = 0, m_wrr = 0, m_crc = 0, m_replay = 0;
  int m_retrain = 0, m_nc = 0, m_fatal = 0;
  int m_camfull = 0, max_open = 0, max_cam = 0, max_pend = 0;
  int lat_min = 1000, lat_max = 0;
  int t_in [int];

  always @(posedge clk) if (node_rst_n) begin
    if (dut.u_asu.pend_push) m_pend++;
    if (dut.u_asu.pend_pop)  m_wake++;
    if (dut.g_lpu[3].u_lpu.crc_err) m_crc++;
    if (rx_replay_req[3]) m_replay++;
    if (retrain[3]) m_retrain++;
    m_nc += $countones(dut.u_asu.ncout_valid & dut.u_asu.ncout_ready);
    if (!err_fatal_n) m_fatal++;
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_mon
    always @(posedge clk) if (node_rst_n) begin
      if (dut.g_lpu[p].u_lpu.stall_vc != 0) m_stall++;
      if (p == 0) begin
        int o;
        o = n_open[0] + n_open[1] + n_open[2] + n_open[3];
        if (o > max_open) max_open = o;
        if (int'(dut.u_asu.cam_used) > max_cam) max_cam = int'(dut.u_asu.cam_used);
        if (int'(dut.u_asu.pend_count) > max_pend) max_pend = int'(dut.u_asu.pend_count);
        if (dut.u_asu.cam_used == CAM_IDX_W'(CAM_ENTRIES) && |(~dut.u_asu.cf_empty) &&
            !dut.u_asu.lk_hit) m_camfull++;
      end
      if (dut.g_lpu[p].u_lpu.u_out.fire && dut.g_lpu[p].u_lpu.u_out.g == VC_DAT &&
          |dut.g_lpu[p].u_lpu.u_out.d_crit && |(dut.g_lpu[p].u_lpu.u_out.d_ok & ~dut.g_lpu[p].u_lpu.u_out.d_crit))
        m_crit++;
      if (dut.g_lpu[p].u_lpu.u_out.fire && dut.g_lpu[p].u_lpu.u_out.g != dut.g_lpu[p].u_lpu.u_out.cur_q &&
          dut.g_lpu[p].u_lpu.u_out.avail[dut.g_lpu[p].u_lpu.u_out.cur_q])
        m_wrr++;
      // latency: coherent request entering the input port ...
      if (dut.g_lpu[p].u_lpu.u_in.in_valid && dut.g_lpu[p].u_lpu.u_in.in_ready &&
          is_coherent(dut.g_lpu[p].u_lpu.u_in.in_pkt.cmd))
        t_in[key(p, int'(dut.g_lpu[p].u_lpu.u_in.in_pkt.tag))] = cyc;
      // ... until its forwarded copy leaves an output port
      if (dut.g_lpu[p].u_lpu.u_out.fire && is_coherent(dut.g_lpu[p].u_lpu.u_out.out_pkt.cmd)) begin
        int k, l;
        k = key(int'(dut.g_lpu[p].u_lpu.u_out.out_pkt.src), int'(dut.g_lpu[p].u_lpu.u_out.out_pkt.tag));
        if (t_in.exists(k)) begin
          l = cyc - t_in[k];
          if (l < lat_min) lat_min = l;
          if (l > lat_max) lat_max = l;
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: done %0d %0d %0d %0d", done_cnt[0], done_cnt[1], done_cnt[2], done_cnt[3]);
    foreach (txns[kk]) $display("open node %0d tag %0d cmd %0d ack %0d cons %0d data %0d t0 %0d pio %0d",
      kk / 256, kk % 256, txns[kk].cmd, txns[kk].ack, txns[kk].cons, txns[kk].data, txns[kk].t0, txns[kk].pio);
    for (int n = 0; n < NPORTS; n++) $display("sendq %0d: %0d", n, send_q[n].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [7:0] d;
    int total_exp, idle;
    for (int n = 0; n < NPORTS; n++) begin
      issued[n] = 0; pio_issued[n] = 0; done_cnt[n] = 0;
      for (int v = 0; v < 3; v++) cr_pend[n][v] = 0;
    end
    for (int i = 0; i < 4; i++) n_cons[i] = 0;
    #1 por_n = 0;   // a falling edge resets the power-on domain before the first clock
    repeat (3) @(negedge clk);
    por_n = 1;
    while (!dut.rst_n) @(negedge clk);
    node_rst_n = 1;
    // run until every node has issued and retired its traffic
    idle = 0;
    while (idle < 300) begin
      int open;
      @(negedge clk);
      open = 0;
      for (int n = 0; n < NPORTS; n++) open += n_open[n] + send_q[n].size() + dly_q[n].size() +
                                              ((issued[n] < NREQ || pio_issued[n] < NPIO) ? 1 : 0);
      idle = (open == 0) ? idle + 1 : 0;
    end
    for (int n = 0; n < NPORTS; n++) begin
      chk(issued[n] == NREQ && n_open[n] == 0, $sformatf("node %0d retired all", n));
    end
    chk(dut.u_asu.cam_used == 0 && dut.u_asu.pend_count == 0, "ASU idle at the end");
    chk(lat_min <= 6, $sformatf("request latency input port to output port %0d cycles", lat_min));
    // service processor reads the logs
    lpc_io_read(16'h0801, d, ok); chk(ok && d == 8'h00, $sformatf("no fatal error logged (%0h)", d));
    lpc_io_read(16'h080B, d, ok); chk(ok && d == 8'd4, $sformatf("four CRC errors on port 3 (%0d)", d));
    lpc_io_read(16'h080F, d, ok); chk(ok && d == 8'd1, $sformatf("one retrain on port 3 (%0d)", d));
    chk(err_fatal_n, "fatal pin quiet");
    // illegal snoop combination: two modified hits
    force_illegal = 1;
    begin
      pkt_t q;
      q = '0; q.cmd = C_RTS; q.src = 2'd0; q.tag = 8'd5; q.addr = 34'h3_0000_0999;
      txns[key(0, 5)] = '{int'(q.addr), C_RTS, 0, 0, 0, cyc, 0};
      send_q[0].push_back(q);
    end
    repeat (300) @(negedge clk);
    chk(!err_fatal_n, "illegal snoop responses raise ERR_FATAL_L");
    lpc_io_read(16'h0801, d, ok); chk(ok && d == 8'h04, $sformatf("FATAL_STAT snoop bit (%0h)", d));
    chk(n_cons[SNP_MISS] > 0 && n_cons[SNP_HIT_S] > 0 && n_cons[SNP_HIT_O] > 0 && n_cons[SNP_HIT_M] > 0,
        "all consolidated states seen");
    chk(m_pend > 0,    "pending behind a busy address happened");
    chk(m_wake > 0,    "wakeup of a pended transaction happened");
    chk(m_stall > 0,   "credit stall happened");
    chk(m_crit > 0,    "critical chunk overtook non-critical data");
    chk(m_wrr > 0,     "weighted round robin moved on while a channel still waited");
    chk(m_crc == 4,    "CRC errors detected");
    chk(m_replay >= 4, "replays requested");
    chk(m_retrain == 1, "retrain after the error burst");
    chk(m_nc > 0 && n_intr > 0 && n_wdata > 0, "non-coherent traffic routed");
    chk(m_fatal > 0,   "fatal error reported");
    chk(max_cam == CAM_ENTRIES, $sformatf("CAM completely full at least once (peak %0d)", max_cam));
    chk(m_camfull > 0, "a new request stalled on a full CAM");
    $display("peak outstanding %0d, peak active lines %0d, peak pended %0d, full-CAM stall cycles %0d",
             max_open, max_cam, max_pend, m_camfull);
    $display("forwarded=%0d pend=%0d wake=%0d stall=%0d crit=%0d wrr=%0d crc=%0d replay=%0d retrain=%0d nc=%0d",
             n_fwd, m_pend, m_wake, m_stall, m_crit, m_wrr, m_crc, m_replay, m_retrain, m_nc);
    $display("consolidated miss/S/O/M = %0d/%0d/%0d/%0d, latency min %0d max %0d cycles, %0d cycles",
             n_cons[0], n_cons[1], n_cons[2], n_cons[3], lat_min, lat_max, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
