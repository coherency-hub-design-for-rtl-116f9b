// tb_lfu: a transmit and a receive link framing unit joined by a model of
// the serial channel that corrupts chosen frames. Random request, reply and
// data packets are sent; the receiver must deliver all of them in order and
// unchanged (with 3, 7 and 18-byte packets many of them straddle two frames).
// Checks that a corrupted
// frame is replayed (crc_err, replay_req), that a burst of errors raises
// retrain, and the frame rate of one frame per two cycles.
module tb_lfu;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               in_valid = 0, in_ready;
  pkt_t               in_pkt = '0;
  logic               t_fv, r_fv;
  logic [FRAME_W-1:0] t_fd, r_fd;
  logic [CRC_W-1:0]   t_fc, r_fc;
  logic [SEQ_W-1:0]   t_fs, r_fs;
  logic               rq, replaying, replay_err;
  logic [SEQ_W-1:0]   rq_seq;
  logic               out_valid, out_ready = 1;
  pkt_t               out_pkt;
  logic               crc_err, overflow, retrain;

  lfu_tx u_tx (.clk, .rst_n, .in_valid, .in_pkt, .in_ready, .frame_valid(t_fv),
               .frame_data(t_fd), .frame_crc(t_fc), .frame_seq(t_fs),
               .replay_req(rq), .replay_seq(rq_seq), .replaying, .replay_err);
  lfu_rx #(.ERR_WINDOW(64), .ERR_THRESH(3)) u_rx (
    .clk, .rst_n, .frame_valid(r_fv), .frame_data(r_fd), .frame_crc(r_fc),
    .frame_seq(r_fs), .out_valid, .out_pkt, .out_ready, .replay_req(rq),
    .replay_seq(rq_seq), .crc_err, .overflow, .retrain);

  // channel: corrupt a bit of selected frames
  int nframes = 0, corrupt_at [$];
  always_comb begin
    r_fv = t_fv; r_fd = t_fd; r_fc = t_fc; r_fs = t_fs;
    foreach (corrupt_at[i]) if (corrupt_at[i] == nframes) r_fd[nframes % FRAME_W] = ~t_fd[nframes % FRAME_W];
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  pkt_t exp_q [$];
  int got = 0, n_crc = 0, n_replay = 0, n_retrain = 0, last_frame = -10, min_gap = 99;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (t_fv) begin
        nframes++;
        if (cyc - last_frame < min_gap) min_gap = cyc - last_frame;
        last_frame = cyc;
      end
      if (crc_err) n_crc++;
      if (rq) n_replay++;
      if (retrain) n_retrain++;
      chk(!replay_err && !overflow, "no replay error or overflow");
      if (out_valid && out_ready) begin
        pkt_t e;
        e = exp_q.pop_front();
        chk(out_pkt == e, $sformatf("packet %0d intact and in order", got));
        got++;
      end
    end
  end

  function automatic pkt_t rnd_pkt(int i);
    pkt_t p;
    int k;
    p = '0;
    k = $urandom_range(0, 2);
    p.tag = TAG_W'(i);
    case (k)
      0: begin p.cmd = C_RTO; p.src = 2'($urandom); p.dst = 2'($urandom);
               p.addr = {$urandom(), 2'($urandom)}; end
      1: begin p.cmd = C_SNP_RSP; p.src = 2'($urandom); p.dst = 2'($urandom);
               p.snp = snp_e'($urandom_range(0, 3)); end
      default: begin p.cmd = C_WDATA; p.dst = 2'($urandom); p.chunk = 2'($urandom);
               p.data = {$urandom(), $urandom(), $urandom(), $urandom()}; end
    endcase
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    corrupt_at = '{5, 20, 24, 26};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      pkt_t p;
      p = rnd_pkt(i);
      @(negedge clk);
      in_valid = 1; in_pkt = p;
      exp_q.push_back(p);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk(got == 300, $sformatf("all 300 packets delivered (%0d)", got));
    chk(n_crc == 4, $sformatf("four CRC errors seen (%0d)", n_crc));
    chk(n_replay >= 4, "replay requested for each error");
    chk(n_retrain == 1, $sformatf("error burst caused one retrain (%0d)", n_retrain));
    chk(min_gap == 2, $sformatf("frames at most every two cycles (gap %0d)", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
