// tb_tsb: allocates transactions in the scoreboard of port 1, returns three
// snoop responses for each in a shuffled order with random hit states, and
// checks the consolidated response (M over O over S over miss), the
// completion's CAM entry, the illegal-combination error and the error for a
// response to an unknown tag.
module tb_tsb;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 alloc = 0, snp_valid = 0, snp_ready, rsp_valid, rsp_ready = 1;
  logic [TAG_W-1:0]     alloc_tag = '0;
  logic [CAM_IDX_W-1:0] alloc_cam_idx = '0, cpl_idx;
  pkt_t                 snp_pkt = '0, rsp_pkt;
  logic                 cpl_valid, cpl_ready = 1, proto_err;
  logic [TAG_W:0]       active;

  tsb #(.PORT(2'd1)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int n_err = 0, n_legal = 0, n_illegal = 0;
  always @(posedge clk) if (rst_n && proto_err) n_err++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int t, ci, nm, no, ns, errs_before;
      snp_e r [3];
      snp_e exp;
      logic illegal;
      t  = $urandom_range(0, TAGS_PER_PORT - 1);
      ci = $urandom_range(0, CAM_ENTRIES - 1);
      @(negedge clk);
      alloc = 1; alloc_tag = TAG_W'(t); alloc_cam_idx = CAM_IDX_W'(ci);
      @(negedge clk);
      alloc = 0;
      chk(active == 1, "one active transaction");
      nm = 0; no = 0; ns = 0;
      for (int k = 0; k < 3; k++) begin
        int x;
        x = $urandom_range(0, 9);
        r[k] = (x < 5) ? SNP_MISS : (x < 7) ? SNP_HIT_S : (x < 8) ? SNP_HIT_O : SNP_HIT_M;
        nm += (r[k] == SNP_HIT_M); no += (r[k] == SNP_HIT_O); ns += (r[k] == SNP_HIT_S);
      end
      exp = (nm > 0) ? SNP_HIT_M : (no > 0) ? SNP_HIT_O : (ns > 0) ? SNP_HIT_S : SNP_MISS;
      illegal = (nm > 1) || (no > 1) || (nm == 1 && (no + ns) > 0);
      if (illegal) n_illegal++; else n_legal++;
      errs_before = n_err;
      for (int k = 0; k < 3; k++) begin
        snp_valid = 1;
        snp_pkt = '0; snp_pkt.cmd = C_SNP_RSP; snp_pkt.src = 2'd1;
        snp_pkt.tag = TAG_W'(t); snp_pkt.snp = r[k];
        @(negedge clk);
        snp_valid = 0;
        if (k < 2) chk(!rsp_valid && !cpl_valid, "nothing before the last response");
      end
      chk(rsp_valid && cpl_valid, "response and completion after the third response");
      chk(rsp_pkt.cmd == C_CONS_RSP && rsp_pkt.dst == 2'd1 && rsp_pkt.tag == TAG_W'(t),
          "consolidated response header");
      chk(rsp_pkt.snp == exp, $sformatf("consolidated state %0d expected %0d", rsp_pkt.snp, exp));
      chk(cpl_idx == CAM_IDX_W'(ci), "completion names the CAM entry");
      @(negedge clk);
      chk(!rsp_valid && !cpl_valid, "queues drained");
      chk((n_err != errs_before) == illegal, $sformatf("illegal combination flagged (%0d %0d %0d)", nm, no, ns));
      chk(active == 0, "no active transaction");
    end
    // response for a tag that was never allocated
    begin
      int e0;
      e0 = n_err;
      snp_valid = 1; snp_pkt.tag = 8'd7;
      @(negedge clk);
      snp_valid = 0;
      @(negedge clk);
      chk(n_err == e0 + 1 && !rsp_valid, "unknown tag flagged");
    end
    chk(n_legal > 0 && n_illegal > 0, "both legal and illegal combinations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
