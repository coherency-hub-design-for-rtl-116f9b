// tb_output_port: checks the egress arbitration of one output port:
//  * weighted round robin: with requests and data both waiting and weights
//    2/2/4, the output runs two requests then four data chunks, repeatedly;
//  * critical-first data: a critical chunk from one source overtakes
//    non-critical chunks waiting from another;
//  * credits: requests stop when the request credits run out and resume
//    after a credit packet; write data needs data credits, read data does not.
module tb_output_port;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              coh_valid = 0, coh_ready, nc_valid = 0, nc_ready;
  logic              tsb_valid = 0, tsb_ready, rpl_valid = 0, rpl_ready;
  pkt_t              coh_pkt = '0, nc_pkt = '0, tsb_pkt = '0, rpl_pkt = '0, out_pkt;
  logic [NPORTS-1:0] dat_valid = '0, dat_ready;
  pkt_t              dat_pkt [NPORTS];
  logic              cr_valid = 0;
  logic [2:0]        cr_req = '0, cr_rpl = '0;
  logic [1:0]        cr_dat = '0;
  logic              out_valid, out_ready = 0;
  logic [2:0]        stall_vc;

  output_port #(.INIT_REQ_CR(12), .INIT_RPL_CR(4), .INIT_DAT_CR(1)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic put_coh(int tag);
    @(negedge clk);
    coh_valid = 1; coh_pkt = '0; coh_pkt.cmd = C_RTS; coh_pkt.tag = TAG_W'(tag);
    @(negedge clk);
    coh_valid = 0;
  endtask

  task automatic put_dat(int src, cmd_e c, int chunk, int tag);
    @(negedge clk);
    dat_valid[src] = 1; dat_pkt[src] = '0; dat_pkt[src].cmd = c;
    dat_pkt[src].chunk = 2'(chunk); dat_pkt[src].tag = TAG_W'(tag);
    @(negedge clk);
    dat_valid[src] = 0;
  endtask

  // take one packet from the output (waits up to 'lim' cycles)
  task automatic take(output pkt_t p, output logic ok, input int lim = 20);
    ok = 0;
    out_ready = 1;
    for (int i = 0; i < lim && !ok; i++) begin
      @(posedge clk);
      if (out_valid) begin ok = 1; p = out_pkt; end
    end
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p;
    logic ok;
    string seq;
    for (int i = 0; i < NPORTS; i++) dat_pkt[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- weighted round robin: 6 requests, 8 read-data chunks ----
    for (int i = 0; i < 6; i++) put_coh(i);
    for (int i = 0; i < 8; i++) put_dat(i % 2, C_DATA, 2 + (i / 2) % 2, 100 + i);
    seq = "";
    for (int i = 0; i < 14; i++) begin
      take(p, ok);
      seq = {seq, (vc_of(p.cmd) == VC_REQ) ? "R" : "D"};
    end
    chk(seq == "RRDDDDRRDDDDRR" || seq == "DDDDRRDDDDRRRR", $sformatf("weighted order %s", seq));
    // ---- critical first ----
    put_dat(0, C_DATA, 2, 1);
    put_dat(0, C_DATA, 3, 2);
    put_dat(3, C_DATA, 0, 3);
    put_dat(3, C_DATA, 1, 4);
    take(p, ok); chk(ok && p.tag == 8'd3, "critical chunk 0 first");
    take(p, ok); chk(ok && p.tag == 8'd4, "critical chunk 1 second");
    take(p, ok); chk(ok && p.tag == 8'd1, "non-critical after");
    take(p, ok); chk(ok && p.tag == 8'd2, "non-critical last");
    // ---- request credits: 12 initial, 6 used above ----
    for (int i = 0; i < 8; i++) put_coh(50 + i);
    for (int i = 0; i < 6; i++) begin
      take(p, ok); chk(ok && p.tag == TAG_W'(50 + i), "request within credit");
    end
    take(p, ok, 10);
    chk(!ok, "no request without credit");
    chk(stall_vc[VC_REQ], "request channel reported stalled");
    @(negedge clk);
    cr_valid = 1; cr_req = 3'd2;
    @(negedge clk);
    cr_valid = 0; cr_req = '0;
    take(p, ok); chk(ok && p.tag == 8'd56, "request after credit return");
    take(p, ok); chk(ok && p.tag == 8'd57, "second request after credit return");
    // ---- data credits: one write chunk allowed, read data free ----
    put_dat(2, C_WDATA, 0, 60);
    put_dat(2, C_WDATA, 1, 61);
    put_dat(1, C_DATA, 2, 62);
    take(p, ok); chk(ok && p.tag == 8'd60, "write data with credit");
    take(p, ok); chk(ok && p.tag == 8'd62, "read data passes the blocked write data");
    take(p, ok, 10); chk(!ok, "write data waits for a credit");
    @(negedge clk);
    cr_valid = 1; cr_dat = 2'd1;
    @(negedge clk);
    cr_valid = 0; cr_dat = '0;
    take(p, ok); chk(ok && p.tag == 8'd61, "write data after data credit");
    // ---- replies from scoreboard and cross connect alternate ----
    @(negedge clk);
    tsb_valid = 1; tsb_pkt = '0; tsb_pkt.cmd = C_CONS_RSP; tsb_pkt.tag = 8'd70;
    rpl_valid = 1; rpl_pkt = '0; rpl_pkt.cmd = C_NC_RSP; rpl_pkt.tag = 8'd71;
    @(negedge clk);
    tsb_valid = 0; rpl_valid = 0;
    take(p, ok); chk(ok && vc_of(p.cmd) == VC_RPL, "reply one");
    take(p, ok); chk(ok && vc_of(p.cmd) == VC_RPL, "reply two");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
