// tb_asu_coh_router: sends coherent requests from each port through the
// broadcast router and checks that every other port gets the forwarded
// request, the requester gets a forwarded-request ack, the requester's
// scoreboard is told the tag and CAM entry, and that a stalled output port
// holds the next broadcast back until it drains.
module tb_asu_coh_router;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 in_valid = 0, in_ready;
  pkt_t                 in_pkt = '0;
  logic [CAM_IDX_W-1:0] in_cam_idx = '0;
  logic [NPORTS-1:0]    out_valid, out_ready = '1, tsb_alloc;
  pkt_t                 out_pkt [NPORTS];
  logic [TAG_W-1:0]     tsb_tag;
  logic [CAM_IDX_W-1:0] tsb_cam_idx;
  cmd_e                 tsb_cmd;

  asu_coh_router dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NPORTS; s++) begin
      pkt_t p;
      p = '0;
      p.cmd = (s % 2) ? C_RTO : C_RTS;
      p.src = PORT_W'(s);
      p.tag = TAG_W'(10 + s);
      p.addr = ADDR_W'(34'h3_0000_1000 + s);
      @(negedge clk);
      in_valid = 1; in_pkt = p; in_cam_idx = CAM_IDX_W'(20 + s);
      #1 chk(in_ready, "ready when idle");
      @(negedge clk);
      in_valid = 0;
      chk(out_valid == 4'hF, "all four outputs loaded");
      chk(tsb_alloc == (4'b1 << s), "scoreboard of the requester allocated");
      chk(tsb_tag == p.tag && tsb_cam_idx == CAM_IDX_W'(20 + s) && tsb_cmd == p.cmd,
          "scoreboard tag, entry and command");
      for (int d = 0; d < NPORTS; d++) begin
        chk(out_pkt[d].dst == PORT_W'(d) && out_pkt[d].src == PORT_W'(s) &&
            out_pkt[d].tag == p.tag && out_pkt[d].addr == p.addr, $sformatf("copy %0d", d));
        chk(out_pkt[d].cmd == ((d == s) ? C_FWD_ACK : p.cmd), $sformatf("command at port %0d", d));
      end
      @(negedge clk);
      chk(out_valid == 4'h0 && tsb_alloc == '0, "drained");
    end
    // back-pressure on port 1
    out_ready = 4'b1101;
    in_valid = 1; in_pkt.src = 2'd0; in_pkt.tag = 8'd99;
    @(negedge clk);
    chk(out_valid == 4'hF, "loaded");
    in_pkt.tag = 8'd100;
    #1 chk(!in_ready, "stall while port 1 holds its copy");
    @(negedge clk);
    chk(out_valid == 4'b0010 && out_pkt[1].tag == 8'd99, "only port 1 still holds the copy");
    out_ready = '1;
    #1 chk(in_ready, "ready once port 1 drains");
    @(negedge clk);
    in_valid = 0;
    chk(out_valid == 4'hF && out_pkt[0].tag == 8'd100, "next broadcast loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
