// tb_input_port: offers every kind of packet to the input port of port 2
// and checks where each one comes out: coherent and non-coherent requests to
// the ASU, replies to the cross connect, data to the destination's data FIFO
// (stamped with this port as source), credit counts to the output port, and
// a protocol error for a command a node may not send. Also checks that a
// stalled destination holds the packet.
module tb_input_port;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              in_valid = 0, in_ready;
  pkt_t              in_pkt = '0;
  logic              coh_valid, coh_ready = 1, nc_valid, nc_ready = 1, rpl_valid, rpl_ready = 1;
  pkt_t              coh_pkt, nc_pkt, rpl_pkt, dat_pkt;
  logic [NPORTS-1:0] dat_valid, dat_ready = '1;
  logic              cr_valid;
  logic [2:0]        cr_req, cr_rpl;
  logic [1:0]        cr_dat;
  logic              proto_err;

  input_port #(.PORT(2'd2)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic send(pkt_t p);
    @(negedge clk);
    in_valid = 1; in_pkt = p;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    p = '0; p.cmd = C_RTO; p.src = 2; p.addr = 34'h2_1234_5678; p.tag = 8'd9;
    send(p);
    chk(coh_valid && coh_pkt == p && !nc_valid && !rpl_valid && dat_valid == 0, "coherent to ASU");
    p.cmd = C_INTR; p.dst = 2'd0;
    send(p);
    chk(nc_valid && nc_pkt.cmd == C_INTR && !coh_valid, "non-coherent to ASU");
    p = '0; p.cmd = C_SNP_RSP; p.src = 2'd3; p.snp = SNP_HIT_O;
    send(p);
    chk(rpl_valid && rpl_pkt.cmd == C_SNP_RSP && rpl_pkt.src == 2'd3, "snoop response to cross connect");
    p = '0; p.cmd = C_NC_RSP; p.dst = 2'd1;
    send(p);
    chk(rpl_valid && rpl_pkt.cmd == C_NC_RSP, "reply to cross connect");
    p = '0; p.cmd = C_DATA; p.dst = 2'd1; p.chunk = 2'd3; p.data = 128'hfeed;
    send(p);
    chk(dat_valid == 4'b0010 && dat_pkt.src == 2'd2 && dat_pkt.data == 128'hfeed, "data to destination 1");
    p = '0; p.cmd = C_CREDIT; p.tag = {3'd5, 3'd2, 2'd3};
    send(p);
    chk(cr_valid && cr_req == 3'd5 && cr_rpl == 3'd2 && cr_dat == 2'd3, "credit counts");
    p = '0; p.cmd = C_FWD_ACK;
    send(p);
    @(negedge clk);
    chk(proto_err, "forwarded ack from a node is a protocol error");
    // stall: data for port 3 while its FIFO is full
    dat_ready = 4'b0111;
    p = '0; p.cmd = C_WDATA; p.dst = 2'd3; p.tag = 8'd44;
    @(negedge clk);
    in_valid = 1; in_pkt = p;
    @(negedge clk);
    in_pkt.tag = 8'd45; in_pkt.cmd = C_RTS;
    repeat (3) begin
      @(negedge clk);
      chk(dat_valid == 4'b1000 && dat_pkt.tag == 8'd44 && !in_ready, "held while destination full");
    end
    dat_ready = '1;
    @(negedge clk);
    in_valid = 0;
    chk(coh_valid && coh_pkt.tag == 8'd45, "next packet follows once released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
