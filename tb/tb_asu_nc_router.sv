// tb_asu_nc_router: random non-coherent requests from four sources with
// random destinations and random output stalls; checks that every request
// arrives exactly once, at its destination, in order per source.
module tb_asu_nc_router;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NPORTS-1:0] in_valid = '0, in_ready, out_valid, out_ready = '0;
  pkt_t              in_pkt  [NPORTS];
  pkt_t              out_pkt [NPORTS];

  asu_nc_router dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int sent [NPORTS];
  int last_seq [NPORTS][NPORTS];  // [dst][src]
  int got = 0;
  localparam int PER_SRC = 60;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NPORTS; d++)
      if (out_valid[d] && out_ready[d]) begin
        int s, q;
        s = out_pkt[d].src;
        q = out_pkt[d].tag;
        chk(out_pkt[d].dst == PORT_W'(d), "arrives at its destination");
        chk(q > last_seq[d][s], "in order per source");
        last_seq[d][s] = q;
        got++;
      end
    for (int s = 0; s < NPORTS; s++)
      if (in_valid[s] && in_ready[s]) sent[s]++;
  end

  initial begin
    for (int d = 0; d < NPORTS; d++) for (int s = 0; s < NPORTS; s++) last_seq[d][s] = -1;
    for (int s = 0; s < NPORTS; s++) begin sent[s] = 0; in_pkt[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < NPORTS * PER_SRC) begin
      @(negedge clk);
      out_ready = 4'($urandom);
      for (int s = 0; s < NPORTS; s++)
        if (sent[s] < PER_SRC) begin
          if (!in_valid[s] || in_ready[s] === 1'b0) ;
          in_valid[s] = 1'b1;
          in_pkt[s].cmd = C_PIOWR;
          in_pkt[s].src = PORT_W'(s);
          in_pkt[s].tag = TAG_W'(sent[s]);
          in_pkt[s].dst = PORT_W'((sent[s] * 7 + s * 3) % NPORTS);
        end else in_valid[s] = 1'b0;
    end
    chk(got == NPORTS * PER_SRC, "all delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
