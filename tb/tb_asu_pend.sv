// tb_asu_pend: builds several interleaved linked lists of pended transactions
// and pops them, checking that each list returns its entries in arrival order
// with the right source, tag and command, and that lists stay independent.
module tb_asu_pend;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 push = 0, pop = 0, pop_nonempty, pop_perr;
  logic [CAM_IDX_W-1:0] push_list = '0, pop_list = '0;
  logic [PORT_W-1:0]    push_src = '0, pop_src;
  logic [TAG_W-1:0]     push_tag = '0, pop_tag;
  cmd_e                 push_cmd = C_RTS, pop_cmd;
  logic [PEND_IDX_W:0]  count;

  asu_pend dut (.*);

  typedef struct { int src; int tag; int cmd; } ent_t;
  ent_t q [4][$];
  int lists [4] = '{5, 17, 95, 0};
  int used [int];

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      pop_list = CAM_IDX_W'(lists[k]);
      #1 chk(!pop_nonempty, "list empty after reset");
    end
    n = 0;
    for (int i = 0; i < 60; i++) begin
      ent_t e;
      int l, key;
      l = $urandom_range(0, 3);
      do begin
        e.src = $urandom_range(0, 3);
        e.tag = $urandom_range(0, TAGS_PER_PORT - 1);
        key = e.src * 1000 + e.tag;
      end while (used.exists(key));
      used[key] = 1;
      e.cmd = $urandom_range(1, 3);
      @(negedge clk);
      push = 1; push_list = CAM_IDX_W'(lists[l]);
      push_src = PORT_W'(e.src); push_tag = TAG_W'(e.tag); push_cmd = cmd_e'(e.cmd);
      q[l].push_back(e);
      n++;
      // pop from another list now and then, in the same cycle
      if (i % 3 == 2) begin
        int pl;
        pl = (l + 1) % 4;
        if (q[pl].size() > 0) begin
          ent_t x;
          pop = 1; pop_list = CAM_IDX_W'(lists[pl]);
          #1;
          x = q[pl].pop_front();
          chk(pop_nonempty && pop_src == PORT_W'(x.src) && pop_tag == TAG_W'(x.tag) &&
              pop_cmd == cmd_e'(x.cmd) && !pop_perr,
              $sformatf("concurrent pop list %0d", lists[pl]));
          n--;
        end
      end
      @(negedge clk);
      push = 0; pop = 0;
    end
    #1 chk(count == (PEND_IDX_W+1)'(n), $sformatf("count %0d vs %0d", count, n));
    for (int l = 0; l < 4; l++) begin
      while (q[l].size() > 0) begin
        ent_t x;
        x = q[l].pop_front();
        pop = 1; pop_list = CAM_IDX_W'(lists[l]);
        #1;
        chk(pop_nonempty && pop_src == PORT_W'(x.src) && pop_tag == TAG_W'(x.tag) &&
            pop_cmd == cmd_e'(x.cmd), $sformatf("drain list %0d", lists[l]));
        @(negedge clk);
        pop = 0;
      end
      #1 chk(!pop_nonempty, "list empty after drain");
    end
    chk(count == 0, "count zero at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
