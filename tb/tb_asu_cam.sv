// tb_asu_cam: fills the 96-entry address CAM, checks hits, misses, the
// lowest-free allocation order, full, free and the read-back port against a
// reference list of addresses kept in the testbench.
module tb_asu_cam;
  import zmb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0]    lk_addr = '0;
  logic                 lk_hit, full, alloc = 0, free = 0, rd_perr;
  logic [CAM_IDX_W-1:0] lk_idx, alloc_idx, free_idx = '0, rd_idx = '0;
  logic [ADDR_W-1:0]    rd_addr;
  logic [CAM_IDX_W:0]   used;

  asu_cam dut (.*);

  logic [ADDR_W-1:0] ref_a [CAM_ENTRIES];

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < CAM_ENTRIES; i++) begin
      ref_a[i] = {$urandom(), 2'(i)} ^ ADDR_W'(i * 7919);
      @(negedge clk);
      lk_addr = ref_a[i];
      #1;
      chk(!lk_hit, $sformatf("miss before alloc %0d", i));
      chk(alloc_idx == CAM_IDX_W'(i), $sformatf("alloc order %0d got %0d", i, alloc_idx));
      alloc = 1;
      @(negedge clk);
      alloc = 0;
    end
    #1;
    chk(full, "full after 96 allocations");
    chk(used == (CAM_IDX_W+1)'(CAM_ENTRIES), "used count 96");
    for (int i = 0; i < CAM_ENTRIES; i += 5) begin
      lk_addr = ref_a[i];
      rd_idx = CAM_IDX_W'(i);
      #1;
      chk(lk_hit && lk_idx == CAM_IDX_W'(i), $sformatf("hit %0d: %0d %0d %h %h", i, lk_hit, lk_idx, rd_addr, ref_a[i]));
      chk(rd_addr == ref_a[i] && !rd_perr, $sformatf("read back %0d", i));
    end
    lk_addr = ~ref_a[3];
    #1;
    chk(!lk_hit, "miss on unknown address");
    // free entry 40, then it is the next allocated
    @(negedge clk);
    free = 1; free_idx = 7'd40;
    @(negedge clk);
    free = 0;
    lk_addr = ref_a[40];
    #1;
    chk(!lk_hit, "freed entry no longer hits");
    chk(!full && alloc_idx == 7'd40, "freed entry is the free one");
    lk_addr = 34'h1234;
    alloc = 1;
    @(negedge clk);
    alloc = 0;
    #1;
    chk(lk_hit && lk_idx == 7'd40, "new address in entry 40");
    chk(full, "full again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
