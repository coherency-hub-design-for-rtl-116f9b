// tb_lpc_slave: runs LPC I/O write and read cycles against the slave, with a
// 256-byte register array in the testbench behind its CSR port. Checks the
// write strobe, address and data, the data returned by reads, SYNC, and that
// cycles outside the address window get no answer.
module tb_lpc_slave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       lframe_n = 1, lad_oe, csr_wr, csr_rd;
  logic [3:0] lad_in = 4'hF, lad_out;
  logic [7:0] csr_addr, csr_wdata, csr_rdata;
  logic [7:0] regs [256];

  lpc_slave #(.BASE(16'h0800)) dut (.*);

  assign csr_rdata = regs[csr_addr];
  always @(posedge clk) if (csr_wr) regs[csr_addr] <= csr_wdata;

  `include "lpc_host.svh"

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
    logic ok;
    logic [7:0] d;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a, v;
      a = 8'($urandom); v = 8'($urandom);
      lpc_io_write({8'h08, a}, v, ok);
      chk(ok, "write acknowledged with SYNC");
      chk(regs[a] == v, $sformatf("register %0h written", a));
      lpc_io_read({8'h08, a}, d, ok);
      chk(ok && d == v, $sformatf("register %0h read back %0h", a, d));
    end
    lpc_io_read(16'h0805, d, ok);
    chk(ok && d == regs[5], "read untouched register");
    begin
      logic [7:0] old;
      old = regs[8'h21];
      lpc_io_write(16'h0921, 8'h5A, ok);
      chk(!ok && regs[8'h21] == old, "write outside the window ignored");
      lpc_io_read(16'h0121, d, ok);
      chk(!ok, "read outside the window ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
