// tb_gpd: checks the general purpose module through its LPC port:
// reset sequencing (core reset released RST_CYCLES after power-on, pulled by
// a warm reset), the ID and scratch registers, fatal error logging with
// FATAL_STAT / FIRST_ERR / FATAL_PORT, ERR_FATAL_L and SP_INTR_L, write-one-
// to-clear, the fatal-enable mask, per-port CRC error counters, and that a
// warm reset keeps the error log while a power-on reset clears it.
module tb_gpd;
  import zmb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic por_n = 0, wmr_n = 1, core_rst_n;
  logic lframe_n = 1, lad_oe, err_fatal_n, sp_intr_n;
  logic [3:0] lad_in = 4'hF, lad_out;
  logic cam_perr = 0, pend_perr = 0;
  logic [NPORTS-1:0] snoop_err = '0, proto_err = '0, overflow = '0, replay_err = '0;
  logic [NPORTS-1:0] crc_err = '0, retrain = '0;
  logic [CAM_IDX_W:0]  cam_used = 8'd17;
  logic [PEND_IDX_W:0] pend_count = 11'd300;

  gpd #(.RST_CYCLES(16)) dut (.*);

  `include "lpc_host.svh"

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    logic ok;
    lpc_io_read({8'h08, a}, d, ok);
    chk(ok, $sformatf("read %0h answered", a));
  endtask
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    logic ok;
    lpc_io_write({8'h08, a}, d, ok);
    chk(ok, $sformatf("write %0h answered", a));
  endtask
  task automatic pulse(ref logic [NPORTS-1:0] v, input int p);
    @(negedge clk); v[p] = 1; @(negedge clk); v[p] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int n;
    repeat (3) @(negedge clk);
    por_n = 1;
    n = 0;
    while (!core_rst_n && n < 100) begin @(negedge clk); n++; end
    chk(n >= 16 && n <= 20, $sformatf("core reset released after %0d cycles", n));
    rd(8'h00, d); chk(d == 8'hA5, "ID register");
    wr(8'h11, 8'h3C); rd(8'h11, d); chk(d == 8'h3C, "scratch register");
    rd(8'h12, d); chk(d == 8'd17, "CAM usage");
    rd(8'h13, d); chk(d == 8'(300), "pended count low byte");
    rd(8'h14, d); chk(d == 8'd1, "pended count high byte");
    chk(err_fatal_n && sp_intr_n, "no error pins at start");
    // correctable: CRC errors on port 2
    repeat (3) pulse(crc_err, 2);
    repeat (3) @(negedge clk);
    chk(err_fatal_n && !sp_intr_n, "CRC errors interrupt the SP but are not fatal");
    rd(8'h0A, d); chk(d == 8'd3, "port 2 CRC error count");
    rd(8'h04, d); chk(d[0], "CE_STAT CRC bit");
    wr(8'h04, 8'h01); wr(8'h0A, 8'h00);
    rd(8'h0A, d); chk(d == 8'd0, "CRC count cleared");
    repeat (3) @(negedge clk);
    chk(sp_intr_n, "interrupt gone after clearing");
    // fatal: illegal snoop on port 3, then a protocol error on port 0
    pulse(snoop_err, 3);
    pulse(proto_err, 0);
    repeat (3) @(negedge clk);
    chk(!err_fatal_n && !sp_intr_n, "fatal pin and interrupt");
    rd(8'h01, d); chk(d == 8'b0000_1100, "FATAL_STAT snoop and protocol bits");
    rd(8'h03, d); chk(d == 8'h82, "FIRST_ERR is the snoop error");
    rd(8'h02, d); chk(d == 8'b1001, "FATAL_PORT ports 0 and 3");
    // warm reset keeps the log
    @(negedge clk); wmr_n = 0;
    repeat (4) @(negedge clk);
    chk(!core_rst_n, "warm reset resets the core");
    wmr_n = 1;
    n = 0;
    while (!core_rst_n && n < 100) begin @(negedge clk); n++; end
    chk(core_rst_n, "core out of warm reset");
    rd(8'h01, d); chk(d == 8'b0000_1100, "log kept across warm reset");
    // masking
    wr(8'h10, 8'h00);
    repeat (3) @(negedge clk);
    chk(err_fatal_n, "fatal pin masked");
    wr(8'h10, 8'h1F);
    wr(8'h01, 8'hFF); wr(8'h02, 8'hFF); wr(8'h03, 8'h00);
    repeat (3) @(negedge clk);
    chk(err_fatal_n && sp_intr_n, "cleared");
    // parity error
    @(negedge clk); cam_perr = 1; @(negedge clk); cam_perr = 0;
    repeat (3) @(negedge clk);
    rd(8'h01, d); chk(d == 8'h01, "CAM parity error logged");
    rd(8'h03, d); chk(d == 8'h80, "FIRST_ERR CAM parity");
    // power-on reset clears the log
    @(negedge clk); por_n = 0; repeat (3) @(negedge clk); por_n = 1;
    n = 0;
    while (!core_rst_n && n < 100) begin @(negedge clk); n++; end
    rd(8'h01, d); chk(d == 8'h00, "log cleared by power-on reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
