// LPC host tasks shared by testbenches: I/O write and I/O read cycles as in
// the LPC standard. Expects clk, lframe_n, lad_in (host -> slave), lad_out
// and lad_oe (slave -> host) in the including scope.
task automatic lpc_io_write(input logic [15:0] a, input logic [7:0] d, output logic ok);
  logic [3:0] seq [$];
  ok = 0;
  @(negedge clk);
  lframe_n = 0; lad_in = 4'b0000;            // START
  @(negedge clk);
  lframe_n = 1; lad_in = 4'b0010;            // I/O write
  seq = '{a[15:12], a[11:8], a[7:4], a[3:0], d[3:0], d[7:4], 4'b1111, 4'b1111};
  foreach (seq[i]) begin
    @(negedge clk);
    lad_in = seq[i];
  end
  for (int i = 0; i < 6; i++) begin
    @(negedge clk);
    if (lad_oe && lad_out == 4'b0000) ok = 1;
  end
  lad_in = 4'b1111;
endtask

task automatic lpc_io_read(input logic [15:0] a, output logic [7:0] d, output logic ok);
  logic [3:0] seq [$];
  int got;
  ok = 0; got = 0; d = '0;
  @(negedge clk);
  lframe_n = 0; lad_in = 4'b0000;
  @(negedge clk);
  lframe_n = 1; lad_in = 4'b0000;            // I/O read
  seq = '{a[15:12], a[11:8], a[7:4], a[3:0], 4'b1111, 4'b1111};
  foreach (seq[i]) begin
    @(negedge clk);
    lad_in = seq[i];
  end
  for (int i = 0; i < 8; i++) begin
    @(negedge clk);
    if (got == 0 && lad_oe && lad_out == 4'b0000) got = 1;
    else if (got == 1 && lad_oe) begin d[3:0] = lad_out; got = 2; end
    else if (got == 2 && lad_oe) begin d[7:4] = lad_out; got = 3; ok = 1; end
  end
  lad_in = 4'b1111;
endtask
