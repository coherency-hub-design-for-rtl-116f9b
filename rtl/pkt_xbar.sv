// pkt_xbar: N x N packet crossbar with a round-robin arbiter per output.
// Input i offers in_pkt[i] for output in_dest[i]; each output grants one of
// the inputs that target it, so up to N packets cross per cycle. Outputs are
// combinational (valid/ready); an input is consumed when its output takes it.
module pkt_xbar
  import zmb_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  input  pkt_t                 in_pkt   [N],
  input  logic [PORT_W-1:0]    in_dest  [N],
  output logic [N-1:0]         in_ready,
  output logic [N-1:0]         out_valid,
  output pkt_t                 out_pkt  [N],
  output logic [PORT_W-1:0]    out_from [N],
  input  logic [N-1:0]         out_ready
);
  logic [N-1:0] req [N];
  logic [N-1:0] gnt [N];
  logic [$clog2(N)-1:0] gidx [N];

  for (genvar o = 0; o < N; o++) begin : g_out
    always_comb
      for (int i = 0; i < N; i++)
        req[o][i] = in_valid[i] && (in_dest[i] == PORT_W'(o));
    rr_arb #(.N(N)) u_arb (
      .clk, .rst_n, .req(req[o]), .adv(out_ready[o]), .gnt(gnt[o]), .gnt_idx(gidx[o])
    );
    assign out_valid[o] = |req[o];
    assign out_pkt[o]   = in_pkt[gidx[o]];
    assign out_from[o]  = PORT_W'(gidx[o]);
  end

  always_comb
    for (int i = 0; i < N; i++) begin
      in_ready[i] = 1'b0;
      for (int o = 0; o < N; o++)
        if (gnt[o][i] && out_ready[o]) in_ready[i] = 1'b1;
    end
endmodule
