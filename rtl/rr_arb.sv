// rr_arb: round-robin arbiter. gnt is one-hot among req, starting the search
// one position after the last granted requester; the pointer moves only when
// adv is high (the grant was used).
module rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);
  logic [$clog2(N)-1:0] last;

  always_comb begin
    gnt = '0;
    gnt_idx = '0;
    for (int k = N; k >= 1; k--) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (req[i]) begin
        gnt = '0;
        gnt[i] = 1'b1;
        gnt_idx = i[$clog2(N)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= $clog2(N)'(N - 1);
    else if (adv && |req) last <= gnt_idx;
  end
endmodule
