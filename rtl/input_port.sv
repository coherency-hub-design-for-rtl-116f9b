// input_port: ingress side of one link port. Each packet decoded by the link
// framing unit is registered once and then steered by its command:
//   coherent requests (RTS, RTO, WB)        -> the ASU's coherent FIFO
//   non-coherent requests (PIO, interrupt)  -> the ASU's non-coherent FIFO
//   snoop responses and other replies       -> cross connect
//   data chunks                             -> data FIFO for this source in
//                                              the destination's output port
//   credit returns                          -> this port's output port
// A credit packet carries {req[2:0], rpl[2:0], dat[1:0]} in its tag byte.
// Commands a node must not send (acks, consolidated responses, padding) are
// dropped and flagged on proto_err. The one-stage register, the credit
// encoding and the error rule are this design's choices.
module input_port
  import zmb_pkg::*;
#(
  parameter logic [PORT_W-1:0] PORT = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pkt_t              in_pkt,
  output logic              in_ready,
  output logic              coh_valid,
  output pkt_t              coh_pkt,
  input  logic              coh_ready,
  output logic              nc_valid,
  output pkt_t              nc_pkt,
  input  logic              nc_ready,
  output logic              rpl_valid,
  output pkt_t              rpl_pkt,
  input  logic              rpl_ready,
  output logic [NPORTS-1:0] dat_valid,
  output pkt_t              dat_pkt,
  input  logic [NPORTS-1:0] dat_ready,
  output logic              cr_valid,
  output logic [2:0]        cr_req,
  output logic [2:0]        cr_rpl,
  output logic [1:0]        cr_dat,
  output logic              proto_err
);
  logic v_q;
  pkt_t p_q;
  logic is_coh, is_nc, is_snp, is_rpl, is_dat, is_cr, is_bad, sel_ready;

  always_comb begin
    is_coh = is_coherent(p_q.cmd);
    is_nc  = is_noncoherent(p_q.cmd);
    is_snp = (p_q.cmd == C_SNP_RSP);
    is_rpl = (p_q.cmd == C_NC_RSP);
    is_dat = (vc_of(p_q.cmd) == VC_DAT);
    is_cr  = (p_q.cmd == C_CREDIT);
    is_bad = !(is_coh || is_nc || is_snp || is_rpl || is_dat || is_cr);

    coh_valid = v_q && is_coh;  coh_pkt = p_q;
    nc_valid  = v_q && is_nc;   nc_pkt  = p_q;
    rpl_valid = v_q && (is_snp || is_rpl);
    rpl_pkt   = p_q;
    dat_pkt   = p_q;
    dat_pkt.src = PORT;
    dat_valid = '0;
    if (v_q && is_dat) dat_valid[p_q.dst] = 1'b1;
    cr_valid  = v_q && is_cr;
    {cr_req, cr_rpl, cr_dat} = p_q.tag;
  end

  always_comb begin
    sel_ready = (is_coh && coh_ready) || (is_nc && nc_ready) ||
                ((is_snp || is_rpl) && rpl_ready) || (is_dat && dat_ready[p_q.dst]) ||
                is_cr || is_bad;
  end

  assign in_ready = !v_q || sel_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      proto_err <= 1'b0;
    end else begin
      if (in_ready) v_q <= in_valid;
      proto_err <= v_q && is_bad;
    end
  end

  always_ff @(posedge clk) if (in_ready && in_valid) p_q <= in_pkt;
endmodule
