// lfu_rx: receive half of the Link Framing Unit.
//
// Every incoming frame is checked against its 24-bit CRC. A good frame with
// the expected sequence number is appended to a byte queue; packets are then
// taken from the head of the queue one per cycle, their length given by the
// command in the first byte (3, 7 or 18 bytes), so a packet may span two
// frames. A NOP byte at the head means the rest of that frame is padding and
// is skipped up to the next frame boundary. A bad CRC raises crc_err and asks
// the far transmitter to replay from the expected sequence number
// (replay_req); frames with another sequence number are dropped until the
// replay arrives. A good frame that finds the queue full is dropped and
// replayed the same way. When ERR_THRESH CRC errors occur inside one window of
// ERR_WINDOW cycles, retrain pulses to start link retraining.
// CRC checking, replay and retraining on an error burst follow the design
// description; thresholds, queue size and the replay handshake are this
// design's choices. The lane-removal retrain mode belongs to the PHY and is
// not modelled.
module lfu_rx
  import zmb_pkg::*;
#(
  parameter int unsigned BUF_FRAMES = 4,
  parameter int unsigned ERR_WINDOW = 1024,
  parameter int unsigned ERR_THRESH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_valid,
  input  logic [FRAME_W-1:0] frame_data,
  input  logic [CRC_W-1:0]   frame_crc,
  input  logic [SEQ_W-1:0]   frame_seq,
  output logic               out_valid,
  output pkt_t               out_pkt,
  input  logic               out_ready,
  output logic               replay_req,
  output logic [SEQ_W-1:0]   replay_seq,
  output logic               crc_err,
  output logic               overflow,
  output logic               retrain
);
  localparam int BUFB = BUF_FRAMES * FRAME_BYTES;
  localparam int BW   = BUFB * 8;
  localparam int CW   = $clog2(BUFB + 1);

  logic [BW-1:0]    buf_q;
  logic [CW-1:0]    cnt_q;
  logic [4:0]       rem_q;   // bytes from the head to the next frame boundary
  logic [SEQ_W-1:0] exp_q;
  logic [15:0]      win_q;
  logic [7:0]       errs_q;

  cmd_e        hcmd;
  logic [4:0]  hlen, npop;
  logic        skip, good, accept, full;
  logic [BW-1:0] buf_mid, buf_nxt;
  logic [CW-1:0] cnt_mid;
  logic [4:0]    rem_nxt;

  assign hcmd = cmd_e'(buf_q[BW-1 -: 4]);
  assign hlen = 5'(pkt_len(hcmd));
  assign skip = (cnt_q != '0) && (hcmd == C_NOP);
  assign out_valid = (cnt_q != '0) && !skip && (cnt_q >= CW'(hlen));
  assign out_pkt   = pkt_unpack(buf_q[BW-1 -: FRAME_W]);

  assign good   = frame_valid && (crc24(frame_data) == frame_crc);
  assign full   = (cnt_q > CW'(BUFB - FRAME_BYTES));
  assign accept = good && (frame_seq == exp_q) && !full;

  always_comb begin
    npop = '0;
    if (skip)                        npop = rem_q;
    else if (out_valid && out_ready) npop = hlen;
    buf_mid = buf_q << (int'(npop) * 8);
    cnt_mid = cnt_q - CW'(npop);
    if (npop == '0)        rem_nxt = rem_q;
    else if (rem_q > npop) rem_nxt = rem_q - npop;
    else                   rem_nxt = rem_q + 5'(FRAME_BYTES) - npop;
    buf_nxt = buf_mid;
    if (accept)
      buf_nxt = buf_mid | ({frame_data, {(BW-FRAME_W){1'b0}}} >> (int'(cnt_mid) * 8));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; cnt_q <= '0; rem_q <= 5'(FRAME_BYTES); exp_q <= '0;
      win_q <= '0; errs_q <= '0;
      replay_req <= 1'b0; replay_seq <= '0; crc_err <= 1'b0; overflow <= 1'b0;
      retrain <= 1'b0;
    end else begin
      buf_q   <= buf_nxt;
      cnt_q   <= cnt_mid + (accept ? CW'(FRAME_BYTES) : '0);
      rem_q   <= rem_nxt;
      if (accept) exp_q <= exp_q + 1'b1;
      crc_err    <= frame_valid && !good;
      overflow   <= good && (frame_seq == exp_q) && full;
      replay_req <= (frame_valid && !good) || (good && (frame_seq == exp_q) && full);
      replay_seq <= exp_q;
      retrain    <= 1'b0;
      if (win_q == 16'(ERR_WINDOW - 1)) begin
        win_q  <= '0;
        errs_q <= '0;
      end else begin
        win_q <= win_q + 1'b1;
      end
      if (frame_valid && !good) begin
        if (errs_q + 1 >= 8'(ERR_THRESH)) begin
          retrain <= 1'b1;
          errs_q  <= '0;
        end else begin
          errs_q <= errs_q + 1'b1;
        end
      end
    end
  end
endmodule
