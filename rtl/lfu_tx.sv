// lfu_tx: transmit half of the Link Framing Unit.
//
// Packets from the output port (3, 7 or 18 bytes, by channel) are appended to
// a byte queue and cut into 144-bit frames, so a packet may straddle two
// frames. A frame is sent when 18 bytes are queued, or earlier when no new
// packet arrives, with the unused tail filled with zero bytes (NOP padding).
// Each frame gets a 24-bit CRC and an 8-bit sequence number and is kept in an
// RB_DEPTH-entry replay buffer. replay_req asks for every frame from
// replay_seq onward to be sent again (go-back-N); new frames wait until the
// replay is done. A request older than the replay buffer sets replay_err.
// One frame leaves at most every FRAME_CYCLES clocks: a 14-lane frame of 12
// unit intervals at 4.8 GT/s lasts 2.5 ns, i.e. two 800 MHz cycles.
// Frame size and CRC width follow the design description; the byte order,
// padding rule, sequence sideband and replay protocol are this design's.
module lfu_tx
  import zmb_pkg::*;
#(
  parameter int unsigned RB_DEPTH     = 8,
  parameter int unsigned FRAME_CYCLES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pkt_t               in_pkt,
  output logic               in_ready,
  output logic               frame_valid,
  output logic [FRAME_W-1:0] frame_data,
  output logic [CRC_W-1:0]   frame_crc,
  output logic [SEQ_W-1:0]   frame_seq,
  input  logic               replay_req,
  input  logic [SEQ_W-1:0]   replay_seq,
  output logic               replaying,
  output logic               replay_err
);
  localparam int BUFB = 2 * FRAME_BYTES;
  localparam int BW   = BUFB * 8;
  localparam int RBW  = $clog2(RB_DEPTH);

  logic [BW-1:0]        buf_q;   // byte 0 at the top; bytes past cnt_q are zero
  logic [5:0]           cnt_q;
  logic [SEQ_W-1:0]     seq_q;   // next new sequence number
  logic [SEQ_W-1:0]     rp_q;    // next frame to replay
  logic                 rpl_q;
  logic [FRAME_W-1:0]   rb_q [RB_DEPTH];
  logic [3:0]           slot_q;

  logic             slot_ok, send_new, send_old, take;
  logic [5:0]       len, cnt_mid;
  logic [BW-1:0]    buf_mid, buf_nxt;
  logic [SEQ_W-1:0] rdist;

  assign in_ready = (cnt_q <= 6'(FRAME_BYTES));
  assign take     = in_valid && in_ready;
  assign len      = 6'(pkt_len(in_pkt.cmd));
  assign slot_ok  = (slot_q == '0);
  assign send_old = slot_ok && rpl_q;
  assign send_new = slot_ok && !rpl_q &&
                    (cnt_q >= 6'(FRAME_BYTES) || (cnt_q != '0 && !take));
  assign rdist     = seq_q - replay_seq;

  always_comb begin
    buf_mid = buf_q;
    cnt_mid = cnt_q;
    if (send_new) begin
      buf_mid = buf_q << FRAME_W;
      cnt_mid = (cnt_q > 6'(FRAME_BYTES)) ? cnt_q - 6'(FRAME_BYTES) : '0;
    end
    buf_nxt = buf_mid;
    if (take) buf_nxt = buf_mid | ({pkt_pack(in_pkt), {FRAME_W{1'b0}}} >> (int'(cnt_mid) * 8));
  end

  always_comb begin
    frame_valid = send_new || send_old;
    frame_data  = send_old ? rb_q[rp_q[RBW-1:0]] : buf_q[BW-1 -: FRAME_W];
    frame_seq   = send_old ? rp_q : seq_q;
    frame_crc   = crc24(frame_data);
  end
  assign replaying = rpl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; cnt_q <= '0; seq_q <= '0; rp_q <= '0; rpl_q <= 1'b0;
      slot_q <= '0; replay_err <= 1'b0;
    end else begin
      buf_q <= buf_nxt;
      cnt_q <= cnt_mid + (take ? len : 6'd0);
      if (frame_valid)       slot_q <= 4'(FRAME_CYCLES - 1);
      else if (!slot_ok)     slot_q <= slot_q - 4'd1;
      if (send_new) seq_q <= seq_q + 1'b1;
      if (send_old) begin
        rp_q <= rp_q + 1'b1;
        if (rp_q + 1'b1 == seq_q) rpl_q <= 1'b0;
      end
      replay_err <= 1'b0;
      if (replay_req) begin
        if (rdist != '0 && rdist <= SEQ_W'(RB_DEPTH)) begin
          rpl_q <= 1'b1;
          rp_q  <= replay_seq;
        end else if (rdist != '0) begin
          replay_err <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) if (send_new) rb_q[seq_q[RBW-1:0]] <= buf_q[BW-1 -: FRAME_W];
endmodule
