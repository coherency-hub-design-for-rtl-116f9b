// zmb_pkg: types, constants and helper functions shared by the coherency hub.
//
// The hub connects four processor nodes. Every packet that moves inside the
// hub is carried as a pkt_t; on the serial link it is packed into 3, 7 or 18
// bytes depending on its virtual channel (request, reply, data). The sizes of
// the CAM (96 x 34 bits), the pended-transaction store (768 entries), the
// 144-bit frame with a 24-bit CRC and the 16-byte data chunk follow the
// design description. Field layouts, command codes, the CRC polynomial and the
// tag space of 192 tags per node (768 / 4) are this design's own choices.
package zmb_pkg;

  localparam int NPORTS        = 4;    // nodes per hub
  localparam int PORT_W        = 2;
  localparam int ADDR_W        = 34;   // cacheline address held in a CAM entry
  localparam int TAG_W         = 8;    // requester's transaction tag
  localparam int TAGS_PER_PORT = 192;  // 768 pended entries / 4 ports
  localparam int CAM_ENTRIES   = 96;
  localparam int CAM_IDX_W     = 7;
  localparam int PEND_ENTRIES  = NPORTS * TAGS_PER_PORT;  // 768
  localparam int PEND_IDX_W    = 10;
  localparam int FRAME_W       = 144;  // frame payload bits
  localparam int FRAME_BYTES   = FRAME_W / 8;
  localparam int CRC_W         = 24;
  localparam int SEQ_W         = 8;    // frame sequence number (sideband)
  localparam logic [CRC_W-1:0] CRC_POLY = 24'h864CFB;
  localparam logic [CRC_W-1:0] CRC_INIT = 24'hFFFFFF;

  typedef enum logic [1:0] {VC_REQ = 2'd0, VC_RPL = 2'd1, VC_DAT = 2'd2} vc_e;

  // cmd[3:2] selects the channel: 00/01 request, 10 reply, 11 data.
  // For data, cmd[1] is the payload parity-error flag, cmd[0] marks write
  // data (PIO write / writeback) that needs a flow-control credit.
  typedef enum logic [3:0] {
    C_NOP      = 4'h0,  // link padding, one byte
    C_RTS      = 4'h1,  // coherent read to share
    C_RTO      = 4'h2,  // coherent read to own
    C_WB       = 4'h3,  // coherent writeback
    C_PIORD    = 4'h4,  // non-coherent PIO read
    C_PIOWR    = 4'h5,  // non-coherent PIO write
    C_INTR     = 4'h6,  // interrupt / cross-call
    C_FWD_ACK  = 4'h7,  // forwarded request ack, hub -> requester
    C_SNP_RSP  = 4'h8,  // snoop response, node -> hub
    C_CONS_RSP = 4'h9,  // consolidated snoop response, hub -> requester
    C_NC_RSP   = 4'hA,  // non-coherent reply (PIO completion)
    C_CREDIT   = 4'hB,  // flow-control credit return, node -> hub
    C_DATA     = 4'hC,  // read-return data chunk (no credit)
    C_WDATA    = 4'hD,  // write data chunk (needs credit)
    C_DATA_PE  = 4'hE,  // read data chunk with payload parity error
    C_WDATA_PE = 4'hF   // write data chunk with payload parity error
  } cmd_e;

  typedef enum logic [1:0] {
    SNP_MISS = 2'd0, SNP_HIT_S = 2'd1, SNP_HIT_O = 2'd2, SNP_HIT_M = 2'd3
  } snp_e;

  typedef struct packed {
    cmd_e              cmd;
    logic [PORT_W-1:0] src;    // requesting node
    logic [PORT_W-1:0] dst;    // destination node
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] addr;
    snp_e              snp;
    logic [1:0]        chunk;  // 16-byte chunk index; 0 and 1 are critical
    logic [127:0]      data;
  } pkt_t;

  // Request-channel packet without reply and data fields, for the ASU's
  // deep input FIFOs.
  typedef struct packed {
    cmd_e              cmd;
    logic [PORT_W-1:0] src;
    logic [PORT_W-1:0] dst;
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] addr;
  } req_t;

  function automatic req_t to_req(pkt_t p);
    return '{cmd: p.cmd, src: p.src, dst: p.dst, tag: p.tag, addr: p.addr};
  endfunction

  function automatic pkt_t from_req(req_t r);
    pkt_t p;
    p      = '0;
    p.cmd  = r.cmd;
    p.src  = r.src;
    p.dst  = r.dst;
    p.tag  = r.tag;
    p.addr = r.addr;
    return p;
  endfunction

  localparam int PKT_BYTES_MAX = 18;

  function automatic vc_e vc_of(cmd_e c);
    case (c[3:2])
      2'b10:   return VC_RPL;
      2'b11:   return VC_DAT;
      default: return VC_REQ;
    endcase
  endfunction

  function automatic logic is_coherent(cmd_e c);
    return (c == C_RTS) || (c == C_RTO) || (c == C_WB);
  endfunction

  function automatic logic is_noncoherent(cmd_e c);
    return (c == C_PIORD) || (c == C_PIOWR) || (c == C_INTR);
  endfunction

  // Number of link bytes a packet starting with command c occupies.
  function automatic int unsigned pkt_len(cmd_e c);
    if (c == C_NOP) return 1;
    case (vc_of(c))
      VC_RPL:  return 3;
      VC_DAT:  return 18;
      default: return 7;
    endcase
  endfunction

  // Link image of a packet, byte 0 in bits [143:136], left aligned.
  //   request (7B): cmd src dst tag addr 6'b0
  //   reply   (3B): cmd src dst tag snp  6'b0
  //   data   (18B): cmd dst chunk tag data
  function automatic logic [FRAME_W-1:0] pkt_pack(pkt_t p);
    logic [FRAME_W-1:0] w;
    w = '0;
    case (vc_of(p.cmd))
      VC_RPL:  w[FRAME_W-1 -: 24] = {p.cmd, p.src, p.dst, p.tag, p.snp, 6'b0};
      VC_DAT:  w = {p.cmd, p.dst, p.chunk, p.tag, p.data};
      default: w[FRAME_W-1 -: 56] = {p.cmd, p.src, p.dst, p.tag, p.addr, 6'b0};
    endcase
    return w;
  endfunction

  function automatic pkt_t pkt_unpack(logic [FRAME_W-1:0] w);
    pkt_t p;
    p = '0;
    p.cmd = cmd_e'(w[FRAME_W-1 -: 4]);
    case (vc_of(p.cmd))
      VC_RPL: begin
        p.src = w[139:138]; p.dst = w[137:136]; p.tag = w[135:128];
        p.snp = snp_e'(w[127:126]);
      end
      VC_DAT: begin
        p.dst = w[139:138]; p.chunk = w[137:136]; p.tag = w[135:128];
        p.data = w[127:0];
      end
      default: begin
        p.src = w[139:138]; p.dst = w[137:136]; p.tag = w[135:128];
        p.addr = w[127:94];
      end
    endcase
    return p;
  endfunction

  // CRC-24 over a 144-bit frame, most significant bit first.
  function automatic logic [CRC_W-1:0] crc24(logic [FRAME_W-1:0] d);
    logic [CRC_W-1:0] c;
    c = CRC_INIT;
    for (int i = FRAME_W - 1; i >= 0; i--) begin
      if (c[CRC_W-1] ^ d[i]) c = (c << 1) ^ CRC_POLY;
      else                   c = c << 1;
    end
    return c;
  endfunction

  function automatic logic [PEND_IDX_W-1:0] pend_index(logic [PORT_W-1:0] src,
                                                       logic [TAG_W-1:0] tag);
    return PEND_IDX_W'(src) * PEND_IDX_W'(TAGS_PER_PORT) + PEND_IDX_W'(tag);
  endfunction

endpackage
