// asu_cam: the Address Serialization Unit's table of addresses with an
// outstanding coherent transaction: 96 entries of a 34-bit line address, each
// with a valid bit and an even-parity bit.
//
// Lookup is fully associative and combinational: lk_addr is compared with
// every valid entry and lk_hit/lk_idx name the match. The free list is a bitmap
// of invalid entries; alloc_idx is the lowest free entry and is written when
// alloc is pulsed (the caller allocates only on a lookup miss). free releases
// an entry when its last transaction completes. rd_idx reads an entry's
// address back for a woken transaction; rd_perr flags a parity mismatch on
// that read. Entry count and width are from the design description; the bitmap
// free list and the parity placement are this design's choices.
module asu_cam
  import zmb_pkg::*;
#(
  parameter int unsigned ENTRIES = CAM_ENTRIES,
  parameter int unsigned AW      = ADDR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        lk_addr,
  output logic                 lk_hit,
  output logic [CAM_IDX_W-1:0] lk_idx,
  output logic                 full,
  output logic [CAM_IDX_W-1:0] alloc_idx,
  input  logic                 alloc,
  input  logic                 free,
  input  logic [CAM_IDX_W-1:0] free_idx,
  input  logic [CAM_IDX_W-1:0] rd_idx,
  output logic [AW-1:0]        rd_addr,
  output logic                 rd_perr,
  output logic [CAM_IDX_W:0]   used
);
  logic [AW-1:0]      addr_q [ENTRIES];
  logic [ENTRIES-1:0] par_q;
  logic [ENTRIES-1:0] vld_q;

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (vld_q[i] && addr_q[i] == lk_addr) begin
        lk_hit = 1'b1;
        lk_idx = CAM_IDX_W'(i);
      end
  end

  always_comb begin
    full = &vld_q;
    alloc_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!vld_q[i]) alloc_idx = CAM_IDX_W'(i);
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++) used = used + (CAM_IDX_W+1)'(vld_q[i]);
  end

  assign rd_addr = addr_q[rd_idx];
  assign rd_perr = vld_q[rd_idx] && ((^addr_q[rd_idx]) != par_q[rd_idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else begin
      if (free)  vld_q[free_idx] <= 1'b0;
      if (alloc) vld_q[alloc_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      addr_q[alloc_idx] <= lk_addr;
      par_q[alloc_idx]  <= ^lk_addr;
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> (!full && !lk_hit));
  a_free_valid: assert property (@(posedge clk) disable iff (!rst_n) free |-> vld_q[free_idx]);
endmodule
