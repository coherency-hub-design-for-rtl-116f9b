// asu_pend: pended coherent transactions of the Address Serialization Unit.
//
// A transaction whose address hits in the CAM waits here, at the tail of the
// linked list that belongs to the CAM entry (96 lists). The 768-entry store is
// indexed by the transaction itself, {source port, tag} = src*192 + tag, so it
// needs no free list: every outstanding transaction owns exactly one slot.
// Each slot holds the command with a parity bit and a next pointer; the
// source and tag are implied by the slot index. push appends (src, tag, cmd)
// to list push_list; pop removes the head of list pop_list and presents it on
// pop_src/pop_tag/pop_cmd in the same cycle (combinational read, state updated
// at the clock edge). A list cannot be pushed and popped in the same cycle
// (the ASU stalls that case). The sizes are from the design description;
// the slot indexing and the pointer layout are this design's choices.
module asu_pend
  import zmb_pkg::*;
#(
  parameter int unsigned LISTS   = CAM_ENTRIES,
  parameter int unsigned ENTRIES = PEND_ENTRIES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  logic [CAM_IDX_W-1:0]  push_list,
  input  logic [PORT_W-1:0]     push_src,
  input  logic [TAG_W-1:0]      push_tag,
  input  cmd_e                  push_cmd,
  input  logic                  pop,
  input  logic [CAM_IDX_W-1:0]  pop_list,
  output logic                  pop_nonempty,  // list pop_list has an entry
  output logic [PORT_W-1:0]     pop_src,
  output logic [TAG_W-1:0]      pop_tag,
  output cmd_e                  pop_cmd,
  output logic                  pop_perr,
  output logic [PEND_IDX_W:0]   count
);
  logic [PEND_IDX_W-1:0] head_q [LISTS];
  logic [PEND_IDX_W-1:0] tail_q [LISTS];
  logic [LISTS-1:0]      ne_q;
  logic [PEND_IDX_W-1:0] next_q [ENTRIES];
  logic [4:0]            ent_q  [ENTRIES];   // {parity, cmd}

  logic [PEND_IDX_W-1:0] pidx, hidx;
  assign pidx = pend_index(push_src, push_tag);
  assign hidx = head_q[pop_list];
  assign pop_nonempty = ne_q[pop_list];

  always_comb begin
    logic [PEND_IDX_W-1:0] rem;
    pop_src = '0;
    rem = hidx;
    for (int s = NPORTS - 1; s >= 1; s--)
      if (pop_src == '0 && hidx >= PEND_IDX_W'(s * TAGS_PER_PORT)) begin
        pop_src = PORT_W'(s);
        rem = hidx - PEND_IDX_W'(s * TAGS_PER_PORT);
      end
    pop_tag  = TAG_W'(rem);
    pop_cmd  = cmd_e'(ent_q[hidx][3:0]);
    pop_perr = pop_nonempty && (^ent_q[hidx] != 1'b0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ne_q  <= '0;
      count <= '0;
    end else begin
      if (pop && ne_q[pop_list] && head_q[pop_list] == tail_q[pop_list])
        ne_q[pop_list] <= 1'b0;
      if (push) ne_q[push_list] <= 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop && ne_q[pop_list]);
    end
  end

  always_ff @(posedge clk) begin
    if (pop && ne_q[pop_list]) head_q[pop_list] <= next_q[hidx];
    if (push) begin
      ent_q[pidx] <= {^push_cmd, push_cmd};
      if (!ne_q[push_list]) head_q[push_list] <= pidx;
      else                  next_q[tail_q[push_list]] <= pidx;
      tail_q[push_list] <= pidx;
    end
  end

  a_no_same_list: assert property (@(posedge clk) disable iff (!rst_n)
                                   (push && pop) |-> (push_list != pop_list));
  a_tag_range:    assert property (@(posedge clk) disable iff (!rst_n)
                                   push |-> (push_tag < TAG_W'(TAGS_PER_PORT)));
endmodule
