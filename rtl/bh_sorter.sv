// bh_sorter: the priority queue that reorders INGs by tree position.
//
// It sits between the compute stage and the queue to the management stage
// and always releases the ING with the smallest node field it holds, so the
// pool is kept close together in the tree and neighbouring INGs reuse the
// same node fetches. It holds ENTRIES records (16, as in the original design)
// and accepts and releases one record per cycle in a two-stage pipeline:
//   stage 1  registers the incoming ING;
//   stage 2  is a sorted register array: the head is removed and the staged
//            ING is inserted at its place in the same cycle. Its place is the
//            count of held keys that are <= its node, so equal keys leave in
//            arrival order.
// Release policy (from the original design): an ING is released when the output
// queue has space and either the output queue is empty or the sorter is
// full. Waiting while it fills widens the sorting window; releasing into an
// empty output queue keeps the management stage fed and avoids a deadlock
// once fewer than ENTRIES INGs remain in the pool.
//
// Interface: in_valid/in_ready/in_ing from the compute stage; out_valid/
// out_ing push into the output queue (out_q_full, out_q_empty report its
// state). evt_pop_full / evt_pop_empty pulse when a release happens because
// the sorter is full / because the output queue is empty.
// Timing: an ING accepted in cycle t can be released from cycle t+2 on.
// The size, the 2-stage pipelining and the policy follow the original design; the
// insertion-array structure and stable order for equal keys are this
// design's own choices.
module bh_sorter
  import bh_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  ing_t in_ing,
  output logic in_ready,
  output logic out_valid,
  output ing_t out_ing,
  input  logic out_q_full,
  input  logic out_q_empty,
  output logic evt_pop_full,
  output logic evt_pop_empty,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  localparam int unsigned CW = $clog2(ENTRIES + 1);

  // stage 1
  logic s1_valid;
  ing_t s1_ing;
  // stage 2
  ing_t          ent [ENTRIES];
  logic [CW-1:0] cnt;

  logic is_full, pop, s1_move;
  assign is_full   = (cnt == CW'(ENTRIES));
  assign pop       = !out_q_full && (cnt != '0) && (out_q_empty || is_full);
  assign s1_move   = s1_valid && (!is_full || pop);
  assign in_ready  = !s1_valid || s1_move;
  assign out_valid = pop;
  assign out_ing   = ent[0];
  assign occupancy = cnt;
  assign evt_pop_full  = pop && is_full;
  assign evt_pop_empty = pop && !is_full;

  // array after the head is removed, and the insertion point
  ing_t          base [ENTRIES];
  logic [CW-1:0] base_cnt, ins_pos;
  ing_t          nxt  [ENTRIES];

  always_comb begin
    base_cnt = cnt - CW'(pop);
    for (int i = 0; i < ENTRIES; i++) begin
      if (pop) base[i] = (i + 1 < ENTRIES) ? ent[i+1] : ent[i];
      else     base[i] = ent[i];
    end
    ins_pos = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if ((CW'(i) < base_cnt) && (base[i].node <= s1_ing.node)) ins_pos = ins_pos + 1'b1;
    end
    for (int i = 0; i < ENTRIES; i++) begin
      if (!s1_move || (CW'(i) < ins_pos)) nxt[i] = base[i];
      else if (CW'(i) == ins_pos)         nxt[i] = s1_ing;
      else                                nxt[i] = base[(i > 0) ? i - 1 : 0];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < ENTRIES; i++) ent[i] <= nxt[i];
    if (in_valid && in_ready) s1_ing <= in_ing;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      cnt      <= '0;
    end else begin
      if (in_valid && in_ready) s1_valid <= 1'b1;
      else if (s1_move)         s1_valid <= 1'b0;
      cnt <= base_cnt + CW'(s1_move);
    end
  end

  // the held records are always in ascending node order
  a_sorted: assert property (@(posedge clk) disable iff (!rst_n)
                             (cnt >= 2) |-> (ent[0].node <= ent[1].node));

endmodule
