// bh_fifo: the queue that links stages, DRMs and the sorter.
//
// A synchronous first-in first-out buffer of DEPTH entries of any packed
// type T, held in a memory array with a read and a write pointer. The head
// entry is always visible on dout (show-ahead). Push and pop may happen in
// the same cycle, also when the queue is full (the pop frees the slot).
// count gives the occupancy, which the PE scheduler uses to pick the stage
// with the largest backlog and the sorter uses for its dequeue policy.
//
// Interface: push/din accepted when !full or pop; pop allowed when !empty.
// Timing: an entry pushed in cycle t is visible on dout from cycle t+1.
// Queues as the link between stages come from the original Fifer Barnes-Hut design; the
// depth and the show-ahead handshake are this design's own choices.
module bh_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                           mem [DEPTH];
  logic [AW-1:0]              wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full  = (cnt == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (cnt == '0);
  assign count = cnt;
  assign dout  = mem[rd_ptr];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // A producer must not push into a full queue it is not also draining,
  // and a consumer must not pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
