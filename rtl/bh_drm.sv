// bh_drm: Decoupled Reference Machine.
//
// Sits between two queues. It takes an (address, tag) pair from its input
// queue, sends the address to memory and, when the word comes back, pushes
// (tag, word) into its output queue. The tag is whatever must travel with
// the fetched word; in the Barnes-Hut loop it is the ING record, and the
// address is the ING's node (or body) index. Because requests are issued as
// soon as they are dequeued, up to MAX_OUT fetches are in flight at once:
// the DRM works through the backlog in its input queue ahead of the
// consumer, which is how it prefetches.
//
// Memory side: mem_req_valid/mem_req_ready/mem_req_addr request handshake;
// responses return in request order on mem_rsp_valid/mem_rsp_data, any
// number of cycles later, and cannot be refused. Tags wait in a tag FIFO and
// words in a response FIFO, both MAX_OUT deep; a request is issued only while
// fewer than MAX_OUT words are in flight or waiting, so no response is lost.
// Consumer side: out_valid/out_ready/out_tag/out_data; out_valid means the
// head response has arrived. A word reaches the output one cycle after the
// memory returns it at the earliest.
//
// Its function comes from the original Fifer Barnes-Hut design; the in-order memory
// handshake, MAX_OUT and the FIFO structure are this design's own choices.
module bh_drm #(
  parameter type         TAG_T   = logic [31:0],
  parameter type         DATA_T  = logic [31:0],
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned MAX_OUT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // input queue (show-ahead)
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] in_addr,
  input  TAG_T              in_tag,
  output logic              in_ready,
  // memory request / response
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [ADDR_W-1:0] mem_req_addr,
  input  logic              mem_rsp_valid,
  input  DATA_T             mem_rsp_data,
  // output
  output logic              out_valid,
  output TAG_T              out_tag,
  output DATA_T             out_data,
  input  logic              out_ready
);

  localparam int unsigned CW = $clog2(MAX_OUT + 1);

  logic [CW-1:0] in_flight;   // issued and not yet consumed at the output
  logic          issue, consume;
  logic          tag_full, tag_empty, dat_full, dat_empty;
  logic [CW-1:0] tag_cnt, dat_cnt;

  assign mem_req_valid = in_valid && (in_flight < CW'(MAX_OUT));
  assign mem_req_addr  = in_addr;
  assign issue         = mem_req_valid && mem_req_ready;
  assign in_ready      = issue;

  assign out_valid = !dat_empty;
  assign consume   = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_flight <= '0;
    else        in_flight <= in_flight + CW'(issue) - CW'(consume);
  end

  bh_fifo #(.T(TAG_T), .DEPTH(MAX_OUT)) u_tags (
    .clk, .rst_n,
    .push (issue), .din (in_tag),
    .pop  (consume), .dout (out_tag),
    .full (tag_full), .empty (tag_empty), .count (tag_cnt)
  );

  bh_fifo #(.T(DATA_T), .DEPTH(MAX_OUT)) u_data (
    .clk, .rst_n,
    .push (mem_rsp_valid), .din (mem_rsp_data),
    .pop  (consume), .dout (out_data),
    .full (dat_full), .empty (dat_empty), .count (dat_cnt)
  );

  // The in-flight limit keeps both buffers from overflowing.
  a_tags_room: assert property (@(posedge clk) disable iff (!rst_n) issue |-> !tag_full);
  a_data_room: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> !dat_full);
  a_tag_ready: assert property (@(posedge clk) disable iff (!rst_n) consume |-> !tag_empty);

  // Every response must match an outstanding request.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   mem_rsp_valid |-> (tag_cnt > dat_cnt));

endmodule
