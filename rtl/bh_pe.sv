// bh_pe: one processing element running the Barnes-Hut traversal loop.
//
// The loop (management -> node DRM -> body DRM -> compute -> sorter ->
// management) carries the pool of ING records round and round:
//   bh_manage   starts pools of INGs at node 0, feeds them back, retires the
//               finished ones on ret_*;
//   node DRM    fetches the slim-octree entry at ING.node (node memory port);
//   body DRM    fetches the position of body ING.index (body memory port);
//   bh_compute  does one traversal step and updates the gradient;
//   bh_sorter   releases INGs smallest-node-first to the management stage.
// Queues link the parts. Those that can hold a large part of the pool are
// POOL_SIZE deep, so the pool (never more than POOL_SIZE INGs) always fits
// and the loop cannot deadlock on a full queue. The management and compute
// stages share the PE and run one at a time, chosen by bh_sched; the DRMs,
// the sorter and the queues work every cycle.
//
// Interface: start with body_base/body_count/tree_len and the pool size to
// use (0: POOL_SIZE); two in-order memory
// ports (request valid/ready/address, response valid/data); ret_* the
// finished INGs; done; evt the PE's event pulses (bh_pkg::pe_evt_t).
// The loop structure, the two stages on one PE and the sorter's place come
// from the original design; queue depths, the second DRM for the body position
// and the memory handshake are this design's own choices.
module bh_pe
  import bh_pkg::*;
#(
  parameter int unsigned POOL_SIZE     = 256,
  parameter int unsigned SORT_ENTRIES  = 16,
  parameter int unsigned DRM_MAX_OUT   = 8,
  parameter int unsigned LINK_DEPTH    = 4,
  parameter int unsigned SWITCH_CYCLES = 2,
  parameter logic [31:0] THETA2        = 32'h0000_4000,
  parameter logic [31:0] SOFT2         = 32'h0000_0100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  idx_t       body_base,
  input  idx_t       body_count,
  input  idx_t       tree_len,
  input  idx_t       pool_size,
  // node memory
  output logic       node_req_valid,
  input  logic       node_req_ready,
  output idx_t       node_req_addr,
  input  logic       node_rsp_valid,
  input  tree_node_t node_rsp_data,
  // body memory
  output logic       body_req_valid,
  input  logic       body_req_ready,
  output idx_t       body_req_addr,
  input  logic       body_rsp_valid,
  input  vec3_t      body_rsp_data,
  // results
  output logic       ret_valid,
  output ing_t       ret_ing,
  input  logic       ret_ready,
  output logic       done,
  output pe_evt_t    evt
);

  localparam int unsigned QW = $clog2(POOL_SIZE + 1);
  localparam int unsigned LW = $clog2(LINK_DEPTH + 1);

  // ---------------- scheduler ----------------
  logic [1:0]    cfg_can;
  logic [QW-1:0] cfg_occ [2];
  logic [0:0]    cfg_active;
  logic          cfg_en, evt_switch;
  logic          man_en, cmp_en;

  // ---------------- management stage ----------------
  logic man_in_ready, man_out_valid, man_can;
  ing_t man_out_ing;
  logic evt_pool, evt_ret;

  // ---------------- queues ----------------
  ing_t          q_md_dout, q_sm_dout;
  logic          q_md_full, q_md_empty, q_sm_full, q_sm_empty;
  logic [QW-1:0] q_md_cnt, q_sm_cnt, q_dc_cnt;
  ing_node_t     q_nb_dout;
  logic          q_nb_full, q_nb_empty;
  logic [LW-1:0] q_nb_cnt;
  compute_in_t   q_dc_din, q_dc_dout;
  logic          q_dc_full, q_dc_empty;

  // ---------------- DRMs ----------------
  logic       dn_in_ready, dn_out_valid;
  ing_t       dn_out_tag;
  tree_node_t dn_out_data;
  logic       db_in_ready, db_out_valid;
  ing_node_t  db_out_tag;
  vec3_t      db_out_data;

  // ---------------- compute / sorter ----------------
  logic cmp_in_ready, cmp_out_valid, cmp_busy;
  ing_t cmp_out_ing;
  logic ev_leaf, ev_skip, ev_rec;
  logic srt_in_ready, srt_out_valid, srt_pop_full, srt_pop_empty;
  ing_t srt_out_ing;
  logic [$clog2(SORT_ENTRIES+1)-1:0] srt_occ;

  assign man_en = cfg_en && (cfg_active == 1'(CFG_MANAGE));
  assign cmp_en = cfg_en && (cfg_active == 1'(CFG_COMPUTE));

  assign cfg_can[CFG_MANAGE]  = man_can;
  assign cfg_can[CFG_COMPUTE] = (!q_dc_empty || cmp_busy) && srt_in_ready;
  assign cfg_occ[CFG_MANAGE]  = q_sm_cnt;
  assign cfg_occ[CFG_COMPUTE] = q_dc_cnt;

  bh_sched #(.NCFG(2), .OCC_W(QW), .SWITCH_CYCLES(SWITCH_CYCLES)) u_sched (
    .clk, .rst_n,
    .can_progress (cfg_can),
    .occupancy    (cfg_occ),
    .active       (cfg_active),
    .en           (cfg_en),
    .evt_switch   (evt_switch)
  );

  bh_manage #(.POOL_SIZE(POOL_SIZE)) u_manage (
    .clk, .rst_n,
    .en           (man_en),
    .start, .body_base, .body_count, .tree_len, .pool_size,
    .in_valid     (!q_sm_empty),
    .in_ing       (q_sm_dout),
    .in_ready     (man_in_ready),
    .out_valid    (man_out_valid),
    .out_ing      (man_out_ing),
    .out_ready    (!q_md_full),
    .ret_valid, .ret_ing, .ret_ready,
    .can_progress (man_can),
    .done,
    .evt_pool_start (evt_pool),
    .evt_retire     (evt_ret)
  );

  // management -> node DRM
  bh_fifo #(.T(ing_t), .DEPTH(POOL_SIZE)) u_q_md (
    .clk, .rst_n,
    .push (man_out_valid), .din (man_out_ing),
    .pop  (dn_in_ready),   .dout (q_md_dout),
    .full (q_md_full), .empty (q_md_empty), .count (q_md_cnt)
  );

  bh_drm #(.TAG_T(ing_t), .DATA_T(tree_node_t), .ADDR_W(IDX_W), .MAX_OUT(DRM_MAX_OUT)) u_drm_node (
    .clk, .rst_n,
    .in_valid      (!q_md_empty),
    .in_addr       (q_md_dout.node),
    .in_tag        (q_md_dout),
    .in_ready      (dn_in_ready),
    .mem_req_valid (node_req_valid),
    .mem_req_ready (node_req_ready),
    .mem_req_addr  (node_req_addr),
    .mem_rsp_valid (node_rsp_valid),
    .mem_rsp_data  (node_rsp_data),
    .out_valid     (dn_out_valid),
    .out_tag       (dn_out_tag),
    .out_data      (dn_out_data),
    .out_ready     (!q_nb_full)
  );

  // node DRM -> body DRM
  bh_fifo #(.T(ing_node_t), .DEPTH(LINK_DEPTH)) u_q_nb (
    .clk, .rst_n,
    .push (dn_out_valid && !q_nb_full), .din ('{ing: dn_out_tag, node: dn_out_data}),
    .pop  (db_in_ready),  .dout (q_nb_dout),
    .full (q_nb_full), .empty (q_nb_empty), .count (q_nb_cnt)
  );

  bh_drm #(.TAG_T(ing_node_t), .DATA_T(vec3_t), .ADDR_W(IDX_W), .MAX_OUT(DRM_MAX_OUT)) u_drm_body (
    .clk, .rst_n,
    .in_valid      (!q_nb_empty),
    .in_addr       (q_nb_dout.ing.index),
    .in_tag        (q_nb_dout),
    .in_ready      (db_in_ready),
    .mem_req_valid (body_req_valid),
    .mem_req_ready (body_req_ready),
    .mem_req_addr  (body_req_addr),
    .mem_rsp_valid (body_rsp_valid),
    .mem_rsp_data  (body_rsp_data),
    .out_valid     (db_out_valid),
    .out_tag       (db_out_tag),
    .out_data      (db_out_data),
    .out_ready     (!q_dc_full)
  );

  // body DRM -> compute
  assign q_dc_din = '{ing: db_out_tag.ing, node: db_out_tag.node, body: db_out_data};

  bh_fifo #(.T(compute_in_t), .DEPTH(POOL_SIZE)) u_q_dc (
    .clk, .rst_n,
    .push (db_out_valid && !q_dc_full), .din (q_dc_din),
    .pop  (cmp_in_ready && !q_dc_empty), .dout (q_dc_dout),
    .full (q_dc_full), .empty (q_dc_empty), .count (q_dc_cnt)
  );

  bh_compute #(.THETA2(THETA2), .SOFT2(SOFT2)) u_compute (
    .clk, .rst_n,
    .en          (cmp_en),
    .in_valid    (!q_dc_empty),
    .in_data     (q_dc_dout),
    .in_ready    (cmp_in_ready),
    .out_valid   (cmp_out_valid),
    .out_ing     (cmp_out_ing),
    .out_ready   (srt_in_ready),
    .busy        (cmp_busy),
    .evt_leaf    (ev_leaf),
    .evt_skip    (ev_skip),
    .evt_recurse (ev_rec)
  );

  bh_sorter #(.ENTRIES(SORT_ENTRIES)) u_sorter (
    .clk, .rst_n,
    .in_valid      (cmp_out_valid),
    .in_ing        (cmp_out_ing),
    .in_ready      (srt_in_ready),
    .out_valid     (srt_out_valid),
    .out_ing       (srt_out_ing),
    .out_q_full    (q_sm_full),
    .out_q_empty   (q_sm_empty),
    .evt_pop_full  (srt_pop_full),
    .evt_pop_empty (srt_pop_empty),
    .occupancy     (srt_occ)
  );

  // sorter -> management
  bh_fifo #(.T(ing_t), .DEPTH(POOL_SIZE)) u_q_sm (
    .clk, .rst_n,
    .push (srt_out_valid), .din (srt_out_ing),
    .pop  (man_in_ready),  .dout (q_sm_dout),
    .full (q_sm_full), .empty (q_sm_empty), .count (q_sm_cnt)
  );

  assign evt = '{
    cfg_switch:     evt_switch,
    pool_start:     evt_pool,
    retire:         evt_ret,
    leaf:           ev_leaf,
    skip:           ev_skip,
    recurse:        ev_rec,
    sort_pop_full:  srt_pop_full,
    sort_pop_empty: srt_pop_empty,
    mem_stall:      (node_req_valid && !node_req_ready) || (body_req_valid && !body_req_ready)
  };

  // The pool never holds more INGs than POOL_SIZE, so the INGs waiting in
  // the queues and the sorter never exceed it either.
  a_pool_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (32'(q_md_cnt) + 32'(q_nb_cnt) + 32'(q_dc_cnt) + 32'(q_sm_cnt) + 32'(srt_occ)) <= 32'(POOL_SIZE));

endmodule
