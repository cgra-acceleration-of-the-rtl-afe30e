// bh_fifer_top: a NUM_PE-element array computing Barnes-Hut forces.
//
// The bodies are split into NUM_PE contiguous ranges of nearly equal size
// (PE p gets bodies [N*p/NUM_PE, N*(p+1)/NUM_PE)), and every PE traverses
// the same slim octree for its own range with its own pool of INGs. The PEs
// work independently; each has a node memory port and a body memory port,
// which in a full system lead through the PE's cache to the shared
// last-level cache and external memory. Those caches and the memory are
// outside this RTL, so the ports are brought out.
//
// Interface: start (pulse) with num_bodies, tree_len (entries in the slim
// octree array; the root's skip pointer) and pool_size (INGs per pool and
// PE, at most POOL_SIZE; 0 selects POOL_SIZE); per-PE memory ports with in-order
// responses; per-PE result streams (ret_valid/ret_ing/ret_ready) carrying
// each body's final gradient; done when every PE has finished; evt the PEs'
// event pulses. Timing: the ranges are computed in the cycle after start,
// and the PEs start one cycle later.
// Four PEs running the two-stage loop with the sorter is the configuration
// the original design evaluates; the even split of bodies over the PEs is this
// design's own choice.
module bh_fifer_top
  import bh_pkg::*;
#(
  parameter int unsigned NUM_PE        = 4,
  parameter int unsigned POOL_SIZE     = 256,
  parameter int unsigned SORT_ENTRIES  = 16,
  parameter int unsigned DRM_MAX_OUT   = 8,
  parameter int unsigned SWITCH_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  idx_t       num_bodies,
  input  idx_t       tree_len,
  input  idx_t       pool_size,
  output logic       node_req_valid [NUM_PE],
  input  logic       node_req_ready [NUM_PE],
  output idx_t       node_req_addr  [NUM_PE],
  input  logic       node_rsp_valid [NUM_PE],
  input  tree_node_t node_rsp_data  [NUM_PE],
  output logic       body_req_valid [NUM_PE],
  input  logic       body_req_ready [NUM_PE],
  output idx_t       body_req_addr  [NUM_PE],
  input  logic       body_rsp_valid [NUM_PE],
  input  vec3_t      body_rsp_data  [NUM_PE],
  output logic       ret_valid      [NUM_PE],
  output ing_t       ret_ing        [NUM_PE],
  input  logic       ret_ready      [NUM_PE],
  output logic       done,
  output pe_evt_t    evt            [NUM_PE]
);

  logic          start_q;
  idx_t          n_q, tlen_q, pool_q;
  idx_t          base  [NUM_PE];
  idx_t          count [NUM_PE];
  logic [NUM_PE-1:0] pe_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      n_q     <= '0;
      tlen_q  <= '0;
      pool_q  <= '0;
    end else begin
      start_q <= start;
      if (start) begin
        n_q    <= num_bodies;
        tlen_q <= tree_len;
        pool_q <= pool_size;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PE; p++) begin
      base[p]  = idx_t'((64'(n_q) * 64'(p)) / 64'(NUM_PE));
      count[p] = idx_t'((64'(n_q) * 64'(p + 1)) / 64'(NUM_PE)) - base[p];
    end
  end

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    bh_pe #(
      .POOL_SIZE     (POOL_SIZE),
      .SORT_ENTRIES  (SORT_ENTRIES),
      .DRM_MAX_OUT   (DRM_MAX_OUT),
      .SWITCH_CYCLES (SWITCH_CYCLES)
    ) u_pe (
      .clk, .rst_n,
      .start          (start_q),
      .body_base      (base[p]),
      .body_count     (count[p]),
      .tree_len       (tlen_q),
      .pool_size      (pool_q),
      .node_req_valid (node_req_valid[p]),
      .node_req_ready (node_req_ready[p]),
      .node_req_addr  (node_req_addr[p]),
      .node_rsp_valid (node_rsp_valid[p]),
      .node_rsp_data  (node_rsp_data[p]),
      .body_req_valid (body_req_valid[p]),
      .body_req_ready (body_req_ready[p]),
      .body_req_addr  (body_req_addr[p]),
      .body_rsp_valid (body_rsp_valid[p]),
      .body_rsp_data  (body_rsp_data[p]),
      .ret_valid      (ret_valid[p]),
      .ret_ing        (ret_ing[p]),
      .ret_ready      (ret_ready[p]),
      .done           (pe_done[p]),
      .evt            (evt[p])
    );
  end

  // done only once the PEs have seen the start
  assign done = &pe_done && !start_q && !start;

endmodule
