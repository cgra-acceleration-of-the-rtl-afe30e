// bh_manage: the management stage of the Barnes-Hut loop.
//
// It owns the pool of INGs. For the bodies [body_base, body_base+body_count)
// it starts pools of pool_size INGs (at most POOL_SIZE, the capacity the
// queues are built for; 0 means POOL_SIZE), each with node 0 and a zero
// gradient, and sends them towards the node DRM. Afterwards it takes every
// ING coming back from the sorter and either feeds it around the loop again
// or, when its node index has reached tree_len (the end of the slim octree
// array), retires it on the result port. When every ING of a pool has
// retired the next pool starts; when no bodies are left, done rises.
//
// One action per enabled cycle, in this order: emit a new ING of the pool
// being started; else handle the head of the input queue. Starting a pool
// is bookkeeping and also happens while the stage is not enabled.
// can_progress tells the PE scheduler whether an enabled cycle would do work.
//
// Interface: start (pulse) with body_base/body_count/tree_len/pool_size;
// in_* from the sorter's output queue (in_ready pops it); out_* into the DRM's request
// queue; ret_* the retired INGs (final gradients); done.
// Timing: one ING handled per enabled cycle.
// Retiring at the end of the tree, feeding back, pools that begin at the
// root and a tunable pool size with 256 as the default follow the
// original design. Running pool by pool (a new pool only once the previous one
// has fully retired) is this design's reading of it.
module bh_manage
  import bh_pkg::*;
#(
  parameter int unsigned POOL_SIZE = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic start,
  input  idx_t body_base,
  input  idx_t body_count,
  input  idx_t tree_len,
  input  idx_t pool_size,
  input  logic in_valid,
  input  ing_t in_ing,
  output logic in_ready,
  output logic out_valid,
  output ing_t out_ing,
  input  logic out_ready,
  output logic ret_valid,
  output ing_t ret_ing,
  input  logic ret_ready,
  output logic can_progress,
  output logic done,
  output logic evt_pool_start,
  output logic evt_retire
);

  localparam int unsigned PW = $clog2(POOL_SIZE + 1);

  logic          running;
  idx_t          next_body, end_body, tlen, plim;
  logic [PW-1:0] load_left, live;

  logic in_at_end, do_load, do_fwd, do_ret, pool_start;
  idx_t remaining;

  assign remaining  = end_body - next_body;
  assign in_at_end  = in_ing.node >= tlen;
  assign do_load    = en && (load_left != '0) && out_ready;
  assign do_fwd     = en && (load_left == '0) && in_valid && !in_at_end && out_ready;
  assign do_ret     = en && (load_left == '0) && in_valid &&  in_at_end && ret_ready;
  assign pool_start = running && (load_left == '0) && (live == '0) && (remaining != '0);

  assign in_ready     = do_fwd || do_ret;
  assign out_valid    = do_load || do_fwd;
  assign ret_valid    = do_ret;
  assign ret_ing      = in_ing;
  assign can_progress = ((load_left != '0) && out_ready) ||
                        ((load_left == '0) && in_valid && (in_at_end ? ret_ready : out_ready));
  assign done         = !running;
  assign evt_pool_start = pool_start;
  assign evt_retire     = do_ret;

  always_comb begin
    if (do_load) begin
      out_ing          = '0;
      out_ing.index    = next_body;
      out_ing.node     = '0;
    end else begin
      out_ing = in_ing;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      next_body <= '0;
      end_body  <= '0;
      tlen      <= '0;
      plim      <= idx_t'(POOL_SIZE);
      load_left <= '0;
      live      <= '0;
    end else begin
      if (start && !running) begin
        running   <= 1'b1;
        next_body <= body_base;
        end_body  <= body_base + body_count;
        tlen      <= tree_len;
        plim      <= (pool_size == '0 || pool_size > idx_t'(POOL_SIZE)) ? idx_t'(POOL_SIZE) : pool_size;
      end else if (pool_start) begin
        load_left <= (remaining > plim) ? PW'(plim) : PW'(remaining);
      end else if (running && (load_left == '0) && (live == '0) && (remaining == '0)) begin
        running <= 1'b0;
      end
      if (do_load) begin
        next_body <= next_body + 1'b1;
        load_left <= load_left - 1'b1;
      end
      live <= live + PW'(do_load) - PW'(do_ret);
    end
  end

  a_live_bound: assert property (@(posedge clk) disable iff (!rst_n) live <= PW'(POOL_SIZE));

endmodule
