// tb_bh_pe: one PE at its default sizes computes the forces on all bodies
// of a Plummer scene, with two memory models (latency 6 and 9 cycles,
// refusing about 20% of requests) and a result consumer that stalls at
// random. A run-time pool size of 32 makes five pools run. Every body must
// retire exactly once with the reference gradient, and each mechanism of the
// PE must have happened: configuration switches, pool starts, leaf / skip /
// recurse steps, both sorter release causes and memory stalls.
module tb_bh_pe;
  import bh_pkg::*;
  import bh_tb_pkg::*;
  localparam int N = 150;
  localparam int POOL = 32;
  logic clk = 0, rst_n = 0;
  logic start, done;
  idx_t body_base, body_count, tree_len, pool_size;
  logic node_req_valid, node_req_ready, node_rsp_valid;
  idx_t node_req_addr;
  tree_node_t node_rsp_data;
  logic body_req_valid, body_req_ready, body_rsp_valid;
  idx_t body_req_addr;
  vec3_t body_rsp_data;
  logic ret_valid, ret_ready;
  ing_t ret_ing;
  pe_evt_t evt;
  int checks = 0, failures = 0;
  int cnt [9];
  bh_scene sc;

  bh_pe dut (.*);

  bh_mem_model #(.T(tree_node_t), .DEPTH(1024), .LATENCY(6), .STALL_PCT(20), .SEED(11)) u_nmem (
    .clk, .rst_n, .req_valid (node_req_valid), .req_ready (node_req_ready), .req_addr (node_req_addr),
    .rsp_valid (node_rsp_valid), .rsp_data (node_rsp_data));
  bh_mem_model #(.T(vec3_t), .DEPTH(1024), .LATENCY(9), .STALL_PCT(20), .SEED(12)) u_bmem (
    .clk, .rst_n, .req_valid (body_req_valid), .req_ready (body_req_ready), .req_addr (body_req_addr),
    .rsp_valid (body_rsp_valid), .rsp_data (body_rsp_data));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [int];
  always @(posedge clk) begin
    if (rst_n) begin
      ret_ready <= ($urandom_range(99) < 70);
      if (ret_valid && ret_ready) begin
        int b;
        b = int'(ret_ing.index);
        checks++;
        if (b < 3 || b >= 3 + N || seen.exists(b)) begin
          failures++;
          $display("unexpected retire of body %0d", b);
        end else if (!sc.check(b - 3, ret_ing.gradient)) begin
          real g [3];
          real m;
          void'(sc.ref_force(b - 3, g, m));
          failures++;
          $display("body %0d: (%f %f %f) expected (%f %f %f)", b, f2r(ret_ing.gradient.x),
                   f2r(ret_ing.gradient.y), f2r(ret_ing.gradient.z), g[0], g[1], g[2]);
        end
        seen[b] = 1;
      end
      cnt[0] += int'(evt.cfg_switch);
      cnt[1] += int'(evt.pool_start);
      cnt[2] += int'(evt.retire);
      cnt[3] += int'(evt.leaf);
      cnt[4] += int'(evt.skip);
      cnt[5] += int'(evt.recurse);
      cnt[6] += int'(evt.sort_pop_full);
      cnt[7] += int'(evt.sort_pop_empty);
      cnt[8] += int'(evt.mem_stall);
    end
  end

  initial begin
    string names [9] = '{"config switch", "pool start", "retire", "leaf", "skip",
                         "recurse", "sorter full release", "sorter empty-queue release", "memory stall"};
    foreach (cnt[i]) cnt[i] = 0;
    sc = new(N, 7);
    // body b of the scene lives at address b + 3
    for (int i = 0; i < sc.tree.size(); i++) u_nmem.mem[i] = sc.tree[i];
    for (int i = 0; i < N; i++) u_bmem.mem[i + 3] = sc.body[i];
    $display("scene: %0d bodies, %0d tree entries", N, sc.tree.size());
    start = 0; ret_ready = 0;
    body_base = 3; body_count = N; tree_len = idx_t'(sc.tree.size()); pool_size = POOL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(negedge clk);
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (seen.num() != N) begin failures++; $display("%0d of %0d bodies retired", seen.num(), N); end
    checks++;
    if (cnt[1] != (N + POOL - 1) / POOL) begin failures++; $display("%0d pools", cnt[1]); end
    for (int i = 0; i < 9; i++) begin
      $display("%s: %0d", names[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin failures++; $display("never happened: %s", names[i]); end
    end
    $display("cycles: %0d", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
