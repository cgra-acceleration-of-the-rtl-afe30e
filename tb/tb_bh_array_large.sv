// tb_bh_array_large: the four-PE array at its default parameters computes
// the forces of an 8192-body Plummer scene with the default pool of 256
// (eight pools per PE), the largest scene simulated. Memory models, checks
// and mechanism counts are as in tb_bh_fifer_top.
module tb_bh_array_large;
  import bh_pkg::*;
  import bh_tb_pkg::*;
  localparam int NUM_PE = 4;
  localparam int MEMD = 16384;
  logic clk = 0, rst_n = 0;
  logic start, done;
  idx_t num_bodies, tree_len, pool_size;
  logic       node_req_valid [NUM_PE], node_req_ready [NUM_PE], node_rsp_valid [NUM_PE];
  idx_t       node_req_addr  [NUM_PE];
  tree_node_t node_rsp_data  [NUM_PE];
  logic       body_req_valid [NUM_PE], body_req_ready [NUM_PE], body_rsp_valid [NUM_PE];
  idx_t       body_req_addr  [NUM_PE];
  vec3_t      body_rsp_data  [NUM_PE];
  logic       ret_valid [NUM_PE], ret_ready [NUM_PE];
  ing_t       ret_ing   [NUM_PE];
  pe_evt_t    evt       [NUM_PE];
  int checks = 0, failures = 0;
  int cnt [9];
  bh_scene sc;
  int n_cur;

  bh_fifer_top dut (.*);

  for (genvar p = 0; p < NUM_PE; p++) begin : g_mem
    bh_mem_model #(.T(tree_node_t), .DEPTH(MEMD), .LATENCY(6), .STALL_PCT(20), .SEED(20 + p)) u_nmem (
      .clk, .rst_n, .req_valid (node_req_valid[p]), .req_ready (node_req_ready[p]),
      .req_addr (node_req_addr[p]), .rsp_valid (node_rsp_valid[p]), .rsp_data (node_rsp_data[p]));
    bh_mem_model #(.T(vec3_t), .DEPTH(MEMD), .LATENCY(9), .STALL_PCT(20), .SEED(30 + p)) u_bmem (
      .clk, .rst_n, .req_valid (body_req_valid[p]), .req_ready (body_req_ready[p]),
      .req_addr (body_req_addr[p]), .rsp_valid (body_rsp_valid[p]), .rsp_data (body_rsp_data[p]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [int];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NUM_PE; p++) begin
        ret_ready[p] <= ($urandom_range(99) < 80);
        if (ret_valid[p] && ret_ready[p]) begin
          int b;
          b = int'(ret_ing[p].index);
          checks++;
          if (b < 0 || b >= n_cur || seen.exists(b) ||
              b < (n_cur * p) / NUM_PE || b >= (n_cur * (p + 1)) / NUM_PE) begin
            failures++;
            $display("unexpected retire of body %0d from PE %0d", b, p);
          end else if (!sc.check(b, ret_ing[p].gradient)) begin
            failures++;
            $display("body %0d: wrong gradient", b);
          end
          seen[b] = 1;
        end
        cnt[0] += int'(evt[p].cfg_switch);
        cnt[1] += int'(evt[p].pool_start);
        cnt[2] += int'(evt[p].retire);
        cnt[3] += int'(evt[p].leaf);
        cnt[4] += int'(evt[p].skip);
        cnt[5] += int'(evt[p].recurse);
        cnt[6] += int'(evt[p].sort_pop_full);
        cnt[7] += int'(evt[p].sort_pop_empty);
        cnt[8] += int'(evt[p].mem_stall);
      end
    end
  end

  task automatic load_scene(int n, int seed);
    sc = new(n, seed);
    n_cur = n;
    seen.delete();
    for (int i = 0; i < sc.tree.size(); i++) begin
      g_mem[0].u_nmem.mem[i] = sc.tree[i];
      g_mem[1].u_nmem.mem[i] = sc.tree[i];
      g_mem[2].u_nmem.mem[i] = sc.tree[i];
      g_mem[3].u_nmem.mem[i] = sc.tree[i];
    end
    for (int i = 0; i < n; i++) begin
      g_mem[0].u_bmem.mem[i] = sc.body[i];
      g_mem[1].u_bmem.mem[i] = sc.body[i];
      g_mem[2].u_bmem.mem[i] = sc.body[i];
      g_mem[3].u_bmem.mem[i] = sc.body[i];
    end
    $display("scene: %0d bodies, %0d tree entries", n, sc.tree.size());
  endtask

  task automatic run_op(int n, int seed, int pool);
    longint t0;
    load_scene(n, seed);
    num_bodies = idx_t'(n);
    tree_len   = idx_t'(sc.tree.size());
    pool_size  = idx_t'(pool);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = $time;
    @(negedge clk);
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (seen.num() != n) begin failures++; $display("%0d of %0d bodies retired", seen.num(), n); end
    $display("%0d bodies done in %0d cycles", n, ($time - t0) / 10);
  endtask

  initial begin
    string names [9] = '{"config switch", "pool start", "retire", "leaf", "skip",
                         "recurse", "sorter full release", "sorter empty-queue release", "memory stall"};
    foreach (cnt[i]) cnt[i] = 0;
    foreach (ret_ready[p]) ret_ready[p] = 0;
    start = 0; num_bodies = 0; tree_len = 0; pool_size = 0; n_cur = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_op(8192, 5, 0);
    for (int i = 0; i < 9; i++) begin
      $display("%s: %0d", names[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin failures++; $display("never happened: %s", names[i]); end
    end
    checks++;
    if (cnt[1] != NUM_PE * 8) begin failures++; $display("pool starts %0d, expected %0d", cnt[1], NUM_PE * 8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
