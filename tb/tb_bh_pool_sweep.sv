// tb_bh_pool_sweep: one PE at its default sizes computes the same
// 1500-body Plummer scene six times, with the run-time pool size set to
// 8, 16, 32, 64, 128 and 256, and prints the cycle count of each run. Every
// run must give every body its reference gradient. The memory model has a
// fixed latency and no cache, so the counts show the cost of switching
// between the two stages and of keeping the loop full, not cache effects.
module tb_bh_pool_sweep;
  import bh_pkg::*;
  import bh_tb_pkg::*;
  localparam int N = 1500;
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
  bh_scene sc;

  bh_pe dut (.*);

  bh_mem_model #(.T(tree_node_t), .DEPTH(4096), .LATENCY(20), .STALL_PCT(10), .SEED(41)) u_nmem (
    .clk, .rst_n, .req_valid (node_req_valid), .req_ready (node_req_ready), .req_addr (node_req_addr),
    .rsp_valid (node_rsp_valid), .rsp_data (node_rsp_data));
  bh_mem_model #(.T(vec3_t), .DEPTH(4096), .LATENCY(20), .STALL_PCT(10), .SEED(42)) u_bmem (
    .clk, .rst_n, .req_valid (body_req_valid), .req_ready (body_req_ready), .req_addr (body_req_addr),
    .rsp_valid (body_rsp_valid), .rsp_data (body_rsp_data));

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [int];
  int pools = 0;
  assign ret_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n && ret_valid) begin
      int b;
      b = int'(ret_ing.index);
      checks++;
      if (b >= N || seen.exists(b) || !sc.check(b, ret_ing.gradient)) begin
        failures++;
        $display("body %0d: bad result", b);
      end
      seen[b] = 1;
    end
    if (rst_n && evt.pool_start) pools++;
  end

  initial begin
    int sizes [6] = '{8, 16, 32, 64, 128, 256};
    sc = new(N, 9);
    for (int i = 0; i < sc.tree.size(); i++) u_nmem.mem[i] = sc.tree[i];
    for (int i = 0; i < N; i++) u_bmem.mem[i] = sc.body[i];
    $display("scene: %0d bodies, %0d tree entries", N, sc.tree.size());
    start = 0; body_base = 0; body_count = N; tree_len = idx_t'(sc.tree.size()); pool_size = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (sizes[k]) begin
      longint t0;
      seen.delete();
      pools = 0;
      pool_size = idx_t'(sizes[k]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = $time;
      @(negedge clk);
      wait (done);
      $display("pool size %0d: %0d cycles", sizes[k], ($time - t0) / 10);
      checks++;
      if (seen.num() != N || pools != (N + sizes[k] - 1) / sizes[k]) begin
        failures++;
        $display("%0d bodies retired in %0d pools", seen.num(), pools);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
