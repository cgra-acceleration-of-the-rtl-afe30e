// tb_bh_manage: surrounds the management stage with a model of the rest of
// the loop. INGs it sends out come back, shuffled, after their node index
// was advanced by 1..3 and their gradient changed; the stage enable, the
// output space and the result consumer stall at random. Checks: new INGs
// start at node 0 with a zero gradient for consecutive bodies of the range;
// at most pool_size (100) are live; a pool starts only after the previous one has
// fully retired; returning INGs are forwarded unchanged unless their node
// reached tree_len, then retired; every body retires exactly once; done.
module tb_bh_manage;
  import bh_pkg::*;
  localparam int POOL = 256;
  localparam int PLIM = 100;
  localparam int BASE = 10, COUNT = 600, TLEN = 7;
  logic clk = 0, rst_n = 0;
  logic en, start, in_valid, in_ready, out_valid, out_ready;
  logic ret_valid, ret_ready, can_progress, done, evt_pool_start, evt_retire;
  idx_t body_base, body_count, tree_len, pool_size;
  ing_t in_ing, out_ing, ret_ing;
  int checks = 0, failures = 0;

  bh_manage #(.POOL_SIZE(POOL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ing_t loop_q [$];   // INGs travelling round the loop
  int   retired [int];
  int   live = 0, next_new = BASE, pools = 0;
  logic en_on = 0, out_on = 0, ret_on = 0;

  assign en        = en_on;
  assign out_ready = out_on;
  assign ret_ready = ret_on;
  assign in_valid  = (loop_q.size() > 0);
  assign in_ing    = (loop_q.size() > 0) ? loop_q[0] : '0;

  always @(posedge clk) begin
    if (rst_n) begin
      ing_t x;
      if (evt_pool_start) begin
        pools++;
        checks++;
        if (live != 0) begin failures++; $display("pool started with %0d live", live); end
      end
      if (out_valid) begin
        checks++;
        if (!out_ready) begin failures++; $display("output without space"); end
        x = out_ing;
        if (!in_ready) begin
          // a new ING of a pool
          if (x.index != idx_t'(next_new) || x.node != 0 || x.gradient != '0) begin
            failures++;
            $display("bad new ING index %0d node %0d", x.index, x.node);
          end
          next_new++;
          live++;
        end else if (x != in_ing) begin
          failures++;
          $display("forwarded ING changed");
        end
        x.node = x.node + idx_t'($urandom_range(1, 3));
        x.gradient.x = x.gradient.x + 1;
        if (loop_q.size() > 1 && $urandom_range(1)) loop_q.insert($urandom_range(1, loop_q.size()), x);
        else loop_q.push_back(x);
      end
      if (ret_valid) begin
        checks++;
        if (!ret_ready || ret_ing.node < TLEN || retired.exists(int'(ret_ing.index))) begin
          failures++;
          $display("bad retire of ING %0d node %0d", ret_ing.index, ret_ing.node);
        end
        retired[int'(ret_ing.index)] = 1;
        live--;
      end
      if (in_ready) begin
        checks++;
        if (!ret_valid && !out_valid) begin failures++; $display("popped without action"); end
        if (!ret_valid && in_ing.node >= TLEN) begin failures++; $display("finished ING fed back"); end
        void'(loop_q.pop_front());
      end
      checks++;
      if (live > PLIM) begin failures++; $display("%0d live", live); end
      en_on  <= ($urandom_range(99) < 70);
      out_on <= ($urandom_range(99) < 80);
      ret_on <= ($urandom_range(99) < 70);
    end
  end

  initial begin
    start = 0; body_base = BASE; body_count = COUNT; tree_len = TLEN; pool_size = PLIM;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    wait (done);
    checks++;
    if (retired.num() != COUNT || next_new != BASE + COUNT || pools != 6) begin
      failures++;
      $display("retired %0d, created up to %0d, pools %0d", retired.num(), next_new, pools);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
