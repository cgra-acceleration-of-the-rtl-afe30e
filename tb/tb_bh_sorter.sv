// tb_bh_sorter: feeds random INGs (unique index, node 0..63 so that ties
// occur) into the sorter, whose output goes into a queue drained by a random
// consumer. Checks: every released ING is the smallest node among those held
// (ties: the earliest arrival), payloads arrive unchanged, each ING leaves
// exactly once, the release policy (output queue has space and is empty or
// the sorter is full), both release causes happen, and the sorter sustains
// one ING per cycle when input and consumer never stall.
module tb_bh_sorter;
  import bh_pkg::*;
  localparam int ENTRIES = 16;
  localparam int N = 4000;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  ing_t in_ing, out_ing, q_dout;
  logic q_full, q_empty, q_pop;
  logic [$clog2(9)-1:0] q_cnt;
  logic evt_pop_full, evt_pop_empty;
  logic [$clog2(ENTRIES+1)-1:0] occupancy;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  int in_pct = 90, out_pct = 50;

  bh_sorter #(.ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .in_valid, .in_ing, .in_ready, .out_valid, .out_ing,
    .out_q_full (q_full), .out_q_empty (q_empty),
    .evt_pop_full, .evt_pop_empty, .occupancy
  );

  bh_fifo #(.T(ing_t), .DEPTH(8)) u_q (
    .clk, .rst_n, .push (out_valid), .din (out_ing), .pop (q_pop),
    .dout (q_dout), .full (q_full), .empty (q_empty), .count (q_cnt)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ing_t pool [$];          // accepted, not yet released, in arrival order
  int   sent = 0, released = 0, drained = 0;
  logic prod_on = 0, cons_on = 0;

  function automatic ing_t make_ing(int i);
    ing_t r;
    r.index      = idx_t'(i);
    r.node       = idx_t'($urandom_range(63));
    r.gradient.x = fix_t'($urandom);
    r.gradient.y = fix_t'($urandom);
    r.gradient.z = fix_t'(i * 3);
    return r;
  endfunction

  assign in_valid = rst_n && prod_on && (sent < N);
  assign q_pop    = cons_on && !q_empty;

  always @(posedge clk) begin
    if (rst_n) begin
      // release policy, from the sorter's own occupancy
      checks++;
      if (out_valid != (!q_full && occupancy != 0 && (q_empty || occupancy == ENTRIES))) begin
        failures++;
        $display("policy violated: out_valid=%0d occ=%0d qfull=%0d qempty=%0d",
                 out_valid, occupancy, q_full, q_empty);
      end
      if (out_valid) begin
        int pos;
        checks++;
        pos = -1;
        for (int i = 0; i < pool.size(); i++)
          if (pool[i].index == out_ing.index) begin pos = i; break; end
        if (pos < 0) begin
          failures++;
          $display("released ING %0d was not held", out_ing.index);
        end else begin
          if (pool[pos] != out_ing) begin
            failures++;
            $display("payload changed for ING %0d", out_ing.index);
          end
          // smallest among the held ones; the newest may still be staged
          for (int i = 0; i < pool.size() - 1; i++) begin
            if (i != pos && (pool[i].node < out_ing.node ||
                             (pool[i].node == out_ing.node && i < pos))) begin
              failures++;
              $display("ING %0d (node %0d) released before ING %0d (node %0d)",
                       out_ing.index, out_ing.node, pool[i].index, pool[i].node);
              break;
            end
          end
          pool.delete(pos);
        end
        released++;
      end
      if (in_valid && in_ready) begin
        pool.push_back(in_ing);
        sent++;
      end
      if (q_pop) drained++;
      if (evt_pop_full)  n_full++;
      if (evt_pop_empty) n_empty++;
      prod_on <= ($urandom_range(99) < in_pct);
      cons_on <= ($urandom_range(99) < out_pct);
    end
  end

  always @(posedge clk) if (in_valid && in_ready) in_ing <= make_ing(sent + 1);

  int r0, r1;
  initial begin
    in_ing = make_ing(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    // no stalls: one ING per cycle
    in_pct = 100;
    out_pct = 100;
    repeat (40) @(posedge clk);
    r0 = released;
    repeat (100) @(posedge clk);
    r1 = released;
    checks++;
    if (r1 - r0 < 100) begin
      failures++;
      $display("throughput %0d per 100 cycles", r1 - r0);
    end
    wait (sent == N);
    repeat (100) @(posedge clk);
    checks++;
    if (released != N || drained != N || pool.size() != 0) begin
      failures++;
      $display("lost INGs: sent %0d released %0d drained %0d held %0d", sent, released, drained, pool.size());
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("release causes: full %0d, empty-queue %0d", n_full, n_empty);
    end
    $display("release causes: full %0d, empty-queue %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
