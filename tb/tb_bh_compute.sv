// tb_bh_compute: random (ING, node, body) triples through the compute stage,
// with the stage enable, the producer and the consumer stalling at random.
// The expected next node index and gradient are computed here in double
// precision from the same inputs: opening test size/dist < 0.5, force
// m*d/(|d|^2+eps^2)^1.5 with eps = 1/16. Gradients must agree within
// 2^-12 plus 1e-4 of the force. A final phase checks the 2-cycle latency.
module tb_bh_compute;
  import bh_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic en, in_valid, in_ready, out_valid, out_ready, busy;
  logic evt_leaf, evt_skip, evt_recurse;
  compute_in_t in_data;
  ing_t out_ing;
  int checks = 0, failures = 0;
  int n_leaf = 0, n_skip = 0, n_rec = 0;
  int stall_pct = 25;

  bh_compute dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_r(fix_t v);
    return real'(v) / 65536.0;
  endfunction

  function automatic fix_t rnd_fix(int lo, int hi);  // uniform in [lo, hi) units
    return fix_t'($urandom_range(32'((hi - lo) * 65536 - 1))) + fix_t'(lo * 65536);
  endfunction

  function automatic compute_in_t make_in(int i);
    compute_in_t c;
    c.ing.index      = idx_t'(i);
    c.ing.node       = idx_t'($urandom_range(1000));
    c.ing.gradient.x = rnd_fix(-4, 4);
    c.ing.gradient.y = rnd_fix(-4, 4);
    c.ing.gradient.z = rnd_fix(-4, 4);
    c.body.x = rnd_fix(-32, 32);
    c.body.y = rnd_fix(-32, 32);
    c.body.z = rnd_fix(-32, 32);
    c.node.is_leaf = ($urandom_range(2) == 0);
    c.node.skip    = c.ing.node + idx_t'($urandom_range(1, 200));
    c.node.mass    = rnd_fix(0, 16);
    c.node.com.x   = rnd_fix(-32, 32);
    c.node.com.y   = rnd_fix(-32, 32);
    c.node.com.z   = rnd_fix(-32, 32);
    c.node.size    = rnd_fix(0, 64);
    if (i % 50 == 0) c.node.com = c.body;   // zero distance
    return c;
  endfunction

  compute_in_t sent_q [$];
  int sent = 0, got = 0;
  logic prod_on = 0, cons_on = 0, en_on = 0;

  assign in_valid  = rst_n && prod_on && (sent < N);
  assign out_ready = cons_on;
  assign en        = en_on;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent_q.push_back(in_data);
        sent++;
      end
      if (out_valid && out_ready) begin
        compute_in_t c;
        real dx, dy, dz, d2, r2, f, s, ex, ey, ez, tol;
        logic leaf, far;
        idx_t enode;
        c  = sent_q.pop_front();
        got++;
        dx = to_r(c.node.com.x) - to_r(c.body.x);
        dy = to_r(c.node.com.y) - to_r(c.body.y);
        dz = to_r(c.node.com.z) - to_r(c.body.z);
        d2 = dx * dx + dy * dy + dz * dz;
        s  = to_r(c.node.size);
        leaf = c.node.is_leaf;
        far  = (s * s < 0.25 * d2);
        enode = (!leaf && far) ? c.node.skip : c.ing.node + 1;
        ex = to_r(c.ing.gradient.x);
        ey = to_r(c.ing.gradient.y);
        ez = to_r(c.ing.gradient.z);
        f  = 0.0;
        if (leaf || far) begin
          r2 = d2 + 1.0 / 256.0;
          f  = to_r(c.node.mass) / (r2 * $sqrt(r2));
          ex += f * dx;
          ey += f * dy;
          ez += f * dz;
        end
        if (leaf) n_leaf++; else if (far) n_skip++; else n_rec++;
        tol = 1.0 / 4096.0 + 1e-4 * f * $sqrt(d2);
        checks++;
        if (out_ing.index != c.ing.index || out_ing.node != enode) begin
          failures++;
          $display("ING %0d: node %0d expected %0d", out_ing.index, out_ing.node, enode);
        end
        checks++;
        if ((to_r(out_ing.gradient.x) - ex) > tol || (ex - to_r(out_ing.gradient.x)) > tol ||
            (to_r(out_ing.gradient.y) - ey) > tol || (ey - to_r(out_ing.gradient.y)) > tol ||
            (to_r(out_ing.gradient.z) - ez) > tol || (ez - to_r(out_ing.gradient.z)) > tol) begin
          failures++;
          $display("ING %0d: gradient (%f %f %f) expected (%f %f %f)", out_ing.index,
                   to_r(out_ing.gradient.x), to_r(out_ing.gradient.y), to_r(out_ing.gradient.z),
                   ex, ey, ez);
        end
      end
      prod_on <= ($urandom_range(99) >= stall_pct);
      cons_on <= ($urandom_range(99) >= stall_pct);
      en_on   <= ($urandom_range(99) >= stall_pct);
    end
  end

  always @(posedge clk) if (in_valid && in_ready) in_data <= make_in(sent + 1);

  int t_in, t_out;
  initial begin
    in_data = make_in(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N);
    // latency: one ING into an empty, always-enabled stage
    stall_pct = 0;
    @(posedge clk);
    @(negedge clk);
    en_on = 1; cons_on = 1; prod_on = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("stage not empty"); end
    force in_valid = 1'b1;
    t_in = $time;
    @(posedge clk);
    @(negedge clk);
    release in_valid;
    force prod_on = 1'b0;
    while (!out_valid) @(negedge clk);
    t_out = $time;
    checks++;
    if ((t_out - t_in) / 10 != 2) begin
      failures++;
      $display("latency %0d cycles, expected 2", (t_out - t_in) / 10);
    end
    @(posedge clk);
    checks++;
    if (n_leaf == 0 || n_skip == 0 || n_rec == 0) begin
      failures++;
    end
    $display("leaf %0d skip %0d recurse %0d", n_leaf, n_skip, n_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
