// tb_bh_drm: drives the DRM with a stream of (address, tag) requests from a
// random-rate producer, a memory model with latency and random refusals and a
// randomly stalling consumer. Every output must carry the tag of the next
// request in order and the memory word at that request's address
// (word = address * 7 + 3). A second phase without stalls checks that the
// DRM keeps several fetches in flight and streams one word per cycle.
module tb_bh_drm;
  localparam int N = 3000;
  localparam int MAX_OUT = 8;
  localparam int LAT = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_addr, out_data;
  logic [15:0] in_tag, out_tag;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr, mem_rsp_data;
  int checks = 0, failures = 0;
  int stall_pct = 20;
  int max_inflight = 0;

  bh_drm #(.TAG_T(logic [15:0]), .DATA_T(logic [31:0]), .ADDR_W(32), .MAX_OUT(MAX_OUT)) dut (.*);

  bh_mem_model #(.T(logic [31:0]), .DEPTH(1024), .LATENCY(LAT), .STALL_PCT(20), .SEED(5)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_addr (mem_req_addr),
    .rsp_valid (mem_rsp_valid), .rsp_data (mem_rsp_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] req_addr_q [$];
  logic [15:0] req_tag_q  [$];
  int sent, got;
  logic prod_on, cons_on;

  // producer: a show-ahead queue head
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      sent <= sent + 1;
      in_addr <= 32'($urandom_range(1023));
      in_tag  <= 16'(sent + 1);
    end
  end
  assign in_valid  = rst_n && (sent < 2 * N) && prod_on;
  assign out_ready = cons_on;

  always_ff @(posedge clk) begin
    prod_on <= ($urandom_range(99) >= stall_pct);
    cons_on <= ($urandom_range(99) >= stall_pct);
    if (dut.in_flight > max_inflight) max_inflight <= int'(dut.in_flight);
  end

  // record issued requests, check outputs
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      req_addr_q.push_back(in_addr);
      req_tag_q.push_back(in_tag);
    end
    if (rst_n && out_valid && out_ready) begin
      checks++;
      got++;
      if (req_tag_q.size() == 0) begin
        failures++;
        $display("output without request");
      end else begin
        logic [31:0] a;
        logic [15:0] t;
        a = req_addr_q.pop_front();
        t = req_tag_q.pop_front();
        if (out_tag !== t || out_data !== a * 7 + 3) begin
          failures++;
          $display("mismatch: tag %0d/%0d data %h/%h", out_tag, t, out_data, a * 7 + 3);
        end
      end
    end
  end

  int t0, t1;
  initial begin
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = 32'(i * 7 + 3);
    sent = 0; got = 0; in_addr = 32'd17; in_tag = 16'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N);
    // phase 2: no stalls anywhere
    @(negedge clk);
    stall_pct = 0;
    u_mem.stall_off = 1;
    repeat (LAT + 4) @(posedge clk);
    t0 = got;
    repeat (200) @(posedge clk);
    t1 = got;
    checks++;
    if (t1 - t0 < 195) begin
      failures++;
      $display("throughput: %0d words in 200 cycles", t1 - t0);
    end
    checks++;
    if (max_inflight < LAT) begin
      failures++;
      $display("at most %0d fetches in flight", max_inflight);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
