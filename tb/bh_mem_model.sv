// bh_mem_model: behavioural memory for simulation only (not synthesizable).
//
// A word array of DEPTH entries of type T with one request/response port of
// the kind the DRMs use: a request is accepted when req_ready is high (the
// model refuses a request in roughly one cycle of STALL_PCT percent), and
// its word comes back LATENCY cycles later, in request order. The test
// bench fills mem[] directly before starting the design.
module bh_mem_model #(
  parameter type         T         = logic [31:0],
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned LATENCY   = 4,
  parameter int unsigned STALL_PCT = 20,
  parameter int unsigned SEED      = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  output logic        rsp_valid,
  output T            rsp_data
);

  T            mem [DEPTH];
  logic        pipe_v [LATENCY];
  T            pipe_d [LATENCY];
  int unsigned accepted;
  int unsigned stalls;
  bit          stall_off = 1'b0;  // set by a test bench to stop refusals

  initial begin
    void'($urandom(SEED));
    accepted = 0;
    stalls   = 0;
    req_ready = 1'b1;
  end

  assign rsp_valid = pipe_v[LATENCY-1];
  assign rsp_data  = pipe_d[LATENCY-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe_v[i] <= 1'b0;
      req_ready <= 1'b1;
    end else begin
      pipe_v[0] <= req_valid && req_ready;
      pipe_d[0] <= (req_addr < DEPTH) ? mem[req_addr] : T'(0);
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      if (req_valid && req_ready) accepted <= accepted + 1;
      if (req_valid && !req_ready) stalls <= stalls + 1;
      req_ready <= stall_off || ($urandom_range(99) >= STALL_PCT);
    end
  end

endmodule
