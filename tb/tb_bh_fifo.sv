// tb_bh_fifo: checks the queue against a reference queue under random
// push/pop traffic, including push and pop together on a full queue.
module tb_bh_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [15:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];
  int full_pushpop = 0;

  bh_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // check state against model
      checks++;
      if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
        failures++;
        $display("count mismatch: dut %0d model %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin
          failures++;
          $display("data mismatch: dut %h model %h", dout, model[0]);
        end
      end
      // phases: fill-biased, drain-biased, balanced
      case ((cyc / 500) % 3)
        0: begin push = ($urandom_range(99) < 80); pop = ($urandom_range(99) < 30); end
        1: begin push = ($urandom_range(99) < 30); pop = ($urandom_range(99) < 80); end
        default: begin push = ($urandom_range(99) < 60); pop = ($urandom_range(99) < 60); end
      endcase
      if (model.size() == 0) pop = 0;
      if (model.size() == DEPTH && !pop) push = 0;
      din = 16'($urandom);
      if (model.size() == DEPTH && push && pop) full_pushpop++;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (full_pushpop == 0) begin
      failures++;
      $display("push+pop on a full queue never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
