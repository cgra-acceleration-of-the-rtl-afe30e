// tb_bh_sched: random can_progress and occupancy patterns for three
// configurations. A reference in the bench tracks the current configuration
// and the switch-wait counter and predicts, each cycle, en, active and
// whether a switch is decided: keep the current one while it can progress,
// otherwise move to the progressing one with the largest occupancy (lowest
// index on a tie), then stay idle SWITCH_CYCLES cycles.
module tb_bh_sched;
  localparam int NCFG = 3, OCC_W = 6, SW = 2;
  logic clk = 0, rst_n = 0;
  logic [NCFG-1:0] can_progress;
  logic [OCC_W-1:0] occupancy [NCFG];
  logic [1:0] active;
  logic en, evt_switch;
  int checks = 0, failures = 0, switches = 0;

  bh_sched #(.NCFG(NCFG), .OCC_W(OCC_W), .SWITCH_CYCLES(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cur = 0, wait_c = 0;
  initial begin
    can_progress = '0;
    foreach (occupancy[i]) occupancy[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int best, bocc;
      logic exp_en, exp_sw;
      @(negedge clk);
      for (int i = 0; i < NCFG; i++) begin
        can_progress[i] = ($urandom_range(99) < 60);
        occupancy[i]    = OCC_W'($urandom_range(63));
      end
      if (cyc % 7 == 0) occupancy[2] = occupancy[1];  // ties
      #1;
      best = -1; bocc = -1;
      for (int i = 0; i < NCFG; i++)
        if (i != cur && can_progress[i] && int'(occupancy[i]) > bocc) begin best = i; bocc = int'(occupancy[i]); end
      exp_en = (wait_c == 0) && can_progress[cur];
      exp_sw = (wait_c == 0) && !can_progress[cur] && (best >= 0);
      checks++;
      if (en != exp_en || evt_switch != exp_sw || int'(active) != cur) begin
        failures++;
        $display("cycle %0d: en %0d/%0d switch %0d/%0d active %0d/%0d", cyc, en, exp_en,
                 evt_switch, exp_sw, active, cur);
      end
      @(posedge clk);
      if (wait_c != 0) wait_c--;
      else if (exp_sw) begin cur = best; wait_c = SW; switches++; end
    end
    checks++;
    if (switches == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
