// bh_sched: greedy configuration scheduler of a PE.
//
// A PE holds several configurations (here the Barnes-Hut management and
// compute stages) and runs one at a time. The scheduler keeps the current
// configuration for as long as it can make progress. When it cannot, it
// picks, among the configurations that can, the one with the most entries
// waiting in its input queue (lowest index wins a tie), and switches to it.
// A switch costs SWITCH_CYCLES idle cycles plus the cycle of the decision,
// standing for swapping the configuration and its data in and out.
//
// Interface: can_progress[i] and occupancy[i] per configuration; active is
// the configuration selected, en is high in the cycles it may run;
// evt_switch pulses on each decision to switch.
// Greedy selection by largest input queue and running until no progress is
// possible follow the original design; the switch cost is this design's choice.
module bh_sched #(
  parameter int unsigned NCFG          = 2,
  parameter int unsigned OCC_W         = 9,
  parameter int unsigned SWITCH_CYCLES = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NCFG-1:0]         can_progress,
  input  logic [OCC_W-1:0]        occupancy [NCFG],
  output logic [$clog2(NCFG)-1:0] active,
  output logic                    en,
  output logic                    evt_switch
);

  localparam int unsigned AW = $clog2(NCFG);
  localparam int unsigned SW = $clog2(SWITCH_CYCLES + 2);

  logic [AW-1:0] cur, best;
  logic          best_found;
  logic [SW-1:0] wait_cnt;
  logic [OCC_W-1:0] best_occ;

  always_comb begin
    best       = cur;
    best_found = 1'b0;
    best_occ   = '0;
    for (int i = 0; i < NCFG; i++) begin
      if (AW'(i) != cur && can_progress[i] && (!best_found || occupancy[i] > best_occ)) begin
        best       = AW'(i);
        best_found = 1'b1;
        best_occ   = occupancy[i];
      end
    end
  end

  assign active     = cur;
  assign en         = (wait_cnt == '0) && can_progress[cur];
  assign evt_switch = (wait_cnt == '0) && !can_progress[cur] && best_found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur      <= '0;
      wait_cnt <= '0;
    end else if (wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
    end else if (evt_switch) begin
      cur      <= best;
      wait_cnt <= SW'(SWITCH_CYCLES);
    end
  end

endmodule
