// upc_interrupt_arm: two-phase threshold interrupt (arm, then trigger).
//
// Comparing all 64-bit counters with a threshold every cycle would need a comparator per
// counter. Instead the maintenance state machine, when it visits a counter, presents the
// counter's high-order value; one shared equality comparator checks it against the high
// 52 bits of the threshold register, and the counter's arm bit is set if they match and
// the counter has its interrupt enabled (cleared otherwise). The next carry-out of an armed,
// enabled low-order counter raises the interrupt and disarms that counter, so each arming
// gives one notification. With a threshold of 4096*n the interrupt therefore comes when the
// counter reaches 4096*(n+1); preloading the low-order counter with 4096-m moves it to
// 4096*n+m of counted events. The arm-then-trigger scheme and the shared comparator follow
// the unit's description; disarming on trigger, the one-cycle irq pulse and the
// disarm ports for software writes are this design's choice.
//
// Timing: arm_upd in cycle t sets or clears the arm bit at the edge ending cycle t. A
// rollover of an armed counter in cycle t gives irq = 1 in cycle t+1.
module upc_interrupt_arm
  import upc_pkg::*;
#(
  parameter int unsigned N_CNT  = UPC_N_COUNTERS,
  parameter int unsigned HIGH_W = UPC_HIGH_W,
  localparam int unsigned IDX_W = $clog2(N_CNT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_CNT-1:0]  int_en,         // per-counter interrupt enable
  input  logic [N_CNT-1:0]  rollover,       // carry-out of each low-order counter
  input  logic [HIGH_W-1:0] threshold_high, // threshold register bits 63:12
  // from the maintenance state machine: counter arm_idx now holds high part arm_value
  input  logic              arm_upd,
  input  logic [IDX_W-1:0]  arm_idx,
  input  logic [HIGH_W-1:0] arm_value,
  // software wrote one counter / the threshold: drop the affected arm bits
  input  logic              disarm,
  input  logic [IDX_W-1:0]  disarm_idx,
  input  logic              disarm_all,
  output logic [N_CNT-1:0]  armed,
  output logic              irq             // one-cycle interrupt pulse
);

  logic              match;
  logic [N_CNT-1:0]  fire;

  assign match = (arm_value == threshold_high);
  assign fire  = armed & int_en & rollover;

  for (genvar i = 0; i < N_CNT; i++) begin : g_arm
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                     armed[i] <= 1'b0;
      else if (fire[i] || disarm_all)                 armed[i] <= 1'b0;
      else if (disarm && disarm_idx == IDX_W'(i))     armed[i] <= 1'b0;
      else if (arm_upd && arm_idx == IDX_W'(i))       armed[i] <= match && int_en[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= |fire;
  end

endmodule
