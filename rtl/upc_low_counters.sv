// upc_low_counters: the register part of the hybrid counters.
//
// N_CNT counters of LOW_W bits each, all updated in parallel. A counter whose count
// enable is set adds one; when it is at its maximum it rolls over to zero, sets its carry
// latch and pulses its rollover output (the carry-out). The carry latch holds the carry
// until the maintenance state machine takes it (carry_clr); a new rollover in the same
// cycle wins over the clear, so no carry is lost. A load port writes one counter's value
// and clears its carry latch, for software writes and preloads. Counter, rollover and
// carry latch follow the unit's description; the load port and the set-over-clear rule
// are this design's choice.
//
// Timing: count_en in cycle t changes cnt and carry at the clock edge ending cycle t;
// rollover is combinational in cycle t.
module upc_low_counters
  import upc_pkg::*;
#(
  parameter int unsigned N_CNT = UPC_N_COUNTERS,
  parameter int unsigned LOW_W = UPC_LOW_W,
  localparam int unsigned IDX_W = $clog2(N_CNT)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_CNT-1:0]            count_en,
  // take one carry latch (maintenance state machine)
  input  logic                        carry_clr,
  input  logic [IDX_W-1:0]            carry_clr_idx,
  // write one counter (software write or preload); clears its carry latch
  input  logic                        load,
  input  logic [IDX_W-1:0]            load_idx,
  input  logic [LOW_W-1:0]            load_val,
  output logic [N_CNT-1:0][LOW_W-1:0] cnt,
  output logic [N_CNT-1:0]            carry,
  output logic [N_CNT-1:0]            rollover
);

  for (genvar i = 0; i < N_CNT; i++) begin : g_cnt
    logic wr_this, clr_this;
    assign wr_this     = load && (load_idx == IDX_W'(i));
    assign clr_this    = carry_clr && (carry_clr_idx == IDX_W'(i));
    assign rollover[i] = count_en[i] && !wr_this && (cnt[i] == '1);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i]   <= '0;
        carry[i] <= 1'b0;
      end else begin
        if (wr_this)          cnt[i] <= load_val;
        else if (count_en[i]) cnt[i] <= cnt[i] + LOW_W'(1);

        if (rollover[i])                carry[i] <= 1'b1;
        else if (wr_this || clr_this)   carry[i] <= 1'b0;
      end
    end
  end

endmodule
