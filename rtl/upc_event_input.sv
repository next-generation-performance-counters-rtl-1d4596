// upc_event_input: input stage of one counter.
//
// A 4:1 multiplexer picks one of the counter's four associated event lines, a register
// samples it, and a second register keeps the previous sample. The signal-level mode then
// turns the samples into a count enable: level high-active, level low-active, rising edge
// (0->1) or falling edge (1->0). Counting happens only while the global run bit is set.
// Input select and the four modes follow the unit's description; the register stage after
// the multiplexer and the mode encoding are this design's choice.
//
// Timing: an event value presented in cycle t gives count_en in cycle t+1 (level modes);
// an edge between cycles t-1 and t gives count_en in cycle t+1.
module upc_event_input
  import upc_pkg::*;
#(
  parameter int unsigned N_IN = UPC_IN_PER_CNT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_IN-1:0]           events,   // this counter's associated event lines
  input  logic [$clog2(N_IN)-1:0]   sel,      // which line to count
  input  upc_mode_e                 mode,     // signal-level mode
  input  logic                      run,      // global start/stop
  output logic                      count_en  // increment the low-order counter this cycle
);

  logic cur_q, prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= 1'b0;
      prev_q <= 1'b0;
    end else begin
      cur_q  <= events[sel];
      prev_q <= cur_q;
    end
  end

  always_comb begin
    unique case (mode)
      MODE_LEVEL_HIGH: count_en = run &  cur_q;
      MODE_LEVEL_LOW:  count_en = run & ~cur_q;
      MODE_RISE:       count_en = run &  cur_q & ~prev_q;
      MODE_FALL:       count_en = run & ~cur_q &  prev_q;
      default:         count_en = 1'b0;
    endcase
  end

endmodule
