// upc_top: hybrid performance counter unit with 256 concurrent 64-bit counters.
//
// Every counter is built from a 12-bit low-order counter in flip-flops, which can count
// an event every cycle, and a 52-bit high-order part in one word of a 256-entry SRAM.
// A low-order counter that wraps sets a carry latch; a maintenance state machine visits
// the 256 SRAM words round robin, 16 cycles each, so each is visited every 4096 cycles -
// no faster than a 12-bit counter can wrap - and adds pending carries to the SRAM with one
// shared incrementer. During the same visit the high part is compared with a threshold to
// arm the counter's interrupt; the counter's next wrap then raises it.
//
// Each counter picks one of four event lines (1024 lines in all: counter i watches
// events[4*i +: 4]) and counts it in one of four signal-level modes. All counters start
// and stop together through the start/stop register. Software sees the counters,
// configuration, start/stop and threshold registers in a 64-bit memory map (see upc_mmio).
// The split of the counters, the SRAM size, the slot length, the single incrementer, the
// arm-then-trigger interrupt and the register set follow the unit's description; the
// parity code, the reset sweep of the SRAM, the bus handshake and the register layout are
// this design's choice.
//
// Interface: events are sampled on the rising clock edge; irq is a one-cycle pulse
// one cycle after an armed counter wraps; parity_error is sticky until reset. init_done
// rises N_COUNTERS cycles after reset, when the SRAM has been cleared.
module upc_top
  import upc_pkg::*;
#(
  parameter int unsigned N_COUNTERS = UPC_N_COUNTERS,
  parameter int unsigned LOW_W      = UPC_LOW_W,
  localparam int unsigned N_EVENTS  = N_COUNTERS * UPC_IN_PER_CNT,
  localparam int unsigned HIGH_W    = UPC_CNT_W - LOW_W,
  localparam int unsigned IDX_W     = $clog2(N_COUNTERS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_EVENTS-1:0]   events,
  input  logic                  bus_req,
  input  logic                  bus_we,
  input  logic [UPC_ADDR_W-1:0] bus_addr,
  input  logic [UPC_DATA_W-1:0] bus_wdata,
  output logic                  bus_ack,
  output logic [UPC_DATA_W-1:0] bus_rdata,
  output logic                  irq,
  output logic                  parity_error,
  output logic                  init_done
);

  upc_cfg_t [N_COUNTERS-1:0]             cfg;
  logic                                  run;
  logic [UPC_DATA_W-1:0]                 threshold;
  logic                                  threshold_wr;
  logic                                  acc_req, acc_we, acc_ack;
  logic [IDX_W-1:0]                      acc_idx;
  logic [UPC_DATA_W-1:0]                 acc_wdata, acc_rdata;
  logic [N_COUNTERS-1:0]                 count_en, carry, rollover, int_en, armed;
  logic [N_COUNTERS-1:0][LOW_W-1:0]      low_cnt;
  logic                                  carry_clr, load;
  logic [IDX_W-1:0]                      carry_clr_idx, load_idx;
  logic [LOW_W-1:0]                      load_val;
  logic                                  sram_re, sram_we;
  logic [IDX_W-1:0]                      sram_addr;
  logic [HIGH_W:0]                       sram_wdata, sram_rdata;
  logic                                  arm_upd, disarm;
  logic [IDX_W-1:0]                      arm_idx, disarm_idx;
  logic [HIGH_W-1:0]                     arm_value;

  upc_mmio #(.N_CNT(N_COUNTERS)) u_mmio (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata,
    .cfg, .run, .threshold, .threshold_wr,
    .acc_req, .acc_we, .acc_idx, .acc_wdata, .acc_ack, .acc_rdata
  );

  for (genvar i = 0; i < N_COUNTERS; i++) begin : g_in
    assign int_en[i] = cfg[i].int_en;
    upc_event_input #(.N_IN(UPC_IN_PER_CNT)) u_in (
      .clk, .rst_n,
      .events  (events[i*UPC_IN_PER_CNT +: UPC_IN_PER_CNT]),
      .sel     (cfg[i].sel),
      .mode    (cfg[i].mode),
      .run,
      .count_en(count_en[i])
    );
  end

  upc_low_counters #(.N_CNT(N_COUNTERS), .LOW_W(LOW_W)) u_low (
    .clk, .rst_n, .count_en,
    .carry_clr, .carry_clr_idx, .load, .load_idx, .load_val,
    .cnt(low_cnt), .carry, .rollover
  );

  upc_sram #(.DEPTH(N_COUNTERS), .WIDTH(HIGH_W + 1)) u_sram (
    .clk, .re(sram_re), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata)
  );

  upc_maint_fsm #(.N_CNT(N_COUNTERS), .LOW_W(LOW_W), .HIGH_W(HIGH_W)) u_fsm (
    .clk, .rst_n,
    .carry, .low_cnt, .int_en,
    .carry_clr, .carry_clr_idx, .load, .load_idx, .load_val,
    .sram_re, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .arm_upd, .arm_idx, .arm_value, .disarm, .disarm_idx,
    .acc_req, .acc_we, .acc_idx, .acc_wdata, .acc_ack, .acc_rdata,
    .init_done, .parity_error
  );

  upc_interrupt_arm #(.N_CNT(N_COUNTERS), .HIGH_W(HIGH_W)) u_irq (
    .clk, .rst_n, .int_en, .rollover,
    .threshold_high(threshold[UPC_CNT_W-1:LOW_W]),
    .arm_upd, .arm_idx, .arm_value,
    .disarm, .disarm_idx, .disarm_all(threshold_wr),
    .armed, .irq(irq)
  );

endmodule
