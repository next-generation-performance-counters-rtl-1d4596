// upc_maint_fsm: maintenance state machine of the hybrid counter array.
//
// The state machine owns the single SRAM port and the shared incrementer. It walks the
// counter addresses round robin and gives each counter a slot of SLOT_CYCLES cycles, so
// every counter is visited once per N_CNT*SLOT_CYCLES = 2^LOW_W cycles: no low-order
// counter can carry out twice between two visits. In a slot:
//   phase 0 (CHECK):  look at the counter's carry latch. If it is set, or the counter's
//                     interrupt is enabled, read its SRAM word; take (clear) the carry.
//   phase 1 (UPDATE): add the carry with the shared incrementer, write the word back if
//                     the carry was set, and hand the new high part to the threshold
//                     comparator so the counter can be armed.
//   phases 2..SLOT_CYCLES-2 (ACCESS): the port is free for one software access to a
//                     counter. A read samples the low-order counter and its carry latch in
//                     the cycle the SRAM is read, so the 64-bit result {high + carry, low}
//                     is a consistent snapshot. A write sets both parts and clears the
//                     carry and the arm bit.
// After reset the machine first writes zero to every SRAM word (INIT), one per cycle.
// The round-robin walk, the 16-cycle slot and the read-increment-write of carried counters
// follow the unit's description; the phase layout, the software access window, the reset
// sweep and reading entries of interrupt-enabled counters to arm them are this design's
// choice.
//
// Software access handshake: acc_req is held with acc_we/acc_idx/acc_wdata stable until
// acc_ack, a one-cycle pulse; acc_rdata is valid with acc_ack. Latency is 1 to 6
// cycles.
module upc_maint_fsm
  import upc_pkg::*;
#(
  parameter int unsigned N_CNT       = UPC_N_COUNTERS,
  parameter int unsigned LOW_W       = UPC_LOW_W,
  parameter int unsigned HIGH_W      = UPC_HIGH_W,
  parameter int unsigned SLOT_CYCLES = (2 ** LOW_W) / N_CNT,
  localparam int unsigned IDX_W      = $clog2(N_CNT),
  localparam int unsigned PH_W       = $clog2(SLOT_CYCLES),
  localparam int unsigned CNT_W      = LOW_W + HIGH_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // low-order counters
  input  logic [N_CNT-1:0]            carry,
  input  logic [N_CNT-1:0][LOW_W-1:0] low_cnt,
  input  logic [N_CNT-1:0]            int_en,
  output logic                        carry_clr,
  output logic [IDX_W-1:0]            carry_clr_idx,
  output logic                        load,
  output logic [IDX_W-1:0]            load_idx,
  output logic [LOW_W-1:0]            load_val,
  // SRAM port
  output logic                        sram_re,
  output logic                        sram_we,
  output logic [IDX_W-1:0]            sram_addr,
  output logic [HIGH_W:0]             sram_wdata,
  input  logic [HIGH_W:0]             sram_rdata,
  // threshold arming
  output logic                        arm_upd,
  output logic [IDX_W-1:0]            arm_idx,
  output logic [HIGH_W-1:0]           arm_value,
  output logic                        disarm,
  output logic [IDX_W-1:0]            disarm_idx,
  // software counter access
  input  logic                        acc_req,
  input  logic                        acc_we,
  input  logic [IDX_W-1:0]            acc_idx,
  input  logic [CNT_W-1:0]            acc_wdata,
  output logic                        acc_ack,
  output logic [CNT_W-1:0]            acc_rdata,
  // status
  output logic                        init_done,
  output logic                        parity_error   // sticky: a word read had bad parity
);

  typedef enum logic [1:0] {ST_INIT, ST_CHECK, ST_UPDATE, ST_ACCESS} state_e;

  state_e            state;
  logic [PH_W-1:0]   phase_q;
  logic [IDX_W-1:0]  idx_q;
  logic              svc_read_q, svc_carry_q;
  logic              acc_busy_q;    // a software read waits for its SRAM data
  logic              acc_c_q;
  logic [LOW_W-1:0]  acc_low_q;

  // shared incrementer
  logic              inc_in;
  logic [HIGH_W-1:0] inc_value;
  logic [HIGH_W:0]   inc_word;
  logic              inc_perr;

  upc_incrementer #(.HIGH_W(HIGH_W)) u_inc (
    .word_in   (sram_rdata),
    .inc       (inc_in),
    .value_out (inc_value),
    .word_out  (inc_word),
    .parity_err(inc_perr)
  );

  // The phase decides the state once the reset sweep is over.
  always_comb begin
    if (!init_done)                         state = ST_INIT;
    else if (phase_q == '0)                 state = ST_CHECK;
    else if (phase_q == PH_W'(1))           state = ST_UPDATE;
    else                                    state = ST_ACCESS;
  end

  logic acc_start, acc_window;
  assign acc_window = (phase_q >= PH_W'(2)) && (phase_q <= PH_W'(SLOT_CYCLES - 2));
  assign acc_start  = (state == ST_ACCESS) && acc_window && acc_req && !acc_busy_q && !acc_ack;

  always_comb begin
    sram_re       = 1'b0;
    sram_we       = 1'b0;
    sram_addr     = idx_q;
    sram_wdata    = inc_word;
    carry_clr     = 1'b0;
    carry_clr_idx = idx_q;
    load          = 1'b0;
    load_idx      = acc_idx;
    load_val      = acc_wdata[LOW_W-1:0];
    arm_upd       = 1'b0;
    arm_idx       = idx_q;
    arm_value     = inc_value;
    disarm        = 1'b0;
    disarm_idx    = acc_idx;
    inc_in        = 1'b0;
    unique case (state)
      ST_INIT: begin
        sram_we    = 1'b1;
        sram_wdata = '0;          // zero value, even parity
      end
      ST_CHECK: begin
        sram_re   = carry[idx_q] || int_en[idx_q];
        carry_clr = carry[idx_q];
      end
      ST_UPDATE: begin
        inc_in  = svc_carry_q;
        sram_we = svc_carry_q;
        arm_upd = svc_read_q;
      end
      ST_ACCESS: begin
        if (acc_busy_q) inc_in = acc_c_q;
        if (acc_start) begin
          sram_addr = acc_idx;
          if (acc_we) begin
            sram_we    = 1'b1;
            sram_wdata = {^acc_wdata[CNT_W-1:LOW_W], acc_wdata[CNT_W-1:LOW_W]};
            load       = 1'b1;
            disarm     = 1'b1;
          end else begin
            sram_re    = 1'b1;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done     <= 1'b0;
      phase_q       <= '0;
      idx_q         <= '0;
      svc_read_q    <= 1'b0;
      svc_carry_q   <= 1'b0;
      acc_busy_q    <= 1'b0;
      acc_c_q       <= 1'b0;
      acc_low_q     <= '0;
      acc_ack       <= 1'b0;
      acc_rdata     <= '0;
      parity_error  <= 1'b0;
    end else begin
      acc_ack <= 1'b0;
      if (!init_done) begin
        idx_q <= idx_q + IDX_W'(1);
        if (idx_q == IDX_W'(N_CNT - 1)) init_done <= 1'b1;
      end else begin
        phase_q <= (phase_q == PH_W'(SLOT_CYCLES - 1)) ? '0 : phase_q + PH_W'(1);
        if (phase_q == PH_W'(SLOT_CYCLES - 1)) idx_q <= idx_q + IDX_W'(1);
      end

      if (state == ST_CHECK) begin
        svc_read_q  <= carry[idx_q] || int_en[idx_q];
        svc_carry_q <= carry[idx_q];
      end
      if (state == ST_UPDATE && svc_read_q && inc_perr) parity_error <= 1'b1;

      // software access
      if (acc_start) begin
        if (acc_we) begin
          acc_ack <= 1'b1;
        end else begin
          acc_busy_q <= 1'b1;
          acc_c_q    <= carry[acc_idx];
          acc_low_q  <= low_cnt[acc_idx];
        end
      end
      if (acc_busy_q) begin
        acc_busy_q <= 1'b0;
        acc_ack    <= 1'b1;
        acc_rdata  <= {inc_value, acc_low_q};
        if (inc_perr) parity_error <= 1'b1;
      end
    end
  end

  // The slot must hold the check, the update and one complete software access.
  initial assert (SLOT_CYCLES >= 4 && N_CNT * SLOT_CYCLES <= 2 ** LOW_W)
    else $error("upc_maint_fsm: SLOT_CYCLES=%0d cannot serve %0d counters of %0d bits",
                SLOT_CYCLES, N_CNT, LOW_W);

  // The requester holds its request stable until it is acknowledged (it may start the
  // next one in the cycle after the acknowledge).
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      acc_req && !acc_ack |=> acc_ack || (acc_req && $stable(acc_we) && $stable(acc_idx));
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
