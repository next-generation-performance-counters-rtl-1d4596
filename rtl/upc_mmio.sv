// upc_mmio: memory-mapped register interface of the performance counter unit.
//
// Software reaches the unit through 64-bit registers at byte offsets:
//   0x000-0x7F8  the counters, one 64-bit word each (counter i at 8*i). A read returns
//                the full 64-bit count; a write sets it (low 12 bits go to the
//                low-order counter, the rest to the SRAM). These are passed on to the
//                maintenance state machine, which owns the SRAM port.
//   0x800-0x8F8  configuration registers. Counters are grouped eight to a register;
//                counter i has the 8-bit field at bits 8*(i%8) of register i/8:
//                bits 1:0 input select, 3:2 signal-level mode, 4 interrupt enable,
//                7:5 reserved (read as 0).
//   0x900        start/stop register: bit 0 = run (1 = all counters count).
//   0x910        threshold register (64 bits); its bits 63:12 are compared.
// Other offsets read as 0 and ignore writes. The regions, the grouping of counters under
// shared configuration registers, the per-counter fields and the separate start/stop
// register follow the unit's description and its memory map; the field layout and the
// 0x910 offset are this design's choice. All registers reset to 0 (counting stopped).
//
// Bus handshake: the master holds bus_req, bus_we, bus_addr and bus_wdata until bus_ack, a
// one-cycle pulse with bus_rdata valid, and may start the next access in the cycle after.
// Register accesses are acknowledged 1 cycle after the request, counter accesses 2 to 7
// cycles after it, depending on where the maintenance slot stands.
module upc_mmio
  import upc_pkg::*;
#(
  parameter int unsigned N_CNT = UPC_N_COUNTERS,
  localparam int unsigned IDX_W = $clog2(N_CNT),
  localparam int unsigned PER_REG = UPC_DATA_W / UPC_CFG_FIELD_W,
  localparam int unsigned N_CFG = (N_CNT + PER_REG - 1) / PER_REG
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // processor bus
  input  logic                   bus_req,
  input  logic                   bus_we,
  input  logic [UPC_ADDR_W-1:0]  bus_addr,
  input  logic [UPC_DATA_W-1:0]  bus_wdata,
  output logic                   bus_ack,
  output logic [UPC_DATA_W-1:0]  bus_rdata,
  // register contents
  output upc_cfg_t [N_CNT-1:0]   cfg,
  output logic                   run,
  output logic [UPC_DATA_W-1:0]  threshold,
  output logic                   threshold_wr,   // pulse: threshold written
  // counter access, to the maintenance state machine
  output logic                   acc_req,
  output logic                   acc_we,
  output logic [IDX_W-1:0]       acc_idx,
  output logic [UPC_DATA_W-1:0]  acc_wdata,
  input  logic                   acc_ack,
  input  logic [UPC_DATA_W-1:0]  acc_rdata
);

  logic is_cnt, is_cfg, is_ss, is_thr, local_acc;
  logic [IDX_W-1:0] cnt_idx;
  logic [7:0]       cfg_idx;

  assign is_cnt  = (bus_addr[11] == UPC_ADDR_COUNTERS[11]) && (int'(bus_addr[10:3]) < N_CNT);
  assign is_cfg  = (bus_addr[11:8] == UPC_ADDR_CONFIG[11:8]) && (int'(bus_addr[7:3]) < N_CFG);
  assign is_ss   = (bus_addr[11:3] == UPC_ADDR_STARTSTOP[11:3]);
  assign is_thr  = (bus_addr[11:3] == UPC_ADDR_THRESHOLD[11:3]);
  assign cnt_idx = IDX_W'(bus_addr[10:3]);
  assign cfg_idx = {3'b000, bus_addr[7:3]};

  assign acc_req   = bus_req && is_cnt && !bus_ack;
  assign acc_we    = bus_we;
  assign acc_idx   = cnt_idx;
  assign acc_wdata = bus_wdata;
  assign local_acc = bus_req && !is_cnt && !bus_ack;

  // configuration register cfg_idx read back as 64 bits
  logic [UPC_DATA_W-1:0] cfg_rd;
  always_comb begin
    cfg_rd = '0;
    for (int k = 0; k < PER_REG; k++) begin
      if (int'(cfg_idx) * PER_REG + k < N_CNT)
        cfg_rd[k*UPC_CFG_FIELD_W +: UPC_CFG_W] = cfg[int'(cfg_idx) * PER_REG + k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= '0;
      run          <= 1'b0;
      threshold    <= '0;
      threshold_wr <= 1'b0;
      bus_ack      <= 1'b0;
      bus_rdata    <= '0;
    end else begin
      bus_ack      <= 1'b0;
      threshold_wr <= 1'b0;
      if (acc_ack) begin
        bus_ack   <= 1'b1;
        bus_rdata <= acc_rdata;
      end else if (local_acc) begin
        bus_ack   <= 1'b1;
        bus_rdata <= '0;
        if (bus_we) begin
          if (is_cfg) begin
            for (int k = 0; k < PER_REG; k++) begin
              if (int'(cfg_idx) * PER_REG + k < N_CNT)
                cfg[int'(cfg_idx) * PER_REG + k] <= bus_wdata[k*UPC_CFG_FIELD_W +: UPC_CFG_W];
            end
          end
          if (is_ss) run <= bus_wdata[0];
          if (is_thr) begin
            threshold    <= bus_wdata;
            threshold_wr <= 1'b1;
          end
        end else begin
          if (is_cfg) bus_rdata <= cfg_rd;
          if (is_ss)  bus_rdata <= {63'd0, run};
          if (is_thr) bus_rdata <= threshold;
        end
      end
    end
  end

  // The master holds its request stable until it is acknowledged.
  property p_bus_stable;
    @(posedge clk) disable iff (!rst_n)
      bus_req && !bus_ack |=> bus_ack || (bus_req && $stable(bus_we) && $stable(bus_addr));
  endproperty
  a_bus_stable: assert property (p_bus_stable);

endmodule
