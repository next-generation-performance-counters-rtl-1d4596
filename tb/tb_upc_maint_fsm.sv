// tb_upc_maint_fsm: self-checking test of the maintenance state machine.
//
// The state machine runs with the real low-order counter bank and SRAM, scaled to 4
// counters of 6 low-order bits (so one round of 4 slots of 16 cycles is 64 = 2^6 cycles,
// the same 16-cycle slot as the full unit) and 58 high-order bits. The testbench counts
// events per counter itself and checks:
//   - after reset the SRAM sweep leaves every counter reading 0;
//   - with counter 0 counting every cycle (the maximum rate) and the others at random,
//     a carry latch is never left set longer than one round, and software reads taken
//     during counting lie between the reference counts at request and at acknowledge;
//   - after counting stops, every counter reads back exactly (no carry lost);
//   - software writes, including values just below a low-order wrap, read back exactly
//     and keep counting correctly;
//   - arm updates carry the counter's current high part;
//   - every access is acknowledged within one slot plus two cycles;
//   - a word with bad parity sets parity_error.
module tb_upc_maint_fsm;
  localparam int N = 4;
  localparam int LW = 6;
  localparam int HW = 58;
  localparam int SLOT = 16;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]          count_en = '0, int_en = '0;
  logic [N-1:0]          carry, rollover;
  logic [N-1:0][LW-1:0]  low_cnt;
  logic                  carry_clr, load;
  logic [1:0]            carry_clr_idx, load_idx;
  logic [LW-1:0]         load_val;
  logic                  sram_re, sram_we;
  logic [1:0]            sram_addr;
  logic [HW:0]           sram_wdata, sram_rdata;
  logic                  arm_upd, disarm;
  logic [1:0]            arm_idx, disarm_idx;
  logic [HW-1:0]         arm_value;
  logic                  acc_req = 1'b0, acc_we = 1'b0, acc_ack;
  logic [1:0]            acc_idx = '0;
  logic [63:0]           acc_wdata = '0, acc_rdata;
  logic                  init_done, parity_error;

  upc_low_counters #(.N_CNT(N), .LOW_W(LW)) u_low (
    .clk, .rst_n, .count_en, .carry_clr, .carry_clr_idx, .load, .load_idx, .load_val,
    .cnt(low_cnt), .carry, .rollover);

  upc_sram #(.DEPTH(N), .WIDTH(HW + 1)) u_sram (
    .clk, .re(sram_re), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  upc_maint_fsm #(.N_CNT(N), .LOW_W(LW), .HIGH_W(HW)) dut (
    .clk, .rst_n, .carry, .low_cnt, .int_en, .carry_clr, .carry_clr_idx, .load, .load_idx,
    .load_val, .sram_re, .sram_we, .sram_addr, .sram_wdata, .sram_rdata, .arm_upd, .arm_idx,
    .arm_value, .disarm, .disarm_idx, .acc_req, .acc_we, .acc_idx, .acc_wdata, .acc_ack,
    .acc_rdata, .init_done, .parity_error);

  always #5 clk = ~clk;

  longint unsigned ref_cnt [N];
  int carry_age [N];
  int checks = 0, failures = 0;
  int n_reads = 0, n_writes = 0, n_arms = 0, n_services = 0, max_lat = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference counts, carry latch age and arm values, updated at each clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (count_en[i] && !(load && load_idx == 2'(i))) ref_cnt[i] += 1;
        carry_age[i] = carry[i] ? carry_age[i] + 1 : 0;
        if (carry_age[i] > N * SLOT + 1)
          chk(1'b0, $sformatf("carry of counter %0d pending %0d cycles", i, carry_age[i]));
      end
      if (carry_clr) n_services++;
      if (arm_upd) begin
        longint unsigned hi;
        hi = ref_cnt[arm_idx] >> LW;
        n_arms++;
        chk(arm_value == HW'(hi) || arm_value + 1 == HW'(hi),
            $sformatf("arm value %0d for counter %0d, reference high part %0d", arm_value, arm_idx, hi));
      end
    end
  end

  task automatic access(input logic we, input logic [1:0] idx, input logic [63:0] wd,
                        output logic [63:0] rd, output longint unsigned lo, output longint unsigned hi);
    int lat;
    acc_req = 1'b1; acc_we = we; acc_idx = idx; acc_wdata = wd;
    lo = ref_cnt[idx];
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!acc_ack && lat < 100);
    hi = ref_cnt[idx];
    rd = acc_rdata;
    acc_req = 1'b0;
    if (lat > max_lat) max_lat = lat;
    chk(lat <= SLOT + 2, $sformatf("access latency %0d", lat));
    if (we) n_writes++; else n_reads++;
  endtask

  task automatic read_exact(input logic [1:0] idx);
    logic [63:0] rd;
    longint unsigned lo, hi;
    access(1'b0, idx, '0, rd, lo, hi);
    chk(rd == lo, $sformatf("counter %0d reads %0d expected %0d", idx, rd, lo));
  endtask

  task automatic quiesce();
    count_en = '0;
    repeat (2 * N * SLOT + 4) @(negedge clk);
  endtask

  task automatic count_phase(input int cycles);
    logic [63:0] rd;
    longint unsigned lo, hi;
    for (int c = 0; c < cycles; c++) begin
      count_en = {1'($urandom), 1'($urandom % 8 != 0), 1'($urandom % 4 != 0), 1'b1};
      if ($urandom % 40 == 0) begin
        access(1'b0, 2'($urandom), '0, rd, lo, hi);
        chk(rd >= lo && rd <= hi, $sformatf("read %0d outside [%0d,%0d]", rd, lo, hi));
      end else begin
        @(negedge clk);
      end
    end
  endtask

  initial begin
    logic [63:0] rd;
    longint unsigned lo, hi;
    for (int i = 0; i < N; i++) begin ref_cnt[i] = 0; carry_age[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    int_en = 4'b0101;
    wait (init_done);
    @(negedge clk);
    for (int i = 0; i < N; i++) read_exact(2'(i));

    count_phase(20000);
    quiesce();
    for (int i = 0; i < N; i++) read_exact(2'(i));

    // software writes; one value just below a low-order wrap
    for (int i = 0; i < N; i++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      if (i == 1) v[LW-1:0] = '1 - 2;
      access(1'b1, 2'(i), v, rd, lo, hi);
      ref_cnt[i] = v;
    end
    for (int i = 0; i < N; i++) read_exact(2'(i));
    count_phase(3000);
    quiesce();
    for (int i = 0; i < N; i++) read_exact(2'(i));

    // a stored word with bad parity
    chk(!parity_error, "parity error before corruption");
    u_sram.mem[2] = u_sram.mem[2] ^ {1'b1, {HW{1'b0}}};
    access(1'b0, 2'd2, '0, rd, lo, hi);
    @(negedge clk);
    chk(parity_error, "parity error not flagged");

    chk(n_services > 0, "no carry serviced");
    chk(n_arms > 0, "no arm update");
    $display("reads %0d writes %0d services %0d arm updates %0d max latency %0d",
             n_reads, n_writes, n_services, n_arms, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
