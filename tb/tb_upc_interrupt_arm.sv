// tb_upc_interrupt_arm: self-checking test of the two-phase threshold interrupt.
//
// Uses 8 counters and 8-bit high parts. Random arm updates (half of them with a value
// equal to the threshold), carry-outs, enables and disarms are applied; a reference model
// predicts each arm bit and the irq pulse one cycle after an armed, enabled carry-out.
// Counted mechanisms: arming, triggering, disarm of one counter, disarm of all.
module tb_upc_interrupt_arm;
  localparam int N = 8;
  localparam int HW = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  int_en = '0, rollover = '0;
  logic [HW-1:0] threshold_high = '0, arm_value = '0;
  logic          arm_upd = 1'b0, disarm = 1'b0, disarm_all = 1'b0;
  logic [2:0]    arm_idx = '0, disarm_idx = '0;
  logic [N-1:0]  armed;
  logic          irq;

  logic [N-1:0] m_armed = '0;
  logic         m_irq = 1'b0;
  int checks = 0, failures = 0;
  int n_arm = 0, n_fire = 0, n_dis = 0, n_disall = 0;

  upc_interrupt_arm #(.N_CNT(N), .HIGH_W(HW)) dut (
    .clk, .rst_n, .int_en, .rollover, .threshold_high, .arm_upd, .arm_idx, .arm_value,
    .disarm, .disarm_idx, .disarm_all, .armed, .irq);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      logic [N-1:0] fire;
      @(negedge clk);
      checks++;
      if (armed !== m_armed || irq !== m_irq) begin
        failures++;
        if (failures < 10) $display("cycle %0d: armed %b/%b irq %b/%b", cyc, armed, m_armed, irq, m_irq);
      end
      if (cyc % 500 == 0) threshold_high = HW'($urandom);
      int_en     = N'($urandom) | N'($urandom);
      rollover   = N'(($urandom % 4 == 0) ? (1 << ($urandom % N)) : 0);
      arm_upd    = ($urandom % 2) == 0;
      arm_idx    = 3'($urandom);
      arm_value  = ($urandom % 2) ? threshold_high : HW'($urandom);
      disarm     = ($urandom % 64) == 0;
      disarm_idx = 3'($urandom);
      disarm_all = ($urandom % 500) == 0;
      // model
      fire  = m_armed & int_en & rollover;
      m_irq = |fire;
      if (|fire) n_fire++;
      for (int i = 0; i < N; i++) begin
        if (fire[i] || disarm_all) begin
          if (disarm_all && m_armed[i]) n_disall++;
          m_armed[i] = 1'b0;
        end else if (disarm && disarm_idx == 3'(i)) begin
          if (m_armed[i]) n_dis++;
          m_armed[i] = 1'b0;
        end else if (arm_upd && arm_idx == 3'(i)) begin
          m_armed[i] = (arm_value == threshold_high) && int_en[i];
          if (m_armed[i]) n_arm++;
        end
      end
    end
    checks += 4;
    if (n_arm == 0)    begin failures++; $display("never armed"); end
    if (n_fire == 0)   begin failures++; $display("never fired"); end
    if (n_dis == 0)    begin failures++; $display("never disarmed one"); end
    if (n_disall == 0) begin failures++; $display("never disarmed all"); end
    $display("armed %0d, fired %0d, disarm %0d, disarm-all %0d", n_arm, n_fire, n_dis, n_disall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
