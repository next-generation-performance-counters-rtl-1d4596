// tb_upc_low_counters: self-checking test of the low-order counter bank.
//
// Uses 8 counters of 4 bits so that rollovers are frequent. Each cycle it drives random
// count enables, carry clears and loads, checks the combinational rollover outputs, and
// after the clock edge checks every counter value and carry latch against a reference
// model. Counted mechanisms: rollover, carry clear, carry set winning over a clear in the
// same cycle, and load.
module tb_upc_low_counters;
  localparam int N = 8;
  localparam int W = 4;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]      count_en = '0;
  logic              carry_clr = 1'b0, load = 1'b0;
  logic [2:0]        carry_clr_idx = '0, load_idx = '0;
  logic [W-1:0]      load_val = '0;
  logic [N-1:0][W-1:0] cnt;
  logic [N-1:0]      carry, rollover;

  logic [W-1:0] m_cnt [N];
  logic         m_carry [N];
  int checks = 0, failures = 0;
  int n_roll = 0, n_clr = 0, n_setwin = 0, n_load = 0;

  upc_low_counters #(.N_CNT(N), .LOW_W(W)) dut (
    .clk, .rst_n, .count_en, .carry_clr, .carry_clr_idx, .load, .load_idx, .load_val,
    .cnt, .carry, .rollover);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m_cnt[i] = '0; m_carry[i] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        chk(cnt[i] == m_cnt[i], $sformatf("cnt[%0d]=%0d expected %0d", i, cnt[i], m_cnt[i]));
        chk(carry[i] == m_carry[i], $sformatf("carry[%0d]=%b expected %b", i, carry[i], m_carry[i]));
      end
      count_en      = N'($urandom) | N'($urandom);
      carry_clr     = ($urandom % 3) == 0;
      carry_clr_idx = 3'($urandom);
      load          = ($urandom % 16) == 0;
      load_idx      = 3'($urandom);
      load_val      = W'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        logic ld, cl, ro;
        ld = load && load_idx == 3'(i);
        cl = carry_clr && carry_clr_idx == 3'(i);
        ro = count_en[i] && !ld && m_cnt[i] == '1;
        chk(rollover[i] == ro, $sformatf("rollover[%0d]=%b expected %b", i, rollover[i], ro));
        if (ro) n_roll++;
        if (ro && cl) n_setwin++;
        if (cl && m_carry[i] && !ro) n_clr++;
        if (ld) n_load++;
        if (ld)               m_cnt[i] = load_val;
        else if (count_en[i]) m_cnt[i] = m_cnt[i] + 1'b1;
        if (ro)            m_carry[i] = 1'b1;
        else if (ld || cl) m_carry[i] = 1'b0;
      end
    end
    chk(n_roll > 0,   "no rollover seen");
    chk(n_clr > 0,    "no carry clear seen");
    chk(n_setwin > 0, "no set-over-clear seen");
    chk(n_load > 0,   "no load seen");
    $display("rollovers %0d, clears %0d, set-over-clear %0d, loads %0d", n_roll, n_clr, n_setwin, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
