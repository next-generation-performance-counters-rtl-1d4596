// tb_upc_event_input: self-checking test of one counter's input stage.
//
// Random event lines, input select, mode and run bit are applied each cycle; the
// testbench keeps its own copy of the sampled and previous event value and checks the
// count enable for all four signal-level modes (level high, level low, rising, falling)
// and for the stopped state. Each mode is required to have produced a count at least once.
module tb_upc_event_input;
  import upc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] events = '0;
  logic [1:0] sel = '0;
  upc_mode_e  mode = MODE_LEVEL_HIGH;
  logic       run = 1'b0;
  logic       count_en;

  int checks = 0, failures = 0;
  int counted [4] = '{0, 0, 0, 0};
  logic m_cur = 1'b0, m_prev = 1'b0;

  upc_event_input dut (.clk, .rst_n, .events, .sel, .mode, .run, .count_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_en();
    unique case (mode)
      MODE_LEVEL_HIGH: return run &  m_cur;
      MODE_LEVEL_LOW:  return run & ~m_cur;
      MODE_RISE:       return run &  m_cur & ~m_prev;
      default:         return run & ~m_cur &  m_prev;
    endcase
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      checks++;
      if (count_en !== expect_en()) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: mode %s run %b cur %b prev %b: count_en %b", cyc, mode.name(),
                   run, m_cur, m_prev, count_en);
      end
      if (count_en) counted[mode]++;
      // new stimulus; the model follows what the coming clock edge does
      events = 4'($urandom);
      if (cyc % 50 == 0) begin
        sel  = 2'($urandom);
        mode = upc_mode_e'(2'($urandom));
      end
      run    = ($urandom % 8) != 0;
      m_prev = m_cur;
      m_cur  = events[sel];
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (counted[m] == 0) begin
        failures++;
        $display("mode %0d never counted", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
