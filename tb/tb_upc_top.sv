// tb_upc_top: end-to-end test of the performance counter unit at its full size
// (256 counters, 1024 event lines, 12 + 52 bit counters, no parameter overrides).
//
// The test programs the unit only through its memory-mapped bus, as software would:
// random input select and mode for every counter, a threshold, preloaded counter values,
// then start. For the 1024 event lines it drives random values each cycle, except two
// lines held at 1 so that two counters count at the maximum rate of one event per cycle.
// An independent model counts every counter's events. The test checks:
//   - counters read while counting lie between the model counts at request and acknowledge;
//   - after stop, nothing counts, and after two maintenance rounds every counter reads
//     exactly its model count (no carry lost across more than three wraps);
//   - a counter preloaded with 4096-m and a threshold of 4096*n gives exactly one
//     interrupt, when it has counted 4096*n+m events;
//   - a stored word with bad parity raises parity_error.
// Each mechanism is counted and must have happened: all four signal-level modes, all four
// input selects, carry service, arming, the interrupt, bus accesses that waited for the
// maintenance state machine, start/stop, and the parity check.
module tb_upc_top;
  import upc_pkg::*;

  localparam int N = 256;
  localparam int THR_N = 2;      // threshold 4096*THR_N
  localparam int THR_M = 100;    // notify at 4096*THR_N + THR_M events
  localparam int IRQ_CNT = 3;    // counter used for the threshold interrupt

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [1023:0] events = '0;
  logic          bus_req = 1'b0, bus_we = 1'b0, bus_ack;
  logic [11:0]   bus_addr = '0;
  logic [63:0]   bus_wdata = '0, bus_rdata;
  logic          irq, parity_error, init_done;

  upc_top dut (.clk, .rst_n, .events, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack,
               .bus_rdata, .irq, .parity_error, .init_done);

  always #5 clk = ~clk;

  // model state
  longint unsigned ref_cnt [N];
  logic [1:0] m_sel [N];
  upc_mode_e  m_mode [N];
  logic       m_cur [N], m_prev [N];
  logic       m_run = 1'b0;

  int checks = 0, failures = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_sel [4] = '{0, 0, 0, 0};
  int n_service = 0, n_arm = 0, n_irq = 0, n_wait = 0, n_stop = 0, n_parity = 0;
  int n_reads = 0;
  longint unsigned irq_at = 0;

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

  // Model of every counter, advanced at each clock edge. The start/stop bit is taken
  // over from the write the test makes, one cycle after it is acknowledged.
  always @(posedge clk) begin
    if (rst_n) begin
      if (irq) begin
        n_irq++;
        irq_at = ref_cnt[IRQ_CNT];
      end
      for (int i = 0; i < N; i++) begin
        logic en;
        unique case (m_mode[i])
          MODE_LEVEL_HIGH: en = m_cur[i];
          MODE_LEVEL_LOW:  en = !m_cur[i];
          MODE_RISE:       en = m_cur[i] && !m_prev[i];
          default:         en = !m_cur[i] && m_prev[i];
        endcase
        if (en && m_run) begin
          ref_cnt[i] += 1;
          n_mode[m_mode[i]]++;
          n_sel[m_sel[i]]++;
        end
        m_prev[i] = m_cur[i];
        m_cur[i]  = events[4*i + m_sel[i]];
      end
    end
  end

  // mechanisms seen inside the unit
  always @(negedge clk) begin
    if (rst_n && dut.u_fsm.carry_clr) n_service++;
    if (rst_n && dut.u_irq.arm_upd && dut.u_irq.match && dut.u_irq.int_en[dut.u_irq.arm_idx]) n_arm++;
  end

  task automatic bus(input logic we, input logic [11:0] a, input logic [63:0] wd,
                     output logic [63:0] rd, output longint unsigned lo, output longint unsigned hi);
    int n;
    bus_req = 1'b1; bus_we = we; bus_addr = a; bus_wdata = wd;
    lo = (a < 12'h800) ? ref_cnt[a[10:3]] : 0;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!bus_ack && n < 100);
    chk(bus_ack, $sformatf("no acknowledge for address %h", a));
    if (n > 3) n_wait++;
    hi = (a < 12'h800) ? ref_cnt[a[10:3]] : 0;
    rd = bus_rdata;
    bus_req = 1'b0;
  endtask

  task automatic wr(input logic [11:0] a, input logic [63:0] wd);
    logic [63:0] rd;
    longint unsigned lo, hi;
    bus(1'b1, a, wd, rd, lo, hi);
  endtask

  task automatic set_run(input logic r);
    wr(UPC_ADDR_STARTSTOP, {63'd0, r});
    @(posedge clk);
    m_run = r;            // the register changed at the edge ending the acknowledge cycle
    @(negedge clk);
  endtask

  task automatic drive_events();
    for (int w = 0; w < 32; w++) events[32*w +: 32] = $urandom;
    events[0] = 1'b1;                               // counter 0: select 0
    events[4*IRQ_CNT + 2] = 1'b1;                   // threshold counter: select 2
  endtask

  initial begin
    logic [63:0] rd, cfg_word;
    longint unsigned lo, hi;

    for (int i = 0; i < N; i++) begin
      ref_cnt[i] = 0;
      m_sel[i] = 2'($urandom);
      m_mode[i] = upc_mode_e'(2'($urandom));
      m_cur[i] = 1'b0; m_prev[i] = 1'b0;
    end
    m_sel[0] = 2'd0;        m_mode[0] = MODE_LEVEL_HIGH;
    m_sel[IRQ_CNT] = 2'd2;  m_mode[IRQ_CNT] = MODE_LEVEL_HIGH;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(negedge clk);

    // configuration: eight 8-bit fields per register, interrupt only on IRQ_CNT
    for (int r = 0; r < N / 8; r++) begin
      cfg_word = '0;
      for (int k = 0; k < 8; k++) begin
        int i;
        i = r * 8 + k;
        cfg_word[8*k +: 8] = {3'b000, 1'(i == IRQ_CNT), m_mode[i], m_sel[i]};
      end
      wr(UPC_ADDR_CONFIG + 12'(8 * r), cfg_word);
    end
    wr(UPC_ADDR_THRESHOLD, 64'(4096 * THR_N));

    // preloads: the threshold counter, and a few counters just below a low-order wrap
    wr(12'(8 * IRQ_CNT), 64'(4096 - THR_M));
    ref_cnt[IRQ_CNT] = 4096 - THR_M;
    for (int i = 8; i < 16; i++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      v[11:0] = 12'hFF0;
      wr(12'(8 * i), v);
      ref_cnt[i] = v;
    end

    // count
    drive_events();
    set_run(1'b1);
    for (int c = 0; c < 14000; c++) begin
      drive_events();
      if ($urandom % 50 == 0) begin
        int i;
        i = $urandom % N;
        bus(1'b0, 12'(8 * i), '0, rd, lo, hi);
        chk(rd >= lo && rd <= hi, $sformatf("counter %0d read %0d outside [%0d,%0d]", i, rd, lo, hi));
        n_reads++;
      end else begin
        @(negedge clk);
      end
    end

    // stop: nothing may count any more
    set_run(1'b0);
    bus(1'b0, 12'h000, '0, rd, lo, hi);
    begin
      logic [63:0] first;
      first = rd;
      repeat (1000) begin drive_events(); @(negedge clk); end
      bus(1'b0, 12'h000, '0, rd, lo, hi);
      chk(rd == first, $sformatf("counter 0 moved from %0d to %0d while stopped", first, rd));
      if (rd == first) n_stop++;
    end

    // two maintenance rounds, then every counter exactly
    repeat (2 * 4096 + 16) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      bus(1'b0, 12'(8 * i), '0, rd, lo, hi);
      chk(rd == ref_cnt[i], $sformatf("counter %0d reads %0d expected %0d", i, rd, ref_cnt[i]));
    end

    // threshold interrupt: exactly once, at 4096*(THR_N+1) stored = 4096*THR_N+THR_M events
    chk(n_irq == 1, $sformatf("%0d interrupts, expected 1", n_irq));
    chk(irq_at == 4096 * (THR_N + 1),
        $sformatf("interrupt when the counter held %0d, expected %0d", irq_at, 4096 * (THR_N + 1)));

    // parity protection of the SRAM words
    chk(!parity_error, "parity error without corruption");
    dut.u_sram.mem[5] = dut.u_sram.mem[5] ^ (53'd1 << 52);
    bus(1'b0, 12'(8 * 5), '0, rd, lo, hi);
    @(negedge clk);
    chk(parity_error, "corrupted word not flagged");
    if (parity_error) n_parity++;

    for (int m = 0; m < 4; m++) chk(n_mode[m] > 0, $sformatf("mode %0d never counted", m));
    for (int s = 0; s < 4; s++) chk(n_sel[s] > 0, $sformatf("select %0d never counted", s));
    chk(n_service > 0, "no carry serviced");
    chk(n_arm > 0, "no counter armed");
    chk(n_irq > 0, "no interrupt");
    chk(n_wait > 0, "no bus access waited for the state machine");
    chk(n_stop > 0, "stop not seen");
    chk(n_parity > 0, "parity check not seen");
    $display("modes %0d/%0d/%0d/%0d selects %0d/%0d/%0d/%0d services %0d arms %0d irqs %0d waits %0d reads %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_sel[0], n_sel[1], n_sel[2], n_sel[3],
             n_service, n_arm, n_irq, n_wait, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
