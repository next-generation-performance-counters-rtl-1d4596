// tb_upc_bt_events: the unit at full size running an event set like the one collected
// for the NAS BT benchmark on two processor cores: 62 counters, at counter IDs 0 to 119,
// for instruction pipes, FPU, L1 and L2 prefetch events of cores 0 and 1, all counted at
// once.
//
// Each event line is driven at random with a per-cycle probability proportional to the
// event's average count in that run (the largest, about 2.9e10 J-pipe add/subtract
// instructions, is taken as 1 event per cycle; rare events get at least 1 in 4096 per
// cycle). Other lines stay 0. After 30000 cycles counting stops and, after two
// maintenance rounds, every counter of the set must read exactly the number of events the
// testbench drove; counters outside the set must read 0.
module tb_upc_bt_events;
  import upc_pkg::*;

  localparam int NEV = 62;
  // counter IDs and average counts of the event set, core 0 then core 1
  localparam int ID [NEV] = '{
    0, 1, 2, 4, 5, 6, 7, 9, 15, 16, 17, 18, 20, 22, 23, 24, 25, 27, 28, 29, 31, 33,
    72, 74, 75, 76, 81, 83, 84, 86, 87,
    35, 36, 37, 39, 40, 41, 42, 44, 50, 51, 52, 53, 55, 57, 58, 59, 60, 62, 63, 64, 66, 68,
    104, 106, 107, 108, 113, 115, 116, 118, 119};
  localparam real AVG [NEV] = '{
    1.96e9, 2.87e10, 3.26e9, 7.7e9, 38224109.0, 1.05e10, 3.12e9, 1.32e10, 2.46e8, 1.06e10,
    5.5e9, 4.03e9, 20859131.0, 39898517.0, 2.24e8, 5.55e8, 8252723.0, 55481.0, 691425.0,
    1053207.0, 11050217.0, 36801959.0,
    91491349.0, 64467321.0, 61389539.0, 56301845.0, 4.14e8, 56667890.0, 3.34e8, 91515948.0,
    90846332.0,
    1.55e9, 2.93e10, 1.97e9, 7.07e9, 4772199.0, 1.17e10, 2.9e9, 1.23e10, 2.44e8, 1.15e10,
    5.84e9, 4.58e9, 4628756.0, 39834798.0, 2.23e8, 5.55e8, 8254148.0, 55861.0, 691476.0,
    1052646.0, 11041834.0, 36815807.0,
    89531718.0, 64296927.0, 60868353.0, 51160022.0, 4.87e8, 54606960.0, 3.43e8, 89553124.0,
    88933771.0};
  localparam real AVG_MAX = 2.93e10;
  localparam int CYCLES = 30000;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [1023:0] events = '0;
  logic          bus_req = 1'b0, bus_we = 1'b0, bus_ack;
  logic [11:0]   bus_addr = '0;
  logic [63:0]   bus_wdata = '0, bus_rdata;
  logic          irq, parity_error, init_done;

  upc_top dut (.clk, .rst_n, .events, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack,
               .bus_rdata, .irq, .parity_error, .init_done);

  always #5 clk = ~clk;

  int unsigned thr [NEV];            // probability x 65536
  longint unsigned driven [NEV];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input logic we, input logic [11:0] a, input logic [63:0] wd, output logic [63:0] rd);
    int n;
    bus_req = 1'b1; bus_we = we; bus_addr = a; bus_wdata = wd;
    n = 0;
    do begin @(negedge clk); n++; end while (!bus_ack && n < 100);
    chk(bus_ack, $sformatf("no acknowledge for %h", a));
    rd = bus_rdata;
    bus_req = 1'b0;
  endtask

  initial begin
    logic [63:0] rd;
    logic [63:0] cfg [32];
    bit in_set [256];
    for (int r = 0; r < 32; r++) cfg[r] = '0;
    for (int i = 0; i < 256; i++) in_set[i] = 1'b0;
    for (int e = 0; e < NEV; e++) begin
      int id;
      id = ID[e];
      thr[e] = int'(65536.0 * AVG[e] / AVG_MAX);
      if (thr[e] < 16) thr[e] = 16;
      driven[e] = 0;
      in_set[id] = 1'b1;
      // level high-active, input select = id % 4
      cfg[id / 8][8 * (id % 8) +: 8] = {3'b000, 1'b0, MODE_LEVEL_HIGH, 2'(id % 4)};
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(negedge clk);
    for (int r = 0; r < 32; r++) bus(1'b1, UPC_ADDR_CONFIG + 12'(8 * r), cfg[r], rd);
    bus(1'b1, UPC_ADDR_STARTSTOP, 64'd1, rd);

    // The event value driven in cycle c is sampled at its end and counted one cycle
    // later; the run bit is already set, and the lines return to 0 before the stop.
    for (int c = 0; c < CYCLES; c++) begin
      for (int e = 0; e < NEV; e++) begin
        logic v;
        v = ($urandom % 65536) < thr[e];
        events[4 * ID[e] + ID[e] % 4] = v;
        if (v) driven[e]++;
      end
      @(negedge clk);
    end
    events = '0;
    repeat (4) @(negedge clk);
    bus(1'b1, UPC_ADDR_STARTSTOP, 64'd0, rd);
    repeat (2 * 4096 + 16) @(negedge clk);

    for (int e = 0; e < NEV; e++) begin
      bus(1'b0, 12'(8 * ID[e]), '0, rd);
      chk(rd == driven[e], $sformatf("counter %0d reads %0d, %0d events driven", ID[e], rd, driven[e]));
    end
    for (int i = 0; i < 256; i++) begin
      if (!in_set[i]) begin
        bus(1'b0, 12'(8 * i), '0, rd);
        chk(rd == 0, $sformatf("unused counter %0d reads %0d", i, rd));
      end
    end
    // the two most frequent events wrapped their low-order counters several times
    chk(driven[1] > 4 * 4096 && driven[32] > 4 * 4096, "busiest events did not wrap");
    $display("J-pipe add/sub core 0: %0d, core 1: %0d events in %0d cycles", driven[1], driven[32], CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
