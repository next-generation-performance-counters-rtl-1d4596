// tb_upc_mmio: self-checking test of the memory-mapped register interface.
//
// A small responder in the testbench stands in for the maintenance state machine on the
// counter access port: it acknowledges after a random delay and returns a value derived
// from the counter index, and it records writes. The test writes and reads back all 32
// configuration registers and checks every counter's decoded configuration, the
// start/stop and threshold registers (with the threshold-write pulse), an unmapped
// offset, and counter reads and writes being passed on with the right index and data.
module tb_upc_mmio;
  import upc_pkg::*;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                bus_req = 1'b0, bus_we = 1'b0, bus_ack;
  logic [11:0]         bus_addr = '0;
  logic [63:0]         bus_wdata = '0, bus_rdata;
  upc_cfg_t [255:0]    cfg;
  logic                run, threshold_wr;
  logic [63:0]         threshold;
  logic                acc_req, acc_we;
  logic                acc_ack = 1'b0;
  logic [7:0]          acc_idx;
  logic [63:0]         acc_wdata, acc_rdata = '0;

  upc_mmio dut (.clk, .rst_n, .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata,
                .cfg, .run, .threshold, .threshold_wr, .acc_req, .acc_we, .acc_idx, .acc_wdata,
                .acc_ack, .acc_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_thr_pulse = 0;
  logic [63:0] wrote [256];
  bit          was_written [256];

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

  // counter access responder
  initial begin
    forever begin
      @(negedge clk);
      acc_ack = 1'b0;
      if (acc_req) begin
        logic       we;
        logic [7:0] idx;
        logic [63:0] wd;
        we = acc_we; idx = acc_idx; wd = acc_wdata;
        repeat ($urandom % 6) @(negedge clk);
        if (we) begin
          wrote[idx] = wd;
          was_written[idx] = 1'b1;
        end else begin
          acc_rdata = {idx, 24'hC0FFEE, 24'h0, ~idx};
        end
        acc_ack = 1'b1;
      end
    end
  end

  always @(posedge clk) if (threshold_wr) n_thr_pulse++;

  task automatic bus(input logic we, input logic [11:0] a, input logic [63:0] wd, output logic [63:0] rd);
    int n;
    bus_req = 1'b1; bus_we = we; bus_addr = a; bus_wdata = wd;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!bus_ack && n < 50);
    chk(bus_ack, $sformatf("no acknowledge for address %h", a));
    rd = bus_rdata;
    bus_req = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [63:0] rd;
    logic [63:0] cfg_val [32];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(run == 1'b0 && cfg == '0 && threshold == '0, "registers not reset to 0");

    for (int r = 0; r < 32; r++) begin
      cfg_val[r] = {$urandom, $urandom};
      bus(1'b1, 12'h800 + 12'(r * 8), cfg_val[r], rd);
    end
    for (int r = 0; r < 32; r++) begin
      logic [63:0] exp_rd;
      exp_rd = cfg_val[r] & {8{8'h1F}};
      bus(1'b0, 12'h800 + 12'(r * 8), '0, rd);
      chk(rd == exp_rd, $sformatf("config %0d reads %h expected %h", r, rd, exp_rd));
      for (int k = 0; k < 8; k++) begin
        logic [7:0] f;
        f = cfg_val[r][8*k +: 8];
        chk(cfg[r*8+k].sel == f[1:0] && cfg[r*8+k].mode == upc_mode_e'(f[3:2]) &&
            cfg[r*8+k].int_en == f[4], $sformatf("counter %0d configuration", r * 8 + k));
      end
    end

    bus(1'b1, 12'h900, 64'h1, rd);
    chk(run == 1'b1, "run not set");
    bus(1'b0, 12'h900, '0, rd);
    chk(rd == 64'h1, "start/stop reads back wrong");
    bus(1'b1, 12'h900, 64'h2, rd);
    chk(run == 1'b0, "run not cleared");

    bus(1'b1, 12'h910, 64'h0123_4567_89AB_C000, rd);
    chk(threshold == 64'h0123_4567_89AB_C000, "threshold not written");
    chk(n_thr_pulse == 1, $sformatf("%0d threshold write pulses", n_thr_pulse));
    bus(1'b0, 12'h910, '0, rd);
    chk(rd == 64'h0123_4567_89AB_C000, "threshold reads back wrong");

    bus(1'b0, 12'h9F0, '0, rd);
    chk(rd == '0, "unmapped offset does not read 0");

    for (int n = 0; n < 200; n++) begin
      logic [7:0] idx;
      idx = 8'($urandom);
      if ($urandom % 2) begin
        logic [63:0] v;
        v = {$urandom, $urandom};
        was_written[idx] = 1'b0;
        bus(1'b1, {1'b0, idx, 3'b000}, v, rd);
        chk(was_written[idx] && wrote[idx] == v, $sformatf("counter %0d write not passed on", idx));
      end else begin
        bus(1'b0, {1'b0, idx, 3'b000}, '0, rd);
        chk(rd == {idx, 24'hC0FFEE, 24'h0, ~idx}, $sformatf("counter %0d read %h", idx, rd));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
