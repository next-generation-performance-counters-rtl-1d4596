// tb_upc_sram: self-checking test of the high-order counter array.
//
// Writes every one of the 256 words, then issues random reads and writes against a
// reference array, checking that read data appears one cycle after the read and that the
// output holds its value while no read is issued.
module tb_upc_sram;
  logic        clk = 1'b0;
  logic        re = 1'b0, we = 1'b0;
  logic [7:0]  addr = '0;
  logic [52:0] wdata = '0;
  logic [52:0] rdata;
  logic [52:0] ref_mem [256];
  logic [52:0] last_read;
  logic        any_read = 1'b0;
  int checks = 0, failures = 0;

  upc_sram dut (.clk, .re, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; re = 1'b0; addr = 8'(a);
      wdata = {21'($urandom), $urandom};
      ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    last_read = '0;
    for (int n = 0; n < 5000; n++) begin
      int op;
      @(negedge clk);
      op = $urandom % 3;
      re = 1'b0; we = 1'b0;
      addr = 8'($urandom);
      if (op == 0) begin
        we = 1'b1;
        wdata = {21'($urandom), $urandom};
        ref_mem[addr] = wdata;
      end else if (op == 1) begin
        re = 1'b1;
        last_read = ref_mem[addr];
        any_read  = 1'b1;
      end
      @(posedge clk);
      #1;
      if (any_read) begin
        checks++;
        if (rdata !== last_read) begin
          failures++;
          if (failures < 10) $display("op %0d addr %0d: rdata %h expected %h", n, addr, rdata, last_read);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
