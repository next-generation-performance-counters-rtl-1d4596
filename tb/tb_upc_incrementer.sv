// tb_upc_incrementer: self-checking test of the shared 52-bit incrementer.
//
// Random and corner-case words (all ones, zero, carries across every byte) are applied
// with inc 0 and 1; the sum, the regenerated even parity and the parity check of the
// input word are compared with values computed in the testbench.
module tb_upc_incrementer;
  logic [52:0] word_in;
  logic        inc;
  logic [51:0] value_out;
  logic [52:0] word_out;
  logic        parity_err;
  int checks = 0, failures = 0;

  upc_incrementer dut (.word_in, .inc, .value_out, .word_out, .parity_err);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(input logic [51:0] v, input logic flip, input logic c);
    logic [51:0] exp_v;
    logic        p;
    p       = 1'b0;
    for (int b = 0; b < 52; b++) p ^= v[b];
    word_in = {p ^ flip, v};
    inc     = c;
    #1;
    exp_v   = c ? v + 52'd1 : v;
    p       = 1'b0;
    for (int b = 0; b < 52; b++) p ^= exp_v[b];
    checks++;
    if (value_out !== exp_v || word_out !== {p, exp_v} || parity_err !== flip) begin
      failures++;
      if (failures < 10)
        $display("v=%h inc=%b flip=%b: value_out=%h word_out=%h perr=%b", v, c, flip,
                 value_out, word_out, parity_err);
    end
  endtask

  initial begin
    try_one('1, 1'b0, 1'b1);
    try_one('0, 1'b0, 1'b1);
    try_one('0, 1'b1, 1'b0);
    for (int b = 0; b < 52; b++) try_one((52'd1 << b) - 52'd1, 1'b0, 1'b1);
    for (int n = 0; n < 2000; n++)
      try_one({20'($urandom), $urandom}, ($urandom % 5) == 0, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
