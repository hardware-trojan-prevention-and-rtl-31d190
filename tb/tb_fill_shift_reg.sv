// tb_fill_shift_reg: self-checking test of fill_shift_reg.
//
// A 37-flip-flop register is fed random bits with a random clock enable.
// A queue of the bits accepted on enabled cycles gives the expected output:
// dout must equal the bit accepted LEN enabled cycles earlier (the response
// time that exposes a removed flip-flop), must hold while en is low, and
// must read 0 for the first LEN enabled cycles after a reset.
module tb_fill_shift_reg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LEN = 37;

  logic clk = 1'b0;
  logic rst, en, din, dout;
  int checks = 0, failures = 0;
  int unsigned first_seen;   // enabled cycles until a 1 first reaches dout

  always #1 clk = ~clk;

  fill_shift_reg #(.LEN(LEN)) dut (.clk, .rst, .en, .din, .dout);

  logic q [$];   // bits inside the register, oldest first

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cycle(input logic r, input logic e, input logic d);
    rst = r; en = e; din = d;
    @(posedge clk);
    @(negedge clk);
    if (r) begin
      q.delete();
      for (int i = 0; i < LEN; i++) q.push_back(1'b0);
    end else if (e) begin
      q.push_back(d);
      void'(q.pop_front());
    end
    check("shift register output", dout, q[0]);
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; din = 1'b0;
    @(negedge clk);
    cycle(1'b1, 1'b0, 1'b0);

    // response time: a single 1 after reset reaches dout after LEN enabled edges
    first_seen = 0;
    cycle(1'b0, 1'b1, 1'b1);
    first_seen = 1;
    while (dout !== 1'b1 && first_seen < 4 * LEN) begin
      cycle(1'b0, 1'b1, 1'b0);
      first_seen++;
    end
    checks++;
    if (first_seen != LEN) begin
      failures++;
      $display("FAIL delay %0d cycles, expected %0d", first_seen, LEN);
    end
    $display("shift register delay %0d cycles", first_seen);

    // random stream with random enable and occasional reset
    for (int t = 0; t < 2000; t++)
      cycle(($urandom % 301) == 0, ($urandom % 4) != 0, 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
