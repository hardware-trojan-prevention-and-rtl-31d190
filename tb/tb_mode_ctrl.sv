// tb_mode_ctrl: self-checking test of mode_ctrl.
//
// clk_main has a 10 ns period and clk_test a 2 ns period with an odd phase
// offset, so the two domains are unrelated. test_req is driven
// asynchronously: long requests, long releases, and bursts of short pulses.
// Checked:
//   * main_en and test_en are never high together (sampled just after every
//     edge of either clock), the rule that keeps the two designs from being
//     clocked at once;
//   * after a long request test mode is entered (test_en = 1, main_en = 0,
//     in_test = 1) within 60 ns, after a long release normal mode returns
//     (main_en = 1, test_en = 0) within 80 ns;
//   * reset returns normal mode.
// The numbers of entries into and exits from test mode are counted and both
// must be non-zero.
module tb_mode_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_main = 1'b0, clk_test = 1'b0;
  logic rst, test_req;
  logic main_en, test_en, in_test;
  int checks = 0, failures = 0;
  int entries = 0, exits = 0;

  initial forever #5 clk_main = ~clk_main;
  initial begin
    #0.37;
    forever #1 clk_test = ~clk_test;
  end

  mode_ctrl #(.SYNC_STAGES(2)) dut (.clk_main, .clk_test, .rst, .test_req,
                                    .main_en, .test_en, .in_test);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk_main or posedge clk_test) begin
    #0.05;
    if (!rst) check("main_en and test_en never together", !(main_en && test_en));
  end

  always @(posedge test_en) entries++;
  always @(negedge test_en) if (!rst) exits++;

  // wait until cond holds, at most limit ns; returns the time taken
  task automatic wait_mode(input bit want_test, input realtime limit, output realtime took);
    realtime t0;
    t0 = $realtime;
    while (!(want_test ? (test_en && !main_en && in_test) : (main_en && !test_en && !in_test))
           && ($realtime - t0) < limit)
      #0.1;
    took = $realtime - t0;
  endtask

  initial begin
    realtime took;
    rst = 1'b1; test_req = 1'b0;
    #43;
    rst = 1'b0;
    #20;
    check("normal mode after reset", main_en && !test_en && !in_test);

    for (int round = 0; round < 40; round++) begin
      // some short pulses on the request
      repeat ($urandom % 4) begin
        test_req = 1'b1;
        #($urandom % 7 + 0.3);
        test_req = 1'b0;
        #($urandom % 13 + 0.6);
      end
      // settle in normal mode
      wait_mode(1'b0, 200.0, took);
      check("back to normal mode after pulses", main_en && !test_en);

      // long request
      #($urandom % 10 + 0.2);
      test_req = 1'b1;
      wait_mode(1'b1, 60.0, took);
      check("test mode entered within 60 ns", took < 60.0);
      #($urandom % 100 + 5);
      check("test mode held", test_en && !main_en);

      // long release
      test_req = 1'b0;
      wait_mode(1'b0, 80.0, took);
      check("normal mode returned within 80 ns", took < 80.0);
      #($urandom % 50 + 5);
    end

    // reset in the middle of test mode
    test_req = 1'b1;
    wait_mode(1'b1, 60.0, took);
    rst = 1'b1;
    test_req = 1'b0;
    #40;
    check("reset returns normal mode", main_en && !test_en && !in_test);
    rst = 1'b0;

    check("test mode entered at least once", entries > 0);
    check("test mode left at least once", exits > 0);
    $display("mode switches: %0d entries, %0d exits", entries, exits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
