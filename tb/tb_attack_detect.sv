// tb_attack_detect: the Trojan attacks of the method, replayed on full-size
// filler structures, with the response a tester would see.
//
// Instances, all on one 2 ns test clock:
//   top_gen   trojan_fill_top at its defaults, marked points driven by two
//             6-input LUTs of a stand-in main design with their genuine
//             contents;
//   top_att   the same, with both LUTs' contents set to zero (redesign attack
//             on the main design);
//   sr_short  the shift register with 1000 flip-flops omitted;
//   chain_m1  the default NOT-only gate chain with one stage omitted;
//   chain_m2  the same with two stages omitted;
//   chain_mix a 64-stage mixed NOT/AND/OR chain.
// Gate-type changes inside a chain (NOT -> AND, AND -> OR) are applied to a
// behavioural model of the chain, which is first checked to match the RTL.
// Each attack must be visible in at least one of: response time, output
// signature, port x. Expected results: removed flip-flops shorten the delay;
// with the alternating input 1010... one or two omitted NOT stages leave the
// output stream unchanged and only the delay shows them, while a random
// input stream exposes both in the signature;
// zeroed LUTs pin port x and the chain output to constants; a changed gate
// alters the signature. Power-based detection cannot be simulated here.
module tb_attack_detect;
  timeunit 1ns;
  timeprecision 1ps;
  import trojan_fill_pkg::*;

  localparam int unsigned N      = 4910;
  localparam int unsigned SR     = 15682;
  localparam int unsigned SR_CUT = 1000;
  localparam int unsigned NMIX   = 64;
  localparam logic [31:0] SEED   = 32'h1F2E_3D4C;
  localparam logic [63:0] LUT_A  = 64'h8F3C_D165_2A7B_E409;  // routed to port x
  localparam logic [63:0] LUT_B  = 64'hFFFF_FFFF_FFFF_FFFE;  // routed into the chain, 1 unless all inputs are 0

  logic clk_main = 1'b0, clk_test = 1'b0;
  logic rst, test_req;
  logic chain_in, sr_in;
  logic [5:0] lut_in;       // test vector applied to the main design

  int checks = 0, failures = 0;

  initial forever #5 clk_main = ~clk_main;
  initial begin
    #0.29;
    forever #1 clk_test = ~clk_test;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stand-in main design: two LUT6 ----------------
  logic [1:0] pts_gen, pts_att;
  assign pts_gen = {LUT_B[lut_in], LUT_A[lut_in]};
  assign pts_att = 2'b00;    // both LUTs' contents set to zero

  logic main_en_g, test_en_g, in_test_g, chain_out_g, sr_out_g;
  logic main_en_a, test_en_a, in_test_a, chain_out_a, sr_out_a;
  logic [0:0] x_g, x_a;

  trojan_fill_top top_gen (
    .clk_main, .clk_test, .rst, .test_req,
    .main_en(main_en_g), .test_en(test_en_g), .in_test(in_test_g),
    .marked_pts(pts_gen), .x(x_g),
    .chain_in, .chain_out(chain_out_g), .sr_in, .sr_out(sr_out_g));

  trojan_fill_top top_att (
    .clk_main, .clk_test, .rst, .test_req,
    .main_en(main_en_a), .test_en(test_en_a), .in_test(in_test_a),
    .marked_pts(pts_att), .x(x_a),
    .chain_in, .chain_out(chain_out_a), .sr_in, .sr_out(sr_out_a));

  logic sr_out_s, out_m1, out_m2, out_mix;

  fill_shift_reg #(.LEN(SR - SR_CUT)) sr_short (
    .clk(clk_test), .rst, .en(test_en_g), .din(sr_in), .dout(sr_out_s));

  gate_chain #(.N(N - 1)) chain_m1 (
    .clk(clk_test), .rst, .en(test_en_g), .din(chain_in), .pts(1'b1), .dout(out_m1));

  gate_chain #(.N(N - 2)) chain_m2 (
    .clk(clk_test), .rst, .en(test_en_g), .din(chain_in), .pts(1'b1), .dout(out_m2));

  gate_chain #(.N(NMIX), .MIXED(1'b1), .SEED(SEED), .NUM_TAPS(1)) chain_mix (
    .clk(clk_test), .rst, .en(test_en_g), .din(chain_in), .pts(1'b1), .dout(out_mix));

  // ---------------- behavioural chain model with one altered gate ----------------
  class chain_model;
    int    n;
    gate_e g  [];
    int    fb [];
    logic  q  [];
    function new(int n_, bit mixed, int alt_stage, gate_e alt_gate);
      n = n_;
      g = new[n]; fb = new[n]; q = new[n];
      for (int i = 0; i < n; i++) begin
        g[i]  = (tap_index(i, n, 1) >= 0) ? G_AND : stage_gate(i, mixed, SEED);
        fb[i] = (tap_index(i, n, 1) >= 0) ? -1 : int'(stage_fb(i, n, SEED));
        q[i]  = 1'b0;
      end
      if (alt_stage >= 0) begin
        g[alt_stage] = alt_gate;
        if (fb[alt_stage] < 0) fb[alt_stage] = int'(stage_fb(alt_stage, n, SEED));
      end
    endfunction
    function void step(logic d, logic pt);
      logic nx [];
      logic a, b;
      nx = new[n];
      for (int i = 0; i < n; i++) begin
        a = (i == 0) ? d : q[i-1];
        b = (fb[i] < 0) ? pt : q[fb[i]];
        case (g[i])
          G_AND:   nx[i] = a & b;
          G_OR:    nx[i] = a | b;
          default: nx[i] = !a;
        endcase
      end
      q = nx;
    endfunction
    function logic out();
      return q[n-1];
    endfunction
  endclass

  // last AND gate of the mixed chain that is not a tap: the AND -> OR target
  function automatic int last_and(int n);
    for (int i = n - 1; i >= 0; i--)
      if (tap_index(i, n, 1) < 0 && stage_gate(i, 1'b1, SEED) == G_AND) return i;
    return -1;
  endfunction

  chain_model m_not_ref, m_not_and, m_mix_ref, m_mix_or;

  // ---------------- stimulus ----------------
  int cyc;    // enabled test cycles since test mode started
  int sr_first_g, sr_first_s;
  int step_at, step_g, step_m1, step_m2;
  int diff_m1, diff_m2, diff_and, diff_or, model_bad;
  int rdiff_m1, rdiff_m2;
  int x_g_ones, x_a_ones, x_checks;
  int chain_g_tog, chain_a_tog;
  logic prev_g, prev_a;

  task automatic tcycle(input logic cin, input logic sin);
    logic en_now;
    en_now = test_en_g;
    chain_in = cin;
    sr_in    = sin;
    lut_in   = 6'($urandom % 63 + 1);   // test vector that keeps LUT_B at 1
    #0.5;
    check("port x shows the genuine LUT output", x_g === pts_gen[0]);
    if (en_now) begin
      m_not_ref.step(cin, pts_gen[1]);
      m_not_and.step(cin, pts_gen[1]);
      m_mix_ref.step(cin, 1'b1);
      m_mix_or.step(cin, 1'b1);
    end
    @(posedge clk_test);
    @(negedge clk_test);
    if (en_now) cyc++;
  endtask

  initial begin
    int an;
    an = last_and(NMIX);
    m_not_ref = new(N, 1'b0, -1, G_NOT);
    m_not_and = new(N, 1'b0, 100, G_AND);       // stage 100: NOT -> AND
    m_mix_ref = new(NMIX, 1'b1, -1, G_NOT);
    m_mix_or  = new(NMIX, 1'b1, an, G_OR);      // last AND -> OR
    rst = 1'b1; test_req = 1'b0; chain_in = 1'b0; sr_in = 1'b0; lut_in = '0;
    cyc = 0; sr_first_g = -1; sr_first_s = -1;
    step_g = -1; step_m1 = -1; step_m2 = -1;
    rdiff_m1 = 0; rdiff_m2 = 0;
    diff_m1 = 0; diff_m2 = 0; diff_and = 0; diff_or = 0; model_bad = 0;
    x_g_ones = 0; x_a_ones = 0; x_checks = 0; chain_g_tog = 0; chain_a_tog = 0;
    repeat (40) @(negedge clk_test);
    rst = 1'b0;
    repeat (2) @(negedge clk_test);
    test_req = 1'b1;
    while (!test_en_g) @(negedge clk_test);
    check("both tops enter test mode together", test_en_a && !main_en_g && !main_en_a);

    // phase 1: flush the chains with 0, shift register input held at 1
    while (cyc < int'(N) + 10) begin
      tcycle(1'b0, 1'b1);
      if (sr_first_s < 0 && sr_out_s) sr_first_s = cyc;
    end

    // phase 2: step the chain input to 1, measure delays
    step_at = cyc;
    while (cyc < step_at + int'(N) + 10) begin
      logic og, o1, o2;
      og = chain_out_g; o1 = out_m1; o2 = out_m2;
      tcycle(1'b1, 1'b1);
      if (step_g  < 0 && chain_out_g != og) step_g  = cyc - step_at;
      if (step_m1 < 0 && out_m1 != o1)      step_m1 = cyc - step_at;
      if (step_m2 < 0 && out_m2 != o2)      step_m2 = cyc - step_at;
      if (sr_first_s < 0 && sr_out_s) sr_first_s = cyc;
      if (sr_first_g < 0 && sr_out_g) sr_first_g = cyc;
    end

    // phase 3: periodic input 1010..., compare output signatures
    for (int t = 0; t < int'(N) + 2000; t++) begin
      tcycle(1'(t & 1), 1'b1);
      if (sr_first_g < 0 && sr_out_g) sr_first_g = cyc;
      if (sr_first_s < 0 && sr_out_s) sr_first_s = cyc;
      if (t >= int'(N) + 10) begin
        diff_m1  += int'(out_m1 != chain_out_g);
        diff_m2  += int'(out_m2 != chain_out_g);
        diff_and += int'(m_not_and.out() != chain_out_g);
        diff_or  += int'(m_mix_or.out() != out_mix);
      end
      model_bad += int'(m_not_ref.out() != chain_out_g) + int'(m_mix_ref.out() != out_mix);
      // tampered LUT: x and chain output of the attacked top
      x_checks++;
      x_g_ones += int'(x_g); x_a_ones += int'(x_a);
      if (t > 0) begin
        chain_g_tog += int'(chain_out_g != prev_g);
        chain_a_tog += int'(chain_out_a != prev_a);
      end
      prev_g = chain_out_g; prev_a = chain_out_a;
    end

    // phase 4: random input stream
    for (int t = 0; t < int'(N) + 500; t++) begin
      tcycle(1'($urandom), 1'b1);
      if (sr_first_g < 0 && sr_out_g) sr_first_g = cyc;
      if (t >= int'(N) + 10) begin
        rdiff_m1 += int'(out_m1 != chain_out_g);
        rdiff_m2 += int'(out_m2 != chain_out_g);
      end
    end

    // wait for the genuine shift register
    while (sr_first_g < 0 && cyc < int'(SR) + 100) begin
      tcycle(1'b0, 1'b1);
      if (sr_first_g < 0 && sr_out_g) sr_first_g = cyc;
    end

    $display("shift register delay: genuine %0d cycles (%0.2f us), 1000 FFs omitted %0d cycles (%0.2f us)",
             sr_first_g, sr_first_g * 0.002, sr_first_s, sr_first_s * 0.002);
    $display("chain step delay: genuine %0d, one stage omitted %0d, two omitted %0d",
             step_g, step_m1, step_m2);
    $display("signature bits differing from genuine: one omitted %0d, two omitted %0d, NOT->AND %0d, AND->OR (stage %0d of %0d) %0d",
             diff_m1, diff_m2, diff_and, an, NMIX, diff_or);
    $display("random input, signature bits differing: one omitted %0d, two omitted %0d", rdiff_m1, rdiff_m2);
    $display("LUT zeroed: x ones genuine %0d / attacked %0d of %0d; chain output toggles genuine %0d / attacked %0d",
             x_g_ones, x_a_ones, x_checks, chain_g_tog, chain_a_tog);

    check("models match the RTL chains", model_bad == 0);
    check("genuine shift register delay is SR", sr_first_g == int'(SR));
    check("removal of 1000 FFs shortens the delay by 1000", sr_first_s == int'(SR - SR_CUT));
    check("genuine chain delay is N", step_g == int'(N));
    check("one omitted stage: delay N-1", step_m1 == int'(N) - 1);
    check("two omitted stages: delay N-2", step_m2 == int'(N) - 2);
    check("1010 input: one omitted NOT stage hidden in the signature", diff_m1 == 0);
    check("1010 input: two omitted NOT stages hidden in the signature", diff_m2 == 0);
    check("random input: one omitted stage changes the signature", rdiff_m1 > 0);
    check("random input: two omitted stages change the signature", rdiff_m2 > 0);
    check("NOT -> AND changes the signature", diff_and > 0);
    check("AND -> OR changes the signature", diff_or > 0);
    check("genuine port x varies", x_g_ones > 0 && x_g_ones < x_checks);
    check("zeroed LUT pins port x to 0", x_a_ones == 0);
    check("genuine chain output toggles", chain_g_tog > 0);
    check("zeroed LUT pins the chain output", chain_a_tog == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_test);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
