// tb_trojan_fill_full: the end-to-end test of tb_trojan_fill_top, run on the
// wrapper at its default sizes (4910-stage gate chain, 15682-flip-flop shift
// register, one point to a port and one into the chain).
//
//
// Runs the test procedure of the method twice on the same input streams:
//   1. reset; normal mode: main_en = 1, the fillers are not clocked, so
//      their outputs must not move while their inputs toggle; the port-routed
//      marked points must appear on x;
//   2. request test mode; run a random bit stream through the gate chain and
//      the shift register. The chain output is compared every cycle with a
//      behavioural model of the chain; the shift register output with the
//      input delayed SR_LEN enabled cycles; the response time of the shift
//      register (first 1 in to first 1 out) must be SR_LEN cycles;
//   3. return to normal mode, reset, enter test mode again and repeat the
//      run with the chain-routed points stuck at 0, as a main-design LUT
//      altered by a Trojan would leave them. The model must still match, and
//      the recorded output stream must differ from the first run's (the
//      tampering is visible in the signature).
// Each mechanism (entry to test mode, exit from it, frozen fillers, port
// observation, shift-register response time, tamper visible in the chain
// signature) is counted and must occur at least once.
module tb_trojan_fill_full;
  timeunit 1ns;
  timeprecision 1ps;
  import trojan_fill_pkg::*;

  localparam int unsigned CHAIN_LEN     = 4910;
  localparam int unsigned SR_LEN        = 15682;
  localparam int unsigned NUM_PORT_PTS  = 1;
  localparam int unsigned NUM_CHAIN_PTS = 1;
  localparam logic [31:0] SEED          = 32'h1F2E_3D4C;
  localparam bit          MIXED         = 1'b0;
  localparam int unsigned NPTS          = NUM_PORT_PTS + NUM_CHAIN_PTS;
  localparam int unsigned RUN           = SR_LEN + CHAIN_LEN + 64;

  logic clk_main = 1'b0, clk_test = 1'b0;
  logic rst, test_req;
  logic main_en, test_en, in_test;
  logic [NPTS-1:0] marked_pts;
  logic [NUM_PORT_PTS-1:0] x;
  logic chain_in, chain_out, sr_in, sr_out;

  int checks = 0, failures = 0;
  int n_entry = 0, n_exit = 0, n_frozen = 0, n_port = 0, n_srdelay = 0, n_tamper = 0;

  initial forever #5 clk_main = ~clk_main;
  initial begin
    #0.29;
    forever #1 clk_test = ~clk_test;
  end

  // the wrapper at its default sizes; the constants above restate them
  trojan_fill_top dut (.*);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- behavioural model of the gate chain ----------------
  gate_e       g_tab  [CHAIN_LEN];
  int          b_tab  [CHAIN_LEN];   // >= 0: feedback stage, < 0: -(tap+1)
  logic        m      [CHAIN_LEN];

  function automatic void model_build();
    for (int unsigned i = 0; i < CHAIN_LEN; i++) begin
      int tap;
      tap = tap_index(i, CHAIN_LEN, NUM_CHAIN_PTS);
      g_tab[i] = (tap >= 0) ? G_AND : stage_gate(i, MIXED, SEED);
      b_tab[i] = (tap >= 0) ? -(tap + 1) : int'(stage_fb(i, CHAIN_LEN, SEED));
    end
  endfunction

  function automatic void model_step(input logic r, input logic e, input logic d,
                                     input logic [NUM_CHAIN_PTS-1:0] p);
    logic nx [CHAIN_LEN];
    logic a, b;
    for (int i = 0; i < int'(CHAIN_LEN); i++) begin
      a = (i == 0) ? d : m[i-1];
      b = (b_tab[i] < 0) ? p[-b_tab[i]-1] : m[b_tab[i]];
      if (r)       nx[i] = 1'b0;
      else if (!e) nx[i] = m[i];
      else case (g_tab[i])
        G_AND:   nx[i] = a & b;
        G_OR:    nx[i] = a | b;
        default: nx[i] = !a;
      endcase
    end
    m = nx;
  endfunction

  // ---------------- test-clock driver ----------------
  // Inputs change at negedge clk_test; what the DUT sampled at the posedge in
  // between is replayed into the model at the following negedge.
  logic r_q, c_q, en_q;
  logic [NUM_CHAIN_PTS-1:0] p_q;
  logic sr_hist [$];

  task automatic tclk(input logic cin, input logic sin);
    chain_in = cin;
    sr_in    = sin;
    r_q = rst;
    c_q = cin;
    p_q = marked_pts[NPTS-1:NUM_PORT_PTS];
    @(posedge clk_test);
    @(negedge clk_test);
  endtask

  task automatic step_models(input logic sin);
    model_step(r_q, en_q, c_q, p_q);
    if (r_q) begin
      sr_hist.delete();
      for (int i = 0; i < int'(SR_LEN); i++) sr_hist.push_back(1'b0);
    end else if (en_q) begin
      sr_hist.push_back(sin);
      void'(sr_hist.pop_front());
    end
  endtask

  // one test cycle with checks against the models
  task automatic tcycle(input logic cin, input logic sin);
    en_q = test_en;   // stable since the last posedge, sampled at the next
    tclk(cin, sin);
    step_models(sin);
    check("chain output matches model", chain_out === m[CHAIN_LEN-1]);
    check("shift register output is input delayed SR_LEN", sr_out === sr_hist[0]);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    test_req = 1'b0;
    repeat (40) tcycle(1'b0, 1'b0);
    rst = 1'b0;
    repeat (2) tcycle(1'b0, 1'b0);
  endtask

  task automatic enter_test();
    int n;
    test_req = 1'b1;
    n = 0;
    while (!test_en && n < 100) begin
      tcycle(1'($urandom), 1'($urandom));
      check("main design and fillers never enabled together", !(main_en && test_en));
      n++;
    end
    check("test mode entered", test_en && !main_en);
    if (test_en) n_entry++;
  endtask

  task automatic leave_test();
    int n;
    test_req = 1'b0;
    n = 0;
    while (!main_en && n < 200) begin
      tcycle(1'b0, 1'b0);
      n++;
    end
    check("normal mode returned", main_en && !test_en);
    if (main_en) n_exit++;
  endtask

  // normal-mode phase: fillers frozen, points visible on the ports
  task automatic normal_phase();
    logic co, so;
    co = chain_out;
    so = sr_out;
    for (int t = 0; t < 30; t++) begin
      marked_pts = NPTS'($urandom);
      tcycle(1'($urandom), 1'($urandom));
      check("normal mode: main design enabled", main_en && !test_en);
      check("normal mode: chain frozen", chain_out === co);
      check("normal mode: shift register frozen", sr_out === so);
      check("port routing: x shows marked points", x === marked_pts[NUM_PORT_PTS-1:0]);
      n_frozen++;
      n_port++;
    end
  endtask

  // one signature run in test mode with fixed chain points
  logic cin_s [RUN];
  logic sin_s [RUN];

  task automatic signature_run(input logic [NUM_CHAIN_PTS-1:0] cpts, output logic sig [RUN]);
    int first_out;
    first_out = -1;
    for (int t = 0; t < int'(RUN); t++) begin
      marked_pts = {cpts, NUM_PORT_PTS'($urandom)};
      tcycle(cin_s[t], sin_s[t]);
      check("test mode: x still shows marked points", x === marked_pts[NUM_PORT_PTS-1:0]);
      sig[t] = chain_out;
      if (first_out < 0 && sr_out) first_out = t + 1;
    end
    check("shift register response time", first_out == int'(SR_LEN));
    if (first_out == int'(SR_LEN)) n_srdelay++;
  endtask

  logic sig_a [RUN];
  logic sig_b [RUN];

  initial begin
    int diff;
    model_build();
    for (int i = 0; i < int'(CHAIN_LEN); i++) m[i] = 1'b0;
    for (int t = 0; t < int'(RUN); t++) begin
      cin_s[t] = 1'($urandom);
      sin_s[t] = (t == 0) ? 1'b1 : 1'($urandom);
    end
    rst = 1'b1; test_req = 1'b0; marked_pts = '0; chain_in = 1'b0; sr_in = 1'b0;

    // first run: genuine design
    do_reset();
    normal_phase();
    enter_test();
    signature_run('1, sig_a);
    leave_test();
    normal_phase();

    // second run: chain-routed points stuck at 0
    do_reset();
    enter_test();
    signature_run('0, sig_b);
    leave_test();

    diff = 0;
    for (int t = 0; t < int'(RUN); t++) diff += int'(sig_a[t] != sig_b[t]);
    check("stuck point changes the chain signature", diff > 0);
    if (diff > 0) n_tamper++;

    $display("mechanisms: entries=%0d exits=%0d frozen=%0d port=%0d sr_delay=%0d tamper=%0d (signature bits changed %0d)",
             n_entry, n_exit, n_frozen, n_port, n_srdelay, n_tamper, diff);
    check("mechanism: test mode entered", n_entry > 0);
    check("mechanism: test mode left", n_exit > 0);
    check("mechanism: fillers frozen in normal mode", n_frozen > 0);
    check("mechanism: point observed on port", n_port > 0);
    check("mechanism: shift register response time", n_srdelay > 0);
    check("mechanism: tampered point seen in signature", n_tamper > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * RUN + 2000) @(posedge clk_test);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
