// tb_gate_chain: self-checking test of gate_chain.
//
// Two chains run side by side on one test clock:
//   dut_not  8 stages, NOT-only, one tap (stage 4 becomes an AND gate).
//            Checked without any model: with the point at 1 the output is the
//            input of 8 enabled cycles earlier, inverted 7 times; with the
//            point at 0 the output settles to 1 (three NOTs after the AND).
//   dut_mix  40 stages, mixed NOT/AND/OR with feedback, two taps. Checked
//            cycle by cycle against a behavioural model of the chain built in
//            this file from the gate map of trojan_fill_pkg.
// Also checked: clock enable low freezes both chains, reset clears them, and
// a 32-bit output signature of the mixed chain matches the model's.
module tb_gate_chain;
  timeunit 1ns;
  timeprecision 1ps;
  import trojan_fill_pkg::*;

  localparam int unsigned N1   = 8;
  localparam int unsigned N2   = 40;
  localparam int unsigned T2   = 2;
  localparam logic [31:0] SEED = 32'h1F2E_3D4C;

  logic clk = 1'b0;
  logic rst, en;
  logic din1, din2, pt1;
  logic [T2-1:0] pts2;
  logic dout1, dout2;

  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  gate_chain #(.N(N1), .MIXED(1'b0), .SEED(SEED), .NUM_TAPS(1)) dut_not (
    .clk, .rst, .en, .din(din1), .pts(pt1), .dout(dout1));

  gate_chain #(.N(N2), .MIXED(1'b1), .SEED(SEED), .NUM_TAPS(T2)) dut_mix (
    .clk, .rst, .en, .din(din2), .pts(pts2), .dout(dout2));

  // ---------------- reference model of the mixed chain ----------------
  logic m [N2];

  function automatic logic gate_eval(gate_e g, logic a, logic b);
    case (g)
      G_AND:   return a & b;
      G_OR:    return a | b;
      default: return !a;
    endcase
  endfunction

  task automatic model_step(input logic r, input logic e, input logic d,
                            input logic [T2-1:0] p);
    logic nx [N2];
    int   tap;
    gate_e g;
    logic a, b;
    for (int unsigned i = 0; i < N2; i++) begin
      tap = tap_index(i, N2, T2);
      g   = (tap >= 0) ? G_AND : stage_gate(i, 1'b1, SEED);
      a   = (i == 0) ? d : m[i-1];
      b   = (tap >= 0) ? p[tap] : m[stage_fb(i, N2, SEED)];
      nx[i] = r ? 1'b0 : (e ? gate_eval(g, a, b) : m[i]);
    end
    m = nx;
  endtask

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // history of din1 over enabled cycles, for the model-free check
  logic hist1 [$];
  logic [31:0] sig_dut, sig_ref;
  logic r_q, e_q, d2_q;
  logic [T2-1:0] p2_q;

  // one test clock: inputs applied at negedge, sampled at the next posedge
  task automatic cycle(input logic r, input logic e, input logic d1, input logic p1,
                       input logic d2, input logic [T2-1:0] p2);
    rst = r; en = e; din1 = d1; pt1 = p1; din2 = d2; pts2 = p2;
    @(posedge clk);
    @(negedge clk);
    model_step(r, e, d2, p2);
    check("mixed chain vs model", dout2, m[N2-1]);
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; din1 = 1'b0; din2 = 1'b0; pt1 = 1'b1; pts2 = '1;
    for (int i = 0; i < N2; i++) m[i] = 1'b0;
    @(negedge clk);

    // reset clears both chains
    cycle(1'b1, 1'b0, 1'b0, 1'b1, 1'b0, '1);
    cycle(1'b1, 1'b0, 1'b0, 1'b1, 1'b0, '1);
    check("reset clears NOT chain", dout1, 1'b0);
    check("reset clears mixed chain", dout2, 1'b0);

    // NOT chain, point at 1: delayed and inverted 7 times
    for (int t = 0; t < 200; t++) begin
      logic d1;
      d1 = 1'($urandom);
      cycle(1'b0, 1'b1, d1, 1'b1, 1'($urandom), 2'($urandom));
      hist1.push_back(d1);
      if (hist1.size() > N1) begin
        void'(hist1.pop_front());
        check("NOT chain latency and inversion", dout1, !hist1[0]);
      end
    end

    // clock enable low: everything holds
    begin
      logic h1, h2;
      h1 = dout1; h2 = dout2;
      for (int t = 0; t < 20; t++) begin
        cycle(1'b0, 1'b0, 1'($urandom), 1'($urandom), 1'($urandom), 2'($urandom));
        check("NOT chain holds while disabled", dout1, h1);
        check("mixed chain holds while disabled", dout2, h2);
      end
    end

    // NOT chain, point stuck at 0 (tampered main-design LUT): output settles to 1
    for (int t = 0; t < 2 * N1; t++)
      cycle(1'b0, 1'b1, 1'($urandom), 1'b0, 1'($urandom), 2'($urandom));
    for (int t = 0; t < 30; t++) begin
      cycle(1'b0, 1'b1, 1'($urandom), 1'b0, 1'($urandom), 2'($urandom));
      check("NOT chain with point at 0 is constant", dout1, 1'b1);
    end

    // signature of the mixed chain for a fixed stream after reset
    cycle(1'b1, 1'b0, 1'b0, 1'b1, 1'b0, '1);
    sig_dut = '0; sig_ref = '0;
    for (int t = 0; t < 32 + N2; t++) begin
      cycle(1'b0, 1'b1, 1'b0, 1'b1, 1'((32'hAAA5_0F33 >> (t % 32)) & 1), '1);
      if (t >= N2) begin
        sig_dut = {sig_dut[30:0], dout2};
        sig_ref = {sig_ref[30:0], m[N2-1]};
      end
    end
    checks++;
    if (sig_dut !== sig_ref) begin
      failures++;
      $display("FAIL signature %h expected %h", sig_dut, sig_ref);
    end
    $display("mixed chain signature %h", sig_dut);

    // random traffic with random points and enables
    for (int t = 0; t < 400; t++)
      cycle(($urandom % 97) == 0, ($urandom % 5) != 0, 1'($urandom), 1'($urandom),
            1'($urandom), 2'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
