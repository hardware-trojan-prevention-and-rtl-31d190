// gate_chain: filler chain that occupies unused LUTs and flip-flops.
//
// The chain has N stages. Each stage is one logic gate (one LUT) driving one
// flip-flop with clock enable and synchronous reset (an FDRE-style cell):
//
//     din -> [gate 0] -> FF0 -> [gate 1] -> FF1 -> ... -> FF(N-1) -> dout
//
// The first gate input of stage i is the previous stage's flip-flop (din for
// stage 0). NOT gates use only that input. AND and OR gates take their second
// input either from the flip-flop of another stage, chosen at elaboration
// time (feedback inside the chain), or, at the tap stages, from an unsecured
// point of the protected design (pts[k]). Tap stages are always AND gates, so
// a point held at 0 forces the chain downstream of it to 0, which shows up
// at dout. With MIXED = 0 every other stage is a NOT gate, so with all points
// at 1 the chain returns its input after N cycles, inverted once per NOT
// stage (N - NUM_TAPS of them).
//
// Timing: the chain advances one stage per clk edge while en is high and
// holds while en is low (it is enabled only in test mode). A bit entering at
// din reaches dout after N enabled edges. rst clears every flip-flop, so the
// output stream (the signature) is a pure function of the input stream and
// the points after a reset.
//
// The stage structure (gate then flip-flop with CE and R), the NOT/AND/OR
// gate set, feedback inside the chain and routing design points into chain
// gates follow the method; the gate mix, feedback choice and tap placement
// come from trojan_fill_pkg and are this implementation's choices.
module gate_chain
  import trojan_fill_pkg::*;
#(
  parameter int unsigned N        = 4910,          // stages (LUT + FF each)
  parameter bit          MIXED    = 1'b0,          // 1: mixed NOT/AND/OR chain
  parameter logic [31:0] SEED     = 32'h1F2E_3D4C, // gate / feedback selection
  parameter int unsigned NUM_TAPS = 1              // design points routed in
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                din,
  input  logic [NUM_TAPS-1:0] pts,
  output logic                dout
);

  logic [N-1:0] q;   // stage flip-flops
  logic [N-1:0] d;   // gate outputs

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam int    TAP  = tap_index(i, N, NUM_TAPS);
    localparam gate_e GATE = (TAP >= 0) ? G_AND : stage_gate(i, MIXED, SEED);
    localparam int    FB   = int'(stage_fb(i, N, SEED));

    logic a, b;

    if (i == 0) begin : g_first
      assign a = din;
    end else begin : g_next
      assign a = q[i-1];
    end

    if (TAP >= 0) begin : g_tap
      assign b = pts[TAP];
    end else begin : g_fb
      assign b = q[FB];
    end

    always_comb begin
      unique case (GATE)
        G_AND:   d[i] = a & b;
        G_OR:    d[i] = a | b;
        default: d[i] = ~a;
      endcase
    end

    always_ff @(posedge clk) begin
      if (rst)     q[i] <= 1'b0;
      else if (en) q[i] <= d[i];
    end
  end

  assign dout = q[N-1];

endmodule
