// trojan_fill_top: protection wrapper placed around a design on an FPGA.
//
// The method leaves no room for a hardware Trojan and makes the hard-to-test
// parts of the protected design visible:
//   * gate_chain     fills the unused LUTs, one LUT gate plus one flip-flop
//                    per stage;
//   * fill_shift_reg fills the flip-flops the chain leaves over;
//   * extra routing  brings the marked low-testability points of the
//                    protected design out: the first NUM_PORT_PTS points go
//                    straight to otherwise unused output ports (x), the
//                    remaining NUM_CHAIN_PTS points enter AND gates of the
//                    gate chain;
//   * mode_ctrl      keeps the protected design and the fillers from ever
//                    being clocked together (normal mode / test mode).
// The protected design itself is not part of this module: its clock enable
// (main_en) and its marked points (marked_pts) are ports.
//
// Test procedure: raise test_req, wait for test_en, reset or keep the filler
// state, drive chain_in / sr_in with a known bit stream on clk_test and
// record chain_out / sr_out. The chain output stream is the signature; the
// number of clk_test cycles from input to output is the response time
// (CHAIN_LEN for the chain, SR_LEN for the shift register). Apply test
// vectors to the protected design so that its marked points take known
// values; x shows the port-routed points directly, the chain carries the
// others into its signature. Drop test_req to return to normal mode.
//
// Clocks: clk_main (10 ns in the reference implementation) and clk_test
// (2 ns). rst is synchronous in both domains. The sizes default to the
// reference case of a small design on a 20,800-flip-flop device: 4910 chain
// stages (from the method's example) and 15682 shift-register flip-flops
// (this implementation's estimate). One point to a port and one into the
// chain mirror the method's schematic; the split of marked_pts into the two
// groups is this implementation's convention.
module trojan_fill_top #(
  parameter int unsigned CHAIN_LEN     = 4910,
  parameter int unsigned SR_LEN        = 15682,
  parameter int unsigned NUM_PORT_PTS  = 1,
  parameter int unsigned NUM_CHAIN_PTS = 1,
  parameter bit          MIXED         = 1'b0,
  parameter logic [31:0] SEED          = 32'h1F2E_3D4C
) (
  input  logic                                   clk_main,
  input  logic                                   clk_test,
  input  logic                                   rst,
  input  logic                                   test_req,
  output logic                                   main_en,
  output logic                                   test_en,
  output logic                                   in_test,
  input  logic [NUM_PORT_PTS+NUM_CHAIN_PTS-1:0]  marked_pts,
  output logic [NUM_PORT_PTS-1:0]                x,
  input  logic                                   chain_in,
  output logic                                   chain_out,
  input  logic                                   sr_in,
  output logic                                   sr_out
);

  mode_ctrl u_mode (
    .clk_main (clk_main),
    .clk_test (clk_test),
    .rst      (rst),
    .test_req (test_req),
    .main_en  (main_en),
    .test_en  (test_en),
    .in_test  (in_test)
  );

  // Extra routing to unused output ports.
  assign x = marked_pts[NUM_PORT_PTS-1:0];

  gate_chain #(
    .N        (CHAIN_LEN),
    .MIXED    (MIXED),
    .SEED     (SEED),
    .NUM_TAPS (NUM_CHAIN_PTS)
  ) u_chain (
    .clk  (clk_test),
    .rst  (rst),
    .en   (test_en),
    .din  (chain_in),
    .pts  (marked_pts[NUM_PORT_PTS+NUM_CHAIN_PTS-1:NUM_PORT_PTS]),
    .dout (chain_out)
  );

  fill_shift_reg #(
    .LEN (SR_LEN)
  ) u_sr (
    .clk  (clk_test),
    .rst  (rst),
    .en   (test_en),
    .din  (sr_in),
    .dout (sr_out)
  );

endmodule
