// mode_ctrl: switches the device between normal mode and test mode.
//
// In normal mode only the protected (main) design is clocked; in test mode
// only the filler structures (gate chain and shift register) are. The two
// must never be clocked at the same time, so the switch is break-before-make
// across the two clock domains:
//
//   clk_main domain (owner of the decision), states from mode_e:
//     M_NORMAL   main_en = 1. test_req seen high -> drop main_en, M_STOPPING.
//     M_STOPPING main_en already 0 -> raise grant, M_TEST.
//     M_TEST     grant = 1. test_req seen low and test_en seen high
//                (acknowledge) -> drop grant, M_RELEASE.
//     M_RELEASE  wait until test_en is seen low -> raise main_en, M_NORMAL.
//   clk_test domain: test_en is grant passed through a SYNC_STAGES flip-flop
//   synchroniser.
//
// main_en and grant are separate flip-flops, so nothing that crosses a domain
// comes from decoding logic. test_req is asynchronous to both clocks and is
// synchronised in clk_main; test_en is synchronised back as the acknowledge.
//
// Interface and timing: main_en is meant for the main design's clock enable
// (or a clock buffer enable) in clk_main; test_en for the filler's clock
// enables in clk_test. Entering test mode takes 2 clk_main edges plus
// SYNC_STAGES clk_main edges for the request, then SYNC_STAGES clk_test edges;
// leaving takes about 2*SYNC_STAGES edges of each clock. rst is synchronous
// and must be held for SYNC_STAGES+1 edges of the slower clock; it returns to
// normal mode.
//
// The two modes and the rule that the two clocks never pulse together follow
// the method; the handshake itself, the synchroniser depth and the reset
// behaviour are this implementation's choices.
module mode_ctrl
  import trojan_fill_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2   // >= 2
) (
  input  logic clk_main,
  input  logic clk_test,
  input  logic rst,
  input  logic test_req,
  output logic main_en,   // clk_main domain
  output logic test_en,   // clk_test domain
  output logic in_test    // clk_main domain, test mode granted
);

  // ---------------- clk_main domain ----------------
  logic [SYNC_STAGES-1:0] req_sync;
  logic [SYNC_STAGES-1:0] ack_sync;
  logic                   req_s, ack_s;
  logic                   grant;
  mode_e                  state;

  always_ff @(posedge clk_main) begin
    if (rst) begin
      req_sync <= '0;
      ack_sync <= '0;
    end else begin
      req_sync <= {req_sync[SYNC_STAGES-2:0], test_req};
      ack_sync <= {ack_sync[SYNC_STAGES-2:0], test_en};
    end
  end

  assign req_s = req_sync[SYNC_STAGES-1];
  assign ack_s = ack_sync[SYNC_STAGES-1];

  always_ff @(posedge clk_main) begin
    if (rst) begin
      state   <= M_NORMAL;
      main_en <= 1'b1;
      grant   <= 1'b0;
    end else begin
      unique case (state)
        M_NORMAL: if (req_s) begin
          main_en <= 1'b0;
          state   <= M_STOPPING;
        end
        M_STOPPING: begin
          grant <= 1'b1;
          state <= M_TEST;
        end
        M_TEST: if (!req_s && ack_s) begin
          grant <= 1'b0;
          state <= M_RELEASE;
        end
        M_RELEASE: if (!ack_s) begin
          main_en <= 1'b1;
          state   <= M_NORMAL;
        end
        default: state <= M_NORMAL;
      endcase
    end
  end

  assign in_test = (state == M_TEST);

  // ---------------- clk_test domain ----------------
  logic [SYNC_STAGES-1:0] grant_sync;

  always_ff @(posedge clk_test) begin
    if (rst) grant_sync <= '0;
    else     grant_sync <= {grant_sync[SYNC_STAGES-2:0], grant};
  end

  assign test_en = grant_sync[SYNC_STAGES-1];

  // The main design may only be enabled while no grant is outstanding.
  a_break_before_make: assert property (@(posedge clk_main) disable iff (rst)
    main_en |-> !grant);
  a_grant_after_stop: assert property (@(posedge clk_main) disable iff (rst)
    $rose(grant) |-> $past(!main_en));

endmodule
