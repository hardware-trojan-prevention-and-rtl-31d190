// fill_shift_reg: shift register that consumes the flip-flops left unused
// after the gate chain has taken one flip-flop per unused LUT.
//
// LEN flip-flops in series, no logic between them. While en is high each clk
// edge moves the contents one place towards dout; while en is low it holds
// (it is enabled only in test mode). rst synchronously clears it. A bit
// applied at din appears at dout after exactly LEN enabled edges, so a
// tester that measures this delay sees any flip-flop that has been removed.
//
// The structure (flip-flops only, clocked in test mode) follows the method.
// The default length is this implementation's estimate of the flip-flops a
// small design leaves free on a 20,800-flip-flop device once a 4910-stage
// gate chain is placed; the synchronous reset is also a choice made here.
module fill_shift_reg #(
  parameter int unsigned LEN = 15682
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic din,
  output logic dout
);

  logic [LEN-1:0] sr;

  if (LEN == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (rst)     sr <= LEN'(1'b0);
      else if (en) sr <= din;
    end
  end else begin : g_many
    always_ff @(posedge clk) begin
      if (rst)     sr <= LEN'(1'b0);
      else if (en) sr <= {sr[LEN-2:0], din};
    end
  end

  assign dout = sr[LEN-1];

endmodule
