// trojan_fill_pkg: types and elaboration-time functions shared by the
// Trojan-filling structures.
//
// The gate chain is built at elaboration time from a small set of pure
// functions so that the RTL and any reference model agree on which gate sits
// in which stage:
//   * stage_gate()  picks the gate of stage i (NOT, AND or OR) from a 32-bit
//                   hash of the stage index and a seed. A NOT-only chain is
//                   the simple variant; the mixed variant is the stronger one.
//   * stage_fb()    picks the stage whose flip-flop output feeds the second
//                   input of a two-input gate ("feedback from another part of
//                   the chain").
//   * tap_stage()   places the stages whose second input is an unsecured
//                   point of the protected design, spread evenly along the
//                   chain; tap_index() is its inverse.
// The gate set follows the AND/OR/NOT chain of the method; the hash, the
// 3/4 NOT, 1/8 AND, 1/8 OR mix and the even tap spacing are choices of this
// implementation.
package trojan_fill_pkg;

  typedef enum logic [1:0] {
    G_NOT = 2'd0,   // out = ~a
    G_AND = 2'd1,   // out = a & b
    G_OR  = 2'd2    // out = a | b
  } gate_e;

  // Operating modes of the protected device.
  typedef enum logic [1:0] {
    M_NORMAL   = 2'd0,  // only the main design is clocked
    M_STOPPING = 2'd1,  // main design stopped, filler not yet granted
    M_TEST     = 2'd2,  // only the gate chain and the shift register are clocked
    M_RELEASE  = 2'd3   // filler grant withdrawn, waiting for it to stop
  } mode_e;

  // 32-bit integer mixing function (two multiply / xor-shift rounds).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h045D_9F3B;
    h = h ^ (h >> 16);
    h = h * 32'h045D_9F3B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Gate type of stage i. mixed = 0 gives a NOT-only chain.
  function automatic gate_e stage_gate(input int unsigned i, input bit mixed,
                                       input logic [31:0] seed);
    if (!mixed) return G_NOT;
    case (mix32(i ^ seed) % 8)
      32'd6:   return G_AND;
      32'd7:   return G_OR;
      default: return G_NOT;
    endcase
  endfunction

  // Stage whose flip-flop output drives the second input of stage i's gate.
  function automatic int unsigned stage_fb(input int unsigned i, input int unsigned n,
                                           input logic [31:0] seed);
    logic [31:0] h;
    h = mix32(mix32(i ^ seed) ^ 32'h9E37_79B9);
    return int'(h % n);
  endfunction

  // Stage that receives unsecured point k (k = 0 .. num_taps-1).
  function automatic int unsigned tap_stage(input int unsigned k, input int unsigned n,
                                            input int unsigned num_taps);
    return ((k + 1) * n) / (num_taps + 1);
  endfunction

  // Index of the unsecured point entering stage i, or -1 if none does.
  function automatic int tap_index(input int unsigned i, input int unsigned n,
                                   input int unsigned num_taps);
    for (int unsigned k = 0; k < num_taps; k++)
      if (tap_stage(k, n, num_taps) == i) return int'(k);
    return -1;
  endfunction

endpackage
