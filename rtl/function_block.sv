// function_block: the reconfigurable feedback function of one hash stage.
//
// The new state bit is the XOR of
//   * the input bit I_i (an address bit, or 0 in a zero stage),
//   * every state bit S_i,j whose mask bit M_i,j is 1,
//   * the mandatory product A_i & B_i,
//   * the optional product C_i & D_i, present only when En_i is 1,
// where A..D are state bits picked by four multiplexers (selA..selD).
// This is the structure of the published function block. Select codes of
// HASH_BITS and above (possible when HASH_BITS is not a power of two) lie
// outside the configuration space; this design lets such a multiplexer
// output 0.
//
// Purely combinational. cfg layout: {en, selD, selC, selB, selA, mask}.
module function_block
  import hash_pkg::*;
#(
  parameter int unsigned HASH_BITS = HASH_BITS_DEFAULT
) (
  input  logic [HASH_BITS-1:0]           state,   // S_i
  input  logic                           in_bit,  // I_i
  input  logic [fb_cfg_w(HASH_BITS)-1:0] cfg,     // M_i, selA_i..selD_i, En_i
  output logic                           f        // F_i+1 = S_i+1,0
);

  localparam int unsigned SW = sel_w(HASH_BITS);

  typedef struct packed {
    logic                 en;
    logic [SW-1:0]        sel_d;
    logic [SW-1:0]        sel_c;
    logic [SW-1:0]        sel_b;
    logic [SW-1:0]        sel_a;
    logic [HASH_BITS-1:0] mask;
  } fb_cfg_t;

  fb_cfg_t c;
  logic    a, b, cc, d;

  assign c = fb_cfg_t'(cfg);

  // State-bit multiplexer; out-of-range codes give 0.
  function automatic logic pick(input logic [HASH_BITS-1:0] s,
                                input logic [SW-1:0] sel);
    logic r;
    r = 1'b0;
    for (int unsigned j = 0; j < HASH_BITS; j++)
      if (sel == SW'(j)) r = s[j];
    return r;
  endfunction

  always_comb begin
    a  = pick(state, c.sel_a);
    b  = pick(state, c.sel_b);
    cc = pick(state, c.sel_c);
    d  = pick(state, c.sel_d);
    f  = in_bit ^ (^(state & c.mask)) ^ (a & b) ^ (c.en & cc & d);
  end

endmodule
