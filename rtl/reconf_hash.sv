// reconf_hash: the pipelined reconfigurable hash function component.
//
// The hash state S (HASH_BITS bits) starts at the constant SEED and passes
// through N_ST = IN_BITS + HASH_BITS - 1 registered stages. Stage i+1 shifts
// the state one position towards the MSB (S_i+1,j = S_i,j-1, S_i,MSB is
// dropped) and puts the output of its own function block F_i+1 into bit 0.
// The first IN_BITS stages mix in one address bit each; the last
// HASH_BITS-1 "zero stages" mix in 0 so that the last address bit reaches
// every output bit. The hash is the state after the last stage.
//
// Timing: the address bits arrive already skewed by input_sequencer
// (bit k delayed k cycles); a hash leaves N_ST cycles after its address
// entered the sequencer (43 cycles at the default sizes) and a new one can
// start every cycle. The stages have no enable and no reset; validity is
// tracked outside.
//
// cfg holds one configuration word per stage: cfg[i] drives F_i+1.
module reconf_hash
  import hash_pkg::*;
#(
  parameter int unsigned       HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned       IN_BITS   = IP_BITS,
  parameter logic [HASH_BITS-1:0] SEED   = '0,
  localparam int unsigned      N_ST      = n_stages(IN_BITS, HASH_BITS),
  localparam int unsigned      CW        = fb_cfg_w(HASH_BITS)
) (
  input  logic                     clk,
  input  logic [IN_BITS-1:0]       seq,   // skewed address bits
  input  logic [N_ST-1:0][CW-1:0]  cfg,   // function-block configurations
  output logic [HASH_BITS-1:0]     hash   // S_N_ST
);

  // st[i] is S_i; st[0] is the seed.
  logic [HASH_BITS-1:0] st [N_ST+1];

  assign st[0] = SEED;

  for (genvar i = 0; i < N_ST; i++) begin : g_stage
    logic f;
    logic in_bit;
    if (i < IN_BITS) begin : g_addr
      assign in_bit = seq[i];
    end else begin : g_zero
      assign in_bit = 1'b0;
    end

    function_block #(.HASH_BITS(HASH_BITS)) u_fb (
      .state  (st[i]),
      .in_bit (in_bit),
      .cfg    (cfg[i]),
      .f      (f)
    );

    if (HASH_BITS > 1) begin : g_shift
      always_ff @(posedge clk) st[i+1] <= {st[i][HASH_BITS-2:0], f};
    end else begin : g_one
      always_ff @(posedge clk) st[i+1] <= f;
    end
  end

  assign hash = st[N_ST];

endmodule
