// config_register: holds the configuration (chromosome) of the hash function
// pair and drives the multiplexers and AND gates of all function blocks.
//
// Software uploads a new configuration word by word: one write stores the
// configuration of one function block (mask M_i, selA_i..selD_i, En_i) of
// one of the two hash functions. Every stored word is visible to the hash
// pipeline from the cycle after its write. The storage is plain flip-flops,
// as the configuration must reach every stage in parallel. The addressed
// write port and the all-zero reset value are this design's own choice;
// any content, even an arbitrary one, is a valid configuration.
//
// Interface: wr_en/wr_fn/wr_idx/wr_data, one word per cycle, no back-pressure.
// wr_idx values of N_ST and above are ignored.
module config_register
  import hash_pkg::*;
#(
  parameter int unsigned  HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned  IN_BITS   = IP_BITS,
  localparam int unsigned N_ST      = n_stages(IN_BITS, HASH_BITS),
  localparam int unsigned CW        = fb_cfg_w(HASH_BITS),
  localparam int unsigned IW        = $clog2(N_ST)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic                    wr_fn,    // 0: first function (h), 1: second (g)
  input  logic [IW-1:0]           wr_idx,   // function block F_idx+1
  input  logic [CW-1:0]           wr_data,
  output logic [N_ST-1:0][CW-1:0] cfg_h,
  output logic [N_ST-1:0][CW-1:0] cfg_g
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_h <= '0;
      cfg_g <= '0;
    end else if (wr_en && (wr_idx < IW'(N_ST))) begin
      if (wr_fn) cfg_g[wr_idx] <= wr_data;
      else       cfg_h[wr_idx] <= wr_data;
    end
  end

endmodule
