// hash_pair: the pair of hash functions used for cuckoo hashing.
//
// One input_sequencer skews the incoming address and feeds two reconf_hash
// instances that differ in their configuration and seed (0 for the first
// function h, 1 for the second g, as in the published design). Alongside
// the hash pipeline a delay chain of the same depth carries a valid bit,
// the kind of request (lookup or insertion), the address itself and a
// caller-defined tag, so that they leave together with their hashes.
//
// Timing: accepts one address per cycle, no stall; results appear
// LATENCY = IN_BITS + HASH_BITS - 1 cycles later (43 at default sizes).
// Only the valid chain is reset.
module hash_pair
  import hash_pkg::*;
#(
  parameter int unsigned          HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned          IN_BITS   = IP_BITS,
  parameter int unsigned          META_W    = 8,
  parameter logic [HASH_BITS-1:0] SEED_H    = HASH_BITS'(0),
  parameter logic [HASH_BITS-1:0] SEED_G    = HASH_BITS'(1),
  localparam int unsigned         N_ST      = n_stages(IN_BITS, HASH_BITS),
  localparam int unsigned         CW        = fb_cfg_w(HASH_BITS),
  localparam int unsigned         LATENCY   = N_ST
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  req_kind_e               in_kind,
  input  logic [IN_BITS-1:0]      in_addr,
  input  logic [META_W-1:0]       in_meta,
  input  logic [N_ST-1:0][CW-1:0] cfg_h,
  input  logic [N_ST-1:0][CW-1:0] cfg_g,
  output logic                    out_valid,
  output req_kind_e               out_kind,
  output logic [IN_BITS-1:0]      out_addr,
  output logic [META_W-1:0]       out_meta,
  output logic [HASH_BITS-1:0]    out_h,
  output logic [HASH_BITS-1:0]    out_g
);

  logic [IN_BITS-1:0] seq;

  input_sequencer #(.IN_BITS(IN_BITS)) u_seq (
    .clk     (clk),
    .addr_in (in_addr),
    .seq     (seq)
  );

  reconf_hash #(.HASH_BITS(HASH_BITS), .IN_BITS(IN_BITS), .SEED(SEED_H)) u_h (
    .clk (clk), .seq (seq), .cfg (cfg_h), .hash (out_h)
  );

  reconf_hash #(.HASH_BITS(HASH_BITS), .IN_BITS(IN_BITS), .SEED(SEED_G)) u_g (
    .clk (clk), .seq (seq), .cfg (cfg_g), .hash (out_g)
  );

  // Side chain matching the hash latency.
  typedef struct packed {
    req_kind_e          kind;
    logic [IN_BITS-1:0] addr;
    logic [META_W-1:0]  meta;
  } side_t;

  logic  [LATENCY-1:0] vld;
  side_t               side [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    side[0] <= '{kind: in_kind, addr: in_addr, meta: in_meta};
    for (int unsigned t = 1; t < LATENCY; t++) side[t] <= side[t-1];
  end

  assign out_valid = vld[LATENCY-1];
  assign out_kind  = side[LATENCY-1].kind;
  assign out_addr  = side[LATENCY-1].addr;
  assign out_meta  = side[LATENCY-1].meta;

endmodule
