// lookup_unit: looks a hashed address up in the two-part cuckoo table.
//
// With cuckoo hashing an address can only be at position h of the first
// table part or at position g of the second, so a lookup is two reads, one
// per part, issued in the same cycle, and a comparison: the address is in
// the table when either record is valid and holds it. This constant
// worst-case lookup is the reason the design uses cuckoo hashing. Requests
// with in_check = 0 (frames that are not IPv4) issue no read and report no
// match, but keep their place in the stream.
//
// Timing: one request per cycle, never stalled (the table arbiter gives
// lookups first claim on both memory ports). The memory returns read data
// exactly RD_LAT cycles after the request; the result leaves one cycle
// after that, so the latency is RD_LAT + 1 cycles.
module lookup_unit
  import hash_pkg::*;
#(
  parameter int unsigned HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned META_W    = 16,
  parameter int unsigned RD_LAT    = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // hashed request
  input  logic                  in_valid,
  input  logic                  in_check,
  input  logic [IP_BITS-1:0]    in_addr,
  input  logic [HASH_BITS-1:0]  in_h,
  input  logic [HASH_BITS-1:0]  in_g,
  input  logic [META_W-1:0]     in_meta,
  // reads of both table parts
  output logic                  rd_req,
  output logic [HASH_BITS-1:0]  rd_addr0,
  output logic [HASH_BITS-1:0]  rd_addr1,
  input  tbl_entry_t            rd_data0,
  input  tbl_entry_t            rd_data1,
  // result
  output logic                  out_valid,
  output logic                  out_check,
  output logic [IP_BITS-1:0]    out_addr,
  output logic [META_W-1:0]     out_meta,
  output logic                  out_match
);

  typedef struct packed {
    logic               check;
    logic [IP_BITS-1:0] addr;
    logic [META_W-1:0]  meta;
  } pend_t;

  logic  [RD_LAT-1:0] vld;
  pend_t              pend [RD_LAT];

  assign rd_req   = in_valid && in_check;
  assign rd_addr0 = in_h;
  assign rd_addr1 = in_g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= (vld << 1) | RD_LAT'(in_valid);
  end

  always_ff @(posedge clk) begin
    pend[0] <= '{check: in_check, addr: in_addr, meta: in_meta};
    for (int unsigned t = 1; t < RD_LAT; t++) pend[t] <= pend[t-1];
  end

  // Compare when the read data of the oldest pending request arrives.
  pend_t head;
  logic  hit;
  assign head = pend[RD_LAT-1];
  assign hit  = head.check &&
                ((rd_data0.valid && rd_data0.ip == head.addr) ||
                 (rd_data1.valid && rd_data1.ip == head.addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= vld[RD_LAT-1];
  end

  always_ff @(posedge clk) begin
    out_check <= head.check;
    out_addr  <= head.addr;
    out_meta  <= head.meta;
    out_match <= hit;
  end

endmodule
