// cuckoo_inserter: inserts IPv4 addresses into the two-part hash table by
// cuckoo hashing.
//
// An address x may live at h(x) in table part 0 or at g(x) in part 1. To
// insert x the engine writes it into part 0 at h(x). If that position was
// empty, the insertion is done. Otherwise the previous occupant y is pushed
// out: y is rehashed and written into the other part at its position there
// (g(y) in part 1), possibly pushing out another address, and so on,
// alternating between the parts. The insertion fails (an unresolvable
// collision) when the address being inserted is pushed out again: the
// table then holds exactly what it held before, rearranged, and x is
// reported as not inserted. This rule follows the published procedure.
// As a guard of this design's own, a walk that reaches MAX_KICKS
// push-outs is also stopped; the address pushed out last is then the one
// reported as not inserted. If the first position already holds x, the
// insertion is done without a change (a repeated insert).
//
// Each step hashes the current address in the shared hash pipeline, reads
// the target position and writes the current address there. The hash
// pipeline and the memory ports are requested with req/gnt handshakes and
// are granted only when no lookup needs them, so insertion is slow (about
// hash latency + read latency + 3 cycles per push-out) but lookups are
// never delayed.
//
// Interface: cmd_valid/cmd_ready handshake for an address; a one-cycle
// res_valid pulse with res_ok, res_ip (the address left out on failure)
// and res_kicks (number of push-outs) per command.
module cuckoo_inserter
  import hash_pkg::*;
#(
  parameter int unsigned  HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned  MAX_KICKS = 4 << HASH_BITS,
  localparam int unsigned KW        = $clog2(MAX_KICKS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [IP_BITS-1:0]   cmd_ip,
  // hash pipeline request and result
  output logic                 hreq_valid,
  output logic [IP_BITS-1:0]   hreq_ip,
  input  logic                 hreq_gnt,
  input  logic                 hrsp_valid,
  input  logic [HASH_BITS-1:0] hrsp_h,
  input  logic [HASH_BITS-1:0] hrsp_g,
  // table access
  output logic                 m_req,
  output logic                 m_we,
  output logic                 m_part,
  output logic [HASH_BITS-1:0] m_addr,
  output tbl_entry_t           m_wdata,
  input  logic                 m_gnt,
  input  logic                 m_rvalid,
  input  tbl_entry_t           m_rdata,
  // result
  output logic                 res_valid,
  output logic                 res_ok,
  output logic [IP_BITS-1:0]   res_ip,
  output logic [KW-1:0]        res_kicks,
  output logic                 busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_HASH_REQ, S_HASH_WAIT, S_RD_REQ, S_RD_WAIT, S_WR_REQ
  } state_e;

  state_e               state;
  logic [IP_BITS-1:0]   first_ip;   // address being inserted
  logic [IP_BITS-1:0]   cur_ip;     // address being placed now
  logic                 part;       // table part it goes to
  logic [HASH_BITS-1:0] pos;        // its position there
  tbl_entry_t           old;        // previous occupant
  logic [KW-1:0]        kicks;

  assign cmd_ready  = (state == S_IDLE);
  assign busy       = (state != S_IDLE);
  assign hreq_valid = (state == S_HASH_REQ);
  assign hreq_ip    = cur_ip;

  assign m_req   = (state == S_RD_REQ) || (state == S_WR_REQ);
  assign m_we    = (state == S_WR_REQ);
  assign m_part  = part;
  assign m_addr  = pos;
  assign m_wdata = '{valid: 1'b1, ip: cur_ip};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      res_valid <= 1'b0;
      res_ok    <= 1'b0;
      res_ip    <= '0;
      res_kicks <= '0;
      first_ip  <= '0;
      cur_ip    <= '0;
      part      <= 1'b0;
      pos       <= '0;
      old       <= '0;
      kicks     <= '0;
    end else begin
      res_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          first_ip <= cmd_ip;
          cur_ip   <= cmd_ip;
          part     <= 1'b0;
          kicks    <= '0;
          state    <= S_HASH_REQ;
        end
        S_HASH_REQ: if (hreq_gnt) state <= S_HASH_WAIT;
        S_HASH_WAIT: if (hrsp_valid) begin
          pos   <= part ? hrsp_g : hrsp_h;
          state <= S_RD_REQ;
        end
        S_RD_REQ: if (m_gnt) state <= S_RD_WAIT;
        S_RD_WAIT: if (m_rvalid) begin
          old   <= m_rdata;
          state <= (m_rdata.valid && m_rdata.ip == cur_ip) ? S_IDLE : S_WR_REQ;
          if (m_rdata.valid && m_rdata.ip == cur_ip) begin
            // already in place: nothing to write
            res_valid <= 1'b1;
            res_ok    <= 1'b1;
            res_ip    <= cur_ip;
            res_kicks <= kicks;
          end
        end
        S_WR_REQ: if (m_gnt) begin
          if (!old.valid) begin
            res_valid <= 1'b1;
            res_ok    <= 1'b1;
            res_ip    <= first_ip;
            res_kicks <= kicks;
            state     <= S_IDLE;
          end else if (old.ip == first_ip || kicks == KW'(MAX_KICKS)) begin
            res_valid <= 1'b1;
            res_ok    <= 1'b0;
            res_ip    <= old.ip;
            res_kicks <= kicks + 1'b1;
            state     <= S_IDLE;
          end else begin
            cur_ip <= old.ip;
            part   <= ~part;
            kicks  <= kicks + 1'b1;
            state  <= S_HASH_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
