// ext_mem_model: behavioural model of the external memory that holds the
// two parts of the hash table (2 x 2^HASH_BITS records of {valid, ip}).
// Each part has its own port. A write is performed in the cycle of the
// request; a read returns data and rvalid exactly RD_LAT cycles after the
// request. The contents start empty (all records invalid). Testbench use only.
module ext_mem_model
  import hash_pkg::*;
#(
  parameter int unsigned HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned RD_LAT    = 2
) (
  input  logic                 clk,
  input  logic                 req   [2],
  input  logic                 we    [2],
  input  logic [HASH_BITS-1:0] addr  [2],
  input  tbl_entry_t           wdata [2],
  output logic                 rvalid[2],
  output tbl_entry_t           rdata [2]
);

  tbl_entry_t mem [2][2**HASH_BITS];
  logic       pv  [2][RD_LAT];
  tbl_entry_t pd  [2][RD_LAT];

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int a = 0; a < 2**HASH_BITS; a++) mem[p][a] = '0;
      for (int t = 0; t < RD_LAT; t++) begin pv[p][t] = 1'b0; pd[p][t] = '0; end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (req[p] && we[p]) mem[p][addr[p]] <= wdata[p];
      pv[p][0] <= req[p] && !we[p];
      pd[p][0] <= mem[p][addr[p]];
      for (int t = 1; t < RD_LAT; t++) begin
        pv[p][t] <= pv[p][t-1];
        pd[p][t] <= pd[p][t-1];
      end
    end
  end

  always_comb
    for (int p = 0; p < 2; p++) begin
      rvalid[p] = pv[p][RD_LAT-1];
      rdata[p]  = pd[p][RD_LAT-1];
    end

  // Peek used by testbenches to compare the table with a reference.
  function automatic tbl_entry_t peek(input int p, input int a);
    return mem[p][a];
  endfunction

endmodule
