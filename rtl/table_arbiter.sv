// table_arbiter: shares the two external-memory ports of the hash table.
//
// The table has two parts, one per hash function, each behind its own
// memory port. Three clients use them:
//   * lookups read both parts in the same cycle and always win, so packet
//     lookup is never slowed down by table maintenance;
//   * host writes store one record in one part (used to load a table that
//     software has prepared, or to clear it), next in priority;
//   * the cuckoo inserter reads and writes one part at a time, last.
// A losing host write or inserter access sees its grant low and simply
// holds its request. The memories return read data a fixed RD_LAT cycles
// after a read; a delay line per part remembers which inserter reads are
// in flight so that only their data is handed back to the inserter
// (lookups take the read data directly from the ports). The priority order
// and the fixed read latency are this design's own choice.
//
// Combinational grants; one access per part per cycle.
module table_arbiter
  import hash_pkg::*;
#(
  parameter int unsigned HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned RD_LAT    = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup: read both parts
  input  logic                 lk_rd,
  input  logic [HASH_BITS-1:0] lk_addr0,
  input  logic [HASH_BITS-1:0] lk_addr1,
  // host write into one part
  input  logic                 hw_valid,
  output logic                 hw_ready,
  input  logic                 hw_part,
  input  logic [HASH_BITS-1:0] hw_addr,
  input  tbl_entry_t           hw_data,
  // cuckoo inserter: read or write one part
  input  logic                 ins_req,
  input  logic                 ins_we,
  input  logic                 ins_part,
  input  logic [HASH_BITS-1:0] ins_addr,
  input  tbl_entry_t           ins_wdata,
  output logic                 ins_gnt,
  output logic                 ins_rvalid,
  output tbl_entry_t           ins_rdata,
  // memory ports, index = table part
  output logic                 mem_req   [2],
  output logic                 mem_we    [2],
  output logic [HASH_BITS-1:0] mem_addr  [2],
  output tbl_entry_t           mem_wdata [2],
  input  logic                 mem_rvalid[2],
  input  tbl_entry_t           mem_rdata [2]
);

  logic [HASH_BITS-1:0] lk_addr [2];
  assign lk_addr[0] = lk_addr0;
  assign lk_addr[1] = lk_addr1;

  assign hw_ready = !lk_rd;
  assign ins_gnt  = ins_req && !lk_rd && !(hw_valid && (hw_part == ins_part));

  logic [RD_LAT-1:0] rd_any [2];   // any read in flight on the part
  logic [RD_LAT-1:0] rd_ins [2];   // inserter read in flight on the part

  for (genvar p = 0; p < 2; p++) begin : g_part
    logic hw_here, ins_here;
    assign hw_here  = hw_valid && (hw_part == 1'(p));
    assign ins_here = ins_gnt  && (ins_part == 1'(p));

    always_comb begin
      mem_req[p]   = 1'b0;
      mem_we[p]    = 1'b0;
      mem_addr[p]  = ins_addr;
      mem_wdata[p] = ins_wdata;
      if (lk_rd) begin
        mem_req[p]  = 1'b1;
        mem_addr[p] = lk_addr[p];
      end else if (hw_here) begin
        mem_req[p]   = 1'b1;
        mem_we[p]    = 1'b1;
        mem_addr[p]  = hw_addr;
        mem_wdata[p] = hw_data;
      end else if (ins_here) begin
        mem_req[p]   = 1'b1;
        mem_we[p]    = ins_we;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rd_any[p] <= '0;
        rd_ins[p] <= '0;
      end else begin
        rd_any[p] <= (rd_any[p] << 1) | RD_LAT'(mem_req[p] && !mem_we[p]);
        rd_ins[p] <= (rd_ins[p] << 1) | RD_LAT'(ins_here && !ins_we);
      end
    end

    // The memory must answer every read exactly RD_LAT cycles later.
    a_rd_latency : assert property (@(posedge clk) disable iff (!rst_n)
      mem_rvalid[p] == rd_any[p][RD_LAT-1])
      else $error("table part %0d: read data not returned after %0d cycles", p, RD_LAT);
  end

  assign ins_rvalid = rd_ins[0][RD_LAT-1] || rd_ins[1][RD_LAT-1];
  assign ins_rdata  = rd_ins[1][RD_LAT-1] ? mem_rdata[1] : mem_rdata[0];

endmodule
