// tb_lookup_unit: lookup unit on the behavioural table memory. The table
// parts are filled with random records; each request either targets an
// address stored at position h of part 0, at position g of part 1, an
// invalid record holding the address, or nothing. Checks the match, the
// carried fields and the latency of RD_LAT + 1 cycles, and that unchecked
// requests (non-IPv4) neither read nor match.
module tb_lookup_unit;
  import hash_pkg::*;
  localparam int unsigned HB = 12, RD_LAT = 2, MW = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_check = 0;
  logic [31:0] in_addr = '0;
  logic [HB-1:0] in_h = '0, in_g = '0;
  logic [MW-1:0] in_meta = '0;
  logic rd_req;
  logic [HB-1:0] rd_addr0, rd_addr1;
  tbl_entry_t rd_data0, rd_data1;
  logic out_valid, out_check, out_match;
  logic [31:0] out_addr;
  logic [MW-1:0] out_meta;

  logic mreq[2], mwe[2], mrv[2];
  logic [HB-1:0] maddr[2];
  tbl_entry_t mwd[2], mrd[2];
  assign mreq[0] = rd_req; assign mreq[1] = rd_req;
  assign mwe[0] = 1'b0;    assign mwe[1] = 1'b0;
  assign maddr[0] = rd_addr0; assign maddr[1] = rd_addr1;
  assign mwd[0] = '0; assign mwd[1] = '0;
  assign rd_data0 = mrd[0]; assign rd_data1 = mrd[1];

  ext_mem_model #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) u_mem (
    .clk, .req(mreq), .we(mwe), .addr(maddr), .wdata(mwd), .rvalid(mrv), .rdata(mrd));
  lookup_unit #(.HASH_BITS(HB), .META_W(MW), .RD_LAT(RD_LAT)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit v; bit c; int unsigned a; int unsigned m; bit hit; } exp_t;
  exp_t q [$];
  int checks = 0, failures = 0, n_hit0 = 0, n_hit1 = 0, n_miss = 0;

  initial begin
    for (int a = 0; a < 2**HB; a++) begin
      u_mem.mem[0][a] = '{valid: 1'($urandom), ip: $urandom};
      u_mem.mem[1][a] = '{valid: 1'($urandom), ip: $urandom};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      exp_t e;
      int k;
      @(negedge clk);
      in_h = HB'($urandom); in_g = HB'($urandom); in_addr = $urandom;
      k = $urandom % 5;
      if (k == 0) in_addr = u_mem.mem[0][in_h].ip;
      if (k == 1) in_addr = u_mem.mem[1][in_g].ip;
      e.v = (t < 1900) && ($urandom % 4 != 0);
      e.c = ($urandom % 8) != 0;
      e.a = in_addr; e.m = $urandom & 16'hffff;
      e.hit = e.c && ((u_mem.mem[0][in_h].valid && u_mem.mem[0][in_h].ip == in_addr) ||
                      (u_mem.mem[1][in_g].valid && u_mem.mem[1][in_g].ip == in_addr));
      in_valid = e.v; in_check = e.c; in_meta = MW'(e.m);
      q.push_back(e);
      #1;
      checks++;
      if (rd_req !== (e.v && e.c)) begin failures++; $display("FAIL rd_req"); end
      @(posedge clk); #1;
      if (q.size() == RD_LAT + 1) begin
        e = q.pop_front();
        checks++;
        if (out_valid !== e.v || (e.v && (out_match !== e.hit || out_addr !== e.a ||
                                          out_meta !== MW'(e.m) || out_check !== e.c))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d v=%0b/%0b match=%0b/%0b", t, out_valid, e.v, out_match, e.hit);
        end
        if (e.v && e.hit) begin if (k == 0) n_hit0++; else n_hit1++; end
        if (e.v && !e.hit) n_miss++;
      end
    end
    if (n_hit0 == 0 || n_hit1 == 0 || n_miss == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
