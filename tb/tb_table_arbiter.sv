// tb_table_arbiter: random lookup reads, host writes and inserter accesses
// on the behavioural table memory. Checks every cycle that lookups win both
// ports, host writes beat the inserter on their part, grants match that
// priority, writes land in the memory, and that only the inserter's own
// reads come back on its read port, with the data of the addressed record,
// RD_LAT cycles later.
module tb_table_arbiter;
  import hash_pkg::*;
  localparam int unsigned HB = 6, RD_LAT = 3;
  logic clk = 0, rst_n = 0;
  logic lk_rd = 0;
  logic [HB-1:0] lk_addr0 = '0, lk_addr1 = '0;
  logic hw_valid = 0, hw_ready, hw_part = 0;
  logic [HB-1:0] hw_addr = '0;
  tbl_entry_t hw_data = '0;
  logic ins_req = 0, ins_we = 0, ins_part = 0, ins_gnt, ins_rvalid;
  logic [HB-1:0] ins_addr = '0;
  tbl_entry_t ins_wdata = '0, ins_rdata;
  logic mem_req[2], mem_we[2], mem_rvalid[2];
  logic [HB-1:0] mem_addr[2];
  tbl_entry_t mem_wdata[2], mem_rdata[2];

  table_arbiter #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) dut (.*);
  ext_mem_model #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  tbl_entry_t shadow [2][2**HB];
  typedef struct { bit v; tbl_entry_t d; } rd_t;
  rd_t pipe [$];
  int checks = 0, failures = 0, n_lk = 0, n_hw_stall = 0, n_ins_stall = 0, n_ins_rd = 0, n_ins_wr = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    for (int p = 0; p < 2; p++) for (int a = 0; a < 2**HB; a++) shadow[p][a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit e_hw, e_ins;
      rd_t r;
      @(negedge clk);
      lk_rd = ($urandom % 3) == 0; lk_addr0 = HB'($urandom); lk_addr1 = HB'($urandom);
      hw_valid = ($urandom % 4) == 0; hw_part = $urandom; hw_addr = HB'($urandom);
      hw_data = '{valid: 1'($urandom), ip: $urandom};
      ins_req = ($urandom % 2) == 0; ins_we = $urandom; ins_part = $urandom; ins_addr = HB'($urandom);
      ins_wdata = '{valid: 1'($urandom), ip: $urandom};
      #1;
      e_hw  = hw_valid && !lk_rd;
      e_ins = ins_req && !lk_rd && !(hw_valid && hw_part == ins_part);
      checks++;
      if (hw_ready !== !lk_rd) fail("hw_ready");
      if (ins_gnt !== e_ins) fail("ins_gnt");
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (lk_rd) begin
          if (!(mem_req[p] && !mem_we[p] && mem_addr[p] == (p ? lk_addr1 : lk_addr0))) fail("lookup port");
        end else if (e_hw && hw_part == p) begin
          if (!(mem_req[p] && mem_we[p] && mem_addr[p] == hw_addr && mem_wdata[p] == hw_data)) fail("host port");
        end else if (e_ins && ins_part == p) begin
          if (!(mem_req[p] && mem_we[p] == ins_we && mem_addr[p] == ins_addr &&
                (!ins_we || mem_wdata[p] == ins_wdata))) fail("ins port");
        end else if (mem_req[p]) fail("idle port requested");
      end
      // expected inserter read data (before this cycle's writes)
      r.v = e_ins && !ins_we;
      r.d = shadow[ins_part][ins_addr];
      pipe.push_back(r);
      if (e_hw) shadow[hw_part][hw_addr] = hw_data;
      if (e_ins && ins_we) shadow[ins_part][ins_addr] = ins_wdata;
      n_lk += int'(lk_rd);
      n_hw_stall += int'(hw_valid && lk_rd);
      n_ins_stall += int'(ins_req && !e_ins);
      n_ins_rd += int'(e_ins && !ins_we);
      n_ins_wr += int'(e_ins && ins_we);
      @(posedge clk); #1;
      if (pipe.size() == RD_LAT) begin
        r = pipe.pop_front();
        checks++;
        if (ins_rvalid !== r.v) fail($sformatf("ins_rvalid t=%0d", t));
        else if (r.v && ins_rdata !== r.d) fail("ins_rdata");
      end
    end
    for (int p = 0; p < 2; p++) for (int a = 0; a < 2**HB; a++) begin
      checks++;
      if (u_mem.peek(p, a) !== shadow[p][a]) fail("memory contents");
    end
    if (n_lk == 0 || n_hw_stall == 0 || n_ins_stall == 0 || n_ins_rd == 0 || n_ins_wr == 0) fail("coverage");
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
