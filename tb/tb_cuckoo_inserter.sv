// tb_cuckoo_inserter: cuckoo insertion into a small table (2 x 16 records)
// with MAX_KICKS = 6 so that both ways of failing occur. The testbench
// plays the hash pipeline (grants at random, answers with the reference
// hashes after a random delay) and the port arbiter (random grants in front
// of the behavioural memory). Every result (ok, address left out, number of
// push-outs) and, after each round, the whole table are compared with the
// reference cuckoo insertion. Rounds start from an empty table.
module tb_cuckoo_inserter;
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;
  localparam int unsigned HB = 4, N_ST = n_stages(32, HB), MAXK = 6, RD_LAT = 2;
  localparam int unsigned KW = $clog2(MAXK + 1);

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  logic [31:0] cmd_ip = '0;
  logic hreq_valid, hreq_gnt, hrsp_valid;
  logic [31:0] hreq_ip;
  logic [HB-1:0] hrsp_h, hrsp_g;
  logic m_req, m_we, m_part, m_gnt, m_rvalid;
  logic [HB-1:0] m_addr;
  tbl_entry_t m_wdata, m_rdata;
  logic res_valid, res_ok, busy;
  logic [31:0] res_ip;
  logic [KW-1:0] res_kicks;

  cuckoo_inserter #(.HASH_BITS(HB), .MAX_KICKS(MAXK)) dut (.*);

  // memory behind a random grant
  logic mreq[2], mwe[2], mrv[2];
  logic [HB-1:0] maddr[2];
  tbl_entry_t mwd[2], mrd[2];
  logic gnt_rand;
  always_comb begin
    m_gnt = m_req && gnt_rand;
    for (int p = 0; p < 2; p++) begin
      mreq[p]  = m_gnt && (m_part == 1'(p));
      mwe[p]   = m_we;
      maddr[p] = m_addr;
      mwd[p]   = m_wdata;
    end
  end
  assign m_rvalid = mrv[0] || mrv[1];
  assign m_rdata  = mrv[1] ? mrd[1] : mrd[0];
  ext_mem_model #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) u_mem (
    .clk, .req(mreq), .we(mwe), .addr(maddr), .wdata(mwd), .rvalid(mrv), .rdata(mrd));

  always #5 clk = ~clk;

  fb_t ch [], cg [];
  rec_t t0 [], t1 [];
  int checks = 0, failures = 0;
  int n_direct = 0, n_kicked = 0, n_fail_first = 0, n_fail_guard = 0, n_dup = 0;

  // hash service
  logic hgnt_rand;
  assign hreq_gnt = hreq_valid && hgnt_rand;
  initial begin
    hrsp_valid = 0; hrsp_h = '0; hrsp_g = '0;
    forever begin
      @(posedge clk);
      if (hreq_gnt) begin
        int unsigned ip;
        ip = hreq_ip;
        repeat ($urandom_range(5, 1)) @(posedge clk);
        #1;
        hrsp_valid = 1; hrsp_h = HB'(hash(ip, ch, 0, HB)); hrsp_g = HB'(hash(ip, cg, 1, HB));
        @(posedge clk); #1;
        hrsp_valid = 0;
      end
    end
  end
  always @(negedge clk) begin
    gnt_rand  = ($urandom % 3) != 0;
    hgnt_rand = ($urandom % 2) != 0;
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    int unsigned ips [$];
    ch = new[N_ST]; cg = new[N_ST];
    for (int i = 0; i < N_ST; i++) begin ch[i] = rand_fb(HB); cg[i] = rand_fb(HB); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 12; round++) begin
      t0 = new[2**HB]; t1 = new[2**HB];
      foreach (t0[a]) begin t0[a] = '{v: 0, ip: 0}; t1[a] = '{v: 0, ip: 0}; end
      for (int p = 0; p < 2; p++) for (int a = 0; a < 2**HB; a++) u_mem.mem[p][a] = '0;
      ips.delete();
      for (int n = 0; n < 28; n++) begin
        bit ok; int unsigned lost, kicks; int unsigned ip;
        ip = (n > 3 && $urandom % 8 == 0) ? ips[$urandom % ips.size()] : $urandom;
        ips.push_back(ip);
        cuckoo_insert(t0, t1, ip, ch, cg, HB, MAXK, ok, lost, kicks);
        @(negedge clk);
        cmd_valid = 1; cmd_ip = ip;
        do @(posedge clk); while (!cmd_ready);
        #1 cmd_valid = 0;
        do @(posedge clk); while (!res_valid);
        #1;
        checks++;
        if (res_ok !== ok || int'(res_kicks) != kicks || (!ok && res_ip !== lost))
          fail($sformatf("round %0d ip %h ok=%0b/%0b kicks=%0d/%0d lost=%h/%h", round, ip,
                         res_ok, ok, res_kicks, kicks, res_ip, lost));
        if (ok && kicks == 0) n_direct++;
        if (ok && kicks > 0) n_kicked++;
        if (!ok && lost == ip) n_fail_first++;
        if (!ok && lost != ip) n_fail_guard++;
      end
      for (int a = 0; a < 2**HB; a++) begin
        tbl_entry_t e0, e1;
        e0 = u_mem.peek(0, a); e1 = u_mem.peek(1, a);
        checks++;
        if (e0.valid !== t0[a].v || (t0[a].v && e0.ip !== t0[a].ip) ||
            e1.valid !== t1[a].v || (t1[a].v && e1.ip !== t1[a].ip)) fail($sformatf("table slot %0d", a));
      end
    end
    $display("direct=%0d kicked=%0d fail_first=%0d fail_guard=%0d", n_direct, n_kicked, n_fail_first, n_fail_guard);
    if (n_direct == 0 || n_kicked == 0 || n_fail_first == 0 || n_fail_guard == 0) fail("coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
