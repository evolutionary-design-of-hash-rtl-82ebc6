// tb_ip_filter_full: the filter at its default sizes (12-bit hashes,
// 43-stage pipeline, table of 2 x 4096 records) on the behavioural external
// memory, through one complete operation: upload a configuration, insert
// random addresses by cuckoo hashing until the first unresolvable
// collision, then look up every stored address and as many absent ones in
// back-to-back packets (one per cycle). This is done twice. First with a
// configuration that copies one function block into every stage of each
// function (the form used early in the configuration search), shaped like
// the published example: for h, I ^ (S9 & S11) ^ S0^S1^S2^S6^S8^S10^S11;
// for g, I ^ (T3 & T8) ^ T0^T1^T2^T7^T10^T11. Then the table is cleared
// with host writes, a random configuration with invertible stages is
// uploaded and the table is rebuilt. Insertion results, verdicts, verdict
// latency (48 cycles) and the final tables are checked against the
// reference model; the table-load factors reached are printed.
module tb_ip_filter_full;
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;
  localparam int unsigned HB = 12, RD_LAT = 2, PW = 16;
  localparam int unsigned N_ST = n_stages(32, HB), CW = fb_cfg_w(HB), IW = $clog2(N_ST);
  localparam int unsigned MAXK = 4 << HB, KW = $clog2(MAXK + 1);
  localparam int unsigned LAT = 1 + N_ST + RD_LAT + 1 + 1;

  logic clk = 0, rst_n = 0;
  logic cfg_wr_en = 0, cfg_wr_fn = 0;
  logic [IW-1:0] cfg_wr_idx = '0;
  logic [CW-1:0] cfg_wr_data = '0;
  filter_action_e filter_mode = ACT_DROP;
  logic ins_valid = 0, ins_ready, ins_res_valid, ins_res_ok, ins_busy;
  logic [31:0] ins_ip = '0, ins_res_ip;
  logic [KW-1:0] ins_res_kicks;
  logic tw_valid = 0, tw_ready, tw_part = 0;
  logic [HB-1:0] tw_addr = '0;
  tbl_entry_t tw_data = '0;
  logic pkt_valid = 0;
  logic [PW-1:0] pkt_id = '0;
  logic [33:0][7:0] pkt_hdr = '0;
  logic vrd_valid, vrd_match, vrd_drop, log_valid;
  logic [PW-1:0] vrd_pkt_id, log_pkt_id;
  logic [31:0] log_src_ip;
  logic mem_req[2], mem_we[2], mem_rvalid[2];
  logic [HB-1:0] mem_addr[2];
  tbl_entry_t mem_wdata[2], mem_rdata[2];

  ip_filter_top dut (.*);
  ext_mem_model #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string s);
    failures++;
    if (failures < 15) $display("FAIL @%0d %s", cyc, s);
  endtask

  fb_t ch [], cg [];
  rec_t t0 [], t1 [];
  int unsigned stored [$];
  typedef struct { int unsigned id; longint t; int unsigned ip; bit exp; } pkt_t;
  pkt_t sb [$];
  int n_hit = 0, n_miss = 0;

  always @(posedge clk) if (rst_n && vrd_valid) begin
    pkt_t p;
    if (sb.size() == 0) fail("verdict without packet");
    else begin
      p = sb.pop_front();
      checks++;
      if (vrd_pkt_id !== PW'(p.id) || cyc - p.t != LAT || vrd_match !== p.exp || vrd_drop !== p.exp)
        fail($sformatf("verdict id=%0d ip=%h match=%0b exp=%0b lat=%0d", p.id, p.ip, vrd_match, p.exp, cyc - p.t));
      if (p.exp) n_hit++; else n_miss++;
    end
  end

  task automatic upload();
    for (int fn = 0; fn < 2; fn++)
      for (int i = 0; i < N_ST; i++) begin
        @(negedge clk);
        cfg_wr_en = 1; cfg_wr_fn = fn[0]; cfg_wr_idx = IW'(i);
        cfg_wr_data = CW'(pack_fb(fn[0] ? cg[i] : ch[i], HB));
      end
    @(negedge clk);
    cfg_wr_en = 0;
  endtask

  task automatic clear_table();
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < 2**HB; a++) begin
        @(negedge clk);
        tw_valid = 1; tw_part = p[0]; tw_addr = HB'(a); tw_data = '0;
        do @(posedge clk); while (!tw_ready);
        #1 tw_valid = 0;
      end
    t0 = new[2**HB]; t1 = new[2**HB];
    foreach (t0[a]) begin t0[a] = '{v: 0, ip: 0}; t1[a] = '{v: 0, ip: 0}; end
    stored.delete();
  endtask

  // Insert until the first unresolvable collision, compare the table, then
  // look every stored address and as many absent ones up, one per cycle.
  task automatic fill_and_lookup(input string name);
    bit ok; int unsigned lost, kicks;
    int unsigned kick_sum = 0;
    longint t_start;
    int hits0;
    t_start = cyc;
    ok = 1;
    while (ok && stored.size() < 2 * 2**HB) begin
      int unsigned ip;
      ip = $urandom;
      if (in_table(t0, t1, ip, ch, cg, HB)) continue;
      cuckoo_insert(t0, t1, ip, ch, cg, HB, MAXK, ok, lost, kicks);
      @(negedge clk);
      ins_valid = 1; ins_ip = ip;
      do @(posedge clk); while (!ins_ready);
      #1 ins_valid = 0;
      do @(posedge clk); while (!ins_res_valid);
      #1;
      checks++;
      if (ins_res_ok !== ok || int'(ins_res_kicks) != kicks || (!ok && ins_res_ip !== lost))
        fail($sformatf("insert %h ok=%0b/%0b kicks=%0d/%0d", ip, ins_res_ok, ok, ins_res_kicks, kicks));
      if (ok) begin stored.push_back(ip); kick_sum += kicks; end
    end
    $display("%s: %0d of %0d records (%0.2f %%) filled before the first unresolvable collision; %0d push-outs, %0d cycles",
             name, stored.size(), 2 * 2**HB, 100.0 * stored.size() / (2 * 2**HB), kick_sum, cyc - t_start);
    if (ok) fail("no unresolvable collision reached");
    for (int a = 0; a < 2**HB; a++) begin
      tbl_entry_t e0, e1;
      e0 = u_mem.peek(0, a); e1 = u_mem.peek(1, a);
      checks++;
      if (e0.valid !== t0[a].v || (t0[a].v && e0.ip !== t0[a].ip) ||
          e1.valid !== t1[a].v || (t1[a].v && e1.ip !== t1[a].ip)) fail($sformatf("table slot %0d", a));
    end
    hits0 = n_hit;
    for (int i = 0; i < 2 * stored.size(); i++) begin
      pkt_t p;
      @(negedge clk);
      for (int b = 0; b < 34; b++) pkt_hdr[b] = 8'($urandom);
      pkt_hdr[12] = 8'h08; pkt_hdr[13] = 8'h00; pkt_hdr[14] = 8'h45;
      p.ip = (i % 2 == 0) ? stored[i / 2] : $urandom;
      {pkt_hdr[26], pkt_hdr[27], pkt_hdr[28], pkt_hdr[29]} = p.ip;
      p.id = i & 32'hffff; p.t = cyc; p.exp = in_table(t0, t1, p.ip, ch, cg, HB);
      pkt_valid = 1; pkt_id = PW'(p.id);
      sb.push_back(p);
    end
    @(negedge clk);
    pkt_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (sb.size() != 0) fail("packets without verdict");
    if (n_hit - hits0 < stored.size()) fail("not all stored addresses found");
  endtask

  initial begin
    fb_t f, g;
    f.mask = 32'b1101_0100_0111; f.sel = '{9, 11, 0, 0}; f.en = 0;
    g.mask = 32'b1100_1000_0111; g.sel = '{3, 8, 0, 0};  g.en = 0;
    ch = new[N_ST]; cg = new[N_ST];
    foreach (ch[i]) begin ch[i] = f; cg[i] = g; end
    t0 = new[2**HB]; t1 = new[2**HB];
    foreach (t0[a]) begin t0[a] = '{v: 0, ip: 0}; t1[a] = '{v: 0, ip: 0}; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    upload();
    fill_and_lookup("copied example blocks");
    // second operation: clear, new configuration, rebuild
    clear_table();
    foreach (ch[i]) begin ch[i] = rand_fb_inv(HB); cg[i] = rand_fb_inv(HB); end
    upload();
    fill_and_lookup("random invertible stages");
    $display("lookups: %0d hits, %0d misses", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
