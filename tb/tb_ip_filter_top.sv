// tb_ip_filter_top: end-to-end test of the filter at a reduced hash width
// (HASH_BITS = 5: 36 stages, table of 2 x 32 records) on the behavioural
// external memory.
//
// Phases: upload a random configuration; insert addresses by cuckoo
// hashing while packets keep arriving (the inserter must wait for free
// pipeline and memory cycles); look up stored, absent and non-IPv4 packets
// with the filter first dropping, then monitoring; clear the table with
// host writes while packets flow; upload a new configuration and rebuild.
// Every insertion result and every verdict taken while the table is stable
// is compared with the reference model, every verdict's latency and order
// is checked, and each mechanism must occur at least once.
module tb_ip_filter_top;
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;
  localparam int unsigned HB = 5, RD_LAT = 2, PW = 16;
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

  ip_filter_top #(.HASH_BITS(HB), .RD_LAT(RD_LAT), .PKT_ID_W(PW)) dut (.*);
  ext_mem_model #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_cfg_wr = 0, n_ins_direct = 0, n_ins_kicked = 0, n_ins_fail = 0, n_ins_dup = 0;
  int n_hash_stall = 0, n_mem_stall = 0, n_tw = 0, n_tw_stall = 0;
  int n_hit = 0, n_miss = 0, n_nonip = 0, n_drop = 0, n_log = 0, n_reconfig = 0;

  always @(posedge clk) if (rst_n) begin
    n_hash_stall += int'(dut.ins_hreq_valid && !dut.ins_hreq_gnt);
    n_mem_stall  += int'(dut.im_req && !dut.im_gnt);
    n_tw_stall   += int'(tw_valid && !tw_ready);
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 15) $display("FAIL @%0d %s", cyc, s);
  endtask

  fb_t ch [], cg [];
  rec_t t0 [], t1 [];
  int unsigned stored [$];

  task automatic upload_config();
    ch = new[N_ST]; cg = new[N_ST];
    for (int i = 0; i < N_ST; i++) begin ch[i] = rand_fb(HB); cg[i] = rand_fb(HB); end
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < N_ST; i++) begin
        @(negedge clk);
        cfg_wr_en = 1; cfg_wr_fn = f[0]; cfg_wr_idx = IW'(i);
        cfg_wr_data = CW'(pack_fb(f ? cg[i] : ch[i], HB));
        n_cfg_wr++;
      end
    @(negedge clk);
    cfg_wr_en = 0;
  endtask

  function automatic void ref_clear();
    t0 = new[2**HB]; t1 = new[2**HB];
    foreach (t0[a]) begin t0[a] = '{v: 0, ip: 0}; t1[a] = '{v: 0, ip: 0}; end
    stored.delete();
  endfunction

  // ---------------- packet source and verdict scoreboard ----------------
  typedef struct { int unsigned id; longint t; bit v4; int unsigned ip; bit chk; bit exp; filter_action_e mode; } pkt_t;
  pkt_t sb [$];
  bit   traffic = 0;      // send packets in the background
  bit   stable  = 0;      // table not changing: verdicts can be predicted
  int   rate    = 2;      // 1 in rate cycles carries a packet
  int unsigned next_id = 0;
  longint mode_changed = 0;   // cycle of the last filter_mode change
  filter_action_e mode_seen = ACT_DROP;
  always @(posedge clk) if (filter_mode != mode_seen) begin
    mode_seen <= filter_mode;
    mode_changed <= cyc;
  end

  initial begin
    forever begin
      @(negedge clk);
      pkt_valid = 0;
      if (traffic && rst_n && ($urandom % rate) == 0) begin
        pkt_t p;
        int k;
        for (int b = 0; b < 34; b++) pkt_hdr[b] = 8'($urandom);
        k = $urandom % 8;
        p.v4 = (k != 0);
        if (p.v4) begin pkt_hdr[12] = 8'h08; pkt_hdr[13] = 8'h00; pkt_hdr[14] = 8'h45; end
        else      begin pkt_hdr[12] = 8'h86; pkt_hdr[13] = 8'hdd; pkt_hdr[14] = 8'h60; end
        p.ip = (k >= 4 && stored.size() > 0) ? stored[$urandom % stored.size()] : $urandom;
        {pkt_hdr[26], pkt_hdr[27], pkt_hdr[28], pkt_hdr[29]} = p.ip;
        p.id = next_id++; p.t = cyc; p.chk = stable; p.mode = filter_mode;
        p.exp = p.v4 && in_table(t0, t1, p.ip, ch, cg, HB);
        pkt_valid = 1; pkt_id = PW'(p.id);
        sb.push_back(p);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (vrd_valid) begin
      pkt_t p;
      if (sb.size() == 0) fail("verdict without packet");
      else begin
        p = sb.pop_front();
        checks++;
        if (vrd_pkt_id !== PW'(p.id)) fail($sformatf("verdict order id=%0d exp %0d", vrd_pkt_id, p.id));
        if (cyc - p.t != LAT) fail($sformatf("latency %0d exp %0d", cyc - p.t, LAT));
        if (p.chk) begin
          checks++;
          // the action is the one set when the verdict is made; skip it for
          // packets in flight across a mode change
          if (vrd_match !== p.exp ||
              (p.t > mode_changed + 1 &&
               (vrd_drop !== (p.exp && p.mode == ACT_DROP) ||
                log_valid !== (p.exp && p.mode == ACT_MONITOR))) ||
              (log_valid && (log_src_ip !== p.ip || log_pkt_id !== PW'(p.id))))
            fail($sformatf("verdict id=%0d ip=%h match=%0b exp=%0b", p.id, p.ip, vrd_match, p.exp));
          if (!p.v4) n_nonip++;
          else if (p.exp) n_hit++;
          else n_miss++;
        end
        n_drop += int'(vrd_drop);
        n_log  += int'(log_valid);
      end
    end
  end

  // ---------------- insertion ----------------
  task automatic insert(input int unsigned ip);
    bit ok; int unsigned lost, kicks;
    bit dup;
    dup = in_table(t0, t1, ip, ch, cg, HB);
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
    if (ok && !dup) stored.push_back(ip);
    if (!ok) begin
      // the address left out is no longer stored
      foreach (stored[i]) if (stored[i] == lost) begin stored.delete(i); break; end
    end
    if (ok && dup) n_ins_dup++;
    else if (ok && kicks == 0) n_ins_direct++;
    else if (ok) n_ins_kicked++;
    else n_ins_fail++;
  endtask

  task automatic fill(input int n);
    stable = 0;
    for (int i = 0; i < n; i++)
      insert((i > 2 && $urandom % 10 == 0 && stored.size() > 0) ? stored[$urandom % stored.size()] : $urandom);
    repeat (LAT + 2) @(negedge clk);
    stable = 1;
  endtask

  task automatic compare_table();
    for (int a = 0; a < 2**HB; a++) begin
      tbl_entry_t e0, e1;
      e0 = u_mem.peek(0, a); e1 = u_mem.peek(1, a);
      checks++;
      if (e0.valid !== t0[a].v || (t0[a].v && e0.ip !== t0[a].ip) ||
          e1.valid !== t1[a].v || (t1[a].v && e1.ip !== t1[a].ip)) fail($sformatf("table slot %0d", a));
    end
  endtask

  task automatic clear_table();
    stable = 0;
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < 2**HB; a++) begin
        @(negedge clk);
        tw_valid = 1; tw_part = p[0]; tw_addr = HB'(a); tw_data = '0;
        do @(posedge clk); while (!tw_ready);
        #1 tw_valid = 0;
        n_tw++;
      end
    ref_clear();
    repeat (LAT + 2) @(negedge clk);
    stable = 1;
  endtask

  initial begin
    ref_clear();
    repeat (3) @(negedge clk);
    rst_n = 1;
    upload_config();
    // insertion under traffic
    traffic = 1; rate = 2;
    fill(70);
    compare_table();
    // lookups on a stable table: drop, then monitor
    filter_mode = ACT_DROP;
    repeat (400) @(negedge clk);
    filter_mode = ACT_MONITOR;
    repeat (400) @(negedge clk);
    // clear through host writes while packets flow, then lookups all miss
    rate = 1;
    clear_table();
    rate = 2;
    compare_table();
    repeat (200) @(negedge clk);
    // new configuration, rebuild
    traffic = 0;
    repeat (LAT + 2) @(negedge clk);
    upload_config();
    n_reconfig++;
    traffic = 1;
    fill(50);
    compare_table();
    filter_mode = ACT_DROP;
    repeat (400) @(negedge clk);
    traffic = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (sb.size() != 0) fail("packets without verdict");
    $display("cfg_wr=%0d ins direct=%0d kicked=%0d dup=%0d fail=%0d hash_stall=%0d mem_stall=%0d",
             n_cfg_wr, n_ins_direct, n_ins_kicked, n_ins_dup, n_ins_fail, n_hash_stall, n_mem_stall);
    $display("host_wr=%0d host_stall=%0d hit=%0d miss=%0d non_ipv4=%0d drop=%0d log=%0d reconfig=%0d",
             n_tw, n_tw_stall, n_hit, n_miss, n_nonip, n_drop, n_log, n_reconfig);
    if (n_cfg_wr == 0) fail("no config write");
    if (n_ins_direct == 0) fail("no direct insertion");
    if (n_ins_kicked == 0) fail("no insertion with push-outs");
    if (n_ins_dup == 0) fail("no repeated insertion");
    if (n_ins_fail == 0) fail("no unresolvable collision");
    if (n_hash_stall == 0) fail("inserter never waited for the hash pipeline");
    if (n_mem_stall == 0) fail("inserter never waited for a memory port");
    if (n_tw == 0 || n_tw_stall == 0) fail("no host write / host write stall");
    if (n_hit == 0 || n_miss == 0 || n_nonip == 0) fail("no hit / miss / non-IPv4");
    if (n_drop == 0 || n_log == 0) fail("no drop / log");
    if (n_reconfig == 0) fail("no reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
