// tb_table_fill: testbench helper that fills one filter instance with random
// addresses until the first unresolvable collision, checking every
// insertion result against the reference model, then looks up every
// stored address and as many absent ones back to back and checks each
// verdict. Runs when start is raised; raises done when finished. The hash
// configuration is random, a different function block in every stage, with
// every stage invertible (tb_hash_ref_pkg::rand_fb_inv), which stands in
// for a configuration found by a search.
module tb_table_fill
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;
#(
  parameter int unsigned HB = 13
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stored
);
  localparam int unsigned RD_LAT = 2, PW = 16;
  localparam int unsigned N_ST = n_stages(32, HB), CW = fb_cfg_w(HB), IW = $clog2(N_ST);
  localparam int unsigned MAXK = 4 << HB, KW = $clog2(MAXK + 1);
  localparam int unsigned LAT = 1 + N_ST + RD_LAT + 1 + 1;

  logic rst_n = 0;
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

  ip_filter_top #(.HASH_BITS(HB)) dut (.*);
  ext_mem_model #(.HASH_BITS(HB), .RD_LAT(RD_LAT)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  fb_t ch [], cg [];
  rec_t t0 [], t1 [];
  int unsigned stored [$];
  typedef struct { int unsigned id; int unsigned ip; bit exp; } pkt_t;
  pkt_t sb [$];

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL HB=%0d %s", HB, s);
  endtask

  always @(posedge clk) if (rst_n && vrd_valid) begin
    pkt_t p;
    if (sb.size() == 0) fail("verdict without packet");
    else begin
      p = sb.pop_front();
      checks++;
      if (vrd_pkt_id !== PW'(p.id) || vrd_match !== p.exp) fail($sformatf("verdict ip=%h", p.ip));
    end
  end

  initial begin
    bit ok; int unsigned lost, kicks;
    done = 0; checks = 0; failures = 0; n_stored = 0;
    #2;                       // let the caller clear start first
    wait (start);
    ch = new[N_ST]; cg = new[N_ST];
    foreach (ch[i]) begin ch[i] = rand_fb_inv(HB); cg[i] = rand_fb_inv(HB); end
    t0 = new[2**HB]; t1 = new[2**HB];
    foreach (t0[a]) begin t0[a] = '{v: 0, ip: 0}; t1[a] = '{v: 0, ip: 0}; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int fn = 0; fn < 2; fn++)
      for (int i = 0; i < N_ST; i++) begin
        @(negedge clk);
        cfg_wr_en = 1; cfg_wr_fn = fn[0]; cfg_wr_idx = IW'(i);
        cfg_wr_data = CW'(pack_fb(fn[0] ? cg[i] : ch[i], HB));
      end
    @(negedge clk);
    cfg_wr_en = 0;
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
      if (ok) stored.push_back(ip);
    end
    n_stored = stored.size();
    for (int i = 0; i < 2 * stored.size(); i++) begin
      pkt_t p;
      @(negedge clk);
      for (int b = 0; b < 34; b++) pkt_hdr[b] = 8'($urandom);
      pkt_hdr[12] = 8'h08; pkt_hdr[13] = 8'h00; pkt_hdr[14] = 8'h45;
      p.ip = (i % 2 == 0) ? stored[i / 2] : $urandom;
      {pkt_hdr[26], pkt_hdr[27], pkt_hdr[28], pkt_hdr[29]} = p.ip;
      p.id = i & 32'hffff; p.exp = in_table(t0, t1, p.ip, ch, cg, HB);
      if (i % 2 == 0 && !p.exp) fail("stored address not in reference");
      pkt_valid = 1; pkt_id = PW'(p.id);
      sb.push_back(p);
    end
    @(negedge clk);
    pkt_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (sb.size() != 0) fail("packets without verdict");
    $display("HASH_BITS=%0d table %0d records: %0d addresses stored (%0.2f %%) before the first unresolvable collision",
             HB, 2 * 2**HB, n_stored, 100.0 * n_stored / (2 * 2**HB));
    done = 1;
  end
endmodule
