// tb_hash_pair: hash pair at default sizes with independent random
// configurations for h and g. Streams requests with random gaps and checks,
// at exactly 43 cycles after each request, the valid flag, both hashes
// (seeds 0 and 1) against the reference, and the carried kind, address and
// tag. Cycles without a request must give no valid output.
module tb_hash_pair;
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;
  localparam int unsigned HB = 12, N_ST = n_stages(32, HB), CW = fb_cfg_w(HB), MW = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  req_kind_e in_kind = REQ_LOOKUP;
  logic [31:0] in_addr = '0;
  logic [MW-1:0] in_meta = '0;
  logic [N_ST-1:0][CW-1:0] cfg_h, cfg_g;
  logic out_valid;
  req_kind_e out_kind;
  logic [31:0] out_addr;
  logic [MW-1:0] out_meta;
  logic [HB-1:0] out_h, out_g;
  fb_t ch [], cg [];
  int checks = 0, failures = 0;

  hash_pair #(.HASH_BITS(HB), .IN_BITS(32), .META_W(MW)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit v; req_kind_e k; int unsigned a; int unsigned m; } req_t;
  req_t q [$];

  initial begin
    ch = new[N_ST]; cg = new[N_ST];
    for (int i = 0; i < N_ST; i++) begin
      ch[i] = rand_fb(HB); cg[i] = rand_fb(HB);
      cfg_h[i] = CW'(pack_fb(ch[i], HB)); cfg_g[i] = CW'(pack_fb(cg[i], HB));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      req_t r;
      @(negedge clk);
      r.v = (t < 550) && ($urandom % 3 != 0);
      r.k = req_kind_e'($urandom & 1);
      r.a = $urandom; r.m = $urandom & 8'hff;
      in_valid = r.v; in_kind = r.k; in_addr = r.a; in_meta = MW'(r.m);
      q.push_back(r);
      @(posedge clk); #1;
      if (q.size() == N_ST) begin
        r = q.pop_front();
        checks++;
        if (out_valid !== r.v) begin
          failures++; if (failures < 10) $display("FAIL valid t=%0d", t);
        end else if (r.v) begin
          checks++;
          if (out_h !== HB'(hash(r.a, ch, 0, HB)) || out_g !== HB'(hash(r.a, cg, 1, HB)) ||
              out_kind !== r.k || out_addr !== r.a || out_meta !== MW'(r.m)) begin
            failures++;
            if (failures < 10) $display("FAIL data addr=%h h=%h/%h g=%h/%h", r.a, out_h,
                                        hash(r.a, ch, 0, HB), out_g, hash(r.a, cg, 1, HB));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
