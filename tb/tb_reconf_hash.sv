// tb_reconf_hash: one hash function (input_sequencer + reconf_hash) at the
// default sizes. Streams addresses, one per cycle with random gaps, and
// checks that each hash appears exactly 43 cycles after its address and
// equals the stage-by-stage reference. Uses three configurations: random
// per stage, one random block copied into every stage, and a block shaped
// like the published example F_1 copied into every stage, with seeds 0 and 1.
module tb_reconf_hash;
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;

  localparam int unsigned HB   = 12;
  localparam int unsigned N_ST = n_stages(32, HB);
  localparam int unsigned CW   = fb_cfg_w(HB);

  logic clk = 0;
  logic [31:0] addr_in, seq;
  logic [N_ST-1:0][CW-1:0] cfg;
  logic [HB-1:0] hash0, hash1;
  fb_t cfgm [];
  int checks = 0, failures = 0;

  input_sequencer #(.IN_BITS(32)) u_seq (.clk, .addr_in, .seq);
  reconf_hash #(.HASH_BITS(HB), .IN_BITS(32), .SEED(12'd0)) dut0 (.clk, .seq, .cfg, .hash(hash0));
  reconf_hash #(.HASH_BITS(HB), .IN_BITS(32), .SEED(12'd1)) dut1 (.clk, .seq, .cfg, .hash(hash1));

  always #5 clk = ~clk;

  task automatic load(input int mode);
    fb_t c;
    cfgm = new[N_ST];
    c = rand_fb(HB);
    if (mode == 2) begin
      // shaped like example F_1: mask {0,1,2,6,8,10,11}, product S9 & S11
      c.mask = 12'b1101_0100_0111; c.sel[0] = 9; c.sel[1] = 11; c.sel[2] = 0; c.sel[3] = 0; c.en = 0;
    end
    for (int i = 0; i < N_ST; i++) begin
      cfgm[i] = (mode == 0) ? rand_fb(HB) : c;
      cfg[i]  = CW'(pack_fb(cfgm[i], HB));
    end
  endtask

  task automatic run(input int n);
    int unsigned sent [$];    // address sent in each cycle, or -1 gap marker
    bit          sv   [$];
    int t = 0;
    while (t < n + N_ST) begin
      @(negedge clk);
      if (t < n && ($urandom % 4 != 0)) begin addr_in = $urandom; sv.push_back(1); end
      else begin addr_in = $urandom; sv.push_back(0); end
      sent.push_back(addr_in);
      // the address presented N_ST cycles ago has its hash now (after the edge)
      @(posedge clk); #1;
      if (sent.size() == N_ST) begin  // 43rd clock edge since it was presented
        int unsigned a; bit v;
        a = sent.pop_front(); v = sv.pop_front();
        if (v) begin
          checks += 2;
          if (hash0 !== HB'(hash(a, cfgm, 0, HB))) begin
            failures++;
            if (failures < 10) $display("FAIL seed0 addr=%h got=%h exp=%h", a, hash0, hash(a, cfgm, 0, HB));
          end
          if (hash1 !== HB'(hash(a, cfgm, 1, HB))) begin
            failures++;
            if (failures < 10) $display("FAIL seed1 addr=%h got=%h exp=%h", a, hash1, hash(a, cfgm, 1, HB));
          end
        end
      end
      t++;
    end
  endtask

  initial begin
    addr_in = '0;
    for (int m = 0; m < 3; m++) begin
      load(m);
      run(300);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
