// tb_config_register: random configuration writes to both hash functions,
// including indices beyond the last stage, checked word by word against a
// model after every write; also checks the reset value.
module tb_config_register;
  import hash_pkg::*;
  localparam int unsigned HB = 12, N_ST = n_stages(32, HB), CW = fb_cfg_w(HB), IW = $clog2(N_ST);
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_fn = 0;
  logic [IW-1:0] wr_idx = '0;
  logic [CW-1:0] wr_data = '0;
  logic [N_ST-1:0][CW-1:0] cfg_h, cfg_g, mh, mg;
  int checks = 0, failures = 0;

  config_register #(.HASH_BITS(HB), .IN_BITS(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (cfg_h !== mh || cfg_g !== mg) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    mh = '0; mg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("reset");
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wr_en   = ($urandom % 5) != 0;
      wr_fn   = $urandom;
      wr_idx  = IW'($urandom_range(63, 0));
      wr_data = CW'({$urandom, $urandom});
      if (wr_en && wr_idx < N_ST) begin
        if (wr_fn) mg[wr_idx] = wr_data; else mh[wr_idx] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      compare($sformatf("write %0d", n));
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
