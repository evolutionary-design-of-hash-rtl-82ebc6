// tb_packet_filter: random lookup results in both modes; checks verdict,
// drop flag, log record and the one-cycle latency.
module tb_packet_filter;
  import hash_pkg::*;
  logic clk = 0, rst_n = 0;
  filter_action_e mode = ACT_DROP;
  logic in_valid = 0, in_match = 0;
  logic [15:0] in_pkt_id = '0;
  logic [31:0] in_src_ip = '0;
  logic out_valid, out_match, out_drop, log_valid;
  logic [15:0] out_pkt_id, log_pkt_id;
  logic [31:0] log_src_ip;
  int checks = 0, failures = 0, n_drop = 0, n_log = 0;

  packet_filter #(.PKT_ID_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      bit e_drop, e_log;
      @(negedge clk);
      mode = filter_action_e'((n / 100) & 1);
      in_valid = $urandom; in_match = $urandom; in_pkt_id = 16'(n); in_src_ip = $urandom;
      e_drop = in_valid && in_match && mode == ACT_DROP;
      e_log  = in_valid && in_match && mode == ACT_MONITOR;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid || log_valid !== e_log ||
          (in_valid && (out_drop !== e_drop || out_match !== in_match || out_pkt_id !== 16'(n))) ||
          (e_log && (log_pkt_id !== 16'(n) || log_src_ip !== in_src_ip))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d", n);
      end
      n_drop += int'(e_drop); n_log += int'(e_log);
    end
    if (n_drop == 0 || n_log == 0) failures++;
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
