// tb_ip_extractor: random Ethernet/IPv4 frames, frames with other
// EtherTypes and IPv6 frames; checks the IPv4 flag, the source address and
// the one-cycle latency.
module tb_ip_extractor;
  import hash_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [15:0] in_pkt_id = '0;
  logic [33:0][7:0] in_hdr = '0;
  logic out_valid, out_is_ipv4;
  logic [15:0] out_pkt_id;
  logic [31:0] out_src_ip;
  int checks = 0, failures = 0, n_v4 = 0, n_other = 0;

  ip_extractor #(.PKT_ID_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int kind;
      bit exp_v4;
      logic [31:0] src;
      @(negedge clk);
      for (int b = 0; b < 34; b++) in_hdr[b] = 8'($urandom);
      src  = $urandom;
      kind = $urandom % 4;   // 0,1: IPv4  2: ARP  3: IPv6
      case (kind)
        0, 1: begin in_hdr[12] = 8'h08; in_hdr[13] = 8'h00; in_hdr[14] = 8'h45; end
        2:    begin in_hdr[12] = 8'h08; in_hdr[13] = 8'h06; end
        default: begin in_hdr[12] = 8'h86; in_hdr[13] = 8'hdd; in_hdr[14] = 8'h60; end
      endcase
      {in_hdr[26], in_hdr[27], in_hdr[28], in_hdr[29]} = src;
      exp_v4 = (kind < 2);
      in_valid = ($urandom % 4) != 0;
      in_pkt_id = 16'(n);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid"); end
      if (in_valid) begin
        checks++;
        if (exp_v4) n_v4++; else n_other++;
        if (out_is_ipv4 !== exp_v4 || out_pkt_id !== 16'(n) || (exp_v4 && out_src_ip !== src)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d v4=%0b/%0b ip=%h/%h", n, out_is_ipv4, exp_v4, out_src_ip, src);
        end
      end
    end
    if (n_v4 == 0 || n_other == 0) failures++;
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
