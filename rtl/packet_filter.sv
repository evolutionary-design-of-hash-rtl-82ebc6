// packet_filter: acts on the lookup result of each packet.
//
// When the source address of a packet is in the table, the packet is either
// dropped (mode ACT_DROP) or let through and reported on the log port for
// monitoring (mode ACT_MONITOR). Packets whose address is not in the table,
// and frames that are not IPv4, pass unchanged. The two actions follow the
// published filter; the per-packet verdict and log record interface is this
// design's own choice.
//
// Timing: one packet per cycle, registered, latency 1 cycle.
module packet_filter
  import hash_pkg::*;
#(
  parameter int unsigned PKT_ID_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  filter_action_e       mode,
  input  logic                 in_valid,
  input  logic [PKT_ID_W-1:0]  in_pkt_id,
  input  logic [IP_BITS-1:0]   in_src_ip,
  input  logic                 in_match,
  // verdict, one per packet, in arrival order
  output logic                 out_valid,
  output logic [PKT_ID_W-1:0]  out_pkt_id,
  output logic                 out_match,
  output logic                 out_drop,
  // monitoring record of a matching packet that was let through
  output logic                 log_valid,
  output logic [PKT_ID_W-1:0]  log_pkt_id,
  output logic [IP_BITS-1:0]   log_src_ip
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      log_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      log_valid <= in_valid && in_match && (mode == ACT_MONITOR);
    end
  end

  always_ff @(posedge clk) begin
    out_pkt_id <= in_pkt_id;
    out_match  <= in_match;
    out_drop   <= in_match && (mode == ACT_DROP);
    log_pkt_id <= in_pkt_id;
    log_src_ip <= in_src_ip;
  end

endmodule
