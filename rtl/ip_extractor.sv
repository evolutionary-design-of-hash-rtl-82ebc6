// ip_extractor: packet parser that extracts the source IPv4 address that the
// filter looks up.
//
// The parser sees the first HDR_BYTES = 34 bytes of each frame at once,
// byte n of the frame in hdr[n]. It assumes an untagged Ethernet II header
// followed by an IPv4 header: the frame is IPv4 when the EtherType (bytes
// 12-13) is 0x0800 and the IP version nibble (byte 14) is 4, and the source
// address is then bytes 26..29 in network order (byte 26 is the most
// significant). Other frames pass with is_ipv4 = 0 and must not be looked
// up. The header layout and the one-frame-per-cycle interface are this
// design's own choice; the filter only needs the source address.
//
// Timing: one frame per cycle, results registered, latency 1 cycle.
module ip_extractor
  import hash_pkg::*;
#(
  parameter int unsigned  PKT_ID_W  = 16,
  localparam int unsigned HDR_BYTES = 34
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [PKT_ID_W-1:0]          in_pkt_id,
  input  logic [HDR_BYTES-1:0][7:0]    in_hdr,
  output logic                         out_valid,
  output logic [PKT_ID_W-1:0]          out_pkt_id,
  output logic                         out_is_ipv4,
  output logic [IP_BITS-1:0]           out_src_ip
);

  localparam logic [15:0] ETYPE_IPV4 = 16'h0800;

  logic is_v4;
  assign is_v4 = ({in_hdr[12], in_hdr[13]} == ETYPE_IPV4) && (in_hdr[14][7:4] == 4'd4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_pkt_id  <= in_pkt_id;
    out_is_ipv4 <= is_v4;
    out_src_ip  <= is_v4 ? {in_hdr[26], in_hdr[27], in_hdr[28], in_hdr[29]} : '0;
  end

endmodule
