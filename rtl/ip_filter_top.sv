// ip_filter_top: FPGA part of an IPv4 source-address filter built on cuckoo
// hashing with an evolved, reconfigurable hash function pair.
//
// Data flow of a packet: ip_extractor takes the source address from the
// frame header; hash_pair computes the two hashes h and g in a 43-stage
// pipeline (one address per cycle); lookup_unit reads position h of table
// part 0 and position g of part 1 through the external-memory ports and
// compares; packet_filter drops the packet or reports it for monitoring
// when the address is in the table. Every frame gets one verdict, in
// arrival order, after a fixed latency of
//   1 (parser) + N_ST (hash) + RD_LAT + 1 (compare) + 1 (filter) cycles
// = 48 cycles at the default sizes.
//
// Table maintenance: software uploads the hash configuration through the
// config write port (config_register) and sends addresses to be inserted;
// cuckoo_inserter places them by cuckoo hashing, using the hash pipeline
// and the memory ports only in cycles that no packet needs
// (table_arbiter). Software may also write table records directly, e.g.
// to clear the table or to load one it has already built for a new
// configuration. Changing the configuration does not move the records
// already stored: the table has to be rebuilt for the new hash functions.
//
// The table itself is in external memory and is not part of this design:
// its two ports (one per table part, 2^HASH_BITS records of {valid, ip}
// each) are brought out. Each must answer a read exactly RD_LAT cycles
// after the request and perform a write in the cycle of the request.
module ip_filter_top
  import hash_pkg::*;
#(
  parameter int unsigned  HASH_BITS = HASH_BITS_DEFAULT,
  parameter int unsigned  RD_LAT    = 2,
  parameter int unsigned  PKT_ID_W  = 16,
  parameter int unsigned  MAX_KICKS = 4 << HASH_BITS,
  localparam int unsigned N_ST      = n_stages(IP_BITS, HASH_BITS),
  localparam int unsigned CW        = fb_cfg_w(HASH_BITS),
  localparam int unsigned IW        = $clog2(N_ST),
  localparam int unsigned KW        = $clog2(MAX_KICKS + 1),
  localparam int unsigned HDR_BYTES = 34
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // hash configuration upload
  input  logic                      cfg_wr_en,
  input  logic                      cfg_wr_fn,
  input  logic [IW-1:0]             cfg_wr_idx,
  input  logic [CW-1:0]             cfg_wr_data,
  input  filter_action_e            filter_mode,
  // address insertion
  input  logic                      ins_valid,
  output logic                      ins_ready,
  input  logic [IP_BITS-1:0]        ins_ip,
  output logic                      ins_res_valid,
  output logic                      ins_res_ok,
  output logic [IP_BITS-1:0]        ins_res_ip,
  output logic [KW-1:0]             ins_res_kicks,
  output logic                      ins_busy,
  // direct table write
  input  logic                      tw_valid,
  output logic                      tw_ready,
  input  logic                      tw_part,
  input  logic [HASH_BITS-1:0]      tw_addr,
  input  tbl_entry_t                tw_data,
  // packets in
  input  logic                      pkt_valid,
  input  logic [PKT_ID_W-1:0]       pkt_id,
  input  logic [HDR_BYTES-1:0][7:0] pkt_hdr,
  // verdicts and monitoring records out
  output logic                      vrd_valid,
  output logic [PKT_ID_W-1:0]       vrd_pkt_id,
  output logic                      vrd_match,
  output logic                      vrd_drop,
  output logic                      log_valid,
  output logic [PKT_ID_W-1:0]       log_pkt_id,
  output logic [IP_BITS-1:0]        log_src_ip,
  // external memory holding the two table parts
  output logic                      mem_req   [2],
  output logic                      mem_we    [2],
  output logic [HASH_BITS-1:0]      mem_addr  [2],
  output tbl_entry_t                mem_wdata [2],
  input  logic                      mem_rvalid[2],
  input  tbl_entry_t                mem_rdata [2]
);

  localparam int unsigned META_W = PKT_ID_W + 1;  // {is_ipv4, pkt_id}

  // ---------------- configuration ----------------
  logic [N_ST-1:0][CW-1:0] cfg_h, cfg_g;

  config_register #(.HASH_BITS(HASH_BITS), .IN_BITS(IP_BITS)) u_cfg (
    .clk, .rst_n,
    .wr_en   (cfg_wr_en),
    .wr_fn   (cfg_wr_fn),
    .wr_idx  (cfg_wr_idx),
    .wr_data (cfg_wr_data),
    .cfg_h, .cfg_g
  );

  // ---------------- packet parsing ----------------
  logic                px_valid, px_is_ipv4;
  logic [PKT_ID_W-1:0] px_pkt_id;
  logic [IP_BITS-1:0]  px_src_ip;

  ip_extractor #(.PKT_ID_W(PKT_ID_W)) u_parse (
    .clk, .rst_n,
    .in_valid    (pkt_valid),
    .in_pkt_id   (pkt_id),
    .in_hdr      (pkt_hdr),
    .out_valid   (px_valid),
    .out_pkt_id  (px_pkt_id),
    .out_is_ipv4 (px_is_ipv4),
    .out_src_ip  (px_src_ip)
  );

  // ---------------- hash pipeline, shared ----------------
  // Packets always get the pipeline; the inserter gets the idle cycles.
  logic                 ins_hreq_valid, ins_hreq_gnt;
  logic [IP_BITS-1:0]   ins_hreq_ip;
  logic                 hp_in_valid;
  req_kind_e            hp_in_kind;
  logic [IP_BITS-1:0]   hp_in_addr;
  logic [META_W-1:0]    hp_in_meta;
  logic                 hp_out_valid;
  req_kind_e            hp_out_kind;
  logic [IP_BITS-1:0]   hp_out_addr;
  logic [META_W-1:0]    hp_out_meta;
  logic [HASH_BITS-1:0] hp_out_h, hp_out_g;

  assign ins_hreq_gnt = ins_hreq_valid && !px_valid;

  always_comb begin
    hp_in_valid = px_valid || ins_hreq_valid;
    hp_in_kind  = px_valid ? REQ_LOOKUP : REQ_INSERT;
    hp_in_addr  = px_valid ? px_src_ip : ins_hreq_ip;
    hp_in_meta  = {px_is_ipv4, px_pkt_id};
  end

  hash_pair #(.HASH_BITS(HASH_BITS), .IN_BITS(IP_BITS), .META_W(META_W)) u_hash (
    .clk, .rst_n,
    .in_valid  (hp_in_valid),
    .in_kind   (hp_in_kind),
    .in_addr   (hp_in_addr),
    .in_meta   (hp_in_meta),
    .cfg_h, .cfg_g,
    .out_valid (hp_out_valid),
    .out_kind  (hp_out_kind),
    .out_addr  (hp_out_addr),
    .out_meta  (hp_out_meta),
    .out_h     (hp_out_h),
    .out_g     (hp_out_g)
  );

  // ---------------- lookup ----------------
  logic                 lk_rd;
  logic [HASH_BITS-1:0] lk_addr0, lk_addr1;
  logic                 lk_valid, lk_check, lk_match;
  logic [IP_BITS-1:0]   lk_addr;
  logic [PKT_ID_W-1:0]  lk_meta;

  lookup_unit #(.HASH_BITS(HASH_BITS), .META_W(PKT_ID_W), .RD_LAT(RD_LAT)) u_lookup (
    .clk, .rst_n,
    .in_valid  (hp_out_valid && hp_out_kind == REQ_LOOKUP),
    .in_check  (hp_out_meta[META_W-1]),
    .in_addr   (hp_out_addr),
    .in_h      (hp_out_h),
    .in_g      (hp_out_g),
    .in_meta   (hp_out_meta[PKT_ID_W-1:0]),
    .rd_req    (lk_rd),
    .rd_addr0  (lk_addr0),
    .rd_addr1  (lk_addr1),
    .rd_data0  (mem_rdata[0]),
    .rd_data1  (mem_rdata[1]),
    .out_valid (lk_valid),
    .out_check (lk_check),
    .out_addr  (lk_addr),
    .out_meta  (lk_meta),
    .out_match (lk_match)
  );

  packet_filter #(.PKT_ID_W(PKT_ID_W)) u_filter (
    .clk, .rst_n,
    .mode       (filter_mode),
    .in_valid   (lk_valid),
    .in_pkt_id  (lk_meta),
    .in_src_ip  (lk_addr),
    .in_match   (lk_match && lk_check),
    .out_valid  (vrd_valid),
    .out_pkt_id (vrd_pkt_id),
    .out_match  (vrd_match),
    .out_drop   (vrd_drop),
    .log_valid  (log_valid),
    .log_pkt_id (log_pkt_id),
    .log_src_ip (log_src_ip)
  );

  // ---------------- insertion ----------------
  logic                 im_req, im_we, im_part, im_gnt, im_rvalid;
  logic [HASH_BITS-1:0] im_addr;
  tbl_entry_t           im_wdata, im_rdata;

  cuckoo_inserter #(.HASH_BITS(HASH_BITS), .MAX_KICKS(MAX_KICKS)) u_ins (
    .clk, .rst_n,
    .cmd_valid  (ins_valid),
    .cmd_ready  (ins_ready),
    .cmd_ip     (ins_ip),
    .hreq_valid (ins_hreq_valid),
    .hreq_ip    (ins_hreq_ip),
    .hreq_gnt   (ins_hreq_gnt),
    .hrsp_valid (hp_out_valid && hp_out_kind == REQ_INSERT),
    .hrsp_h     (hp_out_h),
    .hrsp_g     (hp_out_g),
    .m_req      (im_req),
    .m_we       (im_we),
    .m_part     (im_part),
    .m_addr     (im_addr),
    .m_wdata    (im_wdata),
    .m_gnt      (im_gnt),
    .m_rvalid   (im_rvalid),
    .m_rdata    (im_rdata),
    .res_valid  (ins_res_valid),
    .res_ok     (ins_res_ok),
    .res_ip     (ins_res_ip),
    .res_kicks  (ins_res_kicks),
    .busy       (ins_busy)
  );

  // ---------------- memory port sharing ----------------
  table_arbiter #(.HASH_BITS(HASH_BITS), .RD_LAT(RD_LAT)) u_arb (
    .clk, .rst_n,
    .lk_rd      (lk_rd),
    .lk_addr0   (lk_addr0),
    .lk_addr1   (lk_addr1),
    .hw_valid   (tw_valid),
    .hw_ready   (tw_ready),
    .hw_part    (tw_part),
    .hw_addr    (tw_addr),
    .hw_data    (tw_data),
    .ins_req    (im_req),
    .ins_we     (im_we),
    .ins_part   (im_part),
    .ins_addr   (im_addr),
    .ins_wdata  (im_wdata),
    .ins_gnt    (im_gnt),
    .ins_rvalid (im_rvalid),
    .ins_rdata  (im_rdata),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata
  );

endmodule
