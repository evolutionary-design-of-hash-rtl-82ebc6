// hash_pkg: constants, types and helper functions shared by the IP address
// filter. The filter hashes an IPv4 source address with a pair of
// reconfigurable, pipelined hash functions and looks it up in a two-part
// cuckoo hash table held in external memory.
//
// Sizes that follow the published design: 32 input bits, 12-bit hashes,
// 32 + 12 - 1 = 43 pipeline stages, a table of 2 x 2^12 records.
// The bit layout of a function-block configuration word and of a table
// record are this design's own choice:
//   function-block word = {en, selD, selC, selB, selA, mask}, mask in the LSBs
//   table record        = {valid, ip}
package hash_pkg;

  localparam int unsigned IP_BITS           = 32;  // IPv4 address
  localparam int unsigned HASH_BITS_DEFAULT = 12;  // bits of one hash

  // Width of one state-bit select (selA..selD) for a given hash width.
  function automatic int unsigned sel_w(input int unsigned hash_bits);
    return (hash_bits > 1) ? $clog2(hash_bits) : 1;
  endfunction

  // Width of one function-block configuration word: mask M, four selects, En.
  function automatic int unsigned fb_cfg_w(input int unsigned hash_bits);
    return hash_bits + 4 * sel_w(hash_bits) + 1;
  endfunction

  // Number of pipeline stages: one per input bit plus hash_bits-1 zero stages.
  function automatic int unsigned n_stages(input int unsigned in_bits,
                                           input int unsigned hash_bits);
    return in_bits + hash_bits - 1;
  endfunction

  // Who put an address into the shared hash pipeline.
  typedef enum logic {
    REQ_LOOKUP = 1'b0,   // packet lookup
    REQ_INSERT = 1'b1    // cuckoo insertion
  } req_kind_e;

  // Action taken on a packet whose source address is in the table.
  typedef enum logic {
    ACT_DROP    = 1'b0,
    ACT_MONITOR = 1'b1
  } filter_action_e;

  // One record of the hash table.
  typedef struct packed {
    logic               valid;
    logic [IP_BITS-1:0] ip;
  } tbl_entry_t;

endpackage
