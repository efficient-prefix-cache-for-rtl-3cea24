// rrc_pkg: types, widths and helper functions shared by the Reverse Routing
// Cache (RRC) design.
//
// A route prefix is a bit string followed by don't-care bits. It is held here
// as a W-bit value plus a length: bit W-1 is the first (leftmost) bit of the
// prefix and every bit below position W-len is zero. W = 32 is the IPv4
// address width. The next-hop (egress port) width is this design's choice.
//
// Helpers:
//   prefix_mask(len)      W-bit mask with the top len bits set
//   prefix_of(key, len)   the len-bit prefix of a key (lower bits cleared)
//   prefix_covers(p, k)   key k matches prefix p
//   prefix_overlap(a, b)  one of a, b nests the other (equal included); two
//                         prefixes either overlap in this way or are disjoint
package rrc_pkg;

  localparam int unsigned W     = 32;                // key / prefix width (IPv4)
  localparam int unsigned LEN_W = $clog2(W + 1);     // 0..W
  localparam int unsigned NH_W  = 8;                 // next hop / egress port

  typedef logic [W-1:0]     key_t;
  typedef logic [LEN_W-1:0] len_t;
  typedef logic [NH_W-1:0]  nh_t;

  typedef struct packed {
    key_t bits;   // prefix bits, left aligned, lower bits zero
    len_t len;    // number of significant bits, 0..W
  } prefix_t;

  typedef enum logic {
    ROUTE_INSERT = 1'b0,
    ROUTE_DELETE = 1'b1
  } route_op_e;

  typedef enum logic [1:0] {
    TRIE_SEARCH = 2'd0,
    TRIE_INSERT = 2'd1,
    TRIE_DELETE = 2'd2
  } trie_op_e;

  function automatic key_t prefix_mask(input len_t len);
    key_t m;
    for (int unsigned b = 0; b < W; b++)
      m[W-1-b] = (b < int'(len));
    return m;
  endfunction

  function automatic prefix_t prefix_of(input key_t key, input len_t len);
    prefix_t p;
    p.bits = key & prefix_mask(len);
    p.len  = len;
    return p;
  endfunction

  function automatic logic prefix_covers(input prefix_t p, input key_t key);
    return ((key ^ p.bits) & prefix_mask(p.len)) == '0;
  endfunction

  function automatic logic prefix_overlap(input prefix_t a, input prefix_t b);
    len_t l;
    l = (a.len < b.len) ? a.len : b.len;
    return ((a.bits ^ b.bits) & prefix_mask(l)) == '0;
  endfunction

endpackage
