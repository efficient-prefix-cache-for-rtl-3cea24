// mep_unit: decides which prefix a missed lookup places in the cache.
//
// A parent prefix (one that nests a longer route) must never be cached: a key
// inside one of its children would hit it and take the wrong route. So:
//   - LPM is not a parent: cache the matched prefix itself.
//   - LPM is a parent, minimal expansion enabled (RRC-ME): cache the Minimal
//     Expansion Prefix, the bits the trie walk traversed plus the next key
//     bit, i.e. the first depth+1 bits of the key. No route lies below it, so
//     it is disjoint and every key inside it has the parent as its longest
//     match.
//   - LPM is a parent, minimal expansion disabled (RRC-PR, parent
//     restriction): cache nothing; such keys always take the slow path.
//   - No route matched: cache nothing (this design's choice).
// Purely combinational. The depth input is the number of key bits the walk
// traversed (the depth of the node where it stopped), so a walk that stops
// at the node for "101" with key 10110 yields "1011*".
module mep_unit
  import rrc_pkg::*;
(
  input  key_t    key,
  input  logic    found,
  input  logic    parent,
  input  len_t    lpm_len,
  input  len_t    depth,
  input  logic    me_enable,
  output logic    cache_en,
  output logic    is_mep,
  output logic    pr_skip,
  output prefix_t cache_prefix
);
  len_t mep_len;
  assign mep_len = (depth < len_t'(W)) ? depth + 1'b1 : len_t'(W);

  always_comb begin
    cache_en     = 1'b0;
    is_mep       = 1'b0;
    pr_skip      = 1'b0;
    cache_prefix = prefix_of(key, lpm_len);
    if (found) begin
      if (!parent) begin
        cache_en = 1'b1;
      end else if (me_enable) begin
        cache_en     = 1'b1;
        is_mep       = 1'b1;
        cache_prefix = prefix_of(key, mep_len);
      end else begin
        pr_skip = 1'b1;
      end
    end
  end

endmodule
