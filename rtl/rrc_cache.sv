// rrc_cache: the Reverse Routing Cache array, a small fully associative
// ternary CAM that holds route prefixes instead of addresses.
//
// Each line stores a prefix as a value and a care mask (TCAM style), a next
// hop and a valid bit. Because only disjoint prefixes are ever placed in the
// cache, a key matches at most one line. The matching line's index and next
// hop are therefore formed by OR-ing the lines' fields gated by their match
// bits: no priority encoder is needed and lines need not be kept sorted, as
// the design intends. A line is written in a single cycle at any index the
// caller chooses (normally the semi-LRU victim).
//
// Interface and timing
//   srch_en/srch_key    search; the result (rsp_valid, rsp_hit, rsp_idx,
//                       rsp_nh, rsp_prefix) is registered and appears the
//                       next cycle (cache access time of one cycle)
//   wr_en/wr_idx/...    write one line (takes effect at the clock edge)
//   inv_en/inv_idx      clear one line's valid bit
//   probe/probe_hit     combinational: lines whose prefix nests or is nested
//                       by the probe prefix (used for coherence removal and
//                       to avoid placing a duplicate)
//   valid_vec           valid bits, for the replacement unit
// A write and an invalidate to the same index in one cycle: the write wins.
// The assertion checks the single-match property the design relies on.
// Its disable iff reads the asynchronous reset inside a clocked check, which
// lint reports as a reset used both ways; the check is not logic and stands.
module rrc_cache
  import rrc_pkg::*;
#(
  parameter int unsigned N = 128          // cache lines
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // search
  input  logic                 srch_en,
  input  key_t                 srch_key,
  output logic                 rsp_valid,
  output logic                 rsp_hit,
  output logic [$clog2(N)-1:0] rsp_idx,
  output nh_t                  rsp_nh,
  output prefix_t              rsp_prefix,
  // write / invalidate
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  prefix_t              wr_prefix,
  input  nh_t                  wr_nh,
  input  logic                 inv_en,
  input  logic [$clog2(N)-1:0] inv_idx,
  // overlap probe
  input  prefix_t              probe,
  output logic [N-1:0]         probe_hit,
  output logic [N-1:0]         valid_vec
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0] valid;
  key_t         val  [N];
  key_t         care [N];
  len_t         plen [N];
  nh_t          nh   [N];

  // ---- match lines ----
  logic [N-1:0] match;
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      match[i] = valid[i] && (((srch_key ^ val[i]) & care[i]) == '0);
  end

  // single match: OR the selected fields together instead of encoding
  logic [IW-1:0] m_idx;
  nh_t           m_nh;
  key_t          m_bits;
  len_t          m_len;
  always_comb begin
    m_idx  = '0;
    m_nh   = '0;
    m_bits = '0;
    m_len  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      m_idx  |= match[i] ? IW'(i) : '0;
      m_nh   |= match[i] ? nh[i]   : '0;
      m_bits |= match[i] ? val[i]  : '0;
      m_len  |= match[i] ? plen[i] : '0;
    end
  end

  // ---- overlap probe ----
  key_t probe_mask;
  assign probe_mask = prefix_mask(probe.len);
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      probe_hit[i] = valid[i] && (((probe.bits ^ val[i]) & care[i] & probe_mask) == '0);
  end

  assign valid_vec = valid;

  // ---- storage ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (inv_en) valid[inv_idx] <= 1'b0;
      if (wr_en)  valid[wr_idx]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      val[wr_idx]  <= wr_prefix.bits & prefix_mask(wr_prefix.len);
      care[wr_idx] <= prefix_mask(wr_prefix.len);
      plen[wr_idx] <= wr_prefix.len;
      nh[wr_idx]   <= wr_nh;
    end
  end

  // ---- registered search response ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid  <= 1'b0;
      rsp_hit    <= 1'b0;
      rsp_idx    <= '0;
      rsp_nh     <= '0;
      rsp_prefix <= '0;
    end else begin
      rsp_valid       <= srch_en;
      rsp_hit         <= srch_en && (match != '0);
      rsp_idx         <= m_idx;
      rsp_nh          <= m_nh;
      rsp_prefix.bits <= m_bits;
      rsp_prefix.len  <= m_len;
    end
  end

  // the cache holds disjoint prefixes only
  a_single_match: assert property (@(posedge clk) disable iff (!rst_n)
    srch_en |-> $onehot0(match));

endmodule
