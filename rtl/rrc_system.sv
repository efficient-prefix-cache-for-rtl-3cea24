// rrc_system: a Reverse Routing Cache used as the level-one route cache of a
// network processor, in front of a trie-based routing table.
//
// A lookup first searches the prefix cache (one cycle). On a hit the cached
// next hop is returned. On a miss the key is searched in the trie; the
// minimal-expansion unit then picks the prefix to place (the matched route,
// its Minimal Expansion Prefix when the route is a parent, or nothing), the
// semi-LRU unit picks the line, and the line is written in one cycle. The
// expansion comes out of the same trie walk, so a parent costs no extra
// search. me_enable selects RRC-ME (minimal expansion) or RRC-PR (parents
// are never cached) and may change between operations.
//
// A route update (insert or delete) is applied to the trie, then the
// coherence unit removes the overlapping cache lines, one per cycle. Updates
// take priority over lookups; one operation is handled at a time.
//
// Interface and timing
//   lk_valid/lk_ready/lk_key     lookup request
//   res_valid + res_*            result, one pulse per lookup: res_hit (cache
//                                hit), res_found (a route exists), res_nh.
//                                A hit answers 2 cycles after acceptance; a
//                                miss whose walk stops at depth d answers
//                                d+4 cycles after acceptance.
//   upd_valid/upd_ready/...      route update; upd_done pulses when the trie
//                                and cache are coherent again, upd_error if
//                                the trie refused it
//   stat_*                       event counters (hits, misses, fills, ...)
//                                and the number of trie nodes in use
// The flow, the one-cycle hit and one-cycle placement follow the design;
// the handshakes, the serial handling of operations and the counters are
// this design's own.
// The cache's registered prefix output and the coherence unit's busy flag
// and removal count are not needed here (the FSM waits for done, and the
// stat counter counts invalidations), so lint lists them as unused.
module rrc_system
  import rrc_pkg::*;
#(
  parameter int unsigned N     = 128,     // cache lines
  parameter int unsigned NODES = 131072   // trie nodes
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        me_enable,
  // lookups
  input  logic        lk_valid,
  output logic        lk_ready,
  input  key_t        lk_key,
  output logic        res_valid,
  output logic        res_hit,
  output logic        res_found,
  output nh_t         res_nh,
  // route updates
  input  logic        upd_valid,
  output logic        upd_ready,
  input  route_op_e   upd_op,
  input  prefix_t     upd_prefix,
  input  nh_t         upd_nh,
  output logic        upd_done,
  output logic        upd_error,
  // statistics
  output logic [31:0] stat_hits,
  output logic [31:0] stat_misses,
  output logic [31:0] stat_fill_direct,
  output logic [31:0] stat_fill_mep,
  output logic [31:0] stat_pr_skips,
  output logic [31:0] stat_repl_fail,
  output logic [31:0] stat_evictions,
  output logic [31:0] stat_coh_removed,
  output logic [$clog2(NODES):0] stat_trie_nodes
);
  localparam int unsigned IW = $clog2(N);

  typedef enum logic [2:0] {
    S_IDLE, S_CSRCH, S_TISSUE, S_TWAIT, S_UISSUE, S_UWAIT, S_UCOH
  } state_e;
  state_e state;

  key_t      key_q;
  route_op_e uop_q;
  prefix_t   upfx_q;
  nh_t       unh_q;
  logic      uerr_q;

  // ---- cache ----
  logic          c_srch_en, c_rsp_valid, c_rsp_hit;
  logic [IW-1:0] c_rsp_idx;
  nh_t           c_rsp_nh;
  prefix_t       c_rsp_prefix;
  logic          c_wr_en, c_inv_en;
  logic [IW-1:0] c_wr_idx, c_inv_idx;
  prefix_t       c_wr_prefix, c_probe;
  nh_t           c_wr_nh;
  logic [N-1:0]  c_probe_hit, c_valid_vec;

  rrc_cache #(.N(N)) u_cache (
    .clk, .rst_n,
    .srch_en(c_srch_en), .srch_key(key_q),
    .rsp_valid(c_rsp_valid), .rsp_hit(c_rsp_hit), .rsp_idx(c_rsp_idx),
    .rsp_nh(c_rsp_nh), .rsp_prefix(c_rsp_prefix),
    .wr_en(c_wr_en), .wr_idx(c_wr_idx), .wr_prefix(c_wr_prefix), .wr_nh(c_wr_nh),
    .inv_en(c_inv_en), .inv_idx(c_inv_idx),
    .probe(c_probe), .probe_hit(c_probe_hit), .valid_vec(c_valid_vec)
  );

  // ---- replacement ----
  logic          l_tick;
  logic [N-1:0]  l_touch;
  logic [IW-1:0] l_victim;
  logic          l_ok, l_empty;

  semi_lru #(.N(N)) u_lru (
    .clk, .rst_n,
    .valid_vec(c_valid_vec), .tick(l_tick), .touch_vec(l_touch),
    .victim_idx(l_victim), .victim_ok(l_ok), .victim_empty(l_empty)
  );

  // ---- routing table ----
  logic     t_cmd_valid, t_cmd_ready;
  trie_op_e t_cmd_op;
  key_t     t_cmd_key;
  len_t     t_cmd_len;
  logic     t_rsp_valid, t_rsp_found, t_rsp_parent, t_rsp_error;
  nh_t      t_rsp_nh;
  len_t     t_rsp_lpm_len, t_rsp_depth;

  trie_engine #(.NODES(NODES)) u_trie (
    .clk, .rst_n,
    .cmd_valid(t_cmd_valid), .cmd_ready(t_cmd_ready), .cmd_op(t_cmd_op),
    .cmd_key(t_cmd_key), .cmd_len(t_cmd_len), .cmd_nh(unh_q),
    .rsp_valid(t_rsp_valid), .rsp_found(t_rsp_found), .rsp_nh(t_rsp_nh),
    .rsp_lpm_len(t_rsp_lpm_len), .rsp_parent(t_rsp_parent), .rsp_depth(t_rsp_depth),
    .rsp_error(t_rsp_error), .nodes_used(stat_trie_nodes)
  );

  // ---- minimal expansion ----
  logic    m_cache_en, m_is_mep, m_pr_skip;
  prefix_t m_prefix;

  mep_unit u_mep (
    .key(key_q), .found(t_rsp_found), .parent(t_rsp_parent),
    .lpm_len(t_rsp_lpm_len), .depth(t_rsp_depth), .me_enable,
    .cache_en(m_cache_en), .is_mep(m_is_mep), .pr_skip(m_pr_skip),
    .cache_prefix(m_prefix)
  );

  // ---- coherence ----
  logic              coh_start, coh_busy, coh_done;
  logic [$clog2(N):0] coh_removed;

  coherence_ctrl #(.N(N)) u_coh (
    .clk, .rst_n,
    .start(coh_start), .upd_prefix(upfx_q), .busy(coh_busy),
    .probe(c_probe), .probe_hit(c_probe_hit),
    .inv_en(c_inv_en), .inv_idx(c_inv_idx),
    .done(coh_done), .removed(coh_removed)
  );

  // ---- control ----
  logic place;   // trie answered a lookup miss with something to cache
  assign place = (state == S_TWAIT) && t_rsp_valid && m_cache_en && l_ok;

  assign upd_ready = (state == S_IDLE);
  assign lk_ready  = (state == S_IDLE) && !upd_valid;

  assign c_srch_en   = (state == S_CSRCH);
  assign l_tick      = c_rsp_valid && !c_rsp_hit;   // age all lines once per miss
  assign c_wr_en     = place;
  assign c_wr_idx    = l_victim;
  assign c_wr_prefix = m_prefix;
  assign c_wr_nh     = t_rsp_nh;

  always_comb begin
    l_touch = '0;
    if (c_rsp_valid && c_rsp_hit) l_touch[c_rsp_idx] = 1'b1;
    if (place)                    l_touch[l_victim]  = 1'b1;
  end

  assign t_cmd_valid = ((state == S_TISSUE) && !(c_rsp_valid && c_rsp_hit)) || (state == S_UISSUE);
  assign t_cmd_op    = (state == S_TISSUE) ? TRIE_SEARCH :
                       (uop_q == ROUTE_INSERT) ? TRIE_INSERT : TRIE_DELETE;
  assign t_cmd_key   = (state == S_TISSUE) ? key_q : upfx_q.bits;
  assign t_cmd_len   = upfx_q.len;
  assign coh_start   = (state == S_UWAIT) && t_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      key_q     <= '0;
      uop_q     <= ROUTE_INSERT;
      upfx_q    <= '0;
      unh_q     <= '0;
      uerr_q    <= 1'b0;
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_found <= 1'b0;
      res_nh    <= '0;
      upd_done  <= 1'b0;
      upd_error <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      upd_done  <= 1'b0;
      case (state)
        S_IDLE: begin
          if (upd_valid) begin
            uop_q  <= upd_op;
            upfx_q <= prefix_of(upd_prefix.bits, upd_prefix.len);
            unh_q  <= upd_nh;
            state  <= S_UISSUE;
          end else if (lk_valid) begin
            key_q <= lk_key;
            state <= S_CSRCH;
          end
        end
        S_CSRCH: state <= S_TISSUE;   // search issued; its result is checked next
        S_TISSUE: begin
          if (c_rsp_valid && c_rsp_hit) begin
            res_valid <= 1'b1;
            res_hit   <= 1'b1;
            res_found <= 1'b1;
            res_nh    <= c_rsp_nh;
            state     <= S_IDLE;
          end else if (t_cmd_ready) begin
            state <= S_TWAIT;
          end
        end
        S_TWAIT: if (t_rsp_valid) begin
          res_valid <= 1'b1;
          res_hit   <= 1'b0;
          res_found <= t_rsp_found;
          res_nh    <= t_rsp_nh;
          state     <= S_IDLE;
        end
        S_UISSUE: if (t_cmd_ready) state <= S_UWAIT;
        S_UWAIT: if (t_rsp_valid) begin
          uerr_q <= t_rsp_error;
          state  <= S_UCOH;
        end
        S_UCOH: if (coh_done) begin
          upd_done  <= 1'b1;
          upd_error <= uerr_q;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- statistics ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_hits        <= '0;
      stat_misses      <= '0;
      stat_fill_direct <= '0;
      stat_fill_mep    <= '0;
      stat_pr_skips    <= '0;
      stat_repl_fail   <= '0;
      stat_evictions   <= '0;
      stat_coh_removed <= '0;
    end else begin
      if (c_rsp_valid &&  c_rsp_hit) stat_hits   <= stat_hits + 1;
      if (c_rsp_valid && !c_rsp_hit) stat_misses <= stat_misses + 1;
      if (place && !m_is_mep)        stat_fill_direct <= stat_fill_direct + 1;
      if (place &&  m_is_mep)        stat_fill_mep    <= stat_fill_mep + 1;
      if (place && !l_empty)         stat_evictions   <= stat_evictions + 1;
      if (state == S_TWAIT && t_rsp_valid && m_pr_skip) stat_pr_skips <= stat_pr_skips + 1;
      if (state == S_TWAIT && t_rsp_valid && m_cache_en && !l_ok)
        stat_repl_fail <= stat_repl_fail + 1;
      if (c_inv_en) stat_coh_removed <= stat_coh_removed + 1;
    end
  end

endmodule
