// rrc_tcam_system: a small prefix cache (RRC-PR) in front of a large TCAM
// routing table, to cut the TCAM's average power.
//
// Stage 1 searches the small cache with every key. Only on a miss is the key
// passed on to the large TCAM in stage 2; on a hit the TCAM stays idle, and
// since a TCAM's dynamic power grows with its size, most searches then cost
// only the small cache's power. The TCAM's answer (the popular prefix) is
// fed back into the cache unless it is a parent prefix: here parents are
// never cached (parent restriction), because only the hit ratio matters,
// not the search time. A prefix already in the cache (placed for an earlier
// key still in flight) is not placed twice.
//
// A route update writes one TCAM entry and then removes the cache lines that
// overlap the written prefix, one per cycle. The key input stalls while an
// update is pending; the update waits until the pipeline has drained.
//
// Interface and timing
//   in_valid/in_ready/in_key    one key per cycle when in_ready is high
//   out_valid/out_found/out_nh  result, exactly 2 cycles after the key, in
//                               order; out_from_rrc marks a cache hit
//   upd_*                       TCAM entry write (index, valid, prefix, next
//                               hop, parent flag); upd_done pulses when the
//                               cache is coherent again
//   stat_*                      keys, cache hits, TCAM searches, fills,
//                               parent skips, duplicates, failed
//                               replacements, coherence removals
// The two stages, the key gating by the hit/miss signal and the popular
// prefix feedback follow the design; the registers between the stages, the
// fixed 2-cycle latency and the update handshake are this design's choices.
// Left unused on purpose: the cache's registered prefix (the output comes
// from the next hop), the replacement unit's empty-line flag and the
// coherence unit's removal count (stat_coh_removed counts invalidations).
module rrc_tcam_system
  import rrc_pkg::*;
#(
  parameter int unsigned N  = 64,       // cache lines
  parameter int unsigned NT   = 26786,  // TCAM entries
  parameter int unsigned BANK = 1024    // TCAM entries per bank
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // keys
  input  logic                  in_valid,
  output logic                  in_ready,
  input  key_t                  in_key,
  output logic                  out_valid,
  output logic                  out_found,
  output logic                  out_from_rrc,
  output nh_t                   out_nh,
  // TCAM updates
  input  logic                  upd_valid,
  output logic                  upd_ready,
  input  logic [$clog2(NT)-1:0] upd_idx,
  input  logic                  upd_entry_valid,
  input  prefix_t               upd_prefix,
  input  nh_t                   upd_nh,
  input  logic                  upd_parent,
  output logic                  upd_done,
  // statistics
  output logic [31:0]           stat_keys,
  output logic [31:0]           stat_rrc_hits,
  output logic [31:0]           stat_tcam_searches,
  output logic [31:0]           stat_fills,
  output logic [31:0]           stat_parent_skips,
  output logic [31:0]           stat_dup_skips,
  output logic [31:0]           stat_repl_fail,
  output logic [31:0]           stat_coh_removed
);
  localparam int unsigned IW = $clog2(N);

  // ---- stage 1: prefix cache ----
  logic          c_rsp_valid, c_rsp_hit;
  logic [IW-1:0] c_rsp_idx;
  nh_t           c_rsp_nh;
  prefix_t       c_rsp_prefix;
  logic          c_wr_en, c_inv_en;
  logic [IW-1:0] c_inv_idx;
  prefix_t       c_probe, coh_probe;
  logic [N-1:0]  c_probe_hit, c_valid_vec;
  logic          srch;

  assign srch = in_valid && in_ready;

  // ---- stage 2: TCAM ----
  logic    t_srch_en, t_rsp_valid, t_rsp_hit, t_rsp_parent;
  nh_t     t_rsp_nh;
  prefix_t t_rsp_prefix;
  logic    upd_fire;

  // ---- replacement ----
  logic [N-1:0]  l_touch;
  logic [IW-1:0] l_victim;
  logic          l_ok, l_empty;

  // ---- coherence ----
  logic               coh_busy, coh_done;
  logic [$clog2(N):0] coh_removed;

  // pipeline registers
  key_t s1_key;
  logic s1_valid;
  logic s2_valid, s2_hit;
  nh_t  s2_nh;

  rrc_cache #(.N(N)) u_rrc (
    .clk, .rst_n,
    .srch_en(srch), .srch_key(in_key),
    .rsp_valid(c_rsp_valid), .rsp_hit(c_rsp_hit), .rsp_idx(c_rsp_idx),
    .rsp_nh(c_rsp_nh), .rsp_prefix(c_rsp_prefix),
    .wr_en(c_wr_en), .wr_idx(l_victim), .wr_prefix(t_rsp_prefix), .wr_nh(t_rsp_nh),
    .inv_en(c_inv_en), .inv_idx(c_inv_idx),
    .probe(c_probe), .probe_hit(c_probe_hit), .valid_vec(c_valid_vec)
  );

  semi_lru #(.N(N)) u_lru (
    .clk, .rst_n,
    .valid_vec(c_valid_vec), .tick(c_rsp_valid && !c_rsp_hit), .touch_vec(l_touch),
    .victim_idx(l_victim), .victim_ok(l_ok), .victim_empty(l_empty)
  );

  // the key reaches the TCAM only when the cache missed
  assign t_srch_en = s1_valid && !c_rsp_hit;

  lpm_tcam #(.NT(NT), .BANK(BANK)) u_tcam (
    .clk, .rst_n,
    .wr_en(upd_fire), .wr_idx(upd_idx), .wr_valid(upd_entry_valid),
    .wr_prefix(upd_prefix), .wr_nh(upd_nh), .wr_parent(upd_parent),
    .srch_en(t_srch_en), .srch_key(s1_key),
    .rsp_valid(t_rsp_valid), .rsp_hit(t_rsp_hit), .rsp_nh(t_rsp_nh),
    .rsp_prefix(t_rsp_prefix), .rsp_parent(t_rsp_parent),
    .stat_searches(stat_tcam_searches)
  );

  coherence_ctrl #(.N(N)) u_coh (
    .clk, .rst_n,
    .start(upd_fire), .upd_prefix(upd_prefix), .busy(coh_busy),
    .probe(coh_probe), .probe_hit(c_probe_hit),
    .inv_en(c_inv_en), .inv_idx(c_inv_idx),
    .done(coh_done), .removed(coh_removed)
  );

  // the probe serves coherence while a task runs, else the duplicate check
  assign c_probe = coh_busy ? coh_probe : t_rsp_prefix;

  // popular prefix feedback
  logic fill_cand, dup;
  assign fill_cand = t_rsp_valid && t_rsp_hit && !t_rsp_parent;
  assign dup       = (c_probe_hit != '0);
  assign c_wr_en   = fill_cand && !coh_busy && !dup && l_ok;

  always_comb begin
    l_touch = '0;
    if (c_rsp_valid && c_rsp_hit) l_touch[c_rsp_idx] = 1'b1;
    if (c_wr_en)                  l_touch[l_victim]  = 1'b1;
  end

  // ---- flow control ----
  assign in_ready  = !upd_valid && !coh_busy;
  assign upd_ready = !s1_valid && !s2_valid && !coh_busy;
  assign upd_fire  = upd_valid && upd_ready;
  assign upd_done  = coh_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_key   <= '0;
      s2_valid <= 1'b0;
      s2_hit   <= 1'b0;
      s2_nh    <= '0;
    end else begin
      s1_valid <= srch;
      s1_key   <= in_key;
      s2_valid <= s1_valid;
      s2_hit   <= c_rsp_hit;
      s2_nh    <= c_rsp_nh;
    end
  end

  assign out_valid    = s2_valid;
  assign out_from_rrc = s2_valid && s2_hit;
  assign out_found    = s2_valid && (s2_hit || t_rsp_hit);
  assign out_nh       = s2_hit ? s2_nh : t_rsp_nh;

  // ---- statistics ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_keys         <= '0;
      stat_rrc_hits     <= '0;
      stat_fills        <= '0;
      stat_parent_skips <= '0;
      stat_dup_skips    <= '0;
      stat_repl_fail    <= '0;
      stat_coh_removed  <= '0;
    end else begin
      if (srch)                          stat_keys         <= stat_keys + 1;
      if (c_rsp_valid && c_rsp_hit)      stat_rrc_hits     <= stat_rrc_hits + 1;
      if (c_wr_en)                       stat_fills        <= stat_fills + 1;
      if (t_rsp_valid && t_rsp_hit && t_rsp_parent) stat_parent_skips <= stat_parent_skips + 1;
      if (fill_cand && dup)              stat_dup_skips    <= stat_dup_skips + 1;
      if (fill_cand && !dup && !l_ok)    stat_repl_fail    <= stat_repl_fail + 1;
      if (c_inv_en)                      stat_coh_removed  <= stat_coh_removed + 1;
    end
  end

endmodule
