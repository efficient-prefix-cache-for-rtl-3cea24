// rrc_top: the two Reverse Routing Cache systems side by side.
//
//   np_*  rrc_system: a 128-line prefix cache with minimal expansion
//         (RRC-ME, switchable to parent restriction) as the level-one route
//         cache of a network processor, in front of a trie routing table.
//   pw_*  rrc_tcam_system: a 64-line prefix cache with parent restriction
//         (RRC-PR) in front of a 26K-entry TCAM routing table, so that most
//         searches leave the large TCAM idle.
// The two share only clock and reset. Port meanings and timing are those of
// the two systems (see their headers); the ports are renamed with the
// prefixes above. Sizes follow the design's examples: 128 lines for the
// network-processor cache, 64 lines and 26,786 TCAM entries (one per route
// of the example table) for the power example. The trie size is this
// design's choice.
module rrc_top
  import rrc_pkg::*;
#(
  parameter int unsigned NP_LINES = 128,
  parameter int unsigned NP_NODES = 131072,
  parameter int unsigned PW_LINES = 64,
  parameter int unsigned PW_TCAM  = 26786,
  parameter int unsigned PW_BANK  = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ---- network-processor cache (rrc_system) ----
  input  logic                       np_me_enable,
  input  logic                       np_lk_valid,
  output logic                       np_lk_ready,
  input  key_t                       np_lk_key,
  output logic                       np_res_valid,
  output logic                       np_res_hit,
  output logic                       np_res_found,
  output nh_t                        np_res_nh,
  input  logic                       np_upd_valid,
  output logic                       np_upd_ready,
  input  route_op_e                  np_upd_op,
  input  prefix_t                    np_upd_prefix,
  input  nh_t                        np_upd_nh,
  output logic                       np_upd_done,
  output logic                       np_upd_error,
  output logic [31:0]                np_stat_hits,
  output logic [31:0]                np_stat_misses,
  output logic [31:0]                np_stat_fill_direct,
  output logic [31:0]                np_stat_fill_mep,
  output logic [31:0]                np_stat_pr_skips,
  output logic [31:0]                np_stat_repl_fail,
  output logic [31:0]                np_stat_evictions,
  output logic [31:0]                np_stat_coh_removed,
  output logic [$clog2(NP_NODES):0]  np_stat_trie_nodes,
  // ---- TCAM power-saving front end (rrc_tcam_system) ----
  input  logic                       pw_in_valid,
  output logic                       pw_in_ready,
  input  key_t                       pw_in_key,
  output logic                       pw_out_valid,
  output logic                       pw_out_found,
  output logic                       pw_out_from_rrc,
  output nh_t                        pw_out_nh,
  input  logic                       pw_upd_valid,
  output logic                       pw_upd_ready,
  input  logic [$clog2(PW_TCAM)-1:0] pw_upd_idx,
  input  logic                       pw_upd_entry_valid,
  input  prefix_t                    pw_upd_prefix,
  input  nh_t                        pw_upd_nh,
  input  logic                       pw_upd_parent,
  output logic                       pw_upd_done,
  output logic [31:0]                pw_stat_keys,
  output logic [31:0]                pw_stat_rrc_hits,
  output logic [31:0]                pw_stat_tcam_searches,
  output logic [31:0]                pw_stat_fills,
  output logic [31:0]                pw_stat_parent_skips,
  output logic [31:0]                pw_stat_dup_skips,
  output logic [31:0]                pw_stat_repl_fail,
  output logic [31:0]                pw_stat_coh_removed
);

  rrc_system #(.N(NP_LINES), .NODES(NP_NODES)) u_np (
    .clk, .rst_n,
    .me_enable(np_me_enable),
    .lk_valid(np_lk_valid), .lk_ready(np_lk_ready), .lk_key(np_lk_key),
    .res_valid(np_res_valid), .res_hit(np_res_hit), .res_found(np_res_found), .res_nh(np_res_nh),
    .upd_valid(np_upd_valid), .upd_ready(np_upd_ready), .upd_op(np_upd_op),
    .upd_prefix(np_upd_prefix), .upd_nh(np_upd_nh),
    .upd_done(np_upd_done), .upd_error(np_upd_error),
    .stat_hits(np_stat_hits), .stat_misses(np_stat_misses),
    .stat_fill_direct(np_stat_fill_direct), .stat_fill_mep(np_stat_fill_mep),
    .stat_pr_skips(np_stat_pr_skips), .stat_repl_fail(np_stat_repl_fail),
    .stat_evictions(np_stat_evictions), .stat_coh_removed(np_stat_coh_removed),
    .stat_trie_nodes(np_stat_trie_nodes)
  );

  rrc_tcam_system #(.N(PW_LINES), .NT(PW_TCAM), .BANK(PW_BANK)) u_pw (
    .clk, .rst_n,
    .in_valid(pw_in_valid), .in_ready(pw_in_ready), .in_key(pw_in_key),
    .out_valid(pw_out_valid), .out_found(pw_out_found),
    .out_from_rrc(pw_out_from_rrc), .out_nh(pw_out_nh),
    .upd_valid(pw_upd_valid), .upd_ready(pw_upd_ready), .upd_idx(pw_upd_idx),
    .upd_entry_valid(pw_upd_entry_valid), .upd_prefix(pw_upd_prefix),
    .upd_nh(pw_upd_nh), .upd_parent(pw_upd_parent), .upd_done(pw_upd_done),
    .stat_keys(pw_stat_keys), .stat_rrc_hits(pw_stat_rrc_hits),
    .stat_tcam_searches(pw_stat_tcam_searches), .stat_fills(pw_stat_fills),
    .stat_parent_skips(pw_stat_parent_skips), .stat_dup_skips(pw_stat_dup_skips),
    .stat_repl_fail(pw_stat_repl_fail), .stat_coh_removed(pw_stat_coh_removed)
  );

endmodule
