// tb_rrc_top: end-to-end test of both systems at their full default sizes
// (128-line RRC-ME cache over a 131072-node trie; 64-line RRC-PR cache over
// a 26,786-entry TCAM), run side by side.
//
// Network-processor side: loads 3000 nested routes, runs lookups from a hot
// set larger than the cache plus random keys, inserts and deletes routes
// between lookups, and switches between minimal expansion and parent
// restriction. TCAM side: loads 3000 routes sorted longest first with their
// parent flags, streams one key per cycle and rewrites entries under
// traffic. Every answer is checked against a longest-match model, and every
// mechanism is counted and must occur: hits, misses, direct and expansion
// fills, parent skips, evictions, replacement failures, coherence removals,
// mode switches, TCAM searches skipped, duplicate skips and input stalls.
module tb_rrc_top;
  import rrc_pkg::*;
  localparam int R = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---- network-processor side ----
  logic np_me_enable = 1, np_lk_valid = 0, np_lk_ready; key_t np_lk_key = '0;
  logic np_res_valid, np_res_hit, np_res_found; nh_t np_res_nh;
  logic np_upd_valid = 0, np_upd_ready; route_op_e np_upd_op = ROUTE_INSERT;
  prefix_t np_upd_prefix = '0; nh_t np_upd_nh = '0; logic np_upd_done, np_upd_error;
  logic [31:0] np_stat_hits, np_stat_misses, np_stat_fill_direct, np_stat_fill_mep,
               np_stat_pr_skips, np_stat_repl_fail, np_stat_evictions, np_stat_coh_removed;
  logic [17:0] np_stat_trie_nodes;
  // ---- TCAM side ----
  logic pw_in_valid = 0, pw_in_ready; key_t pw_in_key = '0;
  logic pw_out_valid, pw_out_found, pw_out_from_rrc; nh_t pw_out_nh;
  logic pw_upd_valid = 0, pw_upd_ready; logic [14:0] pw_upd_idx = '0; logic pw_upd_entry_valid = 0;
  prefix_t pw_upd_prefix = '0; nh_t pw_upd_nh = '0; logic pw_upd_parent = 0, pw_upd_done;
  logic [31:0] pw_stat_keys, pw_stat_rrc_hits, pw_stat_tcam_searches, pw_stat_fills,
               pw_stat_parent_skips, pw_stat_dup_skips, pw_stat_repl_fail, pw_stat_coh_removed;

  rrc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic bit covers(logic [31:0] b, int l, logic [31:0] k);
    return (l == 0) || ((k >> (32 - l)) == (b >> (32 - l)));
  endfunction

  // =========================================================== NP side
  logic [31:0] a_bits [R]; int a_len [R]; logic [7:0] a_nh [R]; bit a_live [R];
  logic [31:0] a_hot [200];
  int np_mode_switches = 0;

  task automatic np_update(route_op_e op, int i);
    @(negedge clk);
    np_upd_valid = 1; np_upd_op = op; np_upd_prefix.bits = a_bits[i];
    np_upd_prefix.len = 6'(a_len[i]); np_upd_nh = a_nh[i];
    while (!np_upd_ready) @(negedge clk);
    @(negedge clk); np_upd_valid = 0;
    while (!np_upd_done) @(negedge clk);
    check(!np_upd_error, "np update accepted");
    a_live[i] = (op == ROUTE_INSERT);
  endtask

  task automatic np_lookup(logic [31:0] k);
    int best; best = -1;
    for (int i = 0; i < R; i++)
      if (a_live[i] && covers(a_bits[i], a_len[i], k) && (best < 0 || a_len[i] > a_len[best])) best = i;
    @(negedge clk);
    while (!np_lk_ready) @(negedge clk);
    np_lk_valid = 1; np_lk_key = k;
    @(negedge clk); np_lk_valid = 0;
    while (!np_res_valid) @(negedge clk);
    check(np_res_found == (best >= 0), $sformatf("np found key %h", k));
    if (best >= 0) check(np_res_nh == a_nh[best], $sformatf("np next hop key %h", k));
  endtask

  task automatic np_traffic(int n);
    int j;
    for (int t = 0; t < n; t++) begin
      if ($urandom % 10 < 9) np_lookup(a_hot[$urandom % 200]);
      else begin j = $urandom % R; np_lookup(a_bits[j] | ($urandom >> a_len[j])); end
    end
  endtask

  task automatic np_run();
    for (int i = 0; i < R; i++) begin
      a_len[i]  = (i % 100 == 0) ? 4 + i / 600 : 8 + $urandom % 17;
      a_bits[i] = {4'h9, 4'($urandom % 4), 24'($urandom)} & (32'hFFFF_FFFF << (32 - a_len[i]));
      a_nh[i] = 8'(i); a_live[i] = 0;
      for (int q = 0; q < i; q++) if (a_len[q] == a_len[i] && a_bits[q] == a_bits[i]) a_len[i] = -1;
    end
    for (int i = 0; i < R; i++) if (a_len[i] < 0) begin a_len[i] = 32; a_bits[i] = {8'h7F, 24'(i)}; end
    for (int i = 0; i < 200; i++) begin
      int j; j = $urandom % R; a_hot[i] = a_bits[j] | ($urandom >> a_len[j]);
    end
    for (int i = 0; i < R; i++) if (i % 10 != 9) np_update(ROUTE_INSERT, i);
    np_me_enable = 1;
    np_traffic(3000);
    for (int i = 9; i < R; i += 10) begin np_update(ROUTE_INSERT, i); np_traffic(2); end
    for (int i = 0; i < R; i += 37) begin np_update(ROUTE_DELETE, i); np_traffic(2); end
    np_me_enable = 0; np_mode_switches++;
    np_traffic(1500);
    np_me_enable = 1; np_mode_switches++;
    np_traffic(1000);
  endtask

  // =========================================================== TCAM side
  logic [31:0] m_bits [R]; int m_len [R]; logic [7:0] m_nh [R]; bit m_v [R]; bit m_par [R];
  logic [31:0] p_hot [100];
  int stalls = 0, cyc = 0, pw_results = 0;
  bit pw_exp_found [$]; logic [7:0] pw_exp_nh [$]; int pw_exp_cyc [$];

  always @(negedge clk) begin
    cyc++;
    if (pw_out_valid) begin
      pw_results++;
      check(pw_exp_cyc.size() > 0, "pw unexpected result");
      if (pw_exp_cyc.size() > 0) begin
        check(pw_exp_cyc[0] == cyc, "pw latency");
        check(pw_out_found == pw_exp_found[0], "pw found");
        if (pw_exp_found[0]) check(pw_out_nh == pw_exp_nh[0], "pw next hop");
        void'(pw_exp_cyc.pop_front()); void'(pw_exp_found.pop_front()); void'(pw_exp_nh.pop_front());
      end
    end
  end

  task automatic pw_write(int i, bit v, logic [7:0] nh);
    @(negedge clk);
    pw_upd_valid = 1; pw_upd_idx = 15'(i); pw_upd_entry_valid = v;
    pw_upd_prefix.bits = m_bits[i]; pw_upd_prefix.len = 6'(m_len[i]); pw_upd_nh = nh; pw_upd_parent = m_par[i];
    while (!pw_upd_ready) @(negedge clk);
    @(posedge clk); #1 pw_upd_valid = 0;
    m_v[i] = v; m_nh[i] = nh;
    while (!pw_upd_done) @(negedge clk);
  endtask

  task automatic pw_send(logic [31:0] k);
    int e; e = -1;
    @(negedge clk); #1;
    while (!pw_in_ready) begin stalls++; @(negedge clk); #1; end
    for (int i = R - 1; i >= 0; i--) if (m_v[i] && covers(m_bits[i], m_len[i], k)) e = i;
    pw_in_valid = 1; pw_in_key = k;
    pw_exp_found.push_back(e >= 0); pw_exp_nh.push_back(e >= 0 ? m_nh[e] : 8'h0); pw_exp_cyc.push_back(cyc + 2);
    @(posedge clk); #1 pw_in_valid = 0;
  endtask

  task automatic pw_traffic(int n);
    for (int t = 0; t < n; t++)
      if ($urandom % 10 < 9) pw_send(p_hot[$urandom % 100]);
      else pw_send(m_bits[$urandom % R] | (32'($urandom) >> 16));
  endtask

  task automatic pw_run();
    int l, j;
    for (int i = 0; i < R; i++) begin
      l = 24 - (i * 17) / R;       // longest first
      m_v[i] = 1; m_len[i] = l; m_nh[i] = 8'(i + 7);
      m_bits[i] = {4'h5, 2'b00, 26'($urandom)} & (32'hFFFF_FFFF << (32 - l));
      for (int q = 0; q < i; q++) if (m_len[q] == l && m_bits[q] == m_bits[i]) m_v[i] = 0;
    end
    for (int i = 0; i < R; i++) begin
      m_par[i] = 0;
      for (int q = 0; q < i; q++)
        if (m_v[i] && m_v[q] && m_len[q] > m_len[i] && covers(m_bits[i], m_len[i], m_bits[q])) m_par[i] = 1;
    end
    for (int i = 0; i < R; i++) pw_write(i, m_v[i], m_nh[i]);
    // hot keys mostly inside non-parent routes, so that they can be cached
    for (int i = 0; i < 100; i++) begin
      j = $urandom % R;
      if (i % 10 != 0) while (m_par[j] || !m_v[j]) j = $urandom % R;
      p_hot[i] = m_bits[j] | (32'($urandom) >> m_len[j]);
    end
    p_hot[99] = p_hot[98];
    pw_traffic(6000);
    for (int t = 0; t < 20; t++) begin
      j = $urandom % R;
      for (int q = 0; q < R; q++) if (m_v[q] && covers(m_bits[q], m_len[q], p_hot[t])) j = q;
      fork
        if (t % 2) pw_write(j, m_v[j], m_nh[j] + 8'd50); else pw_write(j, 1'b0, m_nh[j]);
        pw_traffic(30);
      join
    end
    pw_traffic(2000);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      np_run();
      pw_run();
    join
    $display("np: hits=%0d misses=%0d direct=%0d mep=%0d pr_skip=%0d evict=%0d repl_fail=%0d coh=%0d nodes=%0d",
             np_stat_hits, np_stat_misses, np_stat_fill_direct, np_stat_fill_mep, np_stat_pr_skips,
             np_stat_evictions, np_stat_repl_fail, np_stat_coh_removed, np_stat_trie_nodes);
    $display("pw: keys=%0d rrc_hits=%0d tcam=%0d fills=%0d parent_skips=%0d dup=%0d repl_fail=%0d coh=%0d stalls=%0d",
             pw_stat_keys, pw_stat_rrc_hits, pw_stat_tcam_searches, pw_stat_fills, pw_stat_parent_skips,
             pw_stat_dup_skips, pw_stat_repl_fail, pw_stat_coh_removed, stalls);
    check(np_stat_hits > 0, "np hits");
    check(np_stat_misses > 0, "np misses");
    check(np_stat_fill_direct > 0, "np direct fills");
    check(np_stat_fill_mep > 0, "np minimal expansions");
    check(np_stat_pr_skips > 0, "np parent-restriction skips");
    check(np_stat_evictions > 0, "np evictions");
    check(np_stat_repl_fail > 0, "np replacement failures");
    check(np_stat_coh_removed > 0, "np coherence removals");
    check(np_mode_switches == 2, "np mode switches");
    check(pw_results == pw_stat_keys, "pw every key answered");
    check(pw_stat_rrc_hits > 0, "pw cache hits");
    check(pw_stat_tcam_searches + pw_stat_rrc_hits == pw_stat_keys, "pw TCAM searched exactly on misses");
    check(pw_stat_fills > 0, "pw popular-prefix fills");
    check(pw_stat_parent_skips > 0, "pw parents kept out");
    check(pw_stat_dup_skips > 0, "pw duplicates avoided");
    check(pw_stat_repl_fail > 0, "pw replacement failures");
    check(pw_stat_coh_removed > 0, "pw coherence removals");
    check(stalls > 0, "pw input stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
