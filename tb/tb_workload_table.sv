// tb_workload_table: both systems at full size, loaded with a routing table
// of 26,786 routes (the size of the evaluation table) and driven with a
// skewed lookup stream.
//
// The table is synthetic: 1,600 /16 blocks; most blocks carry a run of
// consecutive /24 routes (so their /16 is a parent), the rest only the /16.
// The network-processor side loads it into the trie and answers 4,000
// lookups in RRC-ME mode, then 4,000 in RRC-PR mode; the TCAM side loads it
// longest first with parent flags and streams 8,000 keys. 90% of the keys
// come from a hot pool of 400 addresses (skewed: index = u1*u2/400 for two
// uniform draws, so a few addresses dominate), the rest are uniform over the
// routes. Every answer is checked against the table. Reported: trie nodes
// used, hit ratios per mode and the share of keys that never reached the
// large TCAM.
module tb_workload_table;
  import rrc_pkg::*;
  localparam int R = 26786, BLOCKS = 1600, HOT = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic np_me_enable = 1, np_lk_valid = 0, np_lk_ready; key_t np_lk_key = '0;
  logic np_res_valid, np_res_hit, np_res_found; nh_t np_res_nh;
  logic np_upd_valid = 0, np_upd_ready; route_op_e np_upd_op = ROUTE_INSERT;
  prefix_t np_upd_prefix = '0; nh_t np_upd_nh = '0; logic np_upd_done, np_upd_error;
  logic [31:0] np_stat_hits, np_stat_misses, np_stat_fill_direct, np_stat_fill_mep,
               np_stat_pr_skips, np_stat_repl_fail, np_stat_evictions, np_stat_coh_removed;
  logic [17:0] np_stat_trie_nodes;
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
    repeat (5000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // routes, longest first: all /24 routes, then the /16 blocks
  logic [31:0] r_bits [R]; int r_len [R]; logic [7:0] r_nh [R]; bit r_par [R];
  logic [15:0] blk [BLOCKS]; int blk_route [BLOCKS];
  logic [31:0] hot [HOT];
  int n24;

  // longest match in the synthetic table: the /24 under the key's /16, else the /16
  function automatic int lpm(logic [31:0] k);
    int b16; b16 = -1;
    for (int i = 0; i < R; i++) begin
      if (r_len[i] == 24 && r_bits[i][31:8] == k[31:8]) return i;
      if (r_len[i] == 16 && r_bits[i][31:16] == k[31:16]) b16 = i;
    end
    return b16;
  endfunction

  task automatic build();
    bit used [int];
    int per, i, idx;
    for (int b = 0; b < BLOCKS; b++) begin
      logic [15:0] v;
      do v = 16'($urandom); while (used.exists(int'(v)));
      used[int'(v)] = 1; blk[b] = v;
    end
    // blocks 0..1399 get /24 runs; 1400..1599 only their /16
    n24 = R - BLOCKS; per = n24 / 1400;
    i = 0;
    for (int b = 0; b < 1400; b++) begin
      int cnt, start;
      cnt = (b < n24 % 1400) ? per + 1 : per;
      start = $urandom % (256 - cnt);
      for (int j = 0; j < cnt; j++) begin
        r_len[i] = 24; r_bits[i] = {blk[b], 8'(start + j), 8'h00}; r_par[i] = 0; i++;
      end
    end
    for (int b = 0; b < BLOCKS; b++) begin
      r_len[i] = 16; r_bits[i] = {blk[b], 16'h0}; r_par[i] = (b < 1400); blk_route[b] = i; i++;
    end
    check(i == R, "table size");
    for (int q = 0; q < R; q++) r_nh[q] = 8'($urandom);
    for (int h = 0; h < HOT; h++) begin
      idx = $urandom % R;
      hot[h] = r_bits[idx] | (32'($urandom) >> r_len[idx]);
    end
  endtask

  function automatic logic [31:0] next_key();
    int idx;
    if ($urandom % 10 < 9) return hot[(($urandom % HOT) * ($urandom % HOT)) / HOT];  // skewed towards low indices
    idx = $urandom % R;
    return r_bits[idx] | (32'($urandom) >> r_len[idx]);
  endfunction

  // ---------------- network-processor side
  int np_hits_me, np_n_me, np_hits_pr, np_n_pr;
  task automatic np_lookup(logic [31:0] k, output bit hit);
    int e; e = lpm(k);
    @(negedge clk);
    while (!np_lk_ready) @(negedge clk);
    np_lk_valid = 1; np_lk_key = k;
    @(negedge clk); np_lk_valid = 0;
    while (!np_res_valid) @(negedge clk);
    hit = np_res_hit;
    check(np_res_found == (e >= 0), "np found");
    if (e >= 0) check(np_res_nh == r_nh[e], $sformatf("np next hop key %h", k));
  endtask

  task automatic np_run();
    bit h;
    for (int i = 0; i < R; i++) begin
      @(negedge clk);
      np_upd_valid = 1; np_upd_op = ROUTE_INSERT; np_upd_prefix.bits = r_bits[i];
      np_upd_prefix.len = 6'(r_len[i]); np_upd_nh = r_nh[i];
      while (!np_upd_ready) @(negedge clk);
      @(negedge clk); np_upd_valid = 0;
      while (!np_upd_done) @(negedge clk);
      if (np_upd_error) begin failures++; $display("FAIL: trie insert %0d refused", i); end
    end
    checks++;
    $display("trie nodes used for %0d routes: %0d", R, np_stat_trie_nodes);
    np_me_enable = 1; np_hits_me = 0; np_n_me = 4000;
    for (int t = 0; t < np_n_me; t++) begin np_lookup(next_key(), h); np_hits_me += h; end
    np_me_enable = 0; np_hits_pr = 0; np_n_pr = 4000;
    for (int t = 0; t < np_n_pr; t++) begin np_lookup(next_key(), h); np_hits_pr += h; end
  endtask

  // ---------------- TCAM side
  int cyc = 0;
  bit pw_exp_found [$]; logic [7:0] pw_exp_nh [$]; int pw_exp_cyc [$];
  always @(negedge clk) begin
    cyc++;
    if (pw_out_valid) begin
      check(pw_exp_cyc.size() > 0 && pw_exp_cyc[0] == cyc, "pw result timing");
      check(pw_out_found == pw_exp_found[0], "pw found");
      if (pw_exp_found[0]) check(pw_out_nh == pw_exp_nh[0], "pw next hop");
      void'(pw_exp_cyc.pop_front()); void'(pw_exp_found.pop_front()); void'(pw_exp_nh.pop_front());
    end
  end

  task automatic pw_run();
    int e; logic [31:0] k;
    for (int i = 0; i < R; i++) begin
      @(negedge clk);
      pw_upd_valid = 1; pw_upd_idx = 15'(i); pw_upd_entry_valid = 1;
      pw_upd_prefix.bits = r_bits[i]; pw_upd_prefix.len = 6'(r_len[i]); pw_upd_nh = r_nh[i]; pw_upd_parent = r_par[i];
      while (!pw_upd_ready) @(negedge clk);
      @(posedge clk); #1 pw_upd_valid = 0;
      while (!pw_upd_done) @(negedge clk);
    end
    for (int t = 0; t < 8000; t++) begin
      k = next_key(); e = lpm(k);
      @(negedge clk); #1;
      while (!pw_in_ready) begin @(negedge clk); #1; end
      pw_in_valid = 1; pw_in_key = k;
      pw_exp_found.push_back(e >= 0); pw_exp_nh.push_back(e >= 0 ? r_nh[e] : 8'h0); pw_exp_cyc.push_back(cyc + 2);
      @(posedge clk); #1 pw_in_valid = 0;
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    build();
    fork
      np_run();
      pw_run();
    join
    $display("RRC-ME, 128 lines: hit ratio %0d/%0d = %0.3f", np_hits_me, np_n_me, real'(np_hits_me) / np_n_me);
    $display("RRC-PR, 128 lines: hit ratio %0d/%0d = %0.3f", np_hits_pr, np_n_pr, real'(np_hits_pr) / np_n_pr);
    $display("TCAM front end, 64 lines: %0d of %0d keys answered without the TCAM (%0.3f)",
             pw_stat_rrc_hits, pw_stat_keys, real'(pw_stat_rrc_hits) / pw_stat_keys);
    check(np_stat_trie_nodes < 18'(131072), "table fits in the trie");
    check(np_hits_me > 0 && np_hits_pr > 0 && pw_stat_rrc_hits > 0, "caches hit");
    check(np_stat_fill_mep > 0, "minimal expansions occurred");
    check(pw_stat_tcam_searches + pw_stat_rrc_hits == pw_stat_keys, "TCAM searched exactly on misses");
    check(pw_exp_cyc.size() == 0, "all TCAM-side results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
