// tb_rrc_system: end-to-end test of the prefix cache in front of the trie.
// Loads nested routes, runs lookups with a hot set of keys (so the cache
// hits) and random keys (so it misses and replaces), interleaves route
// inserts and deletes, and switches between minimal expansion (RRC-ME) and
// parent restriction (RRC-PR). Every answer is checked against an
// independent longest-prefix-match model, so a stale cache line after an
// update shows up as a wrong next hop. Also checked: hit latency (2 cycles),
// miss latency (walk depth + 4 cycles), a key placed by a miss hits when it
// is looked up again, and each mechanism (hit, miss, direct fill, expansion
// fill, parent skip, eviction, replacement failure, coherence removal)
// occurs at least once.
module tb_rrc_system;
  import rrc_pkg::*;
  localparam int unsigned N = 8, NODES = 4096;
  localparam int R = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic me_enable = 1;
  logic lk_valid = 0, lk_ready; key_t lk_key = '0;
  logic res_valid, res_hit, res_found; nh_t res_nh;
  logic upd_valid = 0, upd_ready; route_op_e upd_op = ROUTE_INSERT; prefix_t upd_prefix = '0; nh_t upd_nh = '0;
  logic upd_done, upd_error;
  logic [31:0] stat_hits, stat_misses, stat_fill_direct, stat_fill_mep, stat_pr_skips,
               stat_repl_fail, stat_evictions, stat_coh_removed;
  logic [$clog2(NODES):0] stat_trie_nodes;
  rrc_system #(.N(N), .NODES(NODES)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] r_bits [R]; int r_len [R]; logic [7:0] r_nh [R]; bit r_live [R]; bit r_ever [R];
  logic [31:0] hot [12];
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int lcp(logic [31:0] a, logic [31:0] b);
    int n = 0;
    while (n < 32 && a[31-n] == b[31-n]) n++;
    return n;
  endfunction

  task automatic update(route_op_e op, int i);
    @(negedge clk);
    while (!upd_ready) @(negedge clk);
    upd_valid = 1; upd_op = op; upd_prefix.bits = r_bits[i]; upd_prefix.len = 6'(r_len[i]); upd_nh = r_nh[i];
    @(negedge clk); upd_valid = 0;
    while (!upd_done) @(negedge clk);
    check(!upd_error, "update accepted");
    r_live[i] = (op == ROUTE_INSERT);
    if (op == ROUTE_INSERT) r_ever[i] = 1;
  endtask

  task automatic lookup(logic [31:0] k, output bit hit);
    int best, dep, lat;
    best = -1; dep = 0;
    for (int i = 0; i < R; i++) begin
      if (r_ever[i]) dep = (lcp(k, r_bits[i]) < r_len[i]) ? (lcp(k, r_bits[i]) > dep ? lcp(k, r_bits[i]) : dep)
                                                          : (r_len[i] > dep ? r_len[i] : dep);
      if (r_live[i] && lcp(k, r_bits[i]) >= r_len[i] && (best < 0 || r_len[i] > r_len[best])) best = i;
    end
    @(negedge clk);
    while (!lk_ready) @(negedge clk);
    lk_valid = 1; lk_key = k;
    @(negedge clk); lk_valid = 0; lat = 0;
    while (!res_valid) begin @(negedge clk); lat++; end
    hit = res_hit;
    check(res_found == (best >= 0), $sformatf("found key %h", k));
    if (best >= 0) check(res_nh == r_nh[best], $sformatf("next hop key %h exp %0d got %0d hit %0d", k, r_nh[best], res_nh, res_hit));
    if (res_hit) check(lat == 2, $sformatf("hit latency %0d", lat));
    else         check(lat == dep + 4, $sformatf("miss latency exp %0d got %0d", dep + 4, lat));
  endtask

  task automatic traffic(int n);
    bit h, h2; int j; logic [31:0] k, fills;
    for (int t = 0; t < n; t++) begin
      if ($urandom % 10 < 7) k = hot[$urandom % 12];
      else begin j = $urandom % R; k = r_bits[j] | ($urandom >> (r_len[j] < 0 ? 0 : r_len[j])); end
      fills = stat_fill_direct + stat_fill_mep;
      lookup(k, h);
      if (!h && (stat_fill_direct + stat_fill_mep) != fills) begin
        lookup(k, h2);
        check(h2, "a placed prefix hits on the next lookup");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < R; i++) begin
      r_len[i]  = (i % 40 == 0) ? 2 + i / 40 : 4 + $urandom % 18;
      r_bits[i] = {3'b110, 3'($urandom % 4), 26'($urandom)} & (32'hFFFF_FFFF << (32 - r_len[i]));
      r_nh[i] = 8'(i + 1); r_live[i] = 0; r_ever[i] = 0;
      for (int q = 0; q < i; q++) if (r_len[q] == r_len[i] && r_bits[q] == r_bits[i]) r_bits[i] ^= 32'h1 << (32 - r_len[i]);
      for (int q = 0; q < i; q++) if (r_len[q] == r_len[i] && r_bits[q] == r_bits[i]) r_len[i] = -1;
    end
    for (int i = 0; i < 12; i++) hot[i] = {3'b110, 3'($urandom % 4), 26'($urandom)};
    for (int i = 0; i < R; i++) if (r_len[i] >= 0 && i % 4 != 3) update(ROUTE_INSERT, i);
    me_enable = 1;
    traffic(600);
    // route changes while the cache is warm
    for (int i = 0; i < R; i++) if (r_len[i] >= 0 && i % 4 == 3) begin update(ROUTE_INSERT, i); traffic(3); end
    for (int i = 0; i < R; i += 7) if (r_len[i] >= 0 && r_live[i]) begin update(ROUTE_DELETE, i); traffic(3); end
    traffic(400);
    // parent restriction mode
    me_enable = 0;
    traffic(400);
    me_enable = 1;
    traffic(200);
    $display("hits=%0d misses=%0d direct=%0d mep=%0d pr_skip=%0d evict=%0d repl_fail=%0d coh_removed=%0d",
             stat_hits, stat_misses, stat_fill_direct, stat_fill_mep, stat_pr_skips,
             stat_evictions, stat_repl_fail, stat_coh_removed);
    check(stat_hits > 0, "hits occurred");
    check(stat_misses > 0, "misses occurred");
    check(stat_fill_direct > 0, "direct placements occurred");
    check(stat_fill_mep > 0, "minimal expansions occurred");
    check(stat_pr_skips > 0, "parent restriction skips occurred");
    check(stat_evictions > 0, "evictions occurred");
    check(stat_repl_fail > 0, "replacement failures occurred");
    check(stat_coh_removed > 0, "coherence removals occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
