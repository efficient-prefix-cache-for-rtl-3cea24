// tb_rrc_tcam_system: end-to-end test of the RRC-PR + TCAM front end.
// Builds a nested route table, sorts it longest first, marks parents, and
// loads it through the update port. Then streams one key per cycle (a hot
// set, so the cache hits, and random keys) and checks every result, in
// order and exactly 2 cycles after its key, against a longest-match model.
// Route changes in the middle of the traffic (next-hop changes and removals)
// must never leave a stale answer in the cache. Counted and required:
// cache hits, TCAM searches skipped, fills, parent skips, duplicate skips,
// failed replacements, coherence removals and input stalls.
module tb_rrc_tcam_system;
  import rrc_pkg::*;
  localparam int unsigned N = 8, NT = 512, BANK = 128;
  localparam int R = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready; key_t in_key = '0;
  logic out_valid, out_found, out_from_rrc; nh_t out_nh;
  logic upd_valid = 0, upd_ready; logic [$clog2(NT)-1:0] upd_idx = '0; logic upd_entry_valid = 0;
  prefix_t upd_prefix = '0; nh_t upd_nh = '0; logic upd_parent = 0; logic upd_done;
  logic [31:0] stat_keys, stat_rrc_hits, stat_tcam_searches, stat_fills, stat_parent_skips,
               stat_dup_skips, stat_repl_fail, stat_coh_removed;
  rrc_tcam_system #(.N(N), .NT(NT), .BANK(BANK)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, cyc = 0;
  bit m_v [R]; logic [31:0] m_bits [R]; int m_len [R]; logic [7:0] m_nh [R]; bit m_par [R];
  logic [31:0] hot [10];
  // expected results, in order, with the cycle they are due
  bit exp_found [$]; logic [7:0] exp_nh [$]; int exp_cyc [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic bit covers(logic [31:0] b, int l, logic [31:0] k);
    return (l == 0) || ((k >> (32 - l)) == (b >> (32 - l)));
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (out_valid) begin
      check(exp_cyc.size() > 0, "unexpected result");
      if (exp_cyc.size() > 0) begin
        check(exp_cyc[0] == cyc, $sformatf("latency: due %0d at %0d", exp_cyc[0], cyc));
        check(out_found == exp_found[0], "found");
        if (exp_found[0]) check(out_nh == exp_nh[0], $sformatf("nh exp %0d got %0d", exp_nh[0], out_nh));
        void'(exp_cyc.pop_front()); void'(exp_found.pop_front()); void'(exp_nh.pop_front());
      end
    end
  end

  // the model changes when the write takes effect, after the pipeline drained
  task automatic write_entry(int i, bit v, logic [7:0] nh);
    @(negedge clk);
    upd_valid = 1; upd_idx = 9'(i); upd_entry_valid = v;
    upd_prefix.bits = m_bits[i]; upd_prefix.len = 6'(m_len[i]); upd_nh = nh; upd_parent = m_par[i];
    while (!upd_ready) @(negedge clk);
    @(posedge clk); #1 upd_valid = 0;
    m_v[i] = v; m_nh[i] = nh;
    while (!upd_done) @(negedge clk);
  endtask

  task automatic send(logic [31:0] k);
    int e; e = -1;
    @(negedge clk); #1;
    while (!in_ready) begin stalls++; @(negedge clk); #1; end
    for (int i = R - 1; i >= 0; i--) if (m_v[i] && covers(m_bits[i], m_len[i], k)) e = i;
    in_valid = 1; in_key = k;
    exp_found.push_back(e >= 0); exp_nh.push_back(e >= 0 ? m_nh[e] : 8'h0); exp_cyc.push_back(cyc + 2);
    @(posedge clk); #1 in_valid = 0;
  endtask

  task automatic traffic(int n);
    for (int t = 0; t < n; t++)
      if ($urandom % 10 < 6) send(hot[$urandom % 10]);
      else send(m_bits[$urandom % R] | (32'($urandom) >> 16));
  endtask

  initial begin
    int l, j; logic [31:0] tb; int tl;
    repeat (2) @(posedge clk); rst_n = 1;
    // routes: lengths 8..24 under 0xB0/4, generated longest first
    for (int i = 0; i < R; i++) begin
      l = 24 - (i * 17) / R;
      m_v[i] = 1; m_len[i] = l; m_nh[i] = 8'(i + 1);
      m_bits[i] = {4'hB, 28'($urandom)} & {8'hFF, 4'($urandom % 2) << 3 | 4'hF, 20'hFFFFF} & (32'hFFFF_FFFF << (32 - l));
      for (int q = 0; q < i; q++) if (m_len[q] == l && m_bits[q] == m_bits[i]) m_v[i] = 0;
    end
    for (int i = 0; i < R; i++) begin
      m_par[i] = 0;
      for (int q = 0; q < R; q++)
        if (m_v[i] && m_v[q] && m_len[q] > m_len[i] && covers(m_bits[i], m_len[i], m_bits[q])) m_par[i] = 1;
    end
    for (int i = 0; i < R; i++) write_entry(i, m_v[i], m_nh[i]);
    for (int i = 0; i < 10; i++) hot[i] = m_bits[$urandom % R] | (32'($urandom) >> 24);
    hot[9] = hot[8];   // back-to-back misses of one prefix exercise the duplicate check
    traffic(1500);
    // change next hops and remove routes under live traffic
    for (int t = 0; t < 20; t++) begin
      j = (t < 10) ? 0 : $urandom % R;
      for (int q = 0; q < R; q++) if (m_v[q] && covers(m_bits[q], m_len[q], hot[t % 10])) j = q;
      fork
        if (t % 2) write_entry(j, m_v[j], m_nh[j] + 8'd100); else write_entry(j, 1'b0, m_nh[j]);
        traffic(40);
      join
    end
    traffic(500);
    repeat (5) @(negedge clk);
    check(exp_cyc.size() == 0, "all results delivered");
    $display("keys=%0d rrc_hits=%0d tcam_searches=%0d fills=%0d parent_skips=%0d dup=%0d repl_fail=%0d coh=%0d stalls=%0d",
             stat_keys, stat_rrc_hits, stat_tcam_searches, stat_fills, stat_parent_skips,
             stat_dup_skips, stat_repl_fail, stat_coh_removed, stalls);
    check(stat_rrc_hits > 0, "cache hits occurred");
    check(stat_tcam_searches + stat_rrc_hits == stat_keys, "TCAM searched exactly on misses");
    check(stat_fills > 0, "popular prefixes were fed back");
    check(stat_parent_skips > 0, "parents were kept out");
    check(stat_dup_skips > 0, "duplicate placements were avoided");
    check(stat_repl_fail > 0, "replacement failures occurred");
    check(stat_coh_removed > 0, "coherence removals occurred");
    check(stalls > 0, "input stalled for updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
