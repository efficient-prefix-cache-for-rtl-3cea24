// tb_rrc_cache: self-checking test of the prefix cache array.
// Writes disjoint prefixes of random lengths into random lines, then checks
// search hits, the matching line, next hop, one-cycle response, invalidation
// and the overlap probe against a reference model kept in the testbench.
module tb_rrc_cache;
  import rrc_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic srch_en = 0; key_t srch_key = '0;
  logic rsp_valid, rsp_hit; logic [$clog2(N)-1:0] rsp_idx; nh_t rsp_nh; prefix_t rsp_prefix;
  logic wr_en = 0; logic [$clog2(N)-1:0] wr_idx = '0; prefix_t wr_prefix = '0; nh_t wr_nh = '0;
  logic inv_en = 0; logic [$clog2(N)-1:0] inv_idx = '0;
  prefix_t probe = '0; logic [N-1:0] probe_hit, valid_vec;

  rrc_cache #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  // reference model
  logic        m_valid [N];
  logic [31:0] m_bits  [N];
  int          m_len   [N];
  logic [7:0]  m_nh    [N];

  function automatic bit covers(logic [31:0] bits, int len, logic [31:0] key);
    if (len == 0) return 1;
    return (key >> (32 - len)) == (bits >> (32 - len));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_search(logic [31:0] k);
    int exp_i; bit exp_hit;
    exp_hit = 0; exp_i = 0;
    for (int i = 0; i < N; i++)
      if (m_valid[i] && covers(m_bits[i], m_len[i], k)) begin exp_hit = 1; exp_i = i; end
    @(negedge clk); srch_en = 1; srch_key = k;
    @(negedge clk); srch_en = 0;
    check(rsp_valid === 1'b1, "rsp_valid one cycle after search");
    check(rsp_hit === exp_hit, $sformatf("hit key=%h exp %0d got %0d", k, exp_hit, rsp_hit));
    if (exp_hit) begin
      check(rsp_idx == exp_i, $sformatf("idx key=%h exp %0d got %0d", k, exp_i, rsp_idx));
      check(rsp_nh == m_nh[exp_i], "next hop");
      check(rsp_prefix.len == m_len[exp_i], "prefix length");
    end
  endtask

  initial begin
    int slot;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // disjoint prefixes: line i holds prefix whose top 4 bits are i, plus random extra bits
    for (int i = 0; i < N; i++) begin
      slot = (i * 7) % N;            // scatter over lines
      m_valid[slot] = 1;
      m_len[slot]   = 4 + ($urandom % 20);
      m_bits[slot]  = ({i[3:0], 28'($urandom)}) & (32'hFFFF_FFFF << (32 - m_len[slot]));
      m_nh[slot]    = 8'($urandom);
      @(negedge clk); wr_en = 1; wr_idx = slot[3:0];
      wr_prefix.bits = m_bits[slot]; wr_prefix.len = 6'(m_len[slot]); wr_nh = m_nh[slot];
    end
    @(negedge clk); wr_en = 0;
    // searches inside each prefix and random keys
    for (int i = 0; i < N; i++) do_search(m_bits[i] | (32'($urandom) >> m_len[i]));
    for (int t = 0; t < 200; t++) do_search($urandom);
    // invalidate a few lines
    for (int i = 0; i < N; i += 3) begin
      @(negedge clk); inv_en = 1; inv_idx = i[3:0]; m_valid[i] = 0;
    end
    @(negedge clk); inv_en = 0;
    for (int i = 0; i < N; i++) do_search(m_bits[i] | (32'($urandom) >> m_len[i]));
    check(valid_vec == {m_valid[15], m_valid[14], m_valid[13], m_valid[12], m_valid[11], m_valid[10],
                        m_valid[9], m_valid[8], m_valid[7], m_valid[6], m_valid[5], m_valid[4],
                        m_valid[3], m_valid[2], m_valid[1], m_valid[0]}, "valid_vec");
    // overlap probe: a short prefix that nests some lines, and a long one inside a line
    for (int t = 0; t < 40; t++) begin
      logic [31:0] pb; int pl; bit exp;
      pl = $urandom % 33;
      pb = (pl == 0) ? 0 : ($urandom & (32'hFFFF_FFFF << (32 - pl)));
      if (t % 2 == 1) begin slot = $urandom % N; pb = m_bits[slot] | ($urandom >> m_len[slot]); pl = 32; end
      @(negedge clk); probe.bits = pb; probe.len = 6'(pl);
      #1;
      for (int i = 0; i < N; i++) begin
        exp = m_valid[i] && (pl < m_len[i] ? covers(pb, pl, m_bits[i]) : covers(m_bits[i], m_len[i], pb));
        check(probe_hit[i] == exp, $sformatf("probe line %0d len %0d", i, pl));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
