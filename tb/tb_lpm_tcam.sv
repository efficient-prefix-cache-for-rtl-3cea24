// tb_lpm_tcam: self-checking test of the banked TCAM routing table.
// Loads routes sorted longest first, with nested prefixes spread over
// several banks, and checks every search one cycle later against a
// reference that scans the table for the lowest matching entry. Also
// checks entry removal and the search counter.
module tb_lpm_tcam;
  import rrc_pkg::*;
  localparam int unsigned NT = 240, BANK = 64;   // last bank partial (48 entries)
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0; logic [$clog2(NT)-1:0] wr_idx = '0; logic wr_valid = 0;
  prefix_t wr_prefix = '0; nh_t wr_nh = '0; logic wr_parent = 0;
  logic srch_en = 0; key_t srch_key = '0;
  logic rsp_valid, rsp_hit, rsp_parent; nh_t rsp_nh; prefix_t rsp_prefix; logic [31:0] stat_searches;
  lpm_tcam #(.NT(NT), .BANK(BANK)) dut (.*);

  int checks = 0, failures = 0, searches = 0;
  bit m_v [NT]; logic [31:0] m_bits [NT]; int m_len [NT]; logic [7:0] m_nh [NT]; bit m_par [NT];
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic bit covers(logic [31:0] b, int l, logic [31:0] k);
    return (l == 0) || ((k >> (32 - l)) == (b >> (32 - l)));
  endfunction

  task automatic search(logic [31:0] k);
    int e; e = -1;
    for (int i = NT - 1; i >= 0; i--) if (m_v[i] && covers(m_bits[i], m_len[i], k)) e = i;
    @(negedge clk); srch_en = 1; srch_key = k;
    @(negedge clk); srch_en = 0; searches++;
    check(rsp_valid, "one-cycle response");
    check(rsp_hit == (e >= 0), $sformatf("hit key %h", k));
    if (e >= 0) begin
      check(rsp_nh == m_nh[e], $sformatf("nh key %h exp %0d got %0d", k, m_nh[e], rsp_nh));
      check(int'(rsp_prefix.len) == m_len[e] && rsp_prefix.bits == m_bits[e], "matched prefix");
      check(rsp_parent == m_par[e], "parent flag");
    end
  endtask

  initial begin
    int l;
    repeat (2) @(posedge clk); rst_n = 1;
    // entry i gets length 32 - i/8: longest first, as the table must be sorted
    for (int i = 0; i < NT - 16; i++) begin
      l = 32 - i / 8;
      m_v[i] = 1; m_len[i] = l;
      m_bits[i] = {4'hC, 28'($urandom % 4) << 26 | 28'($urandom)} & (32'hFFFF_FFFF << (32 - l));
      m_nh[i] = 8'($urandom); m_par[i] = $urandom % 2;
      @(negedge clk); wr_en = 1; wr_idx = 8'(i); wr_valid = 1;
      wr_prefix.bits = m_bits[i]; wr_prefix.len = 6'(l); wr_nh = m_nh[i]; wr_parent = m_par[i];
    end
    for (int i = NT - 16; i < NT; i++) m_v[i] = 0;
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 300; t++) search((t % 3 == 0) ? $urandom : (m_bits[$urandom % (NT - 16)] | (32'($urandom) >> 20)));
    // remove some entries
    for (int i = 0; i < NT; i += 3) begin
      @(negedge clk); wr_en = 1; wr_idx = 8'(i); wr_valid = 0; m_v[i] = 0;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 300; t++) search((t % 3 == 0) ? $urandom : (m_bits[$urandom % (NT - 16)] | (32'($urandom) >> 20)));
    check(stat_searches == searches, "search counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
