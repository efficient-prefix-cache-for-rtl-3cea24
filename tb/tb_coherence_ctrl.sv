// tb_coherence_ctrl: self-checking test of the coherence removal unit.
// The testbench plays the cache: it holds prefixes, answers the probe with
// the lines that overlap, and clears lines the unit invalidates. Each task
// must remove exactly the overlapping lines, one per cycle (k lines take
// k+1 cycles), and report k.
module tb_coherence_ctrl;
  import rrc_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0; prefix_t upd_prefix = '0;
  logic busy, inv_en, done; prefix_t probe; logic [N-1:0] probe_hit;
  logic [$clog2(N)-1:0] inv_idx; logic [$clog2(N):0] removed;
  coherence_ctrl #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  logic        m_valid [N];
  logic [31:0] m_bits  [N];
  int          m_len   [N];

  function automatic bit ovl(logic [31:0] a, int la, logic [31:0] b, int lb);
    int l; l = la < lb ? la : lb;
    if (l == 0) return 1;
    return (a >> (32 - l)) == (b >> (32 - l));
  endfunction
  always_comb
    for (int i = 0; i < N; i++)
      probe_hit[i] = m_valid[i] && ovl(probe.bits, int'(probe.len), m_bits[i], m_len[i]);
  always @(posedge clk) if (inv_en) m_valid[inv_idx] <= 0;

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

  initial begin
    int exp_k, cyc; logic [31:0] pb; int pl; bit keep [N];
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      // fresh random cache content: lines under 8 bits of a common 0xA5 root
      for (int i = 0; i < N; i++) begin
        m_valid[i] = ($urandom % 4 != 0);
        m_len[i]   = 10 + $urandom % 12;
        m_bits[i]  = {8'hA5, 24'($urandom)} & (32'hFFFF_FFFF << (32 - m_len[i]));
      end
      pl = 8 + $urandom % 6;
      pb = {8'hA5, 24'($urandom)} & (32'hFFFF_FFFF << (32 - pl));
      if (t % 5 == 0) begin pl = 0; pb = 0; end
      exp_k = 0;
      for (int i = 0; i < N; i++) begin
        keep[i] = m_valid[i] && !ovl(pb, pl, m_bits[i], m_len[i]);
        if (m_valid[i] && !keep[i]) exp_k++;
      end
      @(negedge clk); start = 1; upd_prefix.bits = pb; upd_prefix.len = 6'(pl);
      @(negedge clk); start = 0; cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      check(removed == exp_k, $sformatf("removed exp %0d got %0d", exp_k, removed));
      check(cyc == exp_k + 1, $sformatf("cycles exp %0d got %0d", exp_k + 1, cyc));
      for (int i = 0; i < N; i++) check(m_valid[i] == keep[i], $sformatf("line %0d state", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
