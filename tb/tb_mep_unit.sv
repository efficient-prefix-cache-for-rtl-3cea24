// tb_mep_unit: self-checking test of the minimal-expansion decision.
// Includes the 5-bit example: key 10110, walk stops at node 101 under the
// parent 10*, giving the expansion 1011* (here in the top bits of a 32-bit
// key), then random cases against an independent model.
module tb_mep_unit;
  import rrc_pkg::*;
  key_t key; logic found, parent, me_enable; len_t lpm_len, depth;
  logic cache_en, is_mep, pr_skip; prefix_t cache_prefix;
  mep_unit dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] e_bits; int e_len; bit e_en, e_mep, e_skip;
    key = 32'b10110 << 27; found = 1; parent = 1; lpm_len = 2; depth = 3; me_enable = 1;
    #1;
    check(cache_en && is_mep, "example expands");
    check(cache_prefix.len == 4 && cache_prefix.bits == (32'b1011 << 28), "example gives 1011*");
    me_enable = 0; #1;
    check(!cache_en && pr_skip, "parent restriction caches nothing");
    for (int t = 0; t < 2000; t++) begin
      key = $urandom; found = $urandom % 4 != 0; parent = $urandom % 2;
      lpm_len = 6'($urandom % 33); depth = 6'(int'(lpm_len) + $urandom % (33 - int'(lpm_len)));
      me_enable = $urandom % 2;
      #1;
      e_en = found && (!parent || me_enable); e_mep = found && parent && me_enable;
      e_skip = found && parent && !me_enable;
      e_len = e_mep ? (depth == 32 ? 32 : int'(depth) + 1) : int'(lpm_len);
      e_bits = (e_len == 0) ? 0 : (key >> (32 - e_len)) << (32 - e_len);
      check(cache_en == e_en && is_mep == e_mep && pr_skip == e_skip, "decision");
      if (e_en) check(cache_prefix.len == e_len && cache_prefix.bits == e_bits,
                      $sformatf("prefix exp %h/%0d got %h/%0d", e_bits, e_len, cache_prefix.bits, cache_prefix.len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
