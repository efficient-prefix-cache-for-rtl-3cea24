// tb_trie_engine: self-checking test of the trie routing table.
// Inserts and deletes random nested routes and checks every search against
// an independent model: longest match, next hop, parent flag (a longer route
// was ever inserted below the match; deletes do not clear it), the walk
// depth (deepest existing node on the key's path) and the search latency
// (depth + 1 cycles). Also checks the out-of-nodes and not-found errors.
module tb_trie_engine;
  import rrc_pkg::*;
  localparam int unsigned NODES = 2048;
  localparam int R = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid = 0, cmd_ready; trie_op_e cmd_op = TRIE_SEARCH;
  key_t cmd_key = '0; len_t cmd_len = '0; nh_t cmd_nh = '0;
  logic rsp_valid, rsp_found, rsp_parent, rsp_error; nh_t rsp_nh; len_t rsp_lpm_len, rsp_depth;
  logic [$clog2(NODES):0] nodes_used;
  trie_engine #(.NODES(NODES)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] r_bits [R]; int r_len [R]; logic [7:0] r_nh [R]; bit r_live [R]; bit r_ever [R];
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int lcp(logic [31:0] a, logic [31:0] b);
    int n = 0;
    while (n < 32 && a[31-n] == b[31-n]) n++;
    return n;
  endfunction

  task automatic issue(trie_op_e op, logic [31:0] k, int l, logic [7:0] nh, output int lat);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_key = k; cmd_len = 6'(l); cmd_nh = nh;
    @(negedge clk); cmd_valid = 0; lat = 0;
    while (!rsp_valid) begin @(negedge clk); lat++; end
  endtask

  task automatic search(logic [31:0] k);
    int best, lat, dep; bit par;
    best = -1; dep = 0; par = 0;
    for (int i = 0; i < R; i++) begin
      if (r_ever[i]) dep = (lcp(k, r_bits[i]) < r_len[i]) ? (lcp(k, r_bits[i]) > dep ? lcp(k, r_bits[i]) : dep)
                                                          : (r_len[i] > dep ? r_len[i] : dep);
      if (r_live[i] && lcp(k, r_bits[i]) >= r_len[i] && (best < 0 || r_len[i] > r_len[best])) best = i;
    end
    if (best >= 0)
      for (int i = 0; i < R; i++)
        if (r_ever[i] && r_len[i] > r_len[best] && lcp(r_bits[i], r_bits[best]) >= r_len[best]) par = 1;
    issue(TRIE_SEARCH, k, 32, 0, lat);
    check(rsp_found == (best >= 0), $sformatf("found key %h", k));
    check(int'(rsp_depth) == dep, $sformatf("depth key %h exp %0d got %0d", k, dep, rsp_depth));
    check(lat == dep + 1, $sformatf("latency exp %0d got %0d", dep + 1, lat));
    if (best >= 0) begin
      check(int'(rsp_lpm_len) == r_len[best], $sformatf("lpm len key %h exp %0d got %0d", k, r_len[best], rsp_lpm_len));
      check(rsp_nh == r_nh[best], "next hop");
      check(rsp_parent == par, $sformatf("parent key %h", k));
    end
  endtask

  initial begin
    int lat, j;
    repeat (2) @(posedge clk); rst_n = 1;
    // routes under a few 6-bit roots so that many nest one another
    for (int i = 0; i < R; i++) begin
      r_len[i]  = (i == 0) ? 0 : 1 + $urandom % 20;
      r_bits[i] = {3'b101, 3'($urandom % 3), 26'($urandom)};
      r_bits[i] = (r_len[i] == 0) ? 0 : (r_bits[i] & (32'hFFFF_FFFF << (32 - r_len[i])));
      r_nh[i] = 8'(i); r_live[i] = 0; r_ever[i] = 0;
      for (int q = 0; q < i; q++) if (r_len[q] == r_len[i] && r_bits[q] == r_bits[i]) r_len[i] = -1;
    end
    for (int i = 0; i < R; i++) if (r_len[i] >= 0 && i % 2 == 1) begin
      issue(TRIE_INSERT, r_bits[i], r_len[i], r_nh[i], lat);
      check(!rsp_error, "insert ok");
      r_live[i] = 1; r_ever[i] = 1;
    end
    for (int t = 0; t < 300; t++) begin
      j = $urandom % R;
      search((t % 2) ? $urandom : (r_bits[j] | ($urandom >> (r_len[j] < 0 ? 0 : r_len[j]))));
    end
    // second half of the routes, some deletes, more searches
    for (int i = 0; i < R; i++) if (r_len[i] >= 0 && i % 2 == 0) begin
      issue(TRIE_INSERT, r_bits[i], r_len[i], r_nh[i], lat);
      r_live[i] = 1; r_ever[i] = 1;
    end
    for (int i = 0; i < R; i += 5) if (r_len[i] >= 0) begin
      issue(TRIE_DELETE, r_bits[i], r_len[i], 0, lat);
      check(!rsp_error, "delete ok");
      r_live[i] = 0;
    end
    issue(TRIE_DELETE, 32'hFFFF_0000, 16, 0, lat);
    check(rsp_error, "delete of a missing route reports an error");
    for (int t = 0; t < 400; t++) begin
      j = $urandom % R;
      search((t % 2) ? $urandom : (r_bits[j] | ($urandom >> (r_len[j] < 0 ? 0 : r_len[j]))));
    end
    // fill the node memory until an insert fails
    begin
      bit err = 0;
      for (int t = 0; t < 400 && !err; t++) begin
        issue(TRIE_INSERT, {2'b01, 30'($urandom)}, 32, 8'hEE, lat);
        err = rsp_error;
      end
      check(err, "out-of-nodes error");
      check(nodes_used == NODES, "all nodes used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
