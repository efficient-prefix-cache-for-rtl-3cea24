// tb_semi_lru: self-checking test of the semi-LRU replacement unit.
// Keeps its own age counters and checks the victim choice, the preference
// for empty lines, ageing by one per search, set-to-maximum on a touch and
// the replacement failure when every counter is above zero.
module tb_semi_lru;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] valid_vec = '0, touch_vec = '0;
  logic tick = 0;
  logic [$clog2(N)-1:0] victim_idx; logic victim_ok, victim_empty;
  semi_lru #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int age [N];
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

  task automatic compare();
    int e_idx; bit e_ok, e_empty;
    e_ok = 0; e_empty = 0; e_idx = 0;
    for (int i = 0; i < N; i++) if (!valid_vec[i] && !e_empty) begin e_empty = 1; e_ok = 1; e_idx = i; end
    if (!e_empty)
      for (int i = 0; i < N; i++) if (age[i] == 0 && !e_ok) begin e_ok = 1; e_idx = i; end
    check(victim_ok == e_ok, "victim_ok");
    check(victim_empty == e_empty, "victim_empty");
    if (e_ok) check(victim_idx == e_idx, $sformatf("victim exp %0d got %0d", e_idx, victim_idx));
  endtask

  int fails_seen = 0;
  initial begin
    for (int i = 0; i < N; i++) age[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      compare();
      if (!victim_ok) fails_seen++;
      // random stimulus: fill lines early, then touch and tick at random
      tick = ($urandom % 2);
      touch_vec = '0;
      if ($urandom % 3 == 0) touch_vec[$urandom % N] = 1;
      if (t < 50 && victim_ok && $urandom % 2 == 0) begin
        valid_vec[victim_idx] = 1; touch_vec[victim_idx] = 1;
      end
      if ($urandom % 100 == 0) valid_vec[$urandom % N] = 0;
      for (int i = 0; i < N; i++)
        if (touch_vec[i]) age[i] = N - 1;
        else if (tick && age[i] > 0) age[i]--;
    end
    @(negedge clk); compare();
    check(fails_seen > 0, "replacement failure was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
