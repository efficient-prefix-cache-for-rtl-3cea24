// semi_lru: semi-LRU replacement for the prefix cache.
//
// Every cache line has a descending age counter whose range equals the cache
// size (0..N-1). A line's counter is set to the maximum when the line is
// placed and whenever it matches a search (touch_vec). Each tick decrements
// every other counter that is above zero; the cache ticks once per miss, so a
// line is aged by the misses (replacement attempts) since its last use and
// lines that keep hitting stay young. The victim for a new
// placement is the lowest-numbered empty line, else the lowest-numbered line
// whose counter has reached zero. If the cache is full and every counter is
// above zero, no victim exists and the replacement fails (victim_ok low); the
// new prefix is then simply not cached.
//
// Following the design: counter range, set-to-maximum on placement and on a
// match, and failure when all counters are non-zero. This design's choices:
// counters count down once per miss (were they to count once per search,
// with at most one touch per search no full cache could ever have all
// counters above zero and the failure case could not arise), ties are broken by lowest index, and
// an empty line is always preferred.
//
// Interface: tick and touch_vec act at the clock edge (a touched line is set
// to the maximum even if tick is high); victim_idx/victim_ok/victim_empty are
// combinational from the present counters and valid_vec.
module semi_lru #(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         valid_vec,
  input  logic                 tick,
  input  logic [N-1:0]         touch_vec,
  output logic [$clog2(N)-1:0] victim_idx,
  output logic                 victim_ok,
  output logic                 victim_empty
);
  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned AW    = (N > 1) ? $clog2(N) : 1;
  localparam logic [AW-1:0] AGE_MAX = AW'(N - 1);

  logic [AW-1:0] age [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) age[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (touch_vec[i])
          age[i] <= AGE_MAX;
        else if (tick && age[i] != '0)
          age[i] <= age[i] - 1'b1;
      end
    end
  end

  logic          found_empty, found_old;
  logic [IW-1:0] empty_idx, old_idx;
  always_comb begin
    found_empty = 1'b0;
    found_old   = 1'b0;
    empty_idx   = '0;
    old_idx     = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!valid_vec[i]) begin
        found_empty = 1'b1;
        empty_idx   = IW'(i);
      end
      if (valid_vec[i] && age[i] == '0) begin
        found_old = 1'b1;
        old_idx   = IW'(i);
      end
    end
  end

  assign victim_empty = found_empty;
  assign victim_ok    = found_empty || found_old;
  assign victim_idx   = found_empty ? empty_idx : old_idx;

endmodule
