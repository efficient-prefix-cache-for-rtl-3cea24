// coherence_ctrl: keeps the prefix cache coherent with the routing table.
//
// When a route prefix is inserted into or deleted from the routing table,
// cached prefixes that overlap it may now give a wrong answer: a cached
// prefix that nests a new route has become a parent, a minimal-expansion
// child of a deleted parent points at a route that no longer exists, and a
// mirror of a deleted route is stale. This unit removes every cache line
// whose prefix nests or is nested by the updated prefix, one line per cycle,
// as the design counts coherence work (one cycle per removed entry).
// Removing every overlapping line is this design's choice; it is a safe
// superset of the lines that are actually wrong.
//
// Interface and timing
//   start/upd_prefix  begin a coherence task (accepted when busy is low)
//   probe             held copy of the prefix, to the cache's probe port
//   probe_hit         from the cache: overlapping lines (combinational)
//   inv_en/inv_idx    removes the lowest-numbered overlapping line
//   done              one-cycle pulse when no overlapping line is left;
//                     removed gives the number of lines removed by the task
// A task that finds k lines takes k+1 cycles after start.
module coherence_ctrl
  import rrc_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  prefix_t              upd_prefix,
  output logic                 busy,
  output prefix_t              probe,
  input  logic [N-1:0]         probe_hit,
  output logic                 inv_en,
  output logic [$clog2(N)-1:0] inv_idx,
  output logic                 done,
  output logic [$clog2(N):0]   removed
);
  localparam int unsigned IW = $clog2(N);

  typedef enum logic [0:0] {C_IDLE, C_SCAN} cstate_e;
  cstate_e state;

  logic          any_hit;
  logic [IW-1:0] first_idx;
  always_comb begin
    any_hit   = 1'b0;
    first_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (probe_hit[i]) begin
        any_hit   = 1'b1;
        first_idx = IW'(i);
      end
    end
  end

  assign busy    = (state != C_IDLE);
  assign inv_en  = (state == C_SCAN) && any_hit;
  assign inv_idx = first_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      probe   <= '0;
      done    <= 1'b0;
      removed <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        C_IDLE: if (start) begin
          probe   <= upd_prefix;
          removed <= '0;
          state   <= C_SCAN;
        end
        C_SCAN: begin
          if (any_hit) begin
            removed <= removed + 1'b1;
          end else begin
            done  <= 1'b1;
            state <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
