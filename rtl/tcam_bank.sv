// tcam_bank: one bank of the large TCAM routing table.
//
// Holds E ternary entries (value + care mask, prefix length, next hop,
// parent flag), compares a key with all of them at once and reports whether
// any matched, together with the fields of the lowest-numbered match. Banks
// are combined by lpm_tcam, which again prefers the lowest-numbered bank, so
// the whole table behaves as one priority-encoded TCAM. Splitting the table
// into identical banks is this design's choice; it keeps each bank small
// enough to elaborate quickly.
//
// Interface: wr_en/wr_idx/wr_valid/wr_prefix/wr_nh/wr_parent write one entry
// at the clock edge. The search outputs (any, sel_*) are combinational from
// key and the stored entries.
module tcam_bank
  import rrc_pkg::*;
#(
  parameter int unsigned E = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(E)-1:0] wr_idx,
  input  logic                 wr_valid,
  input  prefix_t              wr_prefix,
  input  nh_t                  wr_nh,
  input  logic                 wr_parent,
  input  key_t                 key,
  output logic                 any,
  output prefix_t              sel_prefix,
  output nh_t                  sel_nh,
  output logic                 sel_parent
);
  localparam int unsigned EW = $clog2(E);

  logic [E-1:0] valid;
  key_t         val    [E];
  key_t         care   [E];
  len_t         plen   [E];
  nh_t          nh     [E];
  logic [E-1:0] parent;

  // lowest matching entry wins
  logic [EW-1:0] sel_idx;
  always_comb begin
    any     = 1'b0;
    sel_idx = '0;
    for (int i = E - 1; i >= 0; i--) begin
      if (valid[i] && (((key ^ val[i]) & care[i]) == '0)) begin
        any     = 1'b1;
        sel_idx = EW'(i);
      end
    end
  end

  assign sel_prefix.bits = val[sel_idx];
  assign sel_prefix.len  = plen[sel_idx];
  assign sel_nh          = nh[sel_idx];
  assign sel_parent      = parent[sel_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (wr_en) valid[wr_idx] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      val[wr_idx]    <= wr_prefix.bits & prefix_mask(wr_prefix.len);
      care[wr_idx]   <= prefix_mask(wr_prefix.len);
      plen[wr_idx]   <= wr_prefix.len;
      nh[wr_idx]     <= wr_nh;
      parent[wr_idx] <= wr_parent;
    end
  end

endmodule
