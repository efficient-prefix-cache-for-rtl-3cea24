// lpm_tcam: a large ternary CAM routing table with longest-prefix priority.
//
// This is the conventional TCAM search engine that the prefix cache is put
// in front of to save power. Each entry holds a prefix as value + care mask,
// its length, a next hop and a parent flag (the entry nests another route).
// As in conventional TCAM routing tables the entries are kept sorted by
// prefix length, longest first, by whoever loads the table, and a priority
// encoder picks the lowest-numbered matching entry, which is then the
// longest match. The parent flag is kept by the loader too; the design
// only requires that parents be recognisable.
//
// Interface and timing
//   wr_en/wr_idx/wr_valid/wr_prefix/wr_nh/wr_parent   write or clear one entry
//   srch_en/srch_key    search; the result is registered and appears the
//                       next cycle: rsp_valid, rsp_hit, rsp_nh, rsp_prefix,
//                       rsp_parent
//   stat_searches       number of searches, a measure of dynamic power since
//                       every search activates all entries
// The table is built from identical banks of BANK entries (tcam_bank); each
// bank picks its lowest matching entry and the lowest matching bank wins.
// The entry layout, the banking, the one-cycle search and the write port are
// this design's choices. The default size, 26,786 entries, holds the
// 26,786-route table of the power example (a "26K" TCAM).
module lpm_tcam
  import rrc_pkg::*;
#(
  parameter int unsigned NT   = 26786,   // entries
  parameter int unsigned BANK = 1024     // entries per bank (the last bank may be smaller)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [$clog2(NT)-1:0] wr_idx,
  input  logic                  wr_valid,
  input  prefix_t               wr_prefix,
  input  nh_t                   wr_nh,
  input  logic                  wr_parent,
  input  logic                  srch_en,
  input  key_t                  srch_key,
  output logic                  rsp_valid,
  output logic                  rsp_hit,
  output nh_t                   rsp_nh,
  output prefix_t               rsp_prefix,
  output logic                  rsp_parent,
  output logic [31:0]           stat_searches
);
  localparam int unsigned TW = $clog2(NT);
  localparam int unsigned EW = $clog2(BANK);
  localparam int unsigned NB = (NT + BANK - 1) / BANK;   // last bank may be partial
  localparam int unsigned LAST_E = NT - (NB - 1) * BANK;

  logic [NB-1:0] b_any;
  prefix_t       b_prefix [NB];
  nh_t           b_nh     [NB];
  logic          b_parent [NB];

  logic [EW-1:0] bank_off;
  assign bank_off = EW'(wr_idx % TW'(BANK));

  for (genvar b = 0; b < NB; b++) begin : g_bank
    localparam int unsigned E = (b == NB - 1) ? LAST_E : BANK;
    tcam_bank #(.E(E)) u_bank (
      .clk, .rst_n,
      .wr_en(wr_en && (wr_idx / TW'(BANK)) == TW'(b)),
      .wr_idx(bank_off[$clog2(E)-1:0]),
      .wr_valid, .wr_prefix, .wr_nh, .wr_parent,
      .key(srch_key),
      .any(b_any[b]), .sel_prefix(b_prefix[b]),
      .sel_nh(b_nh[b]), .sel_parent(b_parent[b])
    );
  end

  // the lowest-numbered bank with a match wins
  logic    any;
  prefix_t sel_prefix;
  nh_t     sel_nh;
  logic    sel_parent;
  always_comb begin
    any        = 1'b0;
    sel_prefix = '0;
    sel_nh     = '0;
    sel_parent = 1'b0;
    for (int b = NB - 1; b >= 0; b--) begin
      if (b_any[b]) begin
        any        = 1'b1;
        sel_prefix = b_prefix[b];
        sel_nh     = b_nh[b];
        sel_parent = b_parent[b];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid     <= 1'b0;
      rsp_hit       <= 1'b0;
      rsp_nh        <= '0;
      rsp_prefix    <= '0;
      rsp_parent    <= 1'b0;
      stat_searches <= '0;
    end else begin
      rsp_valid <= srch_en;
      rsp_hit   <= srch_en && any;
      if (srch_en) begin
        rsp_nh        <= sel_nh;
        rsp_prefix    <= sel_prefix;
        rsp_parent    <= sel_parent;
        stat_searches <= stat_searches + 1;
      end
    end
  end

endmodule
