// trie_engine: the routing table, a binary trie searched one bit per cycle.
//
// A search follows the key's bits from the root, remembering the last node
// along the path that holds a route prefix. When no branch can be taken, the
// remembered prefix is the longest match. Besides the next hop and the match
// length the engine reports whether the matched prefix is a parent (nests a
// longer prefix) and how many key bits the walk traversed: these two are what
// minimal expansion needs, and the walk produces them at no extra cost.
//
// Node memory: child pointers for bit 0 and bit 1 (0 = none; the root is node
// 0 and never a child), a prefix flag, a descendant flag and a next hop. An
// insert walks the prefix's bits, sets the descendant flag on every node it
// passes, allocates missing nodes from a bump pointer and marks the last
// node as a prefix. A delete clears the prefix flag only; nodes are not
// reclaimed and descendant flags are not cleared, so a deleted child can
// leave its ancestor still flagged as a parent. That only makes a later
// expansion longer than needed, never wrong.
//
// The trie itself is this design's choice of route lookup structure (the
// cache works with others too); the design assumes a trie-based table and
// describes the search and the parent test, not the node format.
//
// Interface: cmd_valid/cmd_ready handshake with cmd_op (search/insert/
// delete), cmd_key (key, or prefix bits), cmd_len, cmd_nh. One node is
// visited per cycle, so a search that stops at depth d answers d+1 cycles
// after the command is accepted (O(W)). rsp_valid pulses with the result.
// rsp_error: insert ran out of nodes, or delete found no such route. After
// reset the engine spends one cycle clearing the root (cmd_ready low).
module trie_engine
  import rrc_pkg::*;
#(
  parameter int unsigned NODES = 131072
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  trie_op_e                cmd_op,
  input  key_t                    cmd_key,
  input  len_t                    cmd_len,
  input  nh_t                     cmd_nh,
  output logic                    rsp_valid,
  output logic                    rsp_found,
  output nh_t                     rsp_nh,
  output len_t                    rsp_lpm_len,
  output logic                    rsp_parent,
  output len_t                    rsp_depth,
  output logic                    rsp_error,
  output logic [$clog2(NODES):0]  nodes_used
);
  localparam int unsigned PW = $clog2(NODES);

  typedef struct packed {
    logic [PW-1:0] child0;
    logic [PW-1:0] child1;
    logic          is_pfx;
    logic          has_desc;
    nh_t           nh;
  } node_t;

  node_t mem [NODES];

  typedef enum logic [1:0] {T_INIT, T_IDLE, T_WALK} tstate_e;
  tstate_e       state;
  trie_op_e      op;
  key_t          key;
  len_t          len;
  nh_t           nh_in;
  logic [PW-1:0] cur;
  len_t          depth;
  logic          fresh;      // cur was allocated by this insert: memory content is stale
  logic [PW:0]   next_free;

  // best match so far
  logic best_found, best_parent;
  nh_t  best_nh;
  len_t best_len;

  node_t         node_rd, node_wr;
  logic          bit_k;
  logic [PW-1:0] child;
  logic          at_end;

  assign node_rd = fresh ? '0 : mem[cur];
  assign bit_k   = (depth < len_t'(W)) ? key[(W-1) - int'(depth)] : 1'b0;
  assign child   = bit_k ? node_rd.child1 : node_rd.child0;
  assign at_end  = (depth == len_t'(W)) || (child == '0);
  assign cmd_ready  = (state == T_IDLE);
  assign nodes_used = next_free;

  // node written back during an insert step
  always_comb begin
    node_wr = node_rd;
    if (depth == len) begin
      node_wr.is_pfx = 1'b1;
      node_wr.nh     = nh_in;
    end else begin
      node_wr.has_desc = 1'b1;
      if (child == '0) begin
        if (bit_k) node_wr.child1 = next_free[PW-1:0];
        else       node_wr.child0 = next_free[PW-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (state == T_INIT) begin
      mem[0] <= '0;
    end else if (state == T_WALK) begin
      if (op == TRIE_INSERT) begin
        if (depth == len || child != '0 || next_free < (PW+1)'(NODES))
          mem[cur] <= node_wr;
      end else if (op == TRIE_DELETE && depth == len && node_rd.is_pfx) begin
        mem[cur] <= '{child0: node_rd.child0, child1: node_rd.child1, is_pfx: 1'b0,
                      has_desc: node_rd.has_desc, nh: node_rd.nh};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_INIT;
      op          <= TRIE_SEARCH;
      key         <= '0;
      len         <= '0;
      nh_in       <= '0;
      cur         <= '0;
      depth       <= '0;
      fresh       <= 1'b0;
      next_free   <= (PW+1)'(1);
      best_found  <= 1'b0;
      best_parent <= 1'b0;
      best_nh     <= '0;
      best_len    <= '0;
      rsp_valid   <= 1'b0;
      rsp_found   <= 1'b0;
      rsp_nh      <= '0;
      rsp_lpm_len <= '0;
      rsp_parent  <= 1'b0;
      rsp_depth   <= '0;
      rsp_error   <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      case (state)
        T_INIT: state <= T_IDLE;

        T_IDLE: if (cmd_valid) begin
          op          <= cmd_op;
          key         <= cmd_key;
          len         <= (cmd_op == TRIE_SEARCH) ? len_t'(W) : cmd_len;
          nh_in       <= cmd_nh;
          cur         <= '0;
          depth       <= '0;
          fresh       <= 1'b0;
          best_found  <= 1'b0;
          best_parent <= 1'b0;
          best_nh     <= '0;
          best_len    <= '0;
          state       <= T_WALK;
        end

        T_WALK: begin
          unique case (op)
            TRIE_SEARCH: begin
              if (node_rd.is_pfx) begin
                best_found  <= 1'b1;
                best_parent <= node_rd.has_desc;
                best_nh     <= node_rd.nh;
                best_len    <= depth;
              end
              if (at_end) begin
                rsp_valid   <= 1'b1;
                rsp_error   <= 1'b0;
                rsp_found   <= node_rd.is_pfx || best_found;
                rsp_parent  <= node_rd.is_pfx ? node_rd.has_desc : best_parent;
                rsp_nh      <= node_rd.is_pfx ? node_rd.nh : best_nh;
                rsp_lpm_len <= node_rd.is_pfx ? depth : best_len;
                rsp_depth   <= depth;
                state       <= T_IDLE;
              end else begin
                cur   <= child;
                depth <= depth + 1'b1;
              end
            end

            TRIE_INSERT: begin
              if (depth == len) begin
                rsp_valid <= 1'b1;
                rsp_error <= 1'b0;
                rsp_depth <= depth;
                state     <= T_IDLE;
              end else if (child != '0) begin
                cur   <= child;
                depth <= depth + 1'b1;
                fresh <= 1'b0;
              end else if (next_free < (PW+1)'(NODES)) begin
                cur       <= next_free[PW-1:0];
                next_free <= next_free + 1'b1;
                depth     <= depth + 1'b1;
                fresh     <= 1'b1;
              end else begin
                rsp_valid <= 1'b1;
                rsp_error <= 1'b1;      // out of trie nodes
                rsp_depth <= depth;
                state     <= T_IDLE;
              end
            end

            TRIE_DELETE: begin
              if (depth == len) begin
                rsp_valid <= 1'b1;
                rsp_error <= !node_rd.is_pfx;
                rsp_depth <= depth;
                state     <= T_IDLE;
              end else if (child != '0) begin
                cur   <= child;
                depth <= depth + 1'b1;
              end else begin
                rsp_valid <= 1'b1;
                rsp_error <= 1'b1;      // no such route
                rsp_depth <= depth;
                state     <= T_IDLE;
              end
            end

            default: state <= T_IDLE;
          endcase
        end

        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
