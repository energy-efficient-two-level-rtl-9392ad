// rr_tree_arbiter: round-robin arbiter built as a binary tree of two-input
// nodes, the arbitration structure of a logarithmic interconnect.
//
// The N request lines are the leaves of a tree with log2(N) levels (N is padded
// to a power of two; the padding leaves never request). Each node ORs the
// requests of its two children and forwards the one its priority bit points at
// when both request, or the only one that does. The winner is found from the
// root down, so the logic depth grows with log2(N). When the downstream side
// accepts a transfer (valid_o && ack_i), every node on the winner's path turns
// its priority bit to the other child; nodes off that path keep theirs. A node
// with both children requesting therefore alternates between them, and a
// requester that keeps its request up is served after at most P-1 other
// transfers (N-1 when N is a power of two). The choice is combinational
// (gnt_o one-hot, idx_o its index, valid_o when any request is present); all
// priority bits reset to the lower-numbered child.
//
// The tree organisation follows the name and structure of a logarithmic
// interconnect; the per-node priority update is this design's own choice.
module rr_tree_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned P  = 1 << IW          // leaves, N rounded up
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  req_i,
  input  logic          ack_i,
  output logic [N-1:0]  gnt_o,
  output logic [IW-1:0] idx_o,
  output logic          valid_o
);

  // heap numbering: node 1 is the root, node n has children 2n and 2n+1,
  // leaves are P .. 2P-1 (leaf P+i is request i)
  logic [2*P-1:0] node_req;
  logic [P-1:0]   node_sel;     // 1: right child wins at this node
  logic [P-1:0]   on_path;      // node lies on the winner's path
  logic [P-1:0]   prio_q;       // 1: right child has priority

  always_comb begin
    node_req = '0;
    for (int i = 0; i < int'(N); i++) node_req[P + i] = req_i[i];
    node_sel = '0;
    for (int n = int'(P) - 1; n >= 1; n--) begin
      node_req[n] = node_req[2*n] | node_req[2*n+1];
      node_sel[n] = node_req[2*n+1] && (!node_req[2*n] || prio_q[n]);
    end
  end

  // walk from the root to the winning leaf
  always_comb begin
    int unsigned n;
    on_path = '0;
    n = 1;
    for (int l = 0; l < int'(IW); l++) begin
      on_path[n] = 1'b1;
      n = 2 * n + int'(node_sel[n]);
    end
    idx_o = IW'(n - P);
  end

  assign valid_o = |req_i;

  always_comb begin
    gnt_o = '0;
    if (valid_o) gnt_o[idx_o] = 1'b1;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) prio_q <= '0;
    else if (valid_o && ack_i) begin
      for (int n = 1; n < int'(P); n++)
        if (on_path[n]) prio_q[n] <= !node_sel[n];
    end
  end

endmodule
