// Tree-structured dual-rail carry-lookahead adder.
//
// The W bit positions are the leaves of a binary tree of D-blocks, numbered like a heap:
// node 1 is the root, node m has the children 2m (lower bits) and 2m+1 (upper bits), and
// bit n is leaf WP+n, where WP is W rounded up to a power of two. Each real leaf is a C-block.
// The one-hot kill/propagate/generate codes travel up the tree; the carries travel down: the
// carry into a node goes straight to its lower child, and the D-block forms the carry into
// the upper child. Leaves above bit W-1 (padding) hold a constant kill code, so the carry
// that reaches leaf WP+W is the carry out of the W-bit sum; when W is a power of two the
// carry out is formed from the root's code. The C-block/D-block tree is the document's;
// the heap numbering and padding are this design's own. Delay grows with log2(W) block
// levels up and down. Combinational; all-spacer inputs give all-spacer outputs.
module cla_tree
  import stcla_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  input  dr_t         cin,
  output dr_t [W-1:0] s,
  output dr_t         cout
);

  localparam int unsigned WP = (W <= 1) ? 2 : (1 << $clog2(W));
  localparam kpg_t KILL = '{k: 1'b1, p: 1'b0, g: 1'b0};

  kpg_t grp [1:2*WP-1];  // one-hot code of every node and leaf
  dr_t  cy  [1:2*WP-1];  // carry into the lowest bit of every node and leaf

  assign cy[1] = cin;

  for (genvar m = 1; m < WP; m++) begin : g_node
    assign cy[2*m] = cy[m];
    d_block u_d (
      .i_hi(grp[2*m+1]), .i_lo(grp[2*m]), .c_k(cy[m]), .c_j(cy[2*m+1]), .i_out(grp[m])
    );
  end

  for (genvar n = 0; n < WP; n++) begin : g_leaf
    if (n < W) begin : g_bit
      c_block u_c (.a(a[n]), .b(b[n]), .c(cy[WP+n]), .i_out(grp[WP+n]), .s(s[n]));
    end else begin : g_pad
      assign grp[WP+n] = KILL;
    end
  end

  if (W < WP) begin : g_cout_leaf
    assign cout = cy[WP+W];
  end else begin : g_cout_root
    assign cout.t = grp[1].g | (grp[1].p & cin.t);
    assign cout.f = grp[1].k | (grp[1].p & cin.f);
  end

endmodule
