// 42-place hybrid stack with Fish-Bone leaves.
//
// A two-level tree of two-place tree cells (one root, two inner cells, six
// places in all) whose four sub-stacks are nine-place Fish-Bone stacks used as
// leaves (36 places), 42 places in total. The environment talks only to the
// root cell; a command moves at most one item per level, so it needs between
// one and four data moves whatever the fill level: one at the root, one in an
// inner cell, and at most two inside a leaf. This is the configuration the
// design was evaluated in; the leaves' outside-stack conditions are tied so
// that each leaf behaves as a closed nine-place stack.
//
// Interface: put / get (at most one per cycle) with din, dout valid in the
// same cycle as a get, full / empty status, overflow / underflow high in the
// cycle of a refused put / get, and moves = number of data moves the current
// command causes (for energy accounting; it has no effect on the stack).
// One command per clock cycle; a command takes effect at the next rising edge.
// Reset (active low, asynchronous) empties the stack.
module fishbone_hybrid_stack
  import fb_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               put,
  input  logic               get,
  input  logic [W-1:0]       din,
  output logic [W-1:0]       dout,
  output logic               full,
  output logic               empty,
  output logic               overflow,
  output logic               underflow,
  output logic [MOVES_W-1:0] moves
);

  stack_if #(.W(W)) env_if ();
  stack_if #(.W(W)) mid_if [2] ();
  stack_if #(.W(W)) leaf_if [4] ();

  assign env_if.put = put;
  assign env_if.get = get;
  assign env_if.din = din;
  assign dout  = env_if.dout;
  assign full  = env_if.full;
  assign empty = env_if.empty;
  assign moves = env_if.moves;

  tree_cell #(.W(W)) u_root (
    .clk, .rst_n, .up(env_if), .sub0(mid_if[0]), .sub1(mid_if[1]),
    .overflow, .underflow
  );

  logic [1:0] mid_ovf, mid_unf;
  logic [3:0] leaf_ovf, leaf_unf;

  for (genvar m = 0; m < 2; m++) begin : g_mid
    tree_cell #(.W(W)) u_cell (
      .clk, .rst_n, .up(mid_if[m]), .sub0(leaf_if[2*m]), .sub1(leaf_if[2*m+1]),
      .overflow(mid_ovf[m]), .underflow(mid_unf[m])
    );
  end

  for (genvar l = 0; l < 4; l++) begin : g_leaf
    logic [2:0]        put_u, put_d, get_u, get_d;
    fishbone_stack #(.W(W)) u_fb (
      .clk, .rst_n, .up(leaf_if[l]),
      .overflow(leaf_ovf[l]), .underflow(leaf_unf[l]),
      .ext_put_u(put_u), .ext_put_d(put_d), .ext_get_u(get_u), .ext_get_d(get_d),
      .ext_din_u(), .ext_din_d(),
      .ext_dout_u('0), .ext_dout_d('0),
      // leaf: outside stacks count as full and empty, so nothing leaves the leaf
      .s0u_full(1'b1), .s1u_full(1'b1), .s1d_empty(1'b1), .s2d_empty(1'b1)
    );
    // A closed leaf must never address an outside stack.
    a_closed: assert property (@(posedge clk) disable iff (!rst_n)
      (put_u | put_d | get_u | get_d) == 3'b000)
      else $error("fishbone_hybrid_stack: leaf %0d used its outside stacks", l);
  end

  // Inner cells and leaves are never sent a command they must refuse.
  a_inner: assert property (@(posedge clk) disable iff (!rst_n)
    (mid_ovf | mid_unf) == 2'b00 && (leaf_ovf | leaf_unf) == 4'b0000)
    else $error("fishbone_hybrid_stack: refused command inside the tree");

endmodule
