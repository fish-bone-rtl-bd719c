// Command port of a stack, as seen between a stack and its environment or
// between a tree cell and one of its sub-stacks.
//
// The parent drives put or get (at most one per cycle) and din; the child
// answers in the same cycle with its top item on dout and its status on full
// and empty, all of which depend only on the child's registered state, so the
// command enables ripple down a tree without combinational loops. moves is
// the number of data moves the command causes in the child and below,
// including the move across this port. A command takes effect at the next
// rising clock edge.
interface stack_if #(
  parameter int unsigned W = 1
);
  import fb_pkg::*;

  logic               put;
  logic               get;
  logic [W-1:0]       din;    // parent -> child, item to push
  logic [W-1:0]       dout;   // child -> parent, current top item
  logic               full;
  logic               empty;
  logic [MOVES_W-1:0] moves;

  modport parent (output put, get, din, input dout, full, empty, moves);
  modport child  (input put, get, din, output dout, full, empty, moves);
endinterface
