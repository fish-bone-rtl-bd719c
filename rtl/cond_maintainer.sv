// Condition maintainer: keeps the "full" condition of one storage location.
//
// N_SET move events fill the location (any of them sets q) and N_CLR move
// events empty it (any of them clears q); init forces q to INIT, as the init
// port of the original circuit does, and the asynchronous reset does the same.
// q and qn are both brought out like the Q and Qbar ports of the original.
// A set and a clear of the same location in one cycle never happens in a
// correct control path and is asserted against; should it happen, set wins.
// Updates take effect at the rising clock edge.
module cond_maintainer #(
  parameter int unsigned N_SET = 1,
  parameter int unsigned N_CLR = 1,
  parameter bit          INIT  = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [N_SET-1:0] set,
  input  logic [N_CLR-1:0] clr,
  output logic             q,
  output logic             qn
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      q <= INIT;
    else if (init)   q <= INIT;
    else if (|set)   q <= 1'b1;
    else if (|clr)   q <= 1'b0;

  assign qn = ~q;

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !((|set) && (|clr)))
    else $error("cond_maintainer: set and clear in the same cycle");

endmodule
