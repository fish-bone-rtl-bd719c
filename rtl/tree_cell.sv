// Two-place tree stack cell.
//
// The cell holds two places, each with its own sub-stack. Puts and gets
// rotate through place 0 and place 1. After a put into place i the item in the
// other place, if any, is pushed into that place's sub-stack; after a get from
// place i the other place, if empty, is refilled from its sub-stack. So a
// command touches at most one sub-stack, and only when it must. Sub-stack 0
// always holds the same number of items as sub-stack 1 or one more; the cell
// becomes full when a push into a full sub-stack 0 is refused (the cell then
// keeps both items) and empty when a refill from an empty sub-stack 1 fails.
// This follows the published cell state machine (E, N0, N1, F with the
// transient P0, P1, G0, G1 states).
//
// Clocked rendering (a choice of this design): one command per cycle, and the
// cell's move and the sub-stack's command happen at the same rising edge. The
// sub-stack's full / empty / top item are read in the same cycle; they come
// from registered state, so the command enables ripple down the tree without
// loops. overflow / underflow flag a refused put / get in the cycle it is
// presented. moves adds the cell's own move to those of its sub-stacks.
module tree_cell
  import fb_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  stack_if.child   up,
  stack_if.parent  sub0,
  stack_if.parent  sub1,
  output logic     overflow,
  output logic     underflow
);

  tc_state_e    state, nxt;
  logic [W-1:0] pl0, pl1;
  logic [1:0]   ld0, ld1;     // pass gates of place 0 / place 1: {from sub, from env}

  always_comb begin
    nxt       = state;
    ld0       = '0;
    ld1       = '0;
    sub0.put  = 1'b0;
    sub0.get  = 1'b0;
    sub1.put  = 1'b0;
    sub1.get  = 1'b0;
    overflow  = 1'b0;
    underflow = 1'b0;
    if (up.put) begin
      unique case (state)
        TC_E:  begin ld0[0] = 1'b1; nxt = TC_N1; end
        TC_N1: begin                         // p1, then P0
          ld1[0] = 1'b1;
          if (!sub0.full) begin sub0.put = 1'b1; nxt = TC_N0; end
          else            nxt = TC_F;        // s0.pU
        end
        TC_N0: begin                         // p0, then P1
          ld0[0]   = 1'b1;
          sub1.put = 1'b1;
          nxt      = TC_N1;
        end
        TC_F:  overflow = 1'b1;              // pU
        default: ;
      endcase
    end else if (up.get) begin
      unique case (state)
        TC_E:  underflow = 1'b1;             // gU
        TC_N0: begin                         // g1, then G0
          ld0[1]   = 1'b1;
          sub0.get = 1'b1;
          nxt      = TC_N1;
        end
        TC_N1: begin                         // g0, then G1
          if (!sub1.empty) begin ld1[1] = 1'b1; sub1.get = 1'b1; nxt = TC_N0; end
          else             nxt = TC_E;       // s1.gU
        end
        TC_F:  nxt = TC_N1;                  // g1
        default: ;
      endcase
    end
  end

  data_storage #(.W(W), .N_SRC(2)) u_pl0 (
    .clk, .rst_n, .sel(ld0), .src({sub0.dout, up.din}), .q(pl0)
  );
  data_storage #(.W(W), .N_SRC(2)) u_pl1 (
    .clk, .rst_n, .sel(ld1), .src({sub1.dout, up.din}), .q(pl1)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= TC_E;
    else        state <= nxt;

  assign sub0.din = pl0;
  assign sub1.din = pl1;
  assign up.dout  = (state == TC_N1) ? pl0 : (state == TC_E) ? '0 : pl1;
  assign up.full  = (state == TC_F);
  assign up.empty = (state == TC_E);

  always_comb begin
    int unsigned n;
    n = ((up.put && !overflow) || (up.get && !underflow)) ? 1 : 0;
    up.moves = MOVES_W'(n + int'(sub0.moves) + int'(sub1.moves));
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) !(up.put && up.get))
    else $error("tree_cell: put and get in the same cycle");
  a_sub1_room: assert property (@(posedge clk) disable iff (!rst_n) !(sub1.put && sub1.full))
    else $error("tree_cell: push into a full sub-stack 1");
  a_sub0_item: assert property (@(posedge clk) disable iff (!rst_n) !(sub0.get && sub0.empty))
    else $error("tree_cell: pull from an empty sub-stack 0");

endmodule
