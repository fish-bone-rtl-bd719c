// Fish-Bone stack: a nine-location stack that needs at most two internal data
// moves per command when used as a leaf.
//
// Structure: a spine of three locations 0c..2c, which is the only part the
// environment touches, and one "bone" per spine location and side: an upper
// location iu and a lower location id that exchange items only with ic. Each
// second-level location may in turn have an outside stack (sXu / sXd ports)
// that it pushes its item into or pulls one from. The control path
// (fb_control) rotates puts and gets round-robin through the spine and the two
// halves of the bones and fires a secondary move only when the next command
// could need the space or the item. Every location is a data_storage (the pass
// gates and the latch) plus a cond_maintainer (its full flag), as in the
// published design.
//
// Use as a leaf: tie s0u_full and s1u_full high and s1d_empty and s2d_empty
// high; the stack then holds nine items and never uses the outside ports, as
// in the leaf configuration the design is evaluated in. The outside ports
// (ext_put_* / ext_get_* strobes, ext_din_* pushed items, ext_dout_* top items
// of the outside stacks) carry the outside moves of the published state
// machine, but those rules alone do not keep the stack consistent once
// outside stacks really hold items (after mixed puts and gets a get can reach
// E while items remain), so only the closed configuration is supported.
//
// Timing (a choice of this design, the original is self-timed): one command
// per clock cycle, no stall; dout, full and empty are valid in the cycle the
// command is presented and depend only on registered state; all moves of the
// command happen at the next rising edge. overflow / underflow are high in
// the cycle of a put on the full stack (the item is dropped) or a get on the
// empty stack (nothing moves). moves counts the data moves of the current
// command: the move across the environment port plus the internal ones.
module fishbone_stack
  import fb_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  stack_if.child                up,
  output logic                  overflow,
  output logic                  underflow,
  // outside stacks of the upper (u) and lower (d) locations, index 0..2
  output logic [2:0]            ext_put_u,
  output logic [2:0]            ext_put_d,
  output logic [2:0]            ext_get_u,
  output logic [2:0]            ext_get_d,
  output logic [2:0][W-1:0]     ext_din_u,
  output logic [2:0][W-1:0]     ext_din_d,
  input  logic [2:0][W-1:0]     ext_dout_u,
  input  logic [2:0][W-1:0]     ext_dout_d,
  input  logic                  s0u_full,
  input  logic                  s1u_full,
  input  logic                  s1d_empty,
  input  logic                  s2d_empty
);

  fb_events_t   ev;
  fb_state_e    state;
  logic [2:0]   full_c, full_u, full_d;
  logic [2:0]   unused_qn_c, unused_qn_u, unused_qn_d;
  logic [2:0][W-1:0] c, u, d;

  fb_control u_ctrl (
    .clk, .rst_n,
    .put       (up.put),
    .get       (up.get),
    .full_c, .full_u, .full_d,
    .s0u_full, .s1u_full, .s1d_empty, .s2d_empty,
    .ev, .state,
    .full      (up.full),
    .empty     (up.empty)
  );

  for (genvar i = 0; i < 3; i++) begin : g_loc
    logic env_put, env_get;
    assign env_put = ev.up_c[i] | ev.dp_c[i] | ((i == 0) ? ev.ep0c : 1'b0);
    assign env_get = ev.ug_c[i] | ev.dg_c[i] | ((i == 2) ? ev.fg2c : 1'b0);

    // spine location ic: loaded from the environment, from iu or from id
    data_storage #(.W(W), .N_SRC(3)) u_c (
      .clk, .rst_n,
      .sel ({ev.g_d[i], ev.g_u[i], env_put}),
      .src ({d[i], u[i], up.din}),
      .q   (c[i])
    );
    cond_maintainer #(.N_SET(3), .N_CLR(3), .INIT(1'b0)) u_fc (
      .clk, .rst_n, .init(1'b0),
      .set ({ev.g_d[i], ev.g_u[i], env_put}),
      .clr ({ev.p_d[i], ev.p_u[i], env_get}),
      .q   (full_c[i]), .qn(unused_qn_c[i])
    );

    // upper location iu: loaded from ic or from its outside stack
    data_storage #(.W(W), .N_SRC(2)) u_u (
      .clk, .rst_n,
      .sel ({ev.sg_u[i], ev.p_u[i]}),
      .src ({ext_dout_u[i], c[i]}),
      .q   (u[i])
    );
    cond_maintainer #(.N_SET(2), .N_CLR(2), .INIT(1'b0)) u_fu (
      .clk, .rst_n, .init(1'b0),
      .set ({ev.sg_u[i], ev.p_u[i]}),
      .clr ({ev.sp_u[i], ev.g_u[i]}),
      .q   (full_u[i]), .qn(unused_qn_u[i])
    );

    // lower location id: loaded from ic or from its outside stack
    data_storage #(.W(W), .N_SRC(2)) u_d (
      .clk, .rst_n,
      .sel ({ev.sg_d[i], ev.p_d[i]}),
      .src ({ext_dout_d[i], c[i]}),
      .q   (d[i])
    );
    cond_maintainer #(.N_SET(2), .N_CLR(2), .INIT(1'b0)) u_fd (
      .clk, .rst_n, .init(1'b0),
      .set ({ev.sg_d[i], ev.p_d[i]}),
      .clr ({ev.sp_d[i], ev.g_d[i]}),
      .q   (full_d[i]), .qn(unused_qn_d[i])
    );
  end

  // outside-stack strobes and data
  assign ext_put_u = ev.sp_u;
  assign ext_put_d = ev.sp_d;
  assign ext_get_u = ev.sg_u;
  assign ext_get_d = ev.sg_d;
  assign ext_din_u = u;
  assign ext_din_d = d;

  // top item: spine location (k+2) mod 3 in Nk, 2c in F
  always_comb begin
    unique case (state)
      FB_N0, FB_N3: up.dout = c[2];
      FB_N1, FB_N4: up.dout = c[0];
      FB_N2, FB_N5: up.dout = c[1];
      FB_F:         up.dout = c[2];
      default:      up.dout = '0;
    endcase
  end

  assign overflow  = ev.pU;
  assign underflow = ev.gU;

  always_comb begin
    int unsigned n;
    n = (up.put && !ev.pU) || (up.get && !ev.gU) ? 1 : 0;
    n += popcount3(ev.p_u) + popcount3(ev.p_d) + popcount3(ev.g_u) + popcount3(ev.g_d);
    n += popcount3(ev.sp_u) + popcount3(ev.sp_d) + popcount3(ev.sg_u) + popcount3(ev.sg_d);
    up.moves = MOVES_W'(n);
  end

  // Every move must take a valid item and land in an empty location.
  a_p_src: assert property (@(posedge clk) disable iff (!rst_n)
    ((ev.p_u | ev.p_d) & ~full_c) == 3'b000) else $error("fishbone_stack: push from an empty spine location");
  a_p_dst: assert property (@(posedge clk) disable iff (!rst_n)
    ((ev.p_u & full_u) | (ev.p_d & full_d)) == 3'b000) else $error("fishbone_stack: push onto a full location");
  a_g_src: assert property (@(posedge clk) disable iff (!rst_n)
    ((ev.g_u & ~full_u) | (ev.g_d & ~full_d)) == 3'b000) else $error("fishbone_stack: pull from an empty location");
  a_g_dst: assert property (@(posedge clk) disable iff (!rst_n)
    ((ev.g_u | ev.g_d) & full_c) == 3'b000) else $error("fishbone_stack: pull onto a full spine location");
  a_sp_src: assert property (@(posedge clk) disable iff (!rst_n)
    ((ev.sp_u & ~full_u) | (ev.sp_d & ~full_d)) == 3'b000) else $error("fishbone_stack: outside push from an empty location");

endmodule
