// Shared types for the Fish-Bone stack and the tree stack built around it.
//
// The Fish-Bone stack holds nine locations: a spine (top level) of three
// locations c0..c2, an upper level u0..u2 and a lower level d0..d2. Location
// ci only ever exchanges data with ui, di and the environment; ui and di only
// with ci and their own outside stack. The control path walks the eight states
// below; Nk means "the next put goes to spine location k mod 3". The event
// names in fb_events_t follow the move names of the design (ep0c, up0c, p1d,
// sp2d, ...), one bit per move, indexed by location.
package fb_pkg;

  // Width of the per-command data-move count carried up the hierarchy.
  localparam int unsigned MOVES_W = 4;

  typedef enum logic [2:0] {
    FB_N0 = 3'd0,
    FB_N1 = 3'd1,
    FB_N2 = 3'd2,
    FB_N3 = 3'd3,
    FB_N4 = 3'd4,
    FB_N5 = 3'd5,
    FB_E  = 3'd6,   // empty
    FB_F  = 3'd7    // full
  } fb_state_e;

  // One bit per move; index i is the location index 0..2.
  typedef struct packed {
    // environment -> spine
    logic       ep0c;     // put on the empty stack
    logic [2:0] up_c;     // puts in N0..N2
    logic [2:0] dp_c;     // puts in N3..N5
    // spine -> environment
    logic       fg2c;     // get on the full stack
    logic [2:0] ug_c;     // gets in N1..N3
    logic [2:0] dg_c;     // gets in N4, N5, N0
    // spine <-> second level
    logic [2:0] p_u;      // ci -> ui
    logic [2:0] p_d;      // ci -> di
    logic [2:0] g_u;      // ui -> ci
    logic [2:0] g_d;      // di -> ci
    // second level <-> outside stacks
    logic [2:0] sp_u;     // ui -> outside stack of ui
    logic [2:0] sp_d;     // di -> outside stack of di
    logic [2:0] sg_u;     // outside stack of ui -> ui
    logic [2:0] sg_d;     // outside stack of di -> di
    // unsuccessful commands
    logic       pU;       // put on a full stack: item lost, overflow
    logic       gU;       // get on an empty stack: underflow
  } fb_events_t;

  // Tree cell states (the transient P0, P1, G0, G1 states of the
  // asynchronous cell complete inside one clock cycle).
  typedef enum logic [1:0] {
    TC_E  = 2'd0,   // both places empty
    TC_N0 = 2'd1,   // place 1 holds the top item, place 0 empty
    TC_N1 = 2'd2,   // place 0 holds the top item, place 1 empty
    TC_F  = 2'd3    // both places and both sub-stacks full, place 1 on top
  } tc_state_e;

  function automatic int unsigned popcount3(logic [2:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]);
  endfunction

endpackage
