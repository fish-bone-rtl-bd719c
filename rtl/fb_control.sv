// Control path of the Fish-Bone stack.
//
// An eight-state machine (E, N0..N5, F). In state Nk a put writes spine
// location k mod 3 and, in the same command, may move the spine item at
// (k+1) mod 3 out to the second level and the second-level item at
// (k+2) mod 3 out to its outside stack; a get reads spine location
// (k+2) mod 3 and may pull an item into spine location (k+1) mod 3 from the
// second level and into second-level location k mod 3 from its outside stack.
// States N0..N2 use the upper level for the second-level push and N3..N5 the
// lower one (see the table in the README), so items spread round-robin over
// the spine and the two halves of the fishbone. Every secondary move fires
// only when its condition on the full flags holds, so a move is made only when
// the next command could need the space or the item.
//
// The states, events and guard conditions are those of the published state
// machine, including its extra conditions in N1 and N2 on the outside stacks
// (s0u_full, s1u_full, s1d_empty, s2d_empty), on 0u for the p0u push, on 2d for
// the g2d pull, and the checks that decide the moves into F and E. A get in F
// returns to N2 and a put in N5 goes on to N0, which is what the rotation
// requires.
//
// Clocked rendering (a choice of this design): the asynchronous original
// fires a chain of self-timed events per command; here one command is taken
// per clock cycle and all of its moves, which touch distinct locations, happen
// together at the next rising edge. ev is combinational from the command and
// the registered flags; state updates at the edge. put has priority if put and
// get are both high (asserted against).
module fb_control
  import fb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       put,
  input  logic       get,
  input  logic [2:0] full_c,     // full flags of spine locations 0c..2c
  input  logic [2:0] full_u,     // full flags of upper locations 0u..2u
  input  logic [2:0] full_d,     // full flags of lower locations 0d..2d
  input  logic       s0u_full,   // outside stack of 0u is full
  input  logic       s1u_full,   // outside stack of 1u is full
  input  logic       s1d_empty,  // outside stack of 1d is empty
  input  logic       s2d_empty,  // outside stack of 2d is empty
  output fb_events_t ev,
  output fb_state_e  state,
  output logic       full,
  output logic       empty
);

  fb_state_e nxt;

  always_comb begin
    ev  = '0;
    nxt = state;
    if (put) begin
      unique case (state)
        FB_E:  begin ev.ep0c = 1'b1; nxt = FB_N1; end
        FB_F:  begin ev.pU = 1'b1; end
        FB_N0: begin
          ev.up_c[0] = 1'b1;
          ev.p_d[1]  = full_c[1];
          ev.sp_d[2] = full_d[2];
          nxt = FB_N1;
        end
        FB_N1: begin
          ev.up_c[1] = 1'b1;
          ev.p_d[2]  = full_c[2];
          ev.sp_u[0] = full_u[0] & ~s0u_full;
          nxt = FB_N2;
        end
        FB_N2: begin
          ev.up_c[2] = 1'b1;
          ev.p_u[0]  = full_c[0] & ~full_u[0];
          ev.sp_u[1] = full_u[1] & ~s1u_full;
          nxt = (full_u[0] && full_d[0]) ? FB_F : FB_N3;
        end
        FB_N3: begin
          ev.dp_c[0] = 1'b1;
          ev.p_u[1]  = full_c[1];
          ev.sp_u[2] = full_u[2];
          nxt = FB_N4;
        end
        FB_N4: begin
          ev.dp_c[1] = 1'b1;
          ev.p_u[2]  = full_c[2];
          ev.sp_d[0] = full_d[0];
          nxt = FB_N5;
        end
        FB_N5: begin
          ev.dp_c[2] = 1'b1;
          ev.p_d[0]  = full_c[0];
          ev.sp_d[1] = full_d[1];
          nxt = FB_N0;
        end
        default: ;
      endcase
    end else if (get) begin
      unique case (state)
        FB_E:  begin ev.gU = 1'b1; end
        FB_F:  begin ev.fg2c = 1'b1; nxt = FB_N2; end
        FB_N0: begin
          ev.dg_c[2] = 1'b1;
          ev.g_d[1]  = ~full_c[1];
          ev.sg_d[0] = ~full_d[0];
          nxt = FB_N5;
        end
        FB_N1: begin
          ev.ug_c[0] = 1'b1;
          ev.g_d[2]  = ~full_c[2] & full_d[2];
          ev.sg_d[1] = ~full_d[1] & ~s1d_empty;
          nxt = (!full_u[2] && !full_d[2]) ? FB_E : FB_N0;
        end
        FB_N2: begin
          ev.ug_c[1] = 1'b1;
          ev.g_u[0]  = ~full_c[0];
          ev.sg_d[2] = ~full_d[2] & ~s2d_empty;
          nxt = FB_N1;
        end
        FB_N3: begin
          ev.ug_c[2] = 1'b1;
          ev.g_u[1]  = ~full_c[1];
          ev.sg_u[0] = ~full_u[0];
          nxt = FB_N2;
        end
        FB_N4: begin
          ev.dg_c[0] = 1'b1;
          ev.g_u[2]  = ~full_c[2];
          ev.sg_u[1] = ~full_u[1];
          nxt = FB_N3;
        end
        FB_N5: begin
          ev.dg_c[1] = 1'b1;
          ev.g_d[0]  = ~full_c[0];
          ev.sg_u[2] = ~full_u[2];
          nxt = FB_N4;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= FB_E;
    else        state <= nxt;

  assign full  = (state == FB_F);
  assign empty = (state == FB_E);

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) !(put && get))
    else $error("fb_control: put and get in the same cycle");

endmodule
