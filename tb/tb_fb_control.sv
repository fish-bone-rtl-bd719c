// Self-checking testbench for fb_control, the Fish-Bone control path.
//
// The full flags and outside-stack conditions are driven directly. In every
// state N0..N5 the events a put and a get would fire are checked, with all
// flags set and with all flags clear, against the event table of the design
// (which spine location the environment uses, which spine item is pushed to
// or pulled from which half of a bone, which bone location exchanges with its
// outside stack), including the extra conditions of N1 and N2. The state
// sequence E -> N1 -> ... -> N0 -> N1 -> N2 -> F under puts, the move back
// under gets, F -> N2, N1 -> E, and the refused put / get in F / E are checked
// too.
module tb_fb_control;
  import fb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic put, get;
  logic [2:0] full_c, full_u, full_d;
  logic s0u_full, s1u_full, s1d_empty, s2d_empty;
  fb_events_t ev;
  fb_state_e  state;
  logic full, empty;

  fb_control dut (.*);

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (state %s) at %0t", what, state.name(), $time);
    end
  endtask

  task automatic flags(bit v);
    full_c = {3{v}}; full_u = {3{v}}; full_d = {3{v}};
    s0u_full = ~v; s1u_full = ~v; s1d_empty = v; s2d_empty = v;
  endtask

  // Expected put events of state Nk with every location full and room
  // outside: env -> c[k%3]; c[(k+1)%3] -> bone; bone[(k+2)%3] -> outside.
  function automatic fb_events_t exp_put(int k, bit all_full);
    fb_events_t e = '0;
    if (k < 3) e.up_c[k % 3] = 1'b1; else e.dp_c[k % 3] = 1'b1;
    if (all_full) begin
      case (k)
        0: begin e.p_d[1] = 1'b1; e.sp_d[2] = 1'b1; end
        1: begin e.p_d[2] = 1'b1; e.sp_u[0] = 1'b1; end
        2: begin                  e.sp_u[1] = 1'b1; end   // p0u blocked: 0u full
        3: begin e.p_u[1] = 1'b1; e.sp_u[2] = 1'b1; end
        4: begin e.p_u[2] = 1'b1; e.sp_d[0] = 1'b1; end
        5: begin e.p_d[0] = 1'b1; e.sp_d[1] = 1'b1; end
        default: ;
      endcase
    end
    return e;
  endfunction

  // Expected get events of state Nk with every location empty and items
  // outside: c[(k+2)%3] -> env; bone -> c[(k+1)%3]; outside -> bone[k%3].
  function automatic fb_events_t exp_get(int k, bit all_empty);
    fb_events_t e = '0;
    if (k >= 1 && k <= 3) e.ug_c[(k + 2) % 3] = 1'b1; else e.dg_c[(k + 2) % 3] = 1'b1;
    if (all_empty) begin
      case (k)
        0: begin e.g_d[1] = 1'b1; e.sg_d[0] = 1'b1; end
        1: begin                  e.sg_d[1] = 1'b1; end   // g2d needs 2d full
        2: begin e.g_u[0] = 1'b1; e.sg_d[2] = 1'b1; end
        3: begin e.g_u[1] = 1'b1; e.sg_u[0] = 1'b1; end
        4: begin e.g_u[2] = 1'b1; e.sg_u[1] = 1'b1; end
        5: begin e.g_d[0] = 1'b1; e.sg_u[2] = 1'b1; end
        default: ;
      endcase
    end
    return e;
  endfunction

  function automatic fb_events_t only_gU();
    fb_events_t e = '0;
    e.gU = 1'b1;
    return e;
  endfunction

  function automatic fb_events_t only_pU();
    fb_events_t e = '0;
    e.pU = 1'b1;
    return e;
  endfunction

  task automatic probe(int k);
    put = 1'b1; get = 1'b0;
    flags(1'b1); #1 check(ev == exp_put(k, 1'b1), $sformatf("put events N%0d, all full", k));
    flags(1'b0); #1 check(ev == exp_put(k, 1'b0), $sformatf("put events N%0d, all empty", k));
    put = 1'b0; get = 1'b1;
    flags(1'b0); #1 check(ev == exp_get(k, 1'b1), $sformatf("get events N%0d, all empty", k));
    flags(1'b1); #1 check(ev == exp_get(k, 1'b0), $sformatf("get events N%0d, all full", k));
    get = 1'b0; flags(1'b0);
  endtask

  task automatic step(bit p, bit g);
    @(negedge clk); put = p; get = g;
    @(posedge clk); #1; put = 1'b0; get = 1'b0;
  endtask

  int order [8] = '{1, 2, 3, 4, 5, 0, 1, 2};

  initial begin
    put = 1'b0; get = 1'b0; flags(1'b0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(state == FB_E && empty && !full, "reset to E");
    get = 1'b1; #1 check(ev == only_gU(), "gU in E"); get = 1'b0;
    step(1'b0, 1'b1); check(state == FB_E, "E stays E on get");
    put = 1'b1; #1 check(ev.ep0c, "ep0c in E"); put = 1'b0;
    step(1'b1, 1'b0); check(state == FB_N1, "E -> N1");
    // special conditions of N1
    @(negedge clk);
    put = 1'b1; flags(1'b1); s0u_full = 1'b1; #1 check(!ev.sp_u[0], "sp0u blocked by full s0u");
    put = 1'b0; get = 1'b1; flags(1'b0); s1d_empty = 1'b1; #1 check(!ev.sg_d[1], "sg1d blocked by empty s1d");
    full_d[2] = 1'b1; full_u[2] = 1'b0; #1 check(ev.g_d[2], "g2d fires when 2c empty and 2d full");
    get = 1'b0; flags(1'b0);
    for (int i = 0; i < 8; i++) begin
      int k;
      k = order[i];
      check(state == fb_state_e'(k), $sformatf("rotation reached N%0d", k));
      @(negedge clk);
      probe(k);
      if (k == 2) begin
        @(negedge clk);
        put = 1'b1; flags(1'b1); s1u_full = 1'b1; #1 check(!ev.sp_u[1], "sp1u blocked by full s1u");
        full_u[0] = 1'b0; #1 check(ev.p_u[0], "p0u fires when 0u empty"); put = 1'b0;
        get = 1'b1; flags(1'b0); s2d_empty = 1'b1; #1 check(!ev.sg_d[2], "sg2d blocked by empty s2d");
        get = 1'b0; flags(1'b0);
      end
      // a get goes back one state (N1 with 2u full goes to N0)
      if (k == 1) full_u[2] = 1'b1;
      step(1'b0, 1'b1);
      check(state == fb_state_e'((k + 5) % 6), $sformatf("get N%0d -> N%0d", k, (k + 5) % 6));
      flags(1'b0);
      step(1'b1, 1'b0);
      check(state == fb_state_e'(k), $sformatf("put back to N%0d", k));
      if (i == 7) begin full_u[0] = 1'b1; full_d[0] = 1'b1; end
      step(1'b1, 1'b0);
      flags(1'b0);
    end
    check(state == FB_F && full, "N2 -> F when 0u and 0d full");
    put = 1'b1; #1 check(ev == only_pU(), "pU in F"); put = 1'b0;
    step(1'b1, 1'b0); check(state == FB_F, "F stays F on put");
    get = 1'b1; #1 check(ev.fg2c, "fg2c in F"); get = 1'b0;
    step(1'b0, 1'b1); check(state == FB_N2, "F -> N2");
    step(1'b0, 1'b1); check(state == FB_N1, "N2 -> N1");
    step(1'b0, 1'b1); check(state == FB_E, "N1 -> E when 2u and 2d empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
