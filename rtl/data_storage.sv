// One storage location of a stack, together with the pass gates in front of
// it.
//
// Each source has its own one-hot select bit, standing for one transmission
// gate opened by one move event; when a select is high at a rising clock edge
// the location copies that source, otherwise it holds its item. At most one
// select may be high per cycle (asserted). The storage element of the design
// is a latch pulsed open by a self-timed control event; here it is an
// edge-triggered register and the event is a clock enable. Reset to zero is
// a choice of this design (the original storage has no reset; its full flag,
// kept elsewhere, says whether the item is valid).
module data_storage #(
  parameter int unsigned W     = 1,
  parameter int unsigned N_SRC = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_SRC-1:0]          sel,     // one-hot: which gate is open
  input  logic [N_SRC-1:0][W-1:0]   src,     // data behind each gate
  output logic [W-1:0]              q
);

  logic [W-1:0] mux;

  always_comb begin
    mux = q;
    for (int unsigned i = 0; i < N_SRC; i++)
      if (sel[i]) mux = src[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= mux;

  a_one_gate: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel))
    else $error("data_storage: more than one pass gate open");

endmodule
