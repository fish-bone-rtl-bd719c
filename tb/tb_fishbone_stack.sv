// Self-checking testbench for fishbone_stack used as a closed nine-place leaf.
//
// 1. The published example: ten puts on the empty stack then ten gets. The
//    per-command data-move counts must be 1,1,2,2,2,2,2,2,1 for the first nine
//    puts and the same for the first nine gets; the tenth put must overflow
//    and the tenth get underflow, each with no move. Items must come back in
//    reverse order.
// 2. Random put/get sequences against a reference LIFO of capacity nine:
//    every get must return the model's top item, full/empty/overflow/
//    underflow must agree with the model, every command must finish in one
//    cycle and move at most two items, and the outside ports must stay idle.
// Data are 8 bits wide here so that ordering errors are visible.
module tb_fishbone_stack;
  import fb_pkg::*;

  localparam int unsigned W   = 8;
  localparam int unsigned CAP = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  stack_if #(.W(W)) s ();
  logic overflow, underflow;
  logic [2:0] ext_put_u, ext_put_d, ext_get_u, ext_get_d;
  logic [2:0][W-1:0] ext_din_u, ext_din_d;

  fishbone_stack #(.W(W)) dut (
    .clk, .rst_n, .up(s), .overflow, .underflow,
    .ext_put_u, .ext_put_d, .ext_get_u, .ext_get_d,
    .ext_din_u, .ext_din_d,
    .ext_dout_u('0), .ext_dout_d('0),
    .s0u_full(1'b1), .s1u_full(1'b1), .s1d_empty(1'b1), .s2d_empty(1'b1)
  );

  int unsigned checks = 0, failures = 0;
  logic [W-1:0] model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Present one command, check the same-cycle outputs, let it take effect.
  // exp_moves < 0 means: only check the bound 0..2.
  task automatic cmd(bit p, bit g, logic [W-1:0] data, int exp_moves);
    @(negedge clk);
    s.put = p; s.get = g; s.din = data;
    #1;
    check(s.full == (model.size() == CAP), "full flag");
    check(s.empty == (model.size() == 0), "empty flag");
    check((ext_put_u | ext_put_d | ext_get_u | ext_get_d) == 3'b000, "outside ports idle");
    if (p) begin
      check(overflow == (model.size() == CAP), "overflow");
      if (model.size() < CAP) model.push_back(data);
    end else if (g) begin
      check(underflow == (model.size() == 0), "underflow");
      if (model.size() > 0) begin
        check(s.dout == model[$], $sformatf("get data %0h exp %0h", s.dout, model[$]));
        void'(model.pop_back());
      end
    end
    if (exp_moves >= 0) check(int'(s.moves) == exp_moves,
                              $sformatf("moves %0d exp %0d", s.moves, exp_moves));
    else                check(s.moves <= 2, "at most two moves");
    @(posedge clk);
    #1;
    s.put = 1'b0; s.get = 1'b0;
  endtask

  int put_moves [10] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 0};
  int get_moves [10] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 0};
  int unsigned n_ovf = 0, n_unf = 0, n_full = 0;

  initial begin
    s.put = 1'b0; s.get = 1'b0; s.din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // published ten-puts / ten-gets sequence
    for (int i = 0; i < 10; i++) cmd(1'b1, 1'b0, W'(i + 1), put_moves[i]);
    for (int i = 0; i < 10; i++) cmd(1'b0, 1'b1, '0, get_moves[i]);

    // random sequences, biased phases so that full and empty both occur
    for (int r = 0; r < 4000; r++) begin
      int bias;
      bias = ((r / 200) % 2 == 0) ? 65 : 35;
      if (model.size() == CAP) n_full++;
      if ($urandom_range(99) < bias) begin
        if (model.size() == CAP) n_ovf++;
        cmd(1'b1, 1'b0, W'($urandom), -1);
      end else begin
        if (model.size() == 0) n_unf++;
        cmd(1'b0, 1'b1, '0, -1);
      end
    end
    check(n_ovf > 0 && n_unf > 0 && n_full > 0, "random run reached full, overflow and underflow");
    $display("random run: %0d overflows, %0d underflows", n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
