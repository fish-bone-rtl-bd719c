// End-to-end testbench for fishbone_hybrid_stack (42 places), 8-bit data.
//
// Drives long random put/get sequences, biased in phases so that the stack
// fills to 42 items and drains to empty many times, and checks every command
// against a reference LIFO of capacity 42: returned item, full, empty,
// overflow, underflow, one command per cycle with no stall, and between one
// and four data moves for every accepted command. It counts how often each
// mechanism happens and fails if one never does: overflow, underflow, each
// possible move count 1..4, a put into the empty stack and a get from the
// full stack taking a single move, and the stack reaching full and empty.
module tb_fishbone_hybrid_stack;
  import fb_pkg::*;

  localparam int unsigned W   = 8;
  localparam int unsigned CAP = 42;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic put, get;
  logic [W-1:0] din, dout;
  logic full, empty, overflow, underflow;
  logic [MOVES_W-1:0] moves;

  fishbone_hybrid_stack #(.W(W)) dut (.*);

  int unsigned checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int unsigned n_ovf = 0, n_unf = 0, n_full = 0, n_empty = 0;
  int unsigned n_moves [5] = '{0, 0, 0, 0, 0};
  int unsigned n_put_empty_1 = 0, n_get_full_1 = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cmd(bit p, bit g, logic [W-1:0] data);
    @(negedge clk);
    put = p; get = g; din = data;
    #1;
    check(full == (model.size() == CAP), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    if (full) n_full++;
    if (empty) n_empty++;
    if (p) begin
      check(overflow == (model.size() == CAP), "overflow");
      if (model.size() == CAP) begin
        n_ovf++;
        check(moves == 0, "refused put moves nothing");
      end else begin
        if (model.size() == 0 && moves == 1) n_put_empty_1++;
        model.push_back(data);
      end
    end else if (g) begin
      check(underflow == (model.size() == 0), "underflow");
      if (model.size() == 0) begin
        n_unf++;
        check(moves == 0, "refused get moves nothing");
      end else begin
        check(dout == model[$], $sformatf("get data %0h exp %0h", dout, model[$]));
        if (model.size() == CAP && moves == 1) n_get_full_1++;
        void'(model.pop_back());
      end
    end
    if (!overflow && !underflow) begin
      check(moves >= 1 && moves <= 4, $sformatf("moves %0d out of 1..4", moves));
      if (moves <= 4) n_moves[moves]++;
    end
    @(posedge clk);
    #1;
    put = 1'b0; get = 1'b0;
  endtask

  initial begin
    put = 1'b0; get = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i <= CAP; i++) cmd(1'b1, 1'b0, W'(i + 1));
    for (int i = 0; i <= CAP; i++) cmd(1'b0, 1'b1, '0);
    for (int r = 0; r < 20000; r++) begin
      int bias;
      bias = ((r / 300) % 2 == 0) ? 62 : 38;
      if ($urandom_range(99) < bias) cmd(1'b1, 1'b0, W'($urandom));
      else                           cmd(1'b0, 1'b1, '0);
    end
    check(n_ovf > 0,          "overflow happened");
    check(n_unf > 0,          "underflow happened");
    check(n_full > 0,         "stack became full");
    check(n_empty > 0,        "stack became empty");
    for (int k = 1; k <= 4; k++) check(n_moves[k] > 0, $sformatf("a command with %0d moves", k));
    check(n_put_empty_1 > 0,  "put on empty stack took one move");
    check(n_get_full_1 > 0,   "get on full stack took one move");
    $display("overflow %0d underflow %0d full %0d empty %0d", n_ovf, n_unf, n_full, n_empty);
    $display("commands by moves: 1:%0d 2:%0d 3:%0d 4:%0d", n_moves[1], n_moves[2], n_moves[3], n_moves[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
