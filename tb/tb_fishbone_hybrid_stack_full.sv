// Full-size testbench: fishbone_hybrid_stack at its default parameters
// (1-bit data, 42 places), running the evaluation workload of the design.
//
// 1. Capacity: 42 puts of a known bit pattern must all succeed, the 43rd must
//    overflow; 42 gets must return the pattern reversed, the 43rd underflow.
// 2. Workload: 100 sequences of 100 random put/get commands with random data,
//    each started from an empty stack (reset). Every command is checked
//    against a reference LIFO (data, flags, 1..4 moves per accepted command)
//    and the data moves of each sequence are summed; the average number of
//    moves per sequence is printed for comparison with the published counts.
module tb_fishbone_hybrid_stack_full;
  import fb_pkg::*;

  localparam int unsigned CAP = 42;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic put, get;
  logic [0:0] din, dout;
  logic full, empty, overflow, underflow;
  logic [MOVES_W-1:0] moves;

  fishbone_hybrid_stack dut (.*);

  int unsigned checks = 0, failures = 0;
  logic model [$];
  int unsigned seq_moves, total_moves = 0, min_moves = 1000, max_moves = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    model.delete();
  endtask

  task automatic cmd(bit p, bit g, logic data);
    @(negedge clk);
    put = p; get = g; din = data;
    #1;
    check(full == (model.size() == CAP), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    if (p) begin
      check(overflow == (model.size() == CAP), "overflow");
      if (model.size() < CAP) model.push_back(data);
    end else if (g) begin
      check(underflow == (model.size() == 0), "underflow");
      if (model.size() > 0) begin
        check(dout == model[$], "get data");
        void'(model.pop_back());
      end
    end
    if (!overflow && !underflow) check(moves >= 1 && moves <= 4, "1..4 moves");
    seq_moves += moves;
    @(posedge clk);
    #1;
    put = 1'b0; get = 1'b0;
  endtask

  initial begin
    put = 1'b0; get = 1'b0; din = '0;
    do_reset();
    for (int i = 0; i <= CAP; i++) cmd(1'b1, 1'b0, 1'(i % 3 == 0));
    check(model.size() == CAP, "42 items stored");
    for (int i = 0; i <= CAP; i++) cmd(1'b0, 1'b1, 1'b0);

    for (int sq = 0; sq < 100; sq++) begin
      do_reset();
      seq_moves = 0;
      for (int c = 0; c < 100; c++)
        if ($urandom_range(1) == 1) cmd(1'b1, 1'b0, 1'($urandom));
        else                        cmd(1'b0, 1'b1, 1'b0);
      total_moves += seq_moves;
      if (seq_moves < min_moves) min_moves = seq_moves;
      if (seq_moves > max_moves) max_moves = seq_moves;
    end
    $display("workload: 100 x 100 commands, data moves per sequence avg %0d.%02d min %0d max %0d",
             total_moves / 100, total_moves % 100, min_moves, max_moves);
    check(max_moves <= 400, "at most four moves per command");
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
