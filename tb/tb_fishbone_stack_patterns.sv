// Workload testbench: one Fish-Bone leaf at its default width (1 bit) under
// the leaf power-test sequence of the design: ten puts on the empty stack
// followed by ten gets, for the four data patterns 1110001110, 1111111111,
// 0000000000 and 1010101010 (first bit put first). For each pattern the nine
// accepted items must come back in reverse order, the tenth put must overflow
// and the tenth get underflow, and the data-move counts must be
// 1,1,2,2,2,2,2,2,1,0 for the puts and the same for the gets.
module tb_fishbone_stack_patterns;
  import fb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  stack_if #(.W(1)) s ();
  logic overflow, underflow;

  fishbone_stack dut (
    .clk, .rst_n, .up(s), .overflow, .underflow,
    .ext_put_u(), .ext_put_d(), .ext_get_u(), .ext_get_d(),
    .ext_din_u(), .ext_din_d(),
    .ext_dout_u('0), .ext_dout_d('0),
    .s0u_full(1'b1), .s1u_full(1'b1), .s1d_empty(1'b1), .s2d_empty(1'b1)
  );

  int unsigned checks = 0, failures = 0;
  int exp_moves [10] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 0};
  logic [9:0] patterns [4] = '{10'b1110001110, 10'b1111111111, 10'b0000000000, 10'b1010101010};
  int unsigned total_moves;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    s.put = 1'b0; s.get = 1'b0; s.din = '0;
    for (int p = 0; p < 4; p++) begin
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      total_moves = 0;
      for (int i = 0; i < 10; i++) begin
        @(negedge clk);
        s.put = 1'b1; s.din = patterns[p][9 - i];
        #1;
        check(overflow == (i == 9), $sformatf("pattern %0d put %0d overflow", p, i));
        check(int'(s.moves) == exp_moves[i], $sformatf("pattern %0d put %0d moves %0d", p, i, s.moves));
        total_moves += s.moves;
        @(posedge clk); #1 s.put = 1'b0;
      end
      for (int i = 0; i < 10; i++) begin
        @(negedge clk);
        s.get = 1'b1;
        #1;
        check(underflow == (i == 9), $sformatf("pattern %0d get %0d underflow", p, i));
        if (i < 9) check(s.dout == patterns[p][9 - (8 - i)], $sformatf("pattern %0d get %0d data", p, i));
        check(int'(s.moves) == exp_moves[i], $sformatf("pattern %0d get %0d moves %0d", p, i, s.moves));
        total_moves += s.moves;
        @(posedge clk); #1 s.get = 1'b0;
      end
      check(total_moves == 30, "30 data moves per sequence");
      $display("pattern %b: %0d data moves", patterns[p], total_moves);
    end
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
