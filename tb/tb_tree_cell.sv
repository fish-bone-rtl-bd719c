// Self-checking testbench for tree_cell.
//
// The cell's two sub-stacks are small reference stacks written in this
// testbench (capacity SUB_CAP each, top item on dout, full / empty status), so
// the cell is a stack of 2 + 2*SUB_CAP places. Random put/get sequences are
// checked against a reference LIFO of that capacity: returned items, full,
// empty, overflow, underflow, one command per cycle, and the cell's own rule
// of at most one sub-stack command per cycle. The sequence is biased so that
// the cell fills and empties repeatedly.
module tb_tree_cell;
  import fb_pkg::*;

  localparam int unsigned W       = 8;
  localparam int unsigned SUB_CAP = 3;
  localparam int unsigned CAP     = 2 + 2 * SUB_CAP;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  stack_if #(.W(W)) s ();
  stack_if #(.W(W)) sub [2] ();
  logic overflow, underflow;

  tree_cell #(.W(W)) dut (
    .clk, .rst_n, .up(s), .sub0(sub[0]), .sub1(sub[1]), .overflow, .underflow
  );

  // reference sub-stacks
  logic [W-1:0] mem [2][SUB_CAP];
  int unsigned  cnt [2];
  for (genvar k = 0; k < 2; k++) begin : g_sub
    assign sub[k].dout  = (cnt[k] > 0) ? mem[k][cnt[k] - 1] : '0;
    assign sub[k].full  = (cnt[k] == SUB_CAP);
    assign sub[k].empty = (cnt[k] == 0);
    assign sub[k].moves = (sub[k].put && cnt[k] < SUB_CAP) || (sub[k].get && cnt[k] > 0) ? 1 : 0;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) cnt[k] <= 0;
      else if (sub[k].put && cnt[k] < SUB_CAP) begin
        mem[k][cnt[k]] <= sub[k].din;
        cnt[k] <= cnt[k] + 1;
      end else if (sub[k].get && cnt[k] > 0)
        cnt[k] <= cnt[k] - 1;
  end

  int unsigned checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int unsigned n_ovf = 0, n_unf = 0, n_push = 0, n_pull = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cmd(bit p, bit g, logic [W-1:0] data);
    @(negedge clk);
    s.put = p; s.get = g; s.din = data;
    #1;
    check(s.full == (model.size() == CAP), "full flag");
    check(s.empty == (model.size() == 0), "empty flag");
    check(int'(sub[0].put) + int'(sub[0].get) + int'(sub[1].put) + int'(sub[1].get) <= 1,
          "at most one sub-stack command");
    check(!(sub[0].put && sub[0].full) && !(sub[1].put && sub[1].full), "no push into full sub-stack");
    if (sub[0].put || sub[1].put) n_push++;
    if (sub[0].get || sub[1].get) n_pull++;
    if (p) begin
      check(overflow == (model.size() == CAP), "overflow");
      if (model.size() == CAP) n_ovf++; else model.push_back(data);
    end else if (g) begin
      check(underflow == (model.size() == 0), "underflow");
      if (model.size() == 0) n_unf++;
      else begin
        check(s.dout == model[$], $sformatf("get data %0h exp %0h", s.dout, model[$]));
        void'(model.pop_back());
      end
    end
    check(s.moves <= 2, "at most two moves");
    @(posedge clk);
    #1;
    s.put = 1'b0; s.get = 1'b0;
  endtask

  initial begin
    s.put = 1'b0; s.get = 1'b0; s.din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // fill completely, one overflow, then empty completely, one underflow
    for (int i = 0; i <= CAP; i++) cmd(1'b1, 1'b0, W'(i + 8'h10));
    for (int i = 0; i <= CAP; i++) cmd(1'b0, 1'b1, '0);
    for (int r = 0; r < 3000; r++) begin
      int bias;
      bias = ((r / 100) % 2 == 0) ? 65 : 35;
      if ($urandom_range(99) < bias) cmd(1'b1, 1'b0, W'($urandom));
      else                           cmd(1'b0, 1'b1, '0);
    end
    check(n_ovf > 1 && n_unf > 1 && n_push > 0 && n_pull > 0, "mechanisms exercised");
    $display("overflows %0d underflows %0d pushes %0d pulls %0d", n_ovf, n_unf, n_push, n_pull);
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
