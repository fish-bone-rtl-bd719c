// Self-checking testbench for data_storage: a location with four pass gates.
// Random one-hot (or idle) gate selections with random source data; after
// every edge the location must hold the selected source, or its old item when
// no gate is open. Reset must clear it.
module tb_data_storage;
  localparam int unsigned W = 8;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0]        sel;
  logic [N-1:0][W-1:0] src;
  logic [W-1:0]        q;

  data_storage #(.W(W), .N_SRC(N)) dut (.*);

  int unsigned checks = 0, failures = 0;
  logic [W-1:0] expq;
  int unsigned n_load = 0, n_hold = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    sel = '0; src = '0;
    #1 rst_n = 1'b0;
    #1 check(q == '0, "reset clears");
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expq = '0;
    for (int r = 0; r < 2000; r++) begin
      int k;
      @(negedge clk);
      for (int i = 0; i < N; i++) src[i] = W'($urandom);
      k = $urandom_range(N);               // N means: no gate open
      sel = (k == N) ? '0 : N'(1) << k;
      if (k == N) n_hold++; else begin n_load++; expq = src[k]; end
      @(posedge clk); #1;
      check(q == expq, $sformatf("q %0h exp %0h", q, expq));
    end
    check(n_load > 0 && n_hold > 0, "loads and holds exercised");
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
