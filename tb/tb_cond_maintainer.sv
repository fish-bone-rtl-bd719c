// Self-checking testbench for cond_maintainer with three set and two clear
// inputs. After reset and after init the flag must equal INIT; a pulse on any
// set input must set it, a pulse on any clear input must clear it, and with
// no pulse it must hold. qn must always be the complement of q. Both INIT
// values are tested with two instances.
module tb_cond_maintainer;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic       init;
  logic [2:0] set;
  logic [1:0] clr;
  logic       q0, qn0, q1, qn1;

  cond_maintainer #(.N_SET(3), .N_CLR(2), .INIT(1'b0)) dut0 (
    .clk, .rst_n, .init, .set, .clr, .q(q0), .qn(qn0));
  cond_maintainer #(.N_SET(3), .N_CLR(2), .INIT(1'b1)) dut1 (
    .clk, .rst_n, .init, .set, .clr, .q(q1), .qn(qn1));

  int unsigned checks = 0, failures = 0;
  logic e0, e1;
  int unsigned n_set = 0, n_clr = 0, n_init = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    init = 1'b0; set = '0; clr = '0;
    #1 rst_n = 1'b0;
    #1 check(q0 == 1'b0 && q1 == 1'b1, "reset to INIT");
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    e0 = 1'b0; e1 = 1'b1;
    for (int r = 0; r < 2000; r++) begin
      int k;
      @(negedge clk);
      init = 1'b0; set = '0; clr = '0;
      k = $urandom_range(9);
      if (k < 3)      begin set[k] = 1'b1;     e0 = 1'b1; e1 = 1'b1; n_set++; end
      else if (k < 5) begin clr[k - 3] = 1'b1; e0 = 1'b0; e1 = 1'b0; n_clr++; end
      else if (k == 5) begin init = 1'b1;      e0 = 1'b0; e1 = 1'b1; n_init++; end
      @(posedge clk); #1;
      check(q0 == e0 && q1 == e1, $sformatf("q %b%b exp %b%b", q0, q1, e0, e1));
      check(qn0 == ~q0 && qn1 == ~q1, "qn is the complement");
    end
    check(n_set > 0 && n_clr > 0 && n_init > 0, "set, clear and init exercised");
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
