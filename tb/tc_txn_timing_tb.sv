// tc_txn_timing_tb: checks the TurboChannel transaction strobes.
//
// A host model drives SEL_ low with RW_ set, waits for RDY_ and releases SEL_
// after it, with 0..3 idle cycles between transactions. For every transaction
// the bench checks: RDY_ goes low exactly 4 clock edges after SEL_ is driven
// low (the first of them samples SEL_ low), FSEL is high for exactly one
// cycle, FIRSTSEL follows FSEL by two cycles,
// STAT_SEL is high with RDY_ exactly for loads, and RDY_ is a one-cycle pulse.
module tc_txn_timing_tb;
  logic clk = 1'b0, rst_n = 1'b0, sel_n = 1'b1, rw_n = 1'b0;
  logic fsel, firstsel, rdy_n, stat_sel;
  int checks = 0, failures = 0;

  tc_txn_timing dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic txn(input bit load);
    int n = 0, nf = 0, nfs = 0;
    bit fsel_h1 = 1'b0, fsel_h2 = 1'b0, order_ok = 1'b1;
    @(negedge clk);
    sel_n = 1'b0;
    rw_n  = load;
    forever begin
      @(posedge clk);
      #1;
      n++;
      if (fsel) nf++;
      if (firstsel) begin
        nfs++;
        if (!fsel_h2) order_ok = 1'b0;
      end
      fsel_h2 = fsel_h1;
      fsel_h1 = fsel;
      if (!rdy_n || n > 20) break;
    end
    check(n == 4, $sformatf("RDY_ after %0d edges, expected 4", n));
    check(nf == 1, $sformatf("FSEL high %0d cycles", nf));
    check(nfs == 1 && order_ok, "FIRSTSEL two cycles after FSEL");
    check(stat_sel == load, "STAT_SEL only on a load");
    @(negedge clk);
    sel_n = 1'b1;
    rw_n  = $urandom_range(0, 1);
    @(posedge clk);
    #1;
    check(rdy_n && !stat_sel, "RDY_ and STAT_SEL last one cycle");
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) txn($urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
