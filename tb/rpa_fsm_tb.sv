// rpa_fsm_tb: checks the repeated-passing FSM against the published sequence
// rules.
//
// Directed part: the valid STORE-LOAD-STORE-LOAD-LOAD sequence (OK1, OK2,
// OK3 and a start), and every way of breaking it from each state. Random
// part: 3000 transactions with random RW_ and EQUAL, checked against a
// reference that only counts how far into the valid sequence the accesses
// have come. The bench also checks SRC_LD/DST_LD on accesses 2 and 1 and
// DS_SEL (SOURCE only before access 4).
module rpa_fsm_tb;
  import uldma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, firstsel = 1'b0, rw_n = 1'b0, equal = 1'b0;
  logic ds_sel, src_ld, dst_ld, dma_start;
  logic [TC_AW-1:0] status;
  rpa_state_t state;
  int checks = 0, failures = 0;
  int pos = 0;  // reference: accesses of the valid sequence seen so far
  int n_start = 0;

  rpa_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (pos %0d)", what, pos);
    end
  endtask

  // one transaction; load = 1 for a load; eq = address matches
  task automatic step(input bit load, input bit eq);
    int npos;
    logic [TC_AW-1:0] exp_st;
    bit exp_start, exp_src, exp_dst;
    // reference rules, in terms of the position in the sequence
    exp_st = ST_FAIL; exp_start = 0; exp_src = 0; exp_dst = 0;
    case (pos)
      0: npos = load ? 0 : 1;
      1: npos = load ? 2 : 0;
      2: npos = (!load && eq) ? 3 : 0;
      3: npos = (load && eq) ? 4 : 0;
      default: npos = 0;
    endcase
    if (pos == 0 && !load) exp_dst = 1;
    if (pos == 1 && load) begin exp_src = 1; exp_st = ST_OK1; end
    if (pos == 3 && npos == 4) exp_st = ST_OK2;
    if (pos == 4 && load && eq) begin exp_st = ST_OK3; exp_start = 1; end
    @(negedge clk) begin
      firstsel = 1'b1;
      rw_n = load;
      equal = eq;
    end
    @(negedge clk) begin
      firstsel = 1'b0;
      rw_n = $urandom_range(0, 1);
      equal = $urandom_range(0, 1);
    end
    if (load) check(status == exp_st, $sformatf("status %h expected %h", status, exp_st));
    check(dma_start == exp_start, "dma_start");
    check(src_ld == exp_src && dst_ld == exp_dst, "SRC_LD/DST_LD");
    check(ds_sel == (npos == 3), "DS_SEL");
    if (dma_start) n_start++;
    pos = npos;
    // idle cycles change nothing
    @(negedge clk);
    check(!dma_start && !src_ld && !dst_ld, "pulses last one cycle");
    check(int'(state) == pos, "state holds between transactions");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // valid sequence
    step(0, 0); step(1, 0); step(0, 1); step(1, 1); step(1, 1);
    check(n_start == 1, "valid sequence started one DMA");
    // a load in S0 fails and stays
    step(1, 1); step(1, 0);
    // S1: a store resets
    step(0, 0); step(0, 1);
    // S2: load, or store to another address
    step(0, 0); step(1, 0); step(1, 1);
    step(0, 0); step(1, 0); step(0, 0);
    // S3: store, or load from another address
    step(0, 0); step(1, 0); step(0, 1); step(0, 1);
    step(0, 0); step(1, 0); step(0, 1); step(1, 0);
    // S4: store, or load from another address
    step(0, 0); step(1, 0); step(0, 1); step(1, 1); step(0, 1);
    step(0, 0); step(1, 0); step(0, 1); step(1, 1); step(1, 0);
    check(n_start == 1, "no DMA from broken sequences");
    // random
    for (int i = 0; i < 3000; i++) begin
      if (pos >= 2 && $urandom_range(0, 3) != 0) step(pos != 2, 1);
      else step($urandom_range(0, 1), $urandom_range(0, 1));
    end
    check(n_start > 1, "random run reached OK3");
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
