// rpa_tc_slave_tb: the repeated-passing TurboChannel slave driven by a
// TurboChannel host model.
//
// The host model drives SEL_, RW_ and the address (the 12 used lines AD[22:11]
// plus random values on the other lines), waits for RDY_, samples the reply
// lines on a load and releases SEL_. The bench checks:
//   - RDY_ arrives 4 clock edges after SEL_ is driven low, and the slave
//     drives the bus only during the RDY_ cycle of a load;
//   - the legitimate sequence returns OK1, OK2, OK3 and starts one DMA with
//     the right SOURCE and DEST;
//   - the interleavings discussed with the method: a reader of a shared
//     source cannot start a DMA with loads alone, and the two-process trace
//     of the verification experiment returns FAIL, OK1, FAIL where predicted;
//   - the Table 1 workload: 1,000 initiations to different addresses, all
//     successful, with the bus cycles each one takes.
module rpa_tc_slave_tb;
  import uldma_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        sel_n = 1'b1, rw_n = 1'b0;
  logic [31:0] ad_in = '0, ad_out;
  logic        ad_oe, rdy_n, dma_start;
  logic [11:0] dma_src, dma_dst;
  int checks = 0, failures = 0;
  int n_start = 0;
  logic [11:0] last_src, last_dst;

  rpa_tc_slave dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && dma_start) begin
    n_start++;
    last_src = dma_src;
    last_dst = dma_dst;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one TurboChannel access; returns the reply of a load
  task automatic tc(input bit load, input logic [11:0] a,
                    output logic [11:0] reply, output int cycles);
    int n = 0;
    bit oe_early = 1'b0;
    @(negedge clk);
    sel_n = 1'b0;
    rw_n  = load;
    ad_in = $urandom;
    ad_in[22:11] = a;
    forever begin
      @(posedge clk);
      #1;
      n++;
      if (!rdy_n || n > 20) break;
      if (ad_oe) oe_early = 1'b1;
    end
    reply  = ad_out[22:11];
    cycles = n;
    check(ad_oe == load && !oe_early, "bus driven only in a load's RDY_ cycle");
    @(negedge clk);
    sel_n = 1'b1;
    ad_in = $urandom;
    @(posedge clk);
    #1;
    check(!ad_oe && rdy_n, "bus released after RDY_");
  endtask

  task automatic st(input logic [11:0] a);
    logic [11:0] r;
    int c;
    tc(1'b0, a, r, c);
    check(c == 4, $sformatf("store answered after %0d cycles", c));
  endtask

  task automatic ld(input logic [11:0] a, input logic [11:0] exp);
    logic [11:0] r;
    int c;
    tc(1'b1, a, r, c);
    check(c == 4, $sformatf("load answered after %0d cycles", c));
    check(r == exp, $sformatf("load %h returned %h expected %h", a, r, exp));
  endtask

  initial begin
    int s0, t0, t1;
    logic [11:0] A, B, C, D;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    A = 12'h123; B = 12'h456; C = 12'h789; D = 12'habc;

    // legitimate initiation: A -> B (STORE B, LOAD A, STORE B, LOAD A, LOAD B)
    s0 = n_start;
    st(B); ld(A, ST_OK1); st(B); ld(A, ST_OK2); ld(B, ST_OK3);
    @(posedge clk);
    check(n_start == s0 + 1 && last_src == A && last_dst == B, "DMA A->B started");

    // a process with read access to A only: loads alone never start a DMA
    s0 = n_start;
    st(B); ld(A, ST_OK1); st(B); ld(A, ST_OK2); ld(A, ST_FAIL);
    check(n_start == s0, "load of the source in place of access 5 rejected");

    // verification trace: process 1 (A->B) and process 2 (C->D)
    s0 = n_start;
    st(A); ld(B, ST_OK1); st(A); ld(B, ST_OK2);   // 1-4, process 1
    st(C); ld(D, ST_FAIL);                        // 5-6, process 2 rejected
    st(C); ld(D, ST_OK1); st(C); ld(D, ST_OK2); ld(C, ST_OK3);  // 7
    st(C);                                        // 8
    ld(B, ST_OK1);                                // 9, expects OK3
    st(A);                                        // 10
    ld(B, ST_FAIL);                               // 11
    st(A); ld(B, ST_OK1); st(A); ld(B, ST_OK2); ld(A, ST_OK3);  // 12-
    @(posedge clk);
    check(n_start == s0 + 2 && last_src == B && last_dst == A, "trace started two DMAs");

    // Table 1 workload: 1,000 initiations to different addresses
    s0 = n_start;
    t0 = $time;
    for (int i = 0; i < 1000; i++) begin
      logic [11:0] s, d;
      s = 12'(2 * i);
      d = 12'(2 * i + 1) ^ 12'h800;
      st(d); ld(s, ST_OK1); st(d); ld(s, ST_OK2); ld(d, ST_OK3);
      @(posedge clk);
      check(last_src == s && last_dst == d, "workload DMA arguments");
    end
    t1 = $time;
    check(n_start == s0 + 1000, "1,000 DMAs started");
    $display("workload: 1000 initiations, %0d bus clock cycles each",
             (t1 - t0) / 10 / 1000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
