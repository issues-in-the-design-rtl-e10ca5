// rpa_roundrobin_tb: the multi-process verification experiment for the
// repeated-passing slave.
//
// Two, three and then four processes share one slave. Each runs the
// initiation loop of the method (STORE d, LOAD s, STORE d, LOAD s, LOAD d,
// starting over whenever a reply is not the expected OK1/OK2/OK3) as fast as
// it can, on addresses of its own, and is preempted after a random quantum of
// 20..60 bus accesses in round-robin order. The bench checks that every DMA
// the slave starts is one whose process received OK3 for exactly those
// addresses, and that each OK3 comes with a start. It reports the
// unsuccessful initiations and the FAIL replies per context switch (the
// method predicts about one FAIL per switch and at most two unsuccessful
// initiations).
module rpa_roundrobin_tb;
  import uldma_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        sel_n = 1'b1, rw_n = 1'b0;
  logic [31:0] ad_in = '0, ad_out;
  logic        ad_oe, rdy_n, dma_start;
  logic [11:0] dma_src, dma_dst;
  int checks = 0, failures = 0;
  int n_start = 0;
  logic [11:0] st_src, st_dst;

  rpa_tc_slave dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && dma_start) begin
    n_start++;
    st_src = dma_src;
    st_dst = dma_dst;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic tc(input bit load, input logic [11:0] a, output logic [11:0] reply);
    int n = 0;
    @(negedge clk);
    sel_n = 1'b0;
    rw_n  = load;
    ad_in = $urandom;
    ad_in[22:11] = a;
    do begin
      @(posedge clk);
      #1;
      n++;
    end while (rdy_n && n < 20);
    reply = ad_out[22:11];
    @(negedge clk) sel_n = 1'b1;
  endtask

  // per-process program state
  int pc [4];          // next access of the sequence, 0..4
  int iter [4];        // DMA number of the process
  int ok_count [4];

  function automatic logic [11:0] src_of(input int p, input int i);
    return {2'(p), 1'b0, 9'(i)};
  endfunction
  function automatic logic [11:0] dst_of(input int p, input int i);
    return {2'(p), 1'b1, 9'(i)};
  endfunction

  // one access of process p; returns 1 if its initiation failed
  task automatic run_access(input int p, output bit err, output bit got_fail);
    logic [11:0] r, s, d;
    int n0;
    s = src_of(p, iter[p]);
    d = dst_of(p, iter[p]);
    err = 1'b0;
    got_fail = 1'b0;
    n0 = n_start;
    case (pc[p])
      0, 2: begin
        tc(1'b0, d, r);
        pc[p]++;
      end
      1, 3: begin
        tc(1'b1, s, r);
        got_fail = (r == ST_FAIL);
        if (r == ((pc[p] == 1) ? ST_OK1 : ST_OK2)) pc[p]++;
        else begin
          err = 1'b1;
          pc[p] = 0;
        end
      end
      default: begin
        tc(1'b1, d, r);
        got_fail = (r == ST_FAIL);
        @(posedge clk); #1;
        if (r == ST_OK3) begin
          check(n_start == n0 + 1 && st_src == s && st_dst == d,
                "OK3 comes with a start of the process's own DMA");
          ok_count[p]++;
          iter[p]++;
        end else begin
          err = 1'b1;
        end
        pc[p] = 0;
      end
    endcase
    if (pc[p] != 0 || r != ST_OK3)
      check(n_start == n0, "no DMA started without OK3");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int np = 2; np <= 4; np++) begin
      int switches, errs, fails, total_ok;
      switches = 0; errs = 0; fails = 0; total_ok = 0;
      for (int p = 0; p < 4; p++) begin
        pc[p] = 0; iter[p] = 0; ok_count[p] = 0;
      end
      for (int q = 0; q < 60; q++) begin
        int p, len;
        p = q % np;
        len = $urandom_range(20, 60);
        for (int k = 0; k < len; k++) begin
          bit e, f;
          run_access(p, e, f);
          errs += int'(e);
          fails += int'(f);
        end
        switches++;
      end
      for (int p = 0; p < np; p++) begin
        total_ok += ok_count[p];
        check(ok_count[p] > 0, "every process started DMAs");
      end
      $display("%0d processes: %0d switches, %0d DMAs, %0d unsuccessful initiations, %0d FAIL replies",
               np, switches, total_ok, errs, fails);
      check(errs <= 2 * switches, "at most two unsuccessful initiations per switch");
      check(fails <= switches, "at most one FAIL per switch");
      check(errs > 0, "context switches did break sequences");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
