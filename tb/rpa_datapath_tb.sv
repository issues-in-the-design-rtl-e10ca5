// rpa_datapath_tb: checks address capture, SOURCE/DEST loading and EQUAL.
//
// Each round presents an address on the bus, pulses FSEL one cycle later (the
// timing the transaction logic produces) and then scrambles the bus, so that
// only a correct capture keeps the address. Rounds load DEST, then SOURCE,
// then compare fresh addresses (equal to DEST, to SOURCE or random) against
// both, and check EQUAL against the bench's own record of DEST and SOURCE.
module rpa_datapath_tb;
  localparam int AW = 12;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] addr_in = '0;
  logic          fsel = 1'b0, src_ld = 1'b0, dst_ld = 1'b0, ds_sel = 1'b0;
  logic          equal;
  logic [AW-1:0] cur_addr, source, dest;
  logic [AW-1:0] exp_src, exp_dst;
  int checks = 0, failures = 0;

  rpa_datapath #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // present a, pulse FSEL, scramble the bus
  task automatic capture(input logic [AW-1:0] a);
    @(negedge clk) addr_in = a;
    @(negedge clk) fsel = 1'b1;
    @(negedge clk) begin
      fsel = 1'b0;
      addr_in = AW'($urandom);
    end
    check(cur_addr == a, $sformatf("captured %h expected %h", cur_addr, a));
  endtask

  task automatic load(input bit to_src);
    @(negedge clk) begin
      src_ld = to_src;
      dst_ld = !to_src;
    end
    @(negedge clk) begin
      src_ld = 1'b0;
      dst_ld = 1'b0;
    end
  endtask

  initial begin
    logic [AW-1:0] a;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 100; r++) begin
      exp_dst = AW'($urandom);
      capture(exp_dst);
      load(1'b0);
      check(dest == exp_dst, "DEST loaded");
      exp_src = AW'($urandom);
      capture(exp_src);
      load(1'b1);
      check(source == exp_src && dest == exp_dst, "SOURCE loaded, DEST kept");
      for (int k = 0; k < 4; k++) begin
        case ($urandom_range(0, 2))
          0: a = exp_dst;
          1: a = exp_src;
          default: a = AW'($urandom);
        endcase
        capture(a);
        @(negedge clk) ds_sel = 1'b0;
        #1 check(equal == (a == exp_dst), "EQUAL against DEST");
        @(negedge clk) ds_sel = 1'b1;
        #1 check(equal == (a == exp_src), "EQUAL against SOURCE");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
