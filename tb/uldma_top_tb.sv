// uldma_top_tb: end-to-end run of the three initiation engines at their
// default sizes.
//
// For each engine the bench runs the Table 1 experiment of the method's
// evaluation: 1,000 DMA initiations to different addresses, and reports the
// bus accesses and clock cycles each one takes. Around it, it provokes every
// mechanism the engines have and counts it:
//   repeated passing  OK1, OK2, OK3 with a DMA start, FAIL on a load, a
//                     sequence broken by a store, an address mismatch
//   key-based         key accepted, key rejected, size written, DMA start,
//                     bytes-left report, completion (0), failure (-1), a
//                     start waiting for a busy data mover
//   extended shadow   OK with a start, FAIL, interleaved contexts
// A mechanism that never happened counts as a failure. Data movers are bench
// models: the key engine's reports each transfer in one chunk, the extended
// shadow one accepts at once.
module uldma_top_tb;
  import uldma_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        tc_sel_n = 1'b1, tc_rw_n = 1'b0;
  logic [31:0] tc_ad_in = '0, tc_ad_out;
  logic        tc_ad_oe, tc_rdy_n, tc_dma_start;
  logic [11:0] tc_dma_src, tc_dma_dst;
  logic        key_req_valid = 1'b0, key_req_write = 1'b0;
  logic [63:0] key_req_addr = '0, key_req_wdata = '0;
  logic        key_rsp_valid;
  logic [63:0] key_rsp_rdata;
  logic        key_mv_req_valid, key_mv_req_ready = 1'b0;
  logic [1:0]  key_mv_req_ctx;
  logic [63:0] key_mv_req_src, key_mv_req_dst;
  logic [31:0] key_mv_req_size;
  logic        key_mv_done_valid = 1'b0;
  logic [1:0]  key_mv_done_ctx = '0;
  logic [31:0] key_mv_done_bytes = '0;
  logic        xs_req_valid = 1'b0, xs_req_write = 1'b0;
  logic [63:0] xs_req_addr = '0, xs_req_wdata = '0;
  logic        xs_rsp_valid;
  logic [63:0] xs_rsp_rdata;
  logic        xs_mv_req_valid, xs_mv_req_ready;
  logic [0:0]  xs_mv_req_ctx;
  logic [61:0] xs_mv_req_src, xs_mv_req_dst;
  logic [31:0] xs_mv_req_size;

  int checks = 0, failures = 0;

  uldma_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_RPA_OK1, M_RPA_OK2, M_RPA_OK3_START, M_RPA_FAIL, M_RPA_STORE_BREAK,
    M_RPA_MISMATCH, M_KEY_ACCEPT, M_KEY_REJECT, M_KEY_SIZE, M_KEY_START,
    M_KEY_LEFT, M_KEY_DONE, M_KEY_NEG1, M_KEY_MOVER_WAIT, M_XS_OK, M_XS_FAIL,
    M_XS_INTERLEAVE, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{
    "rpa OK1", "rpa OK2", "rpa OK3 + start", "rpa FAIL", "rpa store break",
    "rpa address mismatch", "key accepted", "key rejected", "key size write",
    "key start", "key bytes left", "key done (0)", "key failure (-1)",
    "key mover busy", "xs OK + start", "xs FAIL", "xs interleaved"};

  // ---------------- repeated passing: TurboChannel host ----------------
  int tc_cycles = 0, tc_accesses = 0, tc_starts = 0;
  logic [11:0] tc_last_src, tc_last_dst;
  always @(posedge clk) if (rst_n && tc_dma_start) begin
    tc_starts++;
    tc_last_src = tc_dma_src;
    tc_last_dst = tc_dma_dst;
  end

  task automatic tc(input bit load, input logic [11:0] a, output logic [11:0] reply);
    int n = 0;
    @(negedge clk);
    tc_sel_n = 1'b0;
    tc_rw_n  = load;
    tc_ad_in = $urandom;
    tc_ad_in[22:11] = a;
    do begin
      @(posedge clk);
      #1;
      n++;
    end while (tc_rdy_n && n < 20);
    reply = tc_ad_out[22:11];
    check(!tc_rdy_n && tc_ad_oe == load, "TurboChannel reply");
    @(negedge clk) tc_sel_n = 1'b1;
    tc_cycles += n + 1;
    tc_accesses++;
  endtask
  task automatic tc_st(input logic [11:0] a);
    logic [11:0] r;
    tc(1'b0, a, r);
  endtask
  task automatic tc_ld(input logic [11:0] a, input logic [11:0] exp);
    logic [11:0] r;
    tc(1'b1, a, r);
    check(r == exp, $sformatf("TC load %h: %h expected %h", a, r, exp));
    case (r)
      ST_OK1:  mech[M_RPA_OK1]++;
      ST_OK2:  mech[M_RPA_OK2]++;
      ST_FAIL: mech[M_RPA_FAIL]++;
      default: ;
    endcase
  endtask
  task automatic rpa_dma(input logic [11:0] s, input logic [11:0] d);
    int n0 = tc_starts;
    tc_st(d); tc_ld(s, ST_OK1); tc_st(d); tc_ld(s, ST_OK2); tc_ld(d, ST_OK3);
    @(posedge clk); #1;
    check(tc_starts == n0 + 1 && tc_last_src == s && tc_last_dst == d, "TC DMA started");
    mech[M_RPA_OK3_START]++;
  endtask

  // ---------------- key-based and extended shadow buses ----------------
  int key_polls = 0;
  int key_accesses = 0, xs_accesses = 0, key_cycles = 0, xs_cycles = 0;

  task automatic key_bus(input bit wr, input logic [63:0] a, input logic [63:0] d,
                         output logic [63:0] r);
    @(negedge clk) begin
      key_req_valid = 1'b1; key_req_write = wr; key_req_addr = a; key_req_wdata = d;
    end
    @(negedge clk) key_req_valid = 1'b0;
    check(key_rsp_valid == !wr, "key engine answers loads");
    r = key_rsp_rdata;
    key_accesses++;
    key_cycles++;
  endtask
  task automatic xs_bus(input bit wr, input logic [63:0] a, input logic [63:0] d,
                        output logic [63:0] r);
    @(negedge clk) begin
      xs_req_valid = 1'b1; xs_req_write = wr; xs_req_addr = a; xs_req_wdata = d;
    end
    @(negedge clk) xs_req_valid = 1'b0;
    check(xs_rsp_valid == !wr, "extended shadow engine answers loads");
    r = xs_rsp_rdata;
    xs_accesses++;
    xs_cycles++;
  endtask

  logic [61:0] keys [4];
  function automatic logic [63:0] kshadow(input logic [63:0] pa);
    return {1'b1, pa[62:0]};
  endfunction
  function automatic logic [63:0] kpage(input int c);
    return 64'(c) << 13;
  endfunction

  // key engine data mover: waits a random time, then moves it in one chunk
  int key_moved = 0;
  logic [63:0] key_exp_src [4], key_exp_dst [4];
  logic [31:0] key_exp_size [4];
  initial begin
    forever begin
      @(negedge clk);
      if (key_mv_req_valid) begin
        int c;
        logic [31:0] sz;
        repeat ($urandom_range(0, 3)) begin
          mech[M_KEY_MOVER_WAIT]++;
          @(negedge clk);
        end
        c = int'(key_mv_req_ctx);
        sz = key_mv_req_size;
        check(key_mv_req_src == key_exp_src[c] && key_mv_req_dst == key_exp_dst[c] &&
              sz == key_exp_size[c], "key engine request arguments");
        key_mv_req_ready = 1'b1;
        @(negedge clk) key_mv_req_ready = 1'b0;
        repeat (4) @(negedge clk);
        key_mv_done_valid = 1'b1; key_mv_done_ctx = 2'(c); key_mv_done_bytes = sz;
        @(negedge clk) key_mv_done_valid = 1'b0;
        key_moved++;
      end
    end
  end

  task automatic key_pass(input int c, input logic [61:0] k, input logic [63:0] pa);
    logic [63:0] r;
    key_bus(1'b1, kshadow(pa), {k, 2'(c)}, r);
    if (k == keys[c]) mech[M_KEY_ACCEPT]++;
    else mech[M_KEY_REJECT]++;
  endtask
  task automatic key_size(input int c, input int sz);
    logic [63:0] r;
    key_bus(1'b1, kpage(c), 64'(sz), r);
    mech[M_KEY_SIZE]++;
  endtask
  task automatic key_load(input int c, output logic [63:0] r);
    key_bus(1'b0, kpage(c), '0, r);
  endtask
  task automatic key_dma(input int c, input logic [63:0] s, input logic [63:0] d,
                         input int sz);
    logic [63:0] r;
    // wait until the context's previous transfer has finished
    do begin
      key_load(c, r);
      key_polls++;
    end while (r != 0 && r != '1);
    key_exp_src[c] = s; key_exp_dst[c] = d; key_exp_size[c] = 32'(sz);
    key_pass(c, keys[c], s);
    key_pass(c, keys[c], d);
    key_size(c, sz);
    key_load(c, r);
    check(r == 64'(sz), "key DMA start returns its size");
    mech[M_KEY_START]++;
  endtask

  assign xs_mv_req_ready = 1'b1;
  int xs_taken = 0;
  logic [61:0] xs_exp_src [2], xs_exp_dst [2];
  always @(posedge clk) if (rst_n && xs_mv_req_valid) begin
    xs_taken++;
    if (xs_mv_req_src != xs_exp_src[xs_mv_req_ctx] || xs_mv_req_dst != xs_exp_dst[xs_mv_req_ctx]) begin
      failures++;
      $display("FAIL: extended shadow request arguments");
    end
    checks++;
  end
  function automatic logic [63:0] xshadow(input int c, input logic [61:0] pa);
    return {1'b1, 1'(c), pa};
  endfunction
  task automatic xs_dma(input int c, input logic [61:0] s, input logic [61:0] d, input int sz);
    logic [63:0] r;
    xs_exp_src[c] = s; xs_exp_dst[c] = d;
    xs_bus(1'b1, xshadow(c, d), 64'(sz), r);
    xs_bus(1'b0, xshadow(c, s), '0, r);
    check(r == XS_OK, "extended shadow start returns OK");
    mech[M_XS_OK]++;
  endtask

  // ---------------- the run ----------------
  initial begin
    logic [63:0] r;
    int c0, a0, m0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // repeated passing: mechanisms
    tc_ld(12'h010, ST_FAIL);                         // load in S0
    tc_st(12'h020); tc_st(12'h030);                  // store in S1 breaks
    mech[M_RPA_STORE_BREAK]++;
    tc_ld(12'h040, ST_FAIL);
    tc_st(12'h020); tc_ld(12'h040, ST_OK1); tc_st(12'h021);  // wrong DEST
    mech[M_RPA_MISMATCH]++;
    tc_ld(12'h040, ST_FAIL);
    check(tc_starts == 0, "no TurboChannel DMA from broken sequences");
    // Table 1 workload
    c0 = tc_cycles; a0 = tc_accesses;
    for (int i = 0; i < 1000; i++) rpa_dma(12'(3 * i), 12'(3 * i + 1) ^ 12'hC00);
    $display("repeated passing: 1000 initiations, %0d accesses and %0d bus cycles each",
             (tc_accesses - a0) / 1000, (tc_cycles - c0) / 1000);
    check((tc_accesses - a0) == 5000, "5 accesses per repeated-passing initiation");
    check((tc_cycles - c0) == 25000, "5 bus cycles per TurboChannel access");

    // key-based
    for (int c = 0; c < 4; c++) begin
      keys[c] = {$urandom, $urandom};
      key_bus(1'b1, (64'(1) << 62) | kpage(c), 64'(keys[c]), r);
    end
    key_pass(0, keys[1], 64'h1000);                  // context 1's key on 0
    key_size(0, 64);
    key_load(0, r);
    check(r == '1, "key engine: missing arguments give -1");
    if (r == '1) mech[M_KEY_NEG1]++;
    key_dma(0, 64'h2000, 64'h3000, 4096);
    key_load(0, r);
    if (r != 0 && r != '1) mech[M_KEY_LEFT]++;
    while (r != 0) key_load(0, r);
    mech[M_KEY_DONE]++;
    check(key_moved == 1, "key transfer moved");
    c0 = key_polls; a0 = key_accesses; m0 = key_moved;
    for (int i = 0; i < 1000; i++)
      key_dma(i % 4, 64'h1_0000 * i, 64'h8000_0000 + 64'h1_0000 * i, 64 + i);
    $display("key-based: 1000 initiations, %0d bus accesses each, not counting polls",
             (key_accesses - a0 - (key_polls - c0)) / 1000);
    check(key_accesses - a0 - (key_polls - c0) == 4000, "4 accesses per key-based initiation");
    repeat (40) @(negedge clk);
    check(key_moved - m0 == 1000, "key engine moved 1000 transfers");

    // extended shadow
    xs_bus(1'b0, xshadow(1, 62'h77), '0, r);
    check(r == XS_FAIL, "extended shadow load without destination fails");
    if (r == XS_FAIL) mech[M_XS_FAIL]++;
    begin
      xs_exp_src[0] = 62'h10; xs_exp_dst[0] = 62'h20;
      xs_exp_src[1] = 62'h30; xs_exp_dst[1] = 62'h40;
      xs_bus(1'b1, xshadow(0, 62'h20), 64'd8, r);
      xs_bus(1'b1, xshadow(1, 62'h40), 64'd8, r);
      xs_bus(1'b0, xshadow(0, 62'h10), '0, r);
      check(r == XS_OK, "interleaved context 0");
      xs_bus(1'b0, xshadow(1, 62'h30), '0, r);
      check(r == XS_OK, "interleaved context 1");
      mech[M_XS_INTERLEAVE]++;
    end
    @(negedge clk);
    a0 = xs_accesses; m0 = xs_taken;
    for (int i = 0; i < 1000; i++) begin
      xs_dma(i % 2, 62'(i * 4096), 62'(i * 4096 + 62'h1_0000_0000), 128);
      @(negedge clk);
    end
    check(xs_taken - m0 == 1000, "1000 extended shadow transfers requested");
    check(xs_accesses - a0 == 2000, "2 accesses per extended shadow initiation");
    $display("extended shadow: 1000 initiations, %0d bus accesses each",
             (xs_accesses - a0) / 1000);

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-22s happened %0d times", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
