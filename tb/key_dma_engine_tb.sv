// key_dma_engine_tb: key-based user-level DMA initiation.
//
// The operating system (bench) writes a key for each context. Processes then
// pass source and destination with shadow stores carrying key#ctx, store the
// size to their context page and load from it. A data mover model accepts
// requests after a random delay and reports progress in chunks. The bench
// checks: the started transfer carries the right addresses and size; the
// initiating load returns the size; later loads return the bytes still to
// move and 0 at the end; a shadow store with a wrong key has no effect (the
// load then reports -1); two processes interleaved at every access keep their
// arguments apart; key pages read back as 0. 100 random rounds interleave all
// four processes with an attacker's wrong-key stores and check every request
// and reply against the bench's record.
module key_dma_engine_tb;
  import uldma_pkg::*;
  localparam int PA_W = 64, DATA_W = 64, NCTX = 4, SIZE_W = 32, PAGE_BITS = 13;
  localparam int CTX_W = 2;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              req_valid = 1'b0, req_write = 1'b0;
  logic [PA_W-1:0]   req_addr = '0;
  logic [DATA_W-1:0] req_wdata = '0;
  logic              rsp_valid;
  logic [DATA_W-1:0] rsp_rdata;
  logic              mv_req_valid, mv_req_ready = 1'b0;
  logic [CTX_W-1:0]  mv_req_ctx;
  logic [PA_W-1:0]   mv_req_src, mv_req_dst;
  logic [SIZE_W-1:0] mv_req_size;
  logic              mv_done_valid = 1'b0;
  logic [CTX_W-1:0]  mv_done_ctx = '0;
  logic [SIZE_W-1:0] mv_done_bytes = '0;
  int checks = 0, failures = 0;
  logic [61:0] keys [NCTX];

  key_dma_engine dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus(input bit wr, input logic [PA_W-1:0] a,
                     input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] r);
    @(negedge clk) begin
      req_valid = 1'b1; req_write = wr; req_addr = a; req_wdata = d;
    end
    @(negedge clk) begin
      req_valid = 1'b0; req_write = $urandom; req_addr = {$urandom, $urandom};
    end
    check(rsp_valid == !wr, "response only for a load");
    r = rsp_rdata;
  endtask

  function automatic logic [PA_W-1:0] shadow(input logic [PA_W-1:0] pa);
    return {1'b1, pa[PA_W-2:0]};
  endfunction
  function automatic logic [PA_W-1:0] ctx_page(input int c);
    return PA_W'(c) << PAGE_BITS | PA_W'($urandom_range(0, 255) * 8);
  endfunction
  function automatic logic [PA_W-1:0] key_page(input int c);
    return (PA_W'(1) << (PA_W - 2)) | (PA_W'(c) << PAGE_BITS);
  endfunction

  task automatic pass_addr(input int c, input logic [61:0] k, input logic [PA_W-1:0] pa);
    logic [DATA_W-1:0] r;
    bus(1'b1, shadow(pa), {k, CTX_W'(c)}, r);
  endtask
  task automatic set_size(input int c, input int sz);
    logic [DATA_W-1:0] r;
    bus(1'b1, ctx_page(c), DATA_W'(sz), r);
  endtask
  task automatic status(input int c, output logic [DATA_W-1:0] r);
    bus(1'b0, ctx_page(c), '0, r);
  endtask

  // data mover: take one request, then report its bytes in chunks of 64
  logic [PA_W-1:0] got_src, got_dst;
  logic [SIZE_W-1:0] got_size;
  int got_ctx = -1, n_req = 0;
  bit mover_auto = 1'b0;
  task automatic mover_take();
    @(negedge clk) mv_req_ready = 1'b1;
    while (!mv_req_valid) @(negedge clk);
    got_src = mv_req_src; got_dst = mv_req_dst; got_size = mv_req_size;
    got_ctx = int'(mv_req_ctx); n_req++;
    @(negedge clk) mv_req_ready = 1'b0;
  endtask
  task automatic mover_chunk(input int c, input int bytes);
    @(negedge clk) begin
      mv_done_valid = 1'b1; mv_done_ctx = CTX_W'(c); mv_done_bytes = SIZE_W'(bytes);
    end
    @(negedge clk) mv_done_valid = 1'b0;
  endtask

  initial begin
    logic [DATA_W-1:0] r;
    logic [PA_W-1:0] sa, da, sb, db;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCTX; c++) begin
      keys[c] = {$urandom, $urandom};
      bus(1'b1, key_page(c), DATA_W'(keys[c]), r);
    end
    bus(1'b0, key_page(1), '0, r);
    check(r == '0, "keys cannot be read back");

    // process on context 1: 200 bytes from sa to da
    sa = 64'h0000_0012_3456_7000; da = 64'h0000_0abc_def0_1000;
    pass_addr(1, keys[1], sa);
    pass_addr(1, keys[1], da);
    set_size(1, 200);
    status(1, r);
    check(r == 200, $sformatf("initiating load returns size, got %0d", r));
    mover_take();
    check(got_ctx == 1 && got_src == sa && got_dst == da && got_size == 200,
          "data mover request carries context 1 arguments");
    status(1, r);
    check(r == 200, "nothing moved yet");
    mover_chunk(1, 64);
    status(1, r);
    check(r == 136, $sformatf("136 bytes left, got %0d", r));
    mover_chunk(1, 64); mover_chunk(1, 64); mover_chunk(1, 64);
    status(1, r);
    check(r == 0, "0 after completion");

    // wrong key: ignored, so the context lacks its source and fails
    pass_addr(2, keys[2] ^ 62'h1, 64'h1000);
    pass_addr(2, keys[2], 64'h2000);
    set_size(2, 8);
    status(2, r);
    check(r == '1, "missing argument reports -1");
    check(!mv_req_valid, "no transfer started with a wrong key");
    // the one accepted store was the source; completing the pair starts it
    pass_addr(2, keys[2], 64'h3000);
    status(2, r);
    check(r == 8, "started once both arguments are present");
    mover_take();
    check(got_ctx == 2 && got_src == 64'h2000 && got_dst == 64'h3000, "wrong-key address never used");
    mover_chunk(2, 8);

    // two processes interleaved access by access (context 0 and 3)
    sa = 64'h0aaa_0000; da = 64'h0bbb_0000; sb = 64'h0ccc_0000; db = 64'h0ddd_0000;
    pass_addr(0, keys[0], sa);
    pass_addr(3, keys[3], sb);
    pass_addr(0, keys[0], da);
    pass_addr(3, keys[3], db);
    set_size(3, 32);
    set_size(0, 16);
    status(3, r);
    check(r == 32, "context 3 started");
    status(0, r);
    check(r == 16, "context 0 started");
    mover_take();
    check(got_ctx == 0 && got_src == sa && got_dst == da && got_size == 16, "context 0 arguments kept apart");
    mover_take();
    check(got_ctx == 3 && got_src == sb && got_dst == db && got_size == 32, "context 3 arguments kept apart");
    // a malicious process using context 3's number without its key
    pass_addr(3, keys[0], 64'hdead_0000);
    mover_chunk(3, 32);
    mover_chunk(0, 16);
    status(3, r);
    check(r == 0, "context 3 done");
    status(0, r);
    check(r == 0, "context 0 done");
    check(n_req == 4, "four transfers in all");

    // random rounds: all four processes interleaved, with an attacker
    // issuing shadow stores under wrong keys in between
    for (int round = 0; round < 100; round++) begin
      logic [PA_W-1:0] rs [NCTX], rd [NCTX];
      int rsz [NCTX], stp [NCTX];
      bit seen [NCTX];
      int left;
      for (int c = 0; c < NCTX; c++) begin
        rs[c] = {$urandom, $urandom} >> 2;
        rd[c] = {$urandom, $urandom} >> 2;
        rsz[c] = $urandom_range(1, 100000);
        stp[c] = 0;
        seen[c] = 1'b0;
      end
      left = 4 * NCTX;
      while (left > 0) begin
        int c;
        if ($urandom_range(0, 3) == 0)
          pass_addr($urandom_range(0, NCTX - 1), {$urandom, $urandom} | 62'h1,
                    {$urandom, $urandom});
        do c = $urandom_range(0, NCTX - 1); while (stp[c] == 4);
        case (stp[c])
          0: pass_addr(c, keys[c], rs[c]);
          1: pass_addr(c, keys[c], rd[c]);
          2: set_size(c, rsz[c]);
          default: begin
            status(c, r);
            check(r == DATA_W'(rsz[c]), "random round: start returns size");
          end
        endcase
        stp[c]++;
        left--;
      end
      for (int k = 0; k < NCTX; k++) begin
        mover_take();
        check(!seen[got_ctx] && got_src == rs[got_ctx] && got_dst == rd[got_ctx] &&
              got_size == SIZE_W'(rsz[got_ctx]), "random round: request arguments");
        seen[got_ctx] = 1'b1;
      end
      for (int c = 0; c < NCTX; c++) begin
        mover_chunk(c, rsz[c] / 2);
        status(c, r);
        check(r == DATA_W'(rsz[c] - rsz[c] / 2), "random round: bytes left");
        mover_chunk(c, rsz[c]);
        status(c, r);
        check(r == 0, "random round: done");
      end
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
