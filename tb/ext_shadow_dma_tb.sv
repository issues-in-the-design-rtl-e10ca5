// ext_shadow_dma_tb: user-level DMA initiation by extended shadow addressing.
//
// Shadow addresses carry the context id in the bit below the shadow bit. The
// bench starts DMAs with the two-access sequence (STORE size to
// shadow(dest), LOAD status from shadow(src)) and checks: OK and a data mover
// request with the right arguments; FAIL for a load with no destination
// passed before it and for a non-shadow load; and that two processes
// interleaved at every access, in both orders, each get their own transfer.
// Random rounds interleave the two contexts and compare every request with a
// record kept per context. A second instance with CONTEXTS = 0 (one register
// set, STORE/LOAD pairs checked for equal context ids) is checked to start a
// DMA for a matching pair and to refuse a pair whose context ids differ.
module ext_shadow_dma_tb;
  import uldma_pkg::*;
  localparam int PA_W = 64, DATA_W = 64, CID_W = 1, SIZE_W = 32, ADR_W = 62;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              req_valid = 1'b0, req_write = 1'b0;
  logic [PA_W-1:0]   req_addr = '0;
  logic [DATA_W-1:0] req_wdata = '0;
  logic              rsp_valid;
  logic [DATA_W-1:0] rsp_rdata;
  logic              mv_req_valid, mv_req_ready = 1'b0;
  logic [CID_W-1:0]  mv_req_ctx;
  logic [ADR_W-1:0]  mv_req_src, mv_req_dst;
  logic [SIZE_W-1:0] mv_req_size;
  int checks = 0, failures = 0;

  ext_shadow_dma dut (.*);

  // single register set variant
  logic              p_req_valid = 1'b0, p_req_write = 1'b0;
  logic [PA_W-1:0]   p_req_addr = '0;
  logic [DATA_W-1:0] p_req_wdata = '0;
  logic              p_rsp_valid;
  logic [DATA_W-1:0] p_rsp_rdata;
  logic              p_mv_req_valid;
  logic [CID_W-1:0]  p_mv_req_ctx;
  logic [ADR_W-1:0]  p_mv_req_src, p_mv_req_dst;
  logic [SIZE_W-1:0] p_mv_req_size;
  int p_taken = 0;

  ext_shadow_dma #(.CONTEXTS(1'b0)) dut_pair (
    .clk, .rst_n,
    .req_valid (p_req_valid), .req_write (p_req_write),
    .req_addr (p_req_addr), .req_wdata (p_req_wdata),
    .rsp_valid (p_rsp_valid), .rsp_rdata (p_rsp_rdata),
    .mv_req_valid (p_mv_req_valid), .mv_req_ready (1'b1),
    .mv_req_ctx (p_mv_req_ctx), .mv_req_src (p_mv_req_src),
    .mv_req_dst (p_mv_req_dst), .mv_req_size (p_mv_req_size)
  );
  always @(posedge clk) if (rst_n && p_mv_req_valid) p_taken++;

  task automatic pbus(input bit wr, input logic [PA_W-1:0] a,
                      input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] r);
    @(negedge clk) begin
      p_req_valid = 1'b1; p_req_write = wr; p_req_addr = a; p_req_wdata = d;
    end
    @(negedge clk) p_req_valid = 1'b0;
    r = p_rsp_rdata;
  endtask

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
      req_valid = 1'b0; req_addr = {$urandom, $urandom};
    end
    check(rsp_valid == !wr, "response only for a load");
    r = rsp_rdata;
  endtask

  function automatic logic [PA_W-1:0] shadow(input int c, input logic [ADR_W-1:0] pa);
    return {1'b1, CID_W'(c), pa};
  endfunction

  task automatic put_dst(input int c, input logic [ADR_W-1:0] d, input int sz);
    logic [DATA_W-1:0] r;
    bus(1'b1, shadow(c, d), DATA_W'(sz), r);
  endtask
  task automatic get_src(input int c, input logic [ADR_W-1:0] s, input logic [DATA_W-1:0] exp);
    logic [DATA_W-1:0] r;
    bus(1'b0, shadow(c, s), '0, r);
    check(r == exp, $sformatf("status %0d expected %0d", r, exp));
  endtask
  task automatic take(input int c, input logic [ADR_W-1:0] s, input logic [ADR_W-1:0] d,
                      input int sz);
    @(negedge clk);
    check(mv_req_valid, "request pending");
    check(int'(mv_req_ctx) == c && mv_req_src == s && mv_req_dst == d &&
          mv_req_size == SIZE_W'(sz), $sformatf("request of context %0d", c));
    mv_req_ready = 1'b1;
    @(negedge clk) mv_req_ready = 1'b0;
  endtask

  initial begin
    logic [DATA_W-1:0] r;
    logic [ADR_W-1:0] s0, d0, s1, d1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // plain initiation
    put_dst(0, 62'h100, 64);
    get_src(0, 62'h200, XS_OK);
    take(0, 62'h200, 62'h100, 64);
    // load without a destination
    get_src(1, 62'h300, XS_FAIL);
    check(!mv_req_valid, "no request after FAIL");
    // non-shadow load
    put_dst(1, 62'h400, 8);
    bus(1'b0, 64'h0000_0000_0000_0400, '0, r);
    check(r == XS_FAIL, "non-shadow load fails");
    get_src(1, 62'h500, XS_OK);
    take(1, 62'h500, 62'h400, 8);
    // single register set: matching pair starts, mixed pair fails
    pbus(1'b1, shadow(1, 62'h40), 64'd16, r);
    pbus(1'b0, shadow(1, 62'h50), '0, r);
    check(r == XS_OK, "pair with equal context ids starts");
    check(p_mv_req_valid && p_mv_req_ctx == 1'b1 && p_mv_req_src == 62'h50 &&
          p_mv_req_dst == 62'h40 && p_mv_req_size == 16, "pair request arguments");
    @(negedge clk);
    pbus(1'b1, shadow(0, 62'h60), 64'd16, r);
    pbus(1'b1, shadow(1, 62'h70), 64'd16, r);   // another process interleaves
    pbus(1'b0, shadow(0, 62'h80), '0, r);
    check(r == XS_FAIL, "pair with different context ids fails");
    pbus(1'b0, shadow(1, 62'h90), '0, r);
    check(r == XS_FAIL, "a load ends the pair");
    check(p_taken == 1, "one DMA from the single register set");

    // random interleavings of two processes
    for (int i = 0; i < 200; i++) begin
      int sz0, sz1;
      s0 = {$urandom, $urandom}; d0 = {$urandom, $urandom}; sz0 = $urandom_range(1, 4096);
      s1 = {$urandom, $urandom}; d1 = {$urandom, $urandom}; sz1 = $urandom_range(1, 4096);
      case ($urandom_range(0, 2))
        0: begin put_dst(0, d0, sz0); put_dst(1, d1, sz1); get_src(0, s0, XS_OK); get_src(1, s1, XS_OK); end
        1: begin put_dst(1, d1, sz1); put_dst(0, d0, sz0); get_src(1, s1, XS_OK); get_src(0, s0, XS_OK); end
        default: begin put_dst(0, d0, sz0); put_dst(1, d1, sz1); get_src(1, s1, XS_OK); get_src(0, s0, XS_OK); end
      endcase
      take(0, s0, d0, sz0);
      take(1, s1, d1, sz1);
    end
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
