// uldma_top: three user-level DMA initiation engines, side by side.
//
// Each engine lets an unprivileged process start a DMA by passing physical
// addresses through accesses to shadow addresses, without any change to the
// operating system's context-switch code. The three differ in how they keep
// the arguments of different processes apart:
//   tc_*   rpa_tc_slave    repeated passing of arguments; the prototype
//                          TurboChannel slave (12-bit SOURCE/DEST)
//   key_*  key_dma_engine  per-process register contexts guarded by keys
//   xs_*   ext_shadow_dma  context id carried in the shadow address
// They share only the clock and reset; each brings out its own bus and, for
// the two context engines, its request to a data mover. The data movers
// themselves (the part that moves the bytes) are outside this design. See
// each engine for its interface and timing.
module uldma_top (
  input  logic        clk,
  input  logic        rst_n,
  // repeated passing of arguments: TurboChannel slave
  input  logic        tc_sel_n,
  input  logic        tc_rw_n,
  input  logic [31:0] tc_ad_in,
  output logic [31:0] tc_ad_out,
  output logic        tc_ad_oe,
  output logic        tc_rdy_n,
  output logic        tc_dma_start,
  output logic [11:0] tc_dma_src,
  output logic [11:0] tc_dma_dst,
  // key-based engine
  input  logic        key_req_valid,
  input  logic        key_req_write,
  input  logic [63:0] key_req_addr,
  input  logic [63:0] key_req_wdata,
  output logic        key_rsp_valid,
  output logic [63:0] key_rsp_rdata,
  output logic        key_mv_req_valid,
  input  logic        key_mv_req_ready,
  output logic [1:0]  key_mv_req_ctx,
  output logic [63:0] key_mv_req_src,
  output logic [63:0] key_mv_req_dst,
  output logic [31:0] key_mv_req_size,
  input  logic        key_mv_done_valid,
  input  logic [1:0]  key_mv_done_ctx,
  input  logic [31:0] key_mv_done_bytes,
  // extended shadow addressing engine
  input  logic        xs_req_valid,
  input  logic        xs_req_write,
  input  logic [63:0] xs_req_addr,
  input  logic [63:0] xs_req_wdata,
  output logic        xs_rsp_valid,
  output logic [63:0] xs_rsp_rdata,
  output logic        xs_mv_req_valid,
  input  logic        xs_mv_req_ready,
  output logic [0:0]  xs_mv_req_ctx,
  output logic [61:0] xs_mv_req_src,
  output logic [61:0] xs_mv_req_dst,
  output logic [31:0] xs_mv_req_size
);

  rpa_tc_slave u_rpa (
    .clk, .rst_n,
    .sel_n     (tc_sel_n),
    .rw_n      (tc_rw_n),
    .ad_in     (tc_ad_in),
    .ad_out    (tc_ad_out),
    .ad_oe     (tc_ad_oe),
    .rdy_n     (tc_rdy_n),
    .dma_start (tc_dma_start),
    .dma_src   (tc_dma_src),
    .dma_dst   (tc_dma_dst)
  );

  key_dma_engine u_key (
    .clk, .rst_n,
    .req_valid     (key_req_valid),
    .req_write     (key_req_write),
    .req_addr      (key_req_addr),
    .req_wdata     (key_req_wdata),
    .rsp_valid     (key_rsp_valid),
    .rsp_rdata     (key_rsp_rdata),
    .mv_req_valid  (key_mv_req_valid),
    .mv_req_ready  (key_mv_req_ready),
    .mv_req_ctx    (key_mv_req_ctx),
    .mv_req_src    (key_mv_req_src),
    .mv_req_dst    (key_mv_req_dst),
    .mv_req_size   (key_mv_req_size),
    .mv_done_valid (key_mv_done_valid),
    .mv_done_ctx   (key_mv_done_ctx),
    .mv_done_bytes (key_mv_done_bytes)
  );

  ext_shadow_dma u_xs (
    .clk, .rst_n,
    .req_valid    (xs_req_valid),
    .req_write    (xs_req_write),
    .req_addr     (xs_req_addr),
    .req_wdata    (xs_req_wdata),
    .rsp_valid    (xs_rsp_valid),
    .rsp_rdata    (xs_rsp_rdata),
    .mv_req_valid (xs_mv_req_valid),
    .mv_req_ready (xs_mv_req_ready),
    .mv_req_ctx   (xs_mv_req_ctx),
    .mv_req_src   (xs_mv_req_src),
    .mv_req_dst   (xs_mv_req_dst),
    .mv_req_size  (xs_mv_req_size)
  );

endmodule
