// key_dma_engine: user-level DMA initiation with register contexts and keys.
//
// The engine holds NCTX register contexts (source, destination, size). The
// operating system gives each DMA-capable process one context, mapped in a
// page of its own, and a secret key for it. A process starts a DMA with:
//   STORE key#ctx TO shadow(vsource)        -> SOURCE of context ctx
//   STORE key#ctx TO shadow(vdestination)   -> DEST of context ctx
//   STORE size    TO its context page       -> SIZE
//   LOAD  status  FROM its context page     -> starts the DMA, returns status
// A shadow store is accepted only if the key in its data matches the key the
// operating system stored for that context, so a process cannot fill another
// process's context; since each process has its own context, a context
// switch in mid-sequence cannot mix arguments. A load from a context returns
// the number of bytes still to move, 0 when the transfer is complete and -1
// (all ones) on failure. This much follows the published method.
//
// Own choices where the method is not specific: the first accepted shadow
// store of a context is taken as the source and the next as the
// destination, alternately; a shadow store with a wrong key is ignored; a
// load starts a DMA when source and destination are both new and no transfer
// of that context is in flight, and returns -1 when arguments are missing.
//
// Address map seen by the engine (bus address addr, PA_W bits):
//   addr[PA_W-1] = 1      shadow address; the physical address passed is addr
//                         with that bit cleared; data = {key, ctx id}
//   addr[PA_W-2] = 1      key pages, mapped only by the operating system: a
//                         store writes the key of context addr[PAGE_BITS +:
//                         CTX_W]; a load returns 0 (keys cannot be read back)
//   otherwise             context pages, context addr[PAGE_BITS +: CTX_W]
// Bus: one access per cycle on req_valid; a load is answered in the next
// cycle with rsp_valid and rsp_rdata. Transfers are handed to an external
// data mover with a valid/ready request; the mover reports moved bytes on
// mv_done_*. Contexts are served by fixed priority, lowest index first.
module key_dma_engine
  import uldma_pkg::*;
#(
  parameter int unsigned PA_W      = 64,  // physical (and shadow) address bits
  parameter int unsigned DATA_W    = 64,  // bus data bits
  parameter int unsigned NCTX      = 4,   // register contexts
  parameter int unsigned SIZE_W    = 32,  // transfer size bits
  parameter int unsigned PAGE_BITS = 13,  // page offset bits of a context page
  localparam int unsigned CTX_W    = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned KEY_W    = DATA_W - CTX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor-side bus
  input  logic              req_valid,
  input  logic              req_write,
  input  logic [PA_W-1:0]   req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata,
  // request to the data mover
  output logic              mv_req_valid,
  input  logic              mv_req_ready,
  output logic [CTX_W-1:0]  mv_req_ctx,
  output logic [PA_W-1:0]   mv_req_src,
  output logic [PA_W-1:0]   mv_req_dst,
  output logic [SIZE_W-1:0] mv_req_size,
  // progress report from the data mover
  input  logic              mv_done_valid,
  input  logic [CTX_W-1:0]  mv_done_ctx,
  input  logic [SIZE_W-1:0] mv_done_bytes
);

  logic [PA_W-1:0]   src    [NCTX];
  logic [PA_W-1:0]   dst    [NCTX];
  logic [SIZE_W-1:0] size   [NCTX];
  logic [SIZE_W-1:0] remain [NCTX];
  logic [KEY_W-1:0]  key    [NCTX];
  logic              src_v  [NCTX];
  logic              dst_v  [NCTX];
  logic              nxt_dst[NCTX];  // next accepted shadow store is DEST
  kctx_state_t       st     [NCTX];

  // decode of the current access
  logic              is_shadow, is_key;
  logic [CTX_W-1:0]  page_ctx, data_ctx;
  logic [KEY_W-1:0]  data_key;
  logic [PA_W-1:0]   paddr;

  always_comb begin
    is_shadow = req_addr[PA_W-1];
    is_key    = !req_addr[PA_W-1] && req_addr[PA_W-2];
    page_ctx  = req_addr[PAGE_BITS +: CTX_W];
    data_ctx  = req_wdata[CTX_W-1:0];
    data_key  = req_wdata[DATA_W-1:CTX_W];
    paddr     = {1'b0, req_addr[PA_W-2:0]};
  end

  // fixed-priority choice of the context handed to the data mover
  logic             pend_any;
  logic [CTX_W-1:0] pend_ctx;
  always_comb begin
    pend_any = 1'b0;
    pend_ctx = '0;
    for (int i = NCTX - 1; i >= 0; i--) begin
      if (st[i] == KC_PENDING) begin
        pend_any = 1'b1;
        pend_ctx = CTX_W'(i);
      end
    end
    mv_req_valid = pend_any;
    mv_req_ctx   = pend_ctx;
    mv_req_src   = src[pend_ctx];
    mv_req_dst   = dst[pend_ctx];
    mv_req_size  = remain[pend_ctx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      for (int i = 0; i < NCTX; i++) begin
        src[i]     <= '0;
        dst[i]     <= '0;
        size[i]    <= '0;
        remain[i]  <= '0;
        key[i]     <= '0;
        src_v[i]   <= 1'b0;
        dst_v[i]   <= 1'b0;
        nxt_dst[i] <= 1'b0;
        st[i]      <= KC_IDLE;
      end
    end else begin
      rsp_valid <= 1'b0;

      // data mover side: hand-off, then progress
      if (pend_any && mv_req_ready) st[pend_ctx] <= KC_BUSY;
      if (mv_done_valid && st[mv_done_ctx] == KC_BUSY) begin
        if (mv_done_bytes >= remain[mv_done_ctx]) begin
          remain[mv_done_ctx] <= '0;
          st[mv_done_ctx]     <= KC_DONE;
        end else begin
          remain[mv_done_ctx] <= remain[mv_done_ctx] - mv_done_bytes;
        end
      end

      // processor side
      if (req_valid) begin
        if (req_write) begin
          if (is_shadow) begin
            if (data_key == key[data_ctx]) begin
              if (nxt_dst[data_ctx]) begin
                dst[data_ctx]   <= paddr;
                dst_v[data_ctx] <= 1'b1;
              end else begin
                src[data_ctx]   <= paddr;
                src_v[data_ctx] <= 1'b1;
              end
              nxt_dst[data_ctx] <= !nxt_dst[data_ctx];
              if (st[data_ctx] == KC_DONE) st[data_ctx] <= KC_IDLE;
            end
          end else if (is_key) begin
            key[page_ctx] <= req_wdata[KEY_W-1:0];
          end else begin
            size[page_ctx] <= req_wdata[SIZE_W-1:0];
            if (st[page_ctx] == KC_DONE) st[page_ctx] <= KC_IDLE;
          end
        end else begin
          rsp_valid <= 1'b1;
          if (is_shadow || is_key) begin
            rsp_rdata <= is_key ? '0 : '1;
          end else if (st[page_ctx] == KC_PENDING || st[page_ctx] == KC_BUSY) begin
            rsp_rdata <= DATA_W'(remain[page_ctx]);
          end else if (src_v[page_ctx] && dst_v[page_ctx] && size[page_ctx] != '0) begin
            st[page_ctx]      <= KC_PENDING;
            remain[page_ctx]  <= size[page_ctx];
            src_v[page_ctx]   <= 1'b0;
            dst_v[page_ctx]   <= 1'b0;
            nxt_dst[page_ctx] <= 1'b0;
            rsp_rdata         <= DATA_W'(size[page_ctx]);
          end else if (st[page_ctx] == KC_DONE) begin
            rsp_rdata <= '0;
          end else begin
            rsp_rdata <= '1;
          end
        end
      end
    end
  end

  // A load is answered in the next cycle.
  a_load_answer : assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_write |=> rsp_valid);

endmodule
