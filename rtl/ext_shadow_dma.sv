// ext_shadow_dma: user-level DMA initiation by extended shadow addressing.
//
// The operating system builds each process's shadow mappings so that some
// high bits of every shadow physical address carry the process's context id.
// A shadow address is laid out as
//     [PA_W-1]                 shadow bit
//     [PA_W-2 -: CID_W]        context id
//     [PA_W-2-CID_W : 0]       physical address passed to the engine
// (1 + 1 + 62 bits at the defaults). A process starts a DMA with two accesses:
//   STORE size   TO   shadow(vdestination)  -> destination and size of ctx
//   LOAD  status FROM shadow(vsource)       -> source of ctx, starts the DMA
// The engine keeps one register context per context id and files every
// argument by the id in the address, so arguments of different processes
// never mix, whatever the interleaving. This follows the published method.
//
// With CONTEXTS = 0 the engine has a single register set instead, as also
// described for this method: it takes STORE/LOAD pairs and starts the DMA
// only if the load carries the same context id as the store before it;
// otherwise the load returns FAIL. Any load ends the pair.
//
// Own choices: the load returns OK (1) and starts the DMA only if its
// context holds a destination passed since the last start and its previous
// DMA has been handed to the data mover; otherwise it returns FAIL (0). A
// store to a context whose DMA still waits for the data mover is ignored.
// Accesses without the shadow bit are ignored (a load returns FAIL).
// Bus: one access per cycle on req_valid; a load is answered in the next
// cycle. Started transfers go to an external data mover through a
// valid/ready request, lowest context first.
module ext_shadow_dma
  import uldma_pkg::*;
#(
  parameter int unsigned PA_W   = 64,  // shadow physical address bits
  parameter int unsigned DATA_W = 64,  // bus data bits
  parameter int unsigned CID_W  = 1,   // context id bits in the address
  parameter int unsigned SIZE_W = 32,  // transfer size bits
  parameter bit          CONTEXTS = 1'b1,  // one register set per context id
  localparam int unsigned NCTX  = CONTEXTS ? (1 << CID_W) : 1,
  localparam int unsigned IDX_W = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned ADR_W = PA_W - 1 - CID_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic              req_write,
  input  logic [PA_W-1:0]   req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata,
  output logic              mv_req_valid,
  input  logic              mv_req_ready,
  output logic [CID_W-1:0]  mv_req_ctx,
  output logic [ADR_W-1:0]  mv_req_src,
  output logic [ADR_W-1:0]  mv_req_dst,
  output logic [SIZE_W-1:0] mv_req_size
);

  logic [ADR_W-1:0]  src   [NCTX];
  logic [ADR_W-1:0]  dst   [NCTX];
  logic [SIZE_W-1:0] size  [NCTX];
  logic [CID_W-1:0]  cid_q [NCTX];  // context id of the stored destination
  logic              dst_v [NCTX];
  logic              pend  [NCTX];

  logic              is_shadow;
  logic [CID_W-1:0]  cid;
  logic [IDX_W-1:0]  idx;    // register set addressed
  logic [ADR_W-1:0]  paddr;
  logic              can_start;

  always_comb begin
    is_shadow = req_addr[PA_W-1];
    cid       = req_addr[PA_W-2 -: CID_W];
    idx       = CONTEXTS ? IDX_W'(cid) : '0;
    paddr     = req_addr[ADR_W-1:0];
    can_start = is_shadow && dst_v[idx] && !pend[idx] && (cid_q[idx] == cid);
  end

  logic             pend_any;
  logic [IDX_W-1:0] pend_ctx;
  always_comb begin
    pend_any = 1'b0;
    pend_ctx = '0;
    for (int i = NCTX - 1; i >= 0; i--) begin
      if (pend[i]) begin
        pend_any = 1'b1;
        pend_ctx = IDX_W'(i);
      end
    end
    mv_req_valid = pend_any;
    mv_req_ctx   = cid_q[pend_ctx];
    mv_req_src   = src[pend_ctx];
    mv_req_dst   = dst[pend_ctx];
    mv_req_size  = size[pend_ctx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      for (int i = 0; i < NCTX; i++) begin
        src[i]   <= '0;
        cid_q[i] <= '0;
        dst[i]   <= '0;
        size[i]  <= '0;
        dst_v[i] <= 1'b0;
        pend[i]  <= 1'b0;
      end
    end else begin
      rsp_valid <= 1'b0;
      if (pend_any && mv_req_ready) pend[pend_ctx] <= 1'b0;
      if (req_valid) begin
        if (req_write) begin
          if (is_shadow && !pend[idx]) begin
            dst[idx]   <= paddr;
            size[idx]  <= req_wdata[SIZE_W-1:0];
            cid_q[idx] <= cid;
            dst_v[idx] <= 1'b1;
          end
        end else begin
          rsp_valid <= 1'b1;
          rsp_rdata <= XS_FAIL[DATA_W-1:0];
          if (!CONTEXTS) dst_v[0] <= 1'b0;
          if (can_start) begin
            src[idx]   <= paddr;
            dst_v[idx] <= 1'b0;
            pend[idx]  <= 1'b1;
            rsp_rdata  <= XS_OK[DATA_W-1:0];
          end
        end
      end
    end
  end

  a_load_answer : assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_write |=> rsp_valid);

endmodule
