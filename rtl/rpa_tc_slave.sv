// rpa_tc_slave: TurboChannel slave for user-level DMA by repeated passing of
// arguments.
//
// The slave decodes a window of shadow addresses on the TurboChannel. A user
// process passes the physical destination and source of a DMA by touching
// their shadow addresses in the order STORE(dst) LOAD(src) STORE(dst)
// LOAD(src) LOAD(dst); the slave answers the loads with OK1, OK2 and OK3 and
// starts the DMA after the fifth access. Because the arguments are passed
// twice and three times, a process interrupted in mid-sequence (or another
// process interleaving its accesses) breaks the sequence instead of starting a
// DMA with mixed arguments, so no kernel change is needed.
//
// Structure (as in the published datapath figure): tc_txn_timing makes FSEL,
// FIRSTSEL, RDY_ and STAT_SEL from SEL_; rpa_datapath keeps the address,
// SOURCE and DEST and compares; rpa_fsm sequences. Only 12 address lines,
// AD[22:11], are used; on a load the 12-bit STATUS is driven back on those
// same lines. The bidirectional bus is split into ad_in, ad_out and ad_oe (an
// own choice; the board drives the lines through a tri-state buffer enabled
// by STAT_SEL).
//
// Timing, counting clock edges from the one that first samples SEL_ low
// (edge 0, which also samples the address): FSEL high after edge 0, address
// register loaded at edge 1, FIRSTSEL high after edge 2, FSM step at edge 3,
// after which RDY_ is low for one cycle and, for a load, STATUS is on the
// bus. The host is expected to hold SEL_, RW_ and the address until RDY_
// and to raise SEL_ after it. dma_start pulses with dma_src/dma_dst valid; the
// data mover that would perform the transfer is outside this design.
module rpa_tc_slave
  import uldma_pkg::*;
#(
  parameter int unsigned BUS_W    = 32,  // TurboChannel address/data lines
  parameter int unsigned AW       = 12,  // address lines kept by the slave
  parameter int unsigned ADDR_LSB = 11   // lowest bus line kept (AD[22:11])
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel_n,
  input  logic             rw_n,
  input  logic [BUS_W-1:0] ad_in,
  output logic [BUS_W-1:0] ad_out,
  output logic             ad_oe,      // slave drives AD[ADDR_LSB +: AW]
  output logic             rdy_n,
  output logic             dma_start,
  output logic [AW-1:0]    dma_src,
  output logic [AW-1:0]    dma_dst
);

  logic             fsel, firstsel, stat_sel;
  logic             src_ld, dst_ld, ds_sel, equal;
  logic [AW-1:0]    cur_addr;
  logic [TC_AW-1:0] status;
  rpa_state_t       state;

  tc_txn_timing u_timing (
    .clk, .rst_n, .sel_n, .rw_n,
    .fsel, .firstsel, .rdy_n, .stat_sel
  );

  rpa_datapath #(.AW(AW)) u_datapath (
    .clk, .rst_n,
    .addr_in (ad_in[ADDR_LSB +: AW]),
    .fsel, .src_ld, .dst_ld, .ds_sel, .equal, .cur_addr,
    .source  (dma_src),
    .dest    (dma_dst)
  );

  rpa_fsm u_fsm (
    .clk, .rst_n, .firstsel, .rw_n, .equal,
    .ds_sel, .src_ld, .dst_ld, .status, .dma_start, .state
  );

  always_comb begin
    ad_out = '0;
    ad_out[ADDR_LSB +: AW] = AW'(status);
    ad_oe  = stat_sel;
  end

endmodule
