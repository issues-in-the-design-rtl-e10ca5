// rpa_datapath: address datapath of the repeated-passing-of-arguments slave.
//
// The bus address is registered every cycle; in the FSEL cycle that sample
// (the address present when SEL_ was first seen low) is loaded into the
// address register. The FSM's SRC_LD and DST_LD copy the address register
// into SOURCE or DEST. The address register is compared with SOURCE
// (ds_sel = 1) or DEST (ds_sel = 0); the result is EQUAL.
//
// Register set, multiplexer polarity and comparator follow the published
// datapath figure. EQUAL is settled from the cycle after FSEL on; the FSM
// samples it two cycles after FSEL. The registers' synchronous reset to zero
// is this design's own choice. AW is the number of address lines the slave
// keeps (12).
module rpa_datapath #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] addr_in,  // address lines from the bus
  input  logic          fsel,     // first cycle of a transaction
  input  logic          src_ld,   // load SOURCE from the address register
  input  logic          dst_ld,   // load DEST from the address register
  input  logic          ds_sel,   // compare with SOURCE (1) or DEST (0)
  output logic          equal,    // address register equals the selected one
  output logic [AW-1:0] cur_addr, // address of the current transaction
  output logic [AW-1:0] source,   // SOURCE register
  output logic [AW-1:0] dest      // DEST register
);

  logic [AW-1:0] addr_q;  // input register on the address lines

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_q   <= '0;
      cur_addr <= '0;
      source   <= '0;
      dest     <= '0;
    end else begin
      addr_q <= addr_in;
      if (fsel)   cur_addr <= addr_q;
      if (src_ld) source   <= cur_addr;
      if (dst_ld) dest     <= cur_addr;
    end
  end

  always_comb equal = (cur_addr == (ds_sel ? source : dest));

endmodule
