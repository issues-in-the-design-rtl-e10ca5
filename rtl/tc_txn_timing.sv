// tc_txn_timing: transaction timing of the TurboChannel slave.
//
// A TurboChannel transaction starts when the host drives SEL_ low; SEL_ stays
// low until the slave has answered with a one-cycle low pulse on RDY_. This
// block turns SEL_ into the strobes the rest of the slave runs on:
//
//   fsel      high for one cycle, the cycle after SEL_ is first sampled low.
//             The address register loads the bus address during it.
//   firstsel  fsel two cycles later (two registers): the FSM acts on the
//             transaction. The address register is stable from the cycle
//             after fsel, so the comparison result is settled by then.
//   rdy_n     low for one cycle, the cycle after firstsel.
//   stat_sel  high in the same cycle as rdy_n when the access is a load
//             (rw_n = 1): the slave drives STATUS onto the bus.
//
// Counting the clock edge that first samples SEL_ low as edge 0, FSEL is
// high after edge 0, FIRSTSEL after edge 2 and RDY_ after edge 3. The
// chain of registers (a SEL_ delay register and an edge detector giving FSEL,
// two registers from FSEL to FIRSTSEL, then the RDY_/STAT_SEL registers)
// follows the published datapath figure. The synchronous active-low reset
// is this design's own addition: the published circuit shows none.
module tc_txn_timing (
  input  logic clk,
  input  logic rst_n,
  input  logic sel_n,     // TurboChannel SEL_, low during a transaction
  input  logic rw_n,      // TurboChannel RW_: 1 = load, 0 = store
  output logic fsel,      // first cycle of a transaction (one cycle)
  output logic firstsel,  // FSEL delayed by two cycles, to the FSM
  output logic rdy_n,     // TurboChannel RDY_, low for one cycle
  output logic stat_sel   // drive STATUS on the bus (load reply)
);

  logic sel_q;   // SEL_ of the previous cycle
  logic fsel_q;  // FSEL of the previous cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_q    <= 1'b1;
      fsel     <= 1'b0;
      fsel_q   <= 1'b0;
      firstsel <= 1'b0;
      rdy_n    <= 1'b1;
      stat_sel <= 1'b0;
    end else begin
      sel_q    <= sel_n;
      fsel     <= sel_q & ~sel_n;       // falling edge of SEL_
      fsel_q   <= fsel;
      firstsel <= fsel_q;
      rdy_n    <= ~firstsel;
      stat_sel <= firstsel & rw_n;
    end
  end

  // FSEL marks a single cycle per transaction.
  a_fsel_single : assert property (@(posedge clk) disable iff (!rst_n)
    fsel |=> !fsel);
  // RDY_ is a one-cycle pulse.
  a_rdy_pulse : assert property (@(posedge clk) disable iff (!rst_n)
    !rdy_n |=> rdy_n);

endmodule
