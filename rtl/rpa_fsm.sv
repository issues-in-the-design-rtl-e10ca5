// rpa_fsm: controller of the repeated-passing-of-arguments DMA initiation.
//
// A user process starts a DMA with five accesses to shadow addresses:
//   1: STORE to shadow(dest)   2: LOAD from shadow(src)  -> OK1
//   3: STORE to shadow(dest)   4: LOAD from shadow(src)  -> OK2
//   5: LOAD from shadow(dest)                            -> OK3, DMA starts
// The FSM steps S0 -> S1 -> S2 -> S3 -> S4 -> S0 through this sequence. Access
// 1 loads DEST and access 2 loads SOURCE; accesses 3, 4 and 5 must carry the
// same address as DEST, SOURCE and DEST again (input equal from the
// datapath). Any other access sends the FSM back to S0, and a load that breaks
// the sequence is answered with FAIL. In S1 a store also sends the FSM to S0
// without loading DEST. S4 always returns to S0. The transitions and replies
// follow the published state diagram and its description.
//
// Timing: the FSM acts in the cycle firstsel is high. In the next cycle it
// presents status (held until the next load), one-cycle pulses on src_ld /
// dst_ld / dma_start, and ds_sel, the comparison operand for the next
// transaction (SOURCE before access 4, DEST otherwise). The reset is
// synchronous and active low (an own choice; the paper only says the FSM
// resets at S0).
module rpa_fsm
  import uldma_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             firstsel,   // a transaction is to be handled
  input  logic             rw_n,       // 1 = load, 0 = store
  input  logic             equal,      // address matches SOURCE/DEST
  output logic             ds_sel,     // 1: next compare with SOURCE
  output logic             src_ld,     // load SOURCE (one cycle)
  output logic             dst_ld,     // load DEST (one cycle)
  output logic [TC_AW-1:0] status,     // reply to a load
  output logic             dma_start,  // OK3 given: start the DMA (one cycle)
  output rpa_state_t       state
);

  rpa_state_t       state_d;
  logic             src_ld_d, dst_ld_d, start_d;
  logic [TC_AW-1:0] status_d;
  logic             load;

  always_comb begin
    load     = rw_n;
    state_d  = state;
    src_ld_d = 1'b0;
    dst_ld_d = 1'b0;
    start_d  = 1'b0;
    status_d = status;
    if (firstsel) begin
      state_d  = S0;
      if (load) status_d = ST_FAIL;
      unique case (state)
        S0: if (!load) begin
              state_d  = S1;
              dst_ld_d = 1'b1;
            end
        S1: if (load) begin
              state_d  = S2;
              src_ld_d = 1'b1;
              status_d = ST_OK1;
            end
        S2: if (!load && equal) state_d = S3;
        S3: if (load && equal) begin
              state_d  = S4;
              status_d = ST_OK2;
            end
        S4: if (load && equal) begin
              status_d = ST_OK3;
              start_d  = 1'b1;
            end
        default: state_d = S0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S0;
      status    <= ST_FAIL;
      src_ld    <= 1'b0;
      dst_ld    <= 1'b0;
      dma_start <= 1'b0;
      ds_sel    <= 1'b0;
    end else begin
      state     <= state_d;
      status    <= status_d;
      src_ld    <= src_ld_d;
      dst_ld    <= dst_ld_d;
      dma_start <= start_d;
      ds_sel    <= (state_d == S3);
    end
  end

  // A DMA is only started from S4.
  a_start_from_s4 : assert property (@(posedge clk) disable iff (!rst_n)
    dma_start |-> $past(state) == S4);

endmodule
