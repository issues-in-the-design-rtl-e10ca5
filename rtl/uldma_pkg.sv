// uldma_pkg: types and constants shared by the user-level DMA initiation
// engines.
//
// The repeated-passing-of-arguments engine answers TurboChannel loads with a
// 12-bit STATUS word. Its four values (FAIL, OK1, OK2, OK3) and the five FSM
// states S0..S4 follow the published design. The status codes of the key-based
// and the extended-shadow engines are not published; the values below for
// them are this design's own choice.
package uldma_pkg;

  // Width of the address field the TurboChannel slave keeps, and of STATUS.
  localparam int unsigned TC_AW = 12;

  // STATUS values returned by the repeated-passing engine on a load.
  localparam logic [TC_AW-1:0] ST_FAIL = 12'h000;
  localparam logic [TC_AW-1:0] ST_OK1  = 12'h001;
  localparam logic [TC_AW-1:0] ST_OK2  = 12'h002;
  localparam logic [TC_AW-1:0] ST_OK3  = 12'h003;

  // States of the repeated-passing FSM. S0 is the reset state; S1..S4 mean
  // that 1..4 accesses of the STORE-LOAD-STORE-LOAD-LOAD sequence were seen.
  typedef enum logic [2:0] {
    S0 = 3'd0,
    S1 = 3'd1,
    S2 = 3'd2,
    S3 = 3'd3,
    S4 = 3'd4
  } rpa_state_t;

  // Status returned by the extended-shadow engine on its initiating load.
  localparam logic [63:0] XS_FAIL = 64'd0;
  localparam logic [63:0] XS_OK   = 64'd1;

  // Per-context state of the key-based engine.
  typedef enum logic [1:0] {
    KC_IDLE    = 2'd0,  // arguments being collected
    KC_PENDING = 2'd1,  // started, waiting for the data mover
    KC_BUSY    = 2'd2,  // handed to the data mover, bytes still to move
    KC_DONE    = 2'd3   // transfer finished
  } kctx_state_t;

endpackage
