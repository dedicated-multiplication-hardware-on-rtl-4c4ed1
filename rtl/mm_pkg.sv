// mm_pkg: types and constants shared by the Montgomery modular multiplier.
//
// The multiplier is sequenced by a small controller (mm_ctrl) that tells the
// datapath (scs_mm_new) which operation to perform in each clock cycle. The
// operation codes below are that interface. The configuration bit "alpha" of
// the configurable carry-save adder selects between one full-adder carry-save
// addition (1F_CSA) and two serial half-adder carry-save additions (2H_CSA).
package mm_pkg;

  // alpha values of the configurable full adder cells
  localparam logic CCSA_1F = 1'b1;  // one three-input carry-save addition
  localparam logic CCSA_2H = 1'b0;  // two serial two-input carry-save additions

  // Datapath operation requested by the controller for the current cycle.
  typedef enum logic [2:0] {
    OP_IDLE    = 3'd0,  // hold all registers
    OP_LOAD    = 3'd1,  // capture A, B^ = 8B, N^; SS <= B^, SC <= N^
    OP_PRE_ADD = 3'd2,  // (SS,SC) = 1F_CSA(SS + SC + 0), no shift
    OP_CONV    = 3'd3,  // (SS,SC) = 2H_CSA(SS, SC), no shift
    OP_DLATCH  = 3'd4,  // D^ <= SS; clear SS, SC, A^, q^ (iteration i = -1 starts)
    OP_ITER    = 3'd5,  // one Montgomery iteration (1F_CSA, shift by 1 or by 2 on skip)
    OP_FINISH  = 3'd6   // result <= SS (carry vector is zero)
  } mm_op_e;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,
    ST_PRE_ADD   = 3'd1,
    ST_PRE_CONV  = 3'd2,
    ST_LOOP      = 3'd3,
    ST_POST_CONV = 3'd4
  } mm_state_e;

endpackage
