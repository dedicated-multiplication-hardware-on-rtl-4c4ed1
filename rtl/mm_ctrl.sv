// mm_ctrl: sequencer of the Montgomery modular multiplier.
//
// It walks the datapath through the steps of the algorithm, one operation
// code (mm_pkg::mm_op_e) per clock cycle:
//   IDLE      : wait for start; on start issue OP_LOAD.
//   PRE_ADD   : OP_PRE_ADD, (SS,SC) = 1F_CSA(B^ + N^ + 0).
//   PRE_CONV  : OP_CONV (2H_CSA) while SC != 0; when SC = 0 issue OP_DLATCH
//               (D^ = SS, SS = SC = 0, iteration index i = -1).
//   LOOP      : OP_ITER while i <= K+4; i advances by 1, or by 2 when the
//               skip detector reports that iteration i+1 can be skipped.
//   POST_CONV : OP_CONV while SC != 0; when SC = 0 issue OP_FINISH, raise
//               done for one cycle and return to IDLE.
// The iteration counter holds idx = i + 1 (0 .. K+5). A skip is allowed only
// while iteration i+1 still belongs to the loop (i <= K+3); that guard, the
// handshake (start sampled in IDLE, busy, one-cycle done) and the reset state
// are this design's own choices. Reset is active-low and synchronous to clk.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned K = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,    // begin a multiplication (sampled in IDLE)
  input  logic    sc_zero,  // Zero_D: carry vector is zero
  input  logic    skip,     // Skip_D: iteration i+1 is skipped
  output mm_op_e  op,       // datapath operation for this cycle
  output logic    skip_en,  // skipping iteration i+1 is allowed
  output logic    busy,
  output logic    done      // one-cycle pulse, result valid from now on
);
  localparam int unsigned IW = $clog2(K + 8);
  localparam logic [IW-1:0] IDX_LAST = IW'(K + 5);  // idx of iteration i = K+4

  mm_state_e       state_q, state_d;
  logic [IW-1:0]   idx_q, idx_d;
  logic            done_d;

  always_comb begin
    state_d = state_q;
    idx_d   = idx_q;
    op      = OP_IDLE;
    done_d  = 1'b0;
    unique case (state_q)
      ST_IDLE: begin
        if (start) begin
          op      = OP_LOAD;
          state_d = ST_PRE_ADD;
        end
      end
      ST_PRE_ADD: begin
        op      = OP_PRE_ADD;
        state_d = ST_PRE_CONV;
      end
      ST_PRE_CONV: begin
        if (sc_zero) begin
          op      = OP_DLATCH;
          idx_d   = '0;
          state_d = ST_LOOP;
        end else begin
          op = OP_CONV;
        end
      end
      ST_LOOP: begin
        op      = OP_ITER;
        idx_d   = idx_q + (skip ? IW'(2) : IW'(1));
        if (idx_d > IDX_LAST) state_d = ST_POST_CONV;
      end
      ST_POST_CONV: begin
        if (sc_zero) begin
          op      = OP_FINISH;
          done_d  = 1'b1;
          state_d = ST_IDLE;
        end else begin
          op = OP_CONV;
        end
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      idx_q   <= '0;
      done    <= 1'b0;
    end else begin
      state_q <= state_d;
      idx_q   <= idx_d;
      done    <= done_d;
    end
  end

  assign busy    = (state_q != ST_IDLE);
  assign skip_en = (state_q == ST_LOOP) && (idx_q < IDX_LAST);

  // Skipping past the last iteration would divide by two once too often.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_LOOP) |-> (idx_d <= IDX_LAST + 1));
endmodule
