// exe_fsm: execute cycle state machine of the main control unit.
//
// Six one-hot states EXE1..EXE6 count the cycles of the instruction in the
// execute stage; every instruction starts in EXE1.  The kind of work of each
// cycle (see classify in arm7_pkg) depends on the state and the instruction
// index.  Next state: EXE1 after a cycle that ends the instruction; EXE2 is
// held by a multiply until mult_done; a block transfer moves from its first
// transfer cycle to EXE3 (more registers) or straight to EXE4 (bdt_done),
// and stays in EXE3 until bdt_done; otherwise the state advances by one.
// Two flags extend the states for exception entry: in_exc marks the entry
// sequence (EXE1 replaced by an exception, then EXE2, EXE3), and dabt_seq a
// data-abort sequence, which starts again at EXE1 with a restore of the base
// register and then takes EXE2..EXE4.  A data abort ends a single transfer or
// swap at once; a block transfer finishes its transfers first.  Reset is
// asynchronous and enters EXE1.  One-hot encoding and the state names follow
// the design; the transitions are this implementation's instruction timing.
module exe_fsm
  import arm7_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ctx_t       ctx,        // its state/in_exc/dabt_seq fields are ignored
  input  id_t        id,
  output exe_state_t state,
  output logic       in_exc,
  output logic       dabt_seq,
  output cyc_t       kind,
  output logic       last
);
  ctx_t       c;
  exe_state_t nstate;
  logic       nexc, ndabt;

  always_comb begin
    c          = ctx;
    c.state    = state;
    c.in_exc   = in_exc;
    c.dabt_seq = dabt_seq;
    kind = classify(c, id);
    last = cycle_last(kind, c, id);
    nstate = {state[NEXE-2:0], 1'b0};
    nexc   = in_exc;
    ndabt  = dabt_seq;
    if (last) begin
      nstate = EXE1; nexc = 1'b0; ndabt = 1'b0;
    end else begin
      unique case (kind)
        CY_X1: if (!dabt_seq) nexc = 1'b1;
        CY_MUL2: nstate = EXE2;
        CY_SDT2, CY_SWP2, CY_SWP3:
          if (ctx.abort_now) begin
            nstate = EXE1; nexc = 1'b1; ndabt = 1'b1;
          end
        CY_BDTX:
          if (ctx.bdt_done) begin
            if (ctx.abort_now || ctx.abort_seen) begin
              nstate = EXE1; nexc = 1'b1; ndabt = 1'b1;
            end else begin
              nstate = EXE4;
            end
          end else begin
            nstate = EXE3;
          end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= EXE1;
      in_exc   <= 1'b0;
      dabt_seq <= 1'b0;
    end else begin
      state    <= nstate;
      in_exc   <= nexc;
      dabt_seq <= ndabt;
    end
  end

  // exactly one state is active
  a_onehot: assert property (@(posedge clk) $onehot(state));
endmodule
