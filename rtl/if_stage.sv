// if_stage: instruction fetch stage.
//
// In a fetch cycle (load high) the word on the data bus and the
// prefetch-abort input are stored, and the stage is marked valid.  The index
// decoder pre-decodes the stored word, so its class (10-bit one-hot index),
// SWI and UND flags are ready beside it when the execute control moves the
// instruction into the ID latch; this takes the decoding of the instruction
// class out of the decode/execute path.  if_flush marks the stage empty after
// a branch, an exception or reset; a fetch in the same cycle still stores.
// The source design builds this stage from a phase-2 latch (IF_latch1)
// followed by phase-1 latches (IF_latch2, index, SWI and UND latches); with a
// single clock that latch pair is one edge-triggered register, which is what
// this module holds.  The index decoder between fetch and decode follows the
// design.
module if_stage
  import arm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] datain,
  input  logic        prefetch_abort,
  input  logic        load,
  input  logic        if_flush,
  output logic [31:0] new_instruction,
  output index_t      new_index,
  output logic        swi_signal,
  output logic        und_signal,
  output logic        pabt_signal,
  output logic        valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      new_instruction <= '0;
      pabt_signal     <= 1'b0;
      valid           <= 1'b0;
    end else if (load) begin
      new_instruction <= datain;
      pabt_signal     <= prefetch_abort;
      valid           <= 1'b1;
    end else if (if_flush) begin
      valid           <= 1'b0;
    end
  end

  index_decoder u_index (
    .instr(new_instruction), .index(new_index), .swi(swi_signal), .und(und_signal)
  );
endmodule
