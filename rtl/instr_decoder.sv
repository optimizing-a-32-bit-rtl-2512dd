// instr_decoder: the instruction decoder (ID) of the decode stage.
//
// Combinational.  Takes the word held by the IF stage with its pre-decoded
// one-hot index and SWI/UND/prefetch-abort flags and extracts everything the
// execute control needs into an id_t record: condition, register indices
// (for MUL/MLA the destination is bits 19:16 and the accumulate register bits
// 15:12), opcode and the S, I, P, U, B, W, L bits, the immediate before
// shifting, the shift amount and type the instruction specifies, the register
// list, and whether R15 is the destination.  The record is stored in the ID
// latch when an instruction enters execute.  Immediates: data processing and
// MSR-flags use an 8-bit value rotated right by twice the rotate field;
// single transfers a 12-bit offset; branches a sign-extended 24-bit offset
// that the shifter moves left by two.  The field positions are the ARM
// instruction formats; the block is only named in the design.
// Most outputs are instruction bit fields passed on unchanged (register
// indices, immediates, P/U/B/W/L/S bits): gathering them in one struct for the
// ID latch is the purpose of the block, so they are wires after synthesis.
module instr_decoder
  import arm7_pkg::*;
(
  input  logic [31:0] instr,
  input  index_t      index,
  input  logic        swi,
  input  logic        und,
  input  logic        pabt,
  output id_t         id
);
  always_comb begin
    id = '0;
    id.instr   = instr;
    id.index   = index;
    id.swi     = swi;
    id.und     = und;
    id.pabt    = pabt;
    id.cond    = instr[31:28];
    id.opcode  = instr[24:21];
    id.s_bit   = instr[20];
    id.i_bit   = instr[25];
    id.p_bit   = instr[24];
    id.u_bit   = instr[23];
    id.b_bit   = instr[22];
    id.w_bit   = instr[21];
    id.l_bit   = instr[20];
    id.psr_r   = instr[22];
    id.acc     = instr[21];
    id.link    = instr[24];
    id.rs      = instr[11:8];
    id.rm      = instr[3:0];
    id.reglist = instr[15:0];
    if (index[IX_MULT]) begin
      id.rd = instr[19:16];
      id.rn = instr[15:12];
    end else begin
      id.rd = instr[15:12];
      id.rn = instr[19:16];
    end

    if (index[IX_BBL]) begin
      id.imm    = {{8{instr[23]}}, instr[23:0]};
      id.sval   = 8'd2;
      id.shtype = SH_LSL;
    end else if (index[IX_SDT]) begin
      id.imm    = {20'd0, instr[11:0]};
      if (instr[25]) begin                      // register offset, immediate shift
        id.sval      = {3'd0, instr[11:7]};
        id.shtype    = instr[6:5];
        id.imm_shift = 1'b1;
      end
    end else if (instr[25]) begin               // rotated 8-bit immediate
      id.imm    = {24'd0, instr[7:0]};
      id.sval   = {3'd0, instr[11:8], 1'b0};
      id.shtype = SH_ROR;
    end else begin                              // register operand
      id.sval      = {3'd0, instr[11:7]};
      id.shtype    = instr[6:5];
      id.imm_shift = !instr[4];
    end

    id.dreg_pc = (id.rd == 4'd15);
  end
endmodule
