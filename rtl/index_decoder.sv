// index_decoder: pre-decodes the class of a fetched ARM7 instruction.
//
// Combinational.  From the 32-bit instruction word it produces the 10-bit
// one-hot instruction index (bit positions IX_* of arm7_pkg: MRS, MFRI, MSR,
// DPI_IS, DPRS, MULT, SWAP, SDT, BDT, BBL), the SWI signal and the undefined
// (UND) signal.  Exactly one of {index bits, swi, und} is set for every word.
// The classes and the instruction bits they test follow the index decoder
// and undefined decoder truth tables of the design; where a printed row was
// ambiguous the ARMv3 instruction encoding decided.  Coprocessor instructions
// are undefined because the core has no coprocessor interface.
module index_decoder
  import arm7_pkg::*;
(
  input  logic [31:0] instr,
  output index_t      index,
  output logic        swi,
  output logic        und
);
  logic [2:0] top3;
  assign top3 = instr[27:25];

  always_comb begin
    index = '0;
    swi   = 1'b0;
    und   = 1'b0;
    if (instr[27:24] == 4'b1111) begin
      swi = 1'b1;
    end else if (top3 == 3'b101) begin
      index[IX_BBL] = 1'b1;
    end else if (top3 == 3'b100) begin
      index[IX_BDT] = 1'b1;
    end else if (instr[27:26] == 2'b11) begin
      und = 1'b1;                                   // coprocessor space
    end else if (instr[27:26] == 2'b01) begin
      if (instr[25] && instr[4]) und = 1'b1;         // 011x...xxx1 is undefined
      else index[IX_SDT] = 1'b1;
    end else if (!instr[25] && instr[7] && instr[4]) begin
      // multiply / swap space
      if (instr[27:22] == 6'b000000 && instr[6:5] == 2'b00)
        index[IX_MULT] = 1'b1;
      else if (instr[27:23] == 5'b00010 && instr[21:20] == 2'b00 && instr[11:4] == 8'b0000_1001)
        index[IX_SWAP] = 1'b1;
      else
        und = 1'b1;
    end else if (instr[24:23] == 2'b10 && !instr[20]) begin
      // TST/TEQ/CMP/CMN without S: PSR transfer space
      if (!instr[25] && !instr[21] && instr[19:16] == 4'hF && instr[11:0] == 12'h000)
        index[IX_MRS] = 1'b1;
      else if (!instr[25] && instr[21:12] == 10'b10_1001_1111 && instr[11:4] == 8'h00)
        index[IX_MSR] = 1'b1;
      else if (instr[21:12] == 10'b10_1000_1111 && (instr[25] || instr[11:4] == 8'h00))
        index[IX_MFRI] = 1'b1;
      else
        und = 1'b1;
    end else if (!instr[25] && instr[4]) begin
      index[IX_DPRS] = 1'b1;                         // bit 7 is 0 here
    end else begin
      index[IX_DPIS] = 1'b1;
    end
  end
endmodule
