// arm_asm_pkg: ARMv3 instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one ARM instruction, so
// that test programs can be written as readable calls in SystemVerilog.  The
// encodings are the ARM architecture's instruction formats.
package arm_asm_pkg;
  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1, CS = 4'h2, CC = 4'h3,
                         MI = 4'h4, PL = 4'h5, GT = 4'hC, LT = 4'hB, GE = 4'hA, LE = 4'hD;
  localparam logic [3:0] AND = 4'h0, EOR = 4'h1, SUB = 4'h2, RSB = 4'h3, ADD = 4'h4,
                         ADC = 4'h5, SBC = 4'h6, RSC = 4'h7, TST = 4'h8, TEQ = 4'h9,
                         CMP = 4'hA, CMN = 4'hB, ORR = 4'hC, MOV = 4'hD, BIC = 4'hE, MVN = 4'hF;
  localparam logic [1:0] LSL = 2'd0, LSR = 2'd1, ASR = 2'd2, ROR = 2'd3;

  // data processing, rotated immediate operand
  function automatic logic [31:0] dpi(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rd,
                                      logic [3:0] rn, logic [7:0] imm, logic [3:0] rot = 0);
    return {c, 3'b001, op, s, rn, rd, rot, imm};
  endfunction
  // data processing, register operand shifted by an immediate amount
  function automatic logic [31:0] dpr(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rd,
                                      logic [3:0] rn, logic [3:0] rm, logic [1:0] sh = 0,
                                      logic [4:0] amt = 0);
    return {c, 3'b000, op, s, rn, rd, amt, sh, 1'b0, rm};
  endfunction
  // data processing, register operand shifted by a register
  function automatic logic [31:0] dprs(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rd,
                                       logic [3:0] rn, logic [3:0] rm, logic [1:0] sh,
                                       logic [3:0] rs);
    return {c, 3'b000, op, s, rn, rd, rs, 1'b0, sh, 1'b1, rm};
  endfunction
  // MUL rd, rm, rs / MLA rd, rm, rs, rn
  function automatic logic [31:0] mul(logic [3:0] c, logic s, logic [3:0] rd, logic [3:0] rm,
                                      logic [3:0] rs);
    return {c, 7'b0000000, s, rd, 4'd0, rs, 4'b1001, rm};
  endfunction
  function automatic logic [31:0] mla(logic [3:0] c, logic s, logic [3:0] rd, logic [3:0] rm,
                                      logic [3:0] rs, logic [3:0] rn);
    return {c, 7'b0000001, s, rd, rn, rs, 4'b1001, rm};
  endfunction
  // LDR/STR with a 12-bit immediate offset
  function automatic logic [31:0] sdt(logic [3:0] c, logic l, logic b, logic p, logic u, logic w,
                                      logic [3:0] rd, logic [3:0] rn, logic [11:0] off);
    return {c, 2'b01, 1'b0, p, u, b, w, l, rn, rd, off};
  endfunction
  // LDR/STR with a register offset shifted by an immediate amount
  function automatic logic [31:0] sdtr(logic [3:0] c, logic l, logic b, logic p, logic u, logic w,
                                       logic [3:0] rd, logic [3:0] rn, logic [3:0] rm,
                                       logic [1:0] sh = 0, logic [4:0] amt = 0);
    return {c, 2'b01, 1'b1, p, u, b, w, l, rn, rd, amt, sh, 1'b0, rm};
  endfunction
  // LDM/STM
  function automatic logic [31:0] bdt(logic [3:0] c, logic l, logic p, logic u, logic s, logic w,
                                      logic [3:0] rn, logic [15:0] list);
    return {c, 3'b100, p, u, s, w, l, rn, list};
  endfunction
  // B/BL from address 'from' to address 'to'
  function automatic logic [31:0] br(logic [3:0] c, logic link, logic [31:0] from, logic [31:0] to);
    logic [31:0] off;
    off = (to - (from + 32'd8)) >> 2;
    return {c, 3'b101, link, off[23:0]};
  endfunction
  function automatic logic [31:0] swp(logic [3:0] c, logic b, logic [3:0] rd, logic [3:0] rm,
                                      logic [3:0] rn);
    return {c, 5'b00010, b, 2'b00, rn, rd, 8'b0000_1001, rm};
  endfunction
  function automatic logic [31:0] mrs(logic [3:0] c, logic r, logic [3:0] rd);
    return {c, 5'b00010, r, 6'b001111, rd, 12'd0};
  endfunction
  function automatic logic [31:0] msr(logic [3:0] c, logic r, logic [3:0] rm);
    return {c, 5'b00010, r, 10'b10_1001_1111, 8'd0, rm};
  endfunction
  function automatic logic [31:0] msrf_imm(logic [3:0] c, logic r, logic [7:0] imm, logic [3:0] rot);
    return {c, 5'b00110, r, 10'b10_1000_1111, rot, imm};
  endfunction
  function automatic logic [31:0] swi(logic [3:0] c, logic [23:0] n);
    return {c, 4'b1111, n};
  endfunction
endpackage
