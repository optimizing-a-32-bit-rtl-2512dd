// alu: the ARM7 ALU block, built around a 32-bit Kogge-Stone adder.
//
// Performs the sixteen ARM data-processing operations on operand A (A bus)
// and operand B (output of the ALU mux).  Arithmetic operations (SUB, RSB,
// ADD, ADC, SBC, RSC, CMP, CMN) go through the single adder, whose inputs are
// swapped and/or inverted as the opcode requires; logical operations take the
// carry from the barrel shifter (shift_c) and leave V alone.  Outputs the
// result and the new N, Z, C, V together with 'arith', which tells the PSR
// block whether V is to be written.  Combinational.  The adder type follows
// the design (its fastest configuration); the rest is the ARM instruction set.
module alu
  import arm7_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [3:0]  opcode,
  input  logic        cin,       // CPSR C
  input  logic        shift_c,   // barrel shifter carry out
  input  logic        vin,       // CPSR V
  output logic [31:0] result,
  output logic        n, z, c, v,
  output logic        arith
);
  logic [31:0] x, y, sum;
  logic        ci, co, cm;

  kogge_stone_adder #(.WIDTH(32)) u_add (
    .a(x), .b(y), .cin(ci), .sum(sum), .cout(co), .c_msb(cm)
  );

  always_comb begin
    x = a; y = b; ci = 1'b0; arith = 1'b1;
    unique case (alu_op_t'(opcode))
      OP_SUB, OP_CMP: begin x = a;  y = ~b; ci = 1'b1; end
      OP_RSB:         begin x = b;  y = ~a; ci = 1'b1; end
      OP_ADD, OP_CMN: begin x = a;  y = b;  ci = 1'b0; end
      OP_ADC:         begin x = a;  y = b;  ci = cin;  end
      OP_SBC:         begin x = a;  y = ~b; ci = cin;  end
      OP_RSC:         begin x = b;  y = ~a; ci = cin;  end
      default:        arith = 1'b0;
    endcase

    unique case (alu_op_t'(opcode))
      OP_AND, OP_TST: result = a & b;
      OP_EOR, OP_TEQ: result = a ^ b;
      OP_ORR:         result = a | b;
      OP_MOV:         result = b;
      OP_BIC:         result = a & ~b;
      OP_MVN:         result = ~b;
      default:        result = sum;
    endcase

    n = result[31];
    z = (result == 32'd0);
    c = arith ? co : shift_c;
    v = arith ? (co ^ cm) : vin;
  end
endmodule
