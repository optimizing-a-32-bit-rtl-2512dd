// cond_checker: evaluates the 4-bit ARM condition field against the CPSR
// flags N, Z, C, V.  Combinational, written as a single if-else chain, the
// coding style the design selected for this block.  cond_passed is high
// when the instruction in the execute stage may run.  Condition 1111 (NV)
// never passes, as on ARMv3.
module cond_checker (
  input  logic [3:0] cond,
  input  logic       n, z, c, v,
  output logic       cond_passed
);
  always_comb begin
    if      (cond == 4'h0) cond_passed = z;              // EQ
    else if (cond == 4'h1) cond_passed = !z;             // NE
    else if (cond == 4'h2) cond_passed = c;              // CS
    else if (cond == 4'h3) cond_passed = !c;             // CC
    else if (cond == 4'h4) cond_passed = n;              // MI
    else if (cond == 4'h5) cond_passed = !n;             // PL
    else if (cond == 4'h6) cond_passed = v;              // VS
    else if (cond == 4'h7) cond_passed = !v;             // VC
    else if (cond == 4'h8) cond_passed = c && !z;        // HI
    else if (cond == 4'h9) cond_passed = !c || z;        // LS
    else if (cond == 4'hA) cond_passed = (n == v);       // GE
    else if (cond == 4'hB) cond_passed = (n != v);       // LT
    else if (cond == 4'hC) cond_passed = !z && (n == v); // GT
    else if (cond == 4'hD) cond_passed = z || (n != v);  // LE
    else if (cond == 4'hE) cond_passed = 1'b1;           // AL
    else                   cond_passed = 1'b0;           // NV
  end
endmodule
