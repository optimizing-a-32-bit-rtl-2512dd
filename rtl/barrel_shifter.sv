// barrel_shifter: ARM7 operand-2 shifter built from cascaded multiplexers.
//
// Shifts din by an 8-bit amount (0..255) with one of the four ARM shift types
// LSL, LSR, ASR, ROR.  Each shift type is a chain of eight 2:1 muxes whose
// selects are the bits of the shift amount directly (stage k shifts by 2^k),
// so no decoding of the amount is needed.  The carry out travels in a ninth
// bit position beside the data through the same chain.  ROR uses the five
// low stages; two extra muxes handle RRX (ROR #0 given as an instruction
// immediate) and ROR by a non-zero multiple of 32.  A final mux selected by
// the shift type picks the result.  When the amount is an instruction
// immediate (imm_shift=1), LSR #0 and ASR #0 mean a shift by 32, as in the
// ARM encoding.  A zero amount otherwise passes din and cin unchanged.
// Combinational.  The cascade structure follows the design; the handling of
// the immediate encodings is this implementation's reading of the ARM rules.
module barrel_shifter
  import arm7_pkg::*;
(
  input  logic [31:0] din,
  input  logic [7:0]  sval,
  input  logic [1:0]  shtype,
  input  logic        imm_shift,
  input  logic        cin,
  output logic [31:0] dout,
  output logic        cout
);
  logic [7:0]  amt;
  logic [32:0] lsl_v, lsr_v, asr_v;
  logic [31:0] ror_v;
  logic        rrx, zero_amt;

  always_comb begin
    // immediate encodings: LSR #0 / ASR #0 stand for #32
    if (imm_shift && sval == 8'd0 && (shtype == SH_LSR || shtype == SH_ASR))
      amt = 8'd32;
    else
      amt = sval;
    zero_amt = (amt == 8'd0);
    rrx      = imm_shift && (sval == 8'd0) && (shtype == SH_ROR);

    // LSL: {carry, data}, carry in bit 32
    lsl_v = {cin, din};
    for (int k = 0; k < 8; k++)
      if (amt[k]) lsl_v = (k < 6) ? (lsl_v << (1 << k)) : 33'd0;
    // LSR: {data, carry}, carry in bit 0
    lsr_v = {din, cin};
    for (int k = 0; k < 8; k++)
      if (amt[k]) lsr_v = (k < 6) ? (lsr_v >> (1 << k)) : 33'd0;
    // ASR: as LSR with the sign filled in
    asr_v = {din, cin};
    for (int k = 0; k < 8; k++)
      if (amt[k]) asr_v = (k < 6) ? 33'($signed(asr_v) >>> (1 << k)) : {33{din[31]}};
    // ROR: the five low stages
    ror_v = din;
    for (int k = 0; k < 5; k++)
      if (amt[k]) ror_v = (ror_v >> (1 << k)) | (ror_v << (32 - (1 << k)));

    unique case (shtype)
      SH_LSL: begin dout = lsl_v[31:0]; cout = zero_amt ? cin : lsl_v[32]; end
      SH_LSR: begin dout = lsr_v[32:1]; cout = zero_amt ? cin : lsr_v[0];  end
      SH_ASR: begin dout = asr_v[32:1]; cout = zero_amt ? cin : asr_v[0];  end
      default: begin
        if (rrx) begin
          dout = {cin, din[31:1]};
          cout = din[0];
        end else begin
          dout = ror_v;
          cout = zero_amt ? cin : ror_v[31];   // ROR32 gives bit 31 as well
        end
      end
    endcase
  end
endmodule
