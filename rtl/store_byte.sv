// store_byte: prepares store data.  For a byte store (bbit high) the low
// byte is copied to all four lanes so that the memory can take it from the
// lane the address selects; a word store passes unchanged.  Combinational.
// Interface: bbit, din (register data), dout (to the memory data bus).
// The block is only named in the design; lane replication is the ARM7
// memory convention and the choice of this implementation.
module store_byte (
  input  logic        bbit,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  assign dout = bbit ? {4{din[7:0]}} : din;
endmodule
