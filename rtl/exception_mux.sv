// exception_mux: maps the 3-bit exception code of the interrupt handler to
// the exception vector address sent to the address register, and to the
// processor mode the exception enters.  Codes and their order of priority
// follow the interrupt handler; the vector addresses and modes are those of
// the ARM7 architecture.  Combinational.
// Vectors lie in the first 32 bytes and every exception mode has M[4] set,
// so most output bits are constant after synthesis; they are kept so that
// the vector can drive the 32-bit address mux directly.
module exception_mux
  import arm7_pkg::*;
(
  input  exc_code_t   code,
  output logic [31:0] vector,
  output logic [4:0]  mode
);
  assign vector = exc_vector(code);
  assign mode   = exc_mode(code);
endmodule
