// spsr_reg: one saved program status register.  The flag bits 31:28 (N,Z,C,V)
// and the remaining 28 bits are separate registers: store_flag writes only
// the flags, store_data writes both.  Resets to zero.  The split follows the
// SPSR block diagram.
// Interface: clk, rst_n (asynchronous, active low), store_flag, store_data,
// datain, spsr_dataout.  Writes take effect at the rising clock edge; the
// reset value of zero is this implementation's choice.
module spsr_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] datain_32bits,
  input  logic        store_data,
  input  logic        store_flag,
  output logic [31:0] spsr_dataout
);
  logic [3:0]  nzcv;
  logic [27:0] rest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nzcv <= '0;
      rest <= '0;
    end else begin
      if (store_data || store_flag) nzcv <= datain_32bits[31:28];
      if (store_data)               rest <= datain_32bits[27:0];
    end
  end
  assign spsr_dataout = {nzcv, rest};
endmodule
