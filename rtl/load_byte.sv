// load_byte: shapes the word read from memory for LDR/LDRB/SWP.
//
// loadbyte_enable stores the two low bits of the effective address at the
// clock edge.  With bbit high the addressed byte lane is returned, zero
// extended; with bbit low the word is rotated right by 8x the stored byte
// offset, the ARM7 rule for a word load from an unaligned address.  The
// register for the address bits and the byte-select mux are named by the
// design; the lane order (little-endian) is this implementation's choice.
module load_byte (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        loadbyte_enable,
  input  logic [1:0]  addr_lsb,
  input  logic        bbit,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  logic [1:0] off_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               off_q <= '0;
    else if (loadbyte_enable) off_q <= addr_lsb;
  end
  always_comb begin
    if (bbit) dout = {24'd0, din[8*off_q +: 8]};
    else      dout = (din >> (8 * off_q)) | (din << (32 - 8 * off_q));
  end
endmodule
