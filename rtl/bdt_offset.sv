// bdt_offset: start-address offset of a block data transfer (LDM/STM).
//
// Counts the ones of the 16-bit register list with a tree of adders (eight
// half adders, four 2-bit, two 3-bit and one 4-bit ripple-carry adder), forms
// count-1 with a 5-bit ripple-carry adder that adds 11111, and picks the
// offset with a 4-input 5-bit mux selected by {prepost, updown}:
//   00 (decrement after)  -> count-1      01 (increment after)  -> 0
//   10 (decrement before) -> count        11 (increment before) -> 1
// The offset is in words; the datapath multiplies it by four.  count is also
// the base write-back amount in words.  Structure and mux inputs follow the
// block diagram of the design; the adders are written as the '+' of their
// widths.  Combinational.
module bdt_offset (
  input  logic [15:0] register_list,
  input  logic        prepost_bit,
  input  logic        updown_bit,
  output logic [4:0]  count,
  output logic [4:0]  count_minus1,
  output logic [4:0]  address_offset
);
  logic [1:0] ha [8];
  logic [2:0] l2 [4];
  logic [3:0] l3 [2];

  always_comb begin
    for (int i = 0; i < 8; i++)
      ha[i] = {1'b0, register_list[2*i]} + {1'b0, register_list[2*i+1]};
    for (int i = 0; i < 4; i++)
      l2[i] = {1'b0, ha[2*i]} + {1'b0, ha[2*i+1]};
    for (int i = 0; i < 2; i++)
      l3[i] = {1'b0, l2[2*i]} + {1'b0, l2[2*i+1]};
    count        = {1'b0, l3[0]} + {1'b0, l3[1]};
    count_minus1 = count + 5'b11111;
    unique case ({prepost_bit, updown_bit})
      2'b00: address_offset = count_minus1;
      2'b01: address_offset = 5'b00000;
      2'b10: address_offset = count;
      2'b11: address_offset = 5'b00001;
    endcase
  end
endmodule
