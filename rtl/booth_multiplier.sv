// booth_multiplier: radix-4 (modified Booth) sequencer for MUL/MLA.
//
// The multiplier enters from the A bus when mux_select is high; a 2-bit
// arithmetic right shift then moves it on every clock, with the "bit on the
// right" kept below bit 0.  Each cycle the three low bits (bit pair and bit on
// the right) are Booth-encoded into an ALU opcode (ADD 0100 or SUB 0010) and a
// barrel-shifter amount for the multiplicand: 2*count for +-1xM, 2*count+1 for
// +-2xM and 32 (which shifts the multiplicand to zero) for 0xM.  The datapath
// adds or subtracts the shifted multiplicand into the accumulating destination
// register.  A 4-bit counter tracks the partial products; mult_done is high
// in the cycle of the last partial product: the sixteenth, or earlier when
// the bits still to be examined are all zeros or all ones (early termination).
// The encoding table, the opcode slices and the three shift values follow the
// design; the early-termination test is this implementation's.
// Timing: load in cycle 0, first partial product in cycle 1.
// mult_opcode only ever takes ADD (0100) or SUB (0010) and mult_shiftval
// never exceeds 32, so four output bits are constant after synthesis; the
// full widths match the ALU opcode and shift-value buses they feed.
module booth_multiplier (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mux_select,
  input  logic [31:0] multiplier,
  output logic [3:0]  mult_opcode,
  output logic [7:0]  mult_shiftval,
  output logic        mult_done
);
  logic [32:0] mreg;     // {multiplier bits, bit on the right}
  logic [3:0]  count;
  logic [1:0]  opcode_slice;
  logic [1:0]  sval_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mreg  <= '0;
      count <= '0;
    end else if (mux_select) begin
      mreg  <= {multiplier, 1'b0};
      count <= '0;
    end else begin
      mreg  <= {{2{mreg[32]}}, mreg[32:2]};
      count <= count + 4'd1;
    end
  end

  // Booth encoder (bit pair, bit on right)
  always_comb begin
    unique case (mreg[2:0])
      3'b000: begin opcode_slice = 2'b10; sval_sel = 2'b01; end  //  0 x M
      3'b001: begin opcode_slice = 2'b10; sval_sel = 2'b00; end  // +1 x M
      3'b010: begin opcode_slice = 2'b10; sval_sel = 2'b00; end  // +1 x M
      3'b011: begin opcode_slice = 2'b10; sval_sel = 2'b10; end  // +2 x M
      3'b100: begin opcode_slice = 2'b01; sval_sel = 2'b10; end  // -2 x M
      3'b101: begin opcode_slice = 2'b01; sval_sel = 2'b00; end  // -1 x M
      3'b110: begin opcode_slice = 2'b01; sval_sel = 2'b00; end  // -1 x M
      default: begin opcode_slice = 2'b01; sval_sel = 2'b01; end //  0 x M
    endcase
    mult_opcode = {1'b0, opcode_slice, 1'b0};
    unique case (sval_sel)
      2'b00:   mult_shiftval = {3'b000, count, 1'b0};
      2'b10:   mult_shiftval = {3'b000, count, 1'b1};
      default: mult_shiftval = 8'd32;
    endcase
    mult_done = (count == 4'd15) || (mreg[32:2] == '0) || (mreg[32:2] == '1);
  end
endmodule
