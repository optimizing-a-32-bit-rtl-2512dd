// cpsr_reg: the current program status register, kept as separate fields.
//
// N,Z,C take either bits 31:29 of the 32-bit input or the ALU flags
// (cpsr_set); V takes bit 28 or the ALU V (vbit_in).  I,F take bits 7:6 or the
// values forced on exception entry (int_set, with irq_fiq_disable); the 5-bit
// mode takes bits 4:0 or the new mode (change_mode).  Bits 27:8 and bit 5 are
// held in plain registers written with the whole word.  store_data writes all
// fields from the input, store_flag only bits 31:28.  The outputs of all field
// registers are concatenated into cpsr_dataout.  Reset enters SVC mode with
// IRQ and FIQ disabled.  The field split and the mux placement follow the
// CPSR block diagram; flip-flops stand for the latches.
module cpsr_reg
  import arm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] datain_32bits,
  input  logic        store_data,
  input  logic        store_flag,
  input  logic [2:0]  datain_nzc_flags,
  input  logic        cpsr_set_en,
  input  logic        datain_v_flag,
  input  logic        vbit_in,
  input  logic [4:0]  datain_new_mode,
  input  logic        change_mode_en,
  input  logic        int_set,          // set I (and F when irq_fiq_disable)
  input  logic        irq_fiq_disable,
  output logic [31:0] cpsr_dataout
);
  logic [2:0]  nzc;
  logic        v;
  logic [1:0]  i_f;
  logic [4:0]  mode;
  logic [19:0] mid;
  logic        b5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nzc <= '0; v <= 1'b0; i_f <= 2'b11; mode <= MODE_SVC; mid <= '0; b5 <= 1'b0;
    end else begin
      if (cpsr_set_en)                   nzc <= datain_nzc_flags;
      else if (store_data || store_flag) nzc <= datain_32bits[31:29];
      if (vbit_in)                       v <= datain_v_flag;
      else if (store_data || store_flag) v <= datain_32bits[28];
      if (int_set)                       i_f <= {1'b1, irq_fiq_disable | i_f[0]};
      else if (store_data)               i_f <= datain_32bits[7:6];
      if (change_mode_en)                mode <= datain_new_mode;
      else if (store_data)               mode <= datain_32bits[4:0];
      if (store_data) begin
        mid <= datain_32bits[27:8];
        b5  <= datain_32bits[5];
      end
    end
  end

  assign cpsr_dataout = {nzc, v, mid, i_f, b5, mode};
endmodule
