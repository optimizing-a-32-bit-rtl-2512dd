// psr_block: CPSR plus the five banked SPSRs (FIQ, IRQ, SVC, ABT, UND).
//
// The SPSR in use is the one of spsr_mode (the current mode, or during
// exception entry the mode being entered); in USR mode there is none and it
// reads as the CPSR.  An input mux before the CPSR chooses between the 32-bit
// psr_in and the active SPSR (inputmux_tocpsr, used to return from an
// exception); one before the SPSR chooses between psr_in and the CPSR
// (inputmux_tospsr, used to save the CPSR on exception entry).  output_select
// puts the CPSR (0) or the active SPSR (1) on psr_out.  In USR mode a whole-
// word CPSR write changes only the flags.  All writes happen at the clock
// edge; reads are combinational.  The input and output muxes follow the PSR
// description of the design; the user-mode protection is the ARM rule.
module psr_block
  import arm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] psr_in,
  input  logic [4:0]  spsr_mode,
  input  logic        storedata_tocpsr,
  input  logic        storeflag_tocpsr,
  input  logic        storedata_tospsr,
  input  logic        storeflag_tospsr,
  input  logic        inputmux_tocpsr,
  input  logic        inputmux_tospsr,
  input  logic        output_select,
  input  logic        cpsr_set,
  input  logic [2:0]  alu_nzc,
  input  logic        vbit_in,
  input  logic        alu_v,
  input  logic        change_mode,
  input  logic [4:0]  new_mode,
  input  logic        int_set,
  input  logic        int_disabler,
  output logic [31:0] cpsr,
  output logic [31:0] spsr,
  output logic [31:0] psr_out
);
  logic [31:0] spsr_q [5];
  logic [31:0] cpsr_in, spsr_in;
  logic [4:0]  sel;            // one-hot SPSR bank
  logic        user, cdata, cflag;

  always_comb begin
    unique case (spsr_mode)
      MODE_FIQ: sel = 5'b00001;
      MODE_IRQ: sel = 5'b00010;
      MODE_SVC: sel = 5'b00100;
      MODE_ABT: sel = 5'b01000;
      MODE_UND: sel = 5'b10000;
      default:  sel = 5'b00000;
    endcase
    spsr = cpsr;
    for (int i = 0; i < 5; i++) if (sel[i]) spsr = spsr_q[i];
    cpsr_in = inputmux_tocpsr ? spsr : psr_in;
    spsr_in = inputmux_tospsr ? cpsr : psr_in;
    user  = (cpsr[4:0] == MODE_USR);
    cdata = storedata_tocpsr && !user;
    cflag = storeflag_tocpsr || (storedata_tocpsr && user);
    psr_out = output_select ? spsr : cpsr;
  end

  cpsr_reg u_cpsr (
    .clk, .rst_n,
    .datain_32bits(cpsr_in),
    .store_data(cdata),
    .store_flag(cflag),
    .datain_nzc_flags(alu_nzc),
    .cpsr_set_en(cpsr_set),
    .datain_v_flag(alu_v),
    .vbit_in,
    .datain_new_mode(new_mode),
    .change_mode_en(change_mode),
    .int_set,
    .irq_fiq_disable(int_disabler),
    .cpsr_dataout(cpsr)
  );

  for (genvar i = 0; i < 5; i++) begin : g_spsr
    spsr_reg u_spsr (
      .clk, .rst_n,
      .datain_32bits(spsr_in),
      .store_data(storedata_tospsr && sel[i]),
      .store_flag(storeflag_tospsr && sel[i]),
      .spsr_dataout(spsr_q[i])
    );
  end
endmodule
