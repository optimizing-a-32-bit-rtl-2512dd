// register_file: the ARM7 register bank with mode-banked registers and PC.
//
// 31 general registers: R0-R7 shared by all modes, R8-R12 with a second copy
// for FIQ mode, and R13/R14 banked for USR, FIQ, IRQ, SVC, ABT and UND.  The
// register seen for an index depends on the mode given with the access, so
// the control can reach the user bank from a privileged mode (LDM/STM with
// the S bit) or write R14 of the mode an exception is entering.  Two
// combinational read ports (A and B) and one write port; every register is
// its own enabled register, written at the clock edge when its decoded write
// enable is high, with no demultiplexer on the data input.  R15 is a separate
// PC register written through pc_we; reading index 15 returns it.  All
// registers reset to zero.  The banking is the ARM7 architecture's; the
// gate-enabled registers without input demultiplexer follow the design.
module register_file (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  rmode,
  input  logic [3:0]  raddr_a,
  input  logic [3:0]  raddr_b,
  output logic [31:0] rdata_a,
  output logic [31:0] rdata_b,
  input  logic        we,
  input  logic [4:0]  wmode,
  input  logic [3:0]  waddr,
  input  logic [31:0] wdata,
  input  logic        pc_we,
  input  logic [31:0] pc_in,
  output logic [31:0] pc_out
);
  import arm7_pkg::*;

  logic [31:0] regs [31];
  logic [31:0] pc_q;
  logic [30:0] wen;

  // physical register for an index in a mode (index 15 is not mapped)
  function automatic logic [4:0] phys(input logic [3:0] idx, input logic [4:0] mode);
    if (idx < 4'd8) return {1'b0, idx};
    if (mode == MODE_FIQ && idx < 4'd15) return 5'd16 + 5'(idx - 4'd8);   // 16..22
    if (idx < 4'd13) return {1'b0, idx};                                   // 8..12
    unique case (mode)
      MODE_IRQ: return (idx == 4'd13) ? 5'd23 : 5'd24;
      MODE_SVC: return (idx == 4'd13) ? 5'd25 : 5'd26;
      MODE_ABT: return (idx == 4'd13) ? 5'd27 : 5'd28;
      MODE_UND: return (idx == 4'd13) ? 5'd29 : 5'd30;
      default:  return (idx == 4'd13) ? 5'd13 : 5'd14;                      // USR
    endcase
  endfunction

  always_comb begin
    wen = '0;
    if (we && waddr != 4'd15) wen[phys(waddr, wmode)] = 1'b1;
    rdata_a = (raddr_a == 4'd15) ? pc_q : regs[phys(raddr_a, rmode)];
    rdata_b = (raddr_b == 4'd15) ? pc_q : regs[phys(raddr_b, rmode)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 31; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < 31; i++)
        if (wen[i]) regs[i] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc_q <= '0;
    else if (pc_we) pc_q <= pc_in;
  end
  assign pc_out = pc_q;
endmodule
