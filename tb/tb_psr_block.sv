// tb_psr_block: exercises the CPSR with its five banked SPSRs.  Random
// sequences of PSR writes (whole or flags only, to CPSR or to the SPSR of a
// chosen mode), exception-style saves (SPSR <- CPSR through the input mux),
// returns (CPSR <- SPSR), ALU flag updates, mode changes and interrupt-disable
// sets are compared with a model kept here.  The model applies the user-mode
// rule: a whole-PSR write to the CPSR in user mode changes only the flags.
// A read of the SPSR in user mode returns the CPSR.  Clock period 10 ns.
module tb_psr_block;
  import arm7_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic [31:0] psr_in, cpsr, spsr, psr_out;
  logic [4:0]  spsr_mode, new_mode;
  logic        storedata_tocpsr, storeflag_tocpsr, storedata_tospsr, storeflag_tospsr;
  logic        inputmux_tocpsr, inputmux_tospsr, output_select, cpsr_set, vbit_in, alu_v;
  logic        change_mode, int_set, int_disabler;
  logic [2:0]  alu_nzc;
  int          checks = 0, failures = 0;
  logic [31:0] m_cpsr, m_spsr [5];
  logic [4:0]  modes [6];

  psr_block dut (.*);
  always #5 clk = ~clk;

  function automatic int bank(logic [4:0] m);
    case (m)
      MODE_FIQ: return 0;
      MODE_IRQ: return 1;
      MODE_SVC: return 2;
      MODE_ABT: return 3;
      MODE_UND: return 4;
      default:  return -1;
    endcase
  endfunction

  task automatic compare();
    logic [31:0] exp_spsr;
    exp_spsr = bank(spsr_mode) < 0 ? m_cpsr : m_spsr[bank(spsr_mode)];
    checks++;
    if (cpsr !== m_cpsr || spsr !== exp_spsr || psr_out !== (output_select ? exp_spsr : m_cpsr)) begin
      failures++;
      $display("FAIL cpsr=%h spsr=%h out=%h expected %h %h", cpsr, spsr, psr_out, m_cpsr, exp_spsr);
    end
  endtask

  initial begin
    logic [31:0] cin, sin;
    int b;
    modes = '{MODE_USR, MODE_FIQ, MODE_IRQ, MODE_SVC, MODE_ABT, MODE_UND};
    psr_in = 0; spsr_mode = MODE_SVC; new_mode = 0;
    {storedata_tocpsr, storeflag_tocpsr, storedata_tospsr, storeflag_tospsr} = '0;
    {inputmux_tocpsr, inputmux_tospsr, output_select, cpsr_set, vbit_in, alu_v} = '0;
    {change_mode, int_set, int_disabler} = '0; alu_nzc = 0;
    m_cpsr = 32'h0000_00D3;
    foreach (m_spsr[i]) m_spsr[i] = '0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      psr_in = $urandom;
      if ($urandom % 8 === 0) psr_in[4:0] = modes[$urandom % 6];
      spsr_mode = modes[$urandom % 6];
      {storedata_tocpsr, storeflag_tocpsr} = ($urandom % 3 === 0) ? 2'($urandom) : 2'b00;
      {storedata_tospsr, storeflag_tospsr} = ($urandom % 3 === 0) ? 2'($urandom) : 2'b00;
      inputmux_tocpsr = 1'($urandom); inputmux_tospsr = 1'($urandom);
      output_select = 1'($urandom);
      cpsr_set = ($urandom % 4) === 0; vbit_in = ($urandom % 4) === 0;
      alu_nzc = 3'($urandom); alu_v = 1'($urandom);
      change_mode = ($urandom % 8) === 0; new_mode = modes[$urandom % 6];
      int_set = ($urandom % 8) === 0; int_disabler = 1'($urandom);
      #1 compare();
      @(posedge clk);
      b = bank(spsr_mode);
      cin = inputmux_tocpsr ? (b < 0 ? m_cpsr : m_spsr[b]) : psr_in;
      sin = inputmux_tospsr ? m_cpsr : psr_in;
      if (b >= 0) begin
        if (storedata_tospsr)      m_spsr[b] = sin;
        else if (storeflag_tospsr) m_spsr[b][31:28] = sin[31:28];
      end
      begin
        logic whole, flags;
        whole = storedata_tocpsr && m_cpsr[4:0] !== MODE_USR;
        flags = storeflag_tocpsr || (storedata_tocpsr && m_cpsr[4:0] === MODE_USR);
        if (cpsr_set)              m_cpsr[31:29] = alu_nzc;
        else if (whole || flags)   m_cpsr[31:29] = cin[31:29];
        if (vbit_in)               m_cpsr[28] = alu_v;
        else if (whole || flags)   m_cpsr[28] = cin[28];
        if (whole) m_cpsr[27:8] = cin[27:8];
        if (int_set)    m_cpsr[7:6] = {1'b1, int_disabler | m_cpsr[6]};
        else if (whole) m_cpsr[7:6] = cin[7:6];
        if (whole) m_cpsr[5] = cin[5];
        if (change_mode) m_cpsr[4:0] = new_mode;
        else if (whole)  m_cpsr[4:0] = cin[4:0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
