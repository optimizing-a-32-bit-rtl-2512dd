// tb_interrupt_handler: checks the exception priority chain and its state.
// After reset the code must be RESET until int_flush.  Then random
// combinations of SWI, undefined, prefetch abort, IRQ, FIQ (each sampled one
// clock before it counts), the CPSR I/F masks, the decode stall and data
// aborts (latched only when abort_latch_enable is high, cleared by
// int_flush) are applied, and the combinational code is compared with the
// priority order: data abort, FIQ, IRQ, prefetch abort, undefined/SWI, none.
// The captured (phase-1) code must follow the combinational one when
// capture is high and hold otherwise.  Clock period 10 ns.
module tb_interrupt_handler;
  import arm7_pkg::*;
  logic      clk = 0, rst_n = 1;
  logic      swi_signal, und_signal, pref_abort_signal, irq_signal, fiq_signal, id_stall_signal;
  logic      cpsr_bit7, cpsr_bit6, abort_latch_enable, data_abort_signal, int_flush, capture;
  exc_code_t interrupt_vector_p2, interrupt_vector_p1;
  logic      data_abort_latched, reset_pending;
  int        checks = 0, failures = 0;
  logic      m_irq, m_fiq, m_dabt, m_reset;
  exc_code_t m_p1;

  interrupt_handler dut (.*);
  always #5 clk = ~clk;

  function automatic exc_code_t expected();
    if (m_reset) return EXC_RESET;
    if (m_dabt) return EXC_DABT;
    if (m_fiq && !cpsr_bit6 && !id_stall_signal) return EXC_FIQ;
    if (m_irq && !cpsr_bit7 && !id_stall_signal) return EXC_IRQ;
    if (pref_abort_signal) return EXC_PABT;
    if (swi_signal) return EXC_SWI;
    if (und_signal) return EXC_UND;
    return EXC_NONE;
  endfunction

  initial begin
    {swi_signal, und_signal, pref_abort_signal, irq_signal, fiq_signal, id_stall_signal} = '0;
    {cpsr_bit7, cpsr_bit6, abort_latch_enable, data_abort_signal, int_flush, capture} = '0;
    m_irq = 0; m_fiq = 0; m_dabt = 0; m_reset = 1; m_p1 = EXC_RESET;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (interrupt_vector_p2 !== EXC_RESET || !reset_pending) begin
      failures++;
      $display("FAIL reset not pending after reset");
    end
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      swi_signal = ($urandom % 6) === 0; und_signal = ($urandom % 6) === 0;
      pref_abort_signal = ($urandom % 6) === 0;
      irq_signal = ($urandom % 4) === 0; fiq_signal = ($urandom % 5) === 0;
      id_stall_signal = ($urandom % 5) === 0;
      cpsr_bit7 = 1'($urandom); cpsr_bit6 = 1'($urandom);
      abort_latch_enable = 1'($urandom); data_abort_signal = ($urandom % 6) === 0;
      int_flush = ($urandom % 4) === 0; capture = 1'($urandom);
      #1;
      checks++;
      if (interrupt_vector_p2 !== expected() || interrupt_vector_p1 !== m_p1 ||
          data_abort_latched !== m_dabt || reset_pending !== m_reset) begin
        failures++;
        $display("FAIL step %0d: p2=%0d p1=%0d dabt=%b rst=%b expected %0d %0d %b %b", k,
                 interrupt_vector_p2, interrupt_vector_p1, data_abort_latched, reset_pending,
                 expected(), m_p1, m_dabt, m_reset);
      end
      @(posedge clk);
      if (capture) m_p1 = expected();
      m_irq = irq_signal; m_fiq = fiq_signal;
      if (int_flush) begin m_dabt = 0; m_reset = 0; end
      else if (abort_latch_enable && data_abort_signal) m_dabt = 1;
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
