// interrupt_handler: detects exceptions and encodes the winner in 3 bits.
//
// A chain of 2:1 muxes, each later stage overriding the earlier ones, gives
// the ARM priority order (lowest first): SWI 001, undefined 010, none 111,
// prefetch abort 100, IRQ 101, FIQ 110, data abort 011, reset 000.  IRQ and
// FIQ are sampled into registers every clock and count only while the
// matching CPSR mask bit (7 for IRQ, 6 for FIQ) is clear and the execute
// stage is not stalled (id_stall).  A data abort is held in a register that
// samples the abort input when abort_latch_enable is high; reset is a
// pending flag set by the asynchronous reset.  int_flush clears both at the
// end of the exception entry sequence.  interrupt_vector_p2 is the current
// code (combinational); interrupt_vector_p1 is a copy captured when capture
// is high and held while the entry sequence runs.  Mux order and codes are
// those of the design's block diagram; the registers are flip-flops on one
// clock rather than phase-1/phase-2 latches.
module interrupt_handler
  import arm7_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      swi_signal,
  input  logic      und_signal,
  input  logic      pref_abort_signal,
  input  logic      irq_signal,
  input  logic      fiq_signal,
  input  logic      id_stall_signal,
  input  logic      cpsr_bit7,
  input  logic      cpsr_bit6,
  input  logic      abort_latch_enable,
  input  logic      data_abort_signal,
  input  logic      int_flush,
  input  logic      capture,
  output exc_code_t interrupt_vector_p2,
  output exc_code_t interrupt_vector_p1,
  output logic      data_abort_latched,
  output logic      reset_pending
);
  logic irq_q, fiq_q;
  logic [2:0] t1, t2, t3, t4, t5, t6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q <= 1'b0;
      fiq_q <= 1'b0;
      data_abort_latched <= 1'b0;
      reset_pending <= 1'b1;
      interrupt_vector_p1 <= EXC_RESET;
    end else begin
      irq_q <= irq_signal;
      fiq_q <= fiq_signal;
      if (int_flush) begin
        data_abort_latched <= 1'b0;
        reset_pending <= 1'b0;
      end else if (abort_latch_enable && data_abort_signal) begin
        data_abort_latched <= 1'b1;
      end
      if (capture) interrupt_vector_p1 <= interrupt_vector_p2;
    end
  end

  always_comb begin
    t1 = swi_signal ? 3'b001 : 3'b010;
    t2 = (swi_signal || und_signal) ? t1 : 3'b111;
    t3 = pref_abort_signal ? 3'b100 : t2;
    t4 = (irq_q && !cpsr_bit7 && !id_stall_signal) ? 3'b101 : t3;
    t5 = (fiq_q && !cpsr_bit6 && !id_stall_signal) ? 3'b110 : t4;
    t6 = data_abort_latched ? 3'b011 : t5;
    interrupt_vector_p2 = exc_code_t'(reset_pending ? 3'b000 : t6);
  end
endmodule
