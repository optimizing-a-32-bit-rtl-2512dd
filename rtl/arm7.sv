// arm7: a 32-bit ARM7 (ARMv3 instruction set) integer core.
//
// Three pipeline stages: fetch (if_stage, with pre-decoding of the instruction
// class), decode (instr_decoder into the ID latch) and execute, where a
// one-hot cycle state machine (exe_fsm) and two control units (p1_control,
// p2_control) steer a datapath of a banked register file, a B-bus mux, a
// barrel shifter fed through the BS mux and shift-value mux, a Booth
// multiplier sequencer, and a Kogge-Stone ALU, plus the PSR block, the
// address register with its incrementer, and datain/dataout registers.  The
// condition checker, block-transfer offset and sequencer, and interrupt
// handler complete the main control unit.
//
// Memory interface (ARM7 style, one access per cycle): addr is the address
// register; nmreq low requests an access in the current cycle, nrw high means
// write, nbw low a byte.  Read data on din must be valid before the rising
// edge of mclk that ends the cycle; write data on dout is valid during the
// cycle and is to be stored at that edge.  abort, sampled at the end of an
// access, aborts it (prefetch abort on a fetch, data abort otherwise).
// nirq/nfiq are low-asserted interrupt requests; nreset is an asynchronous,
// low-asserted reset after which the core enters SVC mode and runs from 0.
// ntrans is low for user-mode (or forced user-mode) accesses.
//
// Timing in mclk cycles: data processing 1 (+1 with a register-specified
// shift), branch and writes to R15 3 (+ the instruction's own cycles), MRS/MSR
// 1, MUL/MLA 1 + one per Booth step (early termination), LDR 3, STR 3, SWP 4,
// LDM/STM n + 3, exception entry 3 (data abort 4).  Every instruction fetches
// the next one in its last cycle, so the PC seen as R15 is the address of the
// executing instruction plus 8.
//
// The design is built on one clock: each latch pair of the source design's
// two-phase scheme (one latch open in phase 1, the next in phase 2) is one
// edge-triggered register.  clock_gen still models the two-phase clock
// generator and brings phi1/phi2 out.  Block structure, mux codes and signal
// names follow the design; cycle timing and the per-cycle control values are
// this implementation's.
module arm7
  import arm7_pkg::*;
(
  input  logic        mclk,
  input  logic        nreset,
  output logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout,
  output logic        nmreq,
  output logic        nrw,
  output logic        nbw,
  output logic        ntrans,
  input  logic        abort,
  input  logic        nirq,
  input  logic        nfiq,
  output logic        phi1,
  output logic        phi2
);
  logic clk, rst_n;
  assign clk   = mclk;
  assign rst_n = nreset;

  clock_gen u_clkgen (.mclk(mclk), .phi1(phi1), .phi2(phi2));

  // ---------------- fetch / decode ----------------
  logic [31:0] if_instr;
  index_t      if_index;
  logic        if_swi, if_und, if_pabt, if_valid;
  id_t         id_next, id_q;
  logic        id_valid;
  p1_t         p1;
  p2_t         p2;

  if_stage u_if (
    .clk, .rst_n, .datain(din), .prefetch_abort(abort),
    .load(p1.if_load), .if_flush(p1.if_flush),
    .new_instruction(if_instr), .new_index(if_index),
    .swi_signal(if_swi), .und_signal(if_und), .pabt_signal(if_pabt), .valid(if_valid)
  );

  instr_decoder u_id (
    .instr(if_instr), .index(if_index), .swi(if_swi), .und(if_und), .pabt(if_pabt), .id(id_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q     <= '0;
      id_valid <= 1'b0;
    end else if (p1.id_load) begin
      id_q     <= id_next;
      id_valid <= if_valid;
    end
  end

  // ---------------- main control unit ----------------
  logic [31:0] cpsr, spsr, psr_out;
  logic        cond_passed, cond_ok;
  exc_code_t   vec_p2, vec_p1, exc_code;
  logic        dabt_latched, reset_pending;
  exe_state_t  state;
  logic        in_exc, dabt_seq, last;
  cyc_t        kind;
  ctx_t        ctx;
  logic [3:0]  mult_opcode;
  logic [7:0]  mult_shiftval;
  logic        mult_done;
  logic [3:0]  bdt_src, bdt_dst;
  logic        bdt_done, bdt_done_q;
  logic [4:0]  bdt_count, bdt_count_m1, bdt_addr_off;

  cond_checker u_cond (
    .cond(id_q.cond), .n(cpsr[31]), .z(cpsr[30]), .c(cpsr[29]), .v(cpsr[28]),
    .cond_passed(cond_passed)
  );
  assign cond_ok = cond_passed && id_valid;

  interrupt_handler u_int (
    .clk, .rst_n,
    .swi_signal(id_q.swi && cond_ok),
    .und_signal(id_q.und && cond_ok),
    .pref_abort_signal(id_q.pabt && id_valid),
    .irq_signal(!nirq), .fiq_signal(!nfiq),
    .id_stall_signal(!state[0] || in_exc),
    .cpsr_bit7(cpsr[7]), .cpsr_bit6(cpsr[6]),
    .abort_latch_enable(p1.abort_latch_enable),
    .data_abort_signal(abort),
    .int_flush(p1.int_flush),
    .capture(state[0]),
    .interrupt_vector_p2(vec_p2), .interrupt_vector_p1(vec_p1),
    .data_abort_latched(dabt_latched), .reset_pending(reset_pending)
  );
  assign exc_code = (state[0] && !in_exc) ? vec_p2 : vec_p1;

  always_comb begin
    ctx = '0;
    ctx.state      = state;
    ctx.in_exc     = in_exc;
    ctx.dabt_seq   = dabt_seq;
    ctx.exc_take   = (vec_p2 != EXC_NONE);
    ctx.cond_ok    = cond_ok;
    ctx.mult_done  = mult_done;
    ctx.bdt_done   = bdt_done;
    ctx.bdt_done_q = bdt_done_q;
    ctx.abort_seen = dabt_latched;
    ctx.abort_now  = abort;
    ctx.user_mode  = (cpsr[4:0] == MODE_USR);
    ctx.pc_in_list = id_q.reglist[15];
    ctx.exc_code   = exc_code;
  end

  exe_fsm u_fsm (
    .clk, .rst_n, .ctx(ctx), .id(id_q),
    .state(state), .in_exc(in_exc), .dabt_seq(dabt_seq), .kind(kind), .last(last)
  );
  p1_control u_p1 (.kind(kind), .ctx(ctx), .id(id_q), .p1(p1));
  p2_control u_p2 (.kind(kind), .ctx(ctx), .id(id_q), .p2(p2));

  bdt_offset u_bdt_off (
    .register_list(id_q.reglist), .prepost_bit(id_q.p_bit), .updown_bit(id_q.u_bit),
    .count(bdt_count), .count_minus1(bdt_count_m1), .address_offset(bdt_addr_off)
  );
  bdt_block u_bdt (
    .clk, .rst_n, .register_list(id_q.reglist),
    .reglist_mux_en(p2.reglist_mux_en), .advance(p2.bdt_advance),
    .bdt_register_source(bdt_src), .bdt_register_dest(bdt_dst),
    .bdt_done(bdt_done), .bdt_done_latched(bdt_done_q)
  );

  // ---------------- datapath ----------------
  logic [31:0] abus, bbus, rdata_b, pc, imm_bus;
  logic [31:0] bs_in, bs_latch, shift_out, alu_b, alu_out, base_latch;
  logic [31:0] areg, incr, exc_vec, datain_q, din_shaped, dout_q, dout_next;
  logic [7:0]  sval;
  logic [1:0]  shtype;
  logic        shift_c, alu_n, alu_z, alu_c, alu_v, alu_arith;
  logic [3:0]  raddr_a, raddr_b, waddr, alu_opcode;
  logic [4:0]  reg_mode, exc_new_mode;
  logic        bbit, incr_co, incr_cm;

  always_comb begin
    unique case (p1.regmode_sel)
      RM_EXC:  reg_mode = exc_new_mode;
      RM_USR:  reg_mode = MODE_USR;
      default: reg_mode = cpsr[4:0];
    endcase
    unique case (p2.idx_a_sel)
      A_RD:    raddr_a = id_q.rd;
      A_RS:    raddr_a = id_q.rs;
      A_RM:    raddr_a = id_q.rm;
      A_PC:    raddr_a = 4'd15;
      A_LR:    raddr_a = 4'd14;
      default: raddr_a = id_q.rn;
    endcase
    unique case (p2.idx_b_sel)
      B_RN:    raddr_b = id_q.rn;
      B_RD:    raddr_b = id_q.rd;
      B_RS:    raddr_b = id_q.rs;
      default: raddr_b = id_q.index[IX_BDT] ? bdt_src : id_q.rm;
    endcase
    unique case (p1.dest_sel)
      D_LR:    waddr = 4'd14;
      D_RN:    waddr = id_q.rn;
      D_BDT:   waddr = bdt_dst;
      default: waddr = id_q.rd;
    endcase
  end

  register_file u_rf (
    .clk, .rst_n, .rmode(reg_mode), .raddr_a(raddr_a), .raddr_b(raddr_b),
    .rdata_a(abus), .rdata_b(rdata_b),
    .we(p1.we_reg), .wmode(reg_mode), .waddr(waddr), .wdata(alu_out),
    .pc_we(p1.we_pc), .pc_in(p1.pcin_sel ? alu_out : incr), .pc_out(pc)
  );

  assign imm_bus = id_q.imm;
  assign bbit    = p2.bbit_sel && id_q.b_bit;

  load_byte u_lb (
    .clk, .rst_n, .loadbyte_enable(p2.loadbyte_enable), .addr_lsb(areg[1:0]),
    .bbit(bbit), .din(datain_q), .dout(din_shaped)
  );

  always_comb begin
    unique case (p2.bbus_sel)
      BB_PSR:  bbus = psr_out;
      BB_IMM:  bbus = imm_bus;
      BB_DIN:  bbus = din_shaped;
      default: bbus = rdata_b;
    endcase
    unique case (p2.bs_sel)
      BS_ZERO:  bs_in = 32'd0;
      BS_BDTWB: bs_in = {25'd0, (p2.imm_bdt ? bdt_addr_off : bdt_count), 2'b00};
      BS_LATCH: bs_in = bs_latch;
      default:  bs_in = bbus;
    endcase
    unique case (p2.sval_sel)
      SV_BOOTH: sval = mult_shiftval;
      SV_ID:    sval = id_q.sval;
      SV_LATCH: sval = bs_latch[7:0];
      default:  sval = 8'd0;
    endcase
    shtype = p2.shtype_sel ? id_q.shtype : SH_LSL;
  end

  barrel_shifter u_shift (
    .din(bs_in), .sval(sval), .shtype(shtype),
    .imm_shift(p2.sval_sel == SV_ID && id_q.imm_shift),
    .cin(cpsr[29]), .dout(shift_out), .cout(shift_c)
  );

  booth_multiplier u_booth (
    .clk, .rst_n, .mux_select(p2.booth_load), .multiplier(abus),
    .mult_opcode(mult_opcode), .mult_shiftval(mult_shiftval), .mult_done(mult_done)
  );

  always_comb begin
    unique case (p2.alub_sel)
      AB_FOUR: alu_b = 32'd4;
      AB_ZERO: alu_b = 32'd0;
      AB_BASE: alu_b = base_latch;
      default: alu_b = shift_out;
    endcase
    unique case (p1.aluop_sel)
      AO_MOV:  alu_opcode = OP_MOV;
      AO_ADD:  alu_opcode = OP_ADD;
      AO_SUB:  alu_opcode = OP_SUB;
      default: alu_opcode = id_q.index[IX_MULT] ? mult_opcode : id_q.opcode;
    endcase
  end

  alu u_alu (
    .a(abus), .b(alu_b), .opcode(alu_opcode), .cin(cpsr[29]),
    .shift_c(p2.alub_sel == AB_SHIFT ? shift_c : cpsr[29]), .vin(cpsr[28]),
    .result(alu_out), .n(alu_n), .z(alu_z), .c(alu_c), .v(alu_v), .arith(alu_arith)
  );

  psr_block u_psr (
    .clk, .rst_n, .psr_in(alu_out),
    .spsr_mode(kind == CY_X1 ? exc_new_mode : cpsr[4:0]),
    .storedata_tocpsr(p1.storedata_tocpsr), .storeflag_tocpsr(p1.storeflag_tocpsr),
    .storedata_tospsr(p1.storedata_tospsr), .storeflag_tospsr(p1.storeflag_tospsr),
    .inputmux_tocpsr(p1.inputmux_tocpsr), .inputmux_tospsr(p1.inputmux_tospsr),
    .output_select(p1.output_select),
    .cpsr_set(p1.cpsr_set), .alu_nzc({alu_n, alu_z, alu_c}),
    .vbit_in(p1.vbit_in), .alu_v(alu_v),
    .change_mode(p1.change_mode), .new_mode(exc_new_mode),
    .int_set(kind == CY_X1), .int_disabler(p1.int_disabler),
    .cpsr(cpsr), .spsr(spsr), .psr_out(psr_out)
  );

  exception_mux u_excmux (.code(exc_code), .vector(exc_vec), .mode(exc_new_mode));

  // address incrementer: a Kogge-Stone adder without carry-in
  kogge_stone_adder #(.WIDTH(32)) u_incr (
    .a(areg), .b(32'd4), .cin(1'b0), .sum(incr), .cout(incr_co), .c_msb(incr_cm)
  );

  // latches of the datapath (one register each)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      areg       <= '0;
      bs_latch   <= '0;
      base_latch <= '0;
      datain_q   <= '0;
      dout_q     <= '0;
    end else begin
      if (p1.address_reg_in) begin
        unique case (p1.addr_sel)
          AD_PC:   areg <= pc;
          AD_ALU:  areg <= alu_out;
          AD_EXC:  areg <= exc_vec;
          AD_ABUS: areg <= abus;
          default: areg <= incr;
        endcase
      end
      if (p2.bs_latch_in)   bs_latch   <= bbus;
      if (p1.base_latch_in) base_latch <= abus;
      if (p1.datain_reg_in) datain_q   <= din;
      dout_q <= dout_next;
    end
  end

  logic [31:0] dout_next_sb;
  store_byte u_sb (.bbit(bbit), .din(bbus), .dout(dout_next_sb));
  assign dout_next = p2.dataoutreg_in ? dout_next_sb : dout_q;

  assign addr   = areg;
  assign dout   = dout_next;
  assign nmreq  = p1.nmreq;
  assign nrw    = p1.nrw;
  assign nbw    = p1.nbw;
  assign ntrans = !(ctx.user_mode || p2.mode_out_sel);

  // a memory request always names the direction and width of a real access
  a_write_is_access: assert property (@(posedge clk) nrw |-> !nmreq);
endmodule
