// arm7_pkg: types and constants shared by the ARM7 core.
//
// Holds the one-hot instruction index (bit positions follow the order of the
// instruction classes in the index decoder truth table), the one-hot execute
// cycle states EXE1..EXE6, the 3-bit exception codes of the interrupt handler,
// processor modes, ALU opcodes, and the selector encodings of the multiplexers
// driven by the phase-1 and phase-2 control units.  Mux encodings that the
// source design prints (address mux, B-bus mux, BS mux, sval mux, ALU mux,
// ALU-opcode mux, destination index mux, register mode mux) keep its codes;
// the operand-A/B index selectors are widened to name each register field
// separately, which is this design's own choice.
package arm7_pkg;

  // ---------------- instruction index (one-hot, 10 bits) ----------------
  localparam int IX_MRS  = 0;  // move PSR to register
  localparam int IX_MFRI = 1;  // move register/immediate to PSR flags only
  localparam int IX_MSR  = 2;  // move register to whole PSR
  localparam int IX_DPIS = 3;  // data processing, immediate or immediate-shift operand
  localparam int IX_DPRS = 4;  // data processing, register-specified shift
  localparam int IX_MULT = 5;  // MUL / MLA
  localparam int IX_SWAP = 6;  // SWP / SWPB
  localparam int IX_SDT  = 7;  // LDR / STR
  localparam int IX_BDT  = 8;  // LDM / STM
  localparam int IX_BBL  = 9;  // B / BL
  localparam int NIDX    = 10;
  typedef logic [NIDX-1:0] index_t;

  // ---------------- execute cycle states (one-hot) ----------------
  localparam int NEXE = 6;
  typedef logic [NEXE-1:0] exe_state_t;
  localparam exe_state_t EXE1 = 6'b000001;
  localparam exe_state_t EXE2 = 6'b000010;
  localparam exe_state_t EXE3 = 6'b000100;
  localparam exe_state_t EXE4 = 6'b001000;
  localparam exe_state_t EXE5 = 6'b010000;
  localparam exe_state_t EXE6 = 6'b100000;

  // ---------------- exception codes (interrupt handler, Fig. 5) ----------------
  typedef enum logic [2:0] {
    EXC_RESET = 3'b000,
    EXC_SWI   = 3'b001,
    EXC_UND   = 3'b010,
    EXC_DABT  = 3'b011,
    EXC_PABT  = 3'b100,
    EXC_IRQ   = 3'b101,
    EXC_FIQ   = 3'b110,
    EXC_NONE  = 3'b111
  } exc_code_t;

  // ---------------- processor modes ----------------
  localparam logic [4:0] MODE_USR = 5'b10000;
  localparam logic [4:0] MODE_FIQ = 5'b10001;
  localparam logic [4:0] MODE_IRQ = 5'b10010;
  localparam logic [4:0] MODE_SVC = 5'b10011;
  localparam logic [4:0] MODE_ABT = 5'b10111;
  localparam logic [4:0] MODE_UND = 5'b11011;

  // ---------------- ALU opcodes (ARM data-processing encoding) ----------------
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_t;

  // shift types
  localparam logic [1:0] SH_LSL = 2'b00;
  localparam logic [1:0] SH_LSR = 2'b01;
  localparam logic [1:0] SH_ASR = 2'b10;
  localparam logic [1:0] SH_ROR = 2'b11;

  // ---------------- mux selector encodings ----------------
  // operand-A register index
  typedef enum logic [2:0] {A_RN = 3'd0, A_RD = 3'd1, A_RS = 3'd2, A_RM = 3'd3,
                            A_PC = 3'd4, A_LR = 3'd5} idx_a_sel_t;
  // operand-B register index
  typedef enum logic [1:0] {B_RM = 2'd0, B_RN = 2'd1, B_RD = 2'd2, B_RS = 2'd3} idx_b_sel_t;
  // destination register index (Table 4 index_dest_mux_sel)
  typedef enum logic [1:0] {D_RD = 2'b00, D_LR = 2'b01, D_RN = 2'b10, D_BDT = 2'b11} dest_sel_t;
  // register bank mode (Table 4 Reg_mode_mux_sel)
  typedef enum logic [1:0] {RM_PSR = 2'b00, RM_EXC = 2'b01, RM_USR = 2'b10} regmode_sel_t;
  // ALU opcode mux (Table 4 alu_opcode_mux_sel)
  typedef enum logic [1:0] {AO_MOV = 2'b00, AO_ADD = 2'b01, AO_SUB = 2'b10, AO_ID = 2'b11} aluop_sel_t;
  // address mux (Table 4 address_mux_sel, plus the A bus for post-indexed transfers)
  typedef enum logic [2:0] {AD_INC = 3'b000, AD_PC = 3'b001, AD_ALU = 3'b010, AD_EXC = 3'b011,
                            AD_ABUS = 3'b100} addr_sel_t;
  // B-bus mux (Table 5 Bbus_mux_sel)
  typedef enum logic [1:0] {BB_REG = 2'b00, BB_PSR = 2'b01, BB_IMM = 2'b10, BB_DIN = 2'b11} bbus_sel_t;
  // barrel-shifter input mux (Table 5 BS_mux_sel)
  typedef enum logic [1:0] {BS_ZERO = 2'b00, BS_BDTWB = 2'b01, BS_BBUS = 2'b10, BS_LATCH = 2'b11} bs_sel_t;
  // shift-value mux (Table 5 sval_mux_sel)
  typedef enum logic [1:0] {SV_ZERO = 2'b00, SV_BOOTH = 2'b01, SV_ID = 2'b10, SV_LATCH = 2'b11} sval_sel_t;
  // ALU operand-B mux (Table 5 ALU_mux_sel)
  typedef enum logic [1:0] {AB_SHIFT = 2'b00, AB_FOUR = 2'b01, AB_ZERO = 2'b10, AB_BASE = 2'b11} alub_sel_t;

  // ---------------- decoded instruction (ID latch contents) ----------------
  typedef struct packed {
    logic [31:0] instr;
    index_t      index;
    logic        swi;
    logic        und;
    logic        pabt;
    logic [3:0]  cond;
    logic [3:0]  rd, rn, rs, rm;
    logic [3:0]  opcode;
    logic        s_bit;
    logic        i_bit;      // bit 25
    logic        p_bit, u_bit, b_bit, w_bit, l_bit;  // bits 24..20
    logic        psr_r;      // bit 22: SPSR selected (MRS/MSR)
    logic        acc;        // bit 21: MLA
    logic        link;       // bit 24: BL
    logic [31:0] imm;        // immediate before shifting
    logic [7:0]  sval;       // shift amount from the instruction
    logic [1:0]  shtype;     // shift type
    logic        imm_shift;  // shift amount is an instruction immediate
    logic [15:0] reglist;
    logic        dreg_pc;    // destination is R15
  } id_t;

  // ---------------- control context for the execute-stage control units ----------------
  typedef struct packed {
    exe_state_t  state;
    logic        in_exc;      // exception entry sequence running
    logic        dabt_seq;    // the sequence began with a base-register restore
    logic        exc_take;    // an exception replaces the instruction now in EXE1
    logic        cond_ok;
    logic        mult_done;
    logic        bdt_done;
    logic        bdt_done_q;
    logic        abort_seen;  // a data abort has been latched for this instruction
    logic        abort_now;   // the abort input is high in this data access cycle
    logic        user_mode;
    logic        pc_in_list;
    exc_code_t   exc_code;    // code of the exception being entered
  } ctx_t;

  // phase-1 control signals (Table 4)
  typedef struct packed {
    logic         if_flush;
    logic         if_load;        // IF latch accepts the fetched word
    logic         id_load;        // ID latch accepts the decoded instruction (instruction ends)
    logic         int_flush;
    logic         abort_latch_enable;
    logic         int_disabler;
    logic         vbit_in;
    logic         cpsr_set;
    logic         storedata_tocpsr;
    logic         storedata_tospsr;
    logic         storeflag_tocpsr;
    logic         storeflag_tospsr;
    logic         change_mode;
    logic         inputmux_tocpsr;
    logic         inputmux_tospsr;
    logic         output_select;
    dest_sel_t    dest_sel;
    regmode_sel_t regmode_sel;
    logic         we_reg;
    logic         we_pc;
    logic         pcin_sel;       // 0: incrementer, 1: ALU
    logic         datain_reg_in;
    logic         base_latch_in;
    aluop_sel_t   aluop_sel;
    addr_sel_t    addr_sel;
    logic         address_reg_in;
    logic         nmreq;
    logic         nrw;
    logic         nbw;
  } p1_t;

  // phase-2 control signals (Table 5)
  typedef struct packed {
    logic        booth_load;
    logic        reglist_mux_en;
    logic        bdt_advance;
    logic        mode_out_sel;
    idx_a_sel_t  idx_a_sel;
    idx_b_sel_t  idx_b_sel;
    logic        dataoutreg_in;
    logic        loadbyte_enable;
    logic        bbit_sel;
    bbus_sel_t   bbus_sel;
    bs_sel_t     bs_sel;
    sval_sel_t   sval_sel;
    alub_sel_t   alub_sel;
    logic        shtype_sel;      // 0: LSL, 1: shift type from ID
    logic        bs_latch_in;
    logic        imm_bdt;         // immediate is the BDT start-address offset
  } p2_t;


  // ---------------- kind of work done in one execute cycle ----------------
  // Derived from the one-hot state, the instruction index and a few flags;
  // shared by the execute cycle FSM and both control units.
  typedef enum logic [4:0] {
    CY_NOP, CY_DP, CY_DPRS1, CY_DPRS2, CY_BR1, CY_REFILL1, CY_REFILL2,
    CY_MRS, CY_MSR, CY_MFRI, CY_MUL1, CY_MUL2,
    CY_SDT1, CY_SDT2, CY_LDR3, CY_FETCHLAST,
    CY_SWP1, CY_SWP2, CY_SWP3, CY_SWP4,
    CY_BDT1, CY_BDTX, CY_LDM4,
    CY_XR, CY_X1, CY_X2, CY_X3
  } cyc_t;

  function automatic cyc_t classify(ctx_t c, id_t d);
    exe_state_t s;
    s = c.state;
    if (c.in_exc) begin
      if (c.dabt_seq)
        unique case (1'b1)
          s[0]:    return CY_XR;
          s[1]:    return CY_X1;
          s[2]:    return CY_X2;
          default: return CY_X3;
        endcase
      else
        return s[1] ? CY_X2 : CY_X3;
    end
    if (s[0] && c.exc_take) return CY_X1;
    if (s[0] && !c.cond_ok) return CY_NOP;
    unique case (1'b1)
      d.index[IX_MRS]:  return CY_MRS;
      d.index[IX_MSR]:  return CY_MSR;
      d.index[IX_MFRI]: return CY_MFRI;
      d.index[IX_DPIS]: return s[0] ? CY_DP : (s[1] ? CY_REFILL1 : CY_REFILL2);
      d.index[IX_DPRS]: return s[0] ? CY_DPRS1 : (s[1] ? CY_DPRS2 : (s[2] ? CY_REFILL1 : CY_REFILL2));
      d.index[IX_BBL]:  return s[0] ? CY_BR1 : (s[1] ? CY_REFILL1 : CY_REFILL2);
      d.index[IX_MULT]: return s[0] ? CY_MUL1 : CY_MUL2;
      d.index[IX_SDT]:
        unique case (1'b1)
          s[0]:    return CY_SDT1;
          s[1]:    return CY_SDT2;
          s[2]:    return d.l_bit ? CY_LDR3 : CY_FETCHLAST;
          s[3]:    return CY_REFILL1;
          default: return CY_REFILL2;
        endcase
      d.index[IX_SWAP]:
        unique case (1'b1)
          s[0]:    return CY_SWP1;
          s[1]:    return CY_SWP2;
          s[2]:    return CY_SWP3;
          default: return CY_SWP4;
        endcase
      d.index[IX_BDT]:
        unique case (1'b1)
          s[0]:       return CY_BDT1;
          s[1], s[2]: return CY_BDTX;
          s[3]:       return d.l_bit ? CY_LDM4 : CY_FETCHLAST;
          s[4]:       return CY_REFILL1;
          default:    return CY_REFILL2;
        endcase
      default: return CY_NOP;   // no valid instruction
    endcase
  endfunction

  // data processing operation that writes its destination (not TST/TEQ/CMP/CMN)
  function automatic logic dp_writes(id_t d);
    return d.opcode[3:2] != 2'b10;
  endfunction

  // the cycle ends the instruction: fetch and move the next one into execute
  function automatic logic cycle_last(cyc_t k, ctx_t c, id_t d);
    unique case (k)
      CY_NOP, CY_REFILL2, CY_MRS, CY_MSR, CY_MFRI, CY_FETCHLAST, CY_SWP4, CY_X3: return 1'b1;
      CY_DP, CY_DPRS2: return !(d.dreg_pc && dp_writes(d));
      CY_LDR3:         return !d.dreg_pc;
      CY_LDM4:         return !c.pc_in_list;
      CY_MUL2:         return c.mult_done;
      default:         return 1'b0;
    endcase
  endfunction

  // exception vector address for a code
  function automatic logic [31:0] exc_vector(exc_code_t c);
    unique case (c)
      EXC_RESET: return 32'h0000_0000;
      EXC_UND:   return 32'h0000_0004;
      EXC_SWI:   return 32'h0000_0008;
      EXC_PABT:  return 32'h0000_000C;
      EXC_DABT:  return 32'h0000_0010;
      EXC_IRQ:   return 32'h0000_0018;
      EXC_FIQ:   return 32'h0000_001C;
      default:   return 32'h0000_0000;
    endcase
  endfunction

  // processor mode entered for an exception code
  function automatic logic [4:0] exc_mode(exc_code_t c);
    unique case (c)
      EXC_RESET, EXC_SWI: return MODE_SVC;
      EXC_UND:            return MODE_UND;
      EXC_DABT, EXC_PABT: return MODE_ABT;
      EXC_IRQ:            return MODE_IRQ;
      EXC_FIQ:            return MODE_FIQ;
      default:            return MODE_USR;
    endcase
  endfunction

endpackage
