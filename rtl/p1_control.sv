// p1_control: phase-1 control unit of the execute stage.
//
// Combinational.  From the kind of the current execute cycle (classify in
// arm7_pkg), the context flags and the decoded instruction it drives the
// signals the design assigns to phase 1: IF flush and latch loads, interrupt
// flush and abort-latch enable, all PSR writes and their input/output muxes,
// the destination index and register-bank mode, register and PC write
// enables, the datain and base latches, the ALU opcode mux, the address mux
// and address register enable, and the memory request outputs nMREQ, nRW and
// nBW (low-asserted).  A cycle that ends the instruction fetches: the word at
// the address register enters the IF stage, PC and address register take the
// incremented address, and the ID latch takes the next instruction.
// Signal names and mux codes follow the design's table of phase-1 outputs;
// the value of each signal in each cycle is this implementation's.
module p1_control
  import arm7_pkg::*;
(
  input  cyc_t kind,
  input  ctx_t ctx,
  input  id_t  id,
  output p1_t  p1
);
  logic last;

  always_comb begin
    last = cycle_last(kind, ctx, id);
    p1 = '0;
    p1.dest_sel    = D_RD;
    p1.regmode_sel = RM_PSR;
    p1.aluop_sel   = AO_ID;
    p1.addr_sel    = AD_INC;
    p1.nmreq       = 1'b1;
    p1.nrw         = 1'b0;
    p1.nbw         = 1'b1;

    unique case (kind)
      CY_DP, CY_DPRS2: begin
        p1.aluop_sel = AO_ID;
        if (id.dreg_pc && dp_writes(id)) begin
          p1.if_flush       = 1'b1;
          p1.address_reg_in = 1'b1;
          p1.addr_sel       = AD_ALU;
          if (id.s_bit) begin                       // MOVS pc, ... : CPSR <- SPSR
            p1.storedata_tocpsr = 1'b1;
            p1.inputmux_tocpsr  = 1'b1;
          end
        end else begin
          p1.we_reg   = dp_writes(id);
          p1.cpsr_set = id.s_bit;
          p1.vbit_in  = id.s_bit && (id.opcode inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'hA, 4'hB});
        end
      end
      CY_BR1: begin
        p1.if_flush       = 1'b1;
        p1.aluop_sel      = AO_ADD;
        p1.address_reg_in = 1'b1;
        p1.addr_sel       = AD_ALU;
      end
      CY_REFILL1: begin
        if (id.index[IX_BBL] && id.link) begin      // R14 <- PC - 4
          p1.aluop_sel = AO_SUB;
          p1.we_reg    = 1'b1;
          p1.dest_sel  = D_LR;
        end
      end
      CY_MRS: begin
        p1.output_select = id.psr_r;
        p1.aluop_sel     = AO_MOV;
        p1.we_reg        = 1'b1;
      end
      CY_MSR: begin
        p1.aluop_sel        = AO_MOV;
        p1.storedata_tocpsr = !id.psr_r;
        p1.storedata_tospsr = id.psr_r;
      end
      CY_MFRI: begin
        p1.aluop_sel        = AO_MOV;
        p1.storeflag_tocpsr = !id.psr_r;
        p1.storeflag_tospsr = id.psr_r;
      end
      CY_MUL1: begin
        p1.aluop_sel = AO_MOV;                      // Rd <- Rn (MLA) or 0
        p1.we_reg    = 1'b1;
      end
      CY_MUL2: begin
        p1.aluop_sel = AO_ID;                       // Booth add/subtract
        p1.we_reg    = 1'b1;
        p1.cpsr_set  = id.s_bit && ctx.mult_done;
      end
      CY_SDT1: begin
        p1.aluop_sel      = id.u_bit ? AO_ADD : AO_SUB;
        p1.address_reg_in = 1'b1;
        p1.addr_sel       = id.p_bit ? AD_ALU : AD_ABUS;
        p1.we_reg         = id.w_bit || !id.p_bit;  // base write-back
        p1.dest_sel       = D_RN;
        p1.base_latch_in  = 1'b1;
      end
      CY_SDT2: begin
        p1.nmreq              = 1'b0;
        p1.nrw                = !id.l_bit;
        p1.nbw                = !id.b_bit;
        p1.datain_reg_in      = id.l_bit;
        p1.abort_latch_enable = 1'b1;
        p1.address_reg_in     = 1'b1;
        p1.addr_sel           = AD_PC;
      end
      CY_LDR3, CY_SWP4: begin
        p1.aluop_sel = AO_MOV;
        p1.dest_sel  = D_RD;
        if (kind == CY_LDR3 && id.dreg_pc) begin
          p1.if_flush       = 1'b1;
          p1.address_reg_in = 1'b1;
          p1.addr_sel       = AD_ALU;
        end else begin
          p1.we_reg = 1'b1;
        end
      end
      CY_SWP1: begin
        p1.aluop_sel      = AO_ADD;                 // Rn + 0
        p1.address_reg_in = 1'b1;
        p1.addr_sel       = AD_ALU;
        p1.base_latch_in  = 1'b1;
      end
      CY_SWP2: begin
        p1.nmreq              = 1'b0;
        p1.nrw                = 1'b0;
        p1.nbw                = !id.b_bit;
        p1.datain_reg_in      = 1'b1;
        p1.abort_latch_enable = 1'b1;
      end
      CY_SWP3: begin
        p1.nmreq              = 1'b0;
        p1.nrw                = 1'b1;
        p1.nbw                = !id.b_bit;
        p1.abort_latch_enable = 1'b1;
        p1.address_reg_in     = 1'b1;
        p1.addr_sel           = AD_PC;
      end
      CY_BDT1: begin
        p1.aluop_sel      = id.u_bit ? AO_ADD : AO_SUB;
        p1.address_reg_in = 1'b1;
        p1.addr_sel       = AD_ALU;
        p1.base_latch_in  = 1'b1;
      end
      CY_BDTX: begin
        p1.nmreq              = 1'b0;
        p1.nrw                = !id.l_bit;
        p1.datain_reg_in      = id.l_bit;
        p1.abort_latch_enable = 1'b1;
        p1.address_reg_in     = 1'b1;
        p1.addr_sel           = ctx.bdt_done ? AD_PC : AD_INC;
        p1.regmode_sel        = (id.psr_r && !(id.l_bit && ctx.pc_in_list)) ? RM_USR : RM_PSR;
        if (ctx.state[1]) begin                     // first transfer: base write-back
          p1.aluop_sel = id.u_bit ? AO_ADD : AO_SUB;
          p1.we_reg    = id.w_bit;
          p1.dest_sel  = D_RN;
        end else if (id.l_bit) begin                // write the previous load
          p1.aluop_sel = AO_MOV;
          p1.we_reg    = !ctx.abort_seen;
          p1.dest_sel  = D_BDT;
        end
      end
      CY_LDM4: begin
        p1.aluop_sel   = AO_MOV;
        p1.dest_sel    = D_BDT;
        p1.regmode_sel = (id.psr_r && !ctx.pc_in_list) ? RM_USR : RM_PSR;
        if (ctx.pc_in_list) begin
          p1.if_flush       = 1'b1;
          p1.address_reg_in = 1'b1;
          p1.addr_sel       = AD_ALU;
          if (id.psr_r) begin
            p1.storedata_tocpsr = 1'b1;
            p1.inputmux_tocpsr  = 1'b1;
          end
        end else begin
          p1.we_reg = 1'b1;
        end
      end
      CY_XR: begin                                  // Rn <- base latch
        p1.aluop_sel = AO_MOV;
        p1.we_reg    = 1'b1;
        p1.dest_sel  = D_RN;
      end
      CY_X1: begin                                  // R14_exc <- PC, SPSR_exc <- CPSR
        p1.if_flush         = 1'b1;
        p1.aluop_sel        = AO_ADD;
        p1.we_reg           = 1'b1;
        p1.dest_sel         = D_LR;
        p1.regmode_sel      = RM_EXC;
        p1.storedata_tospsr = 1'b1;
        p1.inputmux_tospsr  = 1'b1;
        p1.change_mode      = 1'b1;
        p1.int_disabler     = (ctx.exc_code == EXC_RESET) || (ctx.exc_code == EXC_FIQ);
        p1.address_reg_in   = 1'b1;
        p1.addr_sel         = AD_EXC;
      end
      CY_X2: begin                                  // R14 <- R14 - 4 (not for data abort)
        if (ctx.exc_code != EXC_DABT) begin
          p1.aluop_sel = AO_SUB;
          p1.we_reg    = 1'b1;
          p1.dest_sel  = D_LR;
        end
      end
      CY_X3: p1.int_flush = 1'b1;
      default: ;
    endcase

    if (last || kind == CY_REFILL1 || kind == CY_X2) begin   // instruction fetch
      p1.if_load        = 1'b1;
      p1.nmreq          = 1'b0;
      p1.nrw            = 1'b0;
      p1.nbw            = 1'b1;
      p1.address_reg_in = 1'b1;
      p1.addr_sel       = AD_INC;
      p1.we_pc          = 1'b1;
      p1.pcin_sel       = 1'b0;
    end
    p1.id_load = last;
  end
endmodule
