// p2_control: phase-2 control unit of the execute stage.
//
// Combinational.  From the kind of the current execute cycle, the context
// flags and the decoded instruction it drives the operand side of the
// datapath, the signals the design assigns to phase 2: Booth multiplier load,
// BDT register-list mux and list advance, forced user-mode transfer (mode_out_sel,
// post-indexed transfers with write-back), the register indices of operands
// A and B, the dataout register and load-byte enables, the byte-select of the
// load-byte block, and the B-bus, BS, shift-value, ALU-operand and shift-type
// muxes, and the BS latch enable.  Signal names and mux codes follow the
// design's table of phase-2 outputs; the value of each signal in each cycle
// is this implementation's.
module p2_control
  import arm7_pkg::*;
(
  input  cyc_t kind,
  input  ctx_t ctx,
  input  id_t  id,
  output p2_t  p2
);
  always_comb begin
    p2 = '0;
    p2.reglist_mux_en = 1'b1;
    p2.idx_a_sel  = A_RN;
    p2.idx_b_sel  = B_RM;
    p2.bbus_sel   = BB_REG;
    p2.bs_sel     = BS_BBUS;
    p2.sval_sel   = SV_ZERO;
    p2.alub_sel   = AB_SHIFT;
    p2.shtype_sel = 1'b0;

    unique case (kind)
      CY_DP: begin
        p2.bbus_sel   = id.i_bit ? BB_IMM : BB_REG;
        p2.sval_sel   = SV_ID;
        p2.shtype_sel = 1'b1;
      end
      CY_DPRS1: begin
        p2.idx_b_sel   = B_RS;
        p2.bs_latch_in = 1'b1;
      end
      CY_DPRS2: begin
        p2.sval_sel   = SV_LATCH;
        p2.shtype_sel = 1'b1;
      end
      CY_BR1: begin                                 // PC + (offset << 2)
        p2.idx_a_sel  = A_PC;
        p2.bbus_sel   = BB_IMM;
        p2.sval_sel   = SV_ID;
        p2.shtype_sel = 1'b1;
      end
      CY_REFILL1: begin
        p2.idx_a_sel = A_PC;
        p2.alub_sel  = AB_FOUR;
      end
      CY_MRS: p2.bbus_sel = BB_PSR;
      CY_MSR: p2.bbus_sel = BB_REG;
      CY_MFRI: begin
        p2.bbus_sel   = id.i_bit ? BB_IMM : BB_REG;
        p2.sval_sel   = id.i_bit ? SV_ID : SV_ZERO;
        p2.shtype_sel = 1'b1;
      end
      CY_MUL1: begin
        p2.idx_a_sel  = A_RS;
        p2.booth_load = 1'b1;
        p2.idx_b_sel  = B_RN;
        p2.bs_sel     = id.acc ? BS_BBUS : BS_ZERO;
      end
      CY_MUL2: begin
        p2.idx_a_sel = A_RD;
        p2.idx_b_sel = B_RM;
        p2.sval_sel  = SV_BOOTH;
      end
      CY_SDT1: begin
        p2.bbus_sel   = id.i_bit ? BB_REG : BB_IMM;
        p2.sval_sel   = SV_ID;
        p2.shtype_sel = 1'b1;
      end
      CY_SDT2: begin
        p2.mode_out_sel    = !id.p_bit && id.w_bit;
        p2.idx_b_sel       = B_RD;
        p2.dataoutreg_in   = !id.l_bit;
        p2.loadbyte_enable = id.l_bit;
        p2.bbit_sel        = 1'b1;
      end
      CY_LDR3, CY_SWP4: begin
        p2.bbus_sel = BB_DIN;
        p2.bbit_sel = 1'b1;
      end
      CY_SWP1: begin
        p2.alub_sel = AB_ZERO;
      end
      CY_SWP2: begin
        p2.idx_b_sel       = B_RM;
        p2.dataoutreg_in   = 1'b1;
        p2.loadbyte_enable = 1'b1;
        p2.bbit_sel        = 1'b1;
      end
      CY_BDT1: begin                                // Rn +- 4 * start offset
        p2.reglist_mux_en = 1'b0;
        p2.bs_sel         = BS_BDTWB;
        p2.imm_bdt        = 1'b1;
      end
      CY_BDTX: begin
        p2.bdt_advance   = 1'b1;
        p2.idx_b_sel     = B_RM;                    // register chosen by the BDT block
        p2.dataoutreg_in = !id.l_bit;
        if (ctx.state[1]) begin                     // Rn +- 4 * count
          p2.bs_sel = BS_BDTWB;
        end else if (id.l_bit) begin
          p2.bbus_sel = BB_DIN;
        end
      end
      CY_LDM4: p2.bbus_sel = BB_DIN;
      CY_XR:   p2.alub_sel = AB_BASE;
      CY_X1: begin
        p2.idx_a_sel = A_PC;
        p2.alub_sel  = AB_ZERO;
      end
      CY_X2: begin
        p2.idx_a_sel = A_LR;
        p2.alub_sel  = AB_FOUR;
      end
      default: ;
    endcase
  end
endmodule
