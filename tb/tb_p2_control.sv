// tb_p2_control: checks the phase-2 control unit (the Table 5 signals: read
// ports, B-bus, shifter and ALU-B sources, Booth and block-transfer
// controls, data-out register).  As in the phase-1 test, an instruction is
// decoded, a cycle kind and context are applied, and the defining signals of
// that cycle are compared with their intended values, e.g. an immediate
// operand goes to the B bus with the rotate amount from the instruction, a
// register-specified shift first reads Rs into the shift latch, a multiply
// loads the Booth unit from Rs and starts from Rn for MLA or zero for MUL,
// and exception entry computes PC + 0 and then LR - 4.  Combinational.
module tb_p2_control;
  import arm7_pkg::*;
  import arm_asm_pkg::*;
  cyc_t        kind;
  ctx_t        ctx;
  id_t         id;
  p2_t         p2;
  logic [31:0] instr;
  index_t      index;
  logic        swi_s, und_s;
  int          checks = 0, failures = 0;

  index_decoder u_ix (.instr(instr), .index(index), .swi(swi_s), .und(und_s));
  instr_decoder u_id (.instr(instr), .index(index), .swi(swi_s), .und(und_s), .pabt(1'b0), .id(id));
  p2_control dut (.*);

  task automatic apply(input cyc_t k, input logic [31:0] w, input exe_state_t st = EXE1);
    kind = k; instr = w;
    ctx = '0; ctx.cond_ok = 1'b1; ctx.state = st;
    ctx.exc_code = EXC_NONE;
    #1;
  endtask

  task automatic expect_true(input string what, input logic ok);
    checks++;
    if (ok !== 1'b1) begin
      failures++;
      $display("FAIL %s (kind %s, instr %h)", what, kind.name(), instr);
    end
  endtask

  initial begin
    kind = CY_NOP; ctx = '0; instr = '0;
    for (int r = 0; r < 20; r++) begin
      logic [3:0] rd, rn, rm, rs;
      rd = 4'($urandom % 15); rn = 4'($urandom % 15); rm = 4'($urandom % 15); rs = 4'($urandom % 15);
      apply(CY_DP, dpi(AL, ADD, 0, rd, rn, 8'($urandom), 4'($urandom)));
      expect_true("immediate operand", p2.bbus_sel === BB_IMM && p2.sval_sel === SV_ID && p2.shtype_sel &&
                  p2.idx_a_sel === A_RN);
      apply(CY_DP, dpr(AL, ADD, 0, rd, rn, rm, ASR, 5'($urandom)));
      expect_true("register operand", p2.bbus_sel === BB_REG && p2.idx_b_sel === B_RM && p2.sval_sel === SV_ID);
      apply(CY_DPRS1, dprs(AL, ADD, 0, rd, rn, rm, LSR, rs));
      expect_true("shift amount from rs", p2.idx_b_sel === B_RS && p2.bs_latch_in);
      apply(CY_DPRS2, dprs(AL, ADD, 0, rd, rn, rm, LSR, rs), EXE2);
      expect_true("shift by latched amount", p2.sval_sel === SV_LATCH && p2.idx_b_sel === B_RM);
      apply(CY_MUL1, mla(AL, 0, rd, rm, rs, rn));
      expect_true("mla loads booth, adds rn", p2.booth_load && p2.idx_a_sel === A_RS && p2.bs_sel === BS_BBUS);
      apply(CY_MUL1, mul(AL, 0, rd, rm, rs));
      expect_true("mul starts from zero", p2.booth_load && p2.bs_sel === BS_ZERO);
      apply(CY_MUL2, mul(AL, 0, rd, rm, rs), EXE2);
      expect_true("booth step", p2.sval_sel === SV_BOOTH && p2.idx_a_sel === A_RD && p2.idx_b_sel === B_RM &&
                  !p2.booth_load);
      apply(CY_SDT2, sdt(AL, 0, 0, 1, 1, 0, rd, rn, 12'($urandom)), EXE2);
      expect_true("store data from rd", p2.dataoutreg_in && p2.idx_b_sel === B_RD);
      apply(CY_SDT2, sdt(AL, 1, 1, 1, 1, 0, rd, rn, 12'($urandom)), EXE2);
      expect_true("load keeps byte offset", p2.loadbyte_enable && !p2.dataoutreg_in);
    end
    apply(CY_BR1, br(AL, 0, 32'h0, 32'h400));
    expect_true("branch offset", p2.idx_a_sel === A_PC && p2.bbus_sel === BB_IMM);
    apply(CY_LDR3, sdt(AL, 1, 0, 1, 1, 0, 1, 2, 12'd0), EXE3);
    expect_true("load data to b bus", p2.bbus_sel === BB_DIN);
    apply(CY_MRS, mrs(AL, 0, 1));
    expect_true("psr to b bus", p2.bbus_sel === BB_PSR);
    apply(CY_BDT1, bdt(AL, 1, 0, 1, 0, 1, 0, 16'h00F0));
    expect_true("block start address", !p2.reglist_mux_en && p2.bs_sel === BS_BDTWB && p2.imm_bdt);
    apply(CY_BDTX, bdt(AL, 0, 0, 1, 0, 1, 0, 16'h00F0), EXE3);
    expect_true("block transfer step", p2.bdt_advance && p2.reglist_mux_en && p2.dataoutreg_in);
    apply(CY_X1, dpi(AL, ADD, 0, 1, 2, 8'd3));
    expect_true("exception: pc + 0", p2.idx_a_sel === A_PC && p2.alub_sel === AB_ZERO);
    apply(CY_X2, dpi(AL, ADD, 0, 1, 2, 8'd3), EXE2);
    expect_true("exception: lr - 4", p2.idx_a_sel === A_LR && p2.alub_sel === AB_FOUR);
    apply(CY_XR, sdt(AL, 1, 0, 1, 1, 1, 2, 1, 12'd4));
    expect_true("base restore from latch", p2.alub_sel === AB_BASE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
