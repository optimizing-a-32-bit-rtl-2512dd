// tb_arm7: end-to-end test of the ARM7 core at its default configuration.
//
// A 64 KiB memory model answers every request in the same cycle (reads are
// combinational, writes happen at the rising edge that ends the cycle).
// Addresses 0x10000-0x2FFFF do not exist and return abort.  Stores to 0x8F00
// and 0x8F08 raise nIRQ and nFIQ, stores to 0x8F04 and 0x8F0C drop them, and a
// store to 0x8FFC ends the program.  The program, built with the encoders of
// arm_asm_pkg, runs small versions of the benchmark kernels (GCD by repeated
// subtraction, factorial by repeated multiplication, integer cube root,
// string compare, also with strings that differ in their first byte, block
// copy of one 8-word block and of three 4-word blocks in a loop) and then
// exercises register-specified shifts,
// RRX, scaled register offsets, swap, subroutine call and return, loads into
// the PC, SWI, an undefined instruction, PSR transfers, IRQ, FIQ, data aborts
// on LDR, on LDR with write-back and on LDM, and a prefetch abort.  Results
// are stored to memory and compared with values computed here.  The test
// also counts how often each mechanism of the core (branch refill,
// register-shift cycle, failed condition, Booth early termination, block
// transfer, swap, each exception, exception return, ...) happened and fails
// any that never did.
module tb_arm7;
  import arm_asm_pkg::*;
  import arm7_pkg::*;

  logic        mclk = 1'b0, nreset = 1'b1;
  logic [31:0] addr, din, dout;
  logic        nmreq, nrw, nbw, ntrans, abort, nirq = 1'b1, nfiq = 1'b1, phi1, phi2;
  logic [31:0] mem [16384];
  int          checks = 0, failures = 0, cycles = 0;
  bit          done = 1'b0;
  bit          trace;
  initial trace = $test$plusargs("trace");

  arm7 dut (.*);

  always #5 mclk = ~mclk;

  // ---------------- memory model ----------------
  assign abort = !nmreq && (addr >= 32'h0001_0000) && (addr < 32'h0003_0000);
  assign din   = (addr < 32'h0001_0000) ? mem[addr[15:2]] : 32'hDEAD_BEEF;

  always @(posedge mclk) begin
    if (nreset && !nmreq && nrw && !abort && addr < 32'h0001_0000) begin
      if (!nbw) mem[addr[15:2]][8*addr[1:0] +: 8] <= dout[8*addr[1:0] +: 8];
      else      mem[addr[15:2]] <= dout;
      unique case (addr)
        32'h8F00: nirq <= 1'b0;
        32'h8F04: nirq <= 1'b1;
        32'h8F08: nfiq <= 1'b0;
        32'h8F0C: nfiq <= 1'b1;
        32'h8FFC: done <= 1'b1;
        default: ;
      endcase
    end
  end

  // ---------------- program ----------------
  logic [31:0] pc;
  task automatic put(input logic [31:0] w);
    mem[pc[15:2]] = w;
    pc += 4;
  endtask

  localparam logic [31:0] RES = 32'h8000;
  int unsigned n_refill, n_dprs, n_condfail, n_early, n_full16, n_bdtx, n_wb, n_swp,
               n_ldrpc, n_ldm_pc, n_usrbank, n_ret, n_byte, n_xr, n_msr, n_mrs;
  int unsigned n_exc [8];

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    while (a !== b) if (a > b) a -= b; else b -= a;
    return a;
  endfunction

  initial begin
    logic [31:0] l1, l2, x;
    for (int i = 0; i < 16384; i++) mem[i] = 32'h0;
    // data
    for (int i = 0; i < 8; i++) mem[(32'h7200 >> 2) + i] = 32'h1111_0000 * (i + 1) + i;
    for (int i = 0; i < 4; i++) mem[(32'h7300 >> 2) + 8 + i] = 32'hA5A5_A5A5;
    mem[32'h7000 >> 2] = 32'h6463_6261;  // "abcd"
    mem[(32'h7000 >> 2) + 1] = 32'h0000_0065;  // "e\0"
    mem[32'h7100 >> 2] = 32'h6463_6261;  // "abcd"
    mem[(32'h7100 >> 2) + 1] = 32'h0000_0066;  // "f\0"
    mem[32'h7400 >> 2] = 32'h11;
    mem[32'h7800 >> 2] = 32'h0063_6261;  // "abc"
    mem[32'h7900 >> 2] = 32'h0063_6262;  // "bbc"
    for (int i = 0; i < 12; i++) mem[(32'h7600 >> 2) + i] = 32'hC0DE_0000 + 32'(i * 7);
    mem[(32'h7700 >> 2) + 12] = 32'hA5A5_A5A5;

    // vectors
    pc = 0;
    put(br(AL, 0, 32'h00, 32'h100));
    put(br(AL, 0, 32'h04, 32'h400));
    put(br(AL, 0, 32'h08, 32'h480));
    put(br(AL, 0, 32'h0C, 32'h500));
    put(br(AL, 0, 32'h10, 32'h580));
    put(dpr(AL, MOV, 0, 0, 0, 0));
    put(br(AL, 0, 32'h18, 32'h600));
    put(br(AL, 0, 32'h1C, 32'h680));
    // handlers
    pc = 32'h400;                                          // undefined
    put(dpi(AL, ADD, 0, 11, 11, 8'h01, 4'd12));
    put(dpr(AL, MOV, 1, 15, 0, 14));
    pc = 32'h480;                                          // SWI
    put(bdt(AL, 0, 1, 0, 0, 1, 13, 16'h4000));            // STMDB sp!, {lr}
    put(dpi(AL, ADD, 0, 11, 11, 8'h01));
    put(dpi(AL, ADD, 0, 0, 10, 8'h80));
    put(bdt(AL, 0, 0, 1, 1, 0, 0, 16'h2000));             // STMIA r0, {r13}^ (user r13)
    put(bdt(AL, 1, 0, 1, 1, 1, 13, 16'h8000));            // LDMIA sp!, {pc}^
    pc = 32'h500;                                          // prefetch abort
    put(dpi(AL, ADD, 0, 11, 11, 8'h01, 4'd8));
    put(dpr(AL, MOV, 1, 15, 0, 9));
    pc = 32'h580;                                          // data abort
    put(dpi(AL, ADD, 0, 11, 11, 8'h01, 4'd4));
    put(dpi(AL, SUB, 1, 15, 14, 8'd4));
    pc = 32'h600;                                          // IRQ
    put(sdt(AL, 0, 0, 1, 1, 0, 12, 12, 12'h004));
    put(dpi(AL, ADD, 0, 13, 13, 8'd1));
    put(sdt(AL, 0, 0, 1, 1, 0, 13, 12, 12'h010));
    put(dpi(AL, SUB, 1, 15, 14, 8'd4));
    pc = 32'h680;                                          // FIQ
    put(dpi(AL, MOV, 0, 8, 0, 8'h8F, 4'd12));            // banked r8 = 0x8F00
    put(sdt(AL, 0, 0, 1, 1, 0, 8, 8, 12'h00C));
    put(dpi(AL, ADD, 0, 9, 9, 8'd1));                     // banked r9 counts
    put(sdt(AL, 0, 0, 1, 1, 0, 9, 8, 12'h014));
    put(dpi(AL, SUB, 1, 15, 14, 8'd4));
    pc = 32'h700;                                          // subroutine
    put(dpi(AL, ADD, 0, 7, 7, 8'd1));
    put(dpr(AL, MOV, 0, 15, 0, 14));

    // main
    pc = 32'h100;
    put(dpi(AL, MOV, 0, 10, 0, 8'h80, 4'd12));            // r10 = 0x8000
    put(dpi(AL, MOV, 0, 12, 0, 8'h8F, 4'd12));            // r12 = 0x8F00
    put(dpi(AL, MOV, 0, 11, 0, 8'd0));
    // GCD 245, 252 and 110, 111
    for (int t = 0; t < 2; t++) begin
      put(dpi(AL, MOV, 0, 0, 0, t === 0 ? 8'd245 : 8'd110));
      put(dpi(AL, MOV, 0, 1, 0, t === 0 ? 8'd252 : 8'd111));
      l1 = pc;
      put(dpr(AL, CMP, 1, 0, 0, 1));
      put(dpr(GT, SUB, 0, 0, 0, 1));
      put(dpr(LT, SUB, 0, 1, 1, 0));
      put(br(NE, 0, pc, l1));
      put(sdt(AL, 0, 0, 1, 1, 0, 0, 10, 12'(4 * t)));
    end
    // factorial 12 and 1
    for (int t = 0; t < 2; t++) begin
      put(dpi(AL, MOV, 0, 2, 0, 8'd1));
      put(dpi(AL, MOV, 0, 3, 0, t === 0 ? 8'd12 : 8'd1));
      l1 = pc;
      put(mul(AL, 0, 2, 3, 2));
      put(dpi(AL, SUB, 1, 3, 3, 8'd1));
      put(br(NE, 0, pc, l1));
      put(sdt(AL, 0, 0, 1, 1, 0, 2, 10, 12'(8 + 4 * t)));
    end
    // MLA with a negative multiplicand, and a long multiply
    put(dpi(AL, MVN, 0, 4, 0, 8'd2));                     // r4 = -3
    put(dpi(AL, MOV, 0, 5, 0, 8'd7));
    put(mla(AL, 0, 6, 4, 5, 5));                          // r6 = -3*7 + 7
    put(sdt(AL, 0, 0, 1, 1, 0, 6, 10, 12'd16));
    put(dpi(AL, MOV, 0, 4, 0, 8'h55, 4'd4));              // r4 = 0x55000000
    put(mul(AL, 1, 6, 5, 4));                             // r6 = 7 * r4 (MULS)
    put(sdt(AL, 0, 0, 1, 1, 0, 6, 10, 12'd32));
    // cube root of 216 and of 1
    for (int t = 0; t < 2; t++) begin
      put(dpi(AL, MOV, 0, 0, 0, t === 0 ? 8'd216 : 8'd1));
      put(dpi(AL, MOV, 0, 1, 0, 8'd0));
      l1 = pc;
      put(dpi(AL, ADD, 0, 1, 1, 8'd1));
      put(mul(AL, 0, 2, 1, 1));
      put(mul(AL, 0, 3, 2, 1));
      put(dpr(AL, CMP, 1, 0, 3, 0));
      put(br(LT, 0, pc, l1));
      put(sdt(AL, 0, 0, 1, 1, 0, 1, 10, 12'(20 + 4 * t)));
    end
    // string compare
    put(dpi(AL, MOV, 0, 0, 0, 8'h70, 4'd12));
    put(dpi(AL, MOV, 0, 1, 0, 8'h71, 4'd12));
    l1 = pc;
    put(sdt(AL, 1, 1, 0, 1, 0, 2, 0, 12'd1));            // LDRB r2, [r0], #1
    put(sdt(AL, 1, 1, 0, 1, 0, 3, 1, 12'd1));            // LDRB r3, [r1], #1
    put(dpi(AL, CMP, 1, 0, 2, 8'd1));
    put(dpr(CS, CMP, 1, 0, 2, 3));
    put(br(EQ, 0, pc, l1));
    put(dpr(AL, SUB, 0, 0, 2, 3));
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 10, 12'd28));
    // block copy of 8 words
    put(dpi(AL, MOV, 0, 0, 0, 8'h72, 4'd12));
    put(dpi(AL, MOV, 0, 1, 0, 8'h73, 4'd12));
    put(bdt(AL, 1, 0, 1, 0, 1, 0, 16'h03FC));             // LDMIA r0!, {r2-r9}
    put(bdt(AL, 0, 0, 1, 0, 1, 1, 16'h03FC));             // STMIA r1!, {r2-r9}
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 10, 12'd36));
    put(sdt(AL, 0, 0, 1, 1, 0, 1, 10, 12'd40));
    // string compare, strings that differ in their first byte
    put(dpi(AL, MOV, 0, 0, 0, 8'h78, 4'd12));
    put(dpi(AL, MOV, 0, 1, 0, 8'h79, 4'd12));
    l1 = pc;
    put(sdt(AL, 1, 1, 0, 1, 0, 2, 0, 12'd1));            // LDRB r2, [r0], #1
    put(sdt(AL, 1, 1, 0, 1, 0, 3, 1, 12'd1));            // LDRB r3, [r1], #1
    put(dpi(AL, CMP, 1, 0, 2, 8'd1));
    put(dpr(CS, CMP, 1, 0, 2, 3));
    put(br(EQ, 0, pc, l1));
    put(dpr(AL, SUB, 0, 0, 2, 3));
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 10, 12'd200));
    // block copy of three 4-word blocks in a loop
    put(dpi(AL, MOV, 0, 0, 0, 8'h76, 4'd12));
    put(dpi(AL, MOV, 0, 1, 0, 8'h77, 4'd12));
    put(dpi(AL, MOV, 0, 9, 0, 8'd3));
    l1 = pc;
    put(bdt(AL, 1, 0, 1, 0, 1, 0, 16'h003C));             // LDMIA r0!, {r2-r5}
    put(bdt(AL, 0, 0, 1, 0, 1, 1, 16'h003C));             // STMIA r1!, {r2-r5}
    put(dpi(AL, SUB, 1, 9, 9, 8'd1));
    put(br(NE, 0, pc, l1));
    // push / pop
    put(dpi(AL, MOV, 0, 13, 0, 8'h98, 4'd12));            // sp = 0x9800
    put(dpi(AL, MOV, 0, 0, 0, 8'd1));
    put(dpi(AL, MOV, 0, 1, 0, 8'd2));
    put(dpi(AL, MOV, 0, 2, 0, 8'd3));
    put(bdt(AL, 0, 1, 0, 0, 1, 13, 16'h4007));            // STMDB sp!, {r0-r2, lr}
    put(dpi(AL, MOV, 0, 0, 0, 8'd0));
    put(bdt(AL, 1, 0, 1, 0, 1, 13, 16'h00F0));            // LDMIA sp!, {r4-r7}
    put(dpr(AL, ADD, 0, 4, 4, 5));
    put(dpr(AL, ADD, 0, 4, 4, 6));
    put(sdt(AL, 0, 0, 1, 1, 0, 4, 10, 12'd44));
    put(sdt(AL, 0, 0, 1, 1, 0, 13, 10, 12'd48));
    // register-specified shift, rotate, RRX
    put(dpi(AL, MOV, 0, 2, 0, 8'd1));
    put(dpi(AL, MOV, 0, 3, 0, 8'd5));
    put(dprs(AL, MOV, 0, 4, 0, 2, LSL, 3));               // r4 = 1 << 5
    put(dpr(AL, ADD, 0, 4, 4, 2, ROR, 5'd1));             // r4 += 1 ror 1
    put(sdt(AL, 0, 0, 1, 1, 0, 4, 10, 12'd52));
    put(dpr(AL, MOV, 1, 5, 0, 2, LSR, 5'd1));             // C = 1
    put(dpr(AL, MOV, 0, 5, 0, 2, ROR, 5'd0));             // RRX
    put(sdt(AL, 0, 0, 1, 1, 0, 5, 10, 12'd56));
    // scaled register offset
    put(dpi(AL, MOV, 0, 0, 0, 8'h72, 4'd12));
    put(dpi(AL, MOV, 0, 1, 0, 8'd3));
    put(sdtr(AL, 1, 0, 1, 1, 0, 2, 0, 1, LSL, 5'd2));     // LDR r2, [r0, r1, LSL #2]
    put(sdt(AL, 0, 0, 1, 1, 0, 2, 10, 12'd60));
    // swap word and byte
    put(dpi(AL, MOV, 0, 0, 0, 8'h74, 4'd12));
    put(dpi(AL, MOV, 0, 1, 0, 8'h22));
    put(swp(AL, 0, 2, 1, 0));
    put(sdt(AL, 0, 0, 1, 1, 0, 2, 10, 12'd64));
    put(dpi(AL, MOV, 0, 1, 0, 8'h33));
    put(swp(AL, 1, 3, 1, 0));
    put(sdt(AL, 0, 0, 1, 1, 0, 3, 10, 12'd68));
    // subroutine calls
    put(dpi(AL, MOV, 0, 7, 0, 8'd0));
    put(br(AL, 1, pc, 32'h700));
    put(br(AL, 1, pc, 32'h700));
    put(sdt(AL, 0, 0, 1, 1, 0, 7, 10, 12'd72));
    // load into the PC
    put(dpi(AL, MOV, 0, 0, 0, 8'h75, 4'd12));
    mem[32'h7500 >> 2] = pc + 12;
    put(sdt(AL, 1, 0, 1, 1, 0, 15, 0, 12'd0));            // LDR pc, [r0]
    put(dpi(AL, MOV, 0, 7, 0, 8'h55));                    // skipped
    put(dpi(AL, MOV, 0, 7, 0, 8'h66));                    // skipped
    put(sdt(AL, 0, 0, 1, 1, 0, 7, 10, 12'd76));
    // SWI (one skipped by its condition) and an undefined instruction
    put(dpr(AL, CMP, 1, 0, 0, 0));
    put(swi(NE, 24'h12));
    put(swi(AL, 24'h12));
    put(32'hE7F0_00F0);
    // PSR transfers
    put(mrs(AL, 0, 0));
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 10, 12'd80));
    put(msrf_imm(AL, 0, 8'hF0, 4'd4));
    put(mrs(AL, 0, 1));
    put(sdt(AL, 0, 0, 1, 1, 0, 1, 10, 12'd84));
    put(msr(AL, 1, 1));                                   // SPSR_svc = r1
    put(mrs(AL, 1, 2));
    put(sdt(AL, 0, 0, 1, 1, 0, 2, 10, 12'd88));
    put(dpi(AL, BIC, 0, 0, 1, 8'hC0));
    put(msr(AL, 0, 0));                                   // enable IRQ and FIQ
    // IRQ and FIQ
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 12, 12'h000));
    for (int i = 0; i < 6; i++) put(dpr(AL, MOV, 0, 0, 0, 0));
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 12, 12'h008));
    for (int i = 0; i < 6; i++) put(dpr(AL, MOV, 0, 0, 0, 0));
    // data aborts
    put(dpi(AL, MOV, 0, 1, 0, 8'h01, 4'd8));              // r1 = 0x10000
    put(sdt(AL, 1, 0, 1, 1, 0, 2, 1, 12'd0));             // LDR r2, [r1]
    put(sdt(AL, 1, 0, 1, 1, 1, 2, 1, 12'd4));             // LDR r2, [r1, #4]!
    put(bdt(AL, 1, 0, 1, 0, 1, 1, 16'h000C));             // LDMIA r1!, {r2, r3}
    put(sdt(AL, 0, 0, 1, 1, 0, 1, 10, 12'd92));
    // prefetch abort: jump into the hole, the handler resumes at r9
    put(dpi(AL, ADD, 0, 9, 15, 8'd4));                    // r9 = continuation
    put(dpi(AL, MOV, 0, 15, 0, 8'h02, 4'd8));             // pc = 0x20000
    put(dpi(AL, MOV, 0, 7, 0, 8'h77));                    // never executed
    // user mode: control bits of the CPSR cannot be changed, SWI returns
    put(dpi(AL, MOV, 0, 0, 0, 8'h10));
    put(msr(AL, 0, 0));                                   // enter user mode
    put(dpi(AL, MOV, 0, 13, 0, 8'h44, 4'd12));            // user r13 = 0x4400
    put(dpi(AL, MOV, 0, 0, 0, 8'h1F));
    put(msr(AL, 0, 0));                                   // ignored in user mode
    put(mrs(AL, 0, 1));
    put(sdt(AL, 0, 0, 1, 1, 0, 1, 10, 12'd100));
    put(swi(AL, 24'h0));
    put(mrs(AL, 0, 1));
    put(sdt(AL, 0, 0, 1, 1, 0, 1, 10, 12'd104));
    put(sdt(AL, 0, 0, 1, 1, 0, 13, 10, 12'd108));
    put(sdt(AL, 0, 0, 1, 1, 0, 11, 10, 12'd96));
    // finish
    put(sdt(AL, 0, 0, 1, 1, 0, 0, 12, 12'h0FC));
    put(br(AL, 0, pc, pc));
    if (pc > 32'h400) begin failures++; $display("FAIL main program overruns the handlers"); end

    #1 nreset = 1'b0;                               // reset edge
    repeat (3) @(posedge mclk);
    #1 nreset = 1'b1;
  end

  // ---------------- mechanism counters ----------------
  always @(posedge mclk) if (nreset) begin
    cycles++;
    if (trace)
      $display("%5d %-10s st=%b a=%h nmreq=%b nrw=%b din=%h dout=%h id=%h v=%b exc=%0d",
               cycles, dut.kind.name(), dut.state, addr, nmreq, nrw, din, dout,
               dut.id_q.instr, dut.id_valid, dut.exc_code);
    if (trace && dut.p1.we_reg) $display("      r%0d <= %h (mode %b)", dut.waddr, dut.alu_out, dut.reg_mode);
    unique case (dut.kind)
      CY_REFILL1: n_refill++;
      CY_DPRS1:   n_dprs++;
      CY_NOP:     if (dut.id_valid) n_condfail++;
      CY_BDTX:    n_bdtx++;
      CY_SWP3:    n_swp++;
      CY_XR:      n_xr++;
      CY_MRS:     n_mrs++;
      CY_MSR, CY_MFRI: n_msr++;
      CY_X1:      n_exc[dut.exc_code]++;
      default: ;
    endcase
    if (dut.kind === CY_MUL2 && dut.mult_done) begin
      if (dut.u_booth.count === 4'd15) n_full16++;
      else n_early++;
    end
    if (dut.kind === CY_BDTX && dut.p1.we_reg && dut.p1.dest_sel === D_RN) n_wb++;
    if (dut.kind === CY_LDR3 && dut.id_q.dreg_pc) n_ldrpc++;
    if (dut.kind === CY_LDR3 && dut.id_q.b_bit) n_byte++;
    if (dut.kind === CY_LDM4 && dut.ctx.pc_in_list) n_ldm_pc++;
    if (dut.kind === CY_BDTX && dut.p1.regmode_sel === RM_USR) n_usrbank++;
    if (dut.p1.storedata_tocpsr && dut.p1.inputmux_tocpsr) n_ret++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic seen(input string what, input int unsigned n);
    checks++;
    if (n === 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    logic [31:0] r;
    wait (done);
    repeat (2) @(posedge mclk);
    check("gcd 245 252", mem[(RES >> 2) + 0], gcd(245, 252));
    check("gcd 110 111", mem[(RES >> 2) + 1], gcd(110, 111));
    r = 1; for (int i = 2; i <= 12; i++) r = r * i;
    check("factorial 12", mem[(RES >> 2) + 2], r);
    check("factorial 1", mem[(RES >> 2) + 3], 32'd1);
    check("mla", mem[(RES >> 2) + 4], 32'(-3 * 7 + 7));
    check("cube root 216", mem[(RES >> 2) + 5], 32'd6);
    check("cube root 1", mem[(RES >> 2) + 6], 32'd1);
    check("strcmp", mem[(RES >> 2) + 7], 32'(8'h65) - 32'(8'h66));
    check("long multiply", mem[(RES >> 2) + 8], 32'h5500_0000 * 32'd7);
    for (int i = 0; i < 8; i++)
      check("block copy", mem[(32'h7300 >> 2) + i], mem[(32'h7200 >> 2) + i]);
    check("copy stops", mem[(32'h7300 >> 2) + 8], 32'hA5A5_A5A5);
    check("strcmp first byte", mem[(RES >> 2) + 50], 32'hFFFF_FFFF);
    for (int i = 0; i < 12; i++)
      check("block copy x3", mem[(32'h7700 >> 2) + i], 32'hC0DE_0000 + 32'(i * 7));
    check("copy x3 stops", mem[(32'h7700 >> 2) + 12], 32'hA5A5_A5A5);
    check("ldm write-back", mem[(RES >> 2) + 9], 32'h7220);
    check("stm write-back", mem[(RES >> 2) + 10], 32'h7320);
    check("push pop sum", mem[(RES >> 2) + 11], 32'd6);
    check("sp restored", mem[(RES >> 2) + 12], 32'h9800);
    check("reg shift", mem[(RES >> 2) + 13], 32'h8000_0020);
    check("rrx", mem[(RES >> 2) + 14], 32'h8000_0000);
    check("scaled offset", mem[(RES >> 2) + 15], mem[(32'h7200 >> 2) + 3]);
    check("swp old", mem[(RES >> 2) + 16], 32'h11);
    check("swpb old", mem[(RES >> 2) + 17], 32'h22);
    check("swap memory", mem[32'h7400 >> 2], 32'h33);
    check("bl count", mem[(RES >> 2) + 18], 32'd2);
    check("ldr pc", mem[(RES >> 2) + 19], 32'd2);
    check("mrs cpsr", mem[(RES >> 2) + 20], 32'h6000_00D3);
    check("msr flags", mem[(RES >> 2) + 21], 32'hF000_00D3);
    check("spsr", mem[(RES >> 2) + 22], 32'hF000_00D3);
    check("irq count", mem[32'h8F10 >> 2], 32'd1);
    check("fiq count", mem[32'h8F14 >> 2], 32'd1);
    check("base restored", mem[(RES >> 2) + 23], 32'h0001_0000);
    check("exception counts", mem[(RES >> 2) + 24], 32'h0301_0102);
    check("user cpsr", mem[(RES >> 2) + 25], 32'h0000_0010);
    check("cpsr after swi", mem[(RES >> 2) + 26], 32'h0000_0010);
    check("user r13", mem[(RES >> 2) + 27], 32'h0000_4400);
    check("user-bank stm", mem[(RES + 32'h80) >> 2], 32'h0000_4400);
    $display("mechanisms:");
    seen("branch refill", n_refill);
    seen("register-specified shift", n_dprs);
    seen("condition failed", n_condfail);
    seen("booth early termination", n_early);
    seen("booth full 16 steps", n_full16);
    seen("block transfer cycles", n_bdtx);
    seen("block base write-back", n_wb);
    seen("swap", n_swp);
    seen("load into pc", n_ldrpc);
    seen("byte load", n_byte);
    seen("ldm loading pc", n_ldm_pc);
    seen("user-bank block transfer", n_usrbank);
    seen("mrs", n_mrs);
    seen("msr", n_msr);
    seen("exception return", n_ret);
    seen("base restore", n_xr);
    seen("reset entry", n_exc[EXC_RESET]);
    seen("swi entry", n_exc[EXC_SWI]);
    seen("undefined entry", n_exc[EXC_UND]);
    seen("prefetch abort entry", n_exc[EXC_PABT]);
    seen("data abort entry", n_exc[EXC_DABT]);
    seen("irq entry", n_exc[EXC_IRQ]);
    seen("fiq entry", n_exc[EXC_FIQ]);
    $display("cycles: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge mclk);
    failures++;
    $display("FAIL watchdog: program did not finish, pc=%h", addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
