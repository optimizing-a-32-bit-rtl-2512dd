// tb_exe_fsm: checks the execute-stage sequencer cycle by cycle.  Each test
// decodes one instruction (through index_decoder and instr_decoder), holds it
// while the sequencer runs, drives the context inputs the rest of the core
// would drive (condition result, multiplier done after a chosen number of
// steps, block-transfer done on the last register, data abort in a chosen
// cycle, exception request) and compares the sequence of cycle kinds up to
// the end of the instruction with the expected list.  The expected lists
// encode this design's timing: 1 cycle for data processing (+1 for a
// register-specified shift), 3 for a branch or a write to R15, 1 + Booth
// steps for a multiply, 3 for LDR/STR (5 when loading R15), 4 for a swap,
// n + 3 for a block transfer of n registers, 3 for exception entry and 4
// when a data abort must first restore the base register.  The state must
// stay one-hot throughout.  300 further runs use random multiplier step
// counts, random block-transfer lists and random data-processing
// destinations and condition results.  Clock period 10 ns.
module tb_exe_fsm;
  import arm7_pkg::*;
  import arm_asm_pkg::*;
  logic        clk = 0, rst_n = 1;
  ctx_t        ctx;
  id_t         id;
  exe_state_t  state;
  logic        in_exc, dabt_seq, last;
  cyc_t        kind;
  logic [31:0] instr;
  index_t      index;
  logic        swi_s, und_s;
  int          checks = 0, failures = 0;
  int          mul_steps, abort_at, step;

  index_decoder u_ix (.instr(instr), .index(index), .swi(swi_s), .und(und_s));
  instr_decoder u_id (.instr(instr), .index(index), .swi(swi_s), .und(und_s), .pabt(1'b0), .id(id));
  exe_fsm dut (.*);
  always #5 clk = ~clk;

  int n_mul2, n_bdtx;
  always @(posedge clk) begin
    n_mul2 <= last ? 0 : (kind === CY_MUL2) ? n_mul2 + 1 : n_mul2;
    n_bdtx <= last ? 0 : (kind === CY_BDTX) ? n_bdtx + 1 : n_bdtx;
  end
  // context: the fields below are set by the test, the rest follow the instruction
  logic      cond_ok, exc_take, abort_seen;
  exc_code_t exc_code;
  int unsigned nregs;
  always_comb begin
    nregs = $countones(id.reglist);
    ctx = '0;
    ctx.cond_ok    = cond_ok;
    ctx.exc_take   = exc_take;
    ctx.exc_code   = exc_code;
    ctx.abort_seen = abort_seen;
    ctx.mult_done  = (kind === CY_MUL2) && (n_mul2 === mul_steps - 1);
    ctx.bdt_done   = (kind === CY_BDTX) && (n_bdtx === int'(nregs) - 1);
    ctx.abort_now  = (step === abort_at);
    ctx.pc_in_list = id.reglist[15];
  end

  task automatic run(input string what, input logic [31:0] w, input logic cok,
                     input logic exc, input int msteps, input int abort_cycle, input cyc_t exp[$]);
    cyc_t got[$];
    @(negedge clk);
    instr = w; cond_ok = cok; exc_take = exc; mul_steps = msteps;
    abort_at = abort_cycle; step = 0;
    exc_code = exc ? EXC_IRQ : EXC_NONE;
    forever begin
      #1;
      got.push_back(kind);
      if ($test$plusargs("trace")) $display("  %s st=%b exc=%b last=%b", kind.name(), state, in_exc, last);
      if (!$onehot(state)) begin failures++; $display("FAIL %s: state %b", what, state); end
      if (kind inside {CY_SDT2, CY_SWP2, CY_SWP3, CY_BDTX} && ctx.abort_now) abort_seen = 1;
      if (last && state === EXE1 && got.size() > 1 && kind !== CY_XR) break;
      if (last && kind !== CY_XR && !in_exc) break;
      if (last) break;
      if (got.size() > 40) break;
      @(posedge clk);
      @(negedge clk);                                   // inputs change away from the edge
      exc_take = 1'b0;
      step++;
    end
    @(posedge clk);
    abort_seen = 0;
    checks++;
    if (got !== exp) begin
      failures++;
      $write("FAIL %s: got", what);
      foreach (got[i]) $write(" %s", got[i].name());
      $write("; expected");
      foreach (exp[i]) $write(" %s", exp[i].name());
      $display("");
    end
  endtask

  initial begin
    cond_ok = 0; exc_take = 0; abort_seen = 0; exc_code = EXC_NONE; instr = dpr(AL, MOV, 0, 0, 0, 0); mul_steps = 1; abort_at = -1; step = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run("add", dpi(AL, ADD, 0, 1, 2, 8'd3), 1, 0, 1, -1, '{CY_DP});
    run("add, condition fails", dpi(NE, ADD, 0, 1, 2, 8'd3), 0, 0, 1, -1, '{CY_NOP});
    run("register shift", dprs(AL, ADD, 0, 1, 2, 3, LSL, 4), 1, 0, 1, -1, '{CY_DPRS1, CY_DPRS2});
    run("mov pc", dpr(AL, MOV, 0, 15, 0, 14), 1, 0, 1, -1, '{CY_DP, CY_REFILL1, CY_REFILL2});
    run("branch", br(AL, 1, 32'h0, 32'h100), 1, 0, 1, -1, '{CY_BR1, CY_REFILL1, CY_REFILL2});
    run("mrs", mrs(AL, 0, 3), 1, 0, 1, -1, '{CY_MRS});
    run("msr", msr(AL, 0, 3), 1, 0, 1, -1, '{CY_MSR});
    run("mul 1 step", mul(AL, 0, 1, 2, 3), 1, 0, 1, -1, '{CY_MUL1, CY_MUL2});
    run("mul 5 steps", mul(AL, 0, 1, 2, 3), 1, 0, 5, -1,
        '{CY_MUL1, CY_MUL2, CY_MUL2, CY_MUL2, CY_MUL2, CY_MUL2});
    run("ldr", sdt(AL, 1, 0, 1, 1, 0, 1, 2, 12'd4), 1, 0, 1, -1, '{CY_SDT1, CY_SDT2, CY_LDR3});
    run("str", sdt(AL, 0, 0, 1, 1, 0, 1, 2, 12'd4), 1, 0, 1, -1, '{CY_SDT1, CY_SDT2, CY_FETCHLAST});
    run("ldr pc", sdt(AL, 1, 0, 1, 1, 0, 15, 2, 12'd4), 1, 0, 1, -1,
        '{CY_SDT1, CY_SDT2, CY_LDR3, CY_REFILL1, CY_REFILL2});
    run("swp", swp(AL, 0, 1, 2, 3), 1, 0, 1, -1, '{CY_SWP1, CY_SWP2, CY_SWP3, CY_SWP4});
    run("ldm 3", bdt(AL, 1, 0, 1, 0, 1, 0, 16'h000E), 1, 0, 1, -1,
        '{CY_BDT1, CY_BDTX, CY_BDTX, CY_BDTX, CY_LDM4});
    run("stm 2", bdt(AL, 0, 1, 0, 0, 1, 13, 16'h4001), 1, 0, 1, -1,
        '{CY_BDT1, CY_BDTX, CY_BDTX, CY_FETCHLAST});
    run("ldm with pc", bdt(AL, 1, 0, 1, 0, 1, 13, 16'h8001), 1, 0, 1, -1,
        '{CY_BDT1, CY_BDTX, CY_BDTX, CY_LDM4, CY_REFILL1, CY_REFILL2});
    run("interrupt", dpi(AL, ADD, 0, 1, 2, 8'd3), 1, 1, 1, -1, '{CY_X1, CY_X2, CY_X3});
    run("ldr data abort", sdt(AL, 1, 0, 1, 1, 1, 1, 2, 12'd4), 1, 0, 1, 1,
        '{CY_SDT1, CY_SDT2, CY_XR, CY_X1, CY_X2, CY_X3});
    run("ldm data abort", bdt(AL, 1, 0, 1, 0, 1, 0, 16'h000E), 1, 0, 1, 2,
        '{CY_BDT1, CY_BDTX, CY_BDTX, CY_BDTX, CY_XR, CY_X1, CY_X2, CY_X3});
    // random multiplies, block transfers and data processing; the expected
    // sequence is built from the timing rules above
    for (int t = 0; t < 300; t++) begin
      cyc_t e[$];
      int unsigned sel = $urandom_range(0, 2);
      e = {};
      if (sel === 0) begin
        int k = int'($urandom_range(1, 16));
        e.push_back(CY_MUL1);
        repeat (k) e.push_back(CY_MUL2);
        run("random mul", mul(AL, 0, 4'($urandom_range(0, 14)), 4'($urandom), 4'($urandom)), 1, 0, k, -1, e);
      end else if (sel === 1) begin
        logic        l = 1'($urandom);
        logic [15:0] lst = 16'($urandom);
        if (lst === 16'h0) lst = 16'h0001;
        if (!l) lst[15] = 1'b0;
        if (lst === 16'h0) lst = 16'h0002;
        e.push_back(CY_BDT1);
        repeat ($countones(lst)) e.push_back(CY_BDTX);
        e.push_back(l ? CY_LDM4 : CY_FETCHLAST);
        if (l && lst[15]) begin e.push_back(CY_REFILL1); e.push_back(CY_REFILL2); end
        run("random ldm/stm", bdt(AL, l, 1'($urandom), 1'($urandom), 0, 1'($urandom), 4'($urandom_range(0, 14)), lst),
            1, 0, 1, -1, e);
      end else begin
        logic       cok = 1'($urandom);
        logic [3:0] rd  = 4'($urandom);
        if (!cok) e.push_back(CY_NOP);
        else begin
          e.push_back(CY_DP);
          if (rd === 4'd15) begin e.push_back(CY_REFILL1); e.push_back(CY_REFILL2); end
        end
        run("random data processing", dpi(NE, ADD, 0, rd, 4'($urandom), 8'($urandom)), cok, 0, 1, -1, e);
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
