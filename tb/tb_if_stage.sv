// tb_if_stage: the fetch latch takes the word on the data bus (and the
// prefetch-abort flag) at a clock edge with load high and holds it
// otherwise; if_flush without load marks it invalid, and a load in the same
// cycle as a flush keeps the new word valid (the first fetch at a branch
// target).  Random sequences are compared with a model; the instruction
// class outputs are checked on known encodings (branch, SWI, undefined).
// Clock period 10 ns.
module tb_if_stage;
  import arm7_pkg::*;
  import arm_asm_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic [31:0] datain, new_instruction;
  logic        prefetch_abort, load, if_flush, swi_signal, und_signal, pabt_signal, valid;
  index_t      new_index;
  int          checks = 0, failures = 0;
  logic [31:0] m_instr;
  logic        m_pabt, m_valid;

  if_stage dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (new_instruction !== m_instr || pabt_signal !== m_pabt || valid !== m_valid) begin
      failures++;
      $display("FAIL instr=%h pabt=%b valid=%b expected %h %b %b", new_instruction, pabt_signal,
               valid, m_instr, m_pabt, m_valid);
    end
  endtask

  task automatic fetch(input logic [31:0] w);
    @(negedge clk);
    datain = w; load = 1; if_flush = 0; prefetch_abort = 0;
    @(posedge clk) #1;
    load = 0;
  endtask

  initial begin
    datain = 0; prefetch_abort = 0; load = 0; if_flush = 0;
    m_instr = 0; m_pabt = 0; m_valid = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      datain = $urandom; prefetch_abort = ($urandom % 4) === 0;
      load = 1'($urandom); if_flush = ($urandom % 3) === 0;
      @(posedge clk);
      if (load) begin m_instr = datain; m_pabt = prefetch_abort; m_valid = 1; end
      else if (if_flush) m_valid = 0;
      #1 compare();
    end
    fetch(br(AL, 0, 32'h0, 32'h40));
    checks++;
    if (!new_index[IX_BBL] || swi_signal || und_signal) begin failures++; $display("FAIL branch class"); end
    fetch(arm_asm_pkg::swi(AL, 24'h1));
    checks++;
    if (!swi_signal || new_index !== '0) begin failures++; $display("FAIL swi class"); end
    fetch(32'hE7F0_00F0);
    checks++;
    if (!und_signal || new_index !== '0) begin failures++; $display("FAIL undefined class"); end
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
