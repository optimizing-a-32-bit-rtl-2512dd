// tb_bdt_block: runs random register lists through the block-transfer
// sequencer the way the core does.  In the first cycle the list comes from
// the instruction (reglist_mux_en low); afterwards the held, reduced list is
// used (reglist_mux_en high) and advance is raised once per transfer.  Each
// cycle the source register must be the lowest register still in the list,
// bdt_done must rise exactly on the last one, the destination register must
// be the previous cycle's source, and bdt_done_latched the previous
// bdt_done.  Clock period 10 ns.
module tb_bdt_block;
  logic        clk = 0, rst_n = 1, reglist_mux_en, advance;
  logic [15:0] register_list;
  logic [3:0]  bdt_register_source, bdt_register_dest;
  logic        bdt_done, bdt_done_latched;
  int          checks = 0, failures = 0;

  bdt_block dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [15:0] list);
    int regs [$];
    logic [3:0] prev;
    logic prev_done;
    for (int i = 0; i < 16; i++) if (list[i]) regs.push_back(i);
    @(negedge clk);
    register_list = list; reglist_mux_en = 0; advance = 0;
    @(posedge clk);                                   // first cycle: list taken from the instruction
    @(negedge clk);
    register_list = $urandom;                         // the instruction bus no longer matters
    reglist_mux_en = 1; advance = 1;
    foreach (regs[i]) begin
      #1;
      checks++;
      if (bdt_register_source !== 4'(regs[i]) || bdt_done !== (i === regs.size() - 1)) begin
        failures++;
        $display("FAIL list %h step %0d: source=%0d done=%b expected %0d %b", list, i,
                 bdt_register_source, bdt_done, regs[i], i === regs.size() - 1);
      end
      prev = bdt_register_source; prev_done = bdt_done;
      @(posedge clk) #1;
      checks++;
      if (bdt_register_dest !== prev || bdt_done_latched !== prev_done) begin
        failures++;
        $display("FAIL list %h step %0d: dest=%0d done_q=%b", list, i, bdt_register_dest,
                 bdt_done_latched);
      end
      @(negedge clk);
    end
    advance = 0; reglist_mux_en = 0;
  endtask

  initial begin
    register_list = 0; reglist_mux_en = 0; advance = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(16'h0001); run(16'h8000); run(16'hFFFF); run(16'h03FC); run(16'h4007);
    for (int k = 0; k < 300; k++) begin
      logic [15:0] l;
      l = 16'($urandom);
      if (l === 0) l = 16'h0100;
      run(l);
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
