// tb_cpsr_reg: checks the reset value (SVC mode, IRQ and FIQ disabled) and
// then applies random combinations of the update controls each cycle,
// comparing with a model kept here.  ALU flag updates (cpsr_set_en, vbit_in)
// take priority over a PSR write for N, Z, C and V; an exception entry
// (int_set, with irq_fiq_disable for FIQ and reset) sets I and F and takes
// priority over the written I/F bits; change_mode_en takes priority over the
// written mode.  Clock period 10 ns.
module tb_cpsr_reg;
  import arm7_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic [31:0] datain_32bits, cpsr_dataout, model;
  logic        store_data, store_flag, cpsr_set_en, datain_v_flag, vbit_in;
  logic        change_mode_en, int_set, irq_fiq_disable;
  logic [2:0]  datain_nzc_flags;
  logic [4:0]  datain_new_mode;
  int          checks = 0, failures = 0;

  cpsr_reg dut (.*);
  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (cpsr_dataout !== model) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, cpsr_dataout, model);
    end
  endtask

  initial begin
    datain_32bits = 0; store_data = 0; store_flag = 0; cpsr_set_en = 0; datain_v_flag = 0;
    vbit_in = 0; change_mode_en = 0; int_set = 0; irq_fiq_disable = 0;
    datain_nzc_flags = 0; datain_new_mode = 0;
    model = 32'h0000_00D3;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare("reset");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      datain_32bits = $urandom;
      {store_data, store_flag} = 2'($urandom);
      cpsr_set_en = ($urandom % 3) === 0; vbit_in = ($urandom % 3) === 0;
      datain_nzc_flags = 3'($urandom); datain_v_flag = 1'($urandom);
      change_mode_en = ($urandom % 5) === 0; datain_new_mode = 5'($urandom);
      int_set = ($urandom % 5) === 0; irq_fiq_disable = 1'($urandom);
      @(posedge clk);
      if (cpsr_set_en)                   model[31:29] = datain_nzc_flags;
      else if (store_data || store_flag) model[31:29] = datain_32bits[31:29];
      if (vbit_in)                       model[28] = datain_v_flag;
      else if (store_data || store_flag) model[28] = datain_32bits[28];
      if (store_data) model[27:8] = datain_32bits[27:8];
      if (int_set)         model[7:6] = {1'b1, irq_fiq_disable | model[6]};
      else if (store_data) model[7:6] = datain_32bits[7:6];
      if (store_data) model[5] = datain_32bits[5];
      if (change_mode_en)  model[4:0] = datain_new_mode;
      else if (store_data) model[4:0] = datain_32bits[4:0];
      #1 compare("update");
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
