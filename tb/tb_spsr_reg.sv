// tb_spsr_reg: random words are written with store_data (whole register),
// store_flag (N, Z, C, V only) or neither, and the register is compared after
// every clock edge with a model kept here.  Clock period 10 ns.
// The expected values follow the register's intended behaviour, not its
// code.  A watchdog ends the run with a failure after a fixed cycle count.
module tb_spsr_reg;
  logic        clk = 0, rst_n = 1, store_data, store_flag;
  logic [31:0] datain_32bits, spsr_dataout, model;
  int          checks = 0, failures = 0;

  spsr_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    store_data = 0; store_flag = 0; datain_32bits = 0; model = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      datain_32bits = $urandom;
      case ($urandom % 3)
        0: begin store_data = 1; store_flag = 0; end
        1: begin store_data = 0; store_flag = 1; end
        default: begin store_data = 0; store_flag = 0; end
      endcase
      @(posedge clk);
      if (store_data)      model = datain_32bits;
      else if (store_flag) model[31:28] = datain_32bits[31:28];
      #1;
      checks++;
      if (spsr_dataout !== model) begin
        failures++;
        $display("FAIL got %h expected %h", spsr_dataout, model);
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
