// tb_booth_multiplier: drives the Booth recoder the way the core does and
// rebuilds the product from its outputs.  After a multiplier is loaded
// (mux_select high for one clock), each cycle's opcode (0100 add, 0010
// subtract) and shift value tell the datapath to add or subtract the
// multiplicand shifted left by that amount (32 means "add nothing").  The
// test accumulates exactly that and, when mult_done rises, compares the sum
// with multiplicand x multiplier (mod 2^32).  It also checks the number of
// cycles: at most 16, and one cycle per two multiplier bits up to the last
// significant pair (early termination).  Clock period 10 ns.
module tb_booth_multiplier;
  logic        clk = 0, rst_n = 1, mux_select;
  logic [31:0] multiplier;
  logic [3:0]  mult_opcode;
  logic [7:0]  mult_shiftval;
  logic        mult_done;
  int          checks = 0, failures = 0;

  booth_multiplier dut (.*);
  always #5 clk = ~clk;

  // cycles needed: one per bit pair until the remaining bits are all copies of the sign
  function automatic int expected_steps(logic [31:0] m);
    for (int i = 0; i < 16; i++) begin
      logic signed [32:0] rest;
      rest = $signed({m, 1'b0}) >>> (2 * i + 2);
      if (i === 15 || rest === 0 || rest === -1) return i + 1;
    end
    return 16;
  endfunction

  task automatic run(input logic [31:0] mcand, input logic [31:0] mplier);
    logic [31:0] acc;
    int steps;
    @(negedge clk);
    mux_select = 1; multiplier = mplier;
    @(negedge clk);
    mux_select = 0; multiplier = $urandom;          // the bus moves on after loading
    acc = '0; steps = 0;
    forever begin
      steps++;
      if (mult_shiftval < 8'd32) begin
        if (mult_opcode === 4'b0100)      acc = acc + (mcand << mult_shiftval);
        else if (mult_opcode === 4'b0010) acc = acc - (mcand << mult_shiftval);
        else begin
          failures++;
          $display("FAIL bad opcode %b", mult_opcode);
        end
      end
      if (mult_done || steps > 20) break;
      @(negedge clk);
    end
    checks++;
    if (acc !== mcand * mplier || steps !== expected_steps(mplier)) begin
      failures++;
      $display("FAIL %h * %h: got %h in %0d cycles, expected %h in %0d", mcand, mplier, acc,
               steps, mcand * mplier, expected_steps(mplier));
    end
  endtask

  initial begin
    mux_select = 0; multiplier = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(32'd7, 32'd0);
    run(32'd7, 32'd1);
    run(32'd7, 32'hFFFF_FFFF);
    run(32'd12345, 32'd3);
    run(32'hFFFF_FFFD, 32'd7);
    run(32'h1234_5678, 32'h8000_0000);
    run(32'h1234_5678, 32'h7FFF_FFFF);
    run(32'h1234_5678, 32'h5555_5555);
    run(32'hDEAD_BEEF, 32'hAAAA_AAAA);
    for (int k = 0; k < 32; k++) run($urandom, 32'h1 << k);
    for (int k = 0; k < 400; k++) run($urandom, $urandom >> ($urandom % 32));
    for (int k = 0; k < 400; k++) run($urandom, $urandom);
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
