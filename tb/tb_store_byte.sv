// tb_store_byte: random data words are presented with the byte bit low and
// high; a word store must pass unchanged and a byte store must carry the low
// byte in all four lanes.  Combinational, 1 ns steps.
// The expected lanes follow the ARM7 byte-store convention.  A watchdog ends
// the run with a failure if it does not finish.
module tb_store_byte;
  logic        bbit;
  logic [31:0] din, dout;
  int          checks = 0, failures = 0;

  store_byte dut (.*);

  initial begin
    bbit = 0; din = '0;
    for (int k = 0; k < 500; k++) begin
      din = $urandom; bbit = k[0];
      #1;
      checks++;
      for (int lane = 0; lane < 4; lane++)
        if (dout[8*lane +: 8] !== (bbit ? din[7:0] : din[8*lane +: 8])) begin
          failures++;
          $display("FAIL din=%h b=%b lane %0d: dout=%h", din, bbit, lane, dout);
          break;
        end
    end
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
