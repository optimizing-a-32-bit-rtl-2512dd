// tb_register_file: random reads and writes in all six processor modes,
// compared with a reference that keeps the ARM banking rules in an
// associative array keyed by (bank, register): R8-R14 are private to FIQ
// mode, R13-R14 to IRQ, SVC, ABT and UND, and everything else is shared with
// user mode.  Writes to index 15 must be ignored by the bank; reads of 15
// return the separate PC register, which is written with pc_we.  Read and
// write modes are chosen independently, as in the core's user-bank block
// transfers.  Clock period 10 ns; reads are checked before each edge.
module tb_register_file;
  import arm7_pkg::*;
  logic        clk = 0, rst_n = 1;
  logic [4:0]  rmode, wmode;
  logic [3:0]  raddr_a, raddr_b, waddr;
  logic [31:0] rdata_a, rdata_b, wdata, pc_in, pc_out;
  logic        we, pc_we;
  int          checks = 0, failures = 0;
  logic [31:0] model [int];
  logic [31:0] pc_model;
  logic [4:0]  modes [6];

  register_file dut (.*);
  always #5 clk = ~clk;

  function automatic int key(logic [3:0] r, logic [4:0] m);
    if (m === MODE_FIQ && r >= 8 && r <= 14) return 100 + r;
    if (r === 13 || r === 14)
      case (m)
        MODE_IRQ: return 200 + r;
        MODE_SVC: return 300 + r;
        MODE_ABT: return 400 + r;
        MODE_UND: return 500 + r;
        default:  return r;
      endcase
    return r;
  endfunction

  function automatic logic [31:0] expect_read(logic [3:0] r, logic [4:0] m);
    if (r === 15) return pc_model;
    return model.exists(key(r, m)) ? model[key(r, m)] : 32'h0;
  endfunction

  initial begin
    modes = '{MODE_USR, MODE_FIQ, MODE_IRQ, MODE_SVC, MODE_ABT, MODE_UND};
    rmode = MODE_USR; wmode = MODE_USR; raddr_a = 0; raddr_b = 0; waddr = 0;
    wdata = 0; we = 0; pc_we = 0; pc_in = 0; pc_model = 0;
    #1 rst_n = 0;                                   // reset edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      rmode = modes[$urandom % 6]; wmode = (k % 4 === 0) ? modes[$urandom % 6] : rmode;
      raddr_a = 4'($urandom); raddr_b = 4'($urandom);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom;
      pc_we = ($urandom % 4) === 0; pc_in = $urandom;
      #1;
      checks++;
      if (rdata_a !== expect_read(raddr_a, rmode) || rdata_b !== expect_read(raddr_b, rmode)
          || pc_out !== pc_model) begin
        failures++;
        $display("FAIL mode %b r%0d=%h r%0d=%h pc=%h, expected %h %h %h", rmode, raddr_a, rdata_a,
                 raddr_b, rdata_b, pc_out, expect_read(raddr_a, rmode), expect_read(raddr_b, rmode),
                 pc_model);
      end
      @(posedge clk);
      if (we && waddr !== 15) model[key(waddr, wmode)] = wdata;
      if (pc_we) pc_model = pc_in;
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
