// tb_cond_checker: exhaustive test of the condition checker.  All 16
// condition codes are applied with all 16 combinations of the N, Z, C and V
// flags and the pass/fail output is compared with the ARM condition table,
// written here as a separate case statement.  Purely combinational; a 1 ns
// step separates vectors.
module tb_cond_checker;
  logic [3:0] cond;
  logic       n, z, c, v, cond_passed;
  int         checks = 0, failures = 0;

  cond_checker dut (.*);

  function automatic logic expect_pass(logic [3:0] cc, logic fn, logic fz, logic fc, logic fv);
    case (cc)
      4'h0: return fz;              // EQ
      4'h1: return !fz;             // NE
      4'h2: return fc;              // CS
      4'h3: return !fc;             // CC
      4'h4: return fn;              // MI
      4'h5: return !fn;             // PL
      4'h6: return fv;              // VS
      4'h7: return !fv;             // VC
      4'h8: return fc && !fz;       // HI
      4'h9: return !fc || fz;       // LS
      4'hA: return fn === fv;        // GE
      4'hB: return fn !== fv;        // LT
      4'hC: return !fz && fn === fv; // GT
      4'hD: return fz || fn !== fv;  // LE
      4'hE: return 1'b1;            // AL
      default: return 1'b0;         // NV
    endcase
  endfunction

  initial begin
    cond = '0; {n, z, c, v} = '0;
    for (int cc = 0; cc < 16; cc++)
      for (int f = 0; f < 16; f++) begin
        cond = 4'(cc); {n, z, c, v} = 4'(f);
        #1;
        checks++;
        if (cond_passed !== expect_pass(cond, n, z, c, v)) begin
          failures++;
          $display("FAIL cond=%h nzcv=%b got %b", cond, {n, z, c, v}, cond_passed);
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
