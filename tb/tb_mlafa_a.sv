// tb_mlafa_a: exhaustive check of MLAFA-a. Every one of the 32 input
// combinations is compared with the reduced truth table of the design (the 16
// rows it changes, indexed 16*Cin + 4*B + A) and with the exact sum for the
// other 16; the summed error distance must be 16 and the maximum 1.
module tb_mlafa_a;
  import tb_ref_pkg::*;
  logic [1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  mlafa_a dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  // approximate decimal output of the 16 inexact rows, by index
  function automatic int table_d(int idx);
    case (idx)
      1: return 2;   2: return 1;   4: return 2;   7: return 3;
      8: return 1;  10: return 5;  13: return 3;  15: return 7;
     16: return 0;  18: return 4;  21: return 2;  23: return 6;
     24: return 4;  27: return 5;  29: return 6;  30: return 5;
      default: return -1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d, exp_d, ed, sum_ed = 0, max_ed = 0, inexact = 0;
  initial begin
    for (int idx = 0; idx < 32; idx++) begin
      a   = 2'(idx);
      b   = 2'(idx >> 2);
      cin = 1'(idx >> 4);
      #1;
      d     = int'({cout, s});
      exp_d = table_d(idx);
      if (exp_d < 0) exp_d = int'(a) + int'(b) + int'(cin);
      else inexact++;
      checks++;
      if (d != exp_d) begin
        failures++;
        $display("FAIL index %0d: got %0d expected %0d", idx, d, exp_d);
      end
      checks++;
      if ({cout, s} !== 3'(ref_mlafa_a(a, b, cin))) begin
        failures++;
        $display("FAIL index %0d against equations", idx);
      end
      ed = d - (int'(a) + int'(b) + int'(cin));
      if (ed < 0) ed = -ed;
      sum_ed += ed;
      if (ed > max_ed) max_ed = ed;
    end
    checks++;
    if (sum_ed != 16 || max_ed != 1 || inexact != 16) begin
      failures++;
      $display("FAIL error sum %0d max %0d", sum_ed, max_ed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
