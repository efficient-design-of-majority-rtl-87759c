// tb_image_workload: the image-processing use of the approximate units on a
// 64x64 8-bit synthetic test image, pixel(x,y) = (4x + 3y + (x*y >> 3)) mod 256.
//  * image addition: every pixel is added to itself (the same image twice)
//    by each of the four 8-bit approximate adders; the squared error against
//    the exact 9-bit sum gives the PSNR (peak 510).
//  * image multiplication: pixel(x,y) times pixel(y,x) through the
//    approximate multiplier; PSNR against the exact 16-bit product (peak 65025).
// The sums of squared errors are compared with the software model. The
// MLAFA-b cascade must be error free when both operands are equal (its carry
// out is then the exact carry and S0 takes it as carry in), so its PSNR is
// infinite.
module tb_image_workload;
  import tb_ref_pkg::*;
  logic [7:0]  md, mr, a, b;
  logic [15:0] product;
  logic        cin;
  logic [8:0]  sum_a, sum_b, sum_i, sum_ii;
  int checks = 0, failures = 0;

  qca_approx_top dut (.md(md), .mr(mr), .product(product), .a(a), .b(b), .cin(cin),
                      .sum_a(sum_a), .sum_b(sum_b), .sum_i(sum_i), .sum_ii(sum_ii));

  function automatic logic [7:0] pix(int x, int y);
    return 8'(4 * x + 3 * y + ((x * y) >> 3));
  endfunction

  function automatic real psnr(real peak, longint sse, int n);
    return 10.0 * $log10(peak * peak / (real'(sse) / real'(n)));
  endfunction

  localparam longint EXP_SSE [4] = '{6793024, 0, 2592032, 525504};
  localparam string NAME    [4] = '{"MLAFA-a x4", "MLAFA-b x4", "MLAFA-I x2", "MLAFA-II x2"};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sse [4] = '{0, 0, 0, 0};
  longint sse_m = 0, e;
  int unsigned got [4];
  initial begin
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) begin
        a  = pix(x, y); b  = pix(x, y);
        md = pix(x, y); mr = pix(y, x);
        #1;
        got = '{int'(sum_a), int'(sum_b), int'(sum_i), int'(sum_ii)};
        for (int k = 0; k < 4; k++) begin
          e = longint'(got[k]) - 2 * longint'(a);
          sse[k] += e * e;
        end
        e = longint'(product) - longint'(md) * longint'(mr);
        sse_m += e * e;
      end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (sse[k] != EXP_SSE[k]) begin
        failures++;
        $display("FAIL %s squared error %0d, expected %0d", NAME[k], sse[k], EXP_SSE[k]);
      end
      if (sse[k] == 0) $display("image add, %-12s PSNR infinite", NAME[k]);
      else $display("image add, %-12s PSNR %6.2f dB", NAME[k], psnr(510.0, sse[k], 4096));
    end
    checks++;
    if (sse_m != 64'd20277199616) begin
      failures++;
      $display("FAIL multiplier squared error %0d", sse_m);
    end
    $display("image multiply, approximate multiplier PSNR %6.2f dB", psnr(65025.0, sse_m, 4096));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
