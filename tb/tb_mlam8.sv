// tb_mlam8: the complete approximate 8x8 multiplier on all 65536 operand
// pairs. Checks against the software model of the design: summed error
// distance 118994280 (NMED 0.0279), maximum error 7690 (at 255 x 255), 581
// exact products and the checksum of all products. Also replays two operand
// pairs shown in the published simulation waveforms, whose printed products
// this design reproduces bit for bit, and checks that small operands whose
// partial products all land in kept positions multiply exactly.
module tb_mlam8;
  import tb_ref_pkg::*;
  logic [7:0]  md, mr;
  logic [15:0] product;
  int checks = 0, failures = 0;

  mlam8 dut (.md(md), .mr(mr), .product(product));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [7:0] x, logic [7:0] y, logic [15:0] expected);
    md = x; mr = y;
    #1;
    checks++;
    if (product !== expected) begin
      failures++;
      $display("FAIL %0d x %0d -> %b, expected %b", x, y, product, expected);
    end
  endtask

  int unsigned h = FNV_INIT;
  longint sum_ed = 0;
  int ed, max_ed = 0, exact = 0;
  initial begin
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++) begin
        md = 8'(x); mr = 8'(y);
        #1;
        ed = int'(product) - x * y;
        if (ed < 0) ed = -ed;
        sum_ed += longint'(ed);
        if (ed > max_ed) max_ed = ed;
        if (ed == 0) exact++;
        h = fnv(h, int'(product));
      end
    checks++;
    if (sum_ed != 118994280 || max_ed != 7690 || exact != 581 || h != 32'hbf6e89c5) begin
      failures++;
      $display("FAIL error sum %0d max %0d exact %0d checksum %08h", sum_ed, max_ed, exact, h);
    end
    $display("NMED %f, MAE %0d", real'(sum_ed) / (65536.0 * 65025.0), max_ed);
    // waveform operand pairs
    check_one(8'b00100100, 8'b10000001, 16'b0010000000000000);
    check_one(8'b00001101, 8'b10001101, 16'b0000100110100001);
    // 0 and 1 operands
    check_one(8'd0,   8'd0,   16'd0);
    check_one(8'd1,   8'd1,   16'd1);
    check_one(8'd255, 8'd0,   16'd0);
    check_one(8'd255, 8'd255, 16'd57335);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
