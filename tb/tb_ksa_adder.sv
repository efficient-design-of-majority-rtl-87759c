// tb_ksa_adder: the 16-bit Kogge-Stone adder (default size) on corner cases
// and 50000 random operand pairs, and a 7-bit instance (the size the
// multiplier uses) on all 2^15 inputs, each against a + b + cin.
module tb_ksa_adder;
  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [6:0]  a7, b7, s7;
  logic        cin7, cout7;
  int checks = 0, failures = 0;

  ksa_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  ksa_adder #(.W(7)) dut7 (.a(a7), .b(b7), .cin(cin7), .sum(s7), .cout(cout7));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [15:0] x, logic [15:0] y, logic c);
    a = x; b = y; cin = c;
    #1;
    checks++;
    if ({cout, s} !== 17'(x) + 17'(y) + 17'(c)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b -> %b %h", x, y, c, cout, s);
    end
  endtask

  initial begin
    a7 = '0; b7 = '0; cin7 = 1'b0;
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'hffff, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7fff, 16'h0001, 1'b0);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'haaaa, 16'h5555, 1'b1);
    for (int n = 0; n < 50000; n++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int v = 0; v < (1 << 15); v++) begin
      {cin7, b7, a7} = 15'(v);
      #1;
      checks++;
      if ({cout7, s7} !== 8'(a7) + 8'(b7) + 8'(cin7)) begin
        failures++;
        if (failures < 10) $display("FAIL 7-bit %0d + %0d + %b -> %0d", a7, b7, cin7, {cout7, s7});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
