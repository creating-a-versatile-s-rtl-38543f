// Ripple-carry adder test: all 2^17 operand/carry combinations at W = 8, and
// random operands at W = 16, against integer addition.
module tb_rc_adder;
  logic [7:0]  a, b, sum;
  logic        cin, cout;
  logic [15:0] garbage;
  logic [15:0] a2, b2, sum2;
  logic        cout2;
  logic [31:0] garbage2;
  int checks = 0, failures = 0;

  rc_adder #(.W(8))  dut  (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));
  rc_adder #(.W(16)) dut2 (.a(a2), .b(b2), .cin(1'b0), .sum(sum2), .cout(cout2), .garbage(garbage2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      #1;
      checks++;
      if ({cout, sum} != 9'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h+%b = %b%h", a, b, cin, cout, sum);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      a2 = 16'($urandom); b2 = 16'($urandom);
      #1;
      checks++;
      if ({cout2, sum2} != 17'(int'(a2) + int'(b2))) begin
        failures++;
        $display("FAIL16 %h+%h = %b%h", a2, b2, cout2, sum2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
