// Modulo 2^8 adder test: all 65536 operand pairs against (a + b) % 256.
module tb_mod_adder8;
  logic [7:0] a, b, s;
  int checks = 0, failures = 0;
  int carries = 0;

  mod_adder8 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) > 255) carries++;
      if (int'(s) != (int'(a) + int'(b)) % 256) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h -> %h", a, b, s);
      end
    end
    checks++;
    if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
