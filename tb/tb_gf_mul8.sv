// GF(2^8) multiplier test: all 65536 operand pairs against carry-less
// multiplication followed by reduction modulo 0x11b, plus the textbook
// product 57 * 83 = c1.
module tb_gf_mul8;
  import tb_ref_pkg::*;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mul8 dut (.*);

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
      if (p != ref_gmul(a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %h*%h -> %h", a, b, p);
      end
    end
    a = 8'h57; b = 8'h83;
    #1;
    checks++;
    if (p != 8'hc1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
