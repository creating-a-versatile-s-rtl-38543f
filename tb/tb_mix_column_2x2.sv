// 2x2 GF(2^8) matrix product test: random operands against products and
// sums from the reference multiplier, plus an identity-matrix case.
module tb_mix_column_2x2;
  import tb_ref_pkg::*;
  logic [7:0] a1, a2, a3, a4, b1, b2, b3, b4, c1, c2, c3, c4;
  int checks = 0, failures = 0;

  mix_column_2x2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a1, a2, a3, a4} = 32'h01000001;
    {b1, b2, b3, b4} = 32'h11223344;
    #1;
    checks++;
    if ({c1, c2, c3, c4} != 32'h11332244) begin
      failures++;
      $display("FAIL identity: %h", {c1, c2, c3, c4});
    end
    for (int i = 0; i < 2000; i++) begin
      {a1, a2, a3, a4} = $urandom;
      {b1, b2, b3, b4} = $urandom;
      #1;
      checks++;
      if (c1 != (ref_gmul(a1, b1) ^ ref_gmul(a2, b2)) ||
          c2 != (ref_gmul(a1, b3) ^ ref_gmul(a2, b4)) ||
          c3 != (ref_gmul(a3, b1) ^ ref_gmul(a4, b2)) ||
          c4 != (ref_gmul(a3, b3) ^ ref_gmul(a4, b4))) begin
        failures++;
        if (failures < 10) $display("FAIL A=%h B=%h C=%h", {a1, a2, a3, a4}, {b1, b2, b3, b4}, {c1, c2, c3, c4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
