// Byte mixer test: every byte value against the reference step
// (ror(a, ones) + ror(a, zeros)) mod 256, and the one/zero counts.
module tb_byte_mixer;
  import tb_ref_pkg::*;
  logic [7:0] a, d;
  logic [3:0] ones, zeros;
  int checks = 0, failures = 0;

  byte_mixer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      #1;
      checks++;
      if (d != ref_mix(a) || int'(ones) != $countones(a) || int'(zeros) != 8 - $countones(a)) begin
        failures++;
        $display("FAIL a=%h d=%h (exp %h) ones=%0d zeros=%0d", a, d, ref_mix(a), ones, zeros);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
