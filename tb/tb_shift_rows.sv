// ShiftRows test: the FIPS-197 example (round 1 of appendix B) and random
// states against the index-permutation reference out[i] = in[(i + 4*(i%4)) % 16].
module tb_shift_rows;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;
  state_t s_in, s_out;
  int checks = 0, failures = 0;

  shift_rows dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    checks++;
    if (s_out != 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin
      failures++;
      $display("FAIL FIPS example: %h", s_out);
    end
    for (int i = 0; i < 500; i++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (s_out != ref_shift(s_in)) begin
        failures++;
        $display("FAIL %h -> %h", s_in, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
