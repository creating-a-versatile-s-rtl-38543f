// AddRoundKey test: the FIPS-197 round-0 example and random pairs against a
// 128-bit XOR.
module tb_add_round_key;
  import dsbox_pkg::*;
  state_t s_in, rk, s_out;
  int checks = 0, failures = 0;

  add_round_key dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = 128'h3243f6a8885a308d313198a2e0370734;
    rk   = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (s_out != 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin
      failures++;
      $display("FAIL FIPS example: %h", s_out);
    end
    for (int i = 0; i < 500; i++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      rk   = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (s_out != (s_in ^ rk)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
