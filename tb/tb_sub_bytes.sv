// SubBytes test: with the standard AES table the FIPS-197 round-1 state
// 19 3d e3 be .. must map to d4 27 11 ae ..; with random permutation-like
// tables (LFSR tables from random seeds) every byte must be the table entry
// it indexes.
module tb_sub_bytes;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;
  state_t s_in, s_out;
  sbox_t  sbox;
  int checks = 0, failures = 0;

  sub_bytes dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sbox = std_sbox();
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1;
    checks++;
    if (s_out != 128'hd42711aee0bf98f1b8b45de51e415230) begin
      failures++;
      $display("FAIL FIPS example: %h", s_out);
    end
    for (int t = 0; t < 20; t++) begin
      sbox = ref_table(8'($urandom));
      for (int i = 0; i < 50; i++) begin
        s_in = {$urandom, $urandom, $urandom, $urandom};
        #1;
        for (int n = 0; n < 16; n++) begin
          checks++;
          if (s_out[n] != sbox[s_in[n]]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
