// MixColumns test: the FIPS-197 round-1 example, the well-known column
// db 13 53 45 -> 8e 4d a1 bc, and random states against the column-wise
// reference.
module tb_mix_columns;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;
  state_t s_in, s_out;
  int checks = 0, failures = 0;

  mix_columns dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(string what, state_t exp);
    #1;
    checks++;
    if (s_out != exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, s_out, exp);
    end
  endtask

  initial begin
    s_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    expect_out("FIPS example", 128'h046681e5e0cb199a48f8d37a2806264c);
    s_in = 128'hdb135345f20a225c01010101c6c6c6c6;
    expect_out("known columns", 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    for (int i = 0; i < 500; i++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      expect_out("random", ref_mixcol(s_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
