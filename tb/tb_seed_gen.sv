// Seed generator test.
//  - The published example pair (message 544f4e20..656f, key 54732067..6e75)
//    must give seed 0x67, the first byte of its published table.
//  - Random 128-bit pairs against the reference model.
//  - A 64-bit message (zero padded below) with a 128-bit key.
//  - 192-bit message and key: both chunks, the second one zero padded.
module tb_seed_gen;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;

  logic [127:0] m128, k128;
  logic [63:0]  m64;
  logic [191:0] m192, k192;
  logic         sel192;
  state_t       al_a, mx_a, al_b, mx_b, al_c, mx_c;
  logic [7:0]   s_a, s_b, s_c;
  int checks = 0, failures = 0;

  seed_gen #(.MSG_W(128), .KEY_W(128)) dut_a (
    .msg(m128), .key(k128), .chunk_sel(1'b0), .alpha(al_a), .mixed(mx_a), .seed(s_a));
  seed_gen #(.MSG_W(64), .KEY_W(128)) dut_b (
    .msg(m64), .key(k128), .chunk_sel(1'b0), .alpha(al_b), .mixed(mx_b), .seed(s_b));
  seed_gen #(.MSG_W(192), .KEY_W(192)) dut_c (
    .msg(m192), .key(k192), .chunk_sel(sel192), .alpha(al_c), .mixed(mx_c), .seed(s_c));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: seed %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m128 = 128'h544f4e20776e69546f656e772020656f;
    k128 = 128'h5473206768204b20616d754674796e75;
    m64 = '0; m192 = '0; k192 = '0; sel192 = 0;
    #1;
    check("published pair", s_a, 8'h67);
    checks++;
    if (al_a != (m128 ^ k128)) begin failures++; $display("FAIL alpha"); end
    for (int i = 0; i < 300; i++) begin
      m128 = {$urandom, $urandom, $urandom, $urandom};
      k128 = {$urandom, $urandom, $urandom, $urandom};
      m64  = {$urandom, $urandom};
      m192 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      k192 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      sel192 = 1'($urandom);
      #1;
      check("random 128", s_a, ref_seed(m128, k128));
      check("64-bit message", s_b, ref_seed({m64, 64'h0}, k128));
      if (sel192)
        check("192 chunk 1", s_c, ref_seed({m192[63:0], 64'h0}, {k192[63:0], 64'h0}));
      else
        check("192 chunk 0", s_c, ref_seed(m192[191:64], k192[191:64]));
      for (int n = 0; n < 16; n++) begin
        checks++;
        if (mx_a[n] != ref_mix(al_a[n])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
