// Key schedule step test. With the standard AES table, the FIPS-197 key
// 2b7e1516.. must expand to the published round keys 1, 2 and 10, and rcon
// must run 01 02 04 .. 1b 36. With dynamic tables the step is compared with
// the reference schedule.
module tb_key_expansion;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;
  state_t     rk, rk_next;
  logic [7:0] rcon, rcon_next;
  sbox_t      sbox;
  int checks = 0, failures = 0;
  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  key_expansion dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rk_next=%h rcon_next=%h", what, rk_next, rcon_next);
    end
  endtask

  initial begin
    sbox = std_sbox();
    rk = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      rcon = RCON[r-1];
      #1;
      if (r < 10) chk("rcon", rcon_next == RCON[r]);
      if (r == 1)  chk("round key 1",  rk_next == 128'ha0fafe1788542cb123a339392a6c7605);
      if (r == 2)  chk("round key 2",  rk_next == 128'hf2c295f27a96b9435935807a7359f67f);
      if (r == 10) chk("round key 10", rk_next == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      rk = rk_next;
    end
    for (int t = 0; t < 300; t++) begin
      sbox = ref_table(8'($urandom));
      rk   = {$urandom, $urandom, $urandom, $urandom};
      rcon = RCON[$urandom % 10];
      #1;
      chk("dynamic table", rk_next == ref_key_next(rk, rcon, sbox));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
