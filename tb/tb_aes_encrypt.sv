// AES-128 core test.
//  - With the standard AES table loaded as the S-box, the FIPS-197 vectors
//    (appendix B and appendix C.1) must encrypt to their published
//    ciphertexts.
//  - With dynamic tables from random seeds, random blocks are compared with
//    the reference cipher.
//  - done must come 10 clock edges after the edge that samples start, and
//    start while busy must be ignored.
module tb_aes_encrypt;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;
  logic       clk = 0, rst = 1, start = 0;
  state_t     pt = 0, key = 0, ct;
  sbox_t      sbox;
  logic       busy, done;
  logic [3:0] round;
  int checks = 0, failures = 0, cycles = 0;

  aes_encrypt dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ct=%h (cycle %0d)", what, ct, cycles);
    end
  endtask

  // lat = edges from the start edge to the done edge, plus one
  task automatic run(output int lat);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    lat = 1;
    // keep start high one more cycle: the core is busy and must ignore it
    @(negedge clk);
    start = 0;
    lat++;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst = 0;
    sbox = std_sbox();

    pt  = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    run(lat);
    chk("FIPS-197 appendix B", ct == 128'h3925841d02dc09fbdc118597196a0b32);
    chk("latency 10", lat == 11);
    @(negedge clk);
    chk("idle after done", !busy && !done);

    pt  = 128'h00112233445566778899aabbccddeeff;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    run(lat);
    chk("FIPS-197 appendix C.1", ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);

    for (int t = 0; t < 40; t++) begin
      sbox = ref_table(8'($urandom));
      pt   = {$urandom, $urandom, $urandom, $urandom};
      key  = {$urandom, $urandom, $urandom, $urandom};
      run(lat);
      chk("dynamic table", ct == ref_aes(pt, key, sbox));
      chk("latency", lat == 11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
