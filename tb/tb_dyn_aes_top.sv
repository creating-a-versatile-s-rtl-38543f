// End-to-end test of the dynamic-S-box AES-128 encryptor, at its default
// parameters.
//  - The published message/key pair must build the published table (seed
//    0x67, head 67 ce 9c 39 .., tail .. 33 00) and encrypt under it as the
//    reference cipher does.
//  - Random blocks, each building its own table; consecutive tables differ.
//  - A block whose seed is zero (found with the reference model) exercises
//    the zero-seed replacement.
//  - done must come 265 clock edges after the edge that samples start;
//    start held while busy must be ignored.
// Each mechanism is counted: table builds, zero-seed replacements, rounds
// with MixColumns, final rounds without it, starts ignored while busy,
// table changes between blocks. One that never happens is a failure.
module tb_dyn_aes_top;
  import tb_ref_pkg::*;
  logic          clk = 0, rst = 1, start = 0;
  logic [127:0]  msg = 0, key = 0, ct;
  logic          busy, done;
  logic [2047:0] sbox;
  logic [7:0]    seed;
  int checks = 0, failures = 0, cycles = 0;
  int n_builds = 0, n_fixups = 0, n_mix_rounds = 0, n_last_rounds = 0;
  int n_ignored = 0, n_table_changes = 0;

  dyn_aes_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // mechanism counters, from the block's own handshakes
  always @(posedge clk) if (!rst) begin
    if (dut.u_sbox.done) n_builds++;
    if (dut.u_sbox.done && dut.u_sbox.seed_fixup) n_fixups++;
    if (dut.u_aes.busy && !dut.u_aes.last) n_mix_rounds++;
    if (dut.u_aes.busy && dut.u_aes.last) n_last_rounds++;
    if (start && busy) n_ignored++;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d): ct=%h seed=%h", what, cycles, ct, seed);
    end
  endtask

  task automatic run(output int lat);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    lat = 1;
    @(negedge clk);      // start still high while busy: ignored
    start = 0;
    lat++;
    while (!done && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
  endtask

  task automatic check_block(string what);
    int lat;
    logic [7:0] s;
    tbl_t t;
    logic [2047:0] prev_tbl;
    prev_tbl = sbox;
    s = ref_seed(msg, key);
    t = ref_table(s);
    run(lat);
    chk({what, ": latency 265"}, lat == 266);
    chk({what, ": table"}, sbox == t);
    chk({what, ": ciphertext"}, ct == ref_aes(msg, key, t));
    if (sbox != prev_tbl) n_table_changes++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    chk("idle after reset", !busy && !done);
    rst = 0;

    msg = 128'h544f4e20776e69546f656e772020656f;
    key = 128'h5473206768204b20616d754674796e75;
    check_block("published pair");
    chk("published seed", seed == 8'h67);
    chk("published head", sbox[2047 -: 64] == 64'h67ce9c3973e7cf9e);
    chk("published tail", sbox[31:0] == 32'h8c193300);

    for (int i = 0; i < 8; i++) begin
      msg = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      check_block("random block");
    end

    begin
      bit found;
      found = 0;
      for (int t = 0; t < 64 && !found; t++) begin
        msg = {$urandom, $urandom, $urandom, $urandom};
        key = {$urandom, $urandom, $urandom, $urandom};
        for (int v = 0; v < 256 && !found; v++) begin
          key[7:0] = 8'(v);
          if (ref_seed(msg, key) == 0) found = 1;
        end
      end
      chk("zero-seed pair found", found);
      check_block("zero seed");
      chk("zero seed replaced", seed == 8'h01);
    end

    $display("builds=%0d fixups=%0d mix_rounds=%0d last_rounds=%0d ignored_starts=%0d table_changes=%0d",
             n_builds, n_fixups, n_mix_rounds, n_last_rounds, n_ignored, n_table_changes);
    chk("table builds",        n_builds == 10);
    chk("zero-seed fixups",    n_fixups > 0);
    chk("MixColumns rounds",   n_mix_rounds == 90);
    chk("final rounds",        n_last_rounds == 10);
    chk("ignored starts",      n_ignored > 0);
    chk("table changes",       n_table_changes >= 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
