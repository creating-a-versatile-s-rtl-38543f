// Dynamic S-box test.
//  - Published example: message 544f4e20..656f and key 54732067..6e75 must
//    build the published table: it starts 67 ce 9c 39 73 e7 cf 9e and ends
//    .. 8c 19 33 00. The whole table is compared with the reference model.
//  - done must come 254 clocks after start; start while busy is ignored.
//  - Random pairs: table equals the reference and is a permutation of 0..255.
//  - A pair whose seed is zero (searched for with the reference model): the
//    seed is replaced by 0x01 and seed_fixup is raised.
//  - A 192-bit message/key instance builds from the chunk selected.
module tb_dyn_sbox;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;

  logic         clk = 0, rst = 1, start = 0;
  logic [127:0] msg = 0, key = 0;
  logic         busy, done, valid, fix;
  logic [7:0]   seed;
  sbox_t        sbox;

  logic [191:0] msg2 = 0, key2 = 0;
  logic         sel2 = 0, start2 = 0;
  logic         busy2, done2, valid2, fix2;
  logic [7:0]   seed2;
  sbox_t        sbox2;

  int checks = 0, failures = 0, cycles = 0;
  int fixups = 0;

  dyn_sbox dut (
    .clk(clk), .rst(rst), .start(start), .msg(msg), .key(key), .chunk_sel(1'b0),
    .busy(busy), .done(done), .valid(valid), .seed_fixup(fix), .seed(seed), .sbox(sbox));

  dyn_sbox #(.MSG_W(192), .KEY_W(192)) dut2 (
    .clk(clk), .rst(rst), .start(start2), .msg(msg2), .key(key2), .chunk_sel(sel2),
    .busy(busy2), .done(done2), .valid(valid2), .seed_fixup(fix2), .seed(seed2), .sbox(sbox2));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

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
      $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  // start a build; lat counts clock edges from the one that samples start up
  // to and including the one that raises done, plus one (that is, done is
  // raised 254 edges after the start edge when lat == 255)
  task automatic build(output int lat);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    chk("busy after start", busy && !valid);
    // a second start while busy must be ignored
    start = 1;
    @(negedge clk);
    start = 0;
    lat++;
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 1000) break;
    end
  endtask

  function automatic bit is_perm(sbox_t t);
    bit [255:0] seen;
    seen = '0;
    for (int i = 0; i < 256; i++) seen[t[i]] = 1'b1;
    return &seen;
  endfunction

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    chk("reset state", !busy && !valid && !done);
    rst = 0;

    msg = 128'h544f4e20776e69546f656e772020656f;
    key = 128'h5473206768204b20616d754674796e75;
    build(lat);
    chk("latency 254", lat == 255);
    chk("valid with done", valid && !busy);
    chk("published seed", seed == 8'h67);
    chk("published head", sbox[0:7] == 64'h67ce9c3973e7cf9e);
    chk("published tail", sbox[252:255] == 32'h8c193300);
    chk("published table", sbox == ref_table(8'h67));
    chk("permutation", is_perm(sbox));
    @(negedge clk);
    chk("table holds", sbox == ref_table(8'h67) && valid);

    for (int t = 0; t < 6; t++) begin
      msg = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      build(lat);
      chk("latency", lat == 255);
      chk("random table", sbox == ref_table(ref_seed(msg, key)));
      chk("random permutation", is_perm(sbox));
      chk("no fixup", !fix || ref_seed(msg, key) == 0);
    end

    // find a pair whose seed is zero
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
      build(lat);
      if (fix) fixups++;
      chk("zero seed replaced", fix && seed == 8'h01 && sbox == ref_table(8'h00));
      chk("zero-seed permutation", is_perm(sbox));
    end

    // 192-bit message and key, both chunks
    for (int c = 0; c < 2; c++) begin
      msg2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      key2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      sel2 = 1'(c);
      @(negedge clk);
      start2 = 1;
      @(negedge clk);
      start2 = 0;
      wait (done2);
      @(negedge clk);
      if (c == 0)
        chk("192 chunk 0", sbox2 == ref_table(ref_seed(msg2[191:64], key2[191:64])));
      else
        chk("192 chunk 1", sbox2 == ref_table(ref_seed({msg2[63:0], 64'h0}, {key2[63:0], 64'h0})));
    end

    chk("zero-seed fixup exercised", fixups > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
