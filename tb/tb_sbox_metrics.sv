// S-box quality workload on the dynamic S-box builder (default parameters).
//
// Builds the table for the worked-example message/key pair and for the same
// pair with message bit 0 flipped, then measures:
//  - bijectivity of each table;
//  - the strict avalanche criterion: for every input bit i and output bit j,
//    the fraction of the 256 inputs x for which flipping bit i of x flips
//    bit j of S(x) (ideal 0.5);
//  - the Hamming distance between the two tables, as a fraction of 2048 bits;
//  - the correlation coefficient between x and S(x) over all 256 entries.
// Both tables are checked against the reference model. The SAC mean must lie
// in [0.4, 0.6], and the table distance in [0.3, 0.7].
module tb_sbox_metrics;
  import tb_ref_pkg::*;
  import dsbox_pkg::*;
  logic         clk = 0, rst = 1, start = 0;
  logic [127:0] msg = 0, key = 0;
  logic         busy, done, valid, fix;
  logic [7:0]   seed;
  sbox_t        sbox;
  int checks = 0, failures = 0, cycles = 0;

  dyn_sbox dut (
    .clk(clk), .rst(rst), .start(start), .msg(msg), .key(key), .chunk_sel(1'b0),
    .busy(busy), .done(done), .valid(valid), .seed_fixup(fix), .seed(seed), .sbox(sbox));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(output sbox_t t);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    t = sbox;
    checks++;
    if (t != ref_table(ref_seed(msg, key))) begin
      failures++;
      $display("FAIL table differs from reference");
    end
  endtask

  function automatic bit bijective(sbox_t t);
    bit [255:0] seen;
    seen = '0;
    for (int i = 0; i < 256; i++) seen[t[i]] = 1'b1;
    return &seen;
  endfunction

  initial begin
    sbox_t t0, t1;
    real sac, sac_sum, sac_min, sac_max, hd, mx, my, sxy, sxx, syy, corr;
    repeat (3) @(negedge clk);
    rst = 0;
    msg = 128'h544f4e20776e69546f656e772020656f;
    key = 128'h5473206768204b20616d754674796e75;
    build(t0);
    msg[0] = ~msg[0];
    build(t1);
    checks += 2;
    if (!bijective(t0) || !bijective(t1)) begin
      failures++;
      $display("FAIL table not bijective");
    end

    sac_sum = 0.0; sac_min = 1.0; sac_max = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int n;
        n = 0;
        for (int x = 0; x < 256; x++) begin
          logic [7:0] y0, y1;
          y0 = t0[x];
          y1 = t0[x ^ (1 << i)];
          n += int'(y0[j] ^ y1[j]);
        end
        sac = real'(n) / 256.0;
        sac_sum += sac;
        if (sac < sac_min) sac_min = sac;
        if (sac > sac_max) sac_max = sac;
      end
    $display("SAC mean %0.4f min %0.4f max %0.4f", sac_sum / 64.0, sac_min, sac_max);
    checks++;
    if (sac_sum / 64.0 < 0.4 || sac_sum / 64.0 > 0.6) failures++;

    hd = 0.0;
    for (int x = 0; x < 256; x++) hd += real'($countones(t0[x] ^ t1[x]));
    hd = hd / 2048.0;
    $display("table distance for a 1-bit message change: %0.4f (seeds %h, %h)", hd, t0[0], t1[0]);
    checks++;
    if (hd < 0.3 || hd > 0.7) failures++;

    mx = 127.5; my = 127.5; sxy = 0.0; sxx = 0.0; syy = 0.0;
    for (int x = 0; x < 256; x++) begin
      sxy += (real'(x) - mx) * (real'(t0[x]) - my);
      sxx += (real'(x) - mx) * (real'(x) - mx);
      syy += (real'(t0[x]) - my) * (real'(t0[x]) - my);
    end
    corr = sxy / $sqrt(sxx * syy);
    $display("correlation of x and S(x): %0.4f", corr);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
