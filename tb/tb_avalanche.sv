// Avalanche workload on the dynamic-S-box AES-128 encryptor.
//
// A base block is encrypted, then the same block with one bit flipped, for
// the bit indices 127, 124, 109, 75, 48, 32, 12, 2, 1 and 0 (index 127 is the
// MSB). Every block builds its own S-box, so a flipped plaintext bit changes
// the table too. For each flip the testbench prints the ciphertext and the
// percentage of ciphertext bits that changed; every ciphertext is checked
// against the reference model, each avalanche must lie between 25 % and 75 %,
// and the mean between 40 % and 60 %. The key is fixed (54732067..6e75).
module tb_avalanche;
  import tb_ref_pkg::*;
  logic          clk = 0, rst = 1, start = 0;
  logic [127:0]  msg = 0, key = 0, ct;
  logic          busy, done;
  logic [2047:0] sbox;
  logic [7:0]    seed;
  int checks = 0, failures = 0, cycles = 0;
  localparam int NFLIP = 10;
  localparam int FLIPS [NFLIP] = '{127, 124, 109, 75, 48, 32, 12, 2, 1, 0};

  dyn_aes_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input logic [127:0] m, output logic [127:0] c);
    msg = m;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    c = ct;
    checks++;
    if (c != ref_aes(m, key, ref_table(ref_seed(m, key)))) begin
      failures++;
      $display("FAIL ciphertext of %h", m);
    end
  endtask

  initial begin
    logic [127:0] base, c0, c1;
    real pct, total;
    repeat (3) @(negedge clk);
    rst = 0;
    key  = 128'h5473206768204b20616d754674796e75;
    base = 128'h544f4e20776e69546f656e772020656f;
    encrypt(base, c0);
    $display("base      %h -> %h", base, c0);
    total = 0.0;
    for (int i = 0; i < NFLIP; i++) begin
      logic [127:0] m;
      m = base;
      m[FLIPS[i]] = ~m[FLIPS[i]];
      encrypt(m, c1);
      pct = 100.0 * real'($countones(c0 ^ c1)) / 128.0;
      total += pct;
      $display("bit %3d   %h -> %h  avalanche %0.4f %%", FLIPS[i], m, c1, pct);
      checks++;
      if (pct < 25.0 || pct > 75.0) begin
        failures++;
        $display("FAIL avalanche out of range");
      end
    end
    $display("mean avalanche %0.4f %%", total / NFLIP);
    checks++;
    if (total / NFLIP < 40.0 || total / NFLIP > 60.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
