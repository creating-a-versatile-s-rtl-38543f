// LFSR test: from the published seed 0x67 the first states must be
// 67 ce 9c 39 73 e7 cf 9e (the published table); from any non-zero seed the
// register must visit 255 distinct non-zero states and return to the seed
// after exactly 255 steps; load must win over en; reset gives 0x01.
module tb_lfsr8;
  import tb_ref_pkg::*;
  logic       clk = 0, rst = 1, load = 0, en = 0;
  logic [7:0] seed = 0, q, nxt;
  int checks = 0, failures = 0;
  int cycles = 0;
  localparam logic [7:0] HEAD [8] = '{8'h67, 8'hce, 8'h9c, 8'h39, 8'h73, 8'he7, 8'hcf, 8'h9e};

  lfsr8 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    chk("reset", q, 8'h01);
    rst = 0;
    load = 1; seed = 8'h67; en = 1;
    @(negedge clk);
    load = 0;
    chk("load over en", q, 8'h67);
    for (int i = 1; i < 8; i++) begin
      @(negedge clk);
      chk("published sequence", q, HEAD[i]);
    end
    for (int t = 0; t < 8; t++) begin
      bit [255:0] seen;
      logic [7:0] s0;
      s0 = 8'(1 + ($urandom % 255));
      seen = '0;
      load = 1; seed = s0; en = 0;
      @(negedge clk);
      load = 0; en = 1;
      for (int i = 0; i < 255; i++) begin
        checks++;
        if (q == 0 || seen[q]) failures++;
        seen[q] = 1'b1;
        chk("next", nxt, ref_lfsr(q));
        @(negedge clk);
      end
      chk("period 255", q, s0);
      en = 0;
      @(negedge clk);
      chk("hold when idle", q, s0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
