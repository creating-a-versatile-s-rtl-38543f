// Rotator test: an 8-bit right rotator for every value and amount, a 32-bit
// left rotator for random values and every amount, a 12-bit (non power of
// two) right rotator and a 256-bit left rotator (the widest row width a
// wider cipher would use), all against shift-and-or references.
module tb_rot_feynman;
  logic [7:0]  x8, y8;
  logic [2:0]  n8;
  logic [31:0] x32, y32;
  logic [4:0]  n32;
  logic [11:0] x12, y12;
  logic [3:0]  n12;
  logic [255:0] x256, y256;
  logic [7:0]   n256;
  int checks = 0, failures = 0;

  rot_feynman #(.W(8),  .RIGHT(1'b1)) dut8  (.x(x8),  .amt(n8),  .y(y8));
  rot_feynman #(.W(32), .RIGHT(1'b0)) dut32 (.x(x32), .amt(n32), .y(y32));
  rot_feynman #(.W(12), .RIGHT(1'b1)) dut12 (.x(x12), .amt(n12), .y(y12));
  rot_feynman #(.W(256), .RIGHT(1'b0)) dut256 (.x(x256), .amt(n256), .y(y256));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int n = 0; n < 8; n++) begin
        logic [15:0] dbl;
        x8 = 8'(v); n8 = 3'(n);
        #1;
        dbl = {x8, x8} >> n;
        checks++;
        if (y8 != dbl[7:0]) begin
          failures++;
          if (failures < 10) $display("FAIL ror8 %h by %0d -> %h", x8, n, y8);
        end
      end
    for (int i = 0; i < 200; i++)
      for (int n = 0; n < 32; n++) begin
        logic [63:0] dbl;
        x32 = $urandom; n32 = 5'(n);
        #1;
        dbl = {x32, x32} << n;
        checks++;
        if (y32 != dbl[63:32]) begin
          failures++;
          if (failures < 10) $display("FAIL rol32 %h by %0d -> %h", x32, n, y32);
        end
      end
    for (int i = 0; i < 200; i++)
      for (int n = 0; n < 12; n++) begin
        logic [23:0] dbl;
        x12 = 12'($urandom); n12 = 4'(n);
        #1;
        dbl = {x12, x12} >> n;
        checks++;
        if (y12 != dbl[11:0]) begin
          failures++;
          if (failures < 10) $display("FAIL ror12 %h by %0d -> %h", x12, n, y12);
        end
      end
    for (int i = 0; i < 500; i++) begin
      logic [511:0] dbl;
      for (int w = 0; w < 8; w++) x256[32*w +: 32] = $urandom;
      n256 = 8'($urandom);
      #1;
      dbl = {x256, x256} << n256;
      checks++;
      if (y256 != dbl[511:256]) begin
        failures++;
        if (failures < 10) $display("FAIL rol256 by %0d", n256);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
