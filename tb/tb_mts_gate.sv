// Exhaustive test of the MTS gate: all 16 input patterns. With d = 0 the
// third and fourth outputs must be the full-adder sum and carry of a+b+c; over
// all patterns the 4-bit outputs must be distinct (the gate is reversible).
module tb_mts_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  mts_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      if (!d) begin
        int tot;
        tot = int'(a) + int'(b) + int'(c);
        checks++;
        if ({s, r} != 2'(tot)) begin
          failures++;
          $display("FAIL a=%b b=%b c=%b: carry,sum=%b%b", a, b, c, s, r);
        end
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output pattern %b repeats", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
