// Feynman gate test on a 16-bit bus: p must copy a, q must be a ^ b, and
// feeding (p, q) back through a second gate must return (a, b).
module tb_feynman_gate;
  logic [15:0] a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate #(.W(16)) dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate #(.W(16)) back (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      #1;
      checks++;
      if (p != a || q != (a ^ b) || p2 != a || q2 != b) begin
        failures++;
        $display("FAIL a=%h b=%h p=%h q=%h", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
