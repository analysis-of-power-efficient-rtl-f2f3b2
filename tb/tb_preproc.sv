// Self-checking test of the modified pre-processing stage: all pairs of
// 8-bit operands; generate, propagate and half-sum must equal AND, OR, XOR.
module tb_preproc;
  localparam int N = 8;
  logic [N-1:0] a, b, g, p, h;
  int checks = 0, failures = 0;

  preproc #(.N(N)) dut (.a(a), .b(b), .g(g), .p(p), .h(h));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i); b = N'(j);
        #1;
        checks++;
        if (g !== N'(i & j) || p !== N'(i | j) || h !== N'(i ^ j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h g=%h p=%h h=%h", a, b, g, p, h);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
