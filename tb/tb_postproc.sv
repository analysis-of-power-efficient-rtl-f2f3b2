// Self-checking test of the post-processing stage: random half-sum and
// carry vectors, derived from operand pairs and a carry-in; the sum must
// equal the integer sum a + b + cin modulo 2^N.
module tb_postproc;
  localparam int N = 8;
  logic [N-1:0] h, cv, s;
  int checks = 0, failures = 0;

  postproc #(.N(N)) dut (.h(h), .cin_vec(cv), .s(s));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4096; n++) begin
      logic [N-1:0] a, b;
      logic         cin;
      logic [N:0]   full;
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      full = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
      h  = a ^ b;
      cv = full[N-1:0] ^ a ^ b;   // carry into each bit, from the integer sum
      #1;
      checks++;
      if (s !== full[N-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b s=%h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
