// Self-checking test of the 4-bit carry-select block: every pair of 4-bit
// operand slices with both block carry-in values; the sum must be
// (a + b + cin) mod 16.
module tb_csb;
  localparam int W = 4;
  logic [W-1:0] a, b, s;
  logic         cin;
  int checks = 0, failures = 0;

  csb #(.W(W)) dut (.g(a & b), .p(a | b), .h(a ^ b), .cin(cin), .s(s));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      a = i[3:0]; b = i[7:4]; cin = i[8];
      #1;
      checks++;
      if (s !== W'(a + b + W'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b s=%h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
