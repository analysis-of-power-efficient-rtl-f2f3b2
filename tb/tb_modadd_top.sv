// End-to-end test of the two diminished-1 modulo 2^8+1 adders at their
// default size (N = 8, sparse-4): every one of the 257 x 257 pairs of
// diminished-1 operands. Both results must equal the arithmetic reference
// and each other. The test also counts how often each case of the
// diminished-1 addition occurred and fails if one never did:
//   both operands non-zero with inverted end-around carry 1 (A*+B* < 2^n),
//   both non-zero with end-around carry 0 (A*+B* >= 2^n),
//   both non-zero with a zero result (A*+B* = 2^n-1),
//   exactly one operand zero, and both operands zero.
module tb_modadd_top;
  import modadd_ref_pkg::*;
  localparam int N = modadd_pkg::N_DEFAULT;

  logic [N-1:0] a, b, sp, un;
  logic         az, bz, sp_z, un_z;
  int checks = 0, failures = 0;
  int n_ieac1 = 0, n_ieac0 = 0, n_reszero = 0, n_onezero = 0, n_bothzero = 0;

  modadd_top dut (.a_z(az), .a(a), .b_z(bz), .b(b), .sp_z(sp_z), .sp(sp), .un_z(un_z), .un(un));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= (1 << N); i++)
      for (int j = 0; j <= (1 << N); j++) begin
        bit ez; longint unsigned es;
        az = (i == (1 << N)); bz = (j == (1 << N));
        a = az ? '0 : N'(i);
        b = bz ? '0 : N'(j);
        #1;
        dim1_add(N, az, a, bz, b, ez, es);
        if (az && bz) n_bothzero++;
        else if (az || bz) n_onezero++;
        else if (int'(a) + int'(b) == (1 << N) - 1) n_reszero++;
        else if (int'(a) + int'(b) < (1 << N)) n_ieac1++;
        else n_ieac0++;
        checks++;
        if (sp_z !== ez || sp !== N'(es)) begin
          failures++;
          if (failures < 20) $display("FAIL sparse az=%b a=%h bz=%b b=%h got %b/%h", az, a, bz, b, sp_z, sp);
        end
        checks++;
        if (un_z !== ez || un !== N'(es)) begin
          failures++;
          if (failures < 20) $display("FAIL unified az=%b a=%h bz=%b b=%h got %b/%h", az, a, bz, b, un_z, un);
        end
      end
    $display("cases: ieac_carry1=%0d ieac_carry0=%0d result_zero=%0d one_zero=%0d both_zero=%0d",
             n_ieac1, n_ieac0, n_reszero, n_onezero, n_bothzero);
    checks++;
    if (n_ieac1 == 0 || n_ieac0 == 0 || n_reszero == 0 || n_onezero == 0 || n_bothzero == 0) begin
      failures++;
      $display("FAIL a case of the addition was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
