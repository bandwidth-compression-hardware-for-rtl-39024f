// tb_btu: checks the binary translation against the sign-flip rule and checks
// that the mapping preserves the numeric order of floating-point values.
module tb_btu;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] f, F, f2, F2;
  btu #(.W(32)) dut (.f(f), .F(F));
  btu #(.W(32)) dut2 (.f(f2), .F(F2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, b;
    // fixed cases: +1.0, -1.0, +0, -0
    f = 32'h3F80_0000; #1; checks++; if (F !== 32'hBF80_0000) begin failures++; $display("FAIL +1.0 -> %h", F); end
    f = 32'hBF80_0000; #1; checks++; if (F !== 32'h407F_FFFF) begin failures++; $display("FAIL -1.0 -> %h", F); end
    f = 32'h0000_0000; #1; checks++; if (F !== 32'h8000_0000) begin failures++; $display("FAIL +0 -> %h", F); end
    for (int i = 0; i < 2000; i++) begin
      f = $urandom; #1;
      checks++;
      if (F !== btu_ref(f)) begin failures++; $display("FAIL f=%h F=%h", f, F); end
      // order preservation on finite values
      a = ((real'($urandom % 200000) - 100000.0) / 1000.0);
      b = ((real'($urandom % 200000) - 100000.0) / 1000.0);
      f = to_f32(a); f2 = to_f32(b); #1;
      checks++;
      if ((a < b) && !(F < F2)) begin failures++; $display("FAIL order %f %f", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
