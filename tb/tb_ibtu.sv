// tb_ibtu: checks the inverse translation against the reference rule and that
// it undoes the forward translation for random bit strings.
module tb_ibtu;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] F, f;
  ibtu #(.W(32)) dut (.F(F), .f(f));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    F = 32'hBF80_0000; #1; checks++; if (f !== 32'h3F80_0000) begin failures++; $display("FAIL +1.0"); end
    F = 32'h407F_FFFF; #1; checks++; if (f !== 32'hBF80_0000) begin failures++; $display("FAIL -1.0"); end
    for (int i = 0; i < 3000; i++) begin
      x = $urandom;
      F = btu_ref(x); #1;
      checks++;
      if (f !== x) begin failures++; $display("FAIL x=%h got %h", x, f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
