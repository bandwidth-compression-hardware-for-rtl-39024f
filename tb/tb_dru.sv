// tb_dru: checks that the reconstruction inverts |P - F| with ex for random
// operand pairs, including wrap-around of the unsigned range.
module tb_dru;
  int checks = 0, failures = 0;
  logic [31:0] P, D, F;
  logic ex;
  dru #(.W(32)) dut (.P(P), .D(D), .ex(ex), .F(F));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      automatic logic [31:0] p = $urandom;
      automatic logic [31:0] f = (i % 2) ? $urandom : p + 32'($urandom % 1024) - 32'd512;
      P  = p;
      ex = (p > f);
      D  = (p > f) ? p - f : f - p;
      #1;
      checks++;
      if (F !== f) begin failures++; $display("FAIL P=%h f=%h got %h", p, f, F); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
