// tb_dcu: checks |P - F| and the exchange bit for random and edge operands.
module tb_dcu;
  int checks = 0, failures = 0;
  logic [31:0] P, F, D;
  logic ex;
  dcu #(.W(32)) dut (.P(P), .F(F), .D(D), .ex(ex));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] p, logic [31:0] f);
    longint dp = longint'(p), df = longint'(f);
    logic [31:0] exp_d = (dp > df) ? 32'(dp - df) : 32'(df - dp);
    P = p; F = f; #1;
    checks++;
    if (D !== exp_d || ex !== (dp > df)) begin
      failures++; $display("FAIL P=%h F=%h D=%h ex=%b", p, f, D, ex);
    end
  endtask

  initial begin
    check(0, 0); check(32'hFFFF_FFFF, 0); check(0, 32'hFFFF_FFFF); check(5, 5); check(6, 5); check(5, 6);
    for (int i = 0; i < 3000; i++) begin
      automatic logic [31:0] a = $urandom;
      check(a, a + 32'($urandom % 512) - 32'd256);
      check($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
