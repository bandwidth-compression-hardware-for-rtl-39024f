// tb_lrbu: length of residual bits for 32-bit (default) and 64-bit units,
// every leading-zero count and random words, against a bit-scan reference.
module tb_lrbu;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] d;
  logic [63:0] d64;
  logic [5:0] lrb;
  logic [6:0] lrb64;
  lrbu dut (.d(d), .lrb(lrb));
  lrbu #(.W(64)) dut64 (.d(d64), .lrb(lrb64));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 64; n++) begin
      for (int r = 0; r < 8; r++) begin
        automatic logic [63:0] x = {$urandom, $urandom};
        x = (n == 0) ? 64'd0 : ((x | 64'd1 << (n - 1)) & ((n == 64) ? '1 : ((64'd1 << n) - 1)));
        d = x[31:0]; d64 = x; #1;
        if (n <= 32) begin
          checks++;
          if (int'(lrb) != lrb_ref(x, 32)) begin failures++; $display("FAIL32 %h lrb=%0d", d, lrb); end
        end
        checks++;
        if (int'(lrb64) != lrb_ref(x, 64)) begin failures++; $display("FAIL64 %h lrb=%0d", d64, lrb64); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
