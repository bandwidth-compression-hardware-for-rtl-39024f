// tb_llrb_enc: every LRB from 0 to 32 must map to the shortest of the limited
// lengths (8, 16, 32) that holds it, with codes 1, 2, 3.
module tb_llrb_enc;
  int checks = 0, failures = 0;
  logic [5:0] lrb, len;
  logic [1:0] code;
  llrb_enc dut (.lrb(lrb), .code(code), .len(len));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= 32; l++) begin
      int ec, el;
      ec = (l <= 8) ? 1 : (l <= 16) ? 2 : 3;
      el = (l <= 8) ? 8 : (l <= 16) ? 16 : 32;
      lrb = 6'(l); #1;
      checks++;
      if (int'(code) != ec || int'(len) != el) begin
        failures++; $display("FAIL lrb=%0d code=%0d len=%0d", l, code, len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
