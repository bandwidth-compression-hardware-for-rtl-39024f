// tb_predictor: the cubic predictor must extrapolate any cubic integer
// sequence exactly, and match 4F1 - 6F2 + 4F3 - F4 (mod 2^32) on random data.
// A linear (ORDER = 2) instance is checked on a linear sequence too.
module tb_predictor;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0;
  logic [31:0] f_in, p4, p2;
  predictor #(.W(32), .ORDER(4)) dut  (.clk(clk), .rst_n(rst_n), .push(push), .f_in(f_in), .p_out(p4));
  predictor #(.W(32), .ORDER(2)) dut2 (.clk(clk), .rst_n(rst_n), .push(push), .f_in(f_in), .p_out(p2));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] cubic_seq(int i);
    longint x = i;
    return 32'(3*x*x*x - 7*x*x + 11*x + 1000);
  endfunction

  initial begin
    logic [31:0] h[4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (p4 !== 0) begin failures++; $display("FAIL reset history"); end
    // cubic sequence: exact after 4 samples
    for (int i = 0; i < 40; i++) begin
      if (i >= 4) begin
        checks++;
        if (p4 !== cubic_seq(i)) begin failures++; $display("FAIL cubic i=%0d p=%h exp=%h", i, p4, cubic_seq(i)); end
      end
      f_in = cubic_seq(i); push = 1;
      @(negedge clk);
    end
    // linear sequence through the ORDER = 2 instance
    for (int i = 0; i < 20; i++) begin
      if (i >= 2) begin
        checks++;
        if (p2 !== 32'(5 * i + 7)) begin failures++; $display("FAIL linear i=%0d", i); end
      end
      f_in = 32'(5 * i + 7); push = 1;
      @(negedge clk);
    end
    // random data against the reference, with pauses
    foreach (h[k]) h[k] = 0;
    rst_n = 0; push = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      checks++;
      if (p4 !== cubic_ref(h[0], h[1], h[2], h[3])) begin failures++; $display("FAIL random i=%0d", i); end
      f_in = $urandom; push = ($urandom % 4) != 0;
      if (push) begin h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = f_in; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
