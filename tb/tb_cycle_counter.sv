// tb_cycle_counter: the operating-cycle / valid-cycle counter, at the default
// 48-bit width and in a 4-bit copy for saturation.
// Checks: counts against a model under random run and valid, clear, and that
// the narrow copy stops at its maximum instead of wrapping.
module tb_cycle_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, run = 0, valid = 0;
  logic [47:0] op, vc;
  logic [3:0] op4, vc4;
  cycle_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .run(run), .valid(valid),
    .op_cycles(op), .valid_cycles(vc));
  cycle_counter #(.CW(4)) dut4 (.clk(clk), .rst_n(rst_n), .clear(clear), .run(run), .valid(valid),
    .op_cycles(op4), .valid_cycles(vc4));
  always #5 clk = ~clk;

  longint m_op = 0, m_vc = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n) begin
      checks++;
      if (op !== 48'(m_op) || vc !== 48'(m_vc)) begin failures++; $display("FAIL %0d/%0d exp %0d/%0d", op, vc, m_op, m_vc); end
      checks++;
      if (op4 !== 4'((m_op > 15) ? 15 : m_op) || vc4 !== 4'((m_vc > 15) ? 15 : m_vc)) begin
        failures++; $display("FAIL narrow %0d/%0d", op4, vc4);
      end
      if (clear) begin m_op = 0; m_vc = 0; end
      else if (run) begin m_op++; if (valid) m_vc++; end
    end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      run = ($urandom % 100) < 80; valid = $urandom; clear = ($urandom % 500) == 0;
      @(posedge clk); #1;
    end
    run = 0; clear = 0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
