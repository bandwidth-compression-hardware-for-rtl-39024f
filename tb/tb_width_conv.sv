// tb_width_conv: the uncompressed-route gearboxes, 512 to 960 bits (memory
// words to one 30-channel grid point) and 960 back to 512, chained.
// Checks:
//  - every 960-bit word equals the next 960 bits of the input bit stream,
//    least significant first;
//  - the chain returns the input stream unchanged, with random stalls on both
//    ends;
//  - rate: with both ends always ready the 512-bit input side never waits,
//    that is 512 input bits per cycle.
module tb_width_conv;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, a_ready, m_valid, m_ready, z_valid, z_ready = 0;
  logic [511:0] a_data = '0, z_data;
  logic [959:0] m_data;
  width_conv #(.IN_W(512), .OUT_W(960)) up (.clk(clk), .rst_n(rst_n), .in_valid(a_valid), .in_ready(a_ready),
    .in_data(a_data), .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data));
  width_conv #(.IN_W(960), .OUT_W(512)) down (.clk(clk), .rst_n(rst_n), .in_valid(m_valid), .in_ready(m_ready),
    .in_data(m_data), .out_valid(z_valid), .out_ready(z_ready), .out_data(z_data));
  always #5 clk = ~clk;

  logic [511:0] src_q[$], exp_z[$];
  bit bits[$];
  int gap_pct = 30, ready_pct = 60, n_z = 0, waits = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) z_ready <= ($urandom % 100) < ready_pct;

  always @(posedge clk)
    if (!rst_n) a_valid <= 0;
    else begin
      if (a_valid && !a_ready) waits++;
      if (!a_valid || a_ready) begin
        if (src_q.size() != 0 && ($urandom % 100) >= gap_pct) begin a_data <= src_q.pop_front(); a_valid <= 1; end
        else a_valid <= 0;
      end
    end

  always @(posedge clk)
    if (rst_n) begin
      if (m_valid && m_ready) begin
        automatic logic [959:0] e;
        for (int k = 0; k < 960; k++) e[k] = bits.pop_front();
        checks++;
        if (m_data !== e) begin failures++; $display("FAIL 960-bit word differs"); end
      end
      if (z_valid && z_ready) begin
        checks++; n_z++;
        begin automatic logic [511:0] e = exp_z.pop_front(); if (z_data !== e) begin failures++; $display("FAIL 512-bit word %0d differs %h %h fill=%0d", n_z, z_data[511:448], e[511:448], down.fill); end end
      end
    end

  task automatic push(int n);
    for (int i = 0; i < n; i++) begin
      automatic logic [511:0] w = {16{$urandom}};
      src_q.push_back(w); exp_z.push_back(w);
      for (int k = 0; k < 512; k++) bits.push_back(w[k]);
    end
  endtask

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    push(1500);                      // 1500 * 512 = 800 * 960 bits
    wait (n_z == 1500);
    gap_pct = 0; ready_pct = 100; waits = 0;
    push(1500);
    c0 = $time / 10;
    wait (n_z == 3000);
    @(negedge clk);
    checks++;
    if (waits != 0) begin failures++; $display("FAIL input waited %0d cycles", waits); end
    checks++;
    if ($time / 10 - c0 > 1500 + 6) begin failures++; $display("FAIL rate: %0d cycles", $time / 10 - c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
