// tb_mcd_demux8: one eight-way node of the multi-channel deserializer, in two
// instances that select on channel-number bits [2:0] and [4:3].
// Checks:
//  - every block leaves on the output its channel number selects, once, in
//    input order per output, with random output stalls;
//  - rate: one block per cycle while the outputs are ready.
module tb_mcd_demux8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid[2], in_ready[2];
  logic [511:0] in_data[2];
  logic [7:0] out_valid[2], out_ready[2];
  logic [511:0] out_data[2];
  logic [511:0] src_q[2][$];
  logic [511:0] exp_q[2][8][$];
  int ready_pct = 60, n_out[2], n_in[2];

  mcd_demux8 #(.SEL_LSB(0)) dut0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_data(in_data[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]));
  mcd_demux8 #(.SEL_LSB(3)) dut1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_data(in_data[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int u = 0; u < 2; u++)
      for (int p = 0; p < 8; p++) out_ready[u][p] <= ($urandom % 100) < ready_pct;

  always @(posedge clk)
    for (int u = 0; u < 2; u++) begin
      if (!rst_n) in_valid[u] <= 0;
      else if (!in_valid[u] || in_ready[u]) begin
        if (src_q[u].size() != 0) begin in_data[u] <= src_q[u].pop_front(); in_valid[u] <= 1; end
        else in_valid[u] <= 0;
      end
      if (rst_n)
        for (int p = 0; p < 8; p++)
          if (out_valid[u][p] && out_ready[u][p]) begin
            checks++; n_out[u]++;
            if (exp_q[u][p].size() == 0 || out_data[u] !== exp_q[u][p][0]) begin
              failures++; $display("FAIL unit %0d output %0d: wrong block", u, p);
            end
            if (exp_q[u][p].size() != 0) void'(exp_q[u][p].pop_front());
          end
      if (rst_n) begin
        checks++;
        if (!$onehot0(out_valid[u])) begin failures++; $display("FAIL unit %0d: several outputs valid", u); end
      end
    end

  initial begin
    int c0;
    for (int u = 0; u < 2; u++) begin in_valid[u] = 0; in_data[u] = '0; n_out[u] = 0; n_in[u] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int n = 0; n < 2; n++) begin
      if (n == 1) begin ready_pct = 100; c0 = $time / 10; end
      for (int i = 0; i < 2000; i++) begin
        automatic logic [511:0] b = {16{$urandom}};
        automatic int ch = $urandom % 32;
        b[511:507] = 5'(ch);
        for (int u = 0; u < 2; u++) begin
          src_q[u].push_back(b);
          exp_q[u][(ch >> (3 * u)) & 7].push_back(b);
          n_in[u]++;
        end
      end
      wait (n_out[0] == n_in[0] && n_out[1] == n_in[1]);
    end
    @(negedge clk);
    checks++;
    if ($time / 10 - c0 > 2000 + 3) begin failures++; $display("FAIL rate: %0d cycles for 2000 blocks", $time / 10 - c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
