// tb_mcd: the 30-channel deserializer (tree of eight-way nodes and one FIFO
// per channel) at its default size.
// Checks:
//  - a random mix of channel numbers with random per-channel output stalls:
//    every block reaches its channel once and in order;
//  - the FIFO of a stalled channel fills to its depth while others continue;
//  - rate: one block per cycle in while the outputs are ready.
module tb_mcd;
  localparam int NCH = 30, DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [511:0] in_data = '0;
  logic [NCH-1:0] out_valid, out_ready = '0;
  logic [NCH-1:0][511:0] out_data;
  mcd #(.NCH(NCH)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));
  always #5 clk = ~clk;

  logic [511:0] src_q[$];
  logic [511:0] exp_q[NCH][$];
  int ready_pct = 60, n_out = 0, n_in = 0, hold_ch = -1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int p = 0; p < NCH; p++) out_ready[p] <= (p != hold_ch) && (($urandom % 100) < ready_pct);

  always @(posedge clk) begin
    if (!rst_n) in_valid <= 0;
    else if (!in_valid || in_ready) begin
      if (src_q.size() != 0) begin in_data <= src_q.pop_front(); in_valid <= 1; end
      else in_valid <= 0;
    end
    if (rst_n)
      for (int p = 0; p < NCH; p++)
        if (out_valid[p] && out_ready[p]) begin
          checks++; n_out++;
          if (exp_q[p].size() == 0 || out_data[p] !== exp_q[p][0]) begin
            failures++; $display("FAIL channel %0d: wrong block", p);
          end
          if (exp_q[p].size() != 0) void'(exp_q[p].pop_front());
        end
  end

  task automatic push(int ch);
    logic [511:0] b = {16{$urandom}};
    b[511:507] = 5'(ch);
    src_q.push_back(b);
    exp_q[ch].push_back(b);
    n_in++;
  endtask

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 5000; i++) push($urandom % NCH);
    wait (n_out == n_in);
    // stalled channel 5: its FIFO fills while other channels pass
    hold_ch = 5; ready_pct = 100;
    for (int i = 0; i < DEPTH; i++) push(5);
    for (int i = 0; i < 200; i++) push(6 + i % 20);
    wait (n_out == n_in - DEPTH);
    repeat (5) @(posedge clk);
    checks++;
    if (dut.g_ch[5].u_fifo.count != DEPTH) begin failures++; $display("FAIL channel 5 FIFO holds %0d", dut.g_ch[5].u_fifo.count); end
    hold_ch = -1;
    wait (n_out == n_in);
    // rate
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) push($urandom % NCH);
    c0 = $time / 10;
    wait (n_out == n_in);
    @(negedge clk);
    checks++;
    if ($time / 10 - c0 > 3000 + 6) begin failures++; $display("FAIL rate: %0d cycles for 3000 blocks", $time / 10 - c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
