// tb_mcs: the 30-channel serializer (tree of selector nodes) at its default
// size. Every channel sends numbered blocks whose channel field holds the
// channel number.
// Checks:
//  - random requests and a stalling output: each block comes out once, in
//    order per channel, and nothing is lost;
//  - rate: with all channels always requesting and the output always ready,
//    one block per cycle after the tree latency;
//  - no starvation: every channel appears in every window of 40 consecutive
//    output blocks while all of them request.
module tb_mcs;
  localparam int NCH = 30;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] in_valid = '0, in_ready;
  logic [NCH-1:0][511:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [511:0] out_data;
  mcs #(.NCH(NCH)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));
  always #5 clk = ~clk;

  logic [511:0] src_q[NCH][$];
  int exp_seq[NCH], sent[NCH];
  int order[$];
  int gap_pct = 30, ready_pct = 60, n_out = 0, n_sent = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom % 100) < ready_pct;

  always @(posedge clk)
    for (int p = 0; p < NCH; p++)
      if (!rst_n) in_valid[p] <= 0;
      else if (!in_valid[p] || in_ready[p]) begin
        if (src_q[p].size() != 0 && ($urandom % 100) >= gap_pct) begin
          in_data[p] <= src_q[p].pop_front(); in_valid[p] <= 1;
        end else in_valid[p] <= 0;
      end

  always @(posedge clk)
    if (rst_n && out_valid && out_ready) begin
      automatic int p = int'(out_data[511:507]);
      automatic int s = int'(out_data[31:0]);
      checks++; n_out++;
      order.push_back(p);
      if (p >= NCH || s != exp_seq[p]) begin
        failures++; $display("FAIL channel %0d block %0d", p, s);
      end else exp_seq[p] = s + 1;
    end

  task automatic push(int p);
    logic [511:0] b = {16{$urandom}};
    b[511:507] = 5'(p); b[31:0] = sent[p];
    src_q[p].push_back(b);
    sent[p]++; n_sent++;
  endtask

  initial begin
    int c0;
    foreach (sent[p]) begin sent[p] = 0; exp_seq[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 6000; i++) push($urandom % NCH);
    wait (n_out == n_sent);
    repeat (5) @(posedge clk); #1;
    gap_pct = 0; ready_pct = 100;
    order.delete();
    for (int i = 0; i < 40; i++) for (int p = 0; p < NCH; p++) push(p);
    c0 = $time / 10;
    wait (n_out == n_sent);
    @(negedge clk);
    checks++;
    if ($time / 10 - c0 > 1200 + 5) begin failures++; $display("FAIL rate: %0d cycles for 1200 blocks", $time / 10 - c0); end
    // starvation windows, while every channel still has blocks queued
    for (int i = 0; i + 40 <= 600; i += 40) begin
      automatic bit [NCH-1:0] seen = '0;
      for (int k = 0; k < 40; k++) seen[order[i + k]] = 1;
      checks++;
      if (seen != '1) begin failures++; $display("FAIL window %0d misses channels %b", i, ~seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
