// tb_mcs_sel: one four-input selector node of the multi-channel serializer.
// Checks:
//  - directed: ports 0, 2 and 3 request together and port 0 requests again
//    right after its grant; the snapshot rule must give 0, 2, 3 and only then
//    port 0's second block;
//  - random: random requests and a randomly stalling output; every block
//    comes out once, in order per port, and the output holds while stalled;
//  - rate: with all ports always requesting and the output always ready, one
//    block per cycle, and every port is served once per four blocks.
module tb_mcs_sel;
  localparam int NIN = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] in_valid = '0, in_ready;
  logic [NIN-1:0][511:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [511:0] out_data;
  mcs_sel #(.NIN(NIN)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));
  always #5 clk = ~clk;

  logic [511:0] src_q[NIN][$];
  int exp_seq[NIN];
  int order[$];
  int gap_pct = 30, ready_pct = 60, n_out = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom % 100) < ready_pct;

  always @(posedge clk)
    for (int p = 0; p < NIN; p++)
      if (!rst_n) in_valid[p] <= 0;
      else if (!in_valid[p] || in_ready[p]) begin
        if (src_q[p].size() != 0 && ($urandom % 100) >= gap_pct) begin
          in_data[p] <= src_q[p].pop_front(); in_valid[p] <= 1;
        end else in_valid[p] <= 0;
      end

  // output must hold while stalled
  logic [511:0] last_d; logic last_stall = 0;
  always @(posedge clk) begin
    if (rst_n && last_stall) begin
      checks++;
      if (!out_valid || out_data !== last_d) begin failures++; $display("FAIL output changed while stalled"); end
    end
    last_stall <= out_valid && !out_ready;
    last_d <= out_data;
    if (rst_n && out_valid && out_ready) begin
      automatic int p = int'(out_data[511:504]);
      automatic int s = int'(out_data[31:0]);
      checks++; n_out++;
      order.push_back(p);
      if (p >= NIN || s != exp_seq[p]) begin
        failures++; $display("FAIL port %0d block %0d, expected %0d", p, s, exp_seq[p]);
      end
      if (p < NIN) exp_seq[p] = s + 1;
    end
  end

  function automatic logic [511:0] blk(int p, int s);
    logic [511:0] b = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                       $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    b[511:504] = 8'(p); b[31:0] = s;
    return b;
  endfunction

  int sent[NIN];

  task automatic push(int p);
    src_q[p].push_back(blk(p, sent[p]));
    sent[p]++;
  endtask

  function automatic int total();
    int t = 0;
    foreach (sent[p]) t += sent[p];
    return t;
  endfunction

  initial begin
    int c0;
    foreach (sent[p]) begin sent[p] = 0; exp_seq[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // directed snapshot test
    gap_pct = 0; ready_pct = 100;
    push(0); push(0); push(2); push(3);
    wait (n_out == 4);
    @(negedge clk);
    checks++;
    if (order[0] != 0 || order[1] != 2 || order[2] != 3 || order[3] != 0) begin
      failures++; $display("FAIL snapshot order %0d %0d %0d %0d", order[0], order[1], order[2], order[3]);
    end
    // random traffic
    gap_pct = 30; ready_pct = 60;
    for (int i = 0; i < 3000; i++) push($urandom % NIN);
    wait (n_out == total());
    // rate and fairness
    repeat (5) @(posedge clk); #1;
    gap_pct = 0; ready_pct = 100;
    order.delete();
    for (int i = 0; i < 200; i++) for (int p = 0; p < NIN; p++) push(p);
    c0 = $time / 10;
    wait (n_out == total());
    @(negedge clk);
    checks++;
    if ($time / 10 - c0 > 800 + 3) begin failures++; $display("FAIL rate: %0d cycles for 800 blocks", $time / 10 - c0); end
    for (int i = 0; i + 4 <= 800; i += 4) begin
      automatic bit [NIN-1:0] seen = '0;
      for (int k = 0; k < 4; k++) seen[order[i + k]] = 1;
      checks++;
      if (seen != '1) begin failures++; $display("FAIL round %0d not fair", i / 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
