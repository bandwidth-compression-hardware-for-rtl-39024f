// tb_decompressor: compresses float streams with the reference encoder, feeds
// the blocks (some closed early by a flush) into one decompressor channel and
// checks that every float comes back exactly, in order.
// Checks:
//  - random gaps between blocks and a randomly stalling consumer;
//  - the stream crosses many block boundaries and all three lengths;
//  - rate: with blocks always offered and an always-ready consumer, one float
//    per cycle with no gap at block boundaries, after the block load and the
//    three pipeline stages.
module tb_decompressor;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cdb_valid = 0, cdb_ready, out_valid, out_ready = 0;
  logic [511:0] cdb = '0;
  logic [31:0] out_data;
  decompressor dut (.clk(clk), .rst_n(rst_n), .cdb_valid(cdb_valid), .cdb_ready(cdb_ready), .cdb(cdb),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));
  always #5 clk = ~clk;

  Encoder enc;
  logic [31:0] exp_q[$];
  logic [511:0] src_q[$];
  bit gaps = 1;
  int ready_pct = 60, n_out = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom % 100) < ready_pct;

  always @(posedge clk)
    if (!rst_n) cdb_valid <= 0;
    else if (!cdb_valid || cdb_ready) begin
      if (src_q.size() != 0 && (!gaps || $urandom % 3 != 0)) begin
        cdb <= src_q.pop_front(); cdb_valid <= 1;
      end else cdb_valid <= 0;
    end

  always @(posedge clk)
    if (rst_n && out_valid && out_ready) begin
      logic [31:0] e;
      checks++; n_out++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++; $display("FAIL datum %0d: got %h exp %h", n_out, out_data, e);
        end
      end
    end

  task automatic make(int n, int t0);
    for (int i = 0; i < n; i++) begin
      automatic logic [31:0] f = sample(3, t0 + i);
      enc.push(f);
      exp_q.push_back(f);
      if ($urandom % 400 == 0) enc.pk.flush();
    end
    enc.pk.flush();
    foreach (enc.pk.blocks[i]) src_q.push_back(enc.pk.blocks[i]);
    enc.pk.blocks.delete();
  endtask

  initial begin
    int c0;
    enc = new(3);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    make(3000, 0);
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (enc.code_hist[1] == 0 || enc.code_hist[2] == 0 || enc.code_hist[3] == 0) begin
      failures++; $display("FAIL not all lengths used");
    end
    // rate phase: 20 full blocks of constant data
    ready_pct = 100; gaps = 0; n_out = 0;
    #1;
    for (int i = 0; i < 920; i++) begin enc.push(32'h3f80_0000); exp_q.push_back(32'h3f80_0000); end
    enc.pk.flush();
    c0 = $time / 10;
    foreach (enc.pk.blocks[i]) src_q.push_back(enc.pk.blocks[i]);
    wait (n_out == 920);
    @(negedge clk);
    checks++;
    // +1 source register, +1 block load, +3 pipeline stages
    if ($time / 10 - c0 > 920 + 5) begin
      failures++; $display("FAIL rate: %0d cycles for 920 data", $time / 10 - c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
