// tb_compressor: drives float streams into one compressor channel and compares
// every compressed data block bit for bit with the reference encoder (BTU,
// cubic prediction, difference, leading-residual-bit length, block packing).
// Checks:
//  - random input gaps and a randomly stalling block consumer;
//  - a flush in the middle of the stream and at its end, which must close a
//    partly filled block;
//  - rate: with an always-ready consumer the unit takes one datum per cycle,
//    apart from one refused cycle each time a block is closed, and the first
//    block leaves 4 cycles (pipeline) after its last datum is known not to fit.
module tb_compressor;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, flush = 0, cdb_valid, cdb_ready = 0;
  logic [31:0] in_data = '0;
  logic [511:0] cdb;
  compressor #(.CH_ID(3)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .flush(flush), .cdb_valid(cdb_valid), .cdb_ready(cdb_ready), .cdb(cdb));
  always #5 clk = ~clk;

  Encoder enc;
  int ready_pct = 60;
  bit gaps = 1;
  logic [31:0] src_q[$];
  int n_blk = 0, n_in = 0, refused = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cdb_ready <= ($urandom % 100) < ready_pct;

  // registered data source
  always @(posedge clk)
    if (!rst_n) in_valid <= 0;
    else begin
      if (in_valid && in_ready) n_in++;
      if (in_valid && !in_ready) refused++;
      if (!in_valid || in_ready) begin
        if (src_q.size() != 0 && (!gaps || $urandom % 4 != 0)) begin
          in_data <= src_q.pop_front(); in_valid <= 1;
        end else in_valid <= 0;
      end
    end

  always @(posedge clk)
    if (rst_n && cdb_valid && cdb_ready) begin
      checks++;
      if (n_blk >= enc.pk.blocks.size()) begin
        failures++; $display("FAIL unexpected block %0d", n_blk);
      end else if (cdb !== enc.pk.blocks[n_blk]) begin
        failures++; $display("FAIL block %0d differs", n_blk);
      end
      n_blk++;
    end

  task automatic send(int n, int t0);
    for (int i = 0; i < n; i++) begin
      automatic logic [31:0] f = sample(3, t0 + i);
      enc.push(f);
      src_q.push_back(f);
    end
  endtask

  task automatic do_flush();
    wait (src_q.size() == 0 && !in_valid);
    @(posedge clk); #1;
    enc.pk.flush();
    flush = 1;
    repeat (20) @(posedge clk);
    #1 flush = 0;
  endtask

  initial begin
    int c0, b0;
    enc = new(3);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    send(1500, 0);
    do_flush();
    send(1800, 1500);
    do_flush();
    while (n_blk != enc.pk.blocks.size()) @(posedge clk);
    checks++;
    if (enc.code_hist[1] == 0 || enc.code_hist[2] == 0 || enc.code_hist[3] == 0) begin
      failures++; $display("FAIL not all lengths used: %0d %0d %0d", enc.code_hist[1], enc.code_hist[2], enc.code_hist[3]);
    end
    // rate phase: constant data, all of length L1 after the first few
    ready_pct = 100; gaps = 0;
    @(posedge clk); #1;
    c0 = $time / 10; b0 = n_blk; n_in = 0; refused = 0;
    for (int i = 0; i < 46 * 20; i++) begin enc.push(32'h3f80_0000); src_q.push_back(32'h3f80_0000); end
    wait (src_q.size() == 0 && !in_valid);
    checks++;
    // 20 full blocks: at most one refused cycle per closed block
    if (refused > 20 || n_in != 920) begin
      failures++; $display("FAIL rate: %0d in, %0d refused cycles", n_in, refused);
    end
    do_flush();
    while (n_blk != enc.pk.blocks.size()) @(posedge clk);
    @(negedge clk);
    $display("rate: %0d data in %0d cycles, %0d refused", n_in, $time / 10 - c0, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
