// tb_vfc: drives random compressed data (all three lengths) into the
// variable-to-fixed length converter with a randomly stalling block consumer
// and compares every block bit for bit with the reference packer, including
// the flushed last block. A second phase checks the rate with an always-ready
// consumer: one datum per cycle plus one refused cycle per full block.
module tb_vfc;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, ex = 0, flush = 0, cdb_valid, cdb_ready = 0;
  logic [1:0] code = 1;
  logic [31:0] d = 0;
  logic [511:0] cdb;
  vfc #(.CH_ID(21)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .ex(ex),
    .code(code), .d(d), .flush(flush), .cdb_valid(cdb_valid), .cdb_ready(cdb_ready), .cdb(cdb));
  always #5 clk = ~clk;

  Packer pk;
  bit [511:0] got[$];
  int ready_pct = 70;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cdb_valid && cdb_ready) got.push_back(cdb);
  always @(negedge clk) cdb_ready <= ($urandom % 100) < ready_pct;

  function automatic ent_t rand_ent(bit only_l1);
    ent_t e;
    int r = $urandom % 10;
    e.code = only_l1 ? 1 : (r < 6) ? 1 : (r < 9) ? 2 : 3;
    e.ex   = $urandom;
    e.d    = $urandom & ((e.code == 3) ? 32'hFFFF_FFFF : ((32'd1 << len_of(e.code)) - 1));
    return e;
  endfunction

  task automatic send(ent_t e);
    in_valid <= 1; ex <= e.ex; code <= 2'(e.code); d <= e.d;
    do @(posedge clk); while (!in_ready);
  endtask

  task automatic compare(string tag);
    checks++;
    if (got.size() != pk.blocks.size()) begin
      failures++; $display("FAIL %s: %0d blocks, expected %0d", tag, got.size(), pk.blocks.size());
    end
    foreach (pk.blocks[i]) begin
      if (i < got.size()) begin
        checks++;
        if (got[i] !== pk.blocks[i]) begin failures++; $display("FAIL %s block %0d\n got %h\n exp %h", tag, i, got[i], pk.blocks[i]); end
      end
    end
  endtask

  initial begin
    int t0, stalls;
    pk = new(21);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // phase 1: random data, random consumer, random gaps
    for (int i = 0; i < 3000; i++) begin
      automatic ent_t e = rand_ent(0);
      pk.add(e);
      send(e);
      if ($urandom % 4 == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    flush <= 1;
    repeat (40) @(posedge clk);
    flush <= 0;
    pk.flush();
    compare("random");
    // phase 2: rate with an always-ready consumer
    got.delete(); pk = new(21); ready_pct = 100;
    rst_n <= 0; @(posedge clk); rst_n <= 1; @(posedge clk);
    t0 = 0; stalls = 0;
    fork
      begin
        for (int i = 0; i < 920; i++) begin
          automatic ent_t e = rand_ent(1);
          pk.add(e);
          send(e);
        end
        in_valid <= 0;
      end
      begin
        forever begin
          @(posedge clk);
          t0++;
          if (in_valid && !in_ready) stalls++;
        end
      end
    join_any
    disable fork;
    flush <= 1; repeat (5) @(posedge clk); flush <= 0; pk.flush();
    compare("rate");
    checks++;
    // 920 L1 data = 20 full blocks of 46; 19 refused cycles (the 20th block leaves on flush)
    if (stalls != 19 || t0 > 920 + 19 + 1) begin
      failures++; $display("FAIL rate: %0d cycles, %0d refused", t0, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
