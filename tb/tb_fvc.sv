// tb_fvc: feeds blocks built by the reference packer (random data of all three
// lengths, some blocks ended early by flush) into the fixed-to-variable length
// converter and checks every (ex, D) it hands out, with a randomly stalling
// consumer. A second phase checks the rate: with an always-ready consumer and
// blocks always offered, one datum per cycle with no gap between blocks.
module tb_fvc;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cdb_valid = 0, cdb_ready, out_valid, out_ready = 0, ex;
  logic [511:0] cdb = '0;
  logic [31:0] d;
  fvc dut (.clk(clk), .rst_n(rst_n), .cdb_valid(cdb_valid), .cdb_ready(cdb_ready), .cdb(cdb),
    .out_valid(out_valid), .out_ready(out_ready), .ex(ex), .d(d));
  always #5 clk = ~clk;

  Packer pk;
  ent_t  exp_q[$];
  int    ready_pct = 60;
  int    n_out = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom % 100) < ready_pct;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      ent_t e;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected datum");
      end else begin
        e = exp_q.pop_front();
        if (ex !== e.ex || d !== e.d) begin
          failures++; $display("FAIL datum %0d: got ex=%b d=%h exp ex=%b d=%h", n_out, ex, d, e.ex, e.d);
        end
      end
    end
  end

  task automatic build(int n, bit only_l1);
    for (int i = 0; i < n; i++) begin
      ent_t e;
      int r = $urandom % 10;
      e.code = only_l1 ? 1 : (r < 6) ? 1 : (r < 9) ? 2 : 3;
      e.ex   = $urandom;
      e.d    = $urandom & ((e.code == 3) ? 32'hFFFF_FFFF : ((32'd1 << len_of(e.code)) - 1));
      pk.add(e);
      exp_q.push_back(e);
      if (!only_l1 && $urandom % 50 == 0) pk.flush();
    end
    pk.flush();
  endtask

  // registered block source: a new block is presented after each accepted one
  logic [511:0] src_q[$];
  bit gaps = 0;
  always @(posedge clk)
    if (!rst_n) cdb_valid <= 0;
    else if (!cdb_valid || cdb_ready) begin
      if (src_q.size() != 0 && (!gaps || $urandom % 3 != 0)) begin
        cdb <= src_q.pop_front(); cdb_valid <= 1;
      end else cdb_valid <= 0;
    end

  task automatic feed(bit g);
    gaps = g;
    foreach (pk.blocks[i]) src_q.push_back(pk.blocks[i]);
  endtask

  initial begin
    int t0;
    pk = new(3);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    build(2500, 0);
    feed(1);
    wait (src_q.size() == 0 && exp_q.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d data never came out", exp_q.size()); end
    // rate phase: 10 full blocks of 46 L1 data
    pk = new(3); ready_pct = 100; n_out = 0;
    build(460, 1);
    t0 = $time / 10;
    feed(0);
    wait (n_out == 460);
    @(negedge clk);
    checks++;
    if ($time / 10 - t0 > 460 + 2) begin failures++; $display("FAIL rate: %0d cycles for 460 data", $time / 10 - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
