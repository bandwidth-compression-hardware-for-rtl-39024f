// tb_workload_testdata: the synthetic test stream used to judge the
// compressor, f_i = sin(2*pi*alpha*i^2 / 32768^2) + beta sampled at 32768
// points in single precision, for several (alpha, beta). The stream runs in
// lockstep through three compressor -> block queue -> decompressor chains,
// one per set of limited residual lengths compared in the design study:
// (2,4,32), (4,8,32) and the default (8,16,32). The block queue stands in
// for the external memory; both ends are always ready.
// Checks: every value returns bit-exact from every chain; the input loses at
// most one cycle per closed block; each chain's compression ratio (input
// bits over block bits) is printed and must lie between the floor set by
// blocks of 32-bit residuals only and the ceiling 32 * N / 512, N being the
// entries per block of that set (101, 72, 46); for the two smooth settings
// it must also exceed 1. The fast chirp shows how short residual lengths
// lose when predictions are poor: (2,4,32) then falls below 1.
// A fourth chain takes the same function in double precision (W = 64,
// residual lengths 8, 16, 64) and must also return every value exactly; its
// ratio is printed (ceiling 64 * 46 / 512 = 5.75).
// The sine is evaluated in double precision and truncated to single
// precision, a close stand-in for a correctly rounded single-precision value.
module tb_workload_testdata;
  import tb_ref_pkg::*;
  import bwc_pkg::*;
  localparam int NPTS = 32768;
  localparam int NS = 3;
  localparam int L1S[NS] = '{2, 4, 8};
  localparam int L2S[NS] = '{4, 8, 16};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, flush = 0;
  logic [31:0] in_data = '0;
  logic [NS-1:0] in_ready, cv, dv = '0, dr, out_valid;
  logic [NS-1:0][31:0] out_data;
  logic [NS-1:0][511:0] cdb, dcdb = '0;
  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_set
    compressor #(.L1(L1S[s]), .L2(L2S[s]), .CH_ID(s)) u_cmp (.clk(clk), .rst_n(rst_n),
      .in_valid(in_valid && &in_ready), .in_ready(in_ready[s]), .in_data(in_data), .flush(flush),
      .cdb_valid(cv[s]), .cdb_ready(1'b1), .cdb(cdb[s]));
    decompressor #(.L1(L1S[s]), .L2(L2S[s])) u_dec (.clk(clk), .rst_n(rst_n),
      .cdb_valid(dv[s]), .cdb_ready(dr[s]), .cdb(dcdb[s]),
      .out_valid(out_valid[s]), .out_ready(1'b1), .out_data(out_data[s]));
  end

  // double-precision chain: W = 64, residual lengths (8,16,64)
  logic        v64 = 0, r64, cv64, dv64 = 0, dr64, ov64;
  logic [63:0] d64 = '0, o64;
  logic [511:0] cdb64, dcdb64 = '0;
  compressor #(.W(64), .L3(64), .CH_ID(3)) u_cmp64 (.clk(clk), .rst_n(rst_n),
    .in_valid(v64), .in_ready(r64), .in_data(d64), .flush(flush),
    .cdb_valid(cv64), .cdb_ready(1'b1), .cdb(cdb64));
  decompressor #(.W(64), .L3(64)) u_dec64 (.clk(clk), .rst_n(rst_n),
    .cdb_valid(dv64), .cdb_ready(dr64), .cdb(dcdb64),
    .out_valid(ov64), .out_ready(1'b1), .out_data(o64));
  logic [63:0]  src64[$], exp64[$];
  logic [511:0] mem64_q[$];
  int n_blk64 = 0, n_out64 = 0;

  always @(posedge clk)
    if (!rst_n) begin v64 <= 0; dv64 <= 0; end
    else begin
      if (!v64 || r64) begin
        if (src64.size() != 0) begin d64 <= src64.pop_front(); v64 <= 1; end
        else v64 <= 0;
      end
      if (cv64) begin n_blk64++; mem64_q.push_back(cdb64); end
      if (!dv64 || dr64) begin
        if (mem64_q.size() != 0) begin dcdb64 <= mem64_q.pop_front(); dv64 <= 1; end
        else dv64 <= 0;
      end
      if (ov64) begin
        automatic logic [63:0] e = exp64.pop_front();
        checks++; n_out64++;
        if (o64 !== e) begin failures++; $display("FAIL 64-bit value %0d: %h exp %h", n_out64, o64, e); end
      end
    end

  logic [31:0]  src_q[$];
  logic [31:0]  exp_q[NS][$];
  logic [511:0] mem_q[NS][$];   // stands in for the external memory
  int n_blk[NS], n_out[NS];
  int n_acc = 0, refused = 0;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (!rst_n) in_valid <= 0;
    else begin
      if (in_valid && &in_ready) n_acc++;
      if (in_valid && !(&in_ready)) refused++;
      if (!in_valid || &in_ready) begin
        if (src_q.size() != 0) begin in_data <= src_q.pop_front(); in_valid <= 1; end
        else in_valid <= 0;
      end
    end

  always @(posedge clk)
    if (rst_n)
      for (int s = 0; s < NS; s++) begin
        if (cv[s]) begin n_blk[s]++; mem_q[s].push_back(cdb[s]); end
        if (!dv[s] || dr[s]) begin
          if (mem_q[s].size() != 0) begin dcdb[s] <= mem_q[s].pop_front(); dv[s] <= 1; end
          else dv[s] <= 0;
        end
        if (out_valid[s]) begin
          automatic logic [31:0] e = exp_q[s].pop_front();
          checks++; n_out[s]++;
          if (out_data[s] !== e) begin
            failures++; $display("FAIL set %0d value %0d: %h exp %h", s, n_out[s], out_data[s], e);
          end
        end
      end

  task automatic run(real alpha, real beta);
    int b0[NS], blocks = 0;
    int b64 = n_blk64;
    foreach (b0[s]) begin b0[s] = n_blk[s]; n_out[s] = 0; end
    n_out64 = 0;
    n_acc = 0; refused = 0;
    for (int i = 0; i < NPTS; i++) begin
      automatic real x = real'(i);
      automatic logic [31:0] f = to_f32($sin(2.0 * 3.141592653589793 * alpha * x * x / (32768.0 * 32768.0)) + beta);
      automatic logic [63:0] f64 = $realtobits($sin(2.0 * 3.141592653589793 * alpha * x * x / (32768.0 * 32768.0)) + beta);
      src_q.push_back(f);
      for (int s = 0; s < NS; s++) exp_q[s].push_back(f);
      src64.push_back(f64); exp64.push_back(f64);
    end
    wait (src_q.size() == 0 && !in_valid && src64.size() == 0 && !v64);
    @(posedge clk); #1;
    flush = 1;
    repeat (10) @(posedge clk); #1;
    flush = 0;
    wait (n_out[0] == NPTS && n_out[1] == NPTS && n_out[2] == NPTS && n_out64 == NPTS);
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      automatic int nb = n_blk[s] - b0[s];
      automatic int ceil_n = n_comp(512, 5, L1S[s]);
      automatic int floor_n = w_re(512, 5, L1S[s]) / 32;
      automatic real ratio = real'(NPTS * 32) / real'(nb * 512);
      blocks += nb;
      $display("alpha=%0.1f beta=%0.1f L=(%0d,%0d,32): %0d blocks, ratio %0.3f (ceiling %0.3f)",
               alpha, beta, L1S[s], L2S[s], nb, ratio, 32.0 * ceil_n / 512.0);
      checks++;
      if (ratio < 32.0 * floor_n / 512.0 || ratio > 32.0 * ceil_n / 512.0 || (alpha < 100.0 && ratio <= 1.0)) begin
        failures++; $display("FAIL ratio out of range");
      end
    end
    begin
      automatic real r64v = real'(NPTS * 64) / real'((n_blk64 - b64) * 512);
      $display("alpha=%0.1f beta=%0.1f 64-bit L=(8,16,64): %0d blocks, ratio %0.3f (ceiling %0.3f)",
               alpha, beta, n_blk64 - b64, r64v, 64.0 * 46 / 512.0);
      checks++;
      if (r64v < 64.0 * 5 / 512.0 || r64v > 64.0 * 46 / 512.0) begin failures++; $display("FAIL 64-bit ratio out of range"); end
    end
    checks++;
    if (refused > blocks) begin failures++; $display("FAIL input refused %0d cycles for %0d blocks", refused, blocks); end
  endtask

  initial begin
    foreach (n_blk[s]) begin n_blk[s] = 0; n_out[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    run(1.0, 2.0);
    run(16.0, 2.0);
    run(256.0, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
