// tb_bwc_top: end-to-end test of the bandwidth compressor at its default size
// (30 channels of 32-bit floats, 512-bit blocks), standing in for the memory
// and for the stream-computing core.
//
// It runs the sequence of a time-stepped stream computation:
//  A. raw read (bypass): uncompressed 512-bit memory words are repacked into
//     960-bit grid points for the core; every point is checked;
//  B. compressed write: the core produces grid points of smooth and noisy
//     float fields (some channels negative, rare jumps and repeats), which
//     are compressed and merged into one block stream, then flush closes the
//     partly filled blocks; each channel's blocks, picked out of the stream by
//     their channel number, must equal the reference encoder's blocks bit for
//     bit;
//  C. compressed read: that block stream, in the order it was written, is
//     read back; the core must receive every grid point exactly;
//  D. raw write (bypass): grid points are repacked into memory words, checked
//     against the bit stream.
// Memory and core readiness are random, so every queue in the design fills
// and drains. The cycle counters are compared with the transfers seen here.
// Each mechanism below is counted and must occur at least once.
module tb_bwc_top;
  import tb_ref_pkg::*;
  localparam int NCH = 30, NPT = 1500, NRAW = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic bypass = 0, flush = 0, cnt_clear = 0, cnt_run = 0;
  logic rd_valid = 0, rd_ready, wr_valid, wr_ready = 0;
  logic [511:0] rd_data = '0, wr_data;
  logic core_in_valid, core_in_ready = 0, core_out_valid = 0, core_out_ready;
  logic [NCH-1:0][31:0] core_in_data, core_out_data = '0;
  logic [47:0] in_op, in_vc, out_op, out_vc;

  bwc_top dut (.clk(clk), .rst_n(rst_n), .bypass(bypass), .flush(flush), .cnt_clear(cnt_clear), .cnt_run(cnt_run),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_data(rd_data),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_data(wr_data),
    .core_in_valid(core_in_valid), .core_in_ready(core_in_ready), .core_in_data(core_in_data),
    .core_out_valid(core_out_valid), .core_out_ready(core_out_ready), .core_out_data(core_out_data),
    .in_op_cycles(in_op), .in_valid_cycles(in_vc), .out_op_cycles(out_op), .out_valid_cycles(out_vc));
  always #5 clk = ~clk;

  // ---------------- stimulus sources and sinks ----------------
  logic [511:0]         rd_q[$], wr_got[$];
  logic [NCH-1:0][31:0] pt_q[$], exp_in[$];
  int rd_ready_pct = 70, core_ready_pct = 70, wr_ready_pct = 70, gap_pct = 20;
  int n_in = 0, n_out = 0;

  always @(negedge clk) begin
    core_in_ready <= ($urandom % 100) < core_ready_pct;
    wr_ready      <= ($urandom % 100) < wr_ready_pct;
  end

  always @(posedge clk)
    if (!rst_n) begin rd_valid <= 0; core_out_valid <= 0; end
    else begin
      if (!rd_valid || rd_ready) begin
        if (rd_q.size() != 0 && ($urandom % 100) < rd_ready_pct) begin rd_data <= rd_q.pop_front(); rd_valid <= 1; end
        else rd_valid <= 0;
      end
      if (!core_out_valid || core_out_ready) begin
        if (pt_q.size() != 0 && ($urandom % 100) >= gap_pct) begin core_out_data <= pt_q.pop_front(); core_out_valid <= 1; end
        else core_out_valid <= 0;
      end
    end

  always @(posedge clk)
    if (rst_n) begin
      if (core_in_valid && core_in_ready) begin
        checks++; n_in++;
        if (exp_in.size() == 0) begin failures++; $display("FAIL unexpected grid point"); end
        else begin
          automatic logic [NCH-1:0][31:0] e = exp_in.pop_front();
          if (core_in_data !== e) begin failures++; $display("FAIL grid point %0d differs: %h %h", n_in, core_in_data[1:0], e[1:0]); end
        end
      end
      if (core_out_valid && core_out_ready) n_out++;
      if (wr_valid && wr_ready) wr_got.push_back(wr_data);
    end

  // ---------------- mechanism counters ----------------
  logic [NCH-1:0] vfc_full, fifo_deep;
  for (genvar c = 0; c < NCH; c++) begin : g_probe
    assign vfc_full[c]  = dut.g_cmp[c].u_cmp.u_vfc.full;
    assign fifo_deep[c] = dut.u_mcd.g_ch[c].u_fifo.count > 1;
  end

  int m_vfc_stall = 0, m_flush_block = 0, m_mcs_contend = 0, m_wr_backpressure = 0;
  int m_mcd_fifo_depth = 0, m_sync_wait = 0, m_core_in_stall = 0, m_block_load = 0;
  int m_bypass_rd = 0, m_bypass_wr = 0, m_core_out_stall = 0;

  always @(posedge clk)
    if (rst_n) begin
      if (!bypass && core_out_valid && !core_out_ready) m_core_out_stall++;
      if (vfc_full != 0 && !bypass && core_out_valid && !core_out_ready) m_vfc_stall++;
      if (flush && vfc_full != 0) m_flush_block++;
      if (!$onehot0(dut.cmp_v)) m_mcs_contend++;
      if (wr_valid && !wr_ready) m_wr_backpressure++;
      if (fifo_deep != 0) m_mcd_fifo_depth++;
      if (!bypass && dut.dec_v != 0 && !dut.dec_all) m_sync_wait++;
      if (core_in_valid && !core_in_ready) m_core_in_stall++;
      m_block_load += $countones(dut.mcd_v & dut.mcd_r);
      if (bypass && core_in_valid && core_in_ready) m_bypass_rd++;
      if (bypass && wr_valid && wr_ready) m_bypass_wr++;
    end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NCH-1:0][31:0] point(int i);
    logic [NCH-1:0][31:0] p;
    for (int c = 0; c < NCH; c++) p[c] = sample(c, i);
    return p;
  endfunction

  task automatic expect_count(string name, int n);
    checks++;
    $display("  %-26s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  Encoder enc[NCH];
  int nblk_ch[NCH];
  logic [NCH-1:0][31:0] pts[$];

  initial begin
    int n_rd_total, n_wr_total, c0;
    bit bits[$];
    for (int c = 0; c < NCH; c++) begin enc[c] = new(c); nblk_ch[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    cnt_clear = 1; @(posedge clk); #1; cnt_clear = 0; cnt_run = 1;

    // A. raw read: NRAW grid points, 960 bits each, packed into 512-bit words
    bypass = 1;
    for (int i = 0; i < NRAW; i++) begin
      automatic logic [NCH-1:0][31:0] p = point(100000 + i);
      exp_in.push_back(p);
      for (int k = 0; k < NCH * 32; k++) bits.push_back(p[k / 32][k % 32]);
    end
    while (bits.size() != 0) begin
      automatic logic [511:0] w;
      for (int k = 0; k < 512; k++) w[k] = bits.pop_front();
      rd_q.push_back(w);
    end
    wait (n_in == NRAW);
    repeat (5) @(posedge clk); #1;

    // B. compressed write
    bypass = 0;
    for (int i = 0; i < NPT; i++) begin
      automatic logic [NCH-1:0][31:0] p = point(i);
      pts.push_back(p);
      pt_q.push_back(p);
      for (int c = 0; c < NCH; c++) enc[c].push(p[c]);
    end
    wait (n_out == NPT);
    repeat (8) @(posedge clk); #1;
    for (int c = 0; c < NCH; c++) enc[c].pk.flush();
    flush = 1;
    repeat (100) @(posedge clk); #1;
    flush = 0;
    repeat (200) @(posedge clk); #1;
    n_wr_total = 0;
    for (int c = 0; c < NCH; c++) n_wr_total += enc[c].pk.blocks.size();
    checks++;
    if (wr_got.size() != n_wr_total) begin
      failures++; $display("FAIL %0d blocks written, expected %0d", wr_got.size(), n_wr_total);
    end
    foreach (wr_got[i]) begin
      automatic int c = int'(wr_got[i][511:507]);
      checks++;
      if (c >= NCH || nblk_ch[c] >= enc[c].pk.blocks.size() || wr_got[i] !== enc[c].pk.blocks[nblk_ch[c]]) begin
        failures++; $display("FAIL written block %0d (channel %0d) differs from the reference", i, c);
      end
      if (c < NCH) nblk_ch[c]++;
    end
    $display("compressed %0d grid points (%0d bits) into %0d blocks (%0d bits): ratio %0.3f",
             NPT, NPT * NCH * 32, n_wr_total, n_wr_total * 512, real'(NPT * NCH * 32) / real'(n_wr_total * 512));

    // C. compressed read of the stream just written
    n_in = 0;
    foreach (pts[i]) exp_in.push_back(pts[i]);
    foreach (wr_got[i]) rd_q.push_back(wr_got[i]);
    c0 = $time / 10;
    wait (n_in == NPT);
    $display("read back %0d grid points in %0d cycles", NPT, $time / 10 - c0);
    repeat (5) @(posedge clk); #1;

    // D. raw write
    bypass = 1;
    wr_got.delete(); n_out = 0;
    for (int i = 0; i < NRAW; i++) begin
      automatic logic [NCH-1:0][31:0] p = point(200000 + i);
      pt_q.push_back(p);
      for (int k = 0; k < NCH * 32; k++) bits.push_back(p[k / 32][k % 32]);
    end
    wait (wr_got.size() == NRAW * NCH * 32 / 512);
    foreach (wr_got[i]) begin
      automatic logic [511:0] w;
      for (int k = 0; k < 512; k++) w[k] = bits.pop_front();
      checks++;
      if (wr_got[i] !== w) begin failures++; $display("FAIL raw word %0d differs", i); end
    end
    @(posedge clk); #1;
    cnt_run = 0;
    repeat (3) @(posedge clk); #1;

    // counters: every core-side transfer since the clear
    checks++;
    if (in_vc != 48'(NRAW + NPT) || out_vc != 48'(NPT + NRAW) || in_op < in_vc || in_op != out_op) begin
      failures++; $display("FAIL counters in %0d/%0d out %0d/%0d", in_vc, in_op, out_vc, out_op);
    end

    $display("mechanisms:");
    expect_count("codes of length L1", enc[0].code_hist[1] + enc[3].code_hist[1]);
    begin
      automatic int h2 = 0, h3 = 0;
      for (int c = 0; c < NCH; c++) begin h2 += enc[c].code_hist[2]; h3 += enc[c].code_hist[3]; end
      expect_count("codes of length L2", h2);
      expect_count("codes of length L3", h3);
    end
    expect_count("core output stalled", m_core_out_stall);
    expect_count("stall on full block", m_vfc_stall);
    expect_count("flush closed a block", m_flush_block);
    expect_count("serializer contention", m_mcs_contend);
    expect_count("write backpressure", m_wr_backpressure);
    expect_count("deserializer FIFO > 1", m_mcd_fifo_depth);
    expect_count("channel sync wait", m_sync_wait);
    expect_count("core input stall", m_core_in_stall);
    expect_count("decompressor block loads", m_block_load);
    expect_count("bypass read transfers", m_bypass_rd);
    expect_count("bypass write words", m_bypass_wr);
    expect_count("input cycles counted", int'(in_vc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
