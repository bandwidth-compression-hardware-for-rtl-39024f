// bwc_top: multi-channel bandwidth compressor around a stream-computing core.
//
// A stream-computing core with NCH synchronous channels (for example a 2D
// lattice-Boltzmann core: 9 distribution functions and 1 attribute per grid
// point, 10 channels per core, 3 cores) reads and writes compressed data so
// that the memory interface carries fewer bits per grid point than the core
// consumes. The core itself is outside this module; its channel ports are
// brought out.
//
// Read side (memory -> core), compressed route (bypass = 0):
//   rd stream of 512-bit compressed data blocks (CDBs) -> mcd (route by the
//   channel number in each block, per-channel FIFO) -> one decompressor per
//   channel -> channel synchroniser -> core_in. The core sees a grid point
//   only when every channel has its datum; all decompressors advance
//   together.
// Write side (core -> memory), compressed route:
//   core_out -> one compressor per channel (all accept together) -> mcs (merge
//   blocks in production order) -> wr stream.
// Raw route (bypass = 1), for the first and last iteration when memory holds
// uncompressed data: rd -> width_conv (W_OUT to NCH*W bits) -> core_in and
// core_out -> width_conv (NCH*W to W_OUT bits) -> wr. Channel 0 occupies the
// low bits of a grid point. bypass is meant to change only while both routes
// are idle.
// flush makes every compressor emit its partly filled block at the end of a
// stream. Two cycle counters record operating and transfer cycles on the core
// input and on the core output interface.
//
// All streams use valid/ready. Defaults: 30 channels of 32-bit data, 512-bit
// blocks, limited residual lengths (8, 16, 32), cubic predictor.
module bwc_top #(
  parameter int unsigned NCH        = 30,
  parameter int unsigned W          = 32,
  parameter int unsigned W_OUT      = 512,
  parameter int unsigned W_I        = 5,
  parameter int unsigned L1         = 8,
  parameter int unsigned L2         = 16,
  parameter int unsigned L3         = 32,
  parameter int unsigned ORDER      = 4,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned CW         = 48
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bypass,
  input  logic                  flush,
  input  logic                  cnt_clear,
  input  logic                  cnt_run,
  // external memory read stream
  input  logic                  rd_valid,
  output logic                  rd_ready,
  input  logic [W_OUT-1:0]      rd_data,
  // external memory write stream
  output logic                  wr_valid,
  input  logic                  wr_ready,
  output logic [W_OUT-1:0]      wr_data,
  // to the computing core
  output logic                  core_in_valid,
  input  logic                  core_in_ready,
  output logic [NCH-1:0][W-1:0] core_in_data,
  // from the computing core
  input  logic                  core_out_valid,
  output logic                  core_out_ready,
  input  logic [NCH-1:0][W-1:0] core_out_data,
  // cycle counters
  output logic [CW-1:0]         in_op_cycles,
  output logic [CW-1:0]         in_valid_cycles,
  output logic [CW-1:0]         out_op_cycles,
  output logic [CW-1:0]         out_valid_cycles
);
  localparam int unsigned PW = NCH * W;

  // ---------------- read side, compressed route ----------------
  logic                      mcd_in_valid, mcd_in_ready;
  logic [NCH-1:0]            mcd_v, mcd_r;
  logic [NCH-1:0][W_OUT-1:0] mcd_d;
  logic [NCH-1:0]            dec_v;
  logic [NCH-1:0][W-1:0]     dec_d;
  logic                      dec_all, dec_take;

  assign mcd_in_valid = rd_valid && !bypass;

  mcd #(.NCH(NCH), .W_OUT(W_OUT), .W_I(W_I), .FIFO_DEPTH(FIFO_DEPTH)) u_mcd (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mcd_in_valid), .in_ready(mcd_in_ready), .in_data(rd_data),
    .out_valid(mcd_v), .out_ready(mcd_r), .out_data(mcd_d));

  assign dec_all  = &dec_v;
  assign dec_take = dec_all && core_in_ready && !bypass;

  for (genvar c = 0; c < NCH; c++) begin : g_dec
    decompressor #(.W(W), .W_OUT(W_OUT), .W_I(W_I), .L1(L1), .L2(L2), .L3(L3), .ORDER(ORDER)) u_dec (
      .clk(clk), .rst_n(rst_n),
      .cdb_valid(mcd_v[c]), .cdb_ready(mcd_r[c]), .cdb(mcd_d[c]),
      .out_valid(dec_v[c]), .out_ready(dec_take), .out_data(dec_d[c]));
  end

  // ---------------- read side, raw route ----------------
  logic          rwc_in_valid, rwc_in_ready, rwc_out_valid, rwc_out_ready;
  logic [PW-1:0] rwc_out_data;

  assign rwc_in_valid  = rd_valid && bypass;
  assign rwc_out_ready = core_in_ready && bypass;

  width_conv #(.IN_W(W_OUT), .OUT_W(PW)) u_rd_conv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rwc_in_valid), .in_ready(rwc_in_ready), .in_data(rd_data),
    .out_valid(rwc_out_valid), .out_ready(rwc_out_ready), .out_data(rwc_out_data));

  assign rd_ready      = bypass ? rwc_in_ready : mcd_in_ready;
  assign core_in_valid = bypass ? rwc_out_valid : dec_all;
  assign core_in_data  = bypass ? rwc_out_data : dec_d;

  // ---------------- write side, compressed route ----------------
  logic [NCH-1:0]            cmp_in_r;
  logic                      cmp_all, cmp_take;
  logic [NCH-1:0]            cmp_v, cmp_r;
  logic [NCH-1:0][W_OUT-1:0] cmp_d;
  logic                      mcs_v;
  logic [W_OUT-1:0]          mcs_d;

  assign cmp_all  = &cmp_in_r;
  assign cmp_take = core_out_valid && cmp_all && !bypass;

  for (genvar c = 0; c < NCH; c++) begin : g_cmp
    compressor #(.W(W), .W_OUT(W_OUT), .W_I(W_I), .L1(L1), .L2(L2), .L3(L3), .ORDER(ORDER), .CH_ID(c)) u_cmp (
      .clk(clk), .rst_n(rst_n),
      .in_valid(cmp_take), .in_ready(cmp_in_r[c]), .in_data(core_out_data[c]),
      .flush(flush),
      .cdb_valid(cmp_v[c]), .cdb_ready(cmp_r[c]), .cdb(cmp_d[c]));
  end

  mcs #(.NCH(NCH), .W_OUT(W_OUT)) u_mcs (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cmp_v), .in_ready(cmp_r), .in_data(cmp_d),
    .out_valid(mcs_v), .out_ready(wr_ready && !bypass), .out_data(mcs_d));

  // ---------------- write side, raw route ----------------
  logic             wwc_in_valid, wwc_in_ready, wwc_out_valid;
  logic [W_OUT-1:0] wwc_out_data;

  assign wwc_in_valid = core_out_valid && bypass;

  width_conv #(.IN_W(PW), .OUT_W(W_OUT)) u_wr_conv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(wwc_in_valid), .in_ready(wwc_in_ready), .in_data(core_out_data),
    .out_valid(wwc_out_valid), .out_ready(wr_ready && bypass), .out_data(wwc_out_data));

  assign core_out_ready = bypass ? wwc_in_ready : cmp_all;
  assign wr_valid       = bypass ? wwc_out_valid : mcs_v;
  assign wr_data        = bypass ? wwc_out_data : mcs_d;

  // ---------------- cycle counters ----------------
  cycle_counter #(.CW(CW)) u_cnt_in (
    .clk(clk), .rst_n(rst_n), .clear(cnt_clear), .run(cnt_run),
    .valid(core_in_valid && core_in_ready),
    .op_cycles(in_op_cycles), .valid_cycles(in_valid_cycles));

  cycle_counter #(.CW(CW)) u_cnt_out (
    .clk(clk), .rst_n(rst_n), .clear(cnt_clear), .run(cnt_run),
    .valid(core_out_valid && core_out_ready),
    .op_cycles(out_op_cycles), .valid_cycles(out_valid_cycles));
endmodule
