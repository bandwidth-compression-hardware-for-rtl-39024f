// compressor: single-channel area-oriented bandwidth compressor.
//
// Takes one IEEE754 datum per cycle and produces compressed data blocks
// (CDBs) of W_OUT bits. Four pipeline stages:
//   1. binary translation (float -> ordered unsigned F) and polynomial
//      prediction P from the previous ORDER inputs; F enters the history.
//   2. difference computing: D = |P - F|, ex = (P > F).
//   3. LRB unit and L-LRB quantiser: residual length class (code).
//   4. variable-to-fixed length converter packing {code, ex, D} into a CDB
//      tagged with this compressor's channel number CH_ID.
// The stage split follows the unit order of the design; all stages share one
// enable, so when the converter refuses a datum (block full and not yet taken
// downstream) the whole pipeline holds. flush asks the converter to emit a
// partly filled block; it acts once stages 1-3 are empty.
//
// Interface: input valid/ready, CDB valid/ready. Latency from an accepted
// datum to its presence in the block buffer: 4 cycles.
module compressor #(
  parameter int unsigned W      = 32,
  parameter int unsigned W_OUT  = 512,
  parameter int unsigned W_I    = 5,
  parameter int unsigned L1     = 8,
  parameter int unsigned L2     = 16,
  parameter int unsigned L3     = 32,
  parameter int unsigned ORDER  = 4,
  parameter int unsigned CH_ID  = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [W-1:0]     in_data,
  input  logic             flush,
  output logic             cdb_valid,
  input  logic             cdb_ready,
  output logic [W_OUT-1:0] cdb
);
  localparam int unsigned CW = $clog2(W) + 1;

  logic         en;
  logic         vfc_ready;

  // stage 1
  logic [W-1:0] F_in, P_cur;
  logic         s1_v;
  logic [W-1:0] s1_F, s1_P;
  // stage 2
  logic [W-1:0] D_c;
  logic         ex_c;
  logic         s2_v, s2_ex;
  logic [W-1:0] s2_D;
  // stage 3
  logic [CW-1:0] lrb_c, len_c;
  logic [1:0]   code_c;
  logic         s3_v, s3_ex;
  logic [W-1:0] s3_D;
  logic [1:0]   s3_code;

  assign en       = !s3_v || vfc_ready;
  assign in_ready = en;

  btu #(.W(W)) u_btu (.f(in_data), .F(F_in));

  predictor #(.W(W), .ORDER(ORDER)) u_pred (
    .clk(clk), .rst_n(rst_n), .push(in_valid && en), .f_in(F_in), .p_out(P_cur));

  dcu #(.W(W)) u_dcu (.P(s1_P), .F(s1_F), .D(D_c), .ex(ex_c));

  lrbu #(.W(W)) u_lrbu (.d(s2_D), .lrb(lrb_c));

  llrb_enc #(.W(W), .L1(L1), .L2(L2), .L3(L3)) u_llrb (.lrb(lrb_c), .code(code_c), .len(len_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
      s1_F <= '0; s1_P <= '0;
      s2_D <= '0; s2_ex <= 1'b0;
      s3_D <= '0; s3_ex <= 1'b0; s3_code <= '0;
    end else if (en) begin
      s1_v    <= in_valid;
      s1_F    <= F_in;
      s1_P    <= P_cur;
      s2_v    <= s1_v;
      s2_D    <= D_c;
      s2_ex   <= ex_c;
      s3_v    <= s2_v;
      s3_D    <= s2_D;
      s3_ex   <= s2_ex;
      s3_code <= code_c;
    end
  end

  vfc #(.W(W), .W_OUT(W_OUT), .W_I(W_I), .L1(L1), .L2(L2), .L3(L3), .CH_ID(CH_ID)) u_vfc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s3_v), .in_ready(vfc_ready), .ex(s3_ex), .code(s3_code), .d(s3_D),
    .flush(flush && !s1_v && !s2_v && !s3_v),
    .cdb_valid(cdb_valid), .cdb_ready(cdb_ready), .cdb(cdb));

  // the kept length always covers the residual
  a_len: assert property (@(posedge clk) disable iff (!rst_n) len_c >= lrb_c);
endmodule
