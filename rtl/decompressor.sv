// decompressor: single-channel area-oriented bandwidth decompressor.
//
// Takes compressed data blocks (CDBs) and returns the original IEEE754
// stream, one datum per cycle. Three pipeline stages:
//   1. fixed-to-variable length converter: ex and D of the next datum.
//   2. prediction P from the previously reconstructed integers and the data
//      reconstruction unit F = P -/+ D; F enters the predictor history in the
//      same cycle, a one-cycle feedback loop.
//   3. inverse binary translation back to the floating-point bit string.
// The predictor starts from the same (zero) history as the compressor, so the
// two produce identical predictions. Stages 2 and 3 share one enable that
// holds while the output is not taken.
//
// Interface: CDB valid/ready in, datum valid/ready out. Latency from the
// block load to its first datum at the output: 3 cycles.
module decompressor #(
  parameter int unsigned W      = 32,
  parameter int unsigned W_OUT  = 512,
  parameter int unsigned W_I    = 5,
  parameter int unsigned L1     = 8,
  parameter int unsigned L2     = 16,
  parameter int unsigned L3     = 32,
  parameter int unsigned ORDER  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cdb_valid,
  output logic             cdb_ready,
  input  logic [W_OUT-1:0] cdb,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [W-1:0]     out_data
);
  logic         en;
  logic         d_valid;
  logic         d_ex;
  logic [W-1:0] d_d;
  logic [W-1:0] P_cur, F_rec;
  logic         s2_v, s3_v;
  logic [W-1:0] s2_F, s3_f, f_c;

  assign en = !s3_v || out_ready;

  fvc #(.W(W), .W_OUT(W_OUT), .W_I(W_I), .L1(L1), .L2(L2), .L3(L3)) u_fvc (
    .clk(clk), .rst_n(rst_n), .cdb_valid(cdb_valid), .cdb_ready(cdb_ready), .cdb(cdb),
    .out_valid(d_valid), .out_ready(en), .ex(d_ex), .d(d_d));

  predictor #(.W(W), .ORDER(ORDER)) u_pred (
    .clk(clk), .rst_n(rst_n), .push(d_valid && en), .f_in(F_rec), .p_out(P_cur));

  dru #(.W(W)) u_dru (.P(P_cur), .D(d_d), .ex(d_ex), .F(F_rec));

  ibtu #(.W(W)) u_ibtu (.F(s2_F), .f(f_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s3_v <= 1'b0;
      s2_F <= '0;   s3_f <= '0;
    end else if (en) begin
      s2_v <= d_valid;
      s2_F <= F_rec;
      s3_v <= s2_v;
      s3_f <= f_c;
    end
  end

  assign out_valid = s3_v;
  assign out_data  = s3_f;
endmodule
