// width_conv: stream width converter (gearbox) for the uncompressed route.
//
// Repacks a stream of IN_W-bit words into OUT_W-bit words, least significant
// bits first, e.g. 512-bit memory words into one 960-bit grid point of all
// 30 channels and back. Bits collect in a buffer of IN_W + OUT_W bits; the
// fill level counts G-bit units, G = gcd(IN_W, OUT_W), so the insertion
// shifter moves in G-bit steps. An output word is offered whenever OUT_W bits
// are present; an input word is taken whenever it fits after this cycle's
// output. Interface: valid/ready in, valid/ready out.
module width_conv #(
  parameter int unsigned IN_W  = 512,
  parameter int unsigned OUT_W = 960
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data
);
  import bwc_pkg::*;

  localparam int unsigned G   = gcd(IN_W, OUT_W);
  localparam int unsigned BW  = IN_W + OUT_W;
  localparam int unsigned CAP = BW / G;
  localparam int unsigned CW  = $clog2(CAP + 1);

  logic [BW-1:0] buffer;
  logic [CW-1:0] fill;       // G-bit units held
  logic [CW-1:0] fill_after; // after this cycle's output
  logic          out_fire;

  assign out_valid  = (fill >= CW'(OUT_W / G));
  assign out_data   = buffer[OUT_W-1:0];
  assign out_fire   = out_valid && out_ready;
  assign fill_after = out_fire ? fill - CW'(OUT_W / G) : fill;
  assign in_ready   = (int'(fill_after) + int'(IN_W / G)) <= int'(CAP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buffer <= '0;
      fill   <= '0;
    end else begin
      logic [BW-1:0] base;
      base = out_fire ? (buffer >> OUT_W) : buffer;
      if (in_valid && in_ready) begin
        buffer <= base | (BW'(in_data) << (G * fill_after));
        fill   <= fill_after + CW'(IN_W / G);
      end else begin
        buffer <= base;
        fill   <= fill_after;
      end
    end
  end
endmodule
