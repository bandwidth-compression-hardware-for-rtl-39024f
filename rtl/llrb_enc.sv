// llrb_enc: limited-LRB (L-LRB) quantiser of the area-oriented encoding.
//
// Only three residual lengths L1 < L2 < L3 (L3 = W keeps a datum whole) are
// stored. An LRB up to L1 is stored in L1 bits, up to L2 in L2 bits, anything
// longer in L3 bits; the unused upper bits are zeros. The length is sent as a
// 2-bit code: 1, 2, 3 for L1, L2, L3; code 0 is reserved to mark the end of a
// compressed data block. Combinational. The code values are this design's
// own assignment.
module llrb_enc #(
  parameter int unsigned W  = 32,
  parameter int unsigned L1 = 8,
  parameter int unsigned L2 = 16,
  parameter int unsigned L3 = 32
) (
  input  logic [$clog2(W):0] lrb,
  output logic [1:0]         code,
  output logic [$clog2(W):0] len
);
  import bwc_pkg::*;
  localparam int unsigned CW = $clog2(W) + 1;

  always_comb begin
    if (lrb <= CW'(L1)) begin
      code = CODE_L1;
      len  = CW'(L1);
    end else if (lrb <= CW'(L2)) begin
      code = CODE_L2;
      len  = CW'(L2);
    end else begin
      code = CODE_L3;
      len  = CW'(L3);
    end
  end

  initial begin
    assert (L1 < L2 && L2 < L3 && L3 == W)
      else $error("llrb_enc: need L1 < L2 < L3 = W");
  end
endmodule
