// lrbu: LRB unit, the length of residual bits of a difference D.
//
// LRB is the number of bits left after removing the leading zeros of D, i.e.
// W - LZC, and 0 when D is zero. The leading-zero count is built as a tree:
// 16-bit counters (lrbu16) are combined by an LZC unit on their non-zero flags
// and a leading-segment selector; 32 bits use two lrbu16 with lzcu2/LSS2,
// 64 bits four lrbu16 with lzcu4/LSS4. W = 16, 32 or 64. Combinational.
module lrbu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         d,
  output logic [$clog2(W):0]   lrb
);
  localparam int unsigned CW = $clog2(W);
  logic [CW-1:0] lzc;
  logic          nzero;

  if (W == 16) begin : g_w16
    lrbu16 u0 (.d(d), .lzc(lzc), .nzero(nzero));
  end else if (W == 32) begin : g_w32
    logic [1:0][3:0] seg_lzc;
    logic [1:0]      seg_nz;
    logic            hi;
    logic [3:0]      lo;
    lrbu16 u_hi (.d(d[31:16]), .lzc(seg_lzc[0]), .nzero(seg_nz[1]));
    lrbu16 u_lo (.d(d[15:0]),  .lzc(seg_lzc[1]), .nzero(seg_nz[0]));
    lzcu2 u_seg (.d(seg_nz), .lzc(hi), .nzero(nzero));
    lss #(.N(2), .LW(4)) u_lss (.seg_lzc(seg_lzc), .sel(hi), .lzc(lo));
    assign lzc = {hi, lo};
  end else if (W == 64) begin : g_w64
    logic [3:0][3:0] seg_lzc;
    logic [3:0]      seg_nz;
    logic [1:0]      hi;
    logic [3:0]      lo;
    for (genvar g = 0; g < 4; g++) begin : g_seg
      lrbu16 u_s (.d(d[63-16*g -: 16]), .lzc(seg_lzc[g]), .nzero(seg_nz[3-g]));
    end
    lzcu4 u_seg (.d(seg_nz), .lzc(hi), .nzero(nzero));
    lss #(.N(4), .LW(4)) u_lss (.seg_lzc(seg_lzc), .sel(hi), .lzc(lo));
    assign lzc = {hi, lo};
  end else begin : g_bad
    $error("lrbu: W must be 16, 32 or 64");
  end

  always_comb lrb = nzero ? ((CW+1)'(W) - (CW+1)'(lzc)) : '0;
endmodule
