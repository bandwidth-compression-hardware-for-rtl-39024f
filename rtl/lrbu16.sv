// lrbu16: leading-zero counter for a 16-bit word, as used inside the LRB unit.
//
// Four lzcu4 units count the zeros of the four nibbles; a fifth lzcu4 working
// on the four non-zero flags finds the first non-zero nibble; a 4-input
// leading-segment selector picks that nibble's count. The 4-bit count is
// {first nibble index, count within nibble}; nzero is low for an all-zero word
// (the count is then not meaningful). Purely combinational.
module lrbu16 (
  input  logic [15:0] d,
  output logic [3:0]  lzc,
  output logic        nzero
);
  logic [3:0][1:0] nib_lzc;
  logic [3:0]      nib_nz;   // bit 3 = most significant nibble
  logic [1:0]      hi;
  logic [1:0]      lo;

  for (genvar g = 0; g < 4; g++) begin : g_nib
    // segment index 0 is the most significant nibble
    lzcu4 u_nib (.d(d[15-4*g -: 4]), .lzc(nib_lzc[g]), .nzero(nib_nz[3-g]));
  end

  lzcu4 u_seg (.d(nib_nz), .lzc(hi), .nzero(nzero));
  lss #(.N(4), .LW(2)) u_lss (.seg_lzc(nib_lzc), .sel(hi), .lzc(lo));

  assign lzc = {hi, lo};
endmodule
