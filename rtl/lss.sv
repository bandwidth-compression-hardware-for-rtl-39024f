// lss: leading-segment selector for N segments (N = 2 or 4).
//
// Given the leading-zero counts of N equal segments (segment 0 is the most
// significant) and the index of the first non-zero segment, it passes on that
// segment's count. The LRB unit concatenates the index and the selected count
// into the leading-zero count of the whole word.
module lss #(
  parameter int unsigned N  = 4,
  parameter int unsigned LW = 2
) (
  input  logic [N-1:0][LW-1:0]       seg_lzc,
  input  logic [$clog2(N)-1:0]       sel,
  output logic [LW-1:0]              lzc
);
  always_comb lzc = seg_lzc[sel];
endmodule
