// lzcu4: 4-bit leading-zero count unit.
//
// Counts the zeros above the first one in a 4-bit input (MSB first) and flags
// whether any bit is set. lzc is meaningful only when nzero is high.
// Building block of the LRB unit, combined through leading-segment selectors.
module lzcu4 (
  input  logic [3:0] d,
  output logic [1:0] lzc,
  output logic       nzero
);
  always_comb begin
    nzero = |d;
    if      (d[3]) lzc = 2'd0;
    else if (d[2]) lzc = 2'd1;
    else if (d[1]) lzc = 2'd2;
    else           lzc = 2'd3;
  end
endmodule
