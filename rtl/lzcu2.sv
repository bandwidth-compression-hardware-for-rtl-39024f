// lzcu2: 2-bit leading-zero count unit (the 2-input counterpart of lzcu4).
//
// lzc is 0 when the upper bit is set and 1 otherwise; nzero flags a set bit.
module lzcu2 (
  input  logic [1:0] d,
  output logic       lzc,
  output logic       nzero
);
  always_comb begin
    nzero = |d;
    lzc   = ~d[1];
  end
endmodule
