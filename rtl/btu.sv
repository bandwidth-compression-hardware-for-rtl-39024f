// btu: binary translation unit.
//
// Maps an IEEE754 bit string to an unsigned integer whose order follows the
// numeric order of the floating-point values: a positive number (sign 0) has
// only its sign bit flipped, a negative number has all bits flipped. Positive
// values then occupy the upper half of the integer range and negative values
// the lower half, so nearby floats give nearby integers. Purely combinational.
// The mapping is the one the compressor design specifies.
module btu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] f,
  output logic [W-1:0] F
);
  always_comb begin
    if (f[W-1]) F = ~f;
    else        F = {1'b1, f[W-2:0]};
  end
endmodule
