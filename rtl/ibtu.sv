// ibtu: inverse binary translation unit.
//
// Undoes the btu mapping: an integer with MSB 1 came from a positive number
// (flip the MSB back), one with MSB 0 from a negative number (flip all bits).
// Purely combinational. The inverse formula is derived from the forward
// mapping; the design names the unit but does not spell it out.
module ibtu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] F,
  output logic [W-1:0] f
);
  always_comb begin
    if (F[W-1]) f = {1'b0, F[W-2:0]};
    else        f = ~F;
  end
endmodule
