// dcu: difference computing unit.
//
// Subtracts the smaller of prediction P and input F from the larger one and
// reports with ex whether the operands were swapped: ex = 1 when P > F, giving
// D = P - F; otherwise D = F - P. Both operands are unsigned integers from the
// binary translation unit. Purely combinational.
module dcu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] P,
  input  logic [W-1:0] F,
  output logic [W-1:0] D,
  output logic         ex
);
  always_comb begin
    ex = (P > F);
    D  = ex ? (P - F) : (F - P);
  end
endmodule
