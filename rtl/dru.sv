// dru: data reconstruction unit.
//
// Inverse of the difference computing unit: rebuilds the integer F from the
// prediction P, the difference D and the exchange bit ex (F = P - D when
// ex = 1, F = P + D otherwise). Purely combinational.
module dru #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] P,
  input  logic [W-1:0] D,
  input  logic         ex,
  output logic [W-1:0] F
);
  always_comb F = ex ? (P - D) : (P + D);
endmodule
