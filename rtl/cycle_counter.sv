// cycle_counter: operating-cycle and valid-cycle counter.
//
// Counts the cycles in which run is high (operating cycles) and, among them,
// the cycles in which valid is high (cycles that moved data). Their ratio is
// the operating rate of the attached stream; valid cycles times the stream
// width gives the data moved. clear zeroes both counts; counters saturate
// instead of wrapping. Results are registered.
module cycle_counter #(
  parameter int unsigned CW = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          run,
  input  logic          valid,
  output logic [CW-1:0] op_cycles,
  output logic [CW-1:0] valid_cycles
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      op_cycles    <= '0;
      valid_cycles <= '0;
    end else if (run) begin
      if (op_cycles != '1) op_cycles <= op_cycles + 1'b1;
      if (valid && valid_cycles != '1) valid_cycles <= valid_cycles + 1'b1;
    end
  end
endmodule
