// mcs_sel: channel selector, the node of the multi-channel serializer tree.
//
// Merges NIN (1-4) request streams of compressed data blocks into one. When
// no selection is in progress it takes a snapshot of the ports requesting at
// that moment and locks out all other ports; the locked requests are then
// sent one per cycle, lowest port number first, and only when all of them are
// out is a new snapshot taken. This keeps a channel that requests often from
// starving the others while still sending a block as soon as it arrives when
// few ports request. The output is a register (one pipeline stage).
//
// Interface: per-port valid/ready/data in, valid/ready/data out. A port's
// ready (grant) is high in the cycle its block is copied to the output
// register.
module mcs_sel #(
  parameter int unsigned NIN   = 4,
  parameter int unsigned W_OUT = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NIN-1:0]             in_valid,
  output logic [NIN-1:0]             in_ready,
  input  logic [NIN-1:0][W_OUT-1:0]  in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W_OUT-1:0]           out_data
);
  logic [NIN-1:0] lock;     // requests of the current snapshot not yet sent
  logic [NIN-1:0] eff;      // requests competing this cycle
  logic [NIN-1:0] pick;     // one-hot winner
  logic           can_load;
  logic           grant;

  assign can_load = !out_valid || out_ready;
  assign eff      = ((lock & in_valid) != '0) ? (lock & in_valid) : in_valid;

  always_comb begin
    pick = '0;
    for (int i = NIN - 1; i >= 0; i--)
      if (eff[i]) pick = NIN'(1) << i;
  end

  assign grant    = can_load && (eff != '0);
  assign in_ready = grant ? pick : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lock      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (grant) begin
        lock      <= eff & ~pick;
        out_valid <= 1'b1;
        for (int i = 0; i < NIN; i++)
          if (pick[i]) out_data <= in_data[i];
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready));
endmodule
