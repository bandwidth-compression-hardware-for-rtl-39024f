// mcd_demux8: 8-way demultiplexer, the node of the multi-channel deserializer.
//
// Registers one compressed data block and presents it on the output selected
// by a 3-bit digit of the block's channel-number field (bits
// SEL_LSB+2:SEL_LSB of the W_I-bit field in the top bits of the block). The
// node decides locally, so a tree of them routes a block to any of up to 8^k
// channels, one register stage per level.
//
// Interface: valid/ready/data in, eight valid/ready/data outputs sharing one
// data bus. Accepts a new block when empty or when its block leaves.
module mcd_demux8 #(
  parameter int unsigned W_OUT   = 512,
  parameter int unsigned W_I     = 5,
  parameter int unsigned SEL_LSB = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [W_OUT-1:0] in_data,
  output logic [7:0]       out_valid,
  input  logic [7:0]       out_ready,
  output logic [W_OUT-1:0] out_data
);
  logic       v;
  logic [2:0] port;
  logic [W_I-1:0] ch_in;

  assign ch_in    = in_data[W_OUT-1 -: W_I];
  assign in_ready = !v || out_ready[port];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v        <= 1'b0;
      port     <= '0;
      out_data <= '0;
    end else if (in_ready) begin
      v <= in_valid;
      if (in_valid) begin
        port     <= 3'((32'(ch_in) >> SEL_LSB) & 32'd7);
        out_data <= in_data;
      end
    end
  end

  always_comb begin
    out_valid = '0;
    out_valid[port] = v;
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    v && !out_ready[port] |=> v && $stable(out_data) && $stable(port));
endmodule
