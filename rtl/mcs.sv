// mcs: multi-channel serializer.
//
// Merges the compressed data blocks (CDBs) of NCH channels into the single
// block stream written to external memory. Blocks leave in the order the
// compressors raise them, so a channel that compresses poorly (and fills its
// blocks faster) automatically gets more of the memory bandwidth; each block
// carries its channel number, so no fixed round-robin order is needed.
//
// Structure: a tree of mcs_sel selectors, four inputs per node; the last node
// of a level takes the remaining one to three inputs. Every level is one
// register stage, so a block needs LEVELS cycles to reach the output
// (30 channels: 8 + 2 + 1 nodes, 3 levels).
//
// Interface: per-channel valid/ready/data in, valid/ready/data out.
module mcs #(
  parameter int unsigned NCH   = 30,
  parameter int unsigned W_OUT = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NCH-1:0]            in_valid,
  output logic [NCH-1:0]            in_ready,
  input  logic [NCH-1:0][W_OUT-1:0] in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [W_OUT-1:0]          out_data
);
  // number of nodes at level l (level 0 takes the channels)
  function automatic int unsigned nodes_at(int unsigned l);
    int unsigned n = NCH;
    for (int unsigned i = 0; i <= l; i++) n = (n + 3) / 4;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = NCH, l = 0;
    do begin
      n = (n + 3) / 4;
      l++;
    end while (n > 1);
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // stream arrays between levels: index 0 = channels, LEVELS = root output
  logic [NCH-1:0]            v [LEVELS+1];
  logic [NCH-1:0]            r [LEVELS+1];
  logic [NCH-1:0][W_OUT-1:0] d [LEVELS+1];

  assign v[0]     = in_valid;
  assign d[0]     = in_data;
  assign in_ready = r[0];

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN_L  = (l == 0) ? NCH : nodes_at(l - 1);
    localparam int unsigned NODES  = nodes_at(l);
    for (genvar k = 0; k < NODES; k++) begin : g_node
      localparam int unsigned BASE = 4 * k;
      localparam int unsigned NI   = (NIN_L - BASE >= 4) ? 4 : (NIN_L - BASE);
      mcs_sel #(.NIN(NI), .W_OUT(W_OUT)) u_sel (
        .clk(clk), .rst_n(rst_n),
        .in_valid(v[l][BASE +: NI]), .in_ready(r[l][BASE +: NI]), .in_data(d[l][BASE +: NI]),
        .out_valid(v[l+1][k]), .out_ready(r[l+1][k]), .out_data(d[l+1][k]));
    end
    // unused slots of the next level
    if (NODES < NCH) begin : g_pad
      for (genvar u = NODES; u < NCH; u++) begin : g_u
        assign v[l+1][u] = 1'b0;
        assign d[l+1][u] = '0;
        assign r[l+1][u] = 1'b0;
      end
    end
  end
  assign out_valid    = v[LEVELS][0];
  assign out_data     = d[LEVELS][0];
  assign r[LEVELS][0] = out_ready;
endmodule
