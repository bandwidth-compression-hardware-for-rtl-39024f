// mcd: multi-channel deserializer.
//
// Distributes the compressed data blocks (CDBs) read from external memory to
// the decompressors of NCH channels. Each block names its channel in its top
// W_I bits; a tree of 8-way demultiplexers (mcd_demux8) routes it, each level
// looking at one 3-bit digit of the channel number, most significant digit at
// the root. Every output channel ends in a FIFO of FIFO_DEPTH blocks so that
// channels which receive their next block early can keep it while the
// computation waits for slower channels; this is what lets all decompressors
// run in step.
//
// A block with a channel number of NCH or above is dropped at the first node
// that has no subtree for it. Latency: one cycle per tree level plus one for
// the FIFO (30 channels: 2 levels). Interface: valid/ready/data in, per-channel
// valid/ready/data out.
module mcd #(
  parameter int unsigned NCH        = 30,
  parameter int unsigned W_OUT      = 512,
  parameter int unsigned W_I        = 5,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [W_OUT-1:0]          in_data,
  output logic [NCH-1:0]            out_valid,
  input  logic [NCH-1:0]            out_ready,
  output logic [NCH-1:0][W_OUT-1:0] out_data
);
  function automatic int unsigned num_levels();
    int unsigned n = 1, l = 0;
    do begin
      n = n * 8;
      l++;
    end while (n < NCH);
    return l;
  endfunction

  localparam int unsigned LD = num_levels();

  // nodes at level l (0 = root): ceil(NCH / 8^(LD-l))
  function automatic int unsigned nodes_at(int unsigned l);
    int unsigned span = 1;
    for (int unsigned i = l; i < LD; i++) span = span * 8;
    return (NCH + span - 1) / span;
  endfunction

  for (genvar l = 0; l < LD; l++) begin : g_lvl
    localparam int unsigned NODES = nodes_at(l);
    localparam int unsigned NEXT  = (l + 1 < LD) ? nodes_at(l + 1) : NCH;
    // outputs of this level's nodes
    logic [7:0]       nv [NODES];
    logic [7:0]       nr [NODES];
    logic [W_OUT-1:0] nd [NODES];
    for (genvar k = 0; k < NODES; k++) begin : g_node
      logic             iv, ir;
      logic [W_OUT-1:0] id;
      if (l == 0) begin : g_root
        assign iv       = in_valid;
        assign id       = in_data;
        assign in_ready = ir;
      end else begin : g_inner
        assign iv = g_lvl[l-1].nv[k/8][k%8];
        assign id = g_lvl[l-1].nd[k/8];
        assign g_lvl[l-1].nr[k/8][k%8] = ir;
      end
      mcd_demux8 #(.W_OUT(W_OUT), .W_I(W_I), .SEL_LSB(3 * (LD - 1 - l))) u_dmx (
        .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_ready(ir), .in_data(id),
        .out_valid(nv[k]), .out_ready(nr[k]), .out_data(nd[k]));
      // outputs with nothing behind them accept and drop
      for (genvar j = 0; j < 8; j++) begin : g_open
        if (8 * k + j >= NEXT) begin : g_drop
          assign nr[k][j] = 1'b1;
        end
      end
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    sync_fifo #(.WIDTH(W_OUT), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .in_valid(g_lvl[LD-1].nv[c/8][c%8]), .in_ready(g_lvl[LD-1].nr[c/8][c%8]), .in_data(g_lvl[LD-1].nd[c/8]),
      .out_valid(out_valid[c]), .out_ready(out_ready[c]), .out_data(out_data[c]));
  end
endmodule
