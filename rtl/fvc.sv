// fvc: fixed-to-variable length converter of the area-oriented encoding.
//
// Holds one compressed data block (CDB) split into its LRB-ex buffer and its
// residual buffer. The lowest three bits of the LRB-ex buffer always describe
// the next datum: bit 0 is ex, bits 2:1 the L-LRB code. The difference D is
// the low W bits of the residual buffer ANDed with a mask of the code's
// length. When the datum is taken, the LRB-ex buffer moves down 3 bits and the
// residual buffer by L1, L2 or L3 bits: three fixed shifters and a
// multiplexer, no barrel shifter and no pointer. Code 00 means the block is
// used up; a new block is then loaded. A new block is also accepted in the
// cycle that hands out the last datum of the current one, so back-to-back
// blocks need no idle cycle.
//
// Interface: CDB valid/ready in, datum valid/ready out (ex, d). The output is
// driven from the buffer registers, so the datum appears the cycle after its
// block is loaded.
module fvc #(
  parameter int unsigned W      = 32,
  parameter int unsigned W_OUT  = 512,
  parameter int unsigned W_I    = 5,
  parameter int unsigned L1     = 8,
  parameter int unsigned L2     = 16,
  parameter int unsigned L3     = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cdb_valid,
  output logic             cdb_ready,
  input  logic [W_OUT-1:0] cdb,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             ex,
  output logic [W-1:0]     d
);
  import bwc_pkg::*;

  localparam int unsigned WLE = w_le(W_OUT, W_I, L1);
  localparam int unsigned WRE = w_re(W_OUT, W_I, L1);

  logic [WLE-1:0] le_buf;
  logic [WRE-1:0] re_buf;
  logic [1:0]     code;
  logic [1:0]     next_code;
  logic           fire;
  logic [W-1:0]   mask;
  logic [WRE-1:0] re_next;

  assign code      = le_buf[2:1];
  assign next_code = le_buf[5:4];
  assign ex        = le_buf[0];
  assign out_valid = (code != CODE_END);
  assign fire      = out_valid && out_ready;
  assign cdb_ready = !out_valid || (fire && next_code == CODE_END);

  always_comb begin
    unique case (code)
      CODE_L1: begin mask = W'((64'd1 << L1) - 64'd1); re_next = re_buf >> L1; end
      CODE_L2: begin mask = W'((64'd1 << L2) - 64'd1); re_next = re_buf >> L2; end
      default: begin mask = '1;                        re_next = re_buf >> L3; end
    endcase
    d = re_buf[W-1:0] & mask;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      le_buf <= '0;
      re_buf <= '0;
    end else if (cdb_valid && cdb_ready) begin
      le_buf <= cdb[WRE +: WLE];
      re_buf <= cdb[0 +: WRE];
    end else if (fire) begin
      le_buf <= le_buf >> LE_W;
      re_buf <= re_next;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(d) && $stable(ex));
endmodule
