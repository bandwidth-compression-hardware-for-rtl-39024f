// vfc: variable-to-fixed length converter of the area-oriented encoding.
//
// Packs compressed data {code, ex, residual} into fixed-size compressed data
// blocks (CDBs). Instead of one long output buffer it keeps two accumulation
// buffers, one per CDB field: the LRB-ex buffer takes a 3-bit entry per datum
// at a fixed 3-bit step, the residual buffer takes the L1/L2/L3-bit residual at
// the position given by its pointer. Because every residual length is a
// multiple of G = gcd(L1,L2,L3), the residual pointer counts G-bit units and
// the barrel shifter only shifts in G-bit steps.
//
// When a datum would overflow either buffer (or flush is raised with data
// buffered) the VFC raises cdb_valid with the block
// {CH_ID, LRB-ex buffer, residual buffer} and stops accepting data. In the
// cycle the block is taken (cdb_ready) both buffers restart, and the waiting
// datum is accepted into the empty buffers in that same cycle. Entries left
// unused in the LRB-ex field stay 3'b000, which the decompressor reads as the
// end of the block.
//
// Interface: datum valid/ready (in_ready may depend on in_valid's datum
// length), CDB valid/ready. One datum per cycle while the block fills.
// The residual buffer is further divided into regions of W1 bits (W1 at
// least the longest residual). The pointer splits into a region index and an
// offset inside the region: the residual is shifted by the offset only, in a
// barrel shifter two regions wide with log2(W1/G) stages, and the shifted
// window is ORed into the indexed region and the one above it. The long
// variable shift across the whole field becomes a region select. Both the
// two-buffer structure and the region split follow the area-oriented design;
// choosing W1 = L3 is this design's own.
module vfc #(
  parameter int unsigned W      = 32,
  parameter int unsigned W_OUT  = 512,
  parameter int unsigned W_I    = 5,
  parameter int unsigned L1     = 8,
  parameter int unsigned L2     = 16,
  parameter int unsigned L3     = 32,
  parameter int unsigned CH_ID  = 0,
  parameter int unsigned W1     = L3    // residual-buffer region width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             ex,
  input  logic [1:0]       code,
  input  logic [W-1:0]     d,
  input  logic             flush,
  output logic             cdb_valid,
  input  logic             cdb_ready,
  output logic [W_OUT-1:0] cdb
);
  import bwc_pkg::*;

  localparam int unsigned N     = n_comp(W_OUT, W_I, L1);
  localparam int unsigned WLE   = w_le(W_OUT, W_I, L1);
  localparam int unsigned WRE   = w_re(W_OUT, W_I, L1);
  localparam int unsigned G     = gcd3(L1, L2, L3);
  localparam int unsigned UNITS = WRE / G;
  localparam int unsigned PW    = $clog2(UNITS + 1) + 1;
  localparam int unsigned EW    = $clog2(N + 1) + 1;
  localparam int unsigned RU    = W1 / G;                 // G-bit units per region
  localparam int unsigned OW    = (RU > 1) ? $clog2(RU) : 1;
  localparam int unsigned NREG  = (WRE + W1 - 1) / W1;    // regions

  logic [WLE-1:0] le_buf;
  logic [WRE-1:0] re_buf;
  logic [NREG-1:0][W1-1:0] re_reg;  // residual buffer as regions
  logic [EW-1:0]  le_cnt;   // entries used
  logic [PW-1:0]  re_ptr;   // G-bit units used
  logic           full;     // block waiting for the downstream grant

  logic [PW-1:0]  len_u;
  logic [W-1:0]   mask;
  logic           fits;
  logic           grant;
  logic           take;

  always_comb begin
    unique case (code)
      CODE_L1: begin len_u = PW'(L1 / G); mask = W'((64'd1 << L1) - 64'd1); end
      CODE_L2: begin len_u = PW'(L2 / G); mask = W'((64'd1 << L2) - 64'd1); end
      default: begin len_u = PW'(L3 / G); mask = '1;                        end
    endcase
  end

  assign fits      = (le_cnt < EW'(N)) && ((re_ptr + len_u) <= PW'(UNITS));
  assign grant     = full && cdb_ready;
  assign in_ready  = full ? cdb_ready : fits;
  assign take      = in_valid && in_ready;
  assign cdb_valid = full;
  assign re_buf    = WRE'(re_reg);
  assign cdb       = {W_I'(CH_ID), le_buf, re_buf};

  // residual insertion: region index and offset from the unit pointer; the
  // barrel shifter spans only two regions and moves in G-bit steps
  logic [PW-1:0]   ptr_now;
  logic [PW-1:0]   reg_idx;
  logic [OW-1:0]   reg_off;
  logic [2*W1-1:0] window;

  assign ptr_now = grant ? '0 : re_ptr;
  assign reg_idx = ptr_now / PW'(RU);
  assign reg_off = OW'(ptr_now % PW'(RU));
  assign window  = (2*W1)'(d & mask) << (G * reg_off);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      le_buf <= '0;
      re_reg <= '0;
      le_cnt <= '0;
      re_ptr <= '0;
      full   <= 1'b0;
    end else begin
      logic [WLE-1:0] le_base;
      logic [NREG-1:0][W1-1:0] re_base;
      logic [EW-1:0]  cnt_base;
      logic [PW-1:0]  ptr_base;
      le_base  = grant ? '0 : le_buf;
      re_base  = grant ? '0 : re_reg;
      cnt_base = grant ? '0 : le_cnt;
      ptr_base = grant ? '0 : re_ptr;
      if (take) begin
        le_buf <= le_base | (WLE'({code, ex}) << (LE_W * cnt_base));
        for (int k = 0; k < NREG; k++) begin
          if (PW'(k) == reg_idx)
            re_reg[k] <= re_base[k] | window[W1-1:0];
          else if (PW'(k) == reg_idx + 1'b1)
            re_reg[k] <= re_base[k] | window[2*W1-1:W1];
          else
            re_reg[k] <= re_base[k];
        end
        le_cnt <= cnt_base + 1'b1;
        re_ptr <= ptr_base + len_u;
      end else begin
        le_buf <= le_base;
        re_reg <= re_base;
        le_cnt <= cnt_base;
        re_ptr <= ptr_base;
      end
      if (grant)
        full <= 1'b0;
      else if (!full && ((in_valid && !fits) || (flush && !in_valid && le_cnt != '0)))
        full <= 1'b1;
    end
  end

  // a raised block stays raised and unchanged until it is taken
  a_cdb_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cdb_valid && !cdb_ready |=> cdb_valid && $stable(cdb));
  a_code: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> code != CODE_END);

  initial begin
    assert (L3 <= WRE) else $error("vfc: residual field shorter than L3");
    assert (W_I + WLE + WRE == W_OUT) else $error("vfc: field widths do not add up");
    assert (W1 >= L3 && W1 % G == 0 && (RU & (RU - 1)) == 0)
      else $error("vfc: W1 must be at least L3 and a power-of-two multiple of G");
  end
endmodule
