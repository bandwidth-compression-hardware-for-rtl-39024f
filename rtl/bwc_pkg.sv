// bwc_pkg: shared constants and helper functions of the bandwidth compressor.
//
// The defaults describe the configuration used for the 2D-LBM demonstration:
// 32-bit single-precision data, 512-bit compressed data blocks (CDBs) matching
// the memory interface, a 5-bit channel-number field, the area-oriented
// limited-LRB set (8, 16, 32) and a cubic (4-point) predictor.
//
// CDB layout (area-oriented encoding, LSB first):
//   [W_RE-1:0]                 residual field, residuals packed from bit 0
//   [W_RE+W_LE-1:W_RE]         LRB-ex field, 3-bit entries {code[1:0], ex}
//   [W_OUT-1:W_OUT-W_I]        channel number (indication field)
// The number of entries N_COMP is the largest N with (2+1+L1)*N < W_OUT-W_I,
// W_LE = 3*N_COMP and W_RE takes the rest. The field order inside the block
// is this design's own choice.
package bwc_pkg;

  // width of one LRB-ex entry: 2-bit L-LRB code and the ex bit
  localparam int unsigned LE_W = 3;

  // L-LRB codes; 2'b00 marks an empty entry (end of CDB)
  localparam logic [1:0] CODE_END = 2'd0;
  localparam logic [1:0] CODE_L1  = 2'd1;
  localparam logic [1:0] CODE_L2  = 2'd2;
  localparam logic [1:0] CODE_L3  = 2'd3;

  function automatic int unsigned n_comp(int unsigned w_out, int unsigned w_i, int unsigned l1);
    return (w_out - w_i - 1) / (LE_W + l1);
  endfunction

  function automatic int unsigned w_le(int unsigned w_out, int unsigned w_i, int unsigned l1);
    return LE_W * n_comp(w_out, w_i, l1);
  endfunction

  function automatic int unsigned w_re(int unsigned w_out, int unsigned w_i, int unsigned l1);
    return w_out - w_i - w_le(w_out, w_i, l1);
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned x = a, y = b, t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int unsigned gcd3(int unsigned a, int unsigned b, int unsigned c);
    return gcd(gcd(a, b), c);
  endfunction

  // binomial coefficient, for the polynomial predictor
  function automatic int binom(int n, int k);
    int r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

endpackage
