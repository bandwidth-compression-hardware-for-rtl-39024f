// tb_ref_pkg: reference models for the testbenches of the bandwidth
// compressor, written directly from the encoding rules (not from the RTL):
//   - float <-> ordered-integer translation,
//   - cubic prediction 4F1 - 6F2 + 4F3 - F4 (mod 2^32),
//   - length of residual bits and its (8,16,32) limited-LRB class,
//   - a software encoder that packs data into 512-bit blocks
//     {channel[4:0], LRB-ex field (46 x 3 bits), residual field (369 bits)},
//   - a software decoder for such blocks,
//   - a smooth test-signal generator with occasional jumps.
package tb_ref_pkg;

  localparam int REF_N   = 46;
  localparam int REF_WLE = 138;
  localparam int REF_WRE = 369;

  function automatic logic [31:0] btu_ref(logic [31:0] f);
    return f[31] ? ~f : (f ^ 32'h8000_0000);
  endfunction

  function automatic logic [31:0] ibtu_ref(logic [31:0] u);
    return u[31] ? (u ^ 32'h8000_0000) : ~u;
  endfunction

  function automatic logic [31:0] cubic_ref(logic [31:0] h1, logic [31:0] h2,
                                            logic [31:0] h3, logic [31:0] h4);
    return (h1 << 2) - ((h2 << 2) + (h2 << 1)) + (h3 << 2) - h4;
  endfunction

  function automatic int lrb_ref(logic [63:0] d, int w);
    for (int i = w - 1; i >= 0; i--) if (d[i]) return i + 1;
    return 0;
  endfunction

  function automatic int code_ref(int lrb);
    if (lrb <= 8)  return 1;
    if (lrb <= 16) return 2;
    return 3;
  endfunction

  function automatic int len_of(int code);
    return (code == 1) ? 8 : (code == 2) ? 16 : 32;
  endfunction

  // one compressed datum
  typedef struct {
    bit       ex;
    int       code;
    bit [31:0] d;
  } ent_t;

  // packs entries into blocks exactly as the encoding prescribes
  class Packer;
    int         ch;
    ent_t       cur[$];
    int         units;
    bit [511:0] blocks[$];

    function new(int c);
      ch = c; units = 0;
    endfunction

    function bit [511:0] make_block();
      bit [511:0] b = '0;
      int pos = 0;
      foreach (cur[i]) begin
        b[REF_WRE + 3*i]      = cur[i].ex;
        b[REF_WRE + 3*i + 1 +: 2] = cur[i].code[1:0];
        for (int k = 0; k < len_of(cur[i].code); k++) b[pos + k] = cur[i].d[k];
        pos += len_of(cur[i].code);
      end
      b[511 -: 5] = ch[4:0];
      return b;
    endfunction

    function void add(ent_t e);
      int u = len_of(e.code) / 8;
      if (cur.size() == REF_N || units + u > REF_WRE / 8) begin
        blocks.push_back(make_block());
        cur.delete();
        units = 0;
      end
      cur.push_back(e);
      units += u;
    endfunction

    function void flush();
      if (cur.size() != 0) begin
        blocks.push_back(make_block());
        cur.delete();
        units = 0;
      end
    endfunction
  endclass

  // reference compressor: floats in, blocks out
  class Encoder;
    bit [31:0] h[4];
    Packer     pk;
    int        code_hist[4];

    function new(int c);
      pk = new(c);
      foreach (h[i]) h[i] = '0;
      foreach (code_hist[i]) code_hist[i] = 0;
    endfunction

    function void push(bit [31:0] f);
      bit [31:0] F = btu_ref(f);
      bit [31:0] P = cubic_ref(h[0], h[1], h[2], h[3]);
      ent_t e;
      e.ex   = (P > F);
      e.d    = e.ex ? P - F : F - P;
      e.code = code_ref(lrb_ref({32'd0, e.d}, 32));
      code_hist[e.code]++;
      pk.add(e);
      h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = F;
    endfunction
  endclass

  // reference decompressor: blocks in, floats out
  class Decoder;
    bit [31:0] h[4];
    bit [31:0] out[$];

    function new();
      foreach (h[i]) h[i] = '0;
    endfunction

    function void take(bit [511:0] b);
      int pos = 0;
      for (int i = 0; i < REF_N; i++) begin
        int code = int'(b[REF_WRE + 3*i + 1 +: 2]);
        bit ex = b[REF_WRE + 3*i];
        bit [31:0] d = '0, P, F;
        if (code == 0) break;
        for (int k = 0; k < len_of(code); k++) d[k] = b[pos + k];
        pos += len_of(code);
        P = cubic_ref(h[0], h[1], h[2], h[3]);
        F = ex ? P - d : P + d;
        out.push_back(ibtu_ref(F));
        h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = F;
      end
    endfunction
  endclass

  // real -> IEEE754 single bits (truncating; values of normal magnitude only)
  function automatic bit [31:0] to_f32(real x);
    bit [63:0] b = $realtobits(x);
    bit [7:0]  e;
    if (x == 0.0) return {b[63], 31'd0};
    e = 8'(int'(b[62:52]) - 1023 + 127);
    return {b[63], e, b[51:29]};
  endfunction

  // smooth signal of channel c at step i, with rare jumps and repeats
  function automatic bit [31:0] sample(int c, int i);
    real x;
    if ((i * 7 + c * 13) % 97 == 5) return $urandom;            // jump
    if ((i + c) % 53 == 7 && i > 0) return sample(c, i - 1);    // repeat
    x = 1.0 + 0.25 * $sin(0.002 * i * (c + 1) + c) + 0.001 * c;
    if (c % 3 == 1) x = x + 0.0001 * real'($urandom % 1000) / 1000.0;  // noisy channel
    if (c % 5 == 4) x = -x;
    return to_f32(x);
  endfunction

endpackage
