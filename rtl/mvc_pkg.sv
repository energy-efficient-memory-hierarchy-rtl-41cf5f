// mvc_pkg: types, constants and coding functions shared by the reference-centered
// ME/DE memory hierarchy.
//
// Geometry: a macroblock (MB) is 16x16 8-bit pixels. The on-chip video memory is
// 16 banks of 128 bits, so one memory line (one address across all banks) holds a
// whole MB; bank k holds pixel row k of that MB. A search window (SW) is n x n MBs;
// candidate positions are pixel offsets 0..(n-1)*16 inside it, so n = 13 gives the
// 193 x 193 search area used as the main configuration.
//
// Coding functions (partial results compressor):
//  * vec_rank / sad_rank map a differential vector or a quantization level to a
//    symbol rank ordered by expected probability (values nearest the centre first).
//  * huff_len / huff_code give the prefix code of a rank. The published design uses
//    statistically trained Huffman tables whose contents are not available, so the
//    code used here is the exponential-Golomb code of order k, which is the Huffman
//    code of a geometric distribution; only the code lengths differ from a trained
//    table, the table sizes (54 vector values, 189 SAD levels, plus one escape
//    symbol each) are the published ones.
//  * sad_quant maps a SAD to one of 512 non-uniform levels: fine steps around the
//    expected mean, steps doubling every 32 levels towards the tails.
package mvc_pkg;

  localparam int unsigned MB_PIX   = 16;   // MB edge in pixels
  localparam int unsigned NBANK    = 16;   // parallel SRAM banks
  localparam int unsigned BANK_W   = 128;  // bits per bank line (16 pixels)
  localparam int unsigned BUS_W    = 128;  // external data bus width
  localparam int unsigned ADDR_W   = 32;   // external byte address width
  localparam int unsigned POS_W    = 8;    // candidate position inside the SW, pixels
  localparam int unsigned SAD_W    = 16;   // SAD of a 16x16 block
  localparam int unsigned VEC_W    = 8;    // vector component, two's complement

  localparam int unsigned VEC_TABLE  = 54;  // coded differential vector values
  localparam int unsigned VEC_ESC_W  = 8;   // raw vector after the escape symbol
  localparam int unsigned SAD_LEVELS = 512; // non-uniform quantizer levels
  localparam int unsigned SAD_TABLE  = 189; // coded quantizer levels
  localparam int unsigned SAD_ESC_W  = 14;  // raw SAD after the escape symbol
  localparam int unsigned SAD_STEP0  = 16;  // finest quantizer step
  localparam int unsigned SAD_MEAN   = 1024;// quantizer centre
  localparam int unsigned PR_BUF_W   = 512; // partial results local buffer
  localparam int unsigned CODE_W     = 24;  // longest code word held in one field

  // Exp-Golomb orders of the three code tables.
  localparam int unsigned K_VEC_ME = 0;
  localparam int unsigned K_VEC_DE = 1;
  localparam int unsigned K_SAD    = 2;

  // SRAM line power states (S0 off, S1 retention 0.3 Vdd, S2 retention 0.5 Vdd, S3 on).
  typedef enum logic [1:0] {
    PS_OFF  = 2'd0,
    PS_RET1 = 2'd1,
    PS_RET2 = 2'd2,
    PS_ON   = 2'd3
  } pstate_e;

  typedef struct packed {
    logic [POS_W-1:0] x;
    logic [POS_W-1:0] y;
  } pos_t;

  typedef logic [BANK_W-1:0] mb_row_t;           // one MB row, 16 pixels
  typedef mb_row_t [NBANK-1:0] mb_t;             // one MB, bank k = row k

  // One search result handed to the partial results compressor.
  typedef struct packed {
    logic [3:0]        slot;   // dependent frame index
    logic              is_de;  // disparity (1) or motion (0) search
    logic [7:0]        mb_x;   // MB position in the dependent frame
    logic [7:0]        mb_y;
    logic signed [VEC_W-1:0] vx;
    logic signed [VEC_W-1:0] vy;
    logic [SAD_W-1:0]  sad;
  } pr_rec_t;

  // External memory request (one 128-bit beat, byte address).
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [BUS_W-1:0]  wdata;
  } mem_req_t;

  // floor(log2(v)) for v >= 1
  function automatic int unsigned flog2(input int unsigned v);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 32; i++) if (v >= (32'd1 << i)) r = i;
    return r;
  endfunction

  // Code length of a rank in an order-k exp-Golomb code.
  function automatic int unsigned huff_len(input int unsigned rank, input int unsigned k);
    int unsigned v;
    v = rank + (32'd1 << k);
    return 2 * flog2(v) + 1 - k;
  endfunction

  // Code word (right aligned) of a rank: leading zeros are implicit in the length.
  function automatic logic [CODE_W-1:0] huff_code(input int unsigned rank, input int unsigned k);
    return CODE_W'(rank + (32'd1 << k));
  endfunction

  // Rank of a differential vector component: 0, +1, -1, +2, -2 ...
  function automatic int unsigned vec_rank(input int signed e);
    return (e > 0) ? int'(2 * e - 1) : int'(-2 * e);
  endfunction

  // Non-uniform quantizer: distance from the mean -> level offset (0..255).
  function automatic int unsigned sad_seg_idx(input int unsigned d);
    int unsigned u, s, idx;
    u = d / SAD_STEP0;
    s = flog2(u / 32 + 1);
    if (s > 7) return 255;
    idx = 32 * s + ((u - 32 * ((32'd1 << s) - 1)) >> s);
    return (idx > 255) ? 255 : idx;
  endfunction

  // SAD -> quantization level 0..511; levels >= 256 lie at or above the mean.
  function automatic int unsigned sad_quant(input int unsigned sad);
    if (sad >= SAD_MEAN) return 256 + sad_seg_idx(sad - SAD_MEAN);
    else                 return 255 - sad_seg_idx(SAD_MEAN - 1 - sad);
  endfunction

  // Rank of a quantization level: 256, 255, 257, 254 ...
  function automatic int unsigned sad_rank(input int unsigned q);
    return (q >= 256) ? 2 * (q - 256) : 2 * (255 - q) + 1;
  endfunction

endpackage
