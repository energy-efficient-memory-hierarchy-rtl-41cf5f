// partial_results_compressor: statistics-based compression of ME/DE partial results.
//
// Reference-centered processing finishes the search of an MB against one reference
// long before the MB's mode decision, so every (vector, SAD) result must be parked in
// external memory. Each result record is compressed as follows:
//  * Vectors: each component is predicted from the already coded neighbours of the
//    same dependent frame, the median of the left and above MB vectors (the median of
//    two values is their mean, rounded down; with one neighbour that one is used, with
//    none the prediction is 0). The difference is Huffman coded with a 54-value table
//    plus an escape symbol; outside the table the escape is followed by the vector
//    component itself in 8-bit two's complement. ME and DE use separate tables.
//  * SAD: quantized to one of 512 non-uniform levels (fine near the mean, coarse in
//    the tails), then Huffman coded with a 189-level table plus an escape symbol; an
//    escape is followed by the SAD itself in 14 bits (saturated).
// Codes: see mvc_pkg (table contents are exp-Golomb codes of the symbol ranks).
// A record is coded as  code(dx) [raw vx]  code(dy) [raw vy]  code(q) [raw sad],
// most significant bit first, and appended to a 512-bit local buffer whose first
// stream bit is bit 511. When the buffer fills, it is handed out on buf_valid/buf_data
// (held until buf_ack) and filling continues in the cleared buffer; the tail of a record
// that did not fit continues there. Input stalls (rec_ready low) while a full buffer
// is still waiting and the local buffer could overflow. `flush` hands out a partially
// filled buffer padded with zeros (end of frame).
//
// The predictor remembers, per dependent frame slot and MB column, the last vector and
// the MB row it belongs to, so neighbours are found without any clearing between
// frames (frame_start invalidates everything). Throughput: one record per cycle.
module partial_results_compressor
  import mvc_pkg::*;
#(
  parameter int unsigned MAX_D = 9,
  parameter int unsigned W_MAX = 120     // MBs per frame line (1920 pixels)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_start,
  input  logic                  rec_valid,
  output logic                  rec_ready,
  input  pr_rec_t               rec,
  input  logic                  flush,
  output logic                  flush_done,
  output logic                  buf_valid,
  output logic [PR_BUF_W-1:0]   buf_data,
  input  logic                  buf_ack,
  output logic [31:0]           records,
  output logic [31:0]           escapes,
  output logic [31:0]           stall_cycles
);
  localparam int unsigned REC_MAX = 2 * (CODE_W + VEC_ESC_W) + CODE_W + SAD_ESC_W;  // 102
  localparam int unsigned FW      = $clog2(PR_BUF_W);
  localparam int unsigned WIDE    = PR_BUF_W + REC_MAX;

  typedef struct packed {
    logic                    written;
    logic [7:0]              row;
    logic signed [VEC_W-1:0] vx;
    logic signed [VEC_W-1:0] vy;
  } pred_ent_t;

  pred_ent_t                 line_q [MAX_D][W_MAX];
  logic [PR_BUF_W-1:0]       acc_q;
  logic [FW-1:0]             fill_q;

  // ---- prediction ----------------------------------------------------------
  function automatic logic signed [VEC_W-1:0] pick(input logic l_ok, input logic a_ok,
      input logic signed [VEC_W-1:0] l, input logic signed [VEC_W-1:0] a);
    logic signed [VEC_W:0] s;
    s = {l[VEC_W-1], l} + {a[VEC_W-1], a};
    if (l_ok && a_ok) return VEC_W'(s >>> 1);
    if (l_ok)         return l;
    if (a_ok)         return a;
    return '0;
  endfunction

  // ---- one coded field -------------------------------------------------------
  // appends (code, len) to (v, n)
  function automatic void put(inout logic [REC_MAX-1:0] v, inout int unsigned n,
                              input logic [CODE_W-1:0] code, input int unsigned len);
    v = (v << len) | (REC_MAX'(code) & ((REC_MAX'(1) << len) - 1));
    n = n + len;
  endfunction

  logic [REC_MAX-1:0] rec_bits;
  int unsigned        rec_len;
  logic [1:0]         rec_esc;
  always_comb begin
    pred_ent_t le, ae;
    logic l_ok, a_ok;
    logic signed [VEC_W-1:0] px, py;
    int signed ex, ey;
    int unsigned rk, kv, q;
    int unsigned x, s;
    s  = int'(rec.slot) < MAX_D ? int'(rec.slot) : 0;
    x  = int'(rec.mb_x) < W_MAX ? int'(rec.mb_x) : W_MAX - 1;
    le = line_q[s][(x > 0) ? x - 1 : 0];
    ae = line_q[s][x];
    l_ok = (x > 0) && le.written && (le.row == rec.mb_y);
    a_ok = (rec.mb_y != 0) && ae.written && (ae.row == rec.mb_y - 8'd1);
    px = pick(l_ok, a_ok, le.vx, ae.vx);
    py = pick(l_ok, a_ok, le.vy, ae.vy);
    ex = int'(rec.vx) - int'(px);
    ey = int'(rec.vy) - int'(py);
    kv = rec.is_de ? K_VEC_DE : K_VEC_ME;
    rec_bits = '0;
    rec_len  = 0;
    rec_esc  = '0;
    // x component
    rk = vec_rank(ex);
    if (rk < VEC_TABLE) put(rec_bits, rec_len, huff_code(rk, kv), huff_len(rk, kv));
    else begin
      put(rec_bits, rec_len, huff_code(VEC_TABLE, kv), huff_len(VEC_TABLE, kv));
      put(rec_bits, rec_len, CODE_W'(rec.vx[VEC_W-1:0]), VEC_ESC_W);
      rec_esc[0] = 1'b1;
    end
    // y component
    rk = vec_rank(ey);
    if (rk < VEC_TABLE) put(rec_bits, rec_len, huff_code(rk, kv), huff_len(rk, kv));
    else begin
      put(rec_bits, rec_len, huff_code(VEC_TABLE, kv), huff_len(VEC_TABLE, kv));
      put(rec_bits, rec_len, CODE_W'(rec.vy[VEC_W-1:0]), VEC_ESC_W);
      rec_esc[0] = 1'b1;
    end
    // SAD
    q  = sad_quant(int'(rec.sad));
    rk = sad_rank(q);
    if (rk < SAD_TABLE) put(rec_bits, rec_len, huff_code(rk, K_SAD), huff_len(rk, K_SAD));
    else begin
      put(rec_bits, rec_len, huff_code(SAD_TABLE, K_SAD), huff_len(SAD_TABLE, K_SAD));
      put(rec_bits, rec_len,
          CODE_W'((rec.sad > SAD_W'(16383)) ? 14'h3fff : rec.sad[SAD_ESC_W-1:0]), SAD_ESC_W);
      rec_esc[1] = 1'b1;
    end
  end

  // ---- packing -------------------------------------------------------------------
  logic [WIDE-1:0] wide;
  always_comb begin
    wide = {acc_q, {REC_MAX{1'b0}}}
         | (WIDE'(rec_bits) << (WIDE - int'(fill_q) - rec_len));
  end

  assign rec_ready = !buf_valid || (int'(fill_q) < PR_BUF_W - REC_MAX);
  logic accept;
  assign accept = rec_valid && rec_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0; fill_q <= '0;
      buf_valid <= 1'b0; buf_data <= '0; flush_done <= 1'b0;
      records <= '0; escapes <= '0; stall_cycles <= '0;
    end else begin
      flush_done <= 1'b0;
      if (buf_valid && buf_ack) buf_valid <= 1'b0;
      if (rec_valid && !rec_ready) stall_cycles <= stall_cycles + 1;
      if (frame_start) begin
        records <= '0;
        escapes <= '0;
      end
      if (accept) begin
        records <= records + 1;
        escapes <= escapes + 32'(rec_esc[0]) + 32'(rec_esc[1]);
        if (int'(fill_q) + rec_len >= PR_BUF_W) begin
          buf_valid <= 1'b1;
          buf_data  <= wide[WIDE-1 -: PR_BUF_W];
          acc_q     <= {wide[REC_MAX-1:0], {(PR_BUF_W-REC_MAX){1'b0}}};
          fill_q    <= FW'(int'(fill_q) + rec_len - PR_BUF_W);
        end else begin
          acc_q     <= wide[WIDE-1 -: PR_BUF_W];
          fill_q    <= FW'(int'(fill_q) + rec_len);
        end
      end else if (flush && (!buf_valid || buf_ack)) begin
        if (fill_q != '0) begin
          buf_valid <= 1'b1;
          buf_data  <= acc_q;
          acc_q     <= '0;
          fill_q    <= '0;
        end
        flush_done <= 1'b1;
      end
    end
  end

  // predictor line memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MAX_D; s++)
        for (int x = 0; x < W_MAX; x++) line_q[s][x] <= '0;
    end else if (frame_start) begin
      for (int s = 0; s < MAX_D; s++)
        for (int x = 0; x < W_MAX; x++) line_q[s][x].written <= 1'b0;
    end else if (accept && int'(rec.slot) < MAX_D && int'(rec.mb_x) < W_MAX) begin
      line_q[rec.slot][($clog2(W_MAX))'(rec.mb_x)] <= '{written: 1'b1, row: rec.mb_y, vx: rec.vx, vy: rec.vy};
    end
  end

  // a full buffer must not be overwritten before it is taken
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (accept && buf_valid && !buf_ack) |-> (int'(fill_q) + rec_len < PR_BUF_W));

endmodule
