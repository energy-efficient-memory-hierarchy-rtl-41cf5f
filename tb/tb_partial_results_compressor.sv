// tb_partial_results_compressor: self-checking test of the partial results compressor.
//
// Random search results (three dependent frames, one of them disparity, MBs in raster
// order) are fed with random gaps; vectors are mostly small with some large ones that
// need the escape, SADs cover the whole range including very large ones. Full
// buffers are taken with random delays so the input stall path is exercised; a final
// flush hands out the tail. The collected bit stream (first bit = bit 511 of the
// first buffer) is decoded by an independent decoder written from the code
// definition: exp-Golomb codes of the symbol ranks (ME vectors order 0, DE vectors
// order 1, SAD order 2), rank 54 / 189 as escapes, neighbour-mean vector prediction
// and a quantizer with 32-level segments whose step doubles away from the mean.
// Every decoded vector must equal the input, every SAD level the quantized input.
module tb_partial_results_compressor;
  import mvc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start = 0, rec_valid = 0, rec_ready, flush = 0, flush_done, buf_valid, buf_ack = 0;
  pr_rec_t rec = '0;
  logic [PR_BUF_W-1:0] buf_data;
  logic [31:0] records, escapes, stall_cycles;

  partial_results_compressor dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // buffer taker with random delay
  bit stream [$];
  int nbuf = 0;
  always @(negedge clk) begin
    buf_ack = 0;
    if (buf_valid && ($urandom % 40) == 0) begin
      buf_ack = 1;
      for (int i = PR_BUF_W - 1; i >= 0; i--) stream.push_back(buf_data[i]);
      nbuf++;
    end
  end

  typedef struct { int slot, is_de, mbx, mby, vx, vy, sad; } r_t;
  r_t sent [$];

  int rd_ptr;
  function automatic int get_bits(input int n);
    int v;
    v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | (rd_ptr < stream.size() ? int'(stream[rd_ptr]) : 0);
      rd_ptr++;
    end
    return v;
  endfunction
  function automatic int get_eg(input int k);
    int z;
    z = 0;
    while (rd_ptr < stream.size() && stream[rd_ptr] == 1'b0 && z < 30) begin z++; rd_ptr++; end
    return get_bits(z + k + 1) - (1 << k);
  endfunction
  function automatic int sext8(input int v);
    return (v >= 128) ? v - 256 : v;
  endfunction
  function automatic int q_level(input int sad);
    int d, step, lo;
    bit up;
    up = sad >= 1024;
    d  = up ? sad - 1024 : 1023 - sad;
    lo = 0; step = 16;
    for (int s = 0; s < 8; s++) begin
      if (d < lo + 32 * step) return up ? 256 + 32 * s + (d - lo) / step : 255 - 32 * s - (d - lo) / step;
      lo += 32 * step; step *= 2;
    end
    return up ? 511 : 0;
  endfunction

  localparam int FWD = 11, FHD = 5, ND = 3;

  initial begin
    int n_esc;
    n_esc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int y = 0; y < FHD; y++)
      for (int x = 0; x < FWD; x++)
        for (int s = 0; s < ND; s++) begin
          r_t r;
          r.slot = s; r.is_de = (s == 2); r.mbx = x; r.mby = y;
          r.vx = ($urandom % 8 == 0) ? int'($urandom % 193) - 96 : int'($urandom % 9) - 4;
          r.vy = ($urandom % 8 == 0) ? int'($urandom % 193) - 96 : int'($urandom % 5) - 2;
          case ($urandom % 4)
            0: r.sad = $urandom % 65536;
            1: r.sad = $urandom % 4096;
            default: r.sad = 700 + $urandom % 700;
          endcase
          sent.push_back(r);
          @(negedge clk);
          rec_valid = 1;
          rec = '{slot: 4'(s), is_de: r.is_de[0], mb_x: 8'(x), mb_y: 8'(y),
                  vx: 8'(r.vx), vy: 8'(r.vy), sad: 16'(r.sad)};
          @(posedge clk);
          while (!rec_ready) @(posedge clk);
          #1 rec_valid = 0;
          if ($urandom % 4 == 0) @(negedge clk);
        end
    @(negedge clk); flush = 1;
    while (!flush_done) @(negedge clk);
    flush = 0;
    while (buf_valid) @(negedge clk);
    check(records == 32'(FWD * FHD * ND), "record counter");
    check(stall_cycles > 0, "input stalled while a full buffer waited");
    // decode
    begin
      int dec_row [ND][FWD], dvx [ND][FWD], dvy [ND][FWD];
      bit dw [ND][FWD];
      rd_ptr = 0;
      foreach (dw[s, x]) dw[s][x] = 0;
      foreach (sent[i]) begin
        r_t e;
        int k, px, py, rk, vx, vy;
        bit lok, aok, sok, vesc;
        vesc = 0;
        e = sent[i];
        k = e.is_de;
        lok = e.mbx > 0 && dw[e.slot][e.mbx - 1] && dec_row[e.slot][e.mbx - 1] == e.mby;
        aok = e.mby > 0 && dw[e.slot][e.mbx] && dec_row[e.slot][e.mbx] == e.mby - 1;
        if (lok && aok) begin
          px = (dvx[e.slot][e.mbx - 1] + dvx[e.slot][e.mbx]) >>> 1;
          py = (dvy[e.slot][e.mbx - 1] + dvy[e.slot][e.mbx]) >>> 1;
        end else if (lok) begin px = dvx[e.slot][e.mbx - 1]; py = dvy[e.slot][e.mbx - 1]; end
        else if (aok) begin px = dvx[e.slot][e.mbx]; py = dvy[e.slot][e.mbx]; end
        else begin px = 0; py = 0; end
        rk = get_eg(k);
        if (rk == 54) begin vx = sext8(get_bits(8)); vesc = 1; end
        else vx = px + ((rk % 2 == 1) ? (rk + 1) / 2 : -(rk / 2));
        rk = get_eg(k);
        if (rk == 54) begin vy = sext8(get_bits(8)); vesc = 1; end
        else vy = py + ((rk % 2 == 1) ? (rk + 1) / 2 : -(rk / 2));
        n_esc += vesc;
        rk = get_eg(2);
        if (rk == 189) begin sok = get_bits(14) == (e.sad > 16383 ? 16383 : e.sad); n_esc++; end
        else sok = ((rk % 2 == 0) ? 256 + rk / 2 : 255 - (rk - 1) / 2) == q_level(e.sad);
        check(vx == e.vx && vy == e.vy, $sformatf("record %0d vector %0d,%0d expected %0d,%0d", i, vx, vy, e.vx, e.vy));
        check(sok, $sformatf("record %0d SAD %0d", i, e.sad));
        dw[e.slot][e.mbx] = 1; dec_row[e.slot][e.mbx] = e.mby;
        dvx[e.slot][e.mbx] = vx; dvy[e.slot][e.mbx] = vy;
      end
      check(escapes == 32'(n_esc), $sformatf("escape counter (records with a vector escape + SAD escapes) %0d, decoded %0d", escapes, n_esc));
      check(n_esc > 0, "escapes exercised");
      check(rd_ptr <= stream.size() && stream.size() - rd_ptr < PR_BUF_W, "stream length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
