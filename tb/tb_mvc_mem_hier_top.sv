// tb_mvc_mem_hier_top: end-to-end test of the reference-centered memory hierarchy
// with every parameter at its default (N_SW = 13, i.e. a 193x193 search area, 9
// dependent-frame slots).
//
// The testbench plays the parts outside the hierarchy:
//  * external memory: frames are computed from a pixel formula, reads answered in
//    order after a fixed latency with random back-pressure; partial-result writes are
//    recorded.
//  * processing elements: for every merged candidate they read the 1..4 video memory
//    lines the 16x16 block covers and the current MBs of the requesting slots, compute
//    the SADs and report the best position/SAD per slot at the end of each burst.
// Two reference frames are processed (first with offline statistics, then with the
// statistics gathered in the first), each 8 x 2 MBs, with three dependent frames: two
// temporal (GDV 0, content shifted by 1 and by 88 pixels) and one inter-view (GDV 1 MB,
// content shifted by 56 pixels). The offline statistics mark the centre row as rarely
// used, so it starts in retention and is woken by the search. The memory model accepts
// a request only every 12 cycles on average, so the new window column is still
// arriving while candidates next to it are due.
// Checks:
//  * every video memory line read holds exactly the reference pixels of its window
//    position (clamped at the frame border) unless reported lost by power gating,
//  * every current MB read holds the right dependent-frame pixels,
//  * the partial results written to external memory decode (independent decoder
//    below) to exactly the records expected from the PE results: one per called MB,
//    in step order, vector = best position - window centre, SAD level or raw SAD,
//  * each mechanism happened: full-window load and single-column steps with sector
//    rotation, merged repeated candidates, candidates held for the last column,
//    wake-ups of gated lines, full partial-result buffers written, escape codes,
//    encoder slots.
module tb_mvc_mem_hier_top;
  import mvc_pkg::*;

  localparam int N     = 13;
  localparam int MAXD  = 9;
  localparam int HALF  = (N - 1) / 2;
  localparam int C16   = HALF * 16;
  localparam int FW    = 8;
  localparam int FH    = 2;
  localparam int STRIDE = FW * 16;
  localparam int LAT   = 3;
  localparam logic [31:0] PR_BASE = 32'h0800_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- DUT ----------------------------------------------------------
  logic start, first_frame, busy, done;
  logic [MAXD-1:0] dep_en, dep_is_de;
  logic [31:0] dep_base [MAXD];
  logic signed [7:0] gdv_x [MAXD], gdv_y [MAXD];
  logic off_we, off_de;
  logic [$clog2(N*N)-1:0] off_idx;
  logic [15:0] off_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, enc_slot;
  mem_req_t mem_req;
  logic [127:0] mem_rsp_data;
  logic cand_valid, cand_ready, cand_last;
  pos_t cand_pos;
  logic [MAXD-1:0] cand_mask;
  logic vm_req, vm_gnt, vm_valid, vm_lost;
  logic [3:0] vm_col, vm_row;
  mb_t vm_data;
  logic cb_en, cb_valid;
  logic [3:0] cb_slot;
  mb_t cb_data;
  logic res_valid;
  pos_t res_pos [MAXD];
  logic [15:0] res_sad [MAXD];
  logic [31:0] st_steps, st_rounds, st_merged, st_hold, st_wake, st_prbuf, st_esc, st_stall, st_rec;

  mvc_mem_hier_top dut (
    .clk, .rst_n, .start, .first_frame, .frame_w_mb(8'(FW)), .frame_h_mb(8'(FH)),
    .stride(16'(STRIDE)), .ref_base(32'h0), .dep_en, .dep_is_de, .dep_base, .gdv_x, .gdv_y,
    .pr_region_base(PR_BASE), .pr_region_size(32'h0010_0000), .sw_used(4'(N)),
    .busy, .done, .off_we, .off_de, .off_idx, .off_data,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data, .enc_slot,
    .cand_valid, .cand_ready, .cand_pos, .cand_mask, .cand_last,
    .pe_vm_rd_req(vm_req), .pe_vm_rd_col(vm_col), .pe_vm_rd_row(vm_row),
    .pe_vm_rd_gnt(vm_gnt), .pe_vm_rd_valid(vm_valid), .pe_vm_rd_data(vm_data),
    .pe_vm_rd_lost(vm_lost),
    .pe_cb_rd_en(cb_en), .pe_cb_rd_slot(cb_slot), .pe_cb_rd_valid(cb_valid),
    .pe_cb_rd_data(cb_data),
    .pe_res_valid(res_valid), .pe_res_pos(res_pos), .pe_res_sad(res_sad),
    .stat_steps(st_steps), .stat_rounds(st_rounds), .stat_merged(st_merged),
    .stat_col_hold(st_hold), .stat_wakeups(st_wake), .stat_pr_buffers(st_prbuf),
    .stat_pr_escapes(st_esc), .stat_pr_stalls(st_stall), .stat_records(st_rec));

  // ---------------- frame content --------------------------------------------------
  // dependent frame d shows the reference moved by (sx[d], sy[d]) pixels
  int sx [MAXD], sy [MAXD];

  function automatic int clampi(input int v, input int lo, input int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic logic [7:0] ref_pix(input int x, input int y);
    int cx, cy;
    cx = clampi(x, 0, FW * 16 - 1);
    cy = clampi(y, 0, FH * 16 - 1);
    return 8'((cx * 3 + cy * 5 + ((cx * cy) % 23) + ((cx / 8) * (cy / 8) * 11)) & 255);
  endfunction
  function automatic logic [7:0] frame_pix(input int f, input int x, input int y);
    if (f == 0) return ref_pix(x, y);
    return ref_pix(x + sx[f-1], y + sy[f-1]);
  endfunction

  // ---------------- external memory model --------------------------------------------
  logic [127:0] rq_data [$];
  int           rq_due  [$];
  logic [127:0] pr_mem [int];
  int cyc = 0;
  int enc_cycles = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always_ff @(posedge clk) mem_req_ready <= ($urandom % 12) == 0;  // slow memory: column fetch overlaps the search

  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      if (mem_req.we) pr_mem[int'(mem_req.addr)] = mem_req.wdata;
      else begin
        int f, off, x, y;
        logic [127:0] d;
        f   = int'(mem_req.addr >> 20);
        off = int'(mem_req.addr & 32'hFFFFF);
        y   = off / STRIDE;
        x   = off % STRIDE;
        for (int i = 0; i < 16; i++) d[8*i +: 8] = frame_pix(f, x + i, y);
        rq_data.push_back(d);
        rq_due.push_back(cyc + LAT);
      end
    end
    if (enc_slot) enc_cycles++;
  end
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (rq_due.size() > 0 && rq_due[0] <= cyc) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_data  <= rq_data.pop_front();
      void'(rq_due.pop_front());
    end
  end

  // ---------------- processing element model ------------------------------------------
  typedef struct { int slot, mbx, mby, vx, vy, sad; } exp_t;
  exp_t exp_q [$];
  int lost_reads = 0, line_reads = 0;
  int best_sad_s [MAXD];
  int best_x_s [MAXD], best_y_s [MAXD];
  int exact_found = 0;
  bit have_cur [MAXD];

  // All PE-side signals are driven and sampled at the falling clock edge.
  task automatic read_line(input int c, input int r, output mb_t d, output bit lost);
    vm_req = 1'b1; vm_col = 4'(c); vm_row = 4'(r);
    #1;
    while (!vm_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    vm_req = 1'b0;
    d = vm_data; lost = vm_lost;
  endtask

  task automatic read_cur(input int s, output mb_t d);
    cb_en = 1'b1; cb_slot = 4'(s);
    @(negedge clk);
    cb_en = 1'b0;
    d = cb_data;
  endtask

  function automatic logic [7:0] px_of(input mb_t m, input int row, input int col);
    return m[row][8*col +: 8];
  endfunction

  initial begin : pe_model
    mb_t cur [MAXD];
    int  burst_best [MAXD];
    pos_t burst_pos [MAXD];
    int  X, Y;
    vm_req = 0; vm_col = 0; vm_row = 0; cb_en = 0; cb_slot = 0;
    cand_ready = 0; res_valid = 0;
    for (int s = 0; s < MAXD; s++) begin res_pos[s] = '0; res_sad[s] = '1; end
    for (int s = 0; s < MAXD; s++) burst_best[s] = 65535;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (cand_valid) begin
        pos_t p;
        logic [MAXD-1:0] m;
        bit last;
        mb_t blk [2][2];
        bit lostb;
        int c0, r0, nc, nr;
        p = cand_pos; m = cand_mask; last = cand_last;
        cand_ready = 1'b1;
        @(negedge clk);
        cand_ready = 1'b0;
        X = int'(dut.u_sc.X); Y = int'(dut.u_sc.Y);
        // fetch the lines covered by the candidate and check their content
        c0 = int'(p.x) / 16; r0 = int'(p.y) / 16;
        nc = (int'(p.x) % 16 != 0) ? 2 : 1;
        nr = (int'(p.y) % 16 != 0) ? 2 : 1;
        lostb = 0;
        for (int i = 0; i < nc; i++)
          for (int j = 0; j < nr; j++) begin
            mb_t d; bit l;
            read_line(c0 + i, r0 + j, d, l);
            blk[i][j] = d;
            line_reads++;
            if (l) begin lost_reads++; lostb = 1; end
            else begin
              bit ok;
              int mbx;
              ok = 1;
              mbx = clampi(X - HALF + c0 + i, 0, FW - 1);
              for (int rr = 0; rr < 16; rr++)
                for (int cc = 0; cc < 16; cc++)
                  if (px_of(d, rr, cc) !== ref_pix(mbx * 16 + cc, (Y - HALF + r0 + j) * 16 + rr))
                    ok = 0;
              check(ok, $sformatf("video memory line col %0d row %0d at step (%0d,%0d)",
                                  c0 + i, r0 + j, X, Y));
            end
          end
        for (int s = 0; s < MAXD; s++) if (m[s]) begin
          int sad;
          if (!have_cur[s]) begin
            bit ok;
            int mx, my;
            ok = 1;
            read_cur(s, cur[s]);
            have_cur[s] = 1;
            mx = X - int'(gdv_x[s]); my = Y - int'(gdv_y[s]);
            for (int rr = 0; rr < 16; rr++)
              for (int cc = 0; cc < 16; cc++)
                if (px_of(cur[s], rr, cc) !== frame_pix(s + 1, mx * 16 + cc, my * 16 + rr)) ok = 0;
            check(ok, $sformatf("current MB slot %0d at step (%0d,%0d)", s, X, Y));
          end
          sad = 0;
          for (int rr = 0; rr < 16; rr++)
            for (int cc = 0; cc < 16; cc++) begin
              int ax, ay, a, b;
              ax = int'(p.x) + cc; ay = int'(p.y) + rr;
              a = int'(px_of(blk[ax / 16 - c0][ay / 16 - r0], ay % 16, ax % 16));
              b = int'(px_of(cur[s], rr, cc));
              sad += (a > b) ? a - b : b - a;
            end
          if (sad < burst_best[s]) begin burst_best[s] = sad; burst_pos[s] = p; end
        end
        if (last) begin
          for (int s = 0; s < MAXD; s++) begin
            res_sad[s] = 16'(burst_best[s] > 65535 ? 65535 : burst_best[s]);
            res_pos[s] = burst_pos[s];
            if (burst_best[s] < best_sad_s[s]) begin
              best_sad_s[s] = burst_best[s];
              best_x_s[s] = int'(burst_pos[s].x); best_y_s[s] = int'(burst_pos[s].y);
            end
            burst_best[s] = 65535;
          end
          res_valid = 1'b1;
          @(negedge clk);
          res_valid = 1'b0;
        end
      end
    end
  end

  // step bookkeeping: at every new step close the records of the previous one
  int full_loads = 0, col_loads = 0, rotations = 0;
  bit act_prev [MAXD];
  int mbx_prev [MAXD], mby_prev [MAXD];
  bit step_open = 0;
  task automatic close_step();
    for (int s = 0; s < MAXD; s++) if (act_prev[s]) begin
      exp_t e;
      e.slot = s; e.mbx = mbx_prev[s]; e.mby = mby_prev[s];
      e.vx = best_x_s[s] - C16; e.vy = best_y_s[s] - C16; e.sad = best_sad_s[s];
      if (e.vx == sx[s] - 16 * int'(gdv_x[s]) && e.vy == sy[s] && e.sad == 0) exact_found++;
      exp_q.push_back(e);
    end
  endtask
  always @(posedge clk) begin
    if (rst_n && dut.u_sc.step_start && dut.u_sc.st == dut.u_sc.S_STEP2) begin
      if (dut.u_sc.sw_ncols == 4'(N)) full_loads++;
      if (dut.u_sc.sw_ncols == 4'(1)) col_loads++;
      for (int s = 0; s < MAXD; s++) begin
        act_prev[s] = dut.u_sc.cur_active[s];
        mbx_prev[s] = int'(dut.u_sc.cur_mb_x[s]);
        mby_prev[s] = int'(dut.u_sc.cur_mb_y[s]);
        best_sad_s[s] = 65535;
        best_x_s[s] = C16; best_y_s[s] = C16;
        have_cur[s] = 0;
      end
      step_open = 1;
    end
    if (rst_n && dut.u_sc.st == dut.u_sc.S_OUT && step_open) begin
      close_step();
      step_open = 0;
    end
    if (rst_n && dut.mem_step) rotations++;
  end

  // ---------------- independent partial-results decoder ------------------------------
  bit stream [$];
  int rd_ptr;
  function automatic int get_bits(input int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | int'(stream[rd_ptr]);
      rd_ptr++;
    end
    return v;
  endfunction
  function automatic int get_eg(input int k);
    int z = 0;
    while (rd_ptr < stream.size() && stream[rd_ptr] == 1'b0) begin z++; rd_ptr++; end
    if (z > 24) return -1;
    return get_bits(z + k + 1) - (1 << k);
  endfunction
  function automatic int sext8(input int v);
    return (v >= 128) ? v - 256 : v;
  endfunction
  // quantizer of the specification, written independently: level boundaries
  function automatic int q_level(input int sad);
    int d, step, lvl, lo;
    bit up;
    up = sad >= 1024;
    d  = up ? sad - 1024 : 1023 - sad;
    lvl = 0; lo = 0; step = 16;
    for (int s = 0; s < 8; s++) begin
      if (d < lo + 32 * step) begin
        lvl = 32 * s + (d - lo) / step;
        return up ? 256 + lvl : 255 - lvl;
      end
      lo += 32 * step; step *= 2;
    end
    return up ? 511 : 0;
  endfunction

  int dec_rows_x [MAXD][16];
  int dec_vx [MAXD][16], dec_vy [MAXD][16];
  bit dec_w [MAXD][16];
  int vec_esc = 0, sad_esc = 0;

  task automatic decode_and_compare(input int frame_no, input int nbuf, input int base_idx);
    // gather the stream of this frame
    stream.delete();
    for (int b = 0; b < nbuf; b++)
      for (int w = 0; w < 4; w++) begin
        logic [127:0] d;
        int a = int'(PR_BASE) + (base_idx + b) * 64 + w * 16;
        d = pr_mem.exists(a) ? pr_mem[a] : '0;
        check(pr_mem.exists(a), $sformatf("partial results word at %h written", a));
        for (int i = 127; i >= 0; i--) stream.push_back(d[i]);
      end
    rd_ptr = 0;
    for (int s = 0; s < MAXD; s++) for (int x = 0; x < 16; x++) dec_w[s][x] = 0;
    while (exp_q.size() > 0) begin
      exp_t e;
      int kv, px, py, r, vx, vy, q, sad_ok;
      bit lok, aok;
      e = exp_q.pop_front();
      if (rd_ptr >= stream.size()) begin
        check(0, "partial result stream too short"); break;
      end
      kv = (dep_is_de[e.slot]) ? 1 : 0;
      lok = e.mbx > 0 && dec_w[e.slot][e.mbx - 1] && dec_rows_x[e.slot][e.mbx - 1] == e.mby;
      aok = e.mby > 0 && dec_w[e.slot][e.mbx] && dec_rows_x[e.slot][e.mbx] == e.mby - 1;
      if (lok && aok) begin
        px = (dec_vx[e.slot][e.mbx - 1] + dec_vx[e.slot][e.mbx]) >>> 1;
        py = (dec_vy[e.slot][e.mbx - 1] + dec_vy[e.slot][e.mbx]) >>> 1;
      end else if (lok) begin
        px = dec_vx[e.slot][e.mbx - 1]; py = dec_vy[e.slot][e.mbx - 1];
      end else if (aok) begin
        px = dec_vx[e.slot][e.mbx]; py = dec_vy[e.slot][e.mbx];
      end else begin px = 0; py = 0; end
      r = get_eg(kv);
      if (r == 54) begin vx = sext8(get_bits(8)); vec_esc++; end
      else vx = px + ((r % 2 == 1) ? (r + 1) / 2 : -(r / 2));
      r = get_eg(kv);
      if (r == 54) begin vy = sext8(get_bits(8)); vec_esc++; end
      else vy = py + ((r % 2 == 1) ? (r + 1) / 2 : -(r / 2));
      r = get_eg(2);
      if (r == 189) begin
        sad_esc++;
        sad_ok = (get_bits(14) == ((e.sad > 16383) ? 16383 : e.sad));
      end else begin
        q = (r % 2 == 0) ? 256 + r / 2 : 255 - (r - 1) / 2;
        sad_ok = (q == q_level(e.sad));
      end
      check(vx == e.vx && vy == e.vy,
            $sformatf("frame %0d slot %0d MB(%0d,%0d) vector %0d,%0d expected %0d,%0d",
                      frame_no, e.slot, e.mbx, e.mby, vx, vy, e.vx, e.vy));
      check(sad_ok != 0, $sformatf("frame %0d slot %0d MB(%0d,%0d) SAD %0d", frame_no,
                                   e.slot, e.mbx, e.mby, e.sad));
      dec_w[e.slot][e.mbx] = 1; dec_rows_x[e.slot][e.mbx] = e.mby;
      dec_vx[e.slot][e.mbx] = vx; dec_vy[e.slot][e.mbx] = vy;
    end
  endtask

  // ---------------- watchdog ---------------------------------------------------------------
  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog sc=%0d sched=%0d X=%0d Y=%0d", dut.u_sc.st, dut.u_sched.st, dut.u_sc.X, dut.u_sc.Y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus -------------------------------------------------------------------
  initial begin
    start = 0; first_frame = 1; off_we = 0; off_de = 0; off_idx = 0; off_data = 0;
    dep_en = '0; dep_is_de = '0;
    for (int s = 0; s < MAXD; s++) begin
      dep_base[s] = 32'((s + 1) << 20); gdv_x[s] = 0; gdv_y[s] = 0; sx[s] = 0; sy[s] = 0;
    end
    // slot 0, 1: temporal references (motion), slot 2: inter-view (disparity)
    dep_en = 9'b000000111;
    dep_is_de = 9'b000000100;
    sx[0] = 1;  sy[0] = 0;
    sx[1] = 88; sy[1] = 0;
    sx[2] = 56; sy[2] = 0; gdv_x[2] = 1;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // offline statistics that mislead on purpose: the centre row looks rarely used,
    // so it is put in retention and must be woken up by the search
    for (int i = 0; i < N * N; i++) begin
      int c, r, d;
      c = i % N; r = i / N;
      d = ((c > HALF) ? c - HALF : HALF - c) + ((r > HALF) ? r - HALF : HALF - r);
      for (int t = 0; t < 2; t++) begin
        off_we <= 1; off_de <= t[0]; off_idx <= 8'(i);
        off_data <= 16'(r == HALF ? 10 : 100);
        @(posedge clk);
      end
    end
    off_we <= 0;
    for (int fr = 0; fr < 2; fr++) begin
      first_frame <= (fr == 0);
      start <= 1;
      @(posedge clk);
      start <= 0;
      wait (done);
      @(posedge clk);
      if (step_open) begin close_step(); step_open = 0; end
      check(int'(st_steps) == FW * FH, $sformatf("frame %0d: %0d steps", fr, st_steps));
      check(exp_q.size() == int'(st_rec), $sformatf("one record per called MB: %0d vs %0d", exp_q.size(), st_rec));
      decode_and_compare(fr, int'(st_prbuf), 0);
      $display("frame %0d: steps=%0d rounds=%0d merged=%0d held=%0d wake=%0d prbuf=%0d esc=%0d lost=%0d reads=%0d exact=%0d",
               fr, st_steps, st_rounds, st_merged, st_hold, st_wake, st_prbuf, st_esc,
               lost_reads, line_reads, exact_found);
    end
    // mechanisms
    check(full_loads >= 2, $sformatf("full-window loads at line starts: %0d", full_loads));
    check(col_loads >= 2, $sformatf("single-column steps: %0d", col_loads));
    check(rotations == col_loads, "one sector rotation per column step");
    check(st_merged > 0, "repeated candidates merged");
    check(st_hold > 0, "candidates held for the rightmost column");
    check(st_wake > 0, "gated lines woken up");
    check(st_prbuf > 0, "partial result buffers written");
    check(vec_esc + sad_esc > 0, "escape codes used");
    check(enc_cycles > 0, "encoder slots given");
    check(exact_found > 0, "true displacement found at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
