// tb_search_control: self-checking test of the reference-centered search control.
//
// The schedule, power gating, merger and processing elements are replaced by small
// models: the schedule reports the current MBs and the window loaded a few cycles
// after step_start, the processing-element model collects a candidate burst and
// returns, per MB, the best candidate under a convex cost |x-tx|+|y-ty|+5 whose
// target differs per MB. The testbench checks the step sequence (raster order of
// window positions, called MBs X-gdv_x / Y-gdv_y inside the frame, full window at a
// line start and one column otherwise), that every candidate is a point of the
// expanding diamond around the MB's current centre inside the window (the centre
// only in the first round), that a round ends with the burst flush, that each
// partial result carries the smallest cost seen for that MB, that the convex cost
// leads the search to the target, and the frame end handshake (compressor flush,
// statistics store, done).
module tb_search_control;
  import mvc_pkg::*;
  localparam int N = 13, MAXD = 9, HALF = 6, C16 = 96, PMAX = 192;
  localparam int FW = 5, FH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, step_start, cur_loaded = 0, sw_loaded = 0, sched_idle = 1;
  logic [7:0] frame_w_mb = 8'(FW), frame_h_mb = 8'(FH);
  logic [MAXD-1:0] dep_en = 9'b0_0000_0111, dep_is_de = 9'b0_0000_0100;
  logic signed [7:0] gdv_x [MAXD], gdv_y [MAXD];
  logic [MAXD-1:0] cur_active;
  logic [7:0] cur_mb_x [MAXD], cur_mb_y [MAXD];
  logic signed [9:0] sw_col_x, sw_top_y;
  logic [$clog2(N+1)-1:0] sw_ncols;
  logic [$clog2(N)-1:0] sw_dst_col;
  logic mem_step, pg_frame_start, pg_apply, pg_frame_end, pg_map_ready = 0;
  logic cand_valid, cand_ready = 0, cand_flush;
  pos_t cand_pos;
  logic [$clog2(MAXD)-1:0] cand_slot;
  logic pe_res_valid = 0;
  pos_t pe_res_pos [MAXD];
  logic [SAD_W-1:0] pe_res_sad [MAXD];
  logic rec_valid, rec_ready = 0;
  pr_rec_t rec;
  logic pr_frame_start, pr_flush, pr_flush_done = 0, pr_pending = 0;
  logic [31:0] steps, rounds;

  search_control #(.N_SW(N), .MAX_D(MAXD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int absi(input int v); return v < 0 ? -v : v; endfunction
  // target of the MB searched by slot s at window position (X, Y)
  int X = 0, Y = 0;
  function automatic int tx(input int s); return C16 + ((X * 37 + s * 53 + Y * 11) % 121) - 60; endfunction
  function automatic int ty(input int s); return C16 + ((Y * 29 + s * 17 + X * 7) % 61) - 30; endfunction
  function automatic int cost(input int s, input int x, input int y);
    return absi(x - tx(s)) + absi(y - ty(s)) + 5;
  endfunction
  function automatic bit is_diamond(input int dx, input int dy, input bit first);
    if (dx == 0 && dy == 0) return first;
    if (absi(dx) + absi(dy) == 1) return 1;
    for (int d = 2; d <= C16; d *= 2)
      if ((absi(dx) == d && dy == 0) || (dx == 0 && absi(dy) == d) ||
          (absi(dx) == d / 2 && absi(dy) == d / 2)) return 1;
    return 0;
  endfunction

  // schedule and power gating models
  always @(posedge clk) begin
    if (pg_frame_start) fork begin pg_map_ready <= 0; repeat (20) @(posedge clk); pg_map_ready <= 1; end join_none
    if (step_start) fork begin
      sched_idle <= 0; cur_loaded <= 0; sw_loaded <= 0;
      repeat (5 + $urandom % 10) @(posedge clk); cur_loaded <= 1;
      repeat (5 + $urandom % 30) @(posedge clk); sw_loaded <= 1; sched_idle <= 1;
    end join_none
    if (pr_flush && !pr_flush_done) pr_flush_done <= 1; else pr_flush_done <= 0;
  end
  always_ff @(posedge clk) begin cand_ready <= ($urandom % 4) != 0; rec_ready <= ($urandom % 2) != 0; end

  // PE model and candidate checks
  int ctr_x [MAXD], ctr_y [MAXD], best_c [MAXD], round_no;
  bit burst_seen [MAXD];
  int bx [MAXD], by [MAXD], bc [MAXD];
  int n_cand = 0, n_exact = 0, n_rec = 0, n_steps = 0, full_loads = 0;
  always @(posedge clk) if (rst_n) begin
    if (cand_valid && cand_ready) begin
      int s, x, y, c;
      s = int'(cand_slot); x = int'(cand_pos.x); y = int'(cand_pos.y);
      n_cand++;
      check(cur_active[s], "candidate only for a called MB");
      check(x >= 0 && y >= 0 && x <= PMAX && y <= PMAX, "candidate inside the window");
      check(is_diamond(x - ctr_x[s], y - ctr_y[s], round_no == 0),
            $sformatf("slot %0d candidate (%0d,%0d) is a diamond point around (%0d,%0d)", s, x, y, ctr_x[s], ctr_y[s]));
      c = cost(s, x, y);
      if (!burst_seen[s] || c < bc[s]) begin bc[s] = c; bx[s] = x; by[s] = y; burst_seen[s] = 1; end
    end
    if (cand_flush) fork begin
      repeat (3) @(posedge clk);
      #1;
      for (int s = 0; s < MAXD; s++) begin
        pe_res_pos[s] = '{x: 8'(bx[s]), y: 8'(by[s])};
        pe_res_sad[s] = burst_seen[s] ? 16'(bc[s]) : 16'hffff;
        // mirror of the centre update: move to a strictly better position
        if (burst_seen[s] && bc[s] < best_c[s]) begin best_c[s] = bc[s]; ctr_x[s] = bx[s]; ctr_y[s] = by[s]; end
        burst_seen[s] = 0;
      end
      pe_res_valid = 1;
      @(posedge clk); #1 pe_res_valid = 0;
      round_no++;
    end join_none
  end

  // step bookkeeping
  always @(posedge clk) if (rst_n && step_start && dut.st == dut.S_STEP2) begin
    n_steps++;
    check(int'(dut.X) == X && int'(dut.Y) == Y, $sformatf("step at (%0d,%0d), expected (%0d,%0d)", dut.X, dut.Y, X, Y));
    for (int s = 0; s < MAXD; s++) begin
      int mx, my;
      mx = X - int'(gdv_x[s]); my = Y - int'(gdv_y[s]);
      check(cur_active[s] == (dep_en[s] && mx >= 0 && my >= 0 && mx < FW && my < FH),
            $sformatf("slot %0d called at (%0d,%0d)", s, X, Y));
      if (cur_active[s]) check(int'(cur_mb_x[s]) == mx && int'(cur_mb_y[s]) == my, "called MB position");
      ctr_x[s] = C16; ctr_y[s] = C16; best_c[s] = 65535; burst_seen[s] = 0;
    end
    round_no = 0;
    if (X == 0) begin
      full_loads++;
      check(int'(sw_ncols) == N && int'(sw_col_x) == -HALF && int'(sw_dst_col) == 0, "full window at a line start");
    end else
      check(int'(sw_ncols) == 1 && int'(sw_col_x) == X + HALF && int'(sw_dst_col) == N - 1, "one new column per step");
    check(int'(sw_top_y) == Y - HALF, "window top row");
  end

  always @(posedge clk) if (rst_n && rec_valid && rec_ready) begin
    int s;
    s = int'(rec.slot);
    n_rec++;
    check(int'(rec.sad) == best_c[s], $sformatf("slot %0d result SAD %0d, smallest seen %0d", s, rec.sad, best_c[s]));
    check(cost(s, C16 + int'($signed(rec.vx)), C16 + int'($signed(rec.vy))) == int'(rec.sad), "result vector matches its SAD");
    check(rec.is_de == dep_is_de[s] && rec.mb_x == cur_mb_x[s] && rec.mb_y == cur_mb_y[s], "result header");
    if (rec.sad == 5) n_exact++;
  end
  always @(posedge clk) if (rst_n && dut.st == dut.S_NEXT && sched_idle) begin
    if (X + 1 == FW) begin X = 0; Y = Y + 1; end else X = X + 1;
  end

  initial begin
    int exp_rec;
    for (int s = 0; s < MAXD; s++) begin gdv_x[s] = 0; gdv_y[s] = 0; pe_res_pos[s] = '0; pe_res_sad[s] = '0; end
    gdv_x[2] = 8'sd2; gdv_y[1] = -8'sd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done && !pg_frame_end) @(posedge clk);
    check(pg_frame_end, "statistics stored at the end of the frame");
    while (!done) @(posedge clk);
    exp_rec = 0;
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++) for (int s = 0; s < MAXD; s++)
      if (dep_en[s] && x - int'(gdv_x[s]) >= 0 && x - int'(gdv_x[s]) < FW && y - int'(gdv_y[s]) >= 0 && y - int'(gdv_y[s]) < FH) exp_rec++;
    check(n_steps == FW * FH && steps == 32'(FW * FH), $sformatf("%0d steps", n_steps));
    check(full_loads == FH, "one full window load per line");
    check(n_rec == exp_rec, $sformatf("%0d results, expected %0d", n_rec, exp_rec));
    check(n_exact * 10 >= n_rec * 9, $sformatf("convex cost: %0d of %0d searches reach the target", n_exact, n_rec));
    check(rounds > 32'(FW * FH), "several search rounds per step");
    $display("steps=%0d rounds=%0d candidates=%0d results=%0d exact=%0d", n_steps, rounds, n_cand, n_rec, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
