// search_control: reference-centered ME/DE search control with candidate generation.
//
// The reference frame is the centre of processing. The search window (N_SW x N_SW
// MBs) slides over the reference frame in raster order, one MB per search step. At
// every step the window "calls" the MBs of all dependent frames that search in it:
// for dependent frame d that is MB (X - gdv_x[d], Y - gdv_y[d]), where (X, Y) is the
// window centre and gdv is the frame's global disparity vector in MBs (0 for
// temporal references). MBs that fall outside their frame are not called.
//
// Per step:
//  1. Rotate the on-chip memory sectors (not at a line start), let the power gating
//     re-apply its map, and start the external schedule: current MBs of all called
//     frames, then the new window column (the whole window at a line start).
//  2. Once the current MBs are loaded (at a line start: once the whole window is
//     loaded), run a TZ-style search for all called MBs in
//     lock step. Each round every unfinished MB asks for an expanding diamond around
//     its current centre (distances 1, 2, 4, ... up to the window half size; the
//     first round also asks for the centre itself). All requests of a round go to the
//     candidates merger as one burst; the processing elements return the best
//     position and SAD per MB. An MB moves its centre to a better result and does
//     another round, and is finished when a round brings no improvement or after
//     MAX_ROUNDS rounds. (This is a simplified TZ search: the raster and
//     predictor stages of the full algorithm are left out.)
//  3. Send one partial result (vector relative to the window centre, SAD) per called
//     MB to the compressor, then wait for the schedule of the step to end.
// At the end of the frame the compressor is flushed, remaining full buffers are
// written through extra schedule slots, and the power gating stores its statistics.
//
// Candidate positions are the top-left pixel of the candidate block inside the
// window, 0..(N_SW-1)*16; the window centre is ((N_SW-1)/2)*16 in both axes.
module search_control
  import mvc_pkg::*;
#(
  parameter int unsigned N_SW       = 13,
  parameter int unsigned MAX_D      = 9,
  parameter int unsigned MAX_ROUNDS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration (stable while busy)
  input  logic                     start,
  input  logic [7:0]               frame_w_mb,
  input  logic [7:0]               frame_h_mb,
  input  logic [MAX_D-1:0]         dep_en,
  input  logic signed [7:0]        gdv_x [MAX_D],
  input  logic signed [7:0]        gdv_y [MAX_D],
  input  logic [MAX_D-1:0]         dep_is_de,
  output logic                     busy,
  output logic                     done,
  // schedule / AGU jobs
  output logic                     step_start,
  input  logic                     cur_loaded,
  input  logic                     sw_loaded,
  input  logic                     sched_idle,
  output logic [MAX_D-1:0]         cur_active,
  output logic [7:0]               cur_mb_x [MAX_D],
  output logic [7:0]               cur_mb_y [MAX_D],
  output logic signed [9:0]        sw_col_x,
  output logic signed [9:0]        sw_top_y,
  output logic [$clog2(N_SW+1)-1:0] sw_ncols,
  output logic [$clog2(N_SW)-1:0]  sw_dst_col,
  // memory and power gating
  output logic                     mem_step,
  output logic                     pg_frame_start,
  output logic                     pg_apply,
  output logic                     pg_frame_end,
  input  logic                     pg_map_ready,
  // candidates
  output logic                     cand_valid,
  input  logic                     cand_ready,
  output pos_t                     cand_pos,
  output logic [$clog2(MAX_D)-1:0] cand_slot,
  output logic                     cand_flush,
  // processing element results (best of the last burst, per slot)
  input  logic                     pe_res_valid,
  input  pos_t                     pe_res_pos [MAX_D],
  input  logic [SAD_W-1:0]         pe_res_sad [MAX_D],
  // partial results
  output logic                     rec_valid,
  input  logic                     rec_ready,
  output pr_rec_t                  rec,
  output logic                     pr_frame_start,
  output logic                     pr_flush,
  input  logic                     pr_flush_done,
  input  logic                     pr_pending,
  // statistics
  output logic [31:0]              steps,
  output logic [31:0]              rounds
);
  localparam int unsigned CW    = $clog2(N_SW);
  localparam int unsigned SLW   = $clog2(MAX_D);
  localparam int unsigned HALF  = (N_SW - 1) / 2;          // MBs either side of centre
  localparam int unsigned C16   = HALF * MB_PIX;           // centre position, pixels
  localparam int unsigned PMAX  = (N_SW - 1) * MB_PIX;     // last candidate position

  function automatic int unsigned n_dist();
    int unsigned n;
    n = 0;
    for (int d = 2; d <= int'(C16); d = d * 2) n++;
    return n;
  endfunction
  localparam int unsigned NPTS = 5 + 8 * n_dist();

  // Offset of diamond point j: 0 centre, 1..4 distance 1, then 8 points per distance.
  function automatic void pattern(input int unsigned j, output int signed dx, output int signed dy);
    int signed d, h;
    int unsigned m;
    dx = 0; dy = 0;
    if (j >= 1 && j <= 4) begin
      case (j)
        1: dy = -1;
        2: dx = -1;
        3: dx = 1;
        default: dy = 1;
      endcase
    end else if (j >= 5) begin
      d = 2 << ((j - 5) / 8);
      h = d / 2;
      m = (j - 5) % 8;
      case (m)
        0: begin dx = 0;  dy = -d; end
        1: begin dx = -h; dy = -h; end
        2: begin dx = h;  dy = -h; end
        3: begin dx = -d; dy = 0;  end
        4: begin dx = d;  dy = 0;  end
        5: begin dx = -h; dy = h;  end
        6: begin dx = h;  dy = h;  end
        default: begin dx = 0; dy = d; end
      endcase
    end
  endfunction

  typedef enum logic [3:0] {
    S_IDLE, S_PG0, S_PGWAIT, S_STEP, S_STEP2, S_WAITCUR, S_GEN, S_WAITPE,
    S_OUT, S_NEXT, S_FLUSH, S_DRAIN, S_DRAINW, S_DONE
  } st_e;
  st_e st;

  logic [7:0]         X, Y;
  pos_t               center [MAX_D];
  pos_t               best   [MAX_D];
  logic [SAD_W-1:0]   best_sad [MAX_D];
  logic [MAX_D-1:0]   fin;
  logic [3:0]         round;
  logic [SLW-1:0]     gs;       // generation slot
  logic [7:0]         gj;       // generation point
  logic [1:0]         dly;

  // --- candidate of (gs, gj) -------------------------------------------------
  logic cand_ok;
  always_comb begin
    int signed dx, dy, px, py;
    pattern(int'(gj), dx, dy);
    px = int'(center[gs].x) + dx;
    py = int'(center[gs].y) + dy;
    cand_ok  = (st == S_GEN) && !fin[gs] && !(gj == 0 && round != 0) &&
               px >= 0 && py >= 0 && px <= int'(PMAX) && py <= int'(PMAX);
    cand_pos = '{x: POS_W'(px), y: POS_W'(py)};
    cand_slot = gs;
  end
  assign cand_valid = cand_ok;
  logic gen_adv, gen_last;
  assign gen_adv  = (st == S_GEN) && (!cand_ok || cand_ready);
  assign gen_last = (int'(gs) == MAX_D - 1) && (int'(gj) == NPTS - 1);
  assign cand_flush = gen_adv && gen_last;

  // --- outputs --------------------------------------------------------------------
  // extra schedule slots at the end of a frame carry only partial results
  assign step_start     = (st == S_STEP2) ||
                          ((st == S_DRAIN || st == S_FLUSH) && pr_pending && sched_idle);
  assign rec_valid      = (st == S_OUT) && cur_active[gs];
  assign pr_flush       = (st == S_FLUSH);
  assign busy           = (st != S_IDLE);

  always_comb begin
    rec.slot  = 4'(gs);
    rec.is_de = dep_is_de[gs];
    rec.mb_x  = cur_mb_x[gs];
    rec.mb_y  = cur_mb_y[gs];
    rec.vx    = VEC_W'(int'(best[gs].x) - int'(C16));
    rec.vy    = VEC_W'(int'(best[gs].y) - int'(C16));
    rec.sad   = best_sad[gs];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; X <= '0; Y <= '0; fin <= '0; round <= '0; gs <= '0; gj <= '0; dly <= '0;
      done <= 1'b0; mem_step <= 1'b0; pg_frame_start <= 1'b0; pg_apply <= 1'b0;
      pg_frame_end <= 1'b0; pr_frame_start <= 1'b0;
      cur_active <= '0; sw_col_x <= '0; sw_top_y <= '0; sw_ncols <= '0; sw_dst_col <= '0;
      steps <= '0; rounds <= '0;
      for (int s = 0; s < MAX_D; s++) begin
        center[s] <= '0; best[s] <= '0; best_sad[s] <= '1;
        cur_mb_x[s] <= '0; cur_mb_y[s] <= '0;
      end
    end else begin
      done <= 1'b0; mem_step <= 1'b0; pg_frame_start <= 1'b0; pg_apply <= 1'b0;
      pg_frame_end <= 1'b0; pr_frame_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          X <= '0; Y <= '0;
          pg_frame_start <= 1'b1;
          pr_frame_start <= 1'b1;
          steps <= '0; rounds <= '0;
          st <= S_PG0;
        end
        S_PG0: st <= S_PGWAIT;
        S_PGWAIT: if (pg_map_ready) st <= S_STEP;
        S_STEP: begin
          for (int s = 0; s < MAX_D; s++) begin
            automatic int signed mx = int'(X) - int'(gdv_x[s]);
            automatic int signed my = int'(Y) - int'(gdv_y[s]);
            cur_active[s] <= dep_en[s] && mx >= 0 && my >= 0 &&
                             mx < int'(frame_w_mb) && my < int'(frame_h_mb);
            cur_mb_x[s] <= 8'(mx);
            cur_mb_y[s] <= 8'(my);
          end
          sw_top_y <= 10'(int'(Y) - int'(HALF));
          if (X == 0) begin
            sw_col_x   <= 10'(int'(X) - int'(HALF));
            sw_ncols   <= ($clog2(N_SW+1))'(N_SW);
            sw_dst_col <= '0;
          end else begin
            sw_col_x   <= 10'(int'(X) + int'(HALF));
            sw_ncols   <= ($clog2(N_SW+1))'(1);
            sw_dst_col <= CW'(N_SW - 1);
            mem_step   <= 1'b1;
          end
          pg_apply <= 1'b1;
          steps    <= steps + 1;
          st       <= S_STEP2;
        end
        S_STEP2: st <= S_WAITCUR;
        // at a line start the whole window must be on chip before the search starts;
        // in other steps only the new rightmost column may still be arriving
        S_WAITCUR: if (cur_loaded && (X != 0 || sw_loaded)) begin
          for (int s = 0; s < MAX_D; s++) begin
            center[s]   <= '{x: POS_W'(C16), y: POS_W'(C16)};
            best[s]     <= '{x: POS_W'(C16), y: POS_W'(C16)};
            best_sad[s] <= '1;
          end
          fin   <= ~cur_active;
          round <= '0;
          gs    <= '0;
          gj    <= '0;
          st    <= (cur_active == '0) ? S_NEXT : S_GEN;
        end
        S_GEN: if (gen_adv) begin
          if (gen_last) begin
            st <= S_WAITPE;
            rounds <= rounds + 1;
          end else if (int'(gj) == NPTS - 1) begin
            gj <= '0;
            gs <= gs + 1'b1;
          end else gj <= gj + 1'b1;
        end
        S_WAITPE: if (pe_res_valid) begin
          automatic logic [MAX_D-1:0] nf = fin;
          for (int s = 0; s < MAX_D; s++) begin
            if (!fin[s]) begin
              if (pe_res_sad[s] < best_sad[s]) begin
                best[s]     <= pe_res_pos[s];
                best_sad[s] <= pe_res_sad[s];
                center[s]   <= pe_res_pos[s];
                if (pe_res_pos[s] == center[s] || int'(round) + 1 >= MAX_ROUNDS) nf[s] = 1'b1;
              end else nf[s] = 1'b1;
            end
          end
          fin   <= nf;
          round <= round + 1'b1;
          gs    <= '0;
          gj    <= '0;
          st    <= (nf == '1) ? S_OUT : S_GEN;
        end
        S_OUT: if (!cur_active[gs] || rec_ready) begin
          if (int'(gs) == MAX_D - 1) st <= S_NEXT;
          else gs <= gs + 1'b1;
        end
        S_NEXT: if (sched_idle) begin
          if (int'(X) + 1 == int'(frame_w_mb)) begin
            X <= '0;
            if (int'(Y) + 1 == int'(frame_h_mb)) begin
              cur_active <= '0;
              sw_ncols   <= '0;
              st         <= S_FLUSH;
            end else begin
              Y  <= Y + 1'b1;
              st <= S_STEP;
            end
          end else begin
            X  <= X + 1'b1;
            st <= S_STEP;
          end
        end
        S_FLUSH: if (pr_flush_done) st <= S_DRAIN;
        S_DRAIN: begin
          if (!pr_pending && sched_idle) begin
            pg_frame_end <= 1'b1;
            st <= S_DONE;
          end else if (sched_idle) begin
            dly <= '0;
            st  <= S_DRAINW;
          end
        end
        S_DRAINW: begin
          if (dly != 2'd3) dly <= dly + 1'b1;
          else if (sched_idle) st <= S_DRAIN;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
