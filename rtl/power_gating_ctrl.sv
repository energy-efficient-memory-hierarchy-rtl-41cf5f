// power_gating_ctrl: statistical line-level power gating of the on-chip video memory.
//
// At the start of every frame (frame_start) the controller builds a statistics map
// with one entry per MB position of the n x n search window:
//   first frame : StatMap = D_ME * offStatMap_ME + D_DE * offStatMap_DE
//                 (offline maps loaded through the off_* port),
//   later frames: StatMap = access counts gathered while the previous frame was
//                 searched.
// It then computes mean (mu) and standard deviation (sigma) of the map and gives
// every position a power state:
//   S0 (off)        position never accessed (count 0) or outside the used window,
//   S1 (ret 0.3Vdd) count <= mu - 2 sigma,
//   S2 (ret 0.5Vdd) mu - 2 sigma < count <= mu - sigma,
//   S3 (on)         otherwise.
// The comparisons are done exactly in integers: with M = n*n, S = sum, Q = sum of
// squares, "count < mu - k*sigma" is  (S - M*count) > 0  and
// (S - M*count)^2 > k^2 * (M*Q - S^2).
// The map is kept in search-window (logical) coordinates and translated to physical
// lines with the memory's sector rotation (line = sector*n + row, sector =
// (col + base) mod n), so it stays aligned while the window slides. Because the data
// of a line is reused at the columns to its left in later steps, a line gets the
// most-on state among its own and all logical positions left of it in its row (design
// choice that keeps off lines from losing data that is still needed).
//
// Wake-up: a read of a gated line raises wake_req; after a wake latency that
// grows with the depth of the state (S2: 1, S1: 2, S0: 4 cycles; a design choice, the
// published wake-up figures are energies) the line is reported on until the next
// search step (apply pulse), when the statistical map is applied again.
//
// Timing: building the map takes 2*n*n+2 cycles after frame_start; map_ready is high
// once it is done. Access counting (acc_valid with logical column/row) runs all the
// time; frame_end stores the counts as the statistics for the next frame.
module power_gating_ctrl
  import mvc_pkg::*;
#(
  parameter int unsigned N_SW   = 13,
  parameter int unsigned STAT_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // frame control
  input  logic                     frame_start,
  input  logic                     first_frame,
  input  logic                     frame_end,
  input  logic [3:0]               d_me,
  input  logic [3:0]               d_de,
  input  logic [$clog2(N_SW+1)-1:0] sw_used,     // used window edge in MBs (<= N_SW)
  output logic                     map_ready,
  // offline statistics load
  input  logic                     off_we,
  input  logic                     off_de,        // 0: ME map, 1: DE map
  input  logic [$clog2(N_SW*N_SW)-1:0] off_idx,   // row-major col + row*N_SW
  input  logic [STAT_W-1:0]        off_data,
  // access statistics
  input  logic                     acc_valid,
  input  logic [$clog2(N_SW)-1:0]  acc_col,
  input  logic [$clog2(N_SW)-1:0]  acc_row,
  // memory side
  input  logic                     apply,         // new search step
  input  logic [$clog2(N_SW)-1:0]  base,
  input  logic                     wake_req,
  input  logic [$clog2(N_SW*N_SW)-1:0] wake_line,
  output pstate_e                  pstate [N_SW*N_SW],
  output logic [31:0]              wake_count
);
  localparam int unsigned M   = N_SW * N_SW;
  localparam int unsigned IW  = $clog2(M);
  localparam int unsigned MAPW = STAT_W + 5;      // D*off fits: 2*15*max
  localparam int unsigned SW_ = MAPW + IW + 1;    // sum width
  localparam int unsigned QW  = 2 * MAPW + IW + 1;// sum of squares width
  localparam int unsigned BW  = 2 * QW + 8;       // products

  typedef enum logic [1:0] {P_IDLE, P_ACC, P_CLASS} phase_e;

  logic [STAT_W-1:0] off_me [M];
  logic [STAT_W-1:0] off_de_m [M];
  logic [STAT_W-1:0] cur_cnt [M];
  logic [STAT_W-1:0] prev_cnt [M];
  logic [MAPW-1:0]   stat_map [M];
  pstate_e           pmap [M];      // logical power map
  logic              woken [M];     // physical lines woken since last apply
  logic              first_q;

  phase_e            phase;
  logic [IW-1:0]     idx;
  logic [SW_-1:0]    s1;
  logic [QW-1:0]     s2;

  // --- map build ---------------------------------------------------------
  logic [MAPW-1:0] stat_in;
  always_comb begin
    if (first_q)
      stat_in = MAPW'(d_me) * MAPW'(off_me[idx]) + MAPW'(d_de) * MAPW'(off_de_m[idx]);
    else
      stat_in = MAPW'(prev_cnt[idx]);
  end

  // classification of entry idx
  logic signed [BW-1:0] a, var_m, a2;
  pstate_e cls;
  always_comb begin
    logic [MAPW-1:0] v;
    int unsigned col, row;
    v     = stat_map[idx];
    col   = int'(idx) % N_SW;
    row   = int'(idx) / N_SW;
    a     = BW'(s1) - BW'(M) * BW'(v);
    var_m = BW'(M) * BW'(s2) - BW'(s1) * BW'(s1);
    a2    = a * a;
    if (v == '0 || col >= int'(sw_used) || row >= int'(sw_used)) cls = PS_OFF;
    else if (a > 0 && a2 >= 4 * var_m)                             cls = PS_RET1;
    else if (a > 0 && a2 >= var_m)                                 cls = PS_RET2;
    else                                                           cls = PS_ON;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_IDLE;
      idx       <= '0;
      s1        <= '0;
      s2        <= '0;
      map_ready <= 1'b0;
      first_q   <= 1'b1;
      for (int i = 0; i < M; i++) begin
        pmap[i]     <= PS_ON;
        stat_map[i] <= '0;
      end
    end else begin
      unique case (phase)
        P_IDLE: if (frame_start) begin
          phase     <= P_ACC;
          idx       <= '0;
          s1        <= '0;
          s2        <= '0;
          map_ready <= 1'b0;
          first_q   <= first_frame;
        end
        P_ACC: begin
          stat_map[idx] <= stat_in;
          s1 <= s1 + SW_'(stat_in);
          s2 <= s2 + QW'(stat_in) * QW'(stat_in);
          if (int'(idx) == M - 1) begin
            idx   <= '0;
            phase <= P_CLASS;
          end else idx <= idx + 1'b1;
        end
        P_CLASS: begin
          pmap[idx] <= cls;
          if (int'(idx) == M - 1) begin
            phase     <= P_IDLE;
            map_ready <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // --- statistics ------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) begin
        cur_cnt[i]  <= '0;
        prev_cnt[i] <= '0;
        off_me[i]   <= '0;
        off_de_m[i] <= '0;
      end
    end else begin
      if (off_we) begin
        if (off_de) off_de_m[off_idx] <= off_data;
        else        off_me[off_idx]   <= off_data;
      end
      if (frame_end) begin
        for (int i = 0; i < M; i++) begin
          prev_cnt[i] <= cur_cnt[i];
          cur_cnt[i]  <= '0;
        end
      end else if (acc_valid) begin
        automatic int unsigned k = int'(acc_row) * N_SW + int'(acc_col);
        if (cur_cnt[k] != '1) cur_cnt[k] <= cur_cnt[k] + 1'b1;
      end
    end
  end

  // --- logical -> physical mapping and wake-up --------------------------------
  // A physical line keeps its data while the window slides: the MB at logical column c
  // moves to c-1, c-2, ... 0 in the following steps. So a line gets the most-on state
  // of its row over the columns it still has to pass (prefix maximum over 0..c);
  // otherwise a line switched off at column c would have lost data needed later.
  pstate_e eff [M];
  always_comb begin
    for (int r = 0; r < N_SW; r++) begin
      pstate_e run;
      run = PS_OFF;
      for (int c = 0; c < N_SW; c++) begin
        if (pmap[r * N_SW + c] > run) run = pmap[r * N_SW + c];
        eff[r * N_SW + c] = run;
      end
    end
  end

  always_comb begin
    for (int l = 0; l < M; l++) begin
      automatic int unsigned sec = l / N_SW;
      automatic int unsigned row = l % N_SW;
      automatic int unsigned col = (sec + N_SW - int'(base)) % N_SW;
      pstate[l] = woken[l] ? PS_ON : eff[row * N_SW + col];
    end
  end

  logic [2:0] wake_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wake_cnt   <= '0;
      wake_count <= '0;
      for (int l = 0; l < M; l++) woken[l] <= 1'b0;
    end else begin
      if (apply) begin
        for (int l = 0; l < M; l++) woken[l] <= 1'b0;
        wake_cnt <= '0;
      end else if (wake_req && !woken[wake_line]) begin
        automatic int unsigned lat;
        case (pstate[wake_line])
          PS_RET2: lat = 1;
          PS_RET1: lat = 2;
          default: lat = 4;
        endcase
        if (int'(wake_cnt) + 1 >= lat) begin
          woken[wake_line] <= 1'b1;
          wake_cnt         <= '0;
          wake_count       <= wake_count + 1;
        end else wake_cnt <= wake_cnt + 1'b1;
      end
    end
  end

endmodule
