// tb_candidates_merger: self-checking test of the candidate blocks merger.
//
// Each burst sends random candidate positions for random MB slots, with many
// repeats (positions drawn from a small set, including positions in the rightmost
// window column). An associative-array model collects the distinct positions and
// the OR of their slot masks. The drain is checked against the sorted model:
// ascending x, then y, each position once with the right mask, out_last only on the
// final one, nothing touching the rightmost column (x >= (N-1)*16-15) while
// col_ready is low, and the merged/held counters. Random back-pressure on out_ready.
module tb_candidates_merger;
  import mvc_pkg::*;
  localparam int N = 13;
  localparam int MAXD = 9;
  localparam int LAST_X = (N - 1) * 16 - 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, flush = 0, col_ready = 1, out_valid, out_ready = 0, out_last;
  pos_t in_pos = '0, out_pos;
  logic [$clog2(MAXD)-1:0] in_slot = 0;
  logic [MAXD-1:0] out_mask;
  logic [31:0] merged_count, held_count;

  candidates_merger #(.N_SW(N), .MAX_D(MAXD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [MAXD-1:0] model [int];   // key = x*256 + y
  int total_merged = 0;

  task automatic burst(input int n, input bit hold_col);
    int key, got, last_key;
    model.delete();
    for (int k = 0; k < n; k++) begin
      int x, y, s;
      x = ($urandom % 14) * 14;       // 0..182, some in the last column
      y = ($urandom % 8) * 24;
      s = $urandom % MAXD;
      @(negedge clk); in_valid = 1; in_pos = '{x: 8'(x), y: 8'(y)}; in_slot = s[$clog2(MAXD)-1:0];
      #1 check(in_ready, "merger accepts the burst");
      if (model.exists(x * 256 + y)) total_merged++;
      else model[x * 256 + y] = '0;
      model[x * 256 + y][s] = 1'b1;
    end
    @(negedge clk); in_valid = 0; flush = 1; col_ready = !hold_col;
    @(negedge clk); flush = 0;
    got = 0; last_key = -1;
    fork
      begin
        if (hold_col) begin repeat (200) @(negedge clk); col_ready = 1; end
      end
      begin
        bit done;
        done = 0;
        while (!done) begin
          @(negedge clk);
          out_ready = ($urandom % 3) != 0;
          #1;
          if (out_valid && out_ready) begin
            key = int'(out_pos.x) * 256 + int'(out_pos.y);
            check(model.exists(key), $sformatf("position (%0d,%0d) was requested", out_pos.x, out_pos.y));
            check(key > last_key, "column-major ascending order");
            if (model.exists(key)) check(out_mask == model[key], $sformatf("mask of (%0d,%0d)", out_pos.x, out_pos.y));
            check(!(int'(out_pos.x) >= LAST_X && !col_ready), "rightmost column held back");
            last_key = key;
            got++;
            check(out_last == (got == model.num()), "out_last on the final position only");
            done = out_last;
          end
        end
        @(posedge clk);
        #1 out_ready = 0;
      end
    join
    check(got == model.num(), $sformatf("%0d distinct positions out, expected %0d", got, model.num()));
    check(merged_count == 32'(total_merged), "merged counter");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(60, 0);
    burst(300, 1);
    check(held_count > 0, "hold happened");
    burst(477, 1);       // 9 MBs x 53 points
    burst(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
