// tb_agu_search_window: self-checking test of the search window AGU.
//
// An in-order memory model with random latency and back-pressure answers each read
// with a word derived from its address. The testbench works out the expected write
// sequence itself: for every fetched column c, MB row r and pixel row p it clamps
// the MB column and pixel row to the frame (border repetition), forms the address
// base + y*stride + x*16 and expects a video memory write to logical column
// (dst_col + c) mod N_SW, row r, bank p with that word. Covered: a full 13-column
// window at a frame corner (negative positions), single columns inside and beyond
// the right/bottom border, wrap-around of dst_col, and ncols = 0.
module tb_agu_search_window;
  import mvc_pkg::*;
  localparam int N = 13;
  localparam int CW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [ADDR_W-1:0] ref_base = 32'h0030_0000;
  logic [15:0] stride;
  logic [7:0] frame_w_mb = 8'd20, frame_h_mb = 8'd15;
  logic signed [9:0] col_x = '0, top_y = '0;
  logic [$clog2(N+1)-1:0] ncols = '0;
  logic [CW-1:0] dst_col = '0;
  logic req_valid, req_ready = 0, rsp_valid = 0;
  mem_req_t req;
  logic [BUS_W-1:0] rsp_data = '0;
  logic wr_en, busy, done;
  logic [CW-1:0] wr_col, wr_row;
  logic [3:0] wr_bank;
  mb_row_t wr_data;

  assign stride = 16'(int'(frame_w_mb) * 16);

  agu_search_window #(.N_SW(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] word_of(input logic [31:0] a);
    return {~a, a, a * 32'd3, a ^ 32'hdead_beef};
  endfunction
  function automatic int clampi(input int v, input int lo, input int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  logic [31:0] q_addr [$];
  int q_due [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) req_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (req_valid && req_ready) begin
    q_addr.push_back(req.addr);
    q_due.push_back(cyc + 1 + $urandom % 5);
  end
  always @(negedge clk) begin
    rsp_valid = 0;
    if (q_due.size() > 0 && q_due[0] <= cyc) begin
      void'(q_due.pop_front());
      rsp_valid = 1;
      rsp_data = word_of(q_addr.pop_front());
    end
  end

  int got;
  logic [31:0] e_addr [$];
  int e_col [$], e_row [$], e_bank [$];
  always @(posedge clk) if (rst_n && wr_en) begin
    got++;
    if (e_col.size() == 0) check(0, "unexpected write");
    else begin
      int c, r, b;
      logic [31:0] a;
      c = e_col.pop_front(); r = e_row.pop_front(); b = e_bank.pop_front(); a = e_addr.pop_front();
      check(int'(wr_col) == c && int'(wr_row) == r && int'(wr_bank) == b,
            $sformatf("write position col %0d row %0d bank %0d", c, r, b));
      check(wr_data == word_of(a), $sformatf("data for col %0d row %0d bank %0d", c, r, b));
    end
  end

  task automatic fetch(input int cx, input int ty, input int nc, input int dst);
    int n;
    n = 0;
    for (int c = 0; c < nc; c++)
      for (int r = 0; r < N; r++)
        for (int p = 0; p < 16; p++) begin
          int x, y;
          x = clampi(cx + c, 0, int'(frame_w_mb) - 1);
          y = clampi((ty + r) * 16 + p, 0, int'(frame_h_mb) * 16 - 1);
          e_col.push_back((dst + c) % N); e_row.push_back(r); e_bank.push_back(p);
          e_addr.push_back(ref_base + 32'(y * int'(stride) + x * 16));
          n++;
        end
    got = 0;
    @(negedge clk);
    col_x = 10'(cx); top_y = 10'(ty); ncols = ($clog2(N+1))'(nc); dst_col = CW'(dst);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    check(got == n, $sformatf("fetch (%0d,%0d)x%0d: %0d beats, expected %0d", cx, ty, nc, got, n));
    e_col.delete(); e_row.delete(); e_bank.delete(); e_addr.delete();
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fetch(-6, -6, N, 0);       // full window at the top-left corner
    fetch(7, -6, 1, 0);        // next step: one new column, stored in the old sector
    fetch(16, 8, 1, 12);       // column partly beyond the right and bottom borders
    fetch(25, 2, 1, 5);        // column fully outside: repeats the last frame column
    fetch(3, 1, 0, 4);         // nothing to fetch
    for (int k = 0; k < 4; k++) fetch(int'($urandom % 30) - 6, int'($urandom % 20) - 6, 1 + $urandom % 2, $urandom % N);
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
