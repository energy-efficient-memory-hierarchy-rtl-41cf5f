// tb_onchip_video_memory: self-checking test of the 16-bank search window memory.
//
// A reference model in the testbench keeps the window as logical MBs (column, row)
// and shifts it left by one column at every `step`, exactly as the search window
// slides; the memory itself only renames sectors. The test fills the whole window,
// then repeatedly steps and refills the rightmost column, checking every logical
// MB after each step (whole MB, one read per line, data one cycle after the grant).
// Power gating: a line set to S1/S2 is not served and raises wake_req with the
// physical line number (sector (col+base) mod N * N + row); a line set to S0 loses
// its data, reads as zero with rd_lost until it is written again.
module tb_onchip_video_memory;
  import mvc_pkg::*;
  localparam int N = 13;
  localparam int CW = $clog2(N);
  localparam int LW = $clog2(N * N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic step = 0, wr_en = 0, rd_req = 0;
  logic [CW-1:0] base, wr_col = 0, wr_row = 0, rd_col = 0, rd_row = 0;
  logic [3:0] wr_bank = 0;
  mb_row_t wr_data = '0;
  logic rd_gnt, rd_valid, rd_lost, wake_req;
  mb_t rd_data;
  pstate_e pstate [N*N];
  logic [LW-1:0] wake_line;

  onchip_video_memory #(.N_SW(N)) dut (.*);

  mb_t model [N][N];     // [col][row], logical
  int exp_base = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic write_mb(input int c, input int r);
    for (int b = 0; b < 16; b++) begin
      mb_row_t d;
      d = {$urandom, $urandom, $urandom, $urandom};
      model[c][r][b] = d;
      @(negedge clk); wr_en = 1; wr_col = CW'(c); wr_row = CW'(r); wr_bank = b[3:0]; wr_data = d;
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic read_mb(input int c, input int r, input bit expect_lost);
    @(negedge clk); rd_req = 1; rd_col = CW'(c); rd_row = CW'(r);
    #1;
    check(rd_gnt && !wake_req, $sformatf("grant for on line (%0d,%0d)", c, r));
    @(posedge clk); #1; rd_req = 0;
    check(rd_valid, "rd_valid one cycle after the grant");
    check(rd_lost == expect_lost, $sformatf("rd_lost (%0d,%0d)", c, r));
    check(rd_data == (expect_lost ? mb_t'('0) : model[c][r]), $sformatf("MB (%0d,%0d) base %0d", c, r, exp_base));
  endtask

  task automatic do_step();
    @(negedge clk); step = 1; @(negedge clk); step = 0;
    exp_base = (exp_base + 1) % N;
    for (int c = 0; c < N - 1; c++)
      for (int r = 0; r < N; r++) model[c][r] = model[c + 1][r];
    check(int'(base) == exp_base, "base advances by one sector per step");
  endtask

  initial begin
    for (int l = 0; l < N * N; l++) pstate[l] = PS_ON;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) for (int r = 0; r < N; r++) write_mb(c, r);
    for (int c = 0; c < N; c++) for (int r = 0; r < N; r++) read_mb(c, r, 0);
    for (int s = 0; s < N + 3; s++) begin
      do_step();
      for (int r = 0; r < N; r++) write_mb(N - 1, r);
      for (int k = 0; k < 30; k++) read_mb($urandom % N, $urandom % N, 0);
    end
    // retention: not served, wake request names the physical line
    for (int k = 0; k < 10; k++) begin
      int c, r, line;
      c = $urandom % N; r = $urandom % N;
      line = ((c + exp_base) % N) * N + r;
      pstate[line] = (k % 2) ? PS_RET1 : PS_RET2;
      @(negedge clk); rd_req = 1; rd_col = CW'(c); rd_row = CW'(r);
      #1;
      check(!rd_gnt && wake_req && int'(wake_line) == line, $sformatf("wake request for line %0d", line));
      @(negedge clk); rd_req = 0; pstate[line] = PS_ON;
      read_mb(c, r, 0);      // retention keeps the data
    end
    // off: data lost until rewritten
    begin
      int c, r, line;
      c = 4; r = 9;
      line = ((c + exp_base) % N) * N + r;
      pstate[line] = PS_OFF;
      @(negedge clk); @(negedge clk);
      pstate[line] = PS_ON;
      read_mb(c, r, 1);
      write_mb(c, r);
      read_mb(c, r, 0);
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
