// tb_power_gating_ctrl: self-checking test of the statistical power gating controller.
//
// Frame 1: random offline ME and DE maps are loaded, the controller combines them with
// the numbers of ME and DE dependent frames and classifies every window position. The
// testbench recomputes the map, its mean and standard deviation in floating point,
// the state of every position (S0 for zero or outside the used window, S1 below
// mu-2sigma, S2 below mu-sigma, else S3), the row-wise most-on prefix and the
// physical line of each position for several values of base, and compares the
// pstate outputs. It checks that the map build takes 2*n*n cycles, the wake-up
// latencies (S2: 1, S1: 2, S0: 4 cycles) and that a step (apply) regates woken
// lines. Frame 2 uses access counts driven during frame 1 and is checked the same way.
module tb_power_gating_ctrl;
  import mvc_pkg::*;
  localparam int N = 13;
  localparam int M = N * N;
  localparam int CW = $clog2(N);
  localparam int IW = $clog2(M);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start = 0, first_frame = 0, frame_end = 0, map_ready;
  logic [3:0] d_me = 0, d_de = 0;
  logic [$clog2(N+1)-1:0] sw_used = ($clog2(N+1))'(N);
  logic off_we = 0, off_de = 0;
  logic [IW-1:0] off_idx = 0;
  logic [15:0] off_data = 0;
  logic acc_valid = 0;
  logic [CW-1:0] acc_col = 0, acc_row = 0;
  logic apply = 0;
  logic [CW-1:0] base = 0;
  logic wake_req = 0;
  logic [IW-1:0] wake_line = 0;
  pstate_e pstate [M];
  logic [31:0] wake_count;

  power_gating_ctrl #(.N_SW(N)) dut (.*);

  int stat [M];
  pstate_e lmap [M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic void classify(input int used);
    real mu, sg, s, q;
    s = 0; q = 0;
    foreach (stat[i]) begin s += stat[i]; q += real'(stat[i]) * stat[i]; end
    mu = s / M;
    sg = $sqrt(q / M - mu * mu);
    foreach (stat[i]) begin
      if (stat[i] == 0 || (i % N) >= used || (i / N) >= used) lmap[i] = PS_OFF;
      else if (stat[i] <= mu - 2 * sg) lmap[i] = PS_RET1;
      else if (stat[i] <= mu - sg)     lmap[i] = PS_RET2;
      else                             lmap[i] = PS_ON;
    end
  endfunction

  task automatic check_map(input int b);
    @(negedge clk); base = CW'(b); #1;
    for (int r = 0; r < N; r++) begin
      pstate_e run;
      run = PS_OFF;
      for (int c = 0; c < N; c++) begin
        int line;
        if (lmap[r * N + c] > run) run = lmap[r * N + c];
        line = ((c + b) % N) * N + r;
        check(pstate[line] == run, $sformatf("state of position (%0d,%0d) at base %0d: %0d, expected %0d",
                                             c, r, b, pstate[line], run));
      end
    end
  endtask

  task automatic build(input bit first);
    int t;
    @(negedge clk); frame_start = 1; first_frame = first; @(negedge clk); frame_start = 0;
    t = 1;
    while (!map_ready) begin @(negedge clk); t++; end
    check(t == 2 * M + 1, $sformatf("map build took %0d cycles", t));
  endtask

  task automatic wake(input int line, input int lat);
    int t;
    @(negedge clk); wake_req = 1; wake_line = IW'(line);
    t = 0;
    while (pstate[line] != PS_ON && t < 10) begin @(negedge clk); t++; end
    wake_req = 0;
    check(t == lat, $sformatf("wake-up of line %0d took %0d cycles, expected %0d", line, t, lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    d_me = 4'd3; d_de = 4'd2;
    for (int i = 0; i < M; i++) begin
      int vm, vd, d;
      // mostly busy positions; one rarely used row, one moderate row, one unused position
      d = (i % N > 6 ? i % N - 6 : 6 - i % N) + (i / N > 6 ? i / N - 6 : 6 - i / N);
      vm = 200 + (d < 3 ? 20 : 0) + $urandom % 20;
      vd = 20 + $urandom % 10;
      if (i / N == 0)      begin vm = 2;   vd = 0; end   // a rarely used row
      if (i / N == N - 1)  begin vm = 90;  vd = 0; end   // a moderately used row
      if (i == N)          begin vm = 0;   vd = 0; end   // never used
      @(negedge clk); off_we = 1; off_de = 0; off_idx = IW'(i); off_data = 16'(vm);
      @(negedge clk); off_de = 1; off_data = 16'(vd);
      stat[i] = 3 * vm + 2 * vd;
    end
    @(negedge clk); off_we = 0;
    build(1);
    classify(N);
    for (int b = 0; b < N; b += 4) check_map(b);
    // wake-up latencies
    begin
      int n1, n2, n0;
      n1 = 0; n2 = 0; n0 = 0;
      for (int l = 0; l < M; l++) begin
        if (pstate[l] == PS_RET2 && n2 < 2) begin wake(l, 1); n2++; end
        else if (pstate[l] == PS_RET1 && n1 < 2) begin wake(l, 2); n1++; end
        else if (pstate[l] == PS_OFF && n0 < 2) begin wake(l, 4); n0++; end
      end
      check(n1 > 0 && n2 > 0 && n0 > 0, $sformatf("all gated states present in the test map (%0d %0d %0d)", n0, n1, n2));
      check(wake_count == 32'(n0 + n1 + n2), "wake-up counter");
      @(negedge clk); apply = 1; @(negedge clk); apply = 0;
      check_map(int'(base));
    end
    // frame 2 from access counts; a smaller used window
    for (int i = 0; i < M; i++) stat[i] = 0;
    for (int k = 0; k < 3000; k++) begin
      int c, r;
      c = $urandom % 9 + 2; r = $urandom % 7 + 3;
      if (k % 5 == 0) begin c = $urandom % N; r = $urandom % N; end
      stat[r * N + c]++;
      @(negedge clk); acc_valid = 1; acc_col = CW'(c); acc_row = CW'(r);
    end
    @(negedge clk); acc_valid = 0; frame_end = 1;
    @(negedge clk); frame_end = 0;
    sw_used = ($clog2(N+1))'(11);
    build(0);
    classify(11);
    for (int b = 0; b < N; b += 3) check_map(b);
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
