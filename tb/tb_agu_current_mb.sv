// tb_agu_current_mb: self-checking test of the current MB AGU.
//
// An in-order external memory model with random latency and random back-pressure
// returns, for every read, a 128-bit word derived from its address. The testbench
// computes independently which slots are active, which addresses each MB row must
// come from (base + (mb_y*16 + row) * stride + mb_x*16) and checks every buffer
// write (slot, row, data) in order, the number of beats, and the done pulse,
// including a start with no active slot.
module tb_agu_current_mb;
  import mvc_pkg::*;
  localparam int MAXD = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [MAXD-1:0] active = '0;
  logic [ADDR_W-1:0] frame_base [MAXD];
  logic [7:0] mb_x [MAXD], mb_y [MAXD];
  logic [15:0] stride = 16'd640;
  logic req_valid, req_ready = 0, rsp_valid = 0;
  mem_req_t req;
  logic [BUS_W-1:0] rsp_data = '0;
  logic wr_en, busy, done;
  logic [$clog2(MAXD)-1:0] wr_slot;
  logic [3:0] wr_row;
  mb_row_t wr_data;

  agu_current_mb #(.MAX_D(MAXD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] word_of(input logic [31:0] a);
    return {a, ~a, a ^ 32'h5a5a_5a5a, a + 32'd77};
  endfunction

  // memory model: in-order, latency 2..5 cycles
  logic [31:0] q_addr [$];
  int q_due [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) req_ready <= ($urandom % 4) != 0;
  always @(posedge clk) begin
    if (req_valid && req_ready) begin
      q_addr.push_back(req.addr);
      q_due.push_back(cyc + 2 + $urandom % 4);
    end
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
  logic [31:0] exp_addr [$];
  int exp_slot [$], exp_row [$];
  always @(posedge clk) if (rst_n && wr_en) begin
    got++;
    if (exp_slot.size() == 0) check(0, "unexpected buffer write");
    else begin
      int s, r;
      logic [31:0] a;
      s = exp_slot.pop_front(); r = exp_row.pop_front(); a = exp_addr.pop_front();
      check(int'(wr_slot) == s && int'(wr_row) == r, $sformatf("write order slot %0d row %0d", s, r));
      check(wr_data == word_of(a), $sformatf("data of slot %0d row %0d (address %h)", s, r, a));
    end
  end

  task automatic run_step();
    int n;
    n = 0;
    for (int s = 0; s < MAXD; s++) begin
      frame_base[s] = 32'((s + 1) << 20);
      mb_x[s] = 8'($urandom % 40);
      mb_y[s] = 8'($urandom % 30);
      if (active[s])
        for (int r = 0; r < 16; r++) begin
          exp_slot.push_back(s); exp_row.push_back(r);
          exp_addr.push_back(frame_base[s] + 32'((int'(mb_y[s]) * 16 + r) * int'(stride) + int'(mb_x[s]) * 16));
          n++;
        end
    end
    got = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    check(got == n, $sformatf("%0d beats written, expected %0d", got, n));
    check(exp_slot.size() == 0, "all expected rows written before done");
    exp_slot.delete(); exp_row.delete(); exp_addr.delete();
    @(negedge clk);
  endtask

  initial begin
    for (int s = 0; s < MAXD; s++) begin frame_base[s] = '0; mb_x[s] = '0; mb_y[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    active = 9'b1_1111_1111; run_step();
    active = 9'b0_0000_0101; run_step();
    active = '0;             run_step();
    for (int k = 0; k < 6; k++) begin active = MAXD'($urandom); run_step(); end
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
