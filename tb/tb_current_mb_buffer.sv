// tb_current_mb_buffer: self-checking test of the current MB buffer.
//
// Writes random pixel rows into every slot in random order, keeps a reference copy in
// the testbench and reads every slot back, checking the whole MB and that the data
// arrives exactly one cycle after rd_en. Slots are then partly overwritten and read
// again. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_current_mb_buffer;
  import mvc_pkg::*;
  localparam int MAXD = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0;
  logic [$clog2(MAXD)-1:0] wr_slot = 0, rd_slot = 0;
  logic [3:0] wr_row = 0;
  mb_row_t wr_data = '0;
  logic rd_valid;
  mb_t rd_data;
  mb_t ref_mb [MAXD];

  current_mb_buffer #(.MAX_D(MAXD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int s, input int r, input mb_row_t d);
    @(negedge clk); wr_en = 1; wr_slot = s[$clog2(MAXD)-1:0]; wr_row = r[3:0]; wr_data = d;
    ref_mb[s][r] = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(input int s);
    @(negedge clk); rd_en = 1; rd_slot = s[$clog2(MAXD)-1:0];
    @(posedge clk); #1; rd_en = 0;
    check(rd_valid, "rd_valid one cycle after rd_en");
    check(rd_data == ref_mb[s], $sformatf("slot %0d content", s));
    @(posedge clk); #1;
    check(!rd_valid, "rd_valid is a single pulse");
  endtask

  function automatic mb_row_t rnd_row();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < MAXD; s++)
      for (int r = 0; r < 16; r++) wr(s, r, rnd_row());
    for (int s = MAXD - 1; s >= 0; s--) rd(s);
    for (int k = 0; k < 60; k++) wr($urandom % MAXD, $urandom % 16, rnd_row());
    for (int k = 0; k < 20; k++) rd($urandom % MAXD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
