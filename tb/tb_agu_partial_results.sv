// tb_agu_partial_results: self-checking test of the partial results write AGU.
//
// Sends random 512-bit buffers with random back-pressure on req_ready. A reference
// model computes, for every accepted beat, the expected address (region base +
// 64 bytes per buffer, wrapping at the region size, +16 bytes per beat) and the
// expected 128-bit slice (first beat = most significant bits). Also checks that
// done follows the fourth beat, the buffer counter and that init restarts the pointer.
module tb_agu_partial_results;
  import mvc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init = 0, start = 0, req_valid, req_ready = 0, busy, done;
  logic [ADDR_W-1:0] region_base = 32'h0040_0000, region_size = 32'd320;
  logic [PR_BUF_W-1:0] data = '0;
  mem_req_t req;
  logic [31:0] buffers_written;

  agu_partial_results dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always_ff @(posedge clk) req_ready <= ($urandom % 3) != 0;

  task automatic send(input int nbuf_before);
    logic [PR_BUF_W-1:0] d;
    int beat;
    int off;
    for (int k = 0; k < 16; k++) d[k*32 +: 32] = $urandom;
    off = (nbuf_before % 5) * 64;          // 320-byte region holds 5 buffers
    @(negedge clk); start = 1; data = d;
    @(negedge clk); start = 0; data = '0;
    beat = 0;
    while (beat < 4) begin
      @(posedge clk);
      if (req_valid && req_ready) begin
        check(req.we, "write request");
        check(req.addr == region_base + 32'(off + 16 * beat), $sformatf("address beat %0d: %h", beat, req.addr));
        check(req.wdata == d[511 - 128 * beat -: 128], $sformatf("data beat %0d", beat));
        beat++;
      end
    end
    #1;
    check(done, "done right after the fourth beat");
    check(!busy, "idle after the buffer");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int b = 0; b < 12; b++) begin
      send(b);
      check(buffers_written == 32'(b + 1), "buffer counter");
    end
    @(negedge clk); init = 1; region_base = 32'h0080_0000; @(negedge clk); init = 0;
    check(buffers_written == 0, "init clears the counter");
    for (int b = 0; b < 3; b++) send(b);
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
