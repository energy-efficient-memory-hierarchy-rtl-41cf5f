// tb_ext_mem_scheduler: self-checking test of the fixed external memory schedule.
//
// Three small request generators stand in for the current MB, search window and
// partial results AGUs: each, when started, issues a random number of requests
// tagged with its identity in the address, counts its responses and pulses done.
// An in-order memory model with random latency answers reads. Over many steps, with
// pr_pending random, the testbench checks that the memory sees the intervals in the
// fixed order current MBs -> search window -> (partial results) -> encoder slot,
// that read data is returned only to the unit that owns the interval, the
// cur_loaded/sw_loaded flags, the idle/enc_slot output and the partial results count.
module tb_ext_mem_scheduler;
  import mvc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic step_start = 0, pr_pending = 0;
  logic cur_start, sw_start, pr_start;
  logic cur_done = 0, sw_done = 0, pr_done = 0;
  logic cur_req_valid, sw_req_valid, pr_req_valid;
  mem_req_t cur_req, sw_req, pr_req, mem_req;
  logic cur_req_ready, sw_req_ready, pr_req_ready, cur_rsp_valid, sw_rsp_valid;
  logic mem_req_valid, mem_req_ready = 0, mem_rsp_valid = 0;
  logic enc_slot, cur_loaded, sw_loaded, idle;
  logic [31:0] pr_slots_used;

  ext_mem_scheduler dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // request generators: owner id in address bits 31:28
  int left [3], pend [3];
  assign cur_req = '{we: 1'b0, addr: 32'h1000_0000 | 32'(left[0]), wdata: '0};
  assign sw_req  = '{we: 1'b0, addr: 32'h2000_0000 | 32'(left[1]), wdata: '0};
  assign pr_req  = '{we: 1'b1, addr: 32'h3000_0000 | 32'(left[2]), wdata: '1};
  assign cur_req_valid = left[0] > 0;
  assign sw_req_valid  = left[1] > 0;
  assign pr_req_valid  = left[2] > 0;

  int cyc = 0;
  int q_due [$];
  logic [3:0] seq [$];       // owners in the order the memory saw them
  always @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) mem_req_ready <= ($urandom % 3) != 0;

  always @(posedge clk) begin
    cur_done <= 0; sw_done <= 0; pr_done <= 0;
    if (cur_start) begin left[0] = 1 + $urandom % 20; pend[0] = left[0]; end
    if (sw_start)  begin left[1] = 1 + $urandom % 40; pend[1] = left[1]; end
    if (pr_start)  begin left[2] = 4; pend[2] = 4; end
    if (mem_req_valid && mem_req_ready) begin
      int o;
      o = int'(mem_req.addr[31:28]) - 1;
      seq.push_back(mem_req.addr[31:28]);
      check(o >= 0 && o < 3 && left[o] > 0, "request comes from an active unit");
      if (o >= 0 && o < 3) begin
        left[o]--;
        if (!mem_req.we) q_due.push_back(cyc + 2 + $urandom % 4);
        else begin pend[o]--; if (pend[o] == 0) pr_done <= 1; end
      end
    end
    if (cur_rsp_valid) begin pend[0]--; if (pend[0] == 0) cur_done <= 1; end
    if (sw_rsp_valid)  begin pend[1]--; if (pend[1] == 0) sw_done <= 1; end
    if (mem_rsp_valid) check(cur_rsp_valid ^ sw_rsp_valid, "response routed to exactly one unit");
  end
  always @(negedge clk) begin
    mem_rsp_valid = 0;
    if (q_due.size() > 0 && q_due[0] <= cyc) begin void'(q_due.pop_front()); mem_rsp_valid = 1; end
  end

  initial begin
    int n_pr;
    n_pr = 0;
    left = '{0, 0, 0}; pend = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      bit p;
      p = ($urandom % 2) == 1;
      n_pr += p;
      seq.delete();
      @(negedge clk); step_start = 1; pr_pending = p; @(negedge clk); step_start = 0;
      check(!idle && !cur_loaded && !sw_loaded, "step begins with nothing loaded");
      while (!cur_loaded) @(negedge clk);
      check(!sw_loaded, "current MBs before the search window");
      while (!idle) @(negedge clk);
      pr_pending = 0;
      check(cur_loaded && sw_loaded && enc_slot, "step ends in the encoder slot with all data on chip");
      begin
        int k, ph;
        bit ok;
        ok = 1; ph = 1;
        for (k = 0; k < seq.size(); k++) begin
          if (int'(seq[k]) < ph) ok = 0;
          ph = int'(seq[k]);
        end
        check(ok, "fixed order current MB -> search window -> partial results");
        check(p == (seq[seq.size()-1] == 4'd3), "partial results interval only when a buffer is pending");
      end
      repeat ($urandom % 5) @(negedge clk);
    end
    check(pr_slots_used == 32'(n_pr), "partial results interval count");
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
