// agu_partial_results: address generation for partial results write-back.
//
// The compressed partial results leave the chip in whole 512-bit buffers. This AGU
// writes each buffer as four 128-bit beats to serial addresses of a dedicated
// region: the write pointer starts at region_base on `init` and advances by 64 bytes
// per buffer, wrapping after region_size bytes (wrapping is a design choice).
// Beat i carries buffer bits [511-128*i -: 128], i.e. the start of the bit stream
// goes to the lowest address.
//
// Timing: `start` with the buffer in `data` begins a write of four beats, one per
// cycle while req_ready is high; `done` pulses after the last beat is accepted.
module agu_partial_results
  import mvc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic [ADDR_W-1:0]     region_base,
  input  logic [ADDR_W-1:0]     region_size,
  input  logic                  start,
  input  logic [PR_BUF_W-1:0]   data,
  output logic                  req_valid,
  input  logic                  req_ready,
  output mem_req_t              req,
  output logic                  busy,
  output logic                  done,
  output logic [31:0]           buffers_written
);
  localparam int unsigned BEATS = PR_BUF_W / BUS_W;

  logic [ADDR_W-1:0]   ptr;       // offset in the region
  logic [PR_BUF_W-1:0] data_q;
  logic [1:0]          beat;

  assign req_valid = busy;
  always_comb begin
    req.we    = 1'b1;
    req.addr  = region_base + ptr + ADDR_W'(int'(beat) * (BUS_W / 8));
    req.wdata = data_q[PR_BUF_W-1 - int'(beat)*BUS_W -: BUS_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; data_q <= '0; beat <= '0; busy <= 1'b0; done <= 1'b0;
      buffers_written <= '0;
    end else begin
      done <= 1'b0;
      if (init) begin
        ptr  <= '0;
        buffers_written <= '0;
      end
      if (start && !busy) begin
        busy   <= 1'b1;
        data_q <= data;
        beat   <= '0;
      end else if (busy && req_ready) begin
        beat <= beat + 1'b1;
        if (int'(beat) == BEATS - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          buffers_written <= buffers_written + 1;
          ptr <= (ptr + ADDR_W'(PR_BUF_W / 8) >= region_size) ? '0 : ptr + ADDR_W'(PR_BUF_W / 8);
        end
      end
    end
  end

endmodule
