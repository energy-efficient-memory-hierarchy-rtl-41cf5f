// agu_current_mb: address generation for the current MBs of the dependent frames.
//
// At the start of a search step the search control names, for every dependent frame
// d whose bit is set in `active`, the frame's base address and the MB position that
// this search window serves (the window position moved back by the frame's global
// disparity vector). The AGU reads the 16 pixel rows of each such MB, one 128-bit
// beat each (addr = base + (mb_y*16 + row) * stride + mb_x*16), and writes them into
// the current MB buffer, slot d, row by row. Frames are visited in slot order, so a
// step moves D MBs (D = number of active dependent frames), as in the published
// schedule.
//
// Timing: `start` latches the request; one request per cycle while req_ready is
// high; responses arrive in order; `done` pulses after the last response (or one
// cycle after start when no slot is active).
module agu_current_mb
  import mvc_pkg::*;
#(
  parameter int unsigned MAX_D = 9
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [MAX_D-1:0]         active,
  input  logic [ADDR_W-1:0]        frame_base [MAX_D],
  input  logic [7:0]               mb_x [MAX_D],
  input  logic [7:0]               mb_y [MAX_D],
  input  logic [15:0]              stride,
  output logic                     req_valid,
  input  logic                     req_ready,
  output mem_req_t                 req,
  input  logic                     rsp_valid,
  input  logic [BUS_W-1:0]         rsp_data,
  output logic                     wr_en,
  output logic [$clog2(MAX_D)-1:0] wr_slot,
  output logic [3:0]               wr_row,
  output mb_row_t                  wr_data,
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned SW_ = $clog2(MAX_D);

  logic [MAX_D-1:0]  act_q;     // slots still to request
  logic [MAX_D-1:0]  pend_q;    // slots still to receive
  logic [3:0]        qp, rp;
  logic [SW_-1:0]    qs, rs;

  function automatic logic [SW_-1:0] first_set(input logic [MAX_D-1:0] m);
    first_set = '0;
    for (int i = MAX_D - 1; i >= 0; i--) if (m[i]) first_set = SW_'(i);
  endfunction

  assign qs = first_set(act_q);
  assign rs = first_set(pend_q);

  always_comb begin
    req.we    = 1'b0;
    req.wdata = '0;
    req.addr  = frame_base[qs]
              + ADDR_W'((int'(mb_y[qs]) * MB_PIX + int'(qp))) * ADDR_W'(stride)
              + ADDR_W'(int'(mb_x[qs]) * MB_PIX);
  end

  assign req_valid = busy && (act_q != '0);
  assign wr_en     = busy && rsp_valid;
  assign wr_slot   = rs;
  assign wr_row    = rp;
  assign wr_data   = rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      act_q <= '0; pend_q <= '0; qp <= '0; rp <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= (active != '0);
        done   <= (active == '0);
        act_q  <= active;
        pend_q <= active;
        qp     <= '0;
        rp     <= '0;
      end else if (busy) begin
        if (req_valid && req_ready) begin
          qp <= qp + 1'b1;
          if (qp == 4'd15) act_q[qs] <= 1'b0;
        end
        if (rsp_valid) begin
          rp <= rp + 1'b1;
          if (rp == 4'd15) begin
            pend_q[rs] <= 1'b0;
            if ((pend_q & ~(MAX_D'(1) << rs)) == '0) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
