// agu_search_window: address generation for search window fetches.
//
// The search control asks for search window data in video positions: NCOLS MB
// columns starting at MB column col_x of the reference frame, each N_SW MBs tall
// starting at MB row top_y. The AGU turns this into one external read per MB pixel
// row (16 pixels = one 128-bit beat), column by column, MB row by MB row:
//   addr = ref_base + y * stride + x * 16
// with x clamped to the frame's MB columns and the pixel row y clamped to the frame
// height, so window parts outside the frame repeat the border pixels (border
// handling is a design choice; the published text does not cover it).
// Read data comes back in request order; each beat is written into the on-chip
// video memory at logical column dst_col + column, MB row, bank = pixel row.
// A single-column fetch (one search step) is N_SW*16 beats, the initial full window
// at the start of a frame line N_SW*N_SW*16 beats.
//
// Timing: `start` latches the request; requests issue one per cycle while req_ready
// is high; `done` pulses one cycle after the last response.
module agu_search_window
  import mvc_pkg::*;
#(
  parameter int unsigned N_SW = 13
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [ADDR_W-1:0]        ref_base,
  input  logic [15:0]              stride,      // bytes per pixel row
  input  logic [7:0]               frame_w_mb,
  input  logic [7:0]               frame_h_mb,
  input  logic signed [9:0]        col_x,       // MB column of the first fetched column
  input  logic signed [9:0]        top_y,       // MB row of the window top
  input  logic [$clog2(N_SW+1)-1:0] ncols,
  input  logic [$clog2(N_SW)-1:0]  dst_col,
  // external memory
  output logic                     req_valid,
  input  logic                     req_ready,
  output mem_req_t                 req,
  input  logic                     rsp_valid,
  input  logic [BUS_W-1:0]         rsp_data,
  // on-chip memory write
  output logic                     wr_en,
  output logic [$clog2(N_SW)-1:0]  wr_col,
  output logic [$clog2(N_SW)-1:0]  wr_row,
  output logic [3:0]               wr_bank,
  output mb_row_t                  wr_data,
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned CW = $clog2(N_SW);
  localparam int unsigned NW = $clog2(N_SW + 1);

  logic [ADDR_W-1:0]  base_q;
  logic [15:0]        stride_q;
  logic [7:0]         w_q, h_q;
  logic signed [9:0]  x0_q, y0_q;
  logic [NW-1:0]      ncols_q;
  logic [CW-1:0]      dst_q;

  // request and response counters: column, MB row, pixel row
  logic [NW-1:0] qc, rc;
  logic [CW-1:0] qr, rr;
  logic [3:0]    qp, rp;
  logic          req_left;

  // address of the current request
  always_comb begin
    int signed x, y;
    x = int'(x0_q) + int'(qc);
    if (x < 0) x = 0;
    if (x > int'(w_q) - 1) x = int'(w_q) - 1;
    y = (int'(y0_q) + int'(qr)) * MB_PIX + int'(qp);
    if (y < 0) y = 0;
    if (y > int'(h_q) * MB_PIX - 1) y = int'(h_q) * MB_PIX - 1;
    req.we    = 1'b0;
    req.wdata = '0;
    req.addr  = base_q + ADDR_W'(y) * ADDR_W'(stride_q) + ADDR_W'(x * MB_PIX);
  end

  assign req_valid = busy && req_left;
  assign wr_en     = busy && rsp_valid;
  assign wr_col    = CW'((int'(dst_q) + int'(rc)) % N_SW);
  assign wr_row    = rr;
  assign wr_bank   = rp;
  assign wr_data   = rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; req_left <= 1'b0;
      base_q <= '0; stride_q <= '0; w_q <= '0; h_q <= '0;
      x0_q <= '0; y0_q <= '0; ncols_q <= '0; dst_q <= '0;
      qc <= '0; qr <= '0; qp <= '0; rc <= '0; rr <= '0; rp <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= (ncols != '0); done <= (ncols == '0); req_left <= (ncols != '0);
        base_q <= ref_base; stride_q <= stride; w_q <= frame_w_mb; h_q <= frame_h_mb;
        x0_q <= col_x; y0_q <= top_y; ncols_q <= ncols; dst_q <= dst_col;
        qc <= '0; qr <= '0; qp <= '0; rc <= '0; rr <= '0; rp <= '0;
      end else if (busy) begin
        if (req_valid && req_ready) begin
          qp <= qp + 1'b1;
          if (qp == 4'd15) begin
            if (int'(qr) == N_SW - 1) begin
              qr <= '0;
              qc <= qc + 1'b1;
              if (qc + 1'b1 == ncols_q) req_left <= 1'b0;
            end else qr <= qr + 1'b1;
          end
        end
        if (rsp_valid) begin
          rp <= rp + 1'b1;
          if (rp == 4'd15) begin
            if (int'(rr) == N_SW - 1) begin
              rr <= '0;
              rc <= rc + 1'b1;
              if (rc + 1'b1 == ncols_q) begin
                busy <= 1'b0;
                done <= 1'b1;
              end
            end else rr <= rr + 1'b1;
          end
        end
      end
    end
  end

endmodule
