// current_mb_buffer: on-chip store of the current MBs of the dependent frames.
//
// In reference-centered data reuse one search window serves the MBs of all D
// dependent frames that reference it, so up to MAX_D current MBs (9 for 8-view IBP)
// are held at a time. Organization follows the video memory: one slot per dependent
// frame, each slot 16 rows of 128 bits (one MB), written one row per cycle by the
// current-MB address generation unit and read as a whole MB by the processing
// elements, one cycle after rd_en (rd_valid marks the data).
module current_mb_buffer
  import mvc_pkg::*;
#(
  parameter int unsigned MAX_D = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(MAX_D)-1:0]  wr_slot,
  input  logic [3:0]                wr_row,
  input  mb_row_t                   wr_data,
  input  logic                      rd_en,
  input  logic [$clog2(MAX_D)-1:0]  rd_slot,
  output logic                      rd_valid,
  output mb_t                       rd_data
);
  mb_t buf_q [MAX_D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MAX_D; s++) buf_q[s] <= '0;
    end else if (wr_en) begin
      buf_q[wr_slot][wr_row] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rd_data <= buf_q[rd_slot];
    end
  end

endmodule
