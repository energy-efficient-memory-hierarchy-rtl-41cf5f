// onchip_video_memory: search window store of the reference-centered hierarchy.
//
// Organization (follows the published physical organization): 16 parallel SRAM
// banks, 128 bits wide, each line of a bank holding one 16-pixel row of an MB, so a
// single line address delivers a whole MB from all banks at once. The N_SW*N_SW lines
// are grouped in N_SW sectors of N_SW lines; a sector holds one search window column.
// Logically the window is a circular buffer: after each search step the leftmost
// column is dropped and a new rightmost column is fetched. Physically no data moves;
// the sectors are renamed instead: logical column c lives in sector (c + base) mod
// N_SW, and `step` advances base by one, so the old leftmost sector becomes the new
// rightmost column, ready to be overwritten.
//
// Power gating (line level): `pstate` gives the state of every physical line. A
// line in S3 (on) is read normally. A read of a line in S1/S2/S0 is not served: the
// memory raises `wake_req` with the physical line and holds off `rd_valid` until
// the line is reported on. A line in S0 loses its contents: every bank of such a line
// is marked lost, a lost bank reads as zero and `rd_lost` flags it, until that bank is
// written again. Writes are accepted in every state except S0, where they are
// dropped (design choice: the published text does not describe writes to gated lines).
//
// Interface/timing: write one bank row per cycle (wr_col/wr_row logical, wr_bank =
// pixel row). Read: rd_req with logical rd_col/rd_row; when the line is on the whole
// MB appears on rd_data one cycle later with rd_valid. rd_gnt pulses for each served
// read (used for access statistics).
module onchip_video_memory
  import mvc_pkg::*;
#(
  parameter int unsigned N_SW = 13
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sector renaming
  input  logic                     step,
  output logic [$clog2(N_SW)-1:0]  base,
  // bank-row write port
  input  logic                     wr_en,
  input  logic [$clog2(N_SW)-1:0]  wr_col,
  input  logic [$clog2(N_SW)-1:0]  wr_row,
  input  logic [3:0]               wr_bank,
  input  mb_row_t                  wr_data,
  // MB read port
  input  logic                     rd_req,
  input  logic [$clog2(N_SW)-1:0]  rd_col,
  input  logic [$clog2(N_SW)-1:0]  rd_row,
  output logic                     rd_gnt,
  output logic                     rd_valid,
  output mb_t                      rd_data,
  output logic                     rd_lost,
  // power gating
  input  pstate_e                  pstate [N_SW*N_SW],
  output logic                     wake_req,
  output logic [$clog2(N_SW*N_SW)-1:0] wake_line
);
  localparam int unsigned LINES = N_SW * N_SW;
  localparam int unsigned CW    = $clog2(N_SW);
  localparam int unsigned LW    = $clog2(LINES);

  mb_row_t     mem  [NBANK][LINES];
  logic [NBANK-1:0] lost [LINES];

  function automatic logic [LW-1:0] phys(input logic [CW-1:0] col, input logic [CW-1:0] row,
                                         input logic [CW-1:0] b);
    int unsigned sec;
    sec = (int'(col) + int'(b)) % N_SW;
    return LW'(sec * N_SW + int'(row));
  endfunction

  logic [LW-1:0] wr_line, rd_line;
  assign wr_line = phys(wr_col, wr_row, base);
  assign rd_line = phys(rd_col, rd_row, base);

  assign rd_gnt    = rd_req && (pstate[rd_line] == PS_ON);
  assign wake_req  = rd_req && (pstate[rd_line] != PS_ON);
  assign wake_line = rd_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) base <= '0;
    else if (step) base <= (int'(base) == N_SW - 1) ? '0 : base + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en && pstate[wr_line] != PS_OFF) mem[wr_bank][wr_line] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LINES; l++) lost[l] <= '1;
    end else begin
      for (int l = 0; l < LINES; l++)
        if (pstate[l] == PS_OFF) lost[l] <= '1;
      if (wr_en && pstate[wr_line] != PS_OFF) lost[wr_line][wr_bank] <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_lost  <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= rd_gnt;
      if (rd_gnt) begin
        rd_lost <= |lost[rd_line];
        for (int b = 0; b < NBANK; b++)
          rd_data[b] <= lost[rd_line][b] ? '0 : mem[b][rd_line];
      end
    end
  end

endmodule
