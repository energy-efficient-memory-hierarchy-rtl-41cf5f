// candidates_merger: energy-aware candidate blocks merging.
//
// Several current MBs search the same search window at the same time, so the same
// candidate position is often requested by more than one of them (always in the first
// TZ step, often in later ones). The merger collects one burst of candidate
// positions from the search control, stores each distinct position once together
// with a mask of the MBs that asked for it, and then emits the distinct positions
// column by column: left to right, and top to bottom inside a column. Repeated
// candidates are thus processed together with one memory access, neighbouring
// candidates share memory lines, and candidates that touch the rightmost window
// column (the one being refilled during a search step) come last; they are held back
// while col_ready is low so processing can start before that column has arrived.
//
// Interface: collect phase: in_valid/in_ready with in_pos and in_slot; a one-cycle
// flush ends the burst (it may come with the last candidate). Drain phase: out_valid/
// out_ready, out_pos, out_mask, out_last on the final position. With an empty burst a
// single out_valid with out_mask = 0 and out_last is given so the consumer still sees
// the end of the burst. New input is accepted again once the drain is complete.
// Storage is DEPTH entries (design choice; enough for 9 MBs x 53 TZ points). One
// position is emitted per cycle; the smallest key is found by a linear search.
module candidates_merger
  import mvc_pkg::*;
#(
  parameter int unsigned N_SW  = 13,
  parameter int unsigned MAX_D = 9,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  pos_t                     in_pos,
  input  logic [$clog2(MAX_D)-1:0] in_slot,
  input  logic                     flush,
  input  logic                     col_ready,
  output logic                     out_valid,
  input  logic                     out_ready,
  output pos_t                     out_pos,
  output logic [MAX_D-1:0]         out_mask,
  output logic                     out_last,
  output logic [31:0]              merged_count,   // repeated candidates removed
  output logic [31:0]              held_count      // cycles held for the last column
);
  localparam int unsigned DW = $clog2(DEPTH + 1);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned LAST_COL_X = (N_SW - 1) * MB_PIX - (MB_PIX - 1);

  logic              v_q   [DEPTH];
  pos_t              pos_q [DEPTH];
  logic [MAX_D-1:0]  msk_q [DEPTH];
  logic [DW-1:0]     count;
  logic              draining;

  // collect: look for an equal position
  logic              hit;
  logic [IW-1:0]     hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < DEPTH; i++)
      if (!hit && v_q[i] && pos_q[i] == in_pos) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
  end

  assign in_ready = !draining && (hit || int'(count) < DEPTH);

  // drain: smallest (x, y) among valid entries
  logic          any;
  logic [IW-1:0] sel;
  logic [DW-1:0] n_valid;
  always_comb begin
    any     = 1'b0;
    sel     = '0;
    n_valid = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (v_q[i]) begin
        n_valid = n_valid + 1'b1;
        if (!any || pos_q[i] < pos_q[sel]) begin
          any = 1'b1;
          sel = IW'(i);
        end
      end
    end
  end

  logic hold;
  assign hold      = any && (int'(pos_q[sel].x) >= LAST_COL_X) && !col_ready;
  assign out_valid = draining && !hold;
  assign out_pos   = any ? pos_q[sel] : '0;
  assign out_mask  = any ? msk_q[sel] : '0;
  assign out_last  = (n_valid <= 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      draining     <= 1'b0;
      merged_count <= '0;
      held_count   <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        v_q[i]   <= 1'b0;
        pos_q[i] <= '0;
        msk_q[i] <= '0;
      end
    end else if (!draining) begin
      if (in_valid && in_ready) begin
        if (hit) begin
          msk_q[hit_idx][in_slot] <= 1'b1;
          merged_count <= merged_count + 1;
        end else begin
          v_q[IW'(count)]   <= 1'b1;
          pos_q[IW'(count)] <= in_pos;
          msk_q[IW'(count)] <= MAX_D'(1) << in_slot;
          count        <= count + 1'b1;
        end
      end
      if (flush) draining <= 1'b1;
    end else begin
      if (hold) held_count <= held_count + 1;
      if (out_valid && out_ready) begin
        if (any) v_q[sel] <= 1'b0;
        if (out_last) begin
          draining <= 1'b0;
          count    <= '0;
        end
      end
    end
  end

  // a burst must never overflow the store
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !draining) |-> in_ready);

endmodule
