// mvc_mem_hier_top: reference-centered memory hierarchy for ME/DE in multiview coding.
//
// One search window of the reference frame is fetched once and every MB of every
// dependent frame that searches in it is processed while it is on chip. The top wires:
//   search_control      window stepping, TZ-style candidate bursts, result records
//   candidates_merger   removes repeated candidates, column-by-column order
//   onchip_video_memory 16 x 128-bit banks, N_SW*N_SW lines, rotating sectors
//   power_gating_ctrl   statistical line power states, wake-up on access
//   current_mb_buffer   current MBs of the dependent frames
//   agu_current_mb / agu_search_window / agu_partial_results   address generation
//   ext_mem_scheduler   fixed per-step schedule of the external memory port
//   partial_results_compressor  vector prediction, SAD quantization, Huffman, 512-bit buffer
//
// Not part of this RTL (ports instead): the processing elements, which receive the
// merged candidate stream (cand_*), read the video memory (pe_vm_*) and the current MB
// buffer (pe_cb_*) and return the best position/SAD per dependent frame after each
// burst (pe_res_*); the external memory (mem_*, one 128-bit beat per request, read data
// in order); and the MVC encoder, which may use the memory while enc_slot is high.
//
// Configuration is static during a frame: start begins one reference frame, done
// pulses at its end. d_me / d_de for the power gating are counted from dep_en and
// dep_is_de.
// The busy outputs of the three AGUs and the scheduler's count of partial-result
// intervals are not needed inside the top (the schedule only uses the done pulses)
// and are left unconnected. rst_n is the asynchronous reset of all flops; it also
// appears in the `disable iff` of the handshake assertions in the submodules, which
// lint reports as a synchronous use of the same net.
module mvc_mem_hier_top
  import mvc_pkg::*;
#(
  parameter int unsigned N_SW       = 13,
  parameter int unsigned MAX_D      = 9,
  parameter int unsigned W_MAX      = 120,
  parameter int unsigned CAND_DEPTH = 512,
  parameter int unsigned MAX_ROUNDS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // frame configuration and control
  input  logic                     start,
  input  logic                     first_frame,
  input  logic [7:0]               frame_w_mb,
  input  logic [7:0]               frame_h_mb,
  input  logic [15:0]              stride,
  input  logic [ADDR_W-1:0]        ref_base,
  input  logic [MAX_D-1:0]         dep_en,
  input  logic [MAX_D-1:0]         dep_is_de,
  input  logic [ADDR_W-1:0]        dep_base [MAX_D],
  input  logic signed [7:0]        gdv_x [MAX_D],
  input  logic signed [7:0]        gdv_y [MAX_D],
  input  logic [ADDR_W-1:0]        pr_region_base,
  input  logic [ADDR_W-1:0]        pr_region_size,
  input  logic [$clog2(N_SW+1)-1:0] sw_used,
  output logic                     busy,
  output logic                     done,
  // offline statistics
  input  logic                     off_we,
  input  logic                     off_de,
  input  logic [$clog2(N_SW*N_SW)-1:0] off_idx,
  input  logic [15:0]              off_data,
  // external memory
  output logic                     mem_req_valid,
  input  logic                     mem_req_ready,
  output mem_req_t                 mem_req,
  input  logic                     mem_rsp_valid,
  input  logic [BUS_W-1:0]         mem_rsp_data,
  output logic                     enc_slot,
  // processing elements
  output logic                     cand_valid,
  input  logic                     cand_ready,
  output pos_t                     cand_pos,
  output logic [MAX_D-1:0]         cand_mask,
  output logic                     cand_last,
  input  logic                     pe_vm_rd_req,
  input  logic [$clog2(N_SW)-1:0]  pe_vm_rd_col,
  input  logic [$clog2(N_SW)-1:0]  pe_vm_rd_row,
  output logic                     pe_vm_rd_gnt,
  output logic                     pe_vm_rd_valid,
  output mb_t                      pe_vm_rd_data,
  output logic                     pe_vm_rd_lost,
  input  logic                     pe_cb_rd_en,
  input  logic [$clog2(MAX_D)-1:0] pe_cb_rd_slot,
  output logic                     pe_cb_rd_valid,
  output mb_t                      pe_cb_rd_data,
  input  logic                     pe_res_valid,
  input  pos_t                     pe_res_pos [MAX_D],
  input  logic [SAD_W-1:0]         pe_res_sad [MAX_D],
  // statistics
  output logic [31:0]              stat_steps,
  output logic [31:0]              stat_rounds,
  output logic [31:0]              stat_merged,
  output logic [31:0]              stat_col_hold,
  output logic [31:0]              stat_wakeups,
  output logic [31:0]              stat_pr_buffers,
  output logic [31:0]              stat_pr_escapes,
  output logic [31:0]              stat_pr_stalls,
  output logic [31:0]              stat_records
);
  localparam int unsigned CW  = $clog2(N_SW);
  localparam int unsigned SLW = $clog2(MAX_D);

  // ---- search control ---------------------------------------------------------
  logic                step_start, cur_loaded, sw_loaded, sched_idle;
  logic [MAX_D-1:0]    cur_active;
  logic [7:0]          cur_mb_x [MAX_D];
  logic [7:0]          cur_mb_y [MAX_D];
  logic signed [9:0]   sw_col_x, sw_top_y;
  logic [$clog2(N_SW+1)-1:0] sw_ncols;
  logic [CW-1:0]       sw_dst_col;
  logic                mem_step, pg_frame_start, pg_apply, pg_frame_end, pg_map_ready;
  logic                sc_cand_valid, sc_cand_ready, sc_cand_flush;
  pos_t                sc_cand_pos;
  logic [SLW-1:0]      sc_cand_slot;
  logic                rec_valid, rec_ready, pr_frame_start, pr_flush, pr_flush_done;
  pr_rec_t             rec;
  logic                pr_pending;
  logic [PR_BUF_W-1:0] pr_buf;

  search_control #(.N_SW(N_SW), .MAX_D(MAX_D), .MAX_ROUNDS(MAX_ROUNDS)) u_sc (
    .clk, .rst_n, .start, .frame_w_mb, .frame_h_mb, .dep_en, .gdv_x, .gdv_y, .dep_is_de,
    .busy, .done,
    .step_start, .cur_loaded, .sw_loaded, .sched_idle, .cur_active, .cur_mb_x, .cur_mb_y,
    .sw_col_x, .sw_top_y, .sw_ncols, .sw_dst_col,
    .mem_step, .pg_frame_start, .pg_apply, .pg_frame_end, .pg_map_ready,
    .cand_valid(sc_cand_valid), .cand_ready(sc_cand_ready), .cand_pos(sc_cand_pos),
    .cand_slot(sc_cand_slot), .cand_flush(sc_cand_flush),
    .pe_res_valid, .pe_res_pos, .pe_res_sad,
    .rec_valid, .rec_ready, .rec, .pr_frame_start, .pr_flush, .pr_flush_done, .pr_pending,
    .steps(stat_steps), .rounds(stat_rounds));

  // ---- candidates merging -------------------------------------------------------
  candidates_merger #(.N_SW(N_SW), .MAX_D(MAX_D), .DEPTH(CAND_DEPTH)) u_merge (
    .clk, .rst_n,
    .in_valid(sc_cand_valid), .in_ready(sc_cand_ready), .in_pos(sc_cand_pos),
    .in_slot(sc_cand_slot), .flush(sc_cand_flush), .col_ready(sw_loaded),
    .out_valid(cand_valid), .out_ready(cand_ready), .out_pos(cand_pos),
    .out_mask(cand_mask), .out_last(cand_last),
    .merged_count(stat_merged), .held_count(stat_col_hold));

  // ---- external memory schedule and AGUs ---------------------------------------------
  logic     cur_start, cur_done, cur_req_valid, cur_req_ready, cur_rsp_valid;
  mem_req_t cur_req;
  logic     sw_start, sw_done, sw_req_valid, sw_req_ready, sw_rsp_valid;
  mem_req_t sw_req;
  logic     pr_start, pr_done, pr_req_valid, pr_req_ready;
  mem_req_t pr_req;

  ext_mem_scheduler u_sched (
    .clk, .rst_n, .step_start,
    .cur_start, .cur_done, .cur_req_valid, .cur_req, .cur_req_ready, .cur_rsp_valid,
    .sw_start, .sw_done, .sw_req_valid, .sw_req, .sw_req_ready, .sw_rsp_valid,
    .pr_pending, .pr_start, .pr_done, .pr_req_valid, .pr_req, .pr_req_ready,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid,
    .enc_slot, .cur_loaded, .sw_loaded, .idle(sched_idle), .pr_slots_used());

  logic          cb_wr_en;
  logic [SLW-1:0] cb_wr_slot;
  logic [3:0]    cb_wr_row;
  mb_row_t       cb_wr_data;

  agu_current_mb #(.MAX_D(MAX_D)) u_agu_cur (
    .clk, .rst_n, .start(cur_start), .active(cur_active), .frame_base(dep_base),
    .mb_x(cur_mb_x), .mb_y(cur_mb_y), .stride,
    .req_valid(cur_req_valid), .req_ready(cur_req_ready), .req(cur_req),
    .rsp_valid(cur_rsp_valid), .rsp_data(mem_rsp_data),
    .wr_en(cb_wr_en), .wr_slot(cb_wr_slot), .wr_row(cb_wr_row), .wr_data(cb_wr_data),
    .busy(), .done(cur_done));

  logic          vm_wr_en;
  logic [CW-1:0] vm_wr_col, vm_wr_row;
  logic [3:0]    vm_wr_bank;
  mb_row_t       vm_wr_data;

  agu_search_window #(.N_SW(N_SW)) u_agu_sw (
    .clk, .rst_n, .start(sw_start), .ref_base, .stride, .frame_w_mb, .frame_h_mb,
    .col_x(sw_col_x), .top_y(sw_top_y), .ncols(sw_ncols), .dst_col(sw_dst_col),
    .req_valid(sw_req_valid), .req_ready(sw_req_ready), .req(sw_req),
    .rsp_valid(sw_rsp_valid), .rsp_data(mem_rsp_data),
    .wr_en(vm_wr_en), .wr_col(vm_wr_col), .wr_row(vm_wr_row), .wr_bank(vm_wr_bank),
    .wr_data(vm_wr_data), .busy(), .done(sw_done));

  agu_partial_results u_agu_pr (
    .clk, .rst_n, .init(pr_frame_start), .region_base(pr_region_base),
    .region_size(pr_region_size), .start(pr_start), .data(pr_buf),
    .req_valid(pr_req_valid), .req_ready(pr_req_ready), .req(pr_req),
    .busy(), .done(pr_done), .buffers_written(stat_pr_buffers));

  // ---- on-chip storage ----------------------------------------------------------------
  current_mb_buffer #(.MAX_D(MAX_D)) u_cbuf (
    .clk, .rst_n, .wr_en(cb_wr_en), .wr_slot(cb_wr_slot), .wr_row(cb_wr_row),
    .wr_data(cb_wr_data), .rd_en(pe_cb_rd_en), .rd_slot(pe_cb_rd_slot),
    .rd_valid(pe_cb_rd_valid), .rd_data(pe_cb_rd_data));

  logic [CW-1:0]  vm_base;
  pstate_e        pstate [N_SW*N_SW];
  logic           wake_req;
  logic [$clog2(N_SW*N_SW)-1:0] wake_line;

  onchip_video_memory #(.N_SW(N_SW)) u_vmem (
    .clk, .rst_n, .step(mem_step), .base(vm_base),
    .wr_en(vm_wr_en), .wr_col(vm_wr_col), .wr_row(vm_wr_row), .wr_bank(vm_wr_bank),
    .wr_data(vm_wr_data),
    .rd_req(pe_vm_rd_req), .rd_col(pe_vm_rd_col), .rd_row(pe_vm_rd_row),
    .rd_gnt(pe_vm_rd_gnt), .rd_valid(pe_vm_rd_valid), .rd_data(pe_vm_rd_data),
    .rd_lost(pe_vm_rd_lost), .pstate, .wake_req, .wake_line);

  logic [3:0] d_me, d_de;
  always_comb begin
    d_me = '0;
    d_de = '0;
    for (int s = 0; s < MAX_D; s++) begin
      if (dep_en[s] &&  dep_is_de[s]) d_de = d_de + 1'b1;
      if (dep_en[s] && !dep_is_de[s]) d_me = d_me + 1'b1;
    end
  end

  power_gating_ctrl #(.N_SW(N_SW)) u_pg (
    .clk, .rst_n, .frame_start(pg_frame_start), .first_frame, .frame_end(pg_frame_end),
    .d_me, .d_de, .sw_used, .map_ready(pg_map_ready),
    .off_we, .off_de, .off_idx, .off_data,
    .acc_valid(pe_vm_rd_gnt), .acc_col(pe_vm_rd_col), .acc_row(pe_vm_rd_row),
    .apply(pg_apply), .base(vm_base), .wake_req, .wake_line, .pstate,
    .wake_count(stat_wakeups));

  // ---- partial results ------------------------------------------------------------------
  partial_results_compressor #(.MAX_D(MAX_D), .W_MAX(W_MAX)) u_prc (
    .clk, .rst_n, .frame_start(pr_frame_start), .rec_valid, .rec_ready, .rec,
    .flush(pr_flush), .flush_done(pr_flush_done),
    .buf_valid(pr_pending), .buf_data(pr_buf), .buf_ack(pr_start),
    .records(stat_records), .escapes(stat_pr_escapes), .stall_cycles(stat_pr_stalls));

endmodule
