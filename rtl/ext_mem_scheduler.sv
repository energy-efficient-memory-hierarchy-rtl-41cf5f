// ext_mem_scheduler: fixed external memory access schedule of one processing step.
//
// Three address generation units share the external memory port. Instead of
// arbitrating between them, every search step follows the same fixed order:
//   1. current MBs   (D MBs of the dependent frames, so processing can start:
//                     most of the search window is already on chip),
//   2. search window (the missing column, n MBs; the whole window at a line start),
//   3. partial results (one 512-bit buffer, only if the compressor has a full one),
//   4. MVC encoder   (the port is released, enc_slot is high until the next step).
// The lengths of the intervals change with D and n, the order never does.
// The scheduler starts each AGU in turn, connects its request stream to the memory
// port and returns read data to the AGU that owns the current interval (reads are
// answered in order, and an interval ends only after its last response).
//
// Status: cur_loaded / sw_loaded rise when the current MBs / window data of this step
// are on chip and stay high until the next step_start.
module ext_mem_scheduler
  import mvc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step_start,
  output logic         cur_start,
  input  logic         cur_done,
  input  logic         cur_req_valid,
  input  mem_req_t     cur_req,
  output logic         cur_req_ready,
  output logic         cur_rsp_valid,
  output logic         sw_start,
  input  logic         sw_done,
  input  logic         sw_req_valid,
  input  mem_req_t     sw_req,
  output logic         sw_req_ready,
  output logic         sw_rsp_valid,
  input  logic         pr_pending,
  output logic         pr_start,
  input  logic         pr_done,
  input  logic         pr_req_valid,
  input  mem_req_t     pr_req,
  output logic         pr_req_ready,
  // external memory port
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output mem_req_t     mem_req,
  input  logic         mem_rsp_valid,
  // status
  output logic         enc_slot,
  output logic         cur_loaded,
  output logic         sw_loaded,
  output logic         idle,
  output logic [31:0]  pr_slots_used
);
  typedef enum logic [2:0] {S_IDLE, S_CUR, S_SW, S_PR, S_ENC} sched_e;
  sched_e st;

  assign idle     = (st == S_IDLE) || (st == S_ENC);
  assign enc_slot = (st == S_ENC);

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    cur_req_ready = 1'b0;
    sw_req_ready  = 1'b0;
    pr_req_ready  = 1'b0;
    unique case (st)
      S_CUR: begin mem_req_valid = cur_req_valid; mem_req = cur_req; cur_req_ready = mem_req_ready; end
      S_SW:  begin mem_req_valid = sw_req_valid;  mem_req = sw_req;  sw_req_ready  = mem_req_ready; end
      S_PR:  begin mem_req_valid = pr_req_valid;  mem_req = pr_req;  pr_req_ready  = mem_req_ready; end
      default: ;
    endcase
  end
  assign cur_rsp_valid = (st == S_CUR) && mem_rsp_valid;
  assign sw_rsp_valid  = (st == S_SW)  && mem_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur_start <= 1'b0; sw_start <= 1'b0; pr_start <= 1'b0;
      cur_loaded <= 1'b0; sw_loaded <= 1'b0; pr_slots_used <= '0;
    end else begin
      cur_start <= 1'b0; sw_start <= 1'b0; pr_start <= 1'b0;
      unique case (st)
        S_IDLE, S_ENC: if (step_start) begin
          st         <= S_CUR;
          cur_start  <= 1'b1;
          cur_loaded <= 1'b0;
          sw_loaded  <= 1'b0;
        end
        S_CUR: if (cur_done) begin
          st         <= S_SW;
          sw_start   <= 1'b1;
          cur_loaded <= 1'b1;
        end
        S_SW: if (sw_done) begin
          sw_loaded <= 1'b1;
          if (pr_pending) begin
            st       <= S_PR;
            pr_start <= 1'b1;
            pr_slots_used <= pr_slots_used + 1;
          end else st <= S_ENC;
        end
        S_PR: if (pr_done) st <= S_ENC;
        default: st <= S_IDLE;
      endcase
    end
  end

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({cur_req_ready, sw_req_ready, pr_req_ready}));

endmodule
