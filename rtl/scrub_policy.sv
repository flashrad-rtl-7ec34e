// scrub_policy: decides what background scrubbing does with a block.
//
// The cube's baseline scrub rule combines the bit errors a read needed to
// correct with the block's program/erase count: below the error threshold
// nothing happens; above it the block is re-written in place while it is
// young, and relocated to a fresh block once its program/erase count has
// passed the wear threshold. Both thresholds are programmable registers
// (`cfg_we` loads them). This block only takes the decision; moving data is
// done by the processor and the channels. The comparison direction (errors
// at or above the threshold trigger) and register widths are this design's
// choice. Timing: the action is registered, valid one clock after `eval`.
module scrub_policy
  import flash_pkg::*;
#(
  parameter int unsigned ERR_W = 2,
  parameter int unsigned PE_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [ERR_W-1:0] cfg_err_thresh,
  input  logic [PE_W-1:0]  cfg_pe_thresh,
  input  logic             eval,
  input  logic [ERR_W-1:0] err_cnt,
  input  logic             uncorrectable,
  input  logic [PE_W-1:0]  pe_cnt,
  output logic             act_valid,
  output scrub_act_e       action
);
  logic [ERR_W-1:0] err_th_q;
  logic [PE_W-1:0]  pe_th_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_th_q  <= ERR_W'(1);
      pe_th_q   <= PE_W'(3000);
      act_valid <= 1'b0;
      action    <= SCRUB_NONE;
    end else begin
      if (cfg_we) begin
        err_th_q <= cfg_err_thresh;
        pe_th_q  <= cfg_pe_thresh;
      end
      act_valid <= eval;
      if (eval) begin
        if (!uncorrectable && err_cnt < err_th_q) action <= SCRUB_NONE;
        else if (pe_cnt >= pe_th_q)               action <= SCRUB_RELOCATE;
        else                                      action <= SCRUB_REWRITE;
      end
    end
  end
endmodule
