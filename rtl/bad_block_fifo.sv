// bad_block_fifo: queue of suspect flash blocks for the processor.
//
// When a program or erase reports failure, or a read needed more bit
// corrections than a programmable threshold, the failing physical block is
// entered here together with a marker telling the cases apart (write
// failure, read errors, erase failure). While the queue holds anything the
// level interrupt `irq` is raised; the processor reads the head entry and
// pops it, then tests, returns or retires the block. The cause markers and
// the interrupt follow the cube's bad-block scheme; depth, encoding and the
// level-type interrupt are this design's choice. Timing: `irq` rises one
// clock after the first push.
module bad_block_fifo
  import flash_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  bb_cause_e        push_cause,
  input  logic [PBN_W-1:0] push_pbn,
  input  logic             pop,
  output bb_cause_e        head_cause,
  output logic [PBN_W-1:0] head_pbn,
  output logic             irq,
  output logic             full,
  output logic             overflow,
  input  logic             clr_ovf
);
  localparam int unsigned EW = PBN_W + 2;
  logic [EW-1:0] head;
  logic          empty;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.W(EW), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .push, .din({push_cause, push_pbn}),
    .pop(pop && !empty), .dout(head),
    .empty, .full, .count, .overflow, .clr_ovf
  );

  assign head_cause = bb_cause_e'(head[EW-1 -: 2]);
  assign head_pbn   = head[PBN_W-1:0];
  assign irq        = !empty;
endmodule
