// sync_fifo: single-clock first-in first-out queue.
//
// Used as the garbage-collection queue of the cube: every time a block is
// relocated, its old physical address is pushed here so that the processor
// can erase it in an idle period; it is also the storage of the bad-block
// queue. A circular buffer of DEPTH words with a read and a write pointer;
// `dout` shows the head word whenever `empty` is low (first-word
// fall-through). A push when full is dropped and sets the sticky `overflow`
// flag, cleared by `clr_ovf`. A pop when empty is ignored. Simultaneous
// push and pop are allowed. Depth is this design's choice (the cube only
// calls these queues small FIFOs). Timing: one cycle from push to `empty`
// low.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count,
  output logic         overflow,
  input  logic         clr_ovf
);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [AW:0]   cnt_q;
  logic          ovf_q;

  wire do_push = push && (!full || pop);
  wire do_pop  = pop && !empty;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (do_push) mem[wp_q] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else begin
      if (do_push) wp_q <= inc(wp_q);
      if (do_pop)  rp_q <= inc(rp_q);
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) ovf_q <= 1'b1;
      else if (clr_ovf)     ovf_q <= 1'b0;
    end
  end

  assign dout     = mem[rp_q];
  assign empty    = (cnt_q == '0);
  assign full     = (cnt_q == (AW+1)'(DEPTH));
  assign count    = cnt_q;
  assign overflow = ovf_q;

  // a pop must only be issued on a non-empty queue
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("sync_fifo: pop while empty");
endmodule
