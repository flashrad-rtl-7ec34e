// free_block_table: the partial free-block table used for wear leveling.
//
// The processor scans the array for erased blocks with the lowest
// program/erase counts and writes their physical block numbers into this
// table; hardware hands them out in order whenever a write needs a fresh
// block (a first write to an unmapped logical block, or a relocation after
// a program failure). It is a "write-addressable FIFO": a circular buffer
// whose slots the processor writes by index (`sw_we`, `sw_idx`, `sw_pbn`),
// each write marking the slot valid; allocation takes the slot at the head
// pointer, or the first valid slot after it, clears it and moves the head
// past it. A relocation asks for a block on a given die (its data sits in
// that die's write buffer): the first valid slot from the head whose die
// matches is taken, leaving the head where it is. Under sustained writes the table
// can run empty; allocation then falls back to a round-robin walk over all
// physical blocks, interleaving the dies (die = rr mod NUM_DIES, block = rr
// div NUM_DIES), starting from a processor-loaded position (for a die-restricted request,
// the next block of that die). The
// round-robin fallback follows the cube's description; that it does not
// check whether the block is actually free (the processor throttles writes
// in that case) and the die-interleaved order are this design's choices.
// Timing: `alloc_pbn` is combinational and valid with `alloc_req`; the
// table state updates on the clock edge.
module free_block_table
  import flash_pkg::*;
#(
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned NUM_CH   = NUM_DIES,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor side
  input  logic             sw_we,
  input  logic [AW-1:0]    sw_idx,
  input  logic [PBN_W-1:0] sw_pbn,
  input  logic             rr_load,
  input  logic [DIE_BLOCK_W-1:0] rr_blk,
  output logic [AW:0]      n_valid,
  output logic [AW-1:0]    head_idx,
  // allocation
  input  logic             alloc_req,
  input  logic             alloc_die_en,  // restrict to one die
  input  logic [DIE_SEL_W-1:0] alloc_die,
  output logic [PBN_W-1:0] alloc_pbn,
  output logic             alloc_rr      // allocation came from round robin
);
  logic [PBN_W-1:0] tbl [DEPTH];
  logic [DEPTH-1:0] vld_q;
  logic [AW-1:0]    head_q;
  logic [DIE_SEL_W-1:0]   rr_die_q;
  logic [DIE_BLOCK_W-1:0] rr_blk_q;

  // first valid (and, if asked, die-matching) slot at or after the head
  logic          head_ok;
  logic [AW-1:0] slot;
  always_comb begin
    logic [AW-1:0] s;
    logic [PBN_W-1:0] e;
    head_ok = 1'b0;
    slot    = head_q;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      s = AW'((32'(head_q) + k) % DEPTH);
      e = tbl[s];
      if (!head_ok && vld_q[s] &&
          (!alloc_die_en || e[DIE_BLOCK_W +: DIE_SEL_W] == alloc_die)) begin
        head_ok = 1'b1;
        slot    = s;
      end
    end
  end

  always_ff @(posedge clk) if (sw_we) tbl[sw_idx] <= sw_pbn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q    <= '0;
      head_q   <= '0;
      rr_die_q <= '0;
      rr_blk_q <= '0;
    end else begin
      if (alloc_req && head_ok) begin
        vld_q[slot] <= 1'b0;
        if (!alloc_die_en) head_q <= (slot == AW'(DEPTH - 1)) ? '0 : slot + 1'b1;
      end
      if (sw_we) vld_q[sw_idx] <= 1'b1;
      if (rr_load) begin
        rr_die_q <= '0;
        rr_blk_q <= rr_blk;
      end else if (alloc_req && !head_ok && alloc_die_en) begin
        rr_blk_q <= rr_blk_q + 1'b1;
      end else if (alloc_req && !head_ok) begin
        if (rr_die_q == DIE_SEL_W'(NUM_CH - 1)) begin
          rr_die_q <= '0;
          rr_blk_q <= rr_blk_q + 1'b1;
        end else begin
          rr_die_q <= rr_die_q + 1'b1;
        end
      end
    end
  end

  assign alloc_rr  = !head_ok;
  assign alloc_pbn = head_ok ? tbl[slot]
                             : {{(PBN_W-DIE_SEL_W-DIE_BLOCK_W){1'b0}},
                                (alloc_die_en ? alloc_die : rr_die_q), rr_blk_q};
  assign n_valid   = (AW+1)'($countones(vld_q));
  assign head_idx  = head_q;
endmodule
