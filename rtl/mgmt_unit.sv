// mgmt_unit: hardware half of the cube's flash management.
//
// Channels report three kinds of event: a program that failed, a read that
// needed at least the programmable number of bit corrections (or could not be
// corrected), and an erase that failed. A round-robin arbiter takes one
// event at a time. For a failed program the unit relocates the logical block
// in hardware: it takes the next free block of the same die from the free-block table, rewrites
// the logical block table entry, pushes the failing block into the
// bad-block queue (marked "write failure") and the old block into the
// garbage-collection queue, and answers the channel with the new block so it
// can program the data it still holds in its write buffer. Read-error and
// erase-failure events only enter the bad-block queue with their marker.
// The bad-block queue raises the processor interrupt. What happens in
// hardware and which queues exist follow the cube's management scheme; the
// event handshake and the arbitration are this design's choices.
//
// Interface: a channel holds `evt_req[i]` with cause, block and logical
// block index until `evt_gnt[i]` pulses; `gnt_pbn` carries the new block with
// the grant of a relocation. The free-block allocation port is shared with
// the translation layer: the unit waits while `alloc_busy` is high.
// Timing: an event is retired 3 clocks after it is taken (relocation: 4 plus
// any wait for the table RAM).
module mgmt_unit
  import flash_pkg::*;
#(
  parameter int unsigned NUM_CH   = NUM_DIES,
  parameter int unsigned LBI_W    = LSA_W - 4,
  parameter int unsigned BB_DEPTH = 16,
  parameter int unsigned GC_DEPTH = 16,
  localparam int unsigned CW      = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // channel events
  input  logic [NUM_CH-1:0] evt_req,
  input  bb_cause_e         evt_cause [NUM_CH],
  input  logic [PBN_W-1:0]  evt_pbn   [NUM_CH],
  input  logic [LBI_W-1:0]  evt_lbi   [NUM_CH],
  output logic [NUM_CH-1:0] evt_gnt,
  output logic [PBN_W-1:0]  gnt_pbn,
  // free-block table
  output logic             alloc_req,
  output logic [DIE_SEL_W-1:0] alloc_die,
  input  logic [PBN_W-1:0] alloc_pbn,
  input  logic             alloc_busy,
  // logical block table update
  output logic             up_valid,
  input  logic             up_ready,
  output logic [LBI_W-1:0] up_lbi,
  output logic [PBN_W-1:0] up_pbn,
  // processor: bad-block queue
  output logic             bb_irq,
  input  logic             bb_pop,
  output bb_cause_e        bb_cause,
  output logic [PBN_W-1:0] bb_pbn,
  output logic             bb_overflow,
  // processor: garbage-collection queue
  input  logic             gc_pop,
  output logic             gc_empty,
  output logic [PBN_W-1:0] gc_pbn,
  output logic             gc_overflow,
  input  logic             clr_ovf,
  // statistics
  output logic [15:0]      n_relocations
);
  typedef enum logic [2:0] {S_IDLE, S_ALLOC, S_UPD, S_LOG, S_GNT} st_e;
  st_e st_q;
  logic [CW-1:0]    cur_q, last_q;
  bb_cause_e        cause_q;
  logic [PBN_W-1:0] old_q, new_q;
  logic [LBI_W-1:0] lbi_q;
  logic [15:0]      nrel_q;

  // round-robin pick, starting after the last channel served
  logic          pick_ok;
  logic [CW-1:0] pick;
  always_comb begin
    int unsigned c;
    pick_ok = 1'b0;
    pick    = '0;
    for (int unsigned k = 1; k <= NUM_CH; k++) begin
      c = (int'(last_q) + k) % NUM_CH;
      if (!pick_ok && evt_req[c]) begin
        pick_ok = 1'b1;
        pick    = CW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      cur_q   <= '0;
      last_q  <= CW'(NUM_CH - 1);
      cause_q <= BB_NONE;
      old_q   <= '0;
      new_q   <= '0;
      lbi_q   <= '0;
      nrel_q  <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (pick_ok) begin
          cur_q   <= pick;
          cause_q <= evt_cause[pick];
          old_q   <= evt_pbn[pick];
          lbi_q   <= evt_lbi[pick];
          st_q    <= (evt_cause[pick] == BB_WRITE_FAIL) ? S_ALLOC : S_LOG;
        end
        S_ALLOC: if (!alloc_busy) begin
          new_q <= alloc_pbn;
          st_q  <= S_UPD;
        end
        S_UPD: if (up_ready) begin
          nrel_q <= nrel_q + 1'b1;
          st_q   <= S_LOG;
        end
        S_LOG: st_q <= S_GNT;
        S_GNT: begin
          last_q <= cur_q;
          st_q   <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign alloc_req = (st_q == S_ALLOC) && !alloc_busy;
  assign alloc_die = old_q[DIE_BLOCK_W +: DIE_SEL_W];
  assign up_valid  = (st_q == S_UPD);
  assign up_lbi    = lbi_q;
  assign up_pbn    = new_q;

  always_comb begin
    evt_gnt = '0;
    if (st_q == S_GNT) evt_gnt[cur_q] = 1'b1;
  end
  assign gnt_pbn       = new_q;
  assign n_relocations = nrel_q;

  logic bb_full;
  bad_block_fifo #(.DEPTH(BB_DEPTH)) u_bb (
    .clk, .rst_n,
    .push(st_q == S_LOG), .push_cause(cause_q), .push_pbn(old_q),
    .pop(bb_pop), .head_cause(bb_cause), .head_pbn(bb_pbn),
    .irq(bb_irq), .full(bb_full), .overflow(bb_overflow), .clr_ovf
  );

  logic [$clog2(GC_DEPTH):0] gc_count;
  logic gc_full;
  sync_fifo #(.W(PBN_W), .DEPTH(GC_DEPTH)) u_gc (
    .clk, .rst_n,
    .push((st_q == S_LOG) && (cause_q == BB_WRITE_FAIL)), .din(old_q),
    .pop(gc_pop && !gc_empty), .dout(gc_pbn),
    .empty(gc_empty), .full(gc_full), .count(gc_count),
    .overflow(gc_overflow), .clr_ovf
  );
endmodule
