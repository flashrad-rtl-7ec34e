// flashrad_top: hardware data path of the 3D NAND flash cube controller.
//
// The cube stacks 24 identical 32 Gbit NAND dies (768 Gbit) beside one
// controller that drives every die through its own 8-bit channel, so up to
// 24 operations (192 data bits) run at once, each die doing its own thing.
// The host sees a linear, sector-addressed memory; flash management is done
// here and by a processor beside this block.
//
// Data path, in request order:
//   request port -> translation (ftl_lbt, table in external RAM)
//                -> one of 24 flash_channel instances (BCH + NAND sequencer)
//                -> shared read-data port, per-channel completion flags
//   channel events -> mgmt_unit (relocation, bad-block and GC queues)
//                     -> free_block_table (wear-leveling free list)
// A read or program names a logical sector; the translation layer finds its
// physical block, whose upper bits select the die (channel) and lower bits
// the block in that die. The first program of an unmapped logical block
// takes a block from the free-block table. Erase and reset name a physical
// block directly (they are issued by the processor for garbage collection
// and bad-block tests). When `scrub_period` is nonzero, a background
// patrol reads one logical sector every `scrub_period` clocks while the host
// is idle; its data is dropped and weak blocks reach the bad-block queue
// through the channels' read-error reports (the cube's programmable
// background scrub; the sequential walk and the timer are this design's
// choices). Beside the data path stand the scrub decision logic
// and the triple-modular-redundancy voter of an edge module, with their own
// ports, since the serial link that would feed them is outside this block.
//
// Not in this block: the Serial RapidIO link and its SerDes, the processor
// and its firmware, the RAM controller/cache and the NAND/RAM pads. Their
// signals are ports: the request/data ports stand where the link layer
// would connect, the table RAM port where the stack's MRAM would, the
// split NAND I/O where the pads would.
//
// Interface and timing: `req_valid`/`req_ready` take one request at a time;
// `disp_valid` pulses when it has been handed to channel `disp_ch` (or, with
// `disp_unmapped`, when a read found no mapping). Program data follows as 512
// bytes on `wr_*`. Read data of any channel comes out on `rd_*` tagged with
// `rd_ch`, one sector at a time. `ch_done[i]` pulses when channel i finishes,
// with its status; `ch_addr_err[i]` marks a read whose page metadata
// names another logical block than the table lookup (wrong block
// addressed: discard the data). The dispatcher, the channel-number mapping from block
// numbers and all handshakes are this design's choices.
module flashrad_top
  import flash_pkg::*;
#(
  parameter int unsigned NUM_CH     = NUM_DIES,
  parameter int unsigned LSA_BITS   = LSA_W,
  parameter int unsigned FREE_DEPTH = 64,
  parameter int unsigned BB_DEPTH   = 16,
  parameter int unsigned GC_DEPTH   = 16,
  parameter int unsigned VOTE_W     = 32,
  parameter int unsigned T_WP  = 7,
  parameter int unsigned T_WH  = 7,
  parameter int unsigned T_RP  = 7,
  parameter int unsigned T_REH = 7,
  parameter int unsigned T_WB  = 67,
  localparam int unsigned LBI_W = LSA_BITS - 4,
  localparam int unsigned FAW   = $clog2(FREE_DEPTH)
) (
  input  logic                clk,               // controller clock (1.5 ns in the original layout)
  input  logic                rst_n,             // asynchronous reset, active low
  input  logic [1:0]          cfg_rd_err_thresh, // corrected bits per sector that report a block as suspect; 0 = off
  // request port (link side)
  input  logic                req_valid,         // host request valid
  output logic                req_ready,         // dispatcher can take a request
  input  nand_op_e            req_op,            // operation: 000 read, 001 program, 010 erase, 011 reset
  input  logic [LSA_BITS-1:0] req_lsa,           // logical sector address of a read or program
  input  logic [PBN_W-1:0]    req_pbn,           // physical block (die, block) of an erase or reset
  output logic                disp_valid,        // request handed to a channel (or answered as unmapped)
  output logic [DIE_SEL_W-1:0] disp_ch,          // die channel that took the request
  output logic                disp_unmapped,     // with disp_valid: the read hit an unmapped logical block
  input  logic                wr_valid,          // program data byte valid (512 bytes after disp_valid)
  input  logic [7:0]          wr_data,           // program data byte
  output logic                wr_ready,          // channel accepts the data byte
  output logic                rd_valid,          // corrected read data byte valid
  output logic [7:0]          rd_data,           // corrected read data byte
  output logic [DIE_SEL_W-1:0] rd_ch,            // channel the read data comes from
  input  logic                rd_ready,          // host accepts the read byte
  output logic [NUM_CH-1:0]   ch_done,           // pulse per channel: operation finished
  output logic [NUM_CH-1:0]   ch_fail,           // with ch_done: operation failed for good
  output logic [NUM_CH-1:0]   ch_addr_err,       // with ch_done: page metadata names another logical block
  output logic [NUM_CH-1:0]   ch_erased,         // with ch_done: the slot read was never programmed
  output logic [NUM_CH-1:0]   ch_patrol,         // with ch_done: the operation was a patrol read
  output logic [NUM_CH-1:0][1:0] ch_err_cnt,     // with ch_done: bits corrected in the sector read
  output logic [NUM_CH-1:0][1:0] ch_retries,     // with ch_done: relocations used by a program
  // processor side
  input  logic                fbt_we,            // write one free-block table slot
  input  logic [FAW-1:0]      fbt_idx,           // free-block table slot index
  input  logic [PBN_W-1:0]    fbt_pbn,           // block written into the slot
  input  logic                fbt_rr_load,       // load the round-robin fallback position
  input  logic [DIE_BLOCK_W-1:0] fbt_rr_blk,     // round-robin start block
  output logic [FAW:0]        fbt_count,         // valid entries in the free-block table
  output logic                bb_irq,            // bad-block queue not empty (interrupt)
  input  logic                bb_pop,            // remove the head of the bad-block queue
  output bb_cause_e           bb_cause,          // cause marker of the head entry
  output logic [PBN_W-1:0]    bb_pbn,            // block of the head entry
  output logic                bb_overflow,       // a bad-block entry was lost (sticky)
  input  logic                gc_pop,            // remove the head of the garbage-collection queue
  output logic                gc_empty,          // garbage-collection queue empty
  output logic [PBN_W-1:0]    gc_pbn,            // stale block at the head of the queue
  output logic                gc_overflow,       // a garbage-collection entry was lost (sticky)
  input  logic                clr_ovf,           // clear both overflow flags
  output logic [15:0]         n_relocations,     // count of hardware write relocations
  // scrub decision
  input  logic                scrub_cfg_we,      // load the scrub thresholds
  input  logic [1:0]          scrub_cfg_err_thresh, // read-error threshold for scrubbing
  input  logic [15:0]         scrub_cfg_pe_thresh, // program/erase count above which a block is relocated, not rewritten
  input  logic                scrub_eval,        // evaluate one block
  input  logic [1:0]          scrub_err_cnt,     // bits corrected in the block
  input  logic                scrub_uncorrectable, // the block had an uncorrectable read
  input  logic [15:0]         scrub_pe_cnt,      // program/erase count of the block
  output logic                scrub_act_valid,   // decision valid (one clock after scrub_eval)
  output scrub_act_e          scrub_action,      // none, rewrite in place, or relocate
  input  logic [31:0]         scrub_period,      // clocks between background patrol reads; 0 = patrol off
  output logic [LSA_BITS-1:0] scrub_pos,         // logical sector the patrol reads next
  // TMR voter of an edge module
  input  logic                vote_in_valid,     // three copies valid
  input  logic [VOTE_W-1:0]   vote_copy_a,       // copy from this module
  input  logic [VOTE_W-1:0]   vote_copy_b,       // copy from the first redundant module
  input  logic [VOTE_W-1:0]   vote_copy_c,       // copy from the second redundant module
  output logic                vote_out_valid,    // voted word valid (one clock later)
  output logic [VOTE_W-1:0]   vote_out,          // bitwise two-of-three majority
  output logic [2:0]          vote_disagree,     // copies that differed from the majority
  // logical block table RAM (MRAM of the stack), read data one clock later
  output logic                lbt_ram_en,        // table RAM access
  output logic                lbt_ram_we,        // table RAM write
  output logic [LBI_W-1:0]    lbt_ram_addr,      // table entry = logical sector address bits [27:4]
  output logic [PBN_W-1:0]    lbt_ram_wdata,     // physical block number written
  input  logic [PBN_W-1:0]    lbt_ram_rdata,     // physical block number read (all ones = unmapped)
  // NAND dies
  output logic [NUM_CH-1:0]   nand_ce_n,         // chip enable per die
  output logic [NUM_CH-1:0]   nand_cle,          // command latch enable per die
  output logic [NUM_CH-1:0]   nand_ale,          // address latch enable per die
  output logic [NUM_CH-1:0]   nand_we_n,         // write strobe per die
  output logic [NUM_CH-1:0]   nand_re_n,         // read strobe per die
  output logic [NUM_CH-1:0]   nand_wp_n,         // write protect per die (held high)
  output logic [NUM_CH-1:0][7:0] nand_io_out,    // I/O byte driven to each die
  output logic [NUM_CH-1:0]   nand_io_oe,        // I/O output enable per die
  input  logic [NUM_CH-1:0][7:0] nand_io_in,     // I/O byte from each die
  input  logic [NUM_CH-1:0]   nand_rb_n          // ready/busy per die
);

  // ---------------- translation layer and free-block table ----------------
  logic lk_valid, lk_ready, rsp_valid, rsp_unmapped, rsp_new;
  logic [PBN_W-1:0] rsp_pbn;
  logic [3:0] rsp_sector;
  logic [LBI_W-1:0] rsp_lbi;
  logic up_valid, up_ready;
  logic [LBI_W-1:0] up_lbi;
  logic [PBN_W-1:0] up_pbn;
  logic ftl_alloc, mg_alloc, alloc_rr;
  logic [PBN_W-1:0] alloc_pbn;
  logic [DIE_SEL_W-1:0] mg_alloc_die;
  logic [FAW-1:0] fbt_head;

  logic lk_alloc_q;
  logic [LSA_BITS-1:0] lsa_q;

  ftl_lbt #(.LSA_BITS(LSA_BITS)) u_ftl (
    .clk, .rst_n,
    .lk_valid, .lk_ready, .lk_lsa(lsa_q), .lk_alloc(lk_alloc_q),
    .rsp_valid, .rsp_pbn, .rsp_sector, .rsp_lbi, .rsp_unmapped, .rsp_new,
    .up_valid, .up_ready, .up_lbi, .up_pbn,
    .alloc_req(ftl_alloc), .alloc_pbn,
    .ram_en(lbt_ram_en), .ram_we(lbt_ram_we), .ram_addr(lbt_ram_addr),
    .ram_wdata(lbt_ram_wdata), .ram_rdata(lbt_ram_rdata)
  );

  free_block_table #(.DEPTH(FREE_DEPTH), .NUM_CH(NUM_CH)) u_fbt (
    .clk, .rst_n,
    .sw_we(fbt_we), .sw_idx(fbt_idx), .sw_pbn(fbt_pbn),
    .rr_load(fbt_rr_load), .rr_blk(fbt_rr_blk),
    .n_valid(fbt_count), .head_idx(fbt_head),
    .alloc_req(ftl_alloc || mg_alloc), .alloc_die_en(!ftl_alloc && mg_alloc),
    .alloc_die(mg_alloc_die), .alloc_pbn, .alloc_rr
  );

  // ---------------- management ----------------
  logic [NUM_CH-1:0] evt_req, evt_gnt;
  bb_cause_e         evt_cause [NUM_CH];
  logic [PBN_W-1:0]  evt_pbn   [NUM_CH];
  logic [LBI_W-1:0]  evt_lbi   [NUM_CH];
  logic [PBN_W-1:0]  gnt_pbn;

  mgmt_unit #(.NUM_CH(NUM_CH), .LBI_W(LBI_W), .BB_DEPTH(BB_DEPTH), .GC_DEPTH(GC_DEPTH)) u_mgmt (
    .clk, .rst_n,
    .evt_req, .evt_cause, .evt_pbn, .evt_lbi, .evt_gnt, .gnt_pbn,
    .alloc_req(mg_alloc), .alloc_die(mg_alloc_die), .alloc_pbn, .alloc_busy(ftl_alloc),
    .up_valid, .up_ready, .up_lbi, .up_pbn,
    .bb_irq, .bb_pop, .bb_cause, .bb_pbn, .bb_overflow,
    .gc_pop, .gc_empty, .gc_pbn, .gc_overflow, .clr_ovf,
    .n_relocations
  );

  // ---------------- dispatcher ----------------
  typedef enum logic [2:0] {D_IDLE, D_LOOKUP, D_WAIT, D_ISSUE, D_WDATA} dst_e;
  dst_e dst_q;
  nand_op_e op_q;
  logic [PBN_W-1:0]     pbn_q;
  logic [3:0]           sec_q;
  logic [LBI_W-1:0]     lbi_q;
  logic [DIE_SEL_W-1:0] ch_q;
  logic [9:0]           wcnt_q;
  logic                 unm_q;
  logic                 pat_q;           // current request is a patrol read
  logic [NUM_CH-1:0]    pflag_q;         // channel's last operation is a patrol read
  logic [31:0]          ptmr_q;
  logic                 pdue_q;
  logic [LSA_BITS-1:0]  ppos_q;
  wire patrol_take = (dst_q == D_IDLE) && !req_valid && pdue_q;

  logic [NUM_CH-1:0] c_req_valid, c_req_ready, c_wr_valid, c_wr_ready;
  logic [NUM_CH-1:0] c_rd_valid, c_rd_ready;
  logic [NUM_CH-1:0][7:0] c_rd_data;

  wire pbn_in_range = (pbn_q[PBN_W-1:DIE_BLOCK_W] < (PBN_W-DIE_BLOCK_W)'(NUM_CH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst_q      <= D_IDLE;
      op_q       <= OP_IDLE;
      pbn_q      <= '0;
      sec_q      <= '0;
      lbi_q      <= '0;
      ch_q       <= '0;
      wcnt_q     <= '0;
      unm_q      <= 1'b0;
      lsa_q      <= '0;
      lk_alloc_q <= 1'b0;
      pat_q      <= 1'b0;
    end else begin
      unm_q <= 1'b0;
      unique case (dst_q)
        D_IDLE: if (req_valid) begin
          op_q       <= req_op;
          lsa_q      <= req_lsa;
          lk_alloc_q <= (req_op == OP_PROGRAM);
          pbn_q      <= req_pbn;
          sec_q      <= '0;
          lbi_q      <= '0;
          pat_q      <= 1'b0;
          dst_q      <= (req_op inside {OP_READ, OP_PROGRAM}) ? D_LOOKUP : D_ISSUE;
        end else if (pdue_q) begin
          op_q       <= OP_READ;
          lsa_q      <= ppos_q;
          lk_alloc_q <= 1'b0;
          pbn_q      <= '0;
          sec_q      <= '0;
          lbi_q      <= '0;
          pat_q      <= 1'b1;
          dst_q      <= D_LOOKUP;
        end
        D_LOOKUP: if (lk_ready) dst_q <= D_WAIT;
        D_WAIT: if (rsp_valid) begin
          pbn_q <= rsp_pbn;
          sec_q <= rsp_sector;
          lbi_q <= rsp_lbi;
          if (rsp_unmapped) begin
            unm_q <= 1'b1;
            dst_q <= D_IDLE;
          end else begin
            dst_q <= D_ISSUE;
          end
        end
        D_ISSUE: begin
          ch_q <= pbn_q[DIE_BLOCK_W +: DIE_SEL_W];
          if (!pbn_in_range) begin
            unm_q <= 1'b1;
            dst_q <= D_IDLE;
          end else if (c_req_ready[pbn_q[DIE_BLOCK_W +: DIE_SEL_W]]) begin
            wcnt_q <= '0;
            dst_q  <= (op_q == OP_PROGRAM) ? D_WDATA : D_IDLE;
          end
        end
        D_WDATA: if (wr_valid && wr_ready) begin
          wcnt_q <= wcnt_q + 1'b1;
          if (wcnt_q == 10'(SECTOR_BYTES - 1)) dst_q <= D_IDLE;
        end
        default: dst_q <= D_IDLE;
      endcase
    end
  end

  wire [DIE_SEL_W-1:0] issue_ch = pbn_q[DIE_BLOCK_W +: DIE_SEL_W];
  wire issue_fire = (dst_q == D_ISSUE) && pbn_in_range && c_req_ready[issue_ch];

  assign req_ready     = (dst_q == D_IDLE);
  assign lk_valid      = (dst_q == D_LOOKUP);
  assign disp_valid    = (issue_fire || unm_q) && !pat_q;
  assign disp_ch       = issue_fire ? issue_ch : ch_q;
  assign disp_unmapped = unm_q && !pat_q;

  // ---------------- background patrol (scrub) reads ----------------
  // Every scrub_period clocks one patrol read becomes due. It is issued when
  // the host has no request waiting and walks the logical sectors in order.
  // Its data is drained inside; a sector with errors at the read threshold
  // reaches the bad-block queue like any read, where the processor picks
  // it up and decides with the scrub decision logic.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptmr_q  <= '0;
      pdue_q  <= 1'b0;
      ppos_q  <= '0;
      pflag_q <= '0;
    end else begin
      if (issue_fire) pflag_q[issue_ch] <= pat_q;
      if (patrol_take) begin
        pdue_q <= 1'b0;
        ppos_q <= ppos_q + 1'b1;
      end
      if (scrub_period == 0) begin
        ptmr_q <= '0;
        pdue_q <= 1'b0;
      end else if (ptmr_q >= scrub_period - 1) begin
        ptmr_q <= '0;
        pdue_q <= 1'b1;
      end else begin
        ptmr_q <= ptmr_q + 1'b1;
      end
    end
  end
  assign scrub_pos = ppos_q;
  assign ch_patrol = pflag_q;

  always_comb begin
    c_req_valid = '0;
    c_wr_valid  = '0;
    if (dst_q == D_ISSUE && pbn_in_range) c_req_valid[issue_ch] = 1'b1;
    if (dst_q == D_WDATA) c_wr_valid[ch_q] = wr_valid;
  end
  assign wr_ready = (dst_q == D_WDATA) && c_wr_ready[ch_q];

  // ---------------- read-data return: one sector at a time ----------------
  logic                 own_q;
  logic [DIE_SEL_W-1:0] owner_q, rr_last_q;
  logic [9:0]           rcnt_q;
  logic                 pick_ok;
  logic [DIE_SEL_W-1:0] pick;

  always_comb begin
    int unsigned c;
    pick_ok = 1'b0;
    pick    = '0;
    for (int unsigned k = 1; k <= NUM_CH; k++) begin
      c = (32'(rr_last_q) + k) % NUM_CH;
      if (!pick_ok && c_rd_valid[c]) begin
        pick_ok = 1'b1;
        pick    = DIE_SEL_W'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q     <= 1'b0;
      owner_q   <= '0;
      rr_last_q <= DIE_SEL_W'(NUM_CH - 1);
      rcnt_q    <= '0;
    end else if (!own_q) begin
      if (pick_ok) begin
        own_q   <= 1'b1;
        owner_q <= pick;
        rcnt_q  <= '0;
      end
    end else if (c_rd_valid[owner_q] && c_rd_ready[owner_q]) begin
      rcnt_q <= rcnt_q + 1'b1;
      if (rcnt_q == 10'(SECTOR_BYTES - 1)) begin
        own_q     <= 1'b0;
        rr_last_q <= owner_q;
      end
    end
  end

  always_comb begin
    c_rd_ready = '0;
    if (own_q) c_rd_ready[owner_q] = pflag_q[owner_q] ? 1'b1 : rd_ready;   // patrol data is dropped
  end
  assign rd_valid = own_q && c_rd_valid[owner_q] && !pflag_q[owner_q];
  assign rd_data  = c_rd_data[owner_q];
  assign rd_ch    = owner_q;

  // ---------------- the 24 die channels ----------------
  for (genvar i = 0; i < NUM_CH; i++) begin : g_ch
    flash_channel #(
      .DIE_ID(i), .LBI_W(LBI_W),
      .T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP), .T_REH(T_REH), .T_WB(T_WB)
    ) u_ch (
      .clk, .rst_n, .cfg_rd_err_thresh,
      .req_valid(c_req_valid[i]), .req_ready(c_req_ready[i]),
      .req_op(op_q), .req_blk(pbn_q[DIE_BLOCK_W-1:0]), .req_sector(sec_q), .req_lbi(lbi_q),
      .wr_valid(c_wr_valid[i]), .wr_data, .wr_ready(c_wr_ready[i]),
      .rd_valid(c_rd_valid[i]), .rd_data(c_rd_data[i]), .rd_ready(c_rd_ready[i]),
      .done(ch_done[i]), .done_fail(ch_fail[i]), .done_addr_err(ch_addr_err[i]), .done_erased(ch_erased[i]), .done_err_cnt(ch_err_cnt[i]),
      .done_retries(ch_retries[i]),
      .evt_req(evt_req[i]), .evt_cause(evt_cause[i]), .evt_pbn(evt_pbn[i]), .evt_lbi(evt_lbi[i]),
      .evt_gnt(evt_gnt[i]), .gnt_pbn,
      .ce_n(nand_ce_n[i]), .cle(nand_cle[i]), .ale(nand_ale[i]), .we_n(nand_we_n[i]),
      .re_n(nand_re_n[i]), .wp_n(nand_wp_n[i]), .io_out(nand_io_out[i]), .io_oe(nand_io_oe[i]),
      .io_in(nand_io_in[i]), .rb_n(nand_rb_n[i])
    );
  end

  // ---------------- scrub decision and TMR voter ----------------
  scrub_policy u_scrub (
    .clk, .rst_n,
    .cfg_we(scrub_cfg_we), .cfg_err_thresh(scrub_cfg_err_thresh), .cfg_pe_thresh(scrub_cfg_pe_thresh),
    .eval(scrub_eval), .err_cnt(scrub_err_cnt), .uncorrectable(scrub_uncorrectable),
    .pe_cnt(scrub_pe_cnt), .act_valid(scrub_act_valid), .action(scrub_action)
  );

  nmr_voter #(.W(VOTE_W)) u_vote (
    .clk, .rst_n,
    .in_valid(vote_in_valid), .copy_a(vote_copy_a), .copy_b(vote_copy_b), .copy_c(vote_copy_c),
    .out_valid(vote_out_valid), .voted(vote_out), .disagree(vote_disagree)
  );
endmodule
