// flashrad_top_tb: end-to-end run of the whole controller with its default
// parameters (24 die channels), the 24 behavioural NAND dies and a model of
// the table RAM. The testbench plays host and processor:
//   - resets all dies, loads eight free blocks (dies 0..7) and the
//     round-robin start position,
//   - writes sectors of twelve logical blocks: eight take blocks from the
//     free table, four from the round-robin fallback once it is empty, two
//     go to already-mapped blocks; die 3 fails to program its first block,
//     which forces a hardware relocation (it takes the next round-robin
//     block of die 3, interleaved with the later first writes),
//   - reads every sector back (channels answer concurrently and compete for
//     the read port) and compares with the data written,
//   - flips two bits in a stored page: the read is corrected and the block
//     reported; reads an unmapped sector; corrupts one table entry so that
//     a read lands on another logical block's page, which the page
//     metadata exposes as an address error,
//   - drains the bad-block and garbage-collection queues, erases the
//     collected block (which fails again: reported as erase failure),
//   - asks the scrub logic for a decision and votes a corrupted TMR triple,
//   - turns on the background patrol, which finds the sector that still
//     holds two upsets and reports its block, reads unwritten sectors as
//     erased, and shows nothing on the host ports.
// Every mechanism is counted; one that never happened counts as a failure.
module flashrad_top_tb;
  import flash_pkg::*;
  localparam int NCH = 24;
  logic clk = 0, rst_n = 0;
  logic [1:0] cfg_rd_err_thresh = 2;
  logic req_valid = 0, req_ready;
  nand_op_e req_op = OP_IDLE;
  logic [27:0] req_lsa = 0;
  logic [31:0] req_pbn = 0;
  logic disp_valid, disp_unmapped;
  logic [4:0] disp_ch, rd_ch;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 1;
  logic [7:0] wr_data = 0, rd_data;
  logic [NCH-1:0] ch_done, ch_fail, ch_addr_err, ch_erased, ch_patrol;
  logic [31:0] scrub_period = 0;
  logic [27:0] scrub_pos;
  logic [NCH-1:0][1:0] ch_err_cnt, ch_retries;
  logic fbt_we = 0, fbt_rr_load = 0;
  logic [5:0] fbt_idx = 0;
  logic [31:0] fbt_pbn = 0;
  logic [18:0] fbt_rr_blk = 0;
  logic [6:0] fbt_count;
  logic bb_irq, bb_pop = 0, bb_overflow, gc_pop = 0, gc_empty, gc_overflow, clr_ovf = 0;
  bb_cause_e bb_cause;
  logic [31:0] bb_pbn, gc_pbn;
  logic [15:0] n_relocations;
  logic scrub_cfg_we = 0, scrub_eval = 0, scrub_uncorrectable = 0, scrub_act_valid;
  logic [1:0] scrub_cfg_err_thresh = 0, scrub_err_cnt = 0;
  logic [15:0] scrub_cfg_pe_thresh = 0, scrub_pe_cnt = 0;
  scrub_act_e scrub_action;
  logic vote_in_valid = 0, vote_out_valid;
  logic [31:0] vote_copy_a = 0, vote_copy_b = 0, vote_copy_c = 0, vote_out;
  logic [2:0] vote_disagree;
  logic lbt_ram_en, lbt_ram_we;
  logic [23:0] lbt_ram_addr;
  logic [31:0] lbt_ram_wdata, lbt_ram_rdata;
  logic [NCH-1:0] nand_ce_n, nand_cle, nand_ale, nand_we_n, nand_re_n, nand_wp_n, nand_io_oe, nand_rb_n;
  logic [NCH-1:0][7:0] nand_io_out, nand_io_in;

  int checks = 0, failures = 0;

  flashrad_top dut (.*);

  lbt_ram_model #(.AW(24)) ram (.clk, .en(lbt_ram_en), .we(lbt_ram_we), .addr(lbt_ram_addr),
    .wdata(lbt_ram_wdata), .rdata(lbt_ram_rdata));

  for (genvar i = 0; i < NCH; i++) begin : g_die
    nand_die_model #(.T_BUSY(2000)) u (
      .ce_n(nand_ce_n[i]), .cle(nand_cle[i]), .ale(nand_ale[i]), .we_n(nand_we_n[i]),
      .re_n(nand_re_n[i]), .wp_n(nand_wp_n[i]), .io_in(nand_io_out[i]), .io_out(nand_io_in[i]),
      .rb_n(nand_rb_n[i]));
  end

  always #5 clk = ~clk;
  initial begin
    #(10 * 3000000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic logic [7:0] pattern(input int lsa, input int i);
    return 8'((lsa * 37) ^ (i * 11) ^ (i >> 5) ^ (lsa >> 3));
  endfunction

  function automatic logic [31:0] pbn(input int die, input int blk);
    return (die << 19) | blk;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_alloc_table = 0, n_alloc_rr = 0, n_concurrent = 0, n_rd_contention = 0;
  int n_corrected = 0, n_unmapped = 0, n_read_err = 0, n_write_fail = 0, n_erase_fail = 0;
  int n_addr_err = 0, n_wrong_bytes = 0;
  bit expect_wrong = 0;    // the next read is misdirected on purpose
  int n_patrol = 0, n_patrol_erased = 0, n_host_vis = 0;
  bit patrol_phase = 0;    // only patrol reads are running
  int n_gc = 0, n_retry_ok = 0, n_scrub = 0, n_vote_fix = 0, max_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ftl_alloc && !dut.alloc_rr) n_alloc_table++;
    if ((dut.ftl_alloc || dut.mg_alloc) && dut.alloc_rr) n_alloc_rr++;
    if ($countones(~nand_ce_n) >= 2) n_concurrent++;
    if ($countones(~nand_ce_n) > max_busy) max_busy = $countones(~nand_ce_n);
    if ($countones(dut.c_rd_valid) >= 2) n_rd_contention++;
    if (patrol_phase && (disp_valid || rd_valid)) n_host_vis++;
    for (int c = 0; c < NCH; c++) if (ch_done[c]) begin
      if (ch_err_cnt[c] != 0) n_corrected++;
      if (ch_retries[c] != 0 && !ch_fail[c]) n_retry_ok++;
      if (ch_addr_err[c]) n_addr_err++;
      if (ch_patrol[c]) n_patrol++;
      if (ch_patrol[c] && ch_erased[c]) n_patrol_erased++;
    end
  end

  // ---------------- dispatch bookkeeping and read checking ----------------
  int req_lsa_q [$];
  bit req_is_rd_q [$];
  int exp_rd [NCH][$];
  int rd_pos [NCH];
  int n_rd_bytes_bad = 0, n_sectors_read = 0;
  always @(posedge clk) if (rst_n) begin
    if (disp_valid) begin
      int l;
      bit r;
      l = req_lsa_q.pop_front();
      r = req_is_rd_q.pop_front();
      if (disp_unmapped) n_unmapped++;
      else if (r) exp_rd[disp_ch].push_back(l);
    end
    if (rd_valid && rd_ready) begin
      if (exp_rd[rd_ch].size() == 0) begin
        n_rd_bytes_bad++;
        if (n_rd_bytes_bad < 4) $display("unexpected read data on ch %0d", rd_ch);
      end
      else begin
        if (rd_data != pattern(exp_rd[rd_ch][0], rd_pos[rd_ch]) && expect_wrong) n_wrong_bytes++;
        else if (rd_data != pattern(exp_rd[rd_ch][0], rd_pos[rd_ch])) begin
          n_rd_bytes_bad++;
          if (n_rd_bytes_bad < 4) $display("ch %0d lsa %0d byte %0d got %h exp %h", rd_ch, exp_rd[rd_ch][0], rd_pos[rd_ch], rd_data, pattern(exp_rd[rd_ch][0], rd_pos[rd_ch]));
        end
        rd_pos[rd_ch]++;
        if (rd_pos[rd_ch] == 512) begin
          rd_pos[rd_ch] = 0;
          void'(exp_rd[rd_ch].pop_front());
          n_sectors_read++;
        end
      end
    end
  end

  task automatic request(input nand_op_e op, input int lsa, input logic [31:0] p);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_op = op; req_lsa = 28'(lsa); req_pbn = p;
    req_lsa_q.push_back(lsa); req_is_rd_q.push_back(op == OP_READ);
    @(posedge clk); #1; req_valid = 0;
    if (op == OP_PROGRAM) begin
      for (int i = 0; i < 512; i++) begin
        @(negedge clk); wr_valid = 1; wr_data = pattern(lsa, i);
        @(posedge clk); while (!wr_ready) @(posedge clk);
        #1;
      end
      wr_valid = 0;
    end
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 50) begin
      @(posedge clk);
      if (&nand_ce_n && req_ready && !rd_valid && !dut.own_q) quiet++; else quiet = 0;
    end
  endtask

  initial begin
    int written [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // die resets, all channels at once
    for (int d = 0; d < NCH; d++) request(OP_RESET, 0, pbn(d, 0));
    wait_idle();
    chk(g_die[0].u.n_reset == 1 && g_die[23].u.n_reset == 1, "all dies reset");
    // processor: free table and round-robin start
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); fbt_we = 1; fbt_idx = 6'(i); fbt_pbn = pbn(i, 10 + i);
      @(posedge clk); #1; fbt_we = 0;
    end
    @(negedge clk); fbt_rr_load = 1; fbt_rr_blk = 19'd2000; @(posedge clk); #1; fbt_rr_load = 0;
    chk(fbt_count == 8, "free table loaded");
    g_die[3].u.fail_row(13, 1);
    // first writes: eight logical blocks take the eight free blocks
    for (int lb = 0; lb < 8; lb++) begin request(OP_PROGRAM, lb * 16, 0); written.push_back(lb * 16); end
    // writes into already-mapped blocks
    request(OP_PROGRAM, 0 * 16 + 1, 0); written.push_back(1);
    request(OP_PROGRAM, 1 * 16 + 7, 0); written.push_back(23);
    // table is empty now: round-robin fallback
    for (int lb = 8; lb < 12; lb++) begin request(OP_PROGRAM, lb * 16 + 2, 0); written.push_back(lb * 16 + 2); end
    wait_idle();
    chk(fbt_count == 0, "free table consumed");
    chk(ram.peek(0) == pbn(0, 10) && ram.peek(7) == pbn(7, 17), "table entries of first writes");
    chk(ram.peek(3) == pbn(3, 2000), $sformatf("relocated entry %h", ram.peek(3)));
    chk(ram.peek(8) == pbn(0, 2000) && ram.peek(9) == pbn(1, 2001) && ram.peek(11) == pbn(3, 2001), $sformatf("round-robin entries %h %h %h %h", ram.peek(8), ram.peek(9), ram.peek(10), ram.peek(11)));
    chk(g_die[3].u.peek(24'd2000, 16'd0) == pattern(48, 0), "relocated data on die 3");
    chk(n_relocations == 1, "one relocation");
    // read everything back
    foreach (written[k]) request(OP_READ, written[k], 0);
    wait_idle();
    chk(n_sectors_read == written.size() && n_rd_bytes_bad == 0,
        $sformatf("read back %0d of %0d sectors, %0d bad bytes", n_sectors_read, written.size(), n_rd_bytes_bad));
    // two upsets in logical sector 1 (die 0, block 10, sector 1)
    g_die[0].u.flip_bit(24'd10, 16'(SLOT_BYTES + 100), 0);
    g_die[0].u.flip_bit(24'd10, 16'(SLOT_BYTES + 300), 7);
    request(OP_READ, 1, 0);
    request(OP_READ, 100 * 16, 0);            // unmapped
    wait_idle();
    chk(n_sectors_read == written.size() + 1 && n_rd_bytes_bad == 0, "corrected read");
    chk(n_unmapped == 1, "unmapped read reported");
    chk(n_addr_err == 0, "no address errors on correct mappings");
    // a corrupted table entry sends logical block 5 to the page of logical
    // block 6: the page metadata exposes the wrong block
    ram.poke(5, pbn(6, 16));
    expect_wrong = 1;
    request(OP_READ, 5 * 16, 0);
    wait_idle();
    expect_wrong = 0;
    chk(n_addr_err == 1 && n_wrong_bytes > 0 && n_rd_bytes_bad == 0, "misdirected read flagged");
    ram.poke(5, pbn(5, 15));
    // processor drains the bad-block queue
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      chk(bb_irq, "bad-block interrupt");
      if (bb_cause == BB_WRITE_FAIL) begin n_write_fail++; chk(bb_pbn == pbn(3, 13), "write-fail block"); end
      if (bb_cause == BB_READ_ERRORS) begin n_read_err++; chk(bb_pbn == pbn(0, 10), "read-error block"); end
      bb_pop = 1; @(posedge clk); #1; bb_pop = 0;
    end
    // garbage collection: erase the relocated block (still failing)
    @(negedge clk);
    chk(!gc_empty && gc_pbn == pbn(3, 13), "GC queue holds the old block");
    begin
      logic [31:0] g;
      g = gc_pbn;
      gc_pop = 1; @(posedge clk); #1; gc_pop = 0; n_gc++;
      request(OP_ERASE, 0, g);
    end
    wait_idle();
    @(negedge clk);
    if (bb_irq && bb_cause == BB_ERASE_FAIL && bb_pbn == pbn(3, 13)) n_erase_fail++;
    bb_pop = bb_irq; @(posedge clk); #1; bb_pop = 0;
    @(negedge clk);
    chk(!bb_irq && gc_empty && !bb_overflow && !gc_overflow, "queues empty");
    // scrub decision and TMR vote
    @(negedge clk); scrub_eval = 1; scrub_err_cnt = 2; scrub_pe_cnt = 16'd5000;
    @(posedge clk); #1; scrub_eval = 0;
    chk(scrub_act_valid && scrub_action == SCRUB_RELOCATE, "scrub relocate");
    if (scrub_act_valid) n_scrub++;
    @(negedge clk); vote_in_valid = 1; vote_copy_a = 32'hCAFE0001; vote_copy_b = 32'hCAFE0001; vote_copy_c = 32'h0BAD0001;
    @(posedge clk); #1; vote_in_valid = 0;
    chk(vote_out == 32'hCAFE0001 && vote_disagree == 3'b100, "TMR vote");
    if (vote_disagree != 0) n_vote_fix++;
    // background patrol: the host is idle; patrol reads walk logical sectors
    // 0, 1, 2, ... Sector 1 still holds its two upsets and must be reported,
    // never-written sectors read as erased, nothing shows on the host ports
    patrol_phase = 1;
    @(negedge clk); scrub_period = 100;
    begin
      int t;
      t = 0;
      while (n_patrol < 4 && t < 200000) begin @(posedge clk); t++; end
    end
    @(negedge clk); scrub_period = 0;
    wait_idle();
    patrol_phase = 0;
    chk(n_patrol >= 4 && n_patrol_erased >= 1 && n_host_vis == 0 && scrub_pos >= 4,
        $sformatf("patrol reads %0d erased %0d host-visible %0d pos %0d", n_patrol, n_patrol_erased, n_host_vis, scrub_pos));
    @(negedge clk);
    chk(bb_irq && bb_cause == BB_READ_ERRORS && bb_pbn == pbn(0, 10), "patrol reported the weak block");
    bb_pop = bb_irq; @(posedge clk); #1; bb_pop = 0;
    @(negedge clk);
    chk(!bb_irq, "only the weak block reported");
    // every mechanism must have happened
    chk(n_alloc_table >= 8, $sformatf("free-table allocations %0d", n_alloc_table));
    chk(n_alloc_rr >= 5, $sformatf("round-robin allocations %0d", n_alloc_rr));
    chk(n_concurrent > 0, "dies working concurrently");
    chk(n_rd_contention > 0, "read-port contention");
    chk(n_corrected >= 1, "ECC correction");
    chk(n_retry_ok == 1, "program retried into new block");
    chk(n_write_fail == 1 && n_read_err == 1 && n_erase_fail == 1, "bad-block causes");
    chk(n_gc == 1 && n_scrub == 1 && n_vote_fix == 1 && n_unmapped == 1 && n_addr_err == 1, "gc/scrub/vote/unmapped/address error");
    chk(n_patrol >= 4, "patrol reads");
    $display("mechanisms: patrol %0d (erased %0d) table-alloc %0d rr-alloc %0d concurrent-cycles %0d (max %0d dies) read-contention %0d corrected %0d address-errors %0d relocations %0d retried %0d bb(write %0d read %0d erase %0d) gc %0d unmapped %0d scrub %0d vote %0d",
             n_patrol, n_patrol_erased, n_alloc_table, n_alloc_rr, n_concurrent, max_busy, n_rd_contention, n_corrected, n_addr_err, n_relocations,
             n_retry_ok, n_write_fail, n_read_err, n_erase_fail, n_gc, n_unmapped, n_scrub, n_vote_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
