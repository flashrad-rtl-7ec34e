// flash_channel_tb: one die channel against the behavioural NAND die, with
// the testbench acting as management unit. Checks: the programmed page holds
// the sector followed by the BCH parity computed by the testbench's own
// polynomial division, then the 3-byte logical block index, at column
// sector*519 of the block's row; read-back returns the data; a read that
// asks for another logical block index ends with an address error; a
// never-programmed slot reads as erased, with no error and no event; two bits flipped in the die are corrected and, with the
// threshold at two, the block is reported for read errors; a program
// failure raises a relocation event and the buffered sector is programmed
// into the granted block; a block that keeps failing ends with a failure
// after MAX_RETRY relocations; a failed erase is reported; and no new write
// data is accepted while a write is outstanding.
module flash_channel_tb;
  import flash_pkg::*;
  localparam int DIE = 3;
  logic clk = 0, rst_n = 0;
  logic [1:0] cfg_rd_err_thresh = 2;
  logic req_valid = 0, req_ready;
  nand_op_e req_op = OP_IDLE;
  logic [18:0] req_blk = 0;
  logic [3:0] req_sector = 0;
  logic [23:0] req_lbi = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 1;
  logic [7:0] wr_data = 0, rd_data;
  logic done, done_fail, done_addr_err, done_erased;
  logic [1:0] done_err_cnt, done_retries;
  logic evt_req, evt_gnt = 0;
  bb_cause_e evt_cause;
  logic [31:0] evt_pbn, gnt_pbn = 0;
  logic [23:0] evt_lbi;
  logic ce_n, cle, ale, we_n, re_n, wp_n, io_oe, rb_n;
  logic [7:0] io_out, io_in;
  int checks = 0, failures = 0;
  logic [7:0] data [512];
  logic [7:0] got [512];
  int ngot = 0;
  logic [18:0] next_blk = 19'd500;
  bb_cause_e events [$];
  int lbi_override = -1;   // logical block index of the next op; -1: blk*16+sec

  flash_channel #(.DIE_ID(DIE), .LBI_W(24), .MAX_RETRY(2),
                  .T_WP(1), .T_WH(1), .T_RP(1), .T_REH(1), .T_WB(3)) dut (.*);
  nand_die_model #(.T_BUSY(100)) die (.ce_n, .cle, .ale, .we_n, .re_n, .wp_n,
    .io_in(io_out), .io_out(io_in), .rb_n);

  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // management stand-in: grant every event, relocations get the next block
  always @(posedge clk) begin
    evt_gnt <= 0;
    if (evt_req && !evt_gnt) begin
      events.push_back(evt_cause);
      if (evt_cause == BB_WRITE_FAIL) begin
        gnt_pbn  <= {8'h0, 5'(DIE), next_blk};
        next_blk <= next_blk + 1;
      end
      evt_gnt <= 1;
    end
  end
  always @(posedge clk) if (rd_valid && rd_ready) begin got[ngot] <= rd_data; ngot <= ngot + 1; end

  function automatic logic [31:0] ref_parity();
    logic [25:0] r = 0;
    logic fb;
    for (int i = 0; i < 512; i++)
      for (int k = 7; k >= 0; k--) begin
        fb = data[i][k] ^ r[25];
        r = {r[24:0], 1'b0};
        if (fb) r ^= 26'h0D5154B;
      end
    return {6'b0, r};
  endfunction

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic op(input nand_op_e o, input int blk, input int sec);
    @(negedge clk);
    req_valid = 1; req_op = o; req_blk = 19'(blk); req_sector = 4'(sec); req_lbi = (lbi_override < 0) ? 24'(blk * 16 + sec) : 24'(lbi_override);
    @(posedge clk); #1; req_valid = 0;
    ngot = 0;
    if (o == OP_PROGRAM) begin
      for (int i = 0; i < 512; i++) begin
        @(negedge clk); wr_valid = 1; wr_data = data[i];
        @(posedge clk); while (!wr_ready) @(posedge clk);
        #1;
      end
      wr_valid = 0;
      @(negedge clk);
      chk(!wr_ready, "write buffer closed while programming");
    end
    while (!done) @(posedge clk);
    #1;
  endtask

  task automatic check_page(input int row, input int sec, input int lbi);
    logic [31:0] p;
    int c0;
    bit ok;
    p = ref_parity(); c0 = sec * SLOT_BYTES; ok = 1;
    for (int i = 0; i < 512; i++) if (die.peek(24'(row), 16'(c0 + i)) != data[i]) ok = 0;
    chk(ok, $sformatf("page data row %0d", row));
    chk({die.peek(24'(row), 16'(c0 + 512)), die.peek(24'(row), 16'(c0 + 513)),
         die.peek(24'(row), 16'(c0 + 514)), die.peek(24'(row), 16'(c0 + 515))} == p, "page parity");
    chk({die.peek(24'(row), 16'(c0 + 516)), die.peek(24'(row), 16'(c0 + 517)),
         die.peek(24'(row), 16'(c0 + 518))} == 24'(lbi), "page metadata");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    op(OP_RESET, 0, 0);
    chk(die.n_reset == 1 && !done_fail, "reset");
    for (int i = 0; i < 512; i++) data[i] = 8'($urandom);
    op(OP_PROGRAM, 100, 2);
    chk(!done_fail && done_retries == 0, "program ok");
    check_page(100, 2, 100 * 16 + 2);
    op(OP_READ, 100, 2);
    chk(ngot == 512 && got == data && done_err_cnt == 0 && !done_fail && !done_addr_err, "clean read");
    // the table pointed a different logical block at this page
    lbi_override = 7;
    op(OP_READ, 100, 2);
    lbi_override = -1;
    chk(done_fail && done_addr_err && done_err_cnt == 0 && !done_erased, "wrong block detected");
    // a slot never programmed
    op(OP_READ, 100, 9);
    chk(done_erased && !done_fail && !done_addr_err && events.size() == 0, "erased slot");
    chk(events.size() == 0, "no events yet");
    // two upsets in the stored page: corrected and reported
    die.flip_bit(24'd100, 16'(2 * SLOT_BYTES + 17), 3);
    die.flip_bit(24'd100, 16'(2 * SLOT_BYTES + 514), 6);
    op(OP_READ, 100, 2);
    chk(ngot == 512 && got == data && done_err_cnt == 2 && !done_fail, "2-bit correction");
    chk(events.size() == 1 && events[0] == BB_READ_ERRORS, "read-error event");
    // one upset: corrected, below threshold, not reported
    die.flip_bit(24'd100, 16'(2 * SLOT_BYTES + 514), 6);
    op(OP_READ, 100, 2);
    chk(got == data && done_err_cnt == 1 && events.size() == 1, "1-bit correction, no event");
    // program failure -> relocation to block 500
    for (int i = 0; i < 512; i++) data[i] = 8'($urandom);
    die.fail_row(101, 1);
    op(OP_PROGRAM, 101, 5);
    chk(!done_fail && done_retries == 1, "relocated program ok");
    chk(events.size() == 2 && events[1] == BB_WRITE_FAIL, "write-fail event");
    check_page(500, 5, 101 * 16 + 5);
    chk(evt_pbn == {8'h0, 5'(DIE), 19'd500}, "channel now on new block");
    // persistent failure: give up after two relocations
    die.fail_row(102, 1); die.fail_row(501, 1); die.fail_row(502, 1);
    op(OP_PROGRAM, 102, 0);
    chk(done_fail && done_retries == 2, "gives up after retries");
    chk(events.size() == 4, "two more relocation events");
    // erase failure
    op(OP_ERASE, 102, 0);
    chk(done_fail && events.size() == 5 && events[4] == BB_ERASE_FAIL, "erase failure");
    op(OP_ERASE, 500, 0);
    chk(!done_fail && die.peek(24'd500, 16'(5 * SLOT_BYTES)) == 8'hFF, "erase ok");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
