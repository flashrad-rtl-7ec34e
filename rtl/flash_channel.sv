// flash_channel: everything the cube needs for one of its NAND dies.
//
// Each die has its own 8-bit channel so all 24 can work at once, each on its
// own operation. A channel holds a 519-byte write buffer, a BCH encoder and
// decoder (512 data bytes + 4 parity bytes per sector, the parity stored in
// the die's spare area right after its sector) and the NAND command
// sequencer. After the parity come 3 metadata bytes: the logical block index
// the sector was written for. A sector's place in the die: row = physical
// block number, column = sector index * 519, so the 16 sectors of an 8 KiB
// block lie in order.
//   program : the sector streams into the buffer and the encoder, parity is
//             appended, the page is programmed and the status read. If the
//             die reports a failure the channel asks the management unit for
//             a relocation and programs the same buffer into the new block
//             it is given (up to MAX_RETRY times). No new data enters the
//             buffer before the write has succeeded or been given up.
//   read    : page bytes pass through the decoder, corrected data leaves on
//             the read port. When the correction count reaches the threshold
//             or the sector is uncorrectable, the block is reported. The
//             stored logical block index is compared with the one the
//             table lookup gave: a mismatch means the wrong block was
//             addressed, and the read ends with `done_fail` and
//             `done_addr_err` (not reported as a bad block; the metadata
//             bytes are not covered by the BCH code). A slot that reads
//             back all ones was never programmed: the read ends with
//             `done_erased` and no error of any kind.
//   erase   : a failure is reported to the bad-block queue.
//   reset   : die reset.
// The retry-from-buffer scheme, the reporting rules and the logical block
// index in each page's metadata follow the cube's bad-block management and
// translation layer; the sector layout, the metadata format, the retry
// limit and the handshakes are this design's choices.
//
// Interface: `req_valid`/`req_ready` take an operation with its block in
// this die, sector and logical block index. Program data: 512 bytes on
// `wr_valid`/`wr_ready`. Read data: 512 bytes on `rd_valid`/`rd_ready`.
// `done` pulses at the end with `done_fail` (operation failed after any
// retries, uncorrectable read or wrong block), `done_addr_err`, `done_erased`,
// `done_err_cnt` and `done_retries`.
module flash_channel
  import flash_pkg::*;
#(
  parameter int unsigned DIE_ID    = 0,
  parameter int unsigned LBI_W     = LSA_W - 4,
  parameter int unsigned MAX_RETRY = 2,
  parameter int unsigned T_WP  = 7,
  parameter int unsigned T_WH  = 7,
  parameter int unsigned T_RP  = 7,
  parameter int unsigned T_REH = 7,
  parameter int unsigned T_WB  = 67
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       cfg_rd_err_thresh,
  // operation request
  input  logic             req_valid,
  output logic             req_ready,
  input  nand_op_e         req_op,
  input  logic [DIE_BLOCK_W-1:0] req_blk,
  input  logic [3:0]       req_sector,
  input  logic [LBI_W-1:0] req_lbi,
  // program data
  input  logic             wr_valid,
  input  logic [7:0]       wr_data,
  output logic             wr_ready,
  // read data
  output logic             rd_valid,
  output logic [7:0]       rd_data,
  input  logic             rd_ready,
  // completion
  output logic             done,
  output logic             done_fail,
  output logic             done_addr_err,
  output logic             done_erased,
  output logic [1:0]       done_err_cnt,
  output logic [1:0]       done_retries,
  // management events
  output logic             evt_req,
  output bb_cause_e        evt_cause,
  output logic [PBN_W-1:0] evt_pbn,
  output logic [LBI_W-1:0] evt_lbi,
  input  logic             evt_gnt,
  input  logic [PBN_W-1:0] gnt_pbn,
  // NAND pins
  output logic             ce_n,
  output logic             cle,
  output logic             ale,
  output logic             we_n,
  output logic             re_n,
  output logic             wp_n,
  output logic [7:0]       io_out,
  output logic             io_oe,
  input  logic [7:0]       io_in,
  input  logic             rb_n
);
  localparam int unsigned IW = $clog2(SLOT_BYTES + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_PAR, S_START, S_NAND, S_RDEC, S_EVT, S_DONE} st_e;
  st_e st_q;
  nand_op_e op_q;
  logic [DIE_BLOCK_W-1:0] blk_q;
  logic [3:0]       sec_q;
  logic [LBI_W-1:0] lbi_q;
  logic [9:0]       cnt_q;
  logic [1:0]       retry_q, errc_q;
  logic             fail_q, aerr_q, ers_q, nonff_q;
  logic [23:0]      meta_q;
  bb_cause_e        cause_q;
  logic [7:0]       wbuf [SLOT_BYTES];

  // ---------------- encoder ----------------
  logic [31:0] parity;
  logic        enc_done;
  wire         load_fire = (st_q == S_LOAD) && wr_valid;

  bch_enc u_enc (
    .clk, .rst_n, .clr(req_valid && req_ready), .in_valid(load_fire),
    .in_data(wr_data), .parity, .done(enc_done)
  );

  always_ff @(posedge clk) begin
    if (load_fire) wbuf[cnt_q] <= wr_data;
    if (st_q == S_PAR) begin
      wbuf[SECTOR_BYTES]     <= parity[31:24];
      wbuf[SECTOR_BYTES + 1] <= parity[23:16];
      wbuf[SECTOR_BYTES + 2] <= parity[15:8];
      wbuf[SECTOR_BYTES + 3] <= parity[7:0];
      wbuf[CW_BYTES]         <= 8'(24'(lbi_q) >> 16);
      wbuf[CW_BYTES + 1]     <= 8'(24'(lbi_q) >> 8);
      wbuf[CW_BYTES + 2]     <= 8'(lbi_q);
    end
  end

  // ---------------- NAND sequencer ----------------
  logic          n_done, n_fail, n_busy, n_rd_valid;
  logic [IW-1:0] n_wr_idx, n_rd_idx;
  logic [7:0]    n_rd_data;

  nand_ctrl #(
    .XFER_BYTES(SLOT_BYTES), .T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP), .T_REH(T_REH), .T_WB(T_WB)
  ) u_nand (
    .clk, .rst_n,
    .cmd_start(st_q == S_START), .cmd(op_q),
    .row_addr(24'(blk_q)), .col_addr(16'(sec_q) * 16'(SLOT_BYTES)),
    .busy(n_busy), .cmd_done(n_done), .cmd_fail(n_fail),
    .wr_idx(n_wr_idx), .wr_data(wbuf[n_wr_idx]),
    .rd_valid(n_rd_valid), .rd_idx(n_rd_idx), .rd_data(n_rd_data),
    .ce_n, .cle, .ale, .we_n, .re_n, .wp_n, .io_out, .io_oe, .io_in, .rb_n
  );

  // ---------------- decoder ----------------
  logic       d_in_ready, d_done, d_unc;
  logic [1:0] d_err;

  bch_dec u_dec (
    .clk, .rst_n,
    .in_valid(n_rd_valid && n_rd_idx < IW'(CW_BYTES)), .in_data(n_rd_data), .in_ready(d_in_ready),
    .out_valid(rd_valid), .out_data(rd_data), .out_ready(rd_ready),
    .done(d_done), .err_cnt(d_err), .uncorrectable(d_unc)
  );

  // metadata bytes of a read, oldest first; any byte other than FFh means
  // the slot has been programmed
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q  <= '0;
      nonff_q <= 1'b0;
    end else begin
      if (st_q == S_START) nonff_q <= 1'b0;
      else if (n_rd_valid && n_rd_data != 8'hFF) nonff_q <= 1'b1;
      if (n_rd_valid && n_rd_idx >= IW'(CW_BYTES)) meta_q <= {meta_q[15:0], n_rd_data};
    end
  end

  // ---------------- channel sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      op_q    <= OP_IDLE;
      blk_q   <= '0;
      sec_q   <= '0;
      lbi_q   <= '0;
      cnt_q   <= '0;
      retry_q <= '0;
      errc_q  <= '0;
      fail_q  <= 1'b0;
      aerr_q  <= 1'b0;
      ers_q   <= 1'b0;
      cause_q <= BB_NONE;
    end else begin
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          op_q    <= req_op;
          blk_q   <= req_blk;
          sec_q   <= req_sector;
          lbi_q   <= req_lbi;
          cnt_q   <= '0;
          retry_q <= '0;
          errc_q  <= '0;
          fail_q  <= 1'b0;
          aerr_q  <= 1'b0;
          ers_q   <= 1'b0;
          st_q    <= (req_op == OP_PROGRAM) ? S_LOAD : S_START;
        end
        S_LOAD: if (wr_valid) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == 10'(SECTOR_BYTES - 1)) st_q <= S_PAR;
        end
        S_PAR:   st_q <= S_START;
        S_START: st_q <= S_NAND;
        S_NAND: if (n_done) begin
          unique case (op_q)
            OP_PROGRAM: if (n_fail) begin
              cause_q <= BB_WRITE_FAIL;
              if (retry_q == 2'(MAX_RETRY)) begin
                fail_q <= 1'b1;
                st_q   <= S_DONE;
              end else begin
                st_q   <= S_EVT;
              end
            end else st_q <= S_DONE;
            OP_ERASE: if (n_fail) begin
              cause_q <= BB_ERASE_FAIL;
              fail_q  <= 1'b1;
              st_q    <= S_EVT;
            end else st_q <= S_DONE;
            OP_READ: st_q <= S_RDEC;
            default: st_q <= S_DONE;
          endcase
        end
        S_RDEC: if (d_done && !nonff_q) begin
          ers_q  <= 1'b1;
          st_q   <= S_DONE;
        end else if (d_done) begin
          errc_q <= d_err;
          fail_q <= d_unc || (meta_q != 24'(lbi_q));
          aerr_q <= (meta_q != 24'(lbi_q));
          if (d_unc || (d_err >= cfg_rd_err_thresh && cfg_rd_err_thresh != 0)) begin
            cause_q <= BB_READ_ERRORS;
            st_q    <= S_EVT;
          end else begin
            st_q    <= S_DONE;
          end
        end
        S_EVT: if (evt_gnt) begin
          if (cause_q == BB_WRITE_FAIL) begin
            blk_q   <= gnt_pbn[DIE_BLOCK_W-1:0];
            retry_q <= retry_q + 1'b1;
            st_q    <= S_START;
          end else begin
            st_q    <= S_DONE;
          end
        end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign req_ready    = (st_q == S_IDLE);
  assign wr_ready     = (st_q == S_LOAD);
  assign done         = (st_q == S_DONE);
  assign done_fail    = fail_q;
  assign done_addr_err = aerr_q;
  assign done_erased   = ers_q;
  assign done_err_cnt = errc_q;
  assign done_retries = retry_q;
  assign evt_req      = (st_q == S_EVT);
  assign evt_cause    = cause_q;
  assign evt_pbn      = {{(PBN_W-DIE_SEL_W-DIE_BLOCK_W){1'b0}}, DIE_SEL_W'(DIE_ID), blk_q};
  assign evt_lbi      = lbi_q;

  // a relocation grant must carry a block of this die
  assert property (@(posedge clk) disable iff (!rst_n)
      (evt_gnt && cause_q == BB_WRITE_FAIL) |-> gnt_pbn[DIE_BLOCK_W +: DIE_SEL_W] == DIE_SEL_W'(DIE_ID))
    else $error("flash_channel: relocation to another die");
endmodule
