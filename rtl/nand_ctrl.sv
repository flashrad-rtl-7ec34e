// nand_ctrl: command sequencer for one 8-bit ONFI NAND die.
//
// The cube gives every die its own 8-bit channel and its own controller, so
// each die can run a different operation at the same time. This block turns
// one operation request (read page, program page, erase block, reset) into
// the pin sequence of an asynchronous ONFI interface: command latch cycles
// (CLE), address cycles (ALE), data cycles clocked by WE_n or RE_n, the wait
// for the die's ready/busy line, and a status read after program and erase.
//   read    : 00h, 5 address cycles, 30h, wait, XFER_BYTES data reads
//   program : 80h, 5 address cycles, XFER_BYTES data writes, 10h, wait, 70h, status
//   erase   : 60h, 3 row address cycles, D0h, wait, 70h, status
//   reset   : FFh, wait
// The command port (`cmd_start`, `cmd`, `cmd_done`) and pin names follow the
// controller's recorded program-page waveform; the command bytes are the ONFI
// ones; the strobe widths are parameters in clock cycles whose defaults give
// about 10 ns pulses and 100 ns tWB at the 1.5 ns clock the controller was
// built for (own choice of ONFI timing mode).
//
// Interface: pulse `cmd_start` with `cmd`, `row_addr` and `col_addr` stable
// while `busy` is low. Program data is fetched by index (`wr_idx`) from a
// buffer answering combinationally on `wr_data`. Read data leaves on
// `rd_valid`/`rd_idx`/`rd_data`, one byte per RE_n cycle. `cmd_done` pulses
// for one clock at the end, with `cmd_fail` = status bit 0 (program/erase
// failed). The pad is split into `io_out`, `io_oe` and `io_in`.
module nand_ctrl
  import flash_pkg::*;
#(
  parameter int unsigned XFER_BYTES = CW_BYTES,
  parameter int unsigned T_WP  = 7,   // WE_n low, clocks
  parameter int unsigned T_WH  = 7,   // WE_n high, clocks
  parameter int unsigned T_RP  = 7,   // RE_n low, clocks
  parameter int unsigned T_REH = 7,   // RE_n high, clocks
  parameter int unsigned T_WB  = 67,  // last WE_n rise to R/B_n sampling
  localparam int unsigned IW   = $clog2(XFER_BYTES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // operation request
  input  logic          cmd_start,
  input  nand_op_e      cmd,
  input  logic [23:0]   row_addr,
  input  logic [15:0]   col_addr,
  output logic          busy,
  output logic          cmd_done,
  output logic          cmd_fail,
  // data
  output logic [IW-1:0] wr_idx,
  input  logic [7:0]    wr_data,
  output logic          rd_valid,
  output logic [IW-1:0] rd_idx,
  output logic [7:0]    rd_data,
  // NAND pins
  output logic          ce_n,
  output logic          cle,
  output logic          ale,
  output logic          we_n,
  output logic          re_n,
  output logic          wp_n,
  output logic [7:0]    io_out,
  output logic          io_oe,
  input  logic [7:0]    io_in,
  input  logic          rb_n
);

  typedef enum logic [3:0] {
    S_IDLE, S_CMD1, S_ADDR, S_DIN, S_CMD2, S_WB, S_RB, S_DOUT, S_SCMD, S_STAT, S_DONE
  } st_e;

  st_e       st_q;
  nand_op_e  op_q;
  logic [23:0] row_q;
  logic [15:0] col_q;
  logic        ph_q;                 // 0: strobe low, 1: strobe high
  logic [7:0]  t_q;
  logic [IW-1:0] n_q;                // byte / address cycle index
  logic        stat_fail_q;
  logic [1:0]  rb_sync_q;

  wire wr_cycle = (st_q inside {S_CMD1, S_ADDR, S_DIN, S_CMD2, S_SCMD});
  wire rd_cycle = (st_q inside {S_DOUT, S_STAT});
  wire lo_end   = (!ph_q) && (t_q == 8'(wr_cycle ? T_WP - 1 : T_RP - 1));
  wire hi_end   = ( ph_q) && (t_q == 8'(wr_cycle ? T_WH - 1 : T_REH - 1));
  wire n_addr   = (op_q == OP_ERASE) ? 1'b1 : 1'b0;  // erase: row cycles only

  // address byte for cycle n
  logic [7:0] addr_byte;
  always_comb begin
    logic [39:0] a;
    a = (op_q == OP_ERASE) ? {16'h0, row_q} : {row_q, col_q};
    addr_byte = a[8*n_q[2:0] +: 8];
  end

  logic [7:0] cmd1_byte, cmd2_byte;
  always_comb begin
    unique case (op_q)
      OP_READ:    begin cmd1_byte = NC_READ1;  cmd2_byte = NC_READ2;  end
      OP_PROGRAM: begin cmd1_byte = NC_PROG1;  cmd2_byte = NC_PROG2;  end
      OP_ERASE:   begin cmd1_byte = NC_ERASE1; cmd2_byte = NC_ERASE2; end
      default:    begin cmd1_byte = NC_RESET;  cmd2_byte = NC_RESET;  end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rb_sync_q <= '0;
    else        rb_sync_q <= {rb_sync_q[0], rb_n};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      op_q        <= OP_IDLE;
      row_q       <= '0;
      col_q       <= '0;
      ph_q        <= 1'b0;
      t_q         <= '0;
      n_q         <= '0;
      stat_fail_q <= 1'b0;
    end else begin
      // strobe phase timer for bus cycles
      if (wr_cycle || rd_cycle) begin
        if (lo_end) begin
          ph_q <= 1'b1;
          t_q  <= '0;
        end else if (hi_end) begin
          ph_q <= 1'b0;
          t_q  <= '0;
        end else begin
          t_q  <= t_q + 1'b1;
        end
      end
      unique case (st_q)
        S_IDLE: if (cmd_start && cmd != OP_IDLE) begin
          op_q        <= cmd;
          row_q       <= row_addr;
          col_q       <= col_addr;
          stat_fail_q <= 1'b0;
          ph_q        <= 1'b0;
          t_q         <= '0;
          n_q         <= '0;
          st_q        <= S_CMD1;
        end
        S_CMD1: if (hi_end) begin
          n_q  <= '0;
          st_q <= (op_q == OP_RESET) ? S_WB : S_ADDR;
          t_q  <= '0;
        end
        S_ADDR: if (hi_end) begin
          if (n_q == IW'(n_addr ? 2 : 4)) begin
            n_q  <= '0;
            st_q <= (op_q == OP_PROGRAM) ? S_DIN : S_CMD2;
          end else begin
            n_q  <= n_q + 1'b1;
          end
        end
        S_DIN: if (hi_end) begin
          if (n_q == IW'(XFER_BYTES - 1)) begin
            n_q  <= '0;
            st_q <= S_CMD2;
          end else begin
            n_q  <= n_q + 1'b1;
          end
        end
        S_CMD2: if (hi_end) begin
          st_q <= S_WB;
          t_q  <= '0;
        end
        S_WB: begin
          t_q <= t_q + 1'b1;
          if (t_q == 8'(T_WB - 1)) st_q <= S_RB;
        end
        S_RB: if (rb_sync_q[1]) begin
          ph_q <= 1'b0;
          t_q  <= '0;
          n_q  <= '0;
          unique case (op_q)
            OP_READ:  st_q <= S_DOUT;
            OP_RESET: st_q <= S_DONE;
            default:  st_q <= S_SCMD;
          endcase
        end
        S_DOUT: if (hi_end) begin
          if (n_q == IW'(XFER_BYTES - 1)) st_q <= S_DONE;
          else                            n_q  <= n_q + 1'b1;
        end
        S_SCMD: if (hi_end) st_q <= S_STAT;
        S_STAT: begin
          if (lo_end) stat_fail_q <= io_in[0];
          if (hi_end) st_q <= S_DONE;
        end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // pins
  always_comb begin
    ce_n   = (st_q == S_IDLE);
    cle    = (st_q inside {S_CMD1, S_CMD2, S_SCMD});
    ale    = (st_q == S_ADDR);
    we_n   = !(wr_cycle && !ph_q);
    re_n   = !(rd_cycle && !ph_q);
    wp_n   = 1'b1;
    io_oe  = wr_cycle;
    unique case (st_q)
      S_CMD1:  io_out = cmd1_byte;
      S_CMD2:  io_out = cmd2_byte;
      S_SCMD:  io_out = NC_STATUS;
      S_ADDR:  io_out = addr_byte;
      S_DIN:   io_out = wr_data;
      default: io_out = 8'h00;
    endcase
  end

  assign busy     = (st_q != S_IDLE);
  assign cmd_done = (st_q == S_DONE);
  assign cmd_fail = stat_fail_q;
  assign wr_idx   = n_q;
  assign rd_idx   = n_q;
  assign rd_valid = (st_q == S_DOUT) && lo_end;
  assign rd_data  = io_in;

endmodule
