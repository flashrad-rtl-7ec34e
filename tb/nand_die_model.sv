// nand_die_model: behavioural model of one 8-bit ONFI NAND die for the
// testbenches (not synthesizable). It latches commands, addresses and data
// on the rising edge of WE_n, drives read data while RE_n is low and advances
// the column on the rising edge of RE_n. Pages are held sparsely, keyed by
// {row, column}; erased bytes read as FFh. Erase clears every byte of the
// given row. Ready/busy goes low for T_BUSY time units after 30h, 10h, D0h
// and FFh. Testbenches can make a row fail to program or erase
// (`fail_row`) and flip stored bits (`flip_bit`) to emulate radiation upsets.
// It counts the commands it has seen for cycle and sequence checks.
module nand_die_model #(
  parameter int T_BUSY = 200
) (
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic       wp_n,
  input  logic [7:0] io_in,    // from controller
  output logic [7:0] io_out,   // to controller
  output logic       rb_n
);
  logic [7:0] mem [longint];
  bit         fail_rows [int];
  logic [7:0] cmd_q = 8'hFF;
  logic [7:0] addr_q [5];
  int         nadr = 0;
  logic [23:0] row = 0;
  logic [15:0] col = 0;
  logic        status_mode = 0;
  logic        fail_q = 0;
  int n_read = 0, n_prog = 0, n_erase = 0, n_reset = 0, n_status = 0;
  int bytes_in = 0;

  initial rb_n = 1;

  function automatic longint key(input logic [23:0] r, input logic [15:0] c);
    return {24'h0, r, c};
  endfunction

  function automatic logic [7:0] peek(input logic [23:0] r, input logic [15:0] c);
    return mem.exists(key(r, c)) ? mem[key(r, c)] : 8'hFF;
  endfunction

  function automatic void fail_row(input int r, input bit f);
    fail_rows[r] = f;
  endfunction

  function automatic void flip_bit(input logic [23:0] r, input logic [15:0] c, input int b);
    logic [7:0] v = peek(r, c);
    v[b] = ~v[b];
    mem[key(r, c)] = v;
  endfunction

  logic [7:0] page [int];   // program page register, column -> byte

  task automatic go_busy();
    rb_n = 0;
    #(T_BUSY);
    rb_n = 1;
  endtask

  always @(posedge we_n) if (!ce_n) begin
    if (cle) begin
      cmd_q = io_in;
      status_mode = 0;
      unique case (io_in)
        8'hFF: begin n_reset++; fail_q = 0; fork go_busy(); join_none end
        8'h00, 8'h80, 8'h60: begin nadr = 0; page.delete(); bytes_in = 0; end
        8'h30: begin
          n_read++;
          row = {addr_q[4], addr_q[3], addr_q[2]};
          col = {addr_q[1], addr_q[0]};
          fork go_busy(); join_none
        end
        8'h10: begin
          n_prog++;
          row = {addr_q[4], addr_q[3], addr_q[2]};
          fail_q = !wp_n || (fail_rows.exists(int'(row)) && fail_rows[int'(row)]);
          if (!fail_q) foreach (page[c]) mem[key(row, 16'(c))] = page[c];
          fork go_busy(); join_none
        end
        8'hD0: begin
          longint lo, hi;
          n_erase++;
          row = {addr_q[2], addr_q[1], addr_q[0]};
          fail_q = !wp_n || (fail_rows.exists(int'(row)) && fail_rows[int'(row)]);
          if (!fail_q) begin
            lo = key(row, 16'h0);
            hi = key(row, 16'hFFFF);
            foreach (mem[k]) if (k >= lo && k <= hi) mem.delete(k);
          end
          fork go_busy(); join_none
        end
        8'h70: begin n_status++; status_mode = 1; end
        default: ;
      endcase
    end else if (ale) begin
      if (nadr < 5) addr_q[nadr] = io_in;
      nadr++;
      if (cmd_q == 8'h80) col = {addr_q[1], addr_q[0]};
    end else if (cmd_q == 8'h80) begin
      page[int'(col)] = io_in;
      col++;
      bytes_in++;
    end
  end

  assign io_out = status_mode ? {1'b1, rb_n, 5'b0, fail_q} : peek(row, col);

  always @(posedge re_n) if (!ce_n && !status_mode && cmd_q == 8'h30) col++;
endmodule
