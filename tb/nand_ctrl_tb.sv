// nand_ctrl_tb: runs the NAND command sequencer against the behavioural die.
// Checks reset, program (data landing in the die at the right row/column),
// read-back through the controller, erase (page reads back FFh), a program
// and an erase failure reported through the status read, the number of WE_n
// and RE_n strobes of each operation, and the WE_n low/high widths.
module nand_ctrl_tb;
  import flash_pkg::*;
  localparam int N = 516;
  logic clk = 0, rst_n = 0;
  logic cmd_start = 0;
  nand_op_e cmd = OP_IDLE;
  logic [23:0] row_addr = 0;
  logic [15:0] col_addr = 0;
  logic busy, cmd_done, cmd_fail, rd_valid;
  logic [9:0] wr_idx, rd_idx;
  logic [7:0] wr_data, rd_data;
  logic ce_n, cle, ale, we_n, re_n, wp_n, io_oe, rb_n;
  logic [7:0] io_out, io_in;
  int checks = 0, failures = 0;
  logic [7:0] buf_w [N];
  logic [7:0] buf_r [N];

  nand_ctrl #(.T_WP(2), .T_WH(1), .T_RP(2), .T_REH(1), .T_WB(4)) dut (.*);
  nand_die_model #(.T_BUSY(300)) die (.ce_n, .cle, .ale, .we_n, .re_n, .wp_n,
    .io_in(io_out), .io_out(io_in), .rb_n);

  assign wr_data = buf_w[wr_idx];
  always @(posedge clk) if (rd_valid) buf_r[rd_idx] <= rd_data;

  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_we = 0, n_re = 0, lo_w = 0, hi_w = 1000, lo_run = 0, hi_run = 0;
  logic we_d = 1;
  always @(negedge we_n) n_we++;
  always @(negedge re_n) n_re++;
  always @(posedge clk) begin
    we_d <= we_n;
    if (!we_n) lo_run <= lo_run + 1; else lo_run <= 0;
    if (we_n && !ce_n) hi_run <= hi_run + 1; else hi_run <= 0;
    if (we_n && !we_d) lo_w <= lo_run;
    if (!we_n && we_d && hi_run != 0 && hi_run < hi_w) hi_w <= hi_run;
  end

  task automatic do_op(input nand_op_e op, input int row, input int col, output logic fail);
    n_we = 0; n_re = 0;
    @(posedge clk);
    cmd <= op; row_addr <= 24'(row); col_addr <= 16'(col); cmd_start <= 1;
    @(posedge clk);
    cmd_start <= 0;
    while (!cmd_done) @(posedge clk);
    fail = cmd_fail;
    @(posedge clk);
  endtask

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_op(OP_RESET, 0, 0, f);
    chk(die.n_reset == 1 && n_we == 1 && n_re == 0, "reset sequence");
    for (int i = 0; i < N; i++) buf_w[i] = 8'($urandom);
    do_op(OP_PROGRAM, 24'h012345, 516, f);
    chk(!f, "program pass");
    chk(n_we == 1 + 5 + N + 1 + 1, $sformatf("program WE count %0d", n_we));
    chk(n_re == 1, "program status read");
    chk(lo_w == 2 && hi_w == 1, $sformatf("WE widths %0d %0d", lo_w, hi_w));
    for (int i = 0; i < N; i++) chk(die.peek(24'h012345, 16'(516 + i)) == buf_w[i], "die contents");
    chk(die.peek(24'h012345, 16'(515)) == 8'hFF, "byte before column untouched");
    do_op(OP_READ, 24'h012345, 516, f);
    chk(n_we == 1 + 5 + 1 && n_re == N, $sformatf("read strobes %0d %0d", n_we, n_re));
    for (int i = 0; i < N; i++) chk(buf_r[i] == buf_w[i], "read data");
    do_op(OP_ERASE, 24'h012345, 0, f);
    chk(!f && n_we == 1 + 3 + 1 + 1, "erase");
    do_op(OP_READ, 24'h012345, 516, f);
    chk(buf_r[0] == 8'hFF && buf_r[N-1] == 8'hFF, "erased reads FF");
    die.fail_row(77, 1);
    do_op(OP_PROGRAM, 77, 0, f);
    chk(f, "program failure reported");
    chk(die.peek(24'd77, 16'd0) == 8'hFF, "failed program left page");
    do_op(OP_ERASE, 77, 0, f);
    chk(f, "erase failure reported");
    die.fail_row(77, 0);
    do_op(OP_PROGRAM, 77, 0, f);
    chk(!f, "program passes after clearing failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
