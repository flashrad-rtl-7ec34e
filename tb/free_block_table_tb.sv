// free_block_table_tb: the processor writes free blocks into slots; checks
// that allocation hands them out in table order, skips empty slots, serves a
// die-restricted request from the first matching slot without moving the
// head, and falls back to the die-interleaved round-robin walk (and, for a
// restricted request, the next block of that die) once the table is empty.
module free_block_table_tb;
  import flash_pkg::*;
  localparam int D = 8, NCH = 4;
  logic clk = 0, rst_n = 0;
  logic sw_we = 0, rr_load = 0, alloc_req = 0, alloc_die_en = 0, alloc_rr;
  logic [2:0] sw_idx = 0, head_idx;
  logic [31:0] sw_pbn = 0, alloc_pbn;
  logic [18:0] rr_blk = 0;
  logic [3:0] n_valid;
  logic [4:0] alloc_die = 0;
  int checks = 0, failures = 0;

  free_block_table #(.DEPTH(D), .NUM_CH(NCH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] pbn(input int die, input int blk);
    return (die << 19) | blk;
  endfunction

  task automatic wr(input int idx, input logic [31:0] p);
    @(negedge clk); sw_we = 1; sw_idx = 3'(idx); sw_pbn = p; @(posedge clk); #1; sw_we = 0;
  endtask

  task automatic take(input bit die_en, input int die, input logic [31:0] exp, input bit exp_rr);
    @(negedge clk); alloc_req = 1; alloc_die_en = die_en; alloc_die = 5'(die);
    #1;
    checks++;
    if (alloc_pbn != exp || alloc_rr != exp_rr) begin
      failures++; $display("alloc %h rr %0d exp %h rr %0d", alloc_pbn, alloc_rr, exp, exp_rr);
    end
    @(posedge clk); #1; alloc_req = 0; alloc_die_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(0, pbn(1, 100)); wr(1, pbn(2, 200)); wr(3, pbn(3, 300)); wr(4, pbn(2, 400));
    @(negedge clk); checks++; if (n_valid != 4) begin failures++; $display("n_valid %0d", n_valid); end
    take(0, 0, pbn(1, 100), 0);
    take(1, 3, pbn(3, 300), 0);          // restricted: slot 3, head stays at 1
    checks++; if (head_idx != 1) begin failures++; $display("head moved %0d", head_idx); end
    take(0, 0, pbn(2, 200), 0);
    take(0, 0, pbn(2, 400), 0);          // skips empty slots 2 and 3
    // empty: round robin from loaded position, dies interleaved
    @(negedge clk); rr_load = 1; rr_blk = 19'd50; @(posedge clk); #1; rr_load = 0;
    for (int i = 0; i < 6; i++) take(0, 0, pbn(i % NCH, 50 + i / NCH), 1);
    take(1, 2, pbn(2, 51), 1);
    take(0, 0, pbn(2, 52), 1);
    // refill wraps around the circular table
    for (int i = 0; i < D; i++) wr(i, pbn(i % NCH, 1000 + i));
    for (int i = 0; i < D; i++) take(0, 0, pbn((5 + i) % D % NCH, 1000 + (5 + i) % D), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
