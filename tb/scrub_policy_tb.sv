// scrub_policy_tb: checks the scrub decision against the rule worked out in
// the testbench (errors below threshold: nothing; otherwise relocate if the
// program/erase count reached its threshold, else rewrite; uncorrectable
// always acts) for the reset thresholds and for reprogrammed ones. Each
// round starts with counts just below, at and above both thresholds.
module scrub_policy_tb;
  import flash_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, eval = 0, uncorrectable = 0, act_valid;
  logic [1:0] cfg_err_thresh = 0, err_cnt = 0;
  logic [15:0] cfg_pe_thresh = 0, pe_cnt = 0;
  scrub_act_e action;
  int checks = 0, failures = 0;

  scrub_policy dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic trial(input int eth, input int pth);
    scrub_act_e exp;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      eval = 1; err_cnt = 2'($urandom); uncorrectable = ($urandom_range(9) == 0);
      pe_cnt = 16'($urandom_range(2 * pth));
      // the first trials sit on the thresholds, where >= and > differ
      if (n < 24) begin
        pe_cnt = 16'(pth - 1 + n % 3);
        err_cnt = 2'(eth - 1 + (n / 3) % 2);
        uncorrectable = 0;
      end
      if (!uncorrectable && err_cnt < eth) exp = SCRUB_NONE;
      else if (pe_cnt >= pth)              exp = SCRUB_RELOCATE;
      else                                 exp = SCRUB_REWRITE;
      @(posedge clk); #1; eval = 0;
      checks++;
      if (!act_valid || action != exp) begin
        failures++; $display("err %0d unc %0d pe %0d: got %s exp %s", err_cnt, uncorrectable, pe_cnt, action.name(), exp.name());
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    trial(1, 3000);
    @(negedge clk); cfg_we = 1; cfg_err_thresh = 2; cfg_pe_thresh = 100;
    @(posedge clk); #1; cfg_we = 0;
    trial(2, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
