// bad_block_fifo_tb: pushes suspect blocks with each cause marker, checks
// that the interrupt rises one clock after the first push and stays up
// while entries remain, that entries come back in order with their markers,
// and that overflow is flagged when more than DEPTH entries arrive.
module bad_block_fifo_tb;
  import flash_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, clr_ovf = 0, irq, full, overflow;
  bb_cause_e push_cause = BB_NONE, head_cause;
  logic [31:0] push_pbn = 0, head_pbn;
  int checks = 0, failures = 0;
  bb_cause_e qc [$];
  logic [31:0] qp [$];

  bad_block_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (irq) begin failures++; $display("irq at reset"); end
    for (int r = 0; r < 20; r++) begin
      int n = $urandom_range(1, D);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        push = 1; push_cause = bb_cause_e'($urandom_range(3, 1)); push_pbn = $urandom;
        qc.push_back(push_cause); qp.push_back(push_pbn);
        @(posedge clk); #1; push = 0;
        checks++; if (!irq) begin failures++; $display("irq missing"); end
      end
      while (qc.size() > 0) begin
        @(negedge clk);
        checks++;
        if (!irq || head_cause != qc[0] || head_pbn != qp[0]) begin
          failures++; $display("head %0d %h exp %0d %h", head_cause, head_pbn, qc[0], qp[0]);
        end
        pop = 1; @(posedge clk); #1; pop = 0;
        void'(qc.pop_front()); void'(qp.pop_front());
      end
      @(negedge clk);
      checks++; if (irq) begin failures++; $display("irq stuck"); end
    end
    for (int i = 0; i <= D; i++) begin
      @(negedge clk); push = 1; push_cause = BB_WRITE_FAIL; push_pbn = i; @(posedge clk); #1; push = 0;
    end
    @(negedge clk);
    checks++; if (!overflow || !full) begin failures++; $display("overflow missing"); end
    checks++; if (head_pbn != 0) begin failures++; $display("overflow corrupted head"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
