// sync_fifo_tb: drives random pushes and pops into the queue and compares
// every popped word, the empty/full flags and the count with a testbench
// queue. Also checks that a push into a full queue is dropped and sets the
// sticky overflow flag, and that clr_ovf clears it.
module sync_fifo_tb;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, clr_ovf = 0;
  logic [31:0] din = 0, dout;
  logic empty, full, overflow;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  sync_fifo #(.W(32), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || count != 4'(q.size())) begin
        failures++; $display("flags: size %0d empty %0d full %0d count %0d", q.size(), empty, full, count);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("head %h exp %h", dout, q[0]); end
      end
      push = (n < 1000) ? ($urandom_range(99) < 60) : ($urandom_range(99) < 40);
      pop  = (q.size() > 0) && ($urandom_range(99) < 50);
      din  = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push && (q.size() < D || pop)) q.push_back(din);
      push = 0; pop = 0;
    end
    // fill and overflow
    while (q.size() < D) begin
      @(negedge clk); push = 1; din = $urandom; @(posedge clk); #1; q.push_back(din); push = 0;
    end
    @(negedge clk); push = 1; din = 32'hDEAD; @(posedge clk); #1; push = 0;
    @(negedge clk);
    checks++; if (!overflow || count != 4'(D)) begin failures++; $display("overflow not flagged"); end
    clr_ovf = 1; @(posedge clk); #1; clr_ovf = 0; @(negedge clk);
    checks++; if (overflow) begin failures++; $display("overflow not cleared"); end
    while (q.size() > 0) begin
      @(negedge clk);
      checks++; if (dout != q[0]) begin failures++; $display("drain mismatch"); end
      pop = 1; @(posedge clk); #1; pop = 0; void'(q.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
