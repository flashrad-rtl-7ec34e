// nmr_voter_tb: feeds the voter random triples where at most one copy is
// corrupted (must vote back the true word and name the bad copy), triples
// with two copies corrupted in disjoint bits (still exact per bit), and
// checks the one-clock output latency.
module nmr_voter_tb;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] copy_a = 0, copy_b = 0, copy_c = 0, voted;
  logic [2:0] disagree;
  int checks = 0, failures = 0;

  nmr_voter #(.W(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] t, m1, m2;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      t = $urandom; bad = $urandom_range(3); m1 = $urandom;
      m2 = $urandom & ~m1;
      @(negedge clk);
      in_valid = 1;
      copy_a = t ^ ((bad == 0) ? m1 : 0);
      copy_b = t ^ ((bad == 1) ? m1 : 0);
      copy_c = t ^ ((bad == 2) ? m1 : 0);
      if (n % 5 == 4) begin copy_a = t ^ m1; copy_b = t ^ m2; copy_c = t; end
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || voted != t) begin failures++; $display("vote %h exp %h", voted, t); end
      if (n % 5 != 4) begin
        checks++;
        if (disagree != ((bad < 3 && m1 != 0) ? 3'(1 << bad) : 3'b0)) begin
          failures++; $display("disagree %b bad %0d", disagree, bad);
        end
      end
      @(posedge clk); #1;
      checks++; if (out_valid) begin failures++; $display("valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
