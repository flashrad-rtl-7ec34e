// bch_enc_tb: checks the BCH encoder by evaluating the finished codeword at
// alpha and alpha^3 with the testbench's own GF(2^13) arithmetic: both
// syndromes of a valid codeword are zero. Also checks the all-zero sector,
// that `done` rises exactly after 512 bytes, and that a corrupted codeword
// is seen as invalid by the same syndrome check.
module bch_enc_tb;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [7:0] in_data = 0;
  logic [31:0] parity;
  logic done;
  int checks = 0, failures = 0;
  logic [7:0] data [512];

  bch_enc dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [12:0] mula(input logic [12:0] v);
    logic [13:0] t = {v, 1'b0};
    if (t[13]) t ^= 14'h201B;
    return t[12:0];
  endfunction

  // evaluate codeword polynomial at alpha^e (e = 1 or 3), bit flip at degree fpos (or -1)
  function automatic logic [12:0] synd(input int e, input logic [31:0] par, input int fpos);
    logic [12:0] s = 0;
    logic b;
    int deg;
    for (int i = 0; i < 512; i++)
      for (int k = 7; k >= 0; k--) begin
        deg = 26 + 8*(511-i) + k;
        b = data[i][k] ^ (deg == fpos);
        for (int r = 0; r < e; r++) s = mula(s);
        s[0] ^= b;
      end
    for (int k = 25; k >= 0; k--) begin
      b = par[k] ^ (k == fpos);
      for (int r = 0; r < e; r++) s = mula(s);
      s[0] ^= b;
    end
    return s;
  endfunction

  task automatic run_sector(input int mode);
    @(posedge clk); clr <= 1; @(posedge clk); clr <= 0;
    for (int i = 0; i < 512; i++) begin
      data[i] = (mode == 0) ? 8'h00 : 8'($urandom);
      in_valid <= 1; in_data <= data[i];
      @(posedge clk);
      if (i < 511) begin checks++; if (done) begin failures++; $display("early done"); end end
    end
    in_valid <= 0;
    @(negedge clk);
    checks++; if (!done) begin failures++; $display("done missing"); end
    checks++; if (parity[31:26] != 0) begin failures++; $display("pad bits set"); end
    if (mode == 0) begin
      checks++; if (parity != 0) begin failures++; $display("zero sector parity %h", parity); end
    end
    checks++;
    if (synd(1, parity, -1) != 0 || synd(3, parity, -1) != 0) begin
      failures++; $display("nonzero syndrome, parity %h", parity);
    end
    checks++;
    if (synd(1, parity, 100) == 0) begin failures++; $display("flip not detected"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_sector(0);
    for (int n = 0; n < 6; n++) run_sector(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
