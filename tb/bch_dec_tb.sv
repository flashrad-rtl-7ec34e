// bch_dec_tb: encodes random sectors with the testbench's own polynomial
// division by g(x) = 0x4D5154B, injects 0, 1 or 2 bit errors anywhere in the
// 4122-bit codeword (data or parity), and checks that the decoder returns the
// original 512 bytes, reports the number of corrected bits and does not flag
// the sector. Three-error words must not be reported as clean. Also checks
// back-pressure on the output and the decode latency bound.
module bch_dec_tb;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, done, uncorrectable;
  logic [7:0] in_data = 0, out_data;
  logic [1:0] err_cnt;
  int checks = 0, failures = 0;
  logic [7:0] data [512];
  logic [7:0] cw [516];

  bch_dec dut (.*);

  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_parity();
    logic [25:0] r = 0;
    logic fb;
    for (int i = 0; i < 512; i++)
      for (int k = 7; k >= 0; k--) begin
        fb = data[i][k] ^ r[25];
        r = {r[24:0], 1'b0};
        if (fb) r ^= 26'h0D5154B;
      end
    return {6'b0, r};
  endfunction

  // flip codeword bit at polynomial degree d
  task automatic flip_deg(input int d);
    if (d >= 26) begin
      int i = 511 - (d - 26) / 8;
      cw[i][(d - 26) % 8] ^= 1'b1;
    end else begin
      cw[515 - d / 8][d % 8] ^= 1'b1;
    end
  endtask

  task automatic run(input int nerr, input bit stall);
    logic [31:0] p;
    int d0, d1, d2, cyc, nout;
    for (int i = 0; i < 512; i++) data[i] = 8'($urandom);
    p = ref_parity();
    for (int i = 0; i < 512; i++) cw[i] = data[i];
    cw[512] = p[31:24]; cw[513] = p[23:16]; cw[514] = p[15:8]; cw[515] = p[7:0];
    d0 = $urandom_range(4121, 0);
    do d1 = $urandom_range(4121, 0); while (d1 == d0);
    do d2 = $urandom_range(4121, 0); while (d2 == d0 || d2 == d1);
    if (nerr > 0) flip_deg(d0);
    if (nerr > 1) flip_deg(d1);
    if (nerr > 2) flip_deg(d2);
    for (int i = 0; i < 516; i++) begin
      in_valid <= 1; in_data <= cw[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    nout = 0; cyc = 0;
    while (!done) begin
      out_ready <= stall ? 1'($urandom) : 1'b1;
      @(negedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        if (nerr < 3) begin
          checks++;
          if (out_data !== data[nout]) begin
            failures++;
            if (failures < 10) $display("byte %0d got %h exp %h (nerr %0d d %0d %0d)", nout, out_data, data[nout], nerr, d0, d1);
          end
        end
        nout++;
      end
      @(posedge clk);
      if (cyc > 4000) break;
    end
    checks++; if (nout != 512) begin failures++; $display("got %0d bytes", nout); end
    if (!stall) begin
      checks++; if (cyc > 516 + 20) begin failures++; $display("latency %0d", cyc); end
    end
    if (nerr < 3) begin
      checks++;
      if (err_cnt != 2'(nerr) || uncorrectable) begin
        failures++; $display("nerr %0d err_cnt %0d unc %0d", nerr, err_cnt, uncorrectable);
      end
    end else begin
      checks++;
      if (err_cnt == 0 && !uncorrectable) begin failures++; $display("3 errors reported clean"); end
    end
    out_ready <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 4; n++) run(0, 0);
    for (int n = 0; n < 12; n++) run(1, n[0]);
    for (int n = 0; n < 24; n++) run(2, n[0]);
    for (int n = 0; n < 6; n++) run(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
