// bch_dec: BCH decoder for one 516-byte codeword (512 data + 4 parity bytes),
// correcting up to two bit errors, one byte per clock.
//
// How it works: while the codeword streams in, the data bytes are kept in an
// internal sector buffer and the syndromes S1 = r(alpha) and S3 = r(alpha^3)
// are accumulated by Horner's rule over GF(2^13) (8 bits per clock; of parity
// byte 0 only its two low bits are code bits). The error-locator polynomial
// of a two-error BCH code has the closed form
//     sigma(x) = 1 + S1 x + (S1^2 + S3/S1) x^2,
// so the only iterative step is the inversion of S1 (a^(2^13-2), 13 clocks of
// square-and-multiply). A Chien search then runs alongside the output: bit
// position j is in error when alpha^2j + sigma1 alpha^j + sigma2 = 0, and the
// eight positions of each byte are tested in parallel while it is sent. The
// parity bytes are searched too, so the number of roots found can be compared
// with the degree of sigma; a mismatch, or S1 = 0 with S3 != 0, flags the
// sector uncorrectable. The algorithm (closed-form t = 2 locator, on-the-fly
// Chien search) is this design's choice; the cube only asks for a BCH code.
//
// Interface: bytes enter on `in_valid`/`in_data` while `in_ready`. The 512
// corrected data bytes leave on `out_valid`/`out_data`, `out_ready` applying
// back-pressure. `done` pulses one clock after the last parity byte has been
// searched, with `err_cnt` (bit errors corrected) and `uncorrectable`.
// Timing: 516 clocks in, 2-16 clocks to solve, 516 clocks out (data bytes
// stall while `out_ready` is low).
module bch_dec
  import flash_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       done,
  output logic [1:0] err_cnt,
  output logic       uncorrectable
);

  localparam int unsigned NB = CW_BYTES;
  // alpha^(26 + 8*511) and alpha^(2*(26 + 8*511) mod 8191): Chien start values
  localparam gf_t ALPHA_D0  = 13'h126D;
  localparam gf_t ALPHA_2D0 = 13'h0F6B;

  typedef enum logic [2:0] {S_IN, S_KEY, S_INV, S_SIG, S_OUT, S_DONE} st_e;
  st_e st_q;

  logic [7:0]  sbuf [SECTOR_BYTES];
  localparam int unsigned IXW = $clog2(NB);
  localparam logic [IXW-1:0] IX_SEC  = IXW'(SECTOR_BYTES);     // first parity byte
  localparam logic [IXW-1:0] IX_DLST = IXW'(SECTOR_BYTES - 1); // last data byte
  localparam logic [IXW-1:0] IX_LAST = IXW'(NB - 1);           // last codeword byte
  logic [IXW-1:0] idx_q;
  gf_t s1_q, s3_q, inv_q, sig1_q, sig2_q, b_q, c_q;
  logic [3:0]  istep_q;
  logic [2:0]  roots_q;
  logic [1:0]  expect_q;
  logic        unc_q;

  // valid code bits in the current byte position
  function automatic int unsigned nvalid(input logic [IXW-1:0] i);
    return (i == IX_SEC) ? (BCH_PAR_BITS - 24) : 8;
  endfunction

  // ---------------- syndrome accumulation ----------------
  gf_t s1_d, s3_d;
  always_comb begin
    s1_d = s1_q;
    s3_d = s3_q;
    for (int k = 7; k >= 0; k--) begin
      if (k < int'(nvalid(idx_q))) begin
        s1_d = gf_mul_a(s1_d) ^ gf_t'(in_data[k]);
        s3_d = gf_mul_an(s3_d, 3) ^ gf_t'(in_data[k]);
      end
    end
  end

  // ---------------- Chien search of the current output byte ----------------
  logic [7:0] flip;
  logic [2:0] nflip;
  always_comb begin
    gf_t bk, ck;
    bk = b_q;
    ck = c_q;
    flip = '0;
    for (int k = 0; k < 8; k++) begin
      if (k < int'(nvalid(idx_q)) && ((bk ^ ck ^ sig2_q) == '0)) flip[k] = 1'b1;
      bk = gf_mul_a(bk);
      ck = gf_mul_an(ck, 2);
    end
    nflip = 3'($countones(flip));
  end

  wire out_fire = (st_q == S_OUT) && (idx_q < IX_SEC) && out_ready;
  wire par_step = (st_q == S_OUT) && (idx_q >= IX_SEC);

  always_ff @(posedge clk) begin
    if (st_q == S_IN && in_valid && idx_q < IX_SEC) sbuf[idx_q[8:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IN;
      idx_q    <= '0;
      s1_q     <= '0;
      s3_q     <= '0;
      inv_q    <= '0;
      sig1_q   <= '0;
      sig2_q   <= '0;
      b_q      <= '0;
      c_q      <= '0;
      istep_q  <= '0;
      roots_q  <= '0;
      expect_q <= '0;
      unc_q    <= 1'b0;
    end else begin
      unique case (st_q)
        S_IN: if (in_valid) begin
          s1_q <= s1_d;
          s3_q <= s3_d;
          if (idx_q == IX_LAST) begin
            idx_q <= '0;
            st_q  <= S_KEY;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        S_KEY: begin
          roots_q <= '0;
          unc_q   <= 1'b0;
          if (s1_q == '0) begin
            sig1_q   <= '0;
            sig2_q   <= '0;
            expect_q <= 2'd0;
            unc_q    <= (s3_q != '0);
            st_q     <= S_SIG;
          end else begin
            inv_q   <= gf_t'(1);
            istep_q <= 4'd12;
            st_q    <= S_INV;
          end
        end
        S_INV: begin
          // inv = s1^(2^13 - 2): exponent bits 12..1 are one, bit 0 is zero
          if (istep_q != 0) inv_q <= gf_mul(gf_mul(inv_q, inv_q), s1_q);
          else              inv_q <= gf_mul(inv_q, inv_q);
          if (istep_q == 0) begin
            st_q <= S_SIG;
            // sigma is formed in S_SIG from the finished inverse
          end
          istep_q <= istep_q - 1'b1;
        end
        S_SIG: begin
          if (s1_q != '0) begin
            sig1_q   <= s1_q;
            sig2_q   <= gf_mul(s1_q, s1_q) ^ gf_mul(s3_q, inv_q);
            expect_q <= ((gf_mul(s1_q, s1_q) ^ gf_mul(s3_q, inv_q)) == '0) ? 2'd1 : 2'd2;
            b_q      <= gf_mul(s1_q, ALPHA_D0);
          end else begin
            b_q      <= '0;
          end
          c_q  <= ALPHA_2D0;
          st_q <= S_OUT;
        end
        S_OUT: if (out_fire || par_step) begin
          roots_q <= roots_q + nflip;
          if (idx_q == IX_DLST) begin
            // next byte is parity byte 0, whose bit 0 has degree 24
            b_q <= gf_mul_ainvn(b_q, 2);
            c_q <= gf_mul_ainvn(c_q, 4);
          end else begin
            b_q <= gf_mul_ainvn(b_q, 8);
            c_q <= gf_mul_ainvn(c_q, 16);
          end
          if (idx_q == IX_LAST) begin
            idx_q <= '0;
            st_q  <= S_DONE;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        S_DONE: begin
          s1_q <= '0;
          s3_q <= '0;
          st_q <= S_IN;
        end
        default: st_q <= S_IN;
      endcase
    end
  end

  assign in_ready      = (st_q == S_IN);
  assign out_valid     = (st_q == S_OUT) && (idx_q < IX_SEC);
  assign out_data      = sbuf[idx_q[8:0]] ^ flip;
  assign done          = (st_q == S_DONE);
  assign err_cnt       = (roots_q > 3'd2) ? 2'd3 : roots_q[1:0];
  assign uncorrectable = unc_q || (roots_q != {1'b0, expect_q});

endmodule
