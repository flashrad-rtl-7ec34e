// bch_enc: systematic BCH encoder for one 512-byte sector, one byte per clock.
//
// The sector is treated as the high-order part of the codeword polynomial
// (byte 0 first, most significant bit first) and divided by the generator
// g(x) = m1(x)*m3(x) over GF(2^13), giving a 26-bit remainder that corrects
// any two bit errors in the 4122-bit codeword. The cube stores such parity
// in the spare area of each die; the code parameters (t = 2, 512-byte
// sectors, GF(2^13)) are this design's choice.
//
// Interface: pulse `clr` to start a sector, then present bytes with
// `in_valid`. After SECTOR_BYTES bytes `done` is high and `parity` holds the
// remainder, zero padded to 32 bits (`parity[31:26]` = 0), until `clr`.
// Bytes offered after `done` are ignored. Latency: the parity is valid the
// cycle after the last byte.
module bch_enc
  import flash_pkg::*;
#(
  parameter int unsigned SECTOR = SECTOR_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic [31:0] parity,
  output logic        done
);

  logic [BCH_PAR_BITS-1:0] rem_q, rem_d;
  logic [$clog2(SECTOR+1)-1:0] cnt_q;

  always_comb begin
    logic fb;
    rem_d = rem_q;
    for (int k = 7; k >= 0; k--) begin
      fb    = in_data[k] ^ rem_d[BCH_PAR_BITS-1];
      rem_d = {rem_d[BCH_PAR_BITS-2:0], 1'b0} ^ (fb ? BCH_GEN[BCH_PAR_BITS-1:0] : '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      cnt_q <= '0;
    end else if (clr) begin
      rem_q <= '0;
      cnt_q <= '0;
    end else if (in_valid && !done) begin
      rem_q <= rem_d;
      cnt_q <= cnt_q + 1'b1;
    end
  end

  assign done   = (cnt_q == SECTOR[$bits(cnt_q)-1:0]);
  assign parity = {{(32-BCH_PAR_BITS){1'b0}}, rem_q};

endmodule
