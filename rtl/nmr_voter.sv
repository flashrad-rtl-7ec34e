// nmr_voter: majority voter of the edge module in triple-modular redundancy.
//
// In redundant mode the module closest to the host replicates writes to two
// further modules of the daisy chain and, on a read, collects the three
// copies and votes, so the host sees a single device. This block is the
// vote: a bitwise two-out-of-three majority over data words that arrive
// together, plus flags naming the copy that disagreed, for the processor's
// health bookkeeping. Aligning the three streams (they come from different
// chain positions) is left to the link layer. Width is this design's
// choice. Timing: combinational majority, registered output, one clock.
module nmr_voter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] copy_a,
  input  logic [W-1:0] copy_b,
  input  logic [W-1:0] copy_c,
  output logic         out_valid,
  output logic [W-1:0] voted,
  output logic [2:0]   disagree   // bit i: copy i differs from the vote
);
  logic [W-1:0] maj;
  assign maj = (copy_a & copy_b) | (copy_a & copy_c) | (copy_b & copy_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      voted     <= '0;
      disagree  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        voted    <= maj;
        disagree <= {copy_c != maj, copy_b != maj, copy_a != maj};
      end
    end
  end
endmodule
