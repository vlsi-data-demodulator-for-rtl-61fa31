// DPSK decoder: one flip-flop and one XOR.
//
// On each data clock pulse the filtered bit d[n] is compared with the bit of
// the previous bit period d[n-1]: d_out = d[n] xor d[n-1], so a 1 means a
// 180-degree phase reversal at the start of the bit. This makes the result
// independent of the 0/180-degree ambiguity of the carrier loop. d_out and a
// one-cycle valid pulse appear in the cycle after d_clk.
// Differential decoding follows the document; the valid strobe and its
// one-cycle latency are this design's own choice.
module dpsk_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic d_clk,
  input  logic d_in,
  output logic d_out,
  output logic valid
);

  logic d_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_prev <= 1'b0; d_out <= 1'b0; valid <= 1'b0;
    end else begin
      valid <= d_clk;
      if (d_clk) begin
        d_prev <= d_in;
        d_out  <= d_in ^ d_prev;
      end
    end
  end

endmodule
