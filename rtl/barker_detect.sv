// Barker detector: finds the 5-bit frame synchronisation code 11101.
//
// Decoded bits enter a 5-bit shift register, oldest bit in the MSB, on each
// valid pulse. found pulses for one cycle when the bit just shifted in
// completes the pattern. clear empties the register. The code follows the
// document; the shift-register matcher is the simplest circuit that does it.
module barker_detect #(
  parameter logic [4:0] PATTERN = mls_pkg::BARKER
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic valid,
  input  logic bit_in,
  output logic found
);

  logic [4:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sr    <= '0;
      found <= 1'b0;
    end else begin
      found <= 1'b0;
      if (valid) begin
        sr    <= {sr[3:0], bit_in};
        found <= ({sr[3:0], bit_in} == PATTERN);
      end
    end
  end

endmodule
