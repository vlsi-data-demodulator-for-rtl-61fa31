// Serial-to-parallel shift register towards the processor.
//
// Each decoded bit (valid pulse) enters at the top and moves down one place,
// so after eight bits b[0] holds the first of them and b[7] the last. The
// outputs are not latched: the processor reads them while the byte
// interrupt is high. The 8-bit width follows the document; the bit order is
// this design's choice.
module shift_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         bit_in,
  output logic [W-1:0] b
);

  always_ff @(posedge clk) begin
    if (!rst_n)     b <= '0;
    else if (valid) b <= {bit_in, b[W-1:1]};
  end

endmodule
