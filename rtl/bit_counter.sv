// Bit counter and interrupt generator.
//
// While enable is high, counts the decoded bits (valid pulses) modulo 8. When
// the eighth bit of a group arrives, int_o goes high and stays high until the
// next bit arrives, i.e. for one 64 us bit period, during which the processor
// reads the byte b0..b7 from the shift register. clear (reset_2, given when
// the Barker code has been found) restarts the count so that bytes are
// aligned to the first bit after the Barker code. Interrupting once per byte
// follows the document; the interrupt's length is this design's choice.
module bit_counter #(
  parameter int unsigned BYTE_BITS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic enable,
  input  logic valid,
  output logic int_o
);

  localparam int unsigned CW = $clog2(BYTE_BITS);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt   <= '0;
      int_o <= 1'b0;
    end else if (enable && valid) begin
      int_o <= (cnt == CW'(BYTE_BITS - 1));
      cnt   <= (cnt == CW'(BYTE_BITS - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
