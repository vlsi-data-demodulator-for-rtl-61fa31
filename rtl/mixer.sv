// Input mixer: a single D flip-flop that samples the hard-limited IF signal.
//
// Sampling the 5 MHz IF at 5.23 MHz (en_mix, 68 MHz / 13) folds it down to
// the difference frequency, about 230 kHz, which is the ADPLL's nominal
// input. The output changes only on en_mix ticks, so it is quantised to about
// 23 phase steps per cycle of the 230 kHz output. if_in is taken as already
// synchronous to clk (one sampling flip-flop, as in the document).
module mixer (
  input  logic clk,
  input  logic rst_n,
  input  logic en_mix,
  input  logic if_in,
  output logic mix_out
);

  always_ff @(posedge clk) begin
    if (!rst_n)      mix_out <= 1'b0;
    else if (en_mix) mix_out <= if_in;
  end

endmodule
